// skew_detection_block: behavioural model (not synthesizable logic) of the
// TIC's input stage, three identical skew detection circuits as in the
// original chip.
//
// D1 latches S1 at each rising edge of RF and D2 latches S2 there; as RF
// differs slightly in frequency from S1/S2, their outputs are beat signals
// of frequency |f0-fR| whose phase difference is the S1-S2 interval
// stretched by fR/|f0-fR|. D3 latches S2 at each rising edge of S1 and so
// gives the polarity of the S1-S2 skew (1 when S2 lags S1 by more than half
// a period). Which input of each pair acts as strobe is this design's
// choice; making RF the strobe of D1/D2 keeps the beat signals synchronous to
// the RF clock that runs the digital part.
//
// Timing: b1/b2 settle STROBE_DELAY_PS after each RF rising edge, well
// before the next one for clock rates up to the original chip's 700 MHz.
`timescale 1ps / 1fs
module skew_detection_block #(
  parameter real STROBE_DELAY_PS = 300.0,
  parameter real STROBE_WIDTH_PS = 300.0,
  parameter real TAU_IN_PS       = 0.8,
  parameter real TAU_OUT_PS      = 4.5
) (
  input  logic s1,      // marker clock
  input  logic s2,      // measured clock
  input  logic rf,      // reference clock
  output logic b1,      // D1: beat signal S1 vs RF
  output logic b2,      // D2: beat signal S2 vs RF
  output logic d3_pol   // D3: skew polarity S1 vs S2
);


  skew_detector #(.STROBE_DELAY_PS(STROBE_DELAY_PS), .STROBE_WIDTH_PS(STROBE_WIDTH_PS),
                  .TAU_IN_PS(TAU_IN_PS), .TAU_OUT_PS(TAU_OUT_PS))
    u_d1 (.data(s1), .strobe(rf), .q(b1), .qn());

  skew_detector #(.STROBE_DELAY_PS(STROBE_DELAY_PS), .STROBE_WIDTH_PS(STROBE_WIDTH_PS),
                  .TAU_IN_PS(TAU_IN_PS), .TAU_OUT_PS(TAU_OUT_PS))
    u_d2 (.data(s2), .strobe(rf), .q(b2), .qn());

  skew_detector #(.STROBE_DELAY_PS(STROBE_DELAY_PS), .STROBE_WIDTH_PS(STROBE_WIDTH_PS),
                  .TAU_IN_PS(TAU_IN_PS), .TAU_OUT_PS(TAU_OUT_PS))
    u_d3 (.data(s2), .strobe(s1), .q(d3_pol), .qn());

endmodule
