// skew_detector: behavioural model (not synthesizable logic) of one skew
// detection circuit of the TIC, the analog bipolar front end built from a
// level converter (LVC), a differential amplifier (DEF), a complementary
// D-latch (LATCH) and a strobe pulse generator (SB).
//
// What it does: at each rising edge of `strobe`, it decides whether `data`
// was high or low at that instant and holds the answer on q / qn until the
// next strobe. In silicon, LVC normalises the two input levels, DEF amplifies
// the voltage difference that the skew produces during the input slew, SB
// makes a strobe pulse a fixed time after the strobe input's rising edge, and
// LATCH freezes the amplified difference into complementary logic levels.
//
// How it is modelled: logic levels stand in for the analog waveforms. The
// decision is the level of `data` at the strobe edge, except when an edge of
// `data` lies closer to the strobe edge than the detector can resolve; then
// the answer is random, which reproduces the chattering of a real detector.
// The resolvable skew differs for the two edge types, the central point of
// the circuit: an in-phase skew (data rising near the strobe's rising edge)
// is resolved down to TAU_IN_PS (0.8 ps in the original circuit, from the amplifier
// gain), an out-phase skew (data falling near it) only down to TAU_OUT_PS
// (the 4.5 ps of a conventional flip-flop comparator).
//
// Timing: q/qn change STROBE_DELAY_PS after the strobe's rising edge (the
// original 300 ps design centre for the strobe timing) and stay fixed for
// at least STROBE_WIDTH_PS (the original 300 ps pulse width). The input
// period must exceed twice STROBE_DELAY_PS (the model looks for at most one
// data edge after the strobe edge). Using logic levels for the analog inputs,
// and a hard uncertainty window instead of a probability curve, are this
// model's own simplifications.
`timescale 1ps / 1fs
module skew_detector #(
  parameter real STROBE_DELAY_PS = 300.0,  // SB: strobe timing after input edge
  parameter real STROBE_WIDTH_PS = 300.0,  // SB: strobe pulse width
  parameter real TAU_IN_PS       = 0.8,    // in-phase skew detection sensitivity
  parameter real TAU_OUT_PS      = 4.5     // out-phase skew detection sensitivity
) (
  input  logic data,    // signal whose skew is detected (after LVC)
  input  logic strobe,  // signal whose rising edge triggers SB
  output logic q,       // 1: data was high at the strobe edge
  output logic qn       // complement of q
);

  realtime last_rise;
  realtime last_fall;

  always @(posedge data) last_rise <= $realtime;
  always @(negedge data) last_fall <= $realtime;

  initial begin
    last_rise = -1.0e9;
    last_fall = -1.0e9;
    q         = 1'b0;
    qn        = 1'b1;
  end

  // Distance from the strobe edge at t_s to the nearest data edge of one kind,
  // looking at the last such edge at the strobe edge (r0) and after the
  // strobe delay (r1).
  function automatic realtime nearest(input realtime t_s, input realtime r0,
                                      input realtime r1);
    realtime d0, d1;
    d0 = t_s - r0;
    d1 = (r1 > t_s) ? (r1 - t_s) : 1.0e9;
    return (d0 < d1) ? d0 : d1;
  endfunction

  always @(posedge strobe) begin : decide
    realtime t_s, r0, f0, dr, df;
    logic    level, result;
    t_s   = $realtime;
    level = data;
    r0    = last_rise;
    f0    = last_fall;
    #(STROBE_DELAY_PS);
    dr = nearest(t_s, r0, last_rise);
    df = nearest(t_s, f0, last_fall);
    if (dr < TAU_IN_PS / 2.0 || df < TAU_OUT_PS / 2.0)
      result = 1'($urandom_range(1, 0));
    else
      result = level;
    q  <= result;
    qn <= ~result;
  end

  // The latch output must hold through the strobe pulse.
  initial assert (STROBE_WIDTH_PS > 0.0 && STROBE_DELAY_PS > 0.0)
    else $error("skew_detector: strobe timing must be positive");

endmodule
