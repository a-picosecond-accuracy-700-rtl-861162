// edge_count_trigger: the start trigger control of the TIC. After a start
// command it opens gate B for exactly one period of the beat signal, and it
// does so reliably although the beat signal chatters around its edges when
// the vernier resolution is close to the input jitter.
//
// How it works (the edge-count scheme of the original chip): edge sensor ES1 senses
// the beat signal high, ES2 senses it low. Counter CT1 (rising-edge side)
// and CT2 (falling-edge side) are loaded with a preset that exceeds the
// number of chattering samples around one edge. After start, CT1 counts down
// the RF cycles in which ES1 senses the beat high, until it borrows; then
// CT2 counts down the cycles in which ES2 senses it low, until it borrows.
// At that moment gate B opens. One more CT1/CT2 round later it closes, and
// stays closed until the next start. Since chatter near an edge cannot
// supply preset+1 samples of one level, each borrow happens only once the
// beat signal has really settled, always at the same beat phase, so the
// gate spans one full beat period.
//
// Interface and timing: clk is RF. start is a one-cycle pulse (ignored while
// busy). gate_b rises in the cycle after the first CT2 borrow and falls in
// the cycle after the second. done pulses for one cycle as the gate closes.
// With the 8-bit default the preset 255 tolerates about 250 ps of total
// jitter at 1 ps resolution, as in the original chip. Counting sensed cycles
// (rather than transitions), the state encoding and the borrow condition
// (a decrement from zero) are this design's reading of the description.
`timescale 1ps / 1fs
module edge_count_trigger #(
  parameter int CT_W = tic_pkg::CT_W  // counter bits (8 in the original chip)
) (
  input  logic            clk,      // RF
  input  logic            rst_n,    // asynchronous reset, active low
  input  logic            start,    // start command, one-cycle pulse
  input  logic            beat,     // beat signal, RF-synchronous
  input  logic [CT_W-1:0] preset,   // initial count of CT1 and CT2
  output logic            gate_b,   // trigger gate B
  output logic            busy,     // between start and gate closing
  output logic            done      // one-cycle pulse when the gate closes
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_ARM_RISE,   // CT1 counting, gate closed
    S_ARM_FALL,   // CT2 counting, gate closed
    S_GATE_RISE,  // CT1 counting, gate open
    S_GATE_FALL   // CT2 counting, gate open
  } state_e;

  state_e          state, state_nx;
  logic [CT_W-1:0] ct1, ct2;
  logic            es1, es2;        // edge sensors
  logic            borrow1, borrow2;

  assign es1     = beat;
  assign es2     = ~beat;
  assign borrow1 = (state == S_ARM_RISE || state == S_GATE_RISE) && es1 && (ct1 == '0);
  assign borrow2 = (state == S_ARM_FALL || state == S_GATE_FALL) && es2 && (ct2 == '0);

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:      if (start)   state_nx = S_ARM_RISE;
      S_ARM_RISE:  if (borrow1) state_nx = S_ARM_FALL;
      S_ARM_FALL:  if (borrow2) state_nx = S_GATE_RISE;
      S_GATE_RISE: if (borrow1) state_nx = S_GATE_FALL;
      S_GATE_FALL: if (borrow2) state_nx = S_IDLE;
      default:                  state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ct1   <= '0;
      ct2   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_nx;
      done  <= (state == S_GATE_FALL) && borrow2;
      // CT1 counts in the rising states and is reloaded otherwise; CT2 alike.
      if ((state == S_ARM_RISE || state == S_GATE_RISE) && !borrow1)
        ct1 <= ct1 - CT_W'(es1);
      else
        ct1 <= preset;
      if ((state == S_ARM_FALL || state == S_GATE_FALL) && !borrow2)
        ct2 <= ct2 - CT_W'(es2);
      else
        ct2 <= preset;
    end
  end

  assign gate_b = (state == S_GATE_RISE) || (state == S_GATE_FALL);
  assign busy   = (state != S_IDLE);

  // The gate is open only while busy, and done comes only as it closes.
  a_gate_busy : assert property (@(posedge clk) gate_b |-> busy);
  a_done_end  : assert property (@(posedge clk) done |-> !gate_b);

endmodule
