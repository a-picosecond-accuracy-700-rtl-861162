// interval_counter: the result counter of the TIC, a binary counter clocked
// by RF only while the beat window A and the trigger gate B are both open
// (signal C of the measurement time chart). After one gated beat period it
// holds N, and the interval is N * |f0-fR| / (f0 fR).
//
// How it works: the original chip gates the RF clock itself; here RF clocks the
// register every cycle and the gate is a count enable, which counts the
// same cycles. The width is the original 20 bits (about 6 decades).
//
// Interface and timing: clear (one cycle) zeroes the count and the overflow
// flag; it is given at start. Each clock with enable set adds one, visible
// the next cycle. overflow is a sticky flag set when the count wraps from
// all ones to zero; the original chip has no stated overflow handling, so
// the flag is this design's addition.
`timescale 1ps / 1fs
module interval_counter #(
  parameter int CNT_W = tic_pkg::CNT_W  // 20 bits in the original chip
) (
  input  logic             clk,       // RF
  input  logic             rst_n,     // asynchronous reset, active low
  input  logic             clear,     // zero count and overflow
  input  logic             enable,    // A & B: count this RF cycle
  output logic [CNT_W-1:0] count,     // N
  output logic             overflow   // count wrapped (sticky until clear)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (enable) begin
      count <= count + 1'b1;
      if (&count) overflow <= 1'b1;
    end
  end

endmodule
