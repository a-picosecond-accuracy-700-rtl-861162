// tic_top: the time interval counter chip. It measures the interval between
// two clocks S1 (marker) and S2 (measured) of the same frequency f0, using a
// reference clock RF of a slightly different frequency fR (digital vernier).
//
// The skew detection block samples S1 and S2 with RF, giving two beat
// signals, and S2 with S1, giving the skew polarity. The digital core, run by
// RF, counts the RF cycles N between the in-phase edges of the two beat
// signals over exactly one beat period. The interval is then
// N * |f0-fR| / (f0 fR): with f0 = 100 MHz and 1 ps resolution a
// measurement takes 100 us. The interval is measured modulo the input
// period; with polarity = 1 it can equally be read as N*res - 1/f0.
//
// Interface: the analog inputs are logic levels here; the skew detectors are
// behavioural models, the rest is synthesizable. The 8-bit bus (see io_bus)
// is synchronous to RF in this design. window_a, gate_b and count_en bring
// out the signals A, B and C of the measurement time chart for observation.
`timescale 1ps / 1fs
module tic_top
  import tic_pkg::*;
#(
  parameter real TAU_IN_PS  = 0.8,  // in-phase detection sensitivity
  parameter real TAU_OUT_PS = 4.5   // out-phase detection sensitivity
) (
  input  logic              s1,
  input  logic              s2,
  input  logic              rf,
  input  logic              rst_n,
  input  logic              cs,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BUS_W-1:0]  wdata,
  output logic [BUS_W-1:0]  rdata,
  output logic              window_a,
  output logic              gate_b,
  output logic              count_en
);

  logic b1, b2, d3_pol;

  skew_detection_block #(.TAU_IN_PS(TAU_IN_PS), .TAU_OUT_PS(TAU_OUT_PS)) u_skew (
    .s1, .s2, .rf, .b1, .b2, .d3_pol
  );

  tic_core u_core (
    .clk(rf), .rst_n, .b1, .b2, .d3_pol,
    .cs, .we, .addr, .wdata, .rdata,
    .window_a, .gate_b, .count_en
  );

endmodule
