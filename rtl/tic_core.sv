// tic_core: the digital part of the time interval counter, everything after
// the three skew detectors, clocked by the reference clock RF.
//
// The beat signal processor forms window A from the beat signals b1, b2 and
// the skew polarity; the edge-count trigger forms gate B, one beat period
// long, after a start command; the interval counter counts RF cycles while
// A and B are both open; the I/O bus starts measurements and reads results.
// This partitioning follows the original chip's block diagram.
//
// Interface and timing: b1 and b2 must be RF-synchronous (they are latched
// by RF); d3_pol may be asynchronous. A measurement takes from a bus write of
// start until the done status bit, about two to three beat periods
// (1/|f0-fR| each): up to one to reach the first settled falling edge, one
// with the gate open. Counting starts only after the trigger has armed, so
// the result is N, the RF cycles of window A within exactly one beat period.
`timescale 1ps / 1fs
module tic_core
  import tic_pkg::*;
(
  input  logic              clk,      // RF
  input  logic              rst_n,    // asynchronous reset, active low
  input  logic              b1,       // beat signal S1 vs RF (from D1)
  input  logic              b2,       // beat signal S2 vs RF (from D2)
  input  logic              d3_pol,   // skew polarity S1 vs S2 (from D3)
  input  logic              cs,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BUS_W-1:0]  wdata,
  output logic [BUS_W-1:0]  rdata,
  // Observation outputs (signals A, B and C of the time chart)
  output logic              window_a,
  output logic              gate_b,
  output logic              count_en
);

  logic            start, busy, meas_done, overflow, polarity, beat_trig;
  extract_mode_e   mode;
  logic [CT_W-1:0] preset;
  logic [CNT_W-1:0] count;

  beat_signal_processor u_bsp (
    .clk, .rst_n, .b1, .b2, .d3_pol, .start, .mode,
    .window_a, .beat_trig, .polarity
  );

  edge_count_trigger #(.CT_W(CT_W)) u_trig (
    .clk, .rst_n, .start, .beat(beat_trig), .preset,
    .gate_b, .busy, .done(meas_done)
  );

  assign count_en = window_a && gate_b;

  interval_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(start), .enable(count_en), .count, .overflow
  );

  io_bus u_bus (
    .clk, .rst_n, .cs, .we, .addr, .wdata, .rdata,
    .start, .mode, .preset, .busy, .meas_done, .overflow, .polarity, .count
  );

endmodule
