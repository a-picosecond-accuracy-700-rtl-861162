// tb_beat_signal_processor: self-checking test of window A.
// The beat signals are generated from a phase index k = 0..T-1 (one RF cycle
// per step): b1 is high for k in [0, T/2), b2 for k in [D, D+T/2) mod T, and
// the polarity is D > T/2. The expected window is k in [0, D) in in-phase
// mode and k in [T/2, T/2+D) mod T in out-phase mode, so each beat period
// must contain exactly D window cycles. Every D from 1 to T-1 is tried.
// The polarity is taken at a start pulse; the test then inverts the D3 input
// and checks that window and polarity ignore the change.
`timescale 1ps / 1fs
module tb_beat_signal_processor;
  import tic_pkg::*;
  localparam int T = 64;
  logic clk = 1'b0, rst_n = 1'b1;
  logic b1 = 1'b0, b2 = 1'b0, d3_pol = 1'b0, start = 1'b0;
  extract_mode_e mode = MODE_IN_PHASE;
  logic window_a, beat_trig, polarity;
  int checks = 0, failures = 0;

  beat_signal_processor dut (.clk, .rst_n, .b1, .b2, .d3_pol, .start, .mode, .window_a, .beat_trig, .polarity);

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int ones, off;
    bit exp_w;
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      mode = extract_mode_e'(m);
      off  = (m == 0) ? 0 : T / 2;
      for (int d = 1; d < T; d++) begin
        if (d == T / 2) continue;  // polarity undefined exactly at T/2
        d3_pol = (d > T / 2);
        repeat (3) @(negedge clk);  // let the synchroniser settle
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        check(polarity == d3_pol, "polarity taken at start");
        d3_pol = ~d3_pol;  // a change after start must not reach the window
        repeat (3) @(negedge clk);
        check(polarity == ~d3_pol, "polarity held until next start");
        ones = 0;
        for (int k = 0; k < T; k++) begin
          b1 = (k < T / 2);
          b2 = (((k - d + T) % T) < T / 2);
          @(negedge clk);
          exp_w = (((k - off + T) % T) < d);
          check(window_a == exp_w, $sformatf("window m=%0d d=%0d k=%0d", m, d, k));
          check(beat_trig == b1, "beat_trig follows b1");
          ones += int'(window_a);
        end
        check(ones == d, $sformatf("window length m=%0d d=%0d got %0d", m, d, ones));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
