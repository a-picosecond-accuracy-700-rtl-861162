// tb_interval_counter: self-checking test of the 20-bit result counter.
// Drives random enables and clears and compares the count with a reference
// value kept in the testbench, then counts past 2^20-1 to check the wrap and
// the sticky overflow flag, and that clear removes both.
`timescale 1ps / 1fs
module tb_interval_counter;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, enable = 1'b0;
  logic [W-1:0] count;
  logic overflow;
  int checks = 0, failures = 0;
  longint ref_cnt = 0;
  bit ref_ovf = 1'b0;

  interval_counter #(.CNT_W(W)) dut (.clk, .rst_n, .clear, .enable, .count, .overflow);

  always #500 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d ovf=%0b ref_ovf=%0b", what, count, ref_cnt, overflow, ref_ovf);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !overflow, "after reset");
    // Random enables and occasional clears.
    for (int i = 0; i < 5000; i++) begin
      enable = 1'($urandom_range(1, 0));
      clear  = ($urandom_range(99, 0) == 0);
      @(posedge clk);
      if (clear) begin ref_cnt = 0; ref_ovf = 1'b0; end
      else if (enable) ref_cnt = ref_cnt + 1;
      @(negedge clk);
      check(count == W'(ref_cnt) && overflow == ref_ovf, "random");
    end
    // Count through the top of the range.
    clear = 1'b1; enable = 1'b0;
    @(negedge clk);
    clear = 1'b0; enable = 1'b1;
    ref_cnt = 0;
    repeat ((1 << W) - 1) @(negedge clk);
    check(count == '1 && !overflow, "all ones, no overflow yet");
    @(negedge clk);
    check(count == 0 && overflow, "wrap sets overflow");
    repeat (10) @(negedge clk);
    check(count == 10 && overflow, "overflow is sticky");
    enable = 1'b0; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(count == 0 && !overflow, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
