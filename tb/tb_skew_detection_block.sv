// tb_skew_detection_block: self-checking test of the three-detector input
// stage. S1 and S2 run at 500 MHz (2000 ps), S2 delayed from S1 by DELTA;
// RF runs at a 2010 ps period, so the vernier resolution is 10 ps and one
// beat period is 2000/10 = 200 RF cycles. Sampling b1/b2 at RF edges, the
// test checks that b1 and b2 rise every 200 RF cycles, that b2 rises
// DELTA/10 cycles after b1 (the expanded interval), and that the D3 polarity
// is 1 exactly when DELTA exceeds half the period. Two delays are tried.
`timescale 1ps / 1fs
module tb_skew_detection_block;
  localparam real T  = 2000.0;
  localparam real TR = 2010.0;
  logic s1 = 1'b0, s2 = 1'b0, rf = 1'b0;
  logic b1, b2, d3_pol;
  real delta = 300.0;
  int checks = 0, failures = 0;
  int cyc = 0;

  skew_detection_block dut (.s1, .s2, .rf, .b1, .b2, .d3_pol);

  always begin #(T / 2.0) s1 = ~s1; end
  // S2 copies S1 delayed by delta (less than one period).
  always @(posedge s1) begin #(delta); s2 = 1'b1; end
  always @(negedge s1) begin #(delta); s2 = 1'b0; end
  initial begin #137.0; forever begin rf = 1'b1; #(TR / 2.0); rf = 1'b0; #(TR / 2.0); end end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Observe one delay setting for several beat periods.
  task automatic observe(input real d);
    int last_b1, last_b2, n_b1, n_b2, lag;
    logic pb1, pb2;
    delta = d;
    repeat (450) @(posedge rf);  // let the new delay settle, skip a beat
    last_b1 = -1; last_b2 = -1; n_b1 = 0; n_b2 = 0;
    pb1 = b1; pb2 = b2;
    repeat (1000) begin
      @(posedge rf);
      cyc++;
      if (b1 && !pb1) begin
        if (last_b1 >= 0) check(cyc - last_b1 >= 199 && cyc - last_b1 <= 201,
                                $sformatf("b1 beat period %0d", cyc - last_b1));
        last_b1 = cyc; n_b1++;
      end
      if (b2 && !pb2) begin
        if (last_b2 >= 0) check(cyc - last_b2 >= 199 && cyc - last_b2 <= 201,
                                $sformatf("b2 beat period %0d", cyc - last_b2));
        if (last_b1 >= 0) begin
          lag = cyc - last_b1;
          check(lag >= int'(d / 10.0) - 1 && lag <= int'(d / 10.0) + 1,
                $sformatf("b2 lags b1 by %0d cycles for %0.0f ps", lag, d));
        end
        last_b2 = cyc; n_b2++;
      end
      pb1 = b1; pb2 = b2;
    end
    check(n_b1 >= 4 && n_b2 >= 4, "beat edges seen");
    check(d3_pol == (d > T / 2.0), $sformatf("polarity %0b for %0.0f ps", d3_pol, d));
  endtask

  initial begin
    observe(300.0);
    observe(1300.0);
    observe(40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
