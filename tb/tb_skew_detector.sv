// tb_skew_detector: self-checking test of the skew detector model.
// Each trial places one edge of `data` at a chosen skew from the rising edge
// of `strobe` (positive skew: the data edge comes first) and reads q after
// the strobe delay. Checks:
//  - in-phase (data rising) skews of +-0.6 ps and more give the data level
//    at the strobe edge, every time;
//  - out-phase (data falling) skews must exceed 2.25 ps (half of 4.5 ps) to
//    be resolved, and a 1 ps out-phase skew, which the in-phase side
//    resolves, gives both answers over many trials (chatter);
//  - an in-phase skew of 0.2 ps gives both answers as well;
//  - q changes 300 ps after the strobe edge, not before, and qn = ~q.
`timescale 1ps / 1fs
module tb_skew_detector;
  logic data = 1'b0, strobe = 1'b0;
  logic q, qn;
  int checks = 0, failures = 0;

  skew_detector dut (.data, .strobe, .q, .qn);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One trial; returns q. rising: data goes 0->1, else 1->0.
  task automatic trial(input bit rising, input real skew, output logic res);
    data = ~rising;
    strobe = 1'b0;
    #1000;
    if (skew >= 0.0) begin
      data = rising;
      #(skew);
      strobe = 1'b1;
    end else begin
      strobe = 1'b1;
      #(-skew);
      data = rising;
    end
    #(299.0 - ((skew < 0.0) ? -skew : 0.0));
    #2;
    res = q;
    check(qn == ~q, "qn is the complement of q");
    #700;
  endtask

  initial begin
    logic r;
    int ones;
    // Timing: force a known previous state, then a clear decision.
    trial(1'b0, 50.0, r);               // clear 0
    check(r == 1'b0, "clear out-phase 0");
    strobe = 1'b0; data = 1'b0; #1000;
    data = 1'b1; #50; strobe = 1'b1;    // clear 1 at the strobe
    #299;
    check(q == 1'b0, "q unchanged before the strobe delay");
    #2;
    check(q == 1'b1, "q changed after the strobe delay");
    strobe = 1'b0; #1000;
    // Resolved in-phase skews.
    for (int i = 0; i < 40; i++) begin
      trial(1'b1, 0.6, r);  check(r == 1'b1, "in-phase +0.6 ps");
      trial(1'b1, -0.6, r); check(r == 1'b0, "in-phase -0.6 ps");
      trial(1'b1, 1.0, r);  check(r == 1'b1, "in-phase +1 ps");
      trial(1'b0, 3.0, r);  check(r == 1'b0, "out-phase +3 ps");
      trial(1'b0, -3.0, r); check(r == 1'b1, "out-phase -3 ps");
    end
    // Unresolved skews chatter.
    ones = 0;
    for (int i = 0; i < 64; i++) begin trial(1'b0, 1.0, r); ones += int'(r); end
    check(ones > 0 && ones < 64, $sformatf("out-phase 1 ps chatters (%0d/64)", ones));
    ones = 0;
    for (int i = 0; i < 64; i++) begin trial(1'b1, 0.2, r); ones += int'(r); end
    check(ones > 0 && ones < 64, $sformatf("in-phase 0.2 ps chatters (%0d/64)", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
