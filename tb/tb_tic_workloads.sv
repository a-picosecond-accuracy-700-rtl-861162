// tb_tic_workloads: runs the time interval counter on the operating points
// at which the chip was evaluated, with the design's default parameters.
//
//  1. Linearity at 500 MHz, vernier resolution 800 fs (RF period 2000.8 ps):
//     intervals swept in 1 ps steps over 10..50 ps and in 45 ps steps over
//     the rest of an 1800 ps range, then -4..+4 ps around zero skew.
//  1b. Scatter against vernier resolution at 500 MHz: 5, 2, 1 and 0.5 ps,
//     30 measurements each with in-phase and with out-phase extraction; the
//     out-phase scatter (variance summed over 2, 1 and 0.5 ps; at 5 ps the
//     quantisation dominates) must be the larger. At 5 ps a beat lasts only 400 RF cycles, so the trigger preset
//     is lowered to 100 there (it must stay below half a beat period).
//  2. Repeatability at 700 MHz (period 1428.571 ps), 800 fs resolution: 30
//     measurements of one interval, averaged.
//  3. Long intervals at 10 MHz (100 ns period), 800 fs resolution
//     (125 000 RF cycles per beat): intervals swept in 2 ns steps from 2 ns
//     to 98 ns.
// The S1/S2 edges carry uniform random jitter of +-2 ps (1.2 ps rms, the
// source jitter of the evaluation). Each result N is converted to a signed
// time, N * 0.8 ps minus one period if the polarity bit is set, and must lie
// within +-5 ps of the applied interval (modulo one period); the
// averaged result of case 2 within +-1 ps. The standard deviation of the
// single results is printed.
`timescale 1ps / 1fs
module tb_tic_workloads;
  import tic_pkg::*;
  logic s1 = 1'b0, s2 = 1'b0, rf = 1'b0, rst_n = 1'b1;
  logic cs = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0] wdata = '0, rdata;
  logic window_a, gate_b, count_en;
  int checks = 0, failures = 0;

  realtime T     = 2000.0;
  realtime TR    = 2000.8;
  realtime DELTA = 0.0;
  real     JIT   = 2.0;

  tic_top dut (.s1, .s2, .rf, .rst_n, .cs, .we, .addr, .wdata, .rdata,
               .window_a, .gate_b, .count_en);

  function automatic real jitter();
    return JIT * (real'($urandom_range(2000, 0)) / 1000.0 - 1.0);
  endfunction

  // Clock generators on absolute edge times: the n-th edge after the time
  // base is at base + n*period/2. set_clocks() moves the base and changes the
  // periods; an edge already scheduled from the old base is then dropped.
  realtime base = 50.0;
  int      gen = 0;
  longint  n_s1 = 0, n_s2 = 0, n_rf = 0;
  initial begin : gen_s1
    realtime t;
    int g;
    forever begin
      g = gen;
      t = base + real'(n_s1) * T / 2.0 + jitter();
      if (t > $realtime) #(t - $realtime);
      if (g == gen) begin s1 = (n_s1 % 2 == 0); n_s1++; end
    end
  end
  initial begin : gen_s2
    realtime t;
    int g;
    forever begin
      g = gen;
      t = base + real'(n_s2) * T / 2.0 + DELTA + jitter();
      if (t > $realtime) #(t - $realtime);
      if (g == gen) begin s2 = (n_s2 % 2 == 0); n_s2++; end
    end
  end
  initial begin : gen_rf
    realtime t;
    int g;
    forever begin
      g = gen;
      t = base + real'(n_rf) * TR / 2.0;
      if (t > $realtime) #(t - $realtime);
      if (g == gen) begin rf = (n_rf % 2 == 0); n_rf++; end
    end
  end

  task automatic set_clocks(input realtime t_new, input realtime tr_new);
    base = $realtime + 10000.0;
    T = t_new;
    TR = tr_new;
    n_s1 = 0; n_s2 = 0; n_rf = 0;
    gen++;
    s1 = 1'b0; s2 = 1'b0;
  endtask

  int rf_cyc = 0;
  always @(posedge rf) rf_cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    @(negedge rf);
    cs = 1'b1; we = 1'b1; addr = a; wdata = d;
    @(negedge rf);
    cs = 1'b0; we = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] a, output logic [BUS_W-1:0] d);
    @(negedge rf);
    cs = 1'b1; we = 1'b0; addr = a;
    @(negedge rf);
    cs = 1'b0;
    d = rdata;
  endtask

  // One measurement; returns the signed interval in ps: N times the
  // resolution, minus one input period when the polarity bit is set.
  task automatic measure(input realtime delta, output real t_ps);
    logic [BUS_W-1:0] st, b;
    logic [CNT_W-1:0] n;
    int t0, beat;
    beat = int'(T / (TR - T));
    DELTA = delta;
    repeat (beat / 2 + 10) @(posedge rf);
    t0 = rf_cyc;
    write(REG_CTRL, {6'b0, op_mode, 1'b1});
    do read(REG_CTRL, st); while (!st[ST_DONE] && rf_cyc - t0 < 4 * beat);
    check(st[ST_DONE] && rf_cyc - t0 <= 3 * beat + 40, "measurement done in three beats");
    read(REG_CNT0, b); n[7:0]   = b;
    read(REG_CNT1, b); n[15:8]  = b;
    read(REG_CNT2, b); n[19:16] = b[3:0];
    t_ps = real'(n) * (TR - T) - (st[ST_POLARITY] ? T : 0.0);
  endtask

  bit  op_mode = 1'b0;  // extraction mode of the next measurements
  real sum_e, sum_e2, t_ps, e, worst;
  int  cnt;

  task automatic account(input realtime delta, input real t, input real tol, input string tag);
    e = t - delta;  // compared modulo one input period
    while (e > T / 2.0) e -= T;
    while (e <= -T / 2.0) e += T;
    sum_e += e; sum_e2 += e * e; cnt++;
    if (e > worst) worst = e;
    if (-e > worst) worst = -e;
    check(e >= -tol && e <= tol, $sformatf("%s: interval %0.1f ps measured %0.1f ps", tag, delta, t));
  endtask

  real last_std;

  task automatic report(input string tag);
    real mean;
    mean = sum_e / cnt;
    last_std = $sqrt(sum_e2 / cnt - mean * mean);
    $display("%s: %0d measurements, mean error %0.2f ps, std dev %0.2f ps, worst %0.2f ps",
             tag, cnt, mean, $sqrt(sum_e2 / cnt - mean * mean), worst);
    sum_e = 0; sum_e2 = 0; cnt = 0; worst = 0;
  endtask

  real res_list[4] = '{5.0, 2.0, 1.0, 0.5};
  real std_mode[2];
  real var_sum[2] = '{0.0, 0.0};

  initial begin
    real avg;
    sum_e = 0; sum_e2 = 0; cnt = 0; worst = 0;
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (4) @(posedge rf);
    rst_n = 1'b1;
    // 1. 500 MHz linearity.
    for (int i = 10; i <= 50; i++) begin
      measure(real'(i), t_ps);
      account(real'(i), t_ps, 5.0, "500 MHz");
    end
    for (int i = 85; i <= 1800; i += 45) begin
      measure(real'(i), t_ps);
      account(real'(i), t_ps, 5.0, "500 MHz");
    end
    report("500 MHz, 800 fs resolution");
    // Around zero skew (S2 up to 4 ps before or after S1). When jitter makes
    // D3 report the wrong sign, the result has the right size and the wrong
    // sign, so the bound grows by twice the skew.
    for (int i = -4; i <= 4; i++) begin
      measure((i < 0) ? T + real'(i) : real'(i), t_ps);
      account(real'(i), t_ps, 5.0 + 2.0 * ((i < 0) ? -i : i), "zero skew");
    end
    report("500 MHz around zero skew");
    // Scatter against vernier resolution, in-phase (this circuit) and
    // out-phase (conventional comparator) extraction.
    foreach (res_list[r]) begin
      set_clocks(2000.0, 2000.0 + res_list[r]);
      // The preset must stay below half a beat period (2000/res cycles).
      write(REG_PRESET, (res_list[r] > 3.0) ? 8'd100 : 8'd255);
      for (int m = 0; m < 2; m++) begin
        op_mode = m[0];
        for (int i = 0; i < 30; i++) begin
          measure(500.0, t_ps);
          account(500.0, t_ps, (m == 0) ? 5.0 : 8.0, $sformatf("res %0.1f ps mode %0d", res_list[r], m));
        end
        report($sformatf("500 MHz, %0.1f ps resolution, %s", res_list[r],
                         (m == 0) ? "in-phase" : "out-phase"));
        std_mode[m] = last_std;
      end
      if (r > 0) begin  // at 5 ps the 5 ps quantisation dominates
        var_sum[0] += std_mode[0] * std_mode[0];
        var_sum[1] += std_mode[1] * std_mode[1];
      end
    end
    check(var_sum[1] > var_sum[0],
          $sformatf("out-phase scatter above in-phase (summed variance %0.2f vs %0.2f ps^2)",
                    var_sum[1], var_sum[0]));
    op_mode = 1'b0;
    // 2. 700 MHz repeatability with averaging over 30 measurements.
    set_clocks(1428.571, 1429.371);
    avg = 0.0;
    for (int i = 0; i < 30; i++) begin
      measure(600.0, t_ps);
      account(600.0, t_ps, 5.0, "700 MHz");
      avg += t_ps / 30.0;
    end
    report("700 MHz, 800 fs resolution");
    check(avg >= 599.0 && avg <= 601.0, $sformatf("700 MHz average of 30: %0.2f ps", avg));
    $display("700 MHz average of 30 measurements: %0.2f ps for 600 ps", avg);
    // 3. 10 MHz, long intervals.
    set_clocks(100000.0, 100000.8);
    for (int i = 2000; i <= 98000; i += 2000) begin
      measure(real'(i), t_ps);
      account(real'(i), t_ps, 5.0, "10 MHz");
    end
    report("10 MHz, 800 fs resolution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2.0e12;  // 2 s of simulated time
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
