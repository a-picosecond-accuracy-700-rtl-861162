// tb_tic_top: end-to-end test of the time interval counter with real clock
// waveforms, at the default parameters of the design.
//
// S1 and S2 run at f0 = 500 MHz (2000 ps period); S2 follows S1 by DELTA.
// Each edge of S1 and S2 carries a random jitter, uniform in +-JIT ps. RF runs
// at a 2001 ps period, so the vernier resolution |f0-fR|/(f0 fR) is 1 ps and
// one beat period is 2000 RF cycles (4 us). A measurement is started over the
// bus, done is polled, and N is read back; the expected N is DELTA in ps.
// Checks: N within a tolerance of DELTA for both skew polarities and in both
// extraction modes; gate B lasts one beat period (2000 RF cycles, up to the
// chatter at the gate edges); a measurement ends within three beat periods;
// a second start during a measurement is ignored. A last case runs S1/S2 at
// 0.5 MHz, below the 1 MHz for which the 20-bit counter is sized, with an RF
// period 1 ps longer (2 000 000 cycles per beat) and a 1.2 us interval, so
// that N exceeds 2^20 and the overflow flag must be set.
// Mechanisms counted (each must occur): chattering beat signal, in-phase and
// out-phase extraction, both polarities, an ignored start, counter overflow.
`timescale 1ps / 1fs
module tb_tic_top;
  import tic_pkg::*;
  logic s1 = 1'b0, s2 = 1'b0, rf = 1'b0, rst_n = 1'b1;
  logic cs = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0] wdata = '0, rdata;
  logic window_a, gate_b, count_en;
  int checks = 0, failures = 0;

  realtime T     = 2000.0;  // S1/S2 period
  realtime TR    = 2001.0;  // RF period
  realtime DELTA = 300.0;   // S1 -> S2 interval
  real     JIT   = 1.0;     // peak jitter of S1/S2 edges

  // Mechanism counters.
  int n_chatter = 0, n_inphase = 0, n_outphase = 0, n_pol0 = 0, n_pol1 = 0;
  int n_ignored = 0, n_overflow = 0;

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

  // Chatter monitor: window A (which follows the latched beat signals)
  // toggling twice within 8 RF cycles.
  int last_toggle = -100, rf_cyc = 0;
  logic b1_prev = 1'b0;
  always @(posedge rf) begin
    rf_cyc++;
    if (window_a != b1_prev) begin
      if (rf_cyc - last_toggle < 8) n_chatter++;
      last_toggle = rf_cyc;
    end
    b1_prev = window_a;
  end

  // Gate B length and number of gate pulses.
  int gate_len = 0, gate_pulses = 0;
  logic gate_prev = 1'b0;
  always @(posedge rf) begin
    if (gate_b) gate_len++;
    if (gate_b && !gate_prev) gate_pulses++;
    gate_prev = gate_b;
  end

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

  // One measurement. beat: RF cycles per beat period.
  task automatic measure(input realtime delta, input bit op, input int beat,
                         input int tol, input bit expect_ovf);
    logic [BUS_W-1:0] st, b;
    logic [CNT_W-1:0] n;
    int t0, exp_n, err, pulses0;
    DELTA = delta;
    repeat (beat / 2 + 10) @(posedge rf);  // settle after a change of DELTA
    gate_len = 0;
    pulses0 = gate_pulses;
    t0 = rf_cyc;
    write(REG_CTRL, {6'b0, op, 1'b1});
    repeat (50) @(posedge rf);
    write(REG_CTRL, {6'b0, op, 1'b1});  // must be ignored: busy
    read(REG_CTRL, st);
    if (st[ST_BUSY]) n_ignored++;
    do read(REG_CTRL, st); while (!st[ST_DONE] && rf_cyc - t0 < 4 * beat);
    check(st[ST_DONE], "measurement done");
    check(rf_cyc - t0 <= 3 * beat + 40, $sformatf("measurement took %0d cycles", rf_cyc - t0));
    check(gate_pulses - pulses0 == 1, $sformatf("one gate pulse (%0d)", gate_pulses - pulses0));
    check(gate_len >= beat - tol && gate_len <= beat + tol,
          $sformatf("gate B length %0d, beat %0d", gate_len, beat));
    read(REG_CNT0, b); n[7:0]   = b;
    read(REG_CNT1, b); n[15:8]  = b;
    read(REG_CNT2, b); n[19:16] = b[3:0];
    // Expected N = DELTA / resolution, resolution = TR - T.
    exp_n = int'(delta / (TR - T));
    err = expect_ovf ? int'(n) + (1 << CNT_W) - exp_n : int'(n) - exp_n;
    check(err >= -tol && err <= tol,
          $sformatf("N=%0d, expected %0d (+-%0d) mode=%0d", n, exp_n, tol, op));
    check(st[ST_POLARITY] == (delta > T / 2.0), "polarity");
    check(st[ST_OVERFLOW] == expect_ovf, "overflow flag");
    if (op) n_outphase++; else n_inphase++;
    if (st[ST_POLARITY]) n_pol1++; else n_pol0++;
    if (st[ST_OVERFLOW]) n_overflow++;
    $display("measured DELTA=%0.1f ps mode=%0d: N=%0d (err %0d)", delta, op, n, err);
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (4) @(posedge rf);
    rst_n = 1'b1;
    measure(300.0, 1'b0, 2000, 8, 1'b0);
    measure(300.0, 1'b0, 2000, 8, 1'b0);
    measure(1400.0, 1'b0, 2000, 8, 1'b0);
    measure(25.0, 1'b0, 2000, 8, 1'b0);
    measure(700.0, 1'b1, 2000, 15, 1'b0);
    measure(1700.0, 1'b1, 2000, 15, 1'b0);
    // 0.5 MHz inputs at 1 ps resolution: 2 000 000 RF cycles per beat, so
    // the 1.2 us interval gives N = 1 200 000 > 2^20.
    set_clocks(2_000_000.0, 2_000_001.0);
    measure(1_200_000.0, 1'b0, 2_000_000, 8, 1'b1);
    check(n_chatter > 0, "chattering beat signal seen");
    check(n_inphase > 0 && n_outphase > 0, "both extraction modes used");
    check(n_pol0 > 0 && n_pol1 > 0, "both polarities seen");
    check(n_ignored > 0, "start while busy ignored");
    check(n_overflow > 0, "counter overflow seen");
    $display("mechanisms: chatter=%0d inphase=%0d outphase=%0d pol0=%0d pol1=%0d ignored=%0d overflow=%0d",
             n_chatter, n_inphase, n_outphase, n_pol0, n_pol1, n_ignored, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20.0e12;  // 20 s of simulated time
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
