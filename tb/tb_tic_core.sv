// tb_tic_core: self-checking test of the digital part of the TIC through its
// 8-bit bus. The beat signals are generated per RF cycle from a beat phase
// p = cycle mod P: b1 is high for p in [0, P/2), b2 for p in [D, D+P/2),
// and the D3 polarity is D > P/2. Optionally the beat signals chatter
// (random level) within CHAT/2 cycles of every edge. A measurement is started
// over the bus, done is polled, and the 20-bit result N is read back byte by
// byte. Expected: N = D exactly without chatter, |N - D| <= CHAT with it, in
// both extraction modes; with P > 2^20 and D > 2^20 the result wraps and the
// overflow bit is set. The measurement time is checked too: at most three
// beat periods from start to done.
`timescale 1ps / 1fs
module tb_tic_core;
  import tic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic b1 = 1'b0, b2 = 1'b0, d3_pol = 1'b0;
  logic cs = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0] wdata = '0, rdata;
  logic window_a, gate_b, count_en;
  int checks = 0, failures = 0;
  int P = 1000, D = 300, CHAT = 0;
  bit out_phase = 1'b0;
  longint cyc = 0;

  tic_core dut (.clk, .rst_n, .b1, .b2, .d3_pol, .cs, .we, .addr, .wdata, .rdata,
                .window_a, .gate_b, .count_en);

  always #500 clk = ~clk;

  function automatic logic beat_level(input longint p, input int per);
    int h;
    h = per / 2;
    if (CHAT > 0 && ((p < CHAT / 2) || (p >= per - CHAT / 2) ||
                     (p >= h - CHAT / 2 && p < h + CHAT / 2)))
      return 1'($urandom_range(1, 0));
    return (p < h);
  endfunction

  always @(negedge clk) begin
    cyc    <= cyc + 1;
    b1     <= beat_level(cyc % P, P);
    b2     <= beat_level((cyc - D + P) % P, P);
    d3_pol <= (D > P / 2);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; we = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    cs = 1'b0; we = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] a, output logic [BUS_W-1:0] d);
    @(negedge clk);
    cs = 1'b1; we = 1'b0; addr = a;
    @(negedge clk);
    cs = 1'b0;
    d = rdata;
  endtask

  task automatic measure(input int per, input int d, input int chat, input bit op,
                         output logic [CNT_W-1:0] n, output logic [BUS_W-1:0] st);
    logic [BUS_W-1:0] b;
    longint t0;
    P = per; D = d; CHAT = chat; out_phase = op;
    repeat (8) @(negedge clk);  // polarity synchroniser
    t0 = cyc;
    write(REG_CTRL, {6'b0, op, 1'b1});
    do read(REG_CTRL, st); while (!st[ST_DONE] && cyc - t0 < 4 * longint'(per));
    check(st[ST_DONE], "measurement done");
    check(cyc - t0 <= 3 * longint'(per) + 20, $sformatf("measurement time %0d cycles", cyc - t0));
    read(REG_CNT0, b); n[7:0]   = b;
    read(REG_CNT1, b); n[15:8]  = b;
    read(REG_CNT2, b); n[19:16] = b[3:0];
  endtask

  initial begin
    logic [CNT_W-1:0] n;
    logic [BUS_W-1:0] st;
    int dd, err;
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Exact results without chatter, both modes, both polarities.
    for (int i = 0; i < 12; i++) begin
      dd = (i % 2 == 0) ? $urandom_range(480, 5) : $urandom_range(995, 520);
      measure(1000, dd, 0, i >= 6, n, st);
      check(n == CNT_W'(dd), $sformatf("N=%0d for D=%0d mode=%0d", n, dd, i >= 6));
      check(st[ST_POLARITY] == (dd > 500), "polarity bit");
      check(!st[ST_OVERFLOW] && !st[ST_BUSY], "status after measurement");
      check(st[ST_MODE] == (i >= 6), "mode bit");
    end
    // Chattering beat signals (filtered by the edge-count trigger).
    for (int i = 0; i < 6; i++) begin
      dd = $urandom_range(1400, 100);
      measure(3000, dd, 200, 1'b0, n, st);
      err = int'(n) - dd;
      check(err >= -200 && err <= 200, $sformatf("chatter: N=%0d for D=%0d", n, dd));
    end
    // Smaller trigger preset still works without chatter.
    write(REG_PRESET, 8'd20);
    measure(1000, 123, 0, 1'b0, n, st);
    check(n == 123, $sformatf("preset 20: N=%0d", n));
    write(REG_PRESET, 8'd255);
    // Wrap of the 20-bit counter.
    measure(2200000, 1100000, 0, 1'b0, n, st);
    check(st[ST_OVERFLOW], "overflow flag");
    check(n == CNT_W'(1100000 - (1 << 20)), $sformatf("wrapped N=%0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
