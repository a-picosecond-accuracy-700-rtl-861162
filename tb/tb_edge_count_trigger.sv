// tb_edge_count_trigger: self-checking test of the start trigger.
// The beat signal is a square wave of PERIOD clock cycles (high first half).
// Within CHAT cycles after each edge it chatters: each sample takes a random
// level. For each start (at a random beat phase) the test checks that
//  - exactly one gate pulse follows, and done pulses once as it closes;
//  - without chatter the gate is open in the sample PRESET+1 cycles after
//    the first low sample (PRESET+1 sensed low samples, the last of which
//    borrows and opens the gate at that clock edge) and lasts exactly
//    PERIOD cycles;
//  - with chatter the gate opens after the beat has settled low and lasts
//    PERIOD cycles within the chatter width;
//  - a start while busy is ignored.
`timescale 1ps / 1fs
module tb_edge_count_trigger;
  localparam int CT_W   = 8;
  localparam int PERIOD = 2000;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, beat = 1'b0;
  logic [CT_W-1:0] preset = 8'd255;
  logic gate_b, busy, done;
  int checks = 0, failures = 0;
  int chat = 0;        // chatter width in cycles after each edge
  longint cyc = 0;     // cycle counter
  int phase = 0;       // position inside the beat period

  edge_count_trigger #(.CT_W(CT_W)) dut (.clk, .rst_n, .start, .beat, .preset, .gate_b, .busy, .done);

  always #500 clk = ~clk;

  // Beat generator, updated after each rising clock edge.
  always @(posedge clk) begin
    cyc   <= cyc + 1;
    phase <= (phase + 1) % PERIOD;
  end
  always_comb begin
    int p;
    p = phase;
    if (chat > 0 && (p < chat || (p >= PERIOD / 2 && p < PERIOD / 2 + chat)))
      beat = 1'($urandom_range(1, 0));
    else
      beat = (p < PERIOD / 2);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One measurement: start at a random phase, observe gate and done.
  task automatic run_one(input int chatter, input int pre);
    int open_phase, len, dones, gates;
    bit prev_gate;
    chat   = chatter;
    preset = CT_W'(pre);
    repeat ($urandom_range(PERIOD, 1)) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    len = 0; dones = 0; gates = 0; prev_gate = 1'b0; open_phase = -1;
    // Second start while busy must be ignored.
    repeat (10) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy || done) begin
      if (gate_b && !prev_gate) begin
        gates++;
        open_phase = phase;
      end
      if (gate_b) len++;
      if (done) dones++;
      prev_gate = gate_b;
      @(negedge clk);
      if (cyc > 64'd10_000_000) break;
    end
    repeat (3 * PERIOD) begin  // nothing more without a new start
      if (gate_b && !prev_gate) gates++;
      prev_gate = gate_b;
      @(negedge clk);
    end
    check(gates == 1, $sformatf("one gate pulse (got %0d)", gates));
    check(dones == 1, $sformatf("one done pulse (got %0d)", dones));
    if (chatter == 0) begin
      check(open_phase == PERIOD / 2 + pre + 1,
            $sformatf("gate opens after settled fall: phase %0d", open_phase));
      check(len == PERIOD, $sformatf("gate length %0d", len));
    end else begin
      check(open_phase >= PERIOD / 2 + chatter && open_phase <= PERIOD / 2 + chatter + pre + 1,
            $sformatf("gate opens after settled fall (chatter): phase %0d", open_phase));
      check(len >= PERIOD - chatter && len <= PERIOD + chatter,
            $sformatf("gate length with chatter %0d", len));
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!gate_b && !busy, "idle after reset");
    for (int i = 0; i < 6; i++) run_one(0, 255);
    for (int i = 0; i < 3; i++) run_one(0, 40);
    for (int i = 0; i < 10; i++) run_one(250, 255);  // about 250 ps jitter at 1 ps
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
