// tb_io_bus: self-checking test of the 8-bit register interface.
// Checks reset values, the one-cycle start pulse and its suppression while
// busy, mode and preset writes, the done flag (set by the end-of-measurement
// pulse, cleared by start), every status bit, and the three result bytes
// against random counts. Read data are checked one cycle after the access.
`timescale 1ps / 1fs
module tb_io_bus;
  import tic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic cs = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [BUS_W-1:0] wdata = '0, rdata;
  logic start;
  extract_mode_e mode;
  logic [CT_W-1:0] preset;
  logic busy = 1'b0, meas_done = 1'b0, overflow = 1'b0, polarity = 1'b0;
  logic [CNT_W-1:0] count = '0;
  int checks = 0, failures = 0;
  int starts = 0;

  io_bus dut (.clk, .rst_n, .cs, .we, .addr, .wdata, .rdata, .start, .mode, .preset,
              .busy, .meas_done, .overflow, .polarity, .count);

  always #500 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input logic [ADDR_W-1:0] a, input logic [BUS_W-1:0] d);
    cs = 1'b1; we = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    cs = 1'b0; we = 1'b0;
  endtask

  task automatic read(input logic [ADDR_W-1:0] a, output logic [BUS_W-1:0] d);
    cs = 1'b1; we = 1'b0; addr = a;
    @(negedge clk);
    cs = 1'b0;
    d = rdata;
  endtask

  initial begin
    logic [BUS_W-1:0] d;
    logic [CNT_W-1:0] got;
    #1 rst_n = 1'b0;  // asynchronous reset pulse
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(mode == MODE_IN_PHASE && preset == 8'hFF && !start, "reset values");
    read(REG_PRESET, d);
    check(d == 8'hFF, "preset reads 255 after reset");
    // Preset write and read back.
    write(REG_PRESET, 8'h5A);
    check(preset == 8'h5A, "preset written");
    read(REG_PRESET, d);
    check(d == 8'h5A, "preset read back");
    // Mode write without start.
    write(REG_CTRL, 8'h02);
    check(mode == MODE_OUT_PHASE && starts == 0, "mode set, no start");
    // Start: exactly one pulse of one cycle.
    cs = 1'b1; we = 1'b1; addr = REG_CTRL; wdata = 8'h01;
    @(posedge clk); #1;
    cs = 1'b0; we = 1'b0;
    check(start == 1'b1 && mode == MODE_IN_PHASE, "start pulse and mode");
    @(posedge clk); #1;
    check(start == 1'b0 && starts == 1, "start lasts one cycle");
    @(negedge clk);
    // Start while busy is dropped.
    busy = 1'b1;
    write(REG_CTRL, 8'h01);
    @(negedge clk);
    check(starts == 1, "start ignored while busy");
    read(REG_CTRL, d);
    check(d[ST_BUSY] && !d[ST_DONE], "status busy");
    // End of measurement.
    busy = 1'b0; meas_done = 1'b1;
    @(negedge clk);
    meas_done = 1'b0;
    overflow = 1'b1; polarity = 1'b1;
    read(REG_CTRL, d);
    check(d == 8'b0001_1100, $sformatf("status done/ovf/pol = %b", d));
    write(REG_CTRL, 8'h03);
    @(negedge clk);
    read(REG_CTRL, d);
    check(!d[ST_DONE] && d[ST_MODE] && starts == 2, "start clears done");
    // Result bytes.
    for (int i = 0; i < 50; i++) begin
      count = CNT_W'($urandom);
      read(REG_CNT0, d); got[7:0] = d;
      read(REG_CNT1, d); got[15:8] = d;
      read(REG_CNT2, d); got[19:16] = d[3:0];
      check(d[7:4] == 4'h0, "upper bits of CNT2 are zero");
      check(got == count, $sformatf("result %h read as %h", count, got));
    end
    // No access: read data hold.
    d = rdata;
    count = ~count;
    repeat (3) @(negedge clk);
    check(rdata == d, "read data hold without access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
