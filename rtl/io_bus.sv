// io_bus: the 8-bit I/O bus of the TIC, through which an outside controller
// starts measurements, selects the extraction mode, sets the trigger counter
// preset and reads the 20-bit result.
//
// How it works: a small register file with a 3-bit address (register map in
// tic_pkg). Writing REG_CTRL with bit 0 set issues a one-cycle start pulse;
// bit 1 of the same write sets the mode. REG_PRESET holds the CT1/CT2
// preset (255 after reset). The result is read a byte at a time from
// REG_CNT0..2. Reading REG_CTRL returns busy, mode, done, overflow and the
// skew polarity. done is set when the trigger reports the gate closed and
// cleared by the next start.
//
// Interface and timing: synchronous to clk (RF), one access per cycle with
// cs high; we selects a write. Read data appear on rdata the cycle after the
// access and stay until the next read. The original chip specifies only an
// 8-bit bus for all read/write control; the register map, the address width,
// the single clock and the split of the bidirectional data lines into
// wdata/rdata are this design's own.
`timescale 1ps / 1fs
module io_bus
  import tic_pkg::*;
(
  input  logic              clk,        // RF
  input  logic              rst_n,      // asynchronous reset, active low
  // Bus side
  input  logic              cs,         // access strobe
  input  logic              we,         // 1 write, 0 read
  input  logic [ADDR_W-1:0] addr,
  input  logic [BUS_W-1:0]  wdata,
  output logic [BUS_W-1:0]  rdata,
  // Core side
  output logic              start,      // one-cycle start command
  output extract_mode_e     mode,
  output logic [CT_W-1:0]   preset,
  input  logic              busy,
  input  logic              meas_done,  // one-cycle pulse at end of measurement
  input  logic              overflow,
  input  logic              polarity,
  input  logic [CNT_W-1:0]  count
);

  logic done_flag;
  logic wr, rd;

  assign wr = cs && we;
  assign rd = cs && !we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      mode      <= MODE_IN_PHASE;
      preset    <= PRESET_DEFAULT;
      done_flag <= 1'b0;
      rdata     <= '0;
    end else begin
      start <= 1'b0;
      if (wr && addr == REG_CTRL) begin
        mode <= extract_mode_e'(wdata[1]);
        if (wdata[0] && !busy) begin
          start     <= 1'b1;
          done_flag <= 1'b0;
        end
      end
      if (wr && addr == REG_PRESET) preset <= wdata[CT_W-1:0];
      if (meas_done) done_flag <= 1'b1;
      if (rd) begin
        unique case (addr)
          REG_CTRL: begin
            rdata              <= '0;
            rdata[ST_BUSY]     <= busy;
            rdata[ST_MODE]     <= mode;
            rdata[ST_DONE]     <= done_flag;
            rdata[ST_OVERFLOW] <= overflow;
            rdata[ST_POLARITY] <= polarity;
          end
          REG_PRESET: rdata <= BUS_W'(preset);
          REG_CNT0:   rdata <= count[7:0];
          REG_CNT1:   rdata <= count[15:8];
          REG_CNT2:   rdata <= BUS_W'(count[CNT_W-1:16]);
          default:    rdata <= '0;
        endcase
      end
    end
  end

endmodule
