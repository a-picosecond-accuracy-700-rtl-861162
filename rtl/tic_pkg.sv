// tic_pkg: types and constants shared by the time interval counter (TIC).
//
// The TIC measures the interval between two equal-frequency clocks S1 and S2
// with a digital vernier: a reference clock RF of slightly different
// frequency samples S1 and S2, producing two slow beat signals whose phase
// difference is the input interval expanded by fR/|f0-fR|. The digital part
// counts RF cycles over that phase difference for exactly one beat period.
//
// The widths follow the original chip: a 20-bit result counter, 8-bit trigger
// counters and an 8-bit I/O bus. The register map behind the bus and its
// 3-bit address are this design's own choice; the original only states that all
// read/write control goes over an 8-bit bus.
`timescale 1ps / 1fs
package tic_pkg;

  localparam int CNT_W  = 20;  // result counter width (6 decades)
  localparam int CT_W   = 8;   // edge-count trigger counter width
  localparam int BUS_W  = 8;   // I/O bus data width
  localparam int ADDR_W = 3;   // I/O bus address width (own choice)

  // Which part of the beat signals is extracted.
  typedef enum logic {
    MODE_IN_PHASE  = 1'b0,  // rising edges of S1/S2 against rising edge of RF (normal)
    MODE_OUT_PHASE = 1'b1   // rising edges of S1/S2 against falling edge of RF (experimental)
  } extract_mode_e;

  // Register map of the I/O bus.
  typedef enum logic [ADDR_W-1:0] {
    REG_CTRL   = 3'd0,  // W: [0] start (pulse), [1] mode.  R: status, see below
    REG_PRESET = 3'd1,  // R/W: preset of trigger counters CT1 and CT2
    REG_CNT0   = 3'd2,  // R: result bits 7:0
    REG_CNT1   = 3'd3,  // R: result bits 15:8
    REG_CNT2   = 3'd4   // R: result bits 19:16 in [3:0]
  } reg_addr_e;

  // Status bits read from REG_CTRL.
  localparam int ST_BUSY     = 0;  // measurement in progress
  localparam int ST_MODE     = 1;  // current extraction mode
  localparam int ST_DONE     = 2;  // a result is ready (cleared by start)
  localparam int ST_OVERFLOW = 3;  // result counter wrapped past 2^20-1
  localparam int ST_POLARITY = 4;  // skew polarity from detector D3

  localparam logic [CT_W-1:0] PRESET_DEFAULT = '1;

endpackage
