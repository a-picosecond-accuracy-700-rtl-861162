// beat_signal_processor: turns the two beat signals of the TIC into the
// counter window A.
//
// Detectors D1 and D2 sample S1 and S2 at every rising edge of RF, so their
// outputs b1 and b2 are slow square waves (beat signals) with period
// 1/|f0-fR|. Seen as a function of the beat phase phi (position of the RF
// edge inside the S1 period T), b1 is high for phi in [0, T/2) and b2 for
// phi in [D, D+T/2), where D is the S1-to-S2 interval. The RF cycles with
// phi in [0, D) measure D in units of the vernier resolution |f0-fR|/(f0 fR).
// Both edges of that window are in-phase crossings (a rising S edge meeting
// the rising RF edge), the ones the skew detectors resolve best.
//
// How it works: from the levels alone, [0, D) is b1 & ~b2 when D < T/2 and
// b1 | ~b2 when D > T/2. Detector D3 (S2 sampled at S1's rising edge) gives
// exactly that distinction (polarity = 1 when D > T/2), which is how this
// design uses the skew polarity that the original chip needs to process the
// beat signals. In out-phase mode (experimental, as in the original chip) both
// beat signals are inverted first, which moves the window edges to the
// crossings of S1/S2 rising edges with RF falling edges.
//
// Interface and timing: everything runs on RF (clk). b1 and b2 are already
// RF-synchronous and are registered once; the polarity from D3 comes from
// the S1 clock domain and passes a two-flop synchroniser, and is then held
// from one start command to the next. Holding it matters near zero (and
// half-period) skew, where input jitter makes D3 flip from one S1 cycle to
// the next: a polarity that changed during the measurement would mix the two
// window equations, while a held one errs by at most twice the skew.
// window_a and beat_trig (registered b1, for the start trigger) follow b1/b2
// by one clock. The original chip defines the block's function; the window
// equations, the synchroniser, the hold at start and the registering are
// this design's own.
`timescale 1ps / 1fs
module beat_signal_processor
  import tic_pkg::*;
(
  input  logic          clk,        // RF
  input  logic          rst_n,      // asynchronous reset, active low
  input  logic          b1,         // beat signal from D1 (S1 vs RF)
  input  logic          b2,         // beat signal from D2 (S2 vs RF)
  input  logic          d3_pol,     // skew polarity from D3 (S2 sampled by S1)
  input  logic          start,      // start command: take a new polarity
  input  extract_mode_e mode,       // in-phase (normal) or out-phase part
  output logic          window_a,   // counter window A
  output logic          beat_trig,  // beat signal for the start trigger
  output logic          polarity    // D3 polarity held for this measurement
);

  logic b1_q, b2_q;
  logic pol_meta, pol_sync, pol_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1_q     <= 1'b0;
      b2_q     <= 1'b0;
      pol_meta <= 1'b0;
      pol_sync <= 1'b0;
      pol_q    <= 1'b0;
    end else begin
      b1_q     <= b1;
      b2_q     <= b2;
      pol_meta <= d3_pol;
      pol_sync <= pol_meta;
      if (start) pol_q <= pol_sync;
    end
  end

  logic x1, x2;
  always_comb begin
    x1 = b1_q ^ (mode == MODE_OUT_PHASE);
    x2 = b2_q ^ (mode == MODE_OUT_PHASE);
    window_a = pol_q ? (x1 | ~x2) : (x1 & ~x2);
  end

  assign beat_trig = b1_q;
  assign polarity  = pol_q;

endmodule
