// ring_generator -- the state machine of the EDT test-data decompressor.
//
// RING_LEN flip-flops form a ring: every enabled shift cycle each stage takes
// the value of its predecessor, stage 0 takes the last stage, and the last
// stage is also XORed into the feedback stages of a primitive polynomial
// (lp_edt_pkg::ring_taps), so with no injection the ring cycles through all
// 2^RING_LEN-1 non-zero states.  Each of the N_CHANNELS compressed tester
// channels is XORed into one stage (lp_edt_pkg::inject_pos) in the same cycle,
// which is how seed variables enter continuously ("continuous flow" EDT).
//
// Interface: ch_in is sampled on the rising clk edge when shift_en is high;
// state is the registered ring content (visible one cycle after injection).
// rst_n clears the ring asynchronously.
//
// The decompressor itself is taken from the EDT technique the design builds
// on; its ring length, polynomial and injector positions are this design's
// own choice, not given by the source.
module ring_generator
  import lp_edt_pkg::*;
#(
  parameter int unsigned RING_LEN   = 32,
  parameter int unsigned N_CHANNELS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en,
  input  logic [N_CHANNELS-1:0] ch_in,
  output logic [RING_LEN-1:0]   state
);

  localparam taps_t TAPS = ring_taps(RING_LEN);

  logic [RING_LEN-1:0] nxt;

  always_comb begin
    nxt = {state[RING_LEN-2:0], state[RING_LEN-1]};
    for (int unsigned k = 0; k < 4; k++)
      if (TAPS[k] != 0) nxt[TAPS[k]] = nxt[TAPS[k]] ^ state[RING_LEN-1];
    for (int unsigned c = 0; c < N_CHANNELS; c++)
      nxt[inject_pos(c, N_CHANNELS, RING_LEN)] =
        nxt[inject_pos(c, N_CHANNELS, RING_LEN)] ^ ch_in[c];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        state <= '0;
    else if (shift_en) state <= nxt;

endmodule
