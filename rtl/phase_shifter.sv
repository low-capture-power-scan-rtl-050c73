// phase_shifter -- spreads the (shadow-held) decompressor state over the
// scan chains.
//
// A purely combinational XOR network: scan chain j receives the XOR of three
// distinct state bits picked by lp_edt_pkg::tap_mask(j, RING_LEN, 3, PS_SALT).
// Different chains use different bit triples, so neighbouring chains do not
// carry shifted copies of the same sequence.
//
// Interface: dec_out follows state combinationally (zero latency).
//
// The source names the phase shifter and places it after the shadow
// register; its XOR wiring (three inputs per output, pseudo-random choice)
// is this design's own.
module phase_shifter
  import lp_edt_pkg::*;
#(
  parameter int unsigned RING_LEN = 32,
  parameter int unsigned N_CHAINS = 164,
  parameter int unsigned PS_TAPS  = 3
) (
  input  logic [RING_LEN-1:0] state,
  output logic [N_CHAINS-1:0] dec_out
);

  for (genvar j = 0; j < N_CHAINS; j++) begin : g_out
    localparam logic [MAX_W-1:0] M = tap_mask(j, RING_LEN, PS_TAPS, PS_SALT);
    assign dec_out[j] = ^(state & M[RING_LEN-1:0]);
  end

endmodule
