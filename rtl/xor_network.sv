// xor_network -- the combinational part of the low-power control block.
//
// An m-input, (N_CHAINS*G+EXTRA)-output XOR mapping: every output is the XOR of
// XN_TAPS distinct control bits, chosen by
// lp_edt_pkg::tap_mask(j, CTRL_BITS, XN_TAPS, XN_SALT).  Output j*G+g is the
// g-th gating signal of scan chain j; EXTRA further outputs follow (the
// group capture controls when scan enable is partly separated).  With random control data every output
// is 1 with probability 0.5, which the gating and biasing logic turns into
// the fraction of chains fed by the decompressor; test generation solves
// the linear equations of the outputs it needs and leaves the rest to fall
// where they may.
//
// Interface: purely combinational, zero latency.
//
// The m-input n-output XOR structure follows the source; the number of
// taps per output and their choice are this design's own (the source only
// requires high encoding efficiency).
module xor_network
  import lp_edt_pkg::*;
#(
  parameter int unsigned CTRL_BITS = 48,
  parameter int unsigned N_CHAINS  = 164,
  parameter int unsigned G         = 3,
  parameter int unsigned XN_TAPS   = 3,
  parameter int unsigned EXTRA     = 0
) (
  input  logic [CTRL_BITS-1:0]        ctrl,
  output logic [N_CHAINS*G+EXTRA-1:0] gate
);

  for (genvar j = 0; j < N_CHAINS * G + EXTRA; j++) begin : g_out
    localparam logic [MAX_W-1:0] M = tap_mask(j, CTRL_BITS, XN_TAPS, XN_SALT);
    assign gate[j] = ^(ctrl & M[CTRL_BITS-1:0]);
  end

endmodule
