// shadow_register -- holds a chosen ring-generator state for several shift
// cycles so that the scan chains fed by the decompressor see fewer
// transitions, while the ring generator keeps advancing to encode the next
// specified bits.
//
// It sits between the ring generator and the phase shifter.  Every enabled
// shift cycle a reload command is formed; if it is 1 the register copies the
// ring's current state (the state before this cycle's seed variables enter
// the ring), otherwise it keeps its content.  The command comes either from
// the XOR (parity) tree over all channel bits of the cycle, reload on odd
// parity (HOLD_SRC = HOLD_PARITY, the default), or from a dedicated control
// channel hold_ch (HOLD_SRC = HOLD_CHANNEL).  Both options follow the source;
// the tester must therefore encode the parity bit together with the seed
// variables.
//
// Interface: ring_state and ch_in are sampled on the rising clk edge; shadow
// changes on that edge.  reload is the combinational command of the current
// cycle.  rst_n clears the register asynchronously (reset value is this
// design's choice).
module shadow_register
  import lp_edt_pkg::*;
#(
  parameter int unsigned RING_LEN   = 32,
  parameter int unsigned N_CHANNELS = 4,
  parameter hold_src_e   HOLD_SRC   = HOLD_PARITY
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en,
  input  logic [RING_LEN-1:0]   ring_state,
  input  logic [N_CHANNELS-1:0] ch_in,
  input  logic                  hold_ch,
  output logic                  reload,
  output logic [RING_LEN-1:0]   shadow
);

  logic cmd;

  always_comb begin
    if (HOLD_SRC == HOLD_PARITY) cmd = ^ch_in;
    else                         cmd = hold_ch;
    reload = shift_en & cmd;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      shadow <= '0;
    else if (reload) shadow <= ring_state;

endmodule
