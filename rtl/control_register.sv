// control_register -- the register of the low-power control block.
//
// It holds the per-pattern control data: the CTRL_BITS variables of the XOR
// network followed by CFG_BITS configuration bits of the biasing circuit.
// The data arrive over the same compressed input channels as the test
// stimuli: while load is high, N_CHANNELS bits are shifted in per clock,
// entering at the top and moving towards bit 0, so after ceil(W/N_CHANNELS)
// load cycles bit 0 holds the first bit of the last W bits sent
// (channel 0 of each cycle is the lower bit).  While load is low the content
// is frozen: it stays constant for the whole scan load and capture of a
// pattern, and may be kept over several patterns that share control data.
//
// W must exceed N_CHANNELS.
//
// Interface: ch_in sampled on rising clk when load = 1; ctrl is the register
// content.  rst_n clears it asynchronously, which gates every chain off.
//
// The source states what the register holds and that it is reloaded per
// pattern through the input channels; the serial shift format and the
// separate load signal are this design's own choice.
module control_register #(
  parameter int unsigned N_CHANNELS = 4,
  parameter int unsigned W          = 57
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N_CHANNELS-1:0] ch_in,
  output logic [W-1:0]          ctrl
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    ctrl <= '0;
    else if (load) ctrl <= {ch_in, ctrl[W-1:N_CHANNELS]};

endmodule
