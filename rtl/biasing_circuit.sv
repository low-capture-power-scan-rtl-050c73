// biasing_circuit -- reconfigurable biasing of the scan-chain gating signals.
//
// Without biasing, a chain that test generation left unconstrained is fed
// by the decompressor whenever its XOR-network output is 1, i.e. for about
// 50 % of such chains.  The biasing circuit ANDs several XOR-network outputs
// per chain: with 2 inputs about 25 % of the chains stay connected to the
// decompressor, with 3 inputs about 12.5 %, and the rest receive the
// constant.  For scan chain j the candidate inputs are xo[j*G + 0 ..
// j*G + BIAS_INPUTS-1]; a select value s ANDs the first s+1 of them (values
// past the last input use all BIAS_INPUTS).  xo[j*G] alone is the plain,
// unbiased gating signal.
//
// The select is programmable and comes from the control register:
//   per_seg = 0 : sel[0] is used for the whole scan load;
//   per_seg = 1 : the scan load is split into SEGMENTS segments of SEG_LEN
//                 shift cycles and segment k uses sel[k] (the last segment
//                 also covers any cycles past SEGMENTS*SEG_LEN).
// A shift-cycle counter, cleared by seg_clear (capture or control load) and
// advanced by shift_en, tells the current segment.
//
// Interface: gate_a and segment are combinational in the registered counter
// and the inputs; the counter moves on the rising clk edge.  rst_n clears it.
//
// The AND-gate biasing, its programmable input selection and the two modes
// (fixed for the whole shift, or per chain segment) follow the source; the
// select encoding, the equal-length segments and the counter are this
// design's own.
module biasing_circuit #(
  parameter int unsigned N_CHAINS    = 164,
  parameter int unsigned G           = 3,
  parameter int unsigned BIAS_INPUTS = 3,
  parameter int unsigned SEGMENTS    = 4,
  parameter int unsigned SEG_LEN     = 43,
  parameter int unsigned SELW        = (BIAS_INPUTS > 2) ? $clog2(BIAS_INPUTS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift_en,
  input  logic                     seg_clear,
  input  logic                     per_seg,
  input  logic [SEGMENTS*SELW-1:0] sel,
  input  logic [N_CHAINS*G-1:0]    xo,
  output logic [N_CHAINS-1:0]      gate_a,
  output logic [$clog2(SEGMENTS+1)-1:0] segment
);

  localparam int unsigned CW = $clog2(SEGMENTS * SEG_LEN + 1);

  logic [CW-1:0]   cnt;
  logic [SELW-1:0] cur_sel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                                    cnt <= '0;
    else if (seg_clear)                            cnt <= '0;
    else if (shift_en && cnt != CW'(SEGMENTS * SEG_LEN)) cnt <= cnt + 1'b1;

  always_comb begin
    segment = '0;
    for (int unsigned k = 1; k < SEGMENTS; k++)
      if (cnt >= CW'(k * SEG_LEN)) segment = ($bits(segment))'(k);
    cur_sel = per_seg ? sel[segment*SELW +: SELW] : sel[SELW-1:0];
  end

  always_comb
    for (int unsigned j = 0; j < N_CHAINS; j++) begin
      gate_a[j] = 1'b1;
      for (int unsigned k = 0; k < BIAS_INPUTS; k++)
        if (k <= 32'(cur_sel)) gate_a[j] = gate_a[j] & xo[j*G + k];
    end

endmodule
