// lp_edt_top -- low-power EDT test-data decompressor with per-chain constant
// loading, output hold and capture control, plus the clock-gater hierarchy
// that the capture-power method controls.
//
// Data path, per shift cycle (Fig. 4 arrangement):
//   tester channels -> ring_generator -> shadow_register -> phase_shifter
//   -> gating_circuit -> chain_si[]
// Control path, per pattern:
//   tester channels -> control_register -> xor_network -> biasing_circuit
//   -> gating_circuit (stimulus gates and per-chain scan enable)
//
// Operation of one pattern:
//   1. ctrl_load = 1 for ceil(CTRL_W / N_CHANNELS) cycles: the channels carry
//      control data into the control register (skipped when the pattern
//      reuses the previous control data).  Ring and shadow register hold.
//   2. scan_enable = 1, ctrl_load = 0 for the scan load: the channels carry
//      seed variables; odd channel parity in a cycle reloads the shadow
//      register from the ring (HOLD_PARITY), so the decompressor-fed chains
//      see the same values for several cycles.  Each chain gets either the
//      phase-shifter output or the constant, as the control data decide.
//   3. scan_enable = 0 for capture: chains loaded with a constant keep
//      chain_se = 1 and only the decompressor-fed chains capture.  The clock
//      gaters, forced on during shift, now follow their functional enables.
//
// Control register layout (bit 0 shifted in first):
//   [CTRL_BITS-1:0]                  XOR-network variables
//   [CTRL_BITS]                      biasing mode: 0 fixed, 1 per segment
//   [CTRL_BITS+1 +: SEGMENTS*SELW]   bias select of each segment
//
// Timing: chain_si / chain_se are combinational from registers and the
// test_mode / scan_enable pins; they are valid for the scan cells' next
// rising clk edge.  cg_gclk[] are gated copies of clk.
//
// With SE_GROUP = k > 0 the scan enables are partly separated from the
// stimulus gates: XOR-network output N_CHAINS*G + q is the capture control
// of chains q*k .. q*k+k-1 (see gating_circuit).
//
// Defaults are those of design D1 of the source's experiments (164 chains of
// 169 cells, 4 channels, 48-bit control register).  Ring length, segment
// count, clock-gater counts and all XOR wiring are this design's own choice.
module lp_edt_top
  import lp_edt_pkg::*;
#(
  parameter int unsigned N_CHAINS     = 164,
  parameter int unsigned CHAIN_LEN    = 169,
  parameter int unsigned N_CHANNELS   = 4,
  parameter int unsigned RING_LEN     = 32,
  parameter int unsigned CTRL_BITS    = 48,
  parameter int unsigned BIAS_INPUTS  = 3,
  parameter int unsigned SEGMENTS     = 4,
  parameter const_mode_e CONST_MODE   = CONST_ZERO,
  parameter hold_src_e   HOLD_SRC     = HOLD_PARITY,
  parameter int unsigned CG_GROUPS    = 8,
  parameter int unsigned CG_PER_GROUP = 4,
  // 0: scan enable tied to the stimulus gate of each chain (default);
  // k > 0: partly separated, one capture control per group of k chains
  parameter int unsigned SE_GROUP     = 0,
  // derived
  parameter int unsigned SELW    = (BIAS_INPUTS > 2) ? $clog2(BIAS_INPUTS) : 1,
  parameter int unsigned CTRL_W  = CTRL_BITS + 1 + SEGMENTS * SELW,
  parameter int unsigned SEG_LEN = (CHAIN_LEN + SEGMENTS - 1) / SEGMENTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  test_mode,
  input  logic                  scan_enable,
  input  logic                  ctrl_load,
  input  logic [N_CHANNELS-1:0] edt_ch,
  input  logic                  hold_ch,
  output logic [N_CHAINS-1:0]   chain_si,
  output logic [N_CHAINS-1:0]   chain_se,
  output logic [N_CHAINS-1:0]   chain_from_dec,
  output logic                  shadow_reload,
  output logic [$clog2(SEGMENTS+1)-1:0] bias_segment,
  input  logic [CG_GROUPS-1:0]  cg_group_en,
  input  logic [CG_GROUPS*CG_PER_GROUP-1:0] cg_leaf_en,
  output logic [CG_GROUPS*CG_PER_GROUP-1:0] cg_gclk
);

  localparam int unsigned G  = BIAS_INPUTS + ((CONST_MODE == CONST_BOTH) ? 1 : 0);
  localparam int unsigned NG = (SE_GROUP > 0) ? (N_CHAINS + SE_GROUP - 1) / SE_GROUP : 0;

  logic                    shift_en;
  logic [RING_LEN-1:0]     ring_q;
  logic [RING_LEN-1:0]     shadow_q;
  logic [N_CHAINS-1:0]     dec;
  logic [CTRL_W-1:0]       ctrl;
  logic [N_CHAINS*G+NG-1:0] xo;
  logic [N_CHAINS-1:0]     cap;
  logic [N_CHAINS-1:0]     gate_a;
  logic [N_CHAINS-1:0]     gate_b;

  assign shift_en = test_mode & scan_enable & ~ctrl_load;

  ring_generator #(.RING_LEN(RING_LEN), .N_CHANNELS(N_CHANNELS)) u_ring (
    .clk, .rst_n, .shift_en, .ch_in(edt_ch), .state(ring_q)
  );

  shadow_register #(.RING_LEN(RING_LEN), .N_CHANNELS(N_CHANNELS),
                    .HOLD_SRC(HOLD_SRC)) u_shadow (
    .clk, .rst_n, .shift_en, .ring_state(ring_q), .ch_in(edt_ch), .hold_ch,
    .reload(shadow_reload), .shadow(shadow_q)
  );

  phase_shifter #(.RING_LEN(RING_LEN), .N_CHAINS(N_CHAINS)) u_ps (
    .state(shadow_q), .dec_out(dec)
  );

  control_register #(.N_CHANNELS(N_CHANNELS), .W(CTRL_W)) u_ctrl (
    .clk, .rst_n, .load(ctrl_load), .ch_in(edt_ch), .ctrl
  );

  xor_network #(.CTRL_BITS(CTRL_BITS), .N_CHAINS(N_CHAINS), .G(G), .EXTRA(NG)) u_xn (
    .ctrl(ctrl[CTRL_BITS-1:0]), .gate(xo)
  );

  biasing_circuit #(.N_CHAINS(N_CHAINS), .G(G), .BIAS_INPUTS(BIAS_INPUTS),
                    .SEGMENTS(SEGMENTS), .SEG_LEN(SEG_LEN), .SELW(SELW)) u_bias (
    .clk, .rst_n, .shift_en, .seg_clear(~scan_enable | ctrl_load),
    .per_seg(ctrl[CTRL_BITS]), .sel(ctrl[CTRL_BITS+1 +: SEGMENTS*SELW]),
    .xo(xo[N_CHAINS*G-1:0]), .gate_a, .segment(bias_segment)
  );

  for (genvar j = 0; j < N_CHAINS; j++) begin : g_b
    assign gate_b[j] = (CONST_MODE == CONST_BOTH) ? xo[j*G + G - 1] : 1'b1;
    if (SE_GROUP > 0) begin : g_cap
      assign cap[j] = xo[N_CHAINS*G + j / SE_GROUP];
    end else begin : g_nocap
      assign cap[j] = 1'b1;
    end
  end

  gating_circuit #(.N_CHAINS(N_CHAINS), .CONST_MODE(CONST_MODE),
                   .SEPARATE_SE(SE_GROUP > 0)) u_gate (
    .test_mode, .scan_enable, .dec, .gate_a, .gate_b, .cap,
    .from_dec(chain_from_dec), .chain_si, .chain_se
  );

  // Two-level clock-gater hierarchy of the circuit under test: a group gater
  // turned off stops all of its leaves with one enable.
  for (genvar g = 0; g < CG_GROUPS; g++) begin : g_cg
    logic grp_clk;
    clock_gater u_grp (.clk, .en(cg_group_en[g]), .test_en(scan_enable),
                       .gclk(grp_clk));
    for (genvar p = 0; p < CG_PER_GROUP; p++) begin : g_leaf
      clock_gater u_leaf (.clk(grp_clk), .en(cg_leaf_en[g*CG_PER_GROUP+p]),
                          .test_en(scan_enable),
                          .gclk(cg_gclk[g*CG_PER_GROUP+p]));
    end
  end

endmodule
