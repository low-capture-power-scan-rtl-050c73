// lp_edt_env -- reusable checking environment for one size of lp_edt_top.
//
// Instantiates the top with the given sizes and applies three patterns:
//   0: control data loaded, one bias select (0) for the whole load, shadow
//      register reloaded every cycle (constant loading only);
// The gate type (CONST_MODE), the partly separated scan enable (SE_GROUP)
// and the source of the shadow reload command (HOLD_SRC; with HOLD_CHANNEL
// the channel parity is left random and hold_ch carries the command) can be
// set as on the top.
//   1: control data loaded, per-segment bias selects, shadow register held
//      on about 75 % of the cycles (constant loading plus output hold);
//   2: control data of pattern 1 reused.
// Each pattern ends with one capture cycle.  Every cycle the outputs are
// compared with a model of all stages, as in tb_lp_edt_top.  At each capture
// the number of decompressor-fed chains is checked against the fraction the
// bias select implies (within a wide band).  done rises when finished;
// checks and failures are then final.
module lp_edt_env
  import lp_edt_pkg::*;
#(
  parameter int unsigned N  = 203,
  parameter int unsigned L  = 300,
  parameter int unsigned C  = 4,
  parameter int unsigned RL = 32,
  parameter int unsigned M  = 64,
  parameter const_mode_e CONST_MODE = CONST_ZERO,
  parameter int unsigned SE_GROUP   = 0,
  parameter hold_src_e   HOLD_SRC   = HOLD_PARITY
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned K = 3, S = 4, SELW = 2;
  localparam int unsigned G  = K + ((CONST_MODE == CONST_BOTH) ? 1 : 0);
  localparam int unsigned NG = (SE_GROUP > 0) ? (N + SE_GROUP - 1) / SE_GROUP : 0;
  localparam int unsigned CW = M + 1 + S * SELW;
  localparam int unsigned SEGL = (L + S - 1) / S;
  localparam int unsigned LCYC = (CW + C - 1) / C;

  logic clk = 0, rst_n = 0, scan_enable = 0, ctrl_load = 0, hold_ch = 0;
  logic [C-1:0] edt_ch = '0;
  logic [N-1:0] chain_si, chain_se, chain_from_dec;
  logic         shadow_reload;
  logic [2:0]   bias_segment;
  logic [31:0]  cg_gclk;

  lp_edt_top #(.N_CHAINS(N), .CHAIN_LEN(L), .N_CHANNELS(C), .RING_LEN(RL),
               .CTRL_BITS(M), .CONST_MODE(CONST_MODE), .SE_GROUP(SE_GROUP),
               .HOLD_SRC(HOLD_SRC)) dut (
    .clk, .rst_n, .test_mode(1'b1), .scan_enable, .ctrl_load, .edt_ch,
    .hold_ch, .chain_si, .chain_se, .chain_from_dec, .shadow_reload,
    .bias_segment, .cg_group_en('1), .cg_leaf_en('1), .cg_gclk);

  always #5 clk = ~clk;

  logic [RL-1:0] m_ring, m_shadow;
  logic [CW-1:0] m_ctrl;
  int            m_cnt;
  logic [RL-1:0] ps_row [N];
  logic [M-1:0]  xn_row [N*G+NG];
  int            cur_sel;

  function automatic logic [RL-1:0] ring_step(logic [RL-1:0] s, logic [C-1:0] c);
    taps_t t;
    logic [RL-1:0] n;
    t = ring_taps(RL);
    n = {s[RL-2:0], s[RL-1]};
    for (int k = 0; k < 4; k++) if (t[k] != 0) n[t[k]] ^= s[RL-1];
    for (int k = 0; k < C; k++) n[inject_pos(k, C, RL)] ^= c[k];
    return n;
  endfunction

  task automatic chk(logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 5) $display("N=%0d %t: got %h exp %h", N, $time, got, exp);
    end
  endtask

  task automatic cycle(logic load, logic se, logic [C-1:0] ch, logic hold = 1'b0);
    logic [N-1:0] dec, a, b, cap, fd, si, keep;
    logic         shift, cmd;
    int           seg, sel;
    @(negedge clk);
    ctrl_load = load; scan_enable = se; edt_ch = ch; hold_ch = hold;
    #1;
    shift = se && !load;
    cmd   = (HOLD_SRC == HOLD_CHANNEL) ? hold : ^ch;
    seg = m_cnt / SEGL; if (seg > S - 1) seg = S - 1;
    sel = m_ctrl[M] ? int'(m_ctrl[M+1+seg*SELW +: SELW]) : int'(m_ctrl[M+1 +: SELW]);
    cur_sel = sel;
    for (int j = 0; j < N; j++) begin
      dec[j] = ^(m_shadow & ps_row[j]);
      a[j] = 1'b1;
      for (int k = 0; k < K; k++)
        if (k <= sel) a[j] &= ^(m_ctrl[M-1:0] & xn_row[j*G+k]);
      b[j]   = ^(m_ctrl[M-1:0] & xn_row[j*G+G-1]);
      cap[j] = (SE_GROUP > 0) ? ^(m_ctrl[M-1:0] & xn_row[N*G + j / (SE_GROUP > 0 ? SE_GROUP : 1)]) : 1'b1;
      if (SE_GROUP > 0) a[j] &= cap[j];
      if (CONST_MODE == CONST_BOTH) begin
        fd[j] = a[j] & b[j];
        si[j] = (dec[j] | ~b[j]) & a[j];
      end else if (CONST_MODE == CONST_ONE) begin
        fd[j] = a[j];
        si[j] = dec[j] | ~a[j];
      end else begin
        fd[j] = a[j];
        si[j] = dec[j] & a[j];
      end
      keep[j] = (SE_GROUP > 0) ? ~cap[j] : ~fd[j];
    end
    chk(chain_si, si);
    chk(chain_se, {N{se}} | keep);
    chk(chain_from_dec, fd);
    chk(N'(shadow_reload), N'(shift && cmd));
    chk(N'(bias_segment), N'(seg));
    @(posedge clk);
    if (shift) begin
      if (cmd) m_shadow = m_ring;
      m_ring = ring_step(m_ring, ch);
    end
    if (load) m_ctrl = {ch, m_ctrl[CW-1:C]};
    if (!se || load) m_cnt = 0;
    else if (shift && m_cnt < S * SEGL) m_cnt++;
  endtask

  initial begin
    logic [CW-1:0]     d;
    logic [LCYC*C-1:0] stream;
    done = 0; checks = 0; failures = 0;
    for (int j = 0; j < N; j++) begin
      logic [MAX_W-1:0] mk;
      mk = tap_mask(j, RL, 3, PS_SALT);
      ps_row[j] = mk[RL-1:0];
    end
    for (int j = 0; j < N * G + NG; j++) begin
      logic [MAX_W-1:0] mk;
      mk = tap_mask(j, M, 3, XN_SALT);
      xn_row[j] = mk[M-1:0];
    end
    m_ring = '0; m_shadow = '0; m_ctrl = '0; m_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      if (p < 2) begin
        for (int w = 0; w < M; w += 32) d[w +: 32] = $urandom;
        d[M] = p[0];
        for (int k = 0; k < S; k++) d[M+1+k*SELW +: SELW] = SELW'(p == 0 ? 0 : ((k + 1) % 3));
        stream = {d, {(LCYC*C-CW){1'b0}}};
        for (int c = 0; c < LCYC; c++) cycle(1'b1, 1'b1, stream[c*C +: C]);
        checks++;
        if (m_ctrl !== d) failures++;
      end
      for (int i = 0; i < L; i++) begin
        logic [C-1:0] ch;
        bit want;
        ch   = C'($urandom);
        want = (p == 0) ? 1'b1 : (($urandom % 4) == 0);
        if (HOLD_SRC == HOLD_CHANNEL) cycle(1'b0, 1'b1, ch, want);
        else begin
          if ((^ch) != want) ch[0] = ~ch[0];
          cycle(1'b0, 1'b1, ch);
        end
      end
      cycle(1'b0, 1'b0, '0);
      // connected fraction at capture, against the last segment's select
      begin
        real f, e;
        f = real'($countones(chain_from_dec)) / real'(N);
        e = 0.5 / real'(1 << cur_sel);
        if (CONST_MODE == CONST_BOTH) e = e / 2.0;
        if (SE_GROUP > 0) e = e / 2.0;
        $display("N=%0d pattern %0d: %0.3f of chains decompressor-fed (select %0d, expected about %0.3f)",
                 N, p, f, cur_sel, e);
        checks++;
        if (f < e * 0.5 || f > e * 1.5) failures++;
      end
    end
    done = 1;
  end
endmodule
