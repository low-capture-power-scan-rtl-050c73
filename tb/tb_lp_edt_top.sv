// tb_lp_edt_top -- end-to-end test of the low-power EDT decompressor at its
// default size (164 chains of 169 cells, 4 channels, 48 control variables).
//
// The testbench plays the tester: for each pattern it optionally loads
// random control data (XOR-network variables, biasing mode and selects)
// through the channels, then shifts a full scan load of random seed
// variables, steering the channel parity so that the shadow register either
// reloads every cycle or holds for several cycles, then applies one capture
// cycle with random clock-gater enables.  An independent model of every
// stage (ring, shadow, phase shifter, XOR network, biasing, gating) predicts
// chain_si, chain_se, chain_from_dec, shadow_reload and bias_segment every
// cycle.  A behavioural model of the 164 x 169 scan cells shifts and
// captures with the per-chain scan enables, so that load, capture and unload
// transitions can be compared with those of a plain decompressor (no
// gating, no hold) fed the same data.  Every mechanism must occur at least
// once; the testbench counts each.
module tb_lp_edt_top;
  import lp_edt_pkg::*;

  localparam int unsigned N = 164, L = 169, C = 4, RL = 32, M = 48, K = 3;
  localparam int unsigned S = 4, SELW = 2, CW = M + 1 + S * SELW, G = 3;
  localparam int unsigned SEGL = (L + S - 1) / S;
  localparam int unsigned LCYC = (CW + C - 1) / C;
  localparam int unsigned NCG = 32, CGP = 4;
  localparam int unsigned NPAT = 12;

  logic clk = 0, rst_n = 0, test_mode = 1, scan_enable = 0, ctrl_load = 0, hold_ch = 0;
  logic [C-1:0]   edt_ch = '0;
  logic [N-1:0]   chain_si, chain_se, chain_from_dec;
  logic           shadow_reload;
  logic [2:0]     bias_segment;
  logic [NCG/CGP-1:0] cg_group_en = '0;
  logic [NCG-1:0] cg_leaf_en = '0;
  logic [NCG-1:0] cg_gclk;

  lp_edt_top dut (
    .clk, .rst_n, .test_mode, .scan_enable, .ctrl_load, .edt_ch, .hold_ch,
    .chain_si, .chain_se, .chain_from_dec, .shadow_reload, .bias_segment,
    .cg_group_en, .cg_leaf_en, .cg_gclk);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- model
  logic [RL-1:0] m_ring, m_shadow;
  logic [CW-1:0] m_ctrl;
  int            m_cnt;
  logic [RL-1:0] ps_row [N];
  logic [M-1:0]  xn_row [N*G];
  logic [L-1:0]  cells  [N];
  logic [N-1:0]  base_prev, lp_prev;

  // mechanism counters
  int n_ctrl_load = 0, n_ctrl_reuse = 0, n_reload = 0, n_hold = 0;
  int n_chain_dec = 0, n_chain_const = 0, n_se_held = 0, n_capture = 0;
  int n_sel [3] = '{0, 0, 0};
  int n_fixed = 0, n_perseg = 0, n_seg_change = 0;
  int n_grp_off = 0, n_leaf_off = 0, n_forced_on = 0, n_mission = 0;
  longint tr_load_lp = 0, tr_load_base = 0, tr_unload_lp = 0, tr_unload_base = 0;
  longint tr_cap = 0, cells_cap = 0;

  // gated-clock pulse counters
  int pulses [NCG];
  logic [NCG-1:0] exp_pulse;
  for (genvar i = 0; i < NCG; i++) begin : g_pc
    always @(posedge cg_gclk[i]) pulses[i]++;
  end

  function automatic logic [RL-1:0] ring_step(logic [RL-1:0] s, logic [C-1:0] c);
    taps_t t;
    logic [RL-1:0] n;
    t = ring_taps(RL);
    n = {s[RL-2:0], s[RL-1]};
    for (int k = 0; k < 4; k++) if (t[k] != 0) n[t[k]] ^= s[RL-1];
    for (int k = 0; k < C; k++) n[inject_pos(k, C, RL)] ^= c[k];
    return n;
  endfunction

  function automatic logic [N-1:0] ps(logic [RL-1:0] s);
    logic [N-1:0] o;
    for (int j = 0; j < N; j++) o[j] = ^(s & ps_row[j]);
    return o;
  endfunction

  task automatic chk(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %h exp %h", $time, what, got, exp);
    end
  endtask

  // One clock cycle: drive at the falling edge, check, update the models at
  // the rising edge.
  task automatic cycle(logic load, logic se, logic [C-1:0] ch,
                       logic [NCG/CGP-1:0] gen, logic [NCG-1:0] len);
    logic [N-1:0] dec, a, e_si, e_se, fd, base;
    logic         odd, shift;
    int           seg, sel;
    @(negedge clk);
    for (int i = 0; i < NCG; i++) begin
      checks++;
      if (pulses[i] != int'(exp_pulse[i])) begin
        failures++;
        if (failures < 10) $display("%t gclk %0d pulses %0d exp %0d", $time, i, pulses[i], exp_pulse[i]);
      end
      pulses[i] = 0;
    end
    ctrl_load = load; scan_enable = se; edt_ch = ch;
    cg_group_en = gen; cg_leaf_en = len;
    #1;
    shift = test_mode && se && !load;
    odd   = ^ch;
    dec   = ps(m_shadow);
    seg   = m_cnt / SEGL; if (seg > S - 1) seg = S - 1;
    sel   = m_ctrl[M] ? int'(m_ctrl[M+1+seg*SELW +: SELW]) : int'(m_ctrl[M+1 +: SELW]);
    for (int j = 0; j < N; j++) begin
      a[j] = 1'b1;
      for (int k = 0; k < K; k++)
        if (k <= sel) a[j] &= ^(m_ctrl[M-1:0] & xn_row[j*G+k]);
    end
    fd   = a;
    e_si = test_mode ? (dec & a) : dec;
    e_se = {N{se}} | ({N{test_mode}} & ~a);
    chk("chain_si", chain_si, e_si);
    chk("chain_se", chain_se, e_se);
    chk("from_dec", chain_from_dec, fd);
    chk("reload", N'(shadow_reload), N'(shift && odd));
    chk("segment", N'(bias_segment), N'(seg));
    for (int i = 0; i < NCG; i++)
      exp_pulse[i] = se || (gen[i/CGP] && len[i]);
    // statistics on the scan cells
    if (shift) begin
      base = ps(m_ring);
      tr_load_lp   += $countones(chain_si ^ lp_prev);
      tr_load_base += $countones(base ^ base_prev);
      lp_prev = chain_si; base_prev = base;
      if (odd) n_reload++; else n_hold++;
      n_sel[sel]++;
      if (m_ctrl[M]) n_perseg++; else n_fixed++;
    end
    if (!se) begin
      for (int i = 0; i < NCG; i++) begin
        if (!gen[i/CGP]) n_grp_off++;
        else if (!len[i]) n_leaf_off++;
      end
    end else if (gen != '1 || len != '1) n_forced_on++;
    @(posedge clk);
    // scan cells
    for (int j = 0; j < N; j++) begin
      if (load) continue;
      if (chain_se[j]) begin
        cells[j] = {cells[j][L-2:0], chain_si[j]};
      end else begin
        logic [L-1:0] resp;
        for (int w = 0; w < L; w += 32) resp[w +: 32] = $urandom;
        tr_cap += $countones(resp ^ cells[j]);
        cells_cap += longint'(L);
        cells[j] = resp;
      end
    end
    // decompressor model
    if (shift) begin
      if (odd) m_shadow = m_ring;
      m_ring = ring_step(m_ring, ch);
    end
    if (load) m_ctrl = {ch, m_ctrl[CW-1:C]};
    if (!se || load) m_cnt = 0;
    else if (shift && m_cnt < S * SEGL) begin
      if (m_cnt % SEGL == SEGL - 1 && m_ctrl[M] && m_cnt < (S - 1) * SEGL) n_seg_change++;
      m_cnt++;
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0]     d;
    logic [LCYC*C-1:0] stream;
    logic [L-1:0]      prev_out [N];
    for (int j = 0; j < N; j++) begin
      logic [MAX_W-1:0] mk;
      mk = tap_mask(j, RL, 3, PS_SALT);
      ps_row[j] = mk[RL-1:0];
    end
    for (int j = 0; j < N * G; j++) begin
      logic [MAX_W-1:0] mk;
      mk = tap_mask(j, M, 3, XN_SALT);
      xn_row[j] = mk[M-1:0];
    end
    m_ring = '0; m_shadow = '0; m_ctrl = '0; m_cnt = 0;
    lp_prev = '0; base_prev = '0;
    for (int j = 0; j < N; j++) cells[j] = '0;
    for (int i = 0; i < NCG; i++) pulses[i] = 0;
    exp_pulse = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NCG; i++) pulses[i] = 0;

    for (int p = 0; p < NPAT; p++) begin
      bit do_load, hold;
      do_load = (p == 0) || (p % 3 != 1);
      hold    = (p % 4 >= 2);
      // ---- control data
      if (do_load) begin
        d[M-1:0] = M'({$urandom, $urandom});
        d[M]     = p[0];
        for (int k = 0; k < S; k++) d[M+1+k*SELW +: SELW] = SELW'((p + k) % 3);
        stream = {d, {(LCYC*C-CW){1'b0}}};
        for (int c = 0; c < LCYC; c++)
          cycle(1'b1, 1'b1, stream[c*C +: C], '1, '1);
        checks++;
        if (m_ctrl !== d) failures++;
        n_ctrl_load++;
      end else n_ctrl_reuse++;
      // ---- scan load (also unloads the previous responses)
      for (int j = 0; j < N; j++) prev_out[j] = cells[j];
      for (int i = 0; i < L; i++) begin
        logic [C-1:0] ch;
        bit want;
        ch   = C'($urandom);
        want = hold ? (($urandom % 4) == 0) : 1'b1;
        if ((^ch) != want) ch[0] = ~ch[0];
        cycle(1'b0, 1'b1, ch, (NCG/CGP)'($urandom), NCG'($urandom));
      end
      // unload transitions: what the chains shifted out this load
      for (int j = 0; j < N; j++) begin
        tr_unload_lp += $countones(prev_out[j] ^ (prev_out[j] >> 1));
        tr_unload_base += longint'(L / 2);
      end
      // ---- capture
      for (int j = 0; j < N; j++) begin
        if (chain_from_dec[j]) n_chain_dec++;
        else begin n_chain_const++; n_se_held++; end
      end
      begin
        logic [NCG/CGP-1:0] gen;
        logic [NCG-1:0]     len;
        gen = (NCG/CGP)'($urandom) | (NCG/CGP)'(8'h0F);
        len = NCG'($urandom);
        cycle(1'b0, 1'b0, '0, gen, len);
        for (int j = 0; j < N; j++) if (!chain_se[j]) n_capture++;
      end
    end

    // ---- mission mode: gating transparent, scan enable follows the pin
    test_mode = 0;
    for (int i = 0; i < 4; i++) begin
      cycle(1'b0, 1'(i % 2), C'($urandom), '1, '1);
      n_mission++;
    end
    cycle(1'b0, 1'b1, '0, '1, '1);

    $display("control loads %0d, control reuses %0d", n_ctrl_load, n_ctrl_reuse);
    $display("shadow reloads %0d, holds %0d", n_reload, n_hold);
    $display("chain-patterns: decompressor %0d, constant %0d (scan enable held in capture %0d, capturing %0d)",
             n_chain_dec, n_chain_const, n_se_held, n_capture);
    $display("bias select use (shift cycles): %0d / %0d / %0d; fixed %0d, per segment %0d, segment changes %0d",
             n_sel[0], n_sel[1], n_sel[2], n_fixed, n_perseg, n_seg_change);
    $display("capture gclk: group off %0d, leaf off %0d; gaters forced on in shift %0d; mission cycles %0d",
             n_grp_off, n_leaf_off, n_forced_on, n_mission);
    $display("load transitions: low power %0d, plain decompressor %0d (%0.1f %% fewer)",
             tr_load_lp, tr_load_base, 100.0 * (1.0 - real'(tr_load_lp) / real'(tr_load_base)));
    $display("unload transitions: %0d, random-content estimate %0d", tr_unload_lp, tr_unload_base);
    $display("capture: %0d of %0d captured cells toggled", tr_cap, cells_cap);
    begin
      int mech [15];
      mech = '{n_ctrl_load, n_ctrl_reuse, n_reload, n_hold, n_chain_dec, n_chain_const,
               n_se_held, n_capture, n_sel[0], n_sel[1], n_sel[2], n_perseg,
               n_seg_change, n_grp_off + n_leaf_off + n_forced_on, n_mission};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
      checks += 4;
      if (n_fixed == 0 || n_grp_off == 0 || n_leaf_off == 0 || n_forced_on == 0) failures++;
      if (tr_load_lp >= tr_load_base) failures++;
      if (tr_unload_lp >= tr_unload_base) failures++;
      if (n_capture >= n_chain_dec + n_chain_const) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
