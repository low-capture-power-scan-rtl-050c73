// tb_shadow_register -- self-checking test of the shadow register.
//
// Two instances are driven with random ring states and channel data: one
// takes its reload command from the channel parity, the other from the
// dedicated hold channel.  A model register reloads on odd parity (or on the
// hold bit) in enabled cycles only; content and reload flag are compared
// every cycle, and both reloads and holds must have occurred.
module tb_shadow_register;
  import lp_edt_pkg::*;

  logic clk = 0, rst_n = 0, shift_en = 0, hold_ch = 0;
  logic [3:0]  ch = '0;
  logic [31:0] ring = '0, sh_p, sh_c, m_p, m_c;
  logic        rl_p, rl_c;
  int checks = 0, failures = 0, n_reload = 0, n_hold = 0;

  shadow_register #(.RING_LEN(32), .N_CHANNELS(4), .HOLD_SRC(HOLD_PARITY)) dut_p (
    .clk, .rst_n, .shift_en, .ring_state(ring), .ch_in(ch), .hold_ch,
    .reload(rl_p), .shadow(sh_p));
  shadow_register #(.RING_LEN(32), .N_CHANNELS(4), .HOLD_SRC(HOLD_CHANNEL)) dut_c (
    .clk, .rst_n, .shift_en, .ring_state(ring), .ch_in(ch), .hold_ch,
    .reload(rl_c), .shadow(sh_c));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic odd;
    m_p = '0; m_c = '0;
    repeat (2) @(negedge clk);
    checks++; if (sh_p !== '0 || sh_c !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ring = $urandom; ch = 4'($urandom); hold_ch = 1'($urandom);
      shift_en = ($urandom % 6) != 0;
      odd = ch[0] ^ ch[1] ^ ch[2] ^ ch[3];
      #1;
      checks += 2;
      if (rl_p !== (shift_en & odd)) failures++;
      if (rl_c !== (shift_en & hold_ch)) failures++;
      @(posedge clk);
      if (shift_en && odd) begin m_p = ring; n_reload++; end
      else if (shift_en) n_hold++;
      if (shift_en && hold_ch) m_c = ring;
      #1;
      checks += 2;
      if (sh_p !== m_p) failures++;
      if (sh_c !== m_c) failures++;
    end
    checks++;
    if (n_reload == 0 || n_hold == 0) failures++;
    $display("reloads=%0d holds=%0d", n_reload, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
