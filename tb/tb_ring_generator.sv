// tb_ring_generator -- self-checking test of the ring generator.
//
// An independent model (a 32-bit Galois register with feedback into stages
// 22, 2 and 1, and injectors at stages 4, 12, 20 and 28) is stepped beside
// the block with random channel data and a random shift enable; the states
// must agree every cycle.  A second instance with no injection is run from
// a single injected 1 until it returns, to check that a 16-stage ring has
// the full period 2^16-1.
module tb_ring_generator;
  import lp_edt_pkg::*;

  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [3:0]  ch = '0;
  logic [31:0] state, model;
  logic [15:0] s16;
  logic        en16 = 0, inj = 0;
  logic [15:0] first;
  int checks = 0, failures = 0;

  ring_generator #(.RING_LEN(32), .N_CHANNELS(4)) dut (
    .clk, .rst_n, .shift_en, .ch_in(ch), .state);
  ring_generator #(.RING_LEN(16), .N_CHANNELS(1)) dut16 (
    .clk, .rst_n, .shift_en(en16), .ch_in(inj), .state(s16));

  always #5 clk = ~clk;

  function automatic logic [31:0] step(logic [31:0] s, logic [3:0] c);
    logic [31:0] n;
    logic fb;
    fb = s[31];
    n = {s[30:0], fb};
    n[22] ^= fb; n[2] ^= fb; n[1] ^= fb;
    n[4] ^= c[0]; n[12] ^= c[1]; n[20] ^= c[2]; n[28] ^= c[3];
    return n;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    model = '0;
    repeat (2) @(negedge clk);
    checks++; if (state !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ch = 4'($urandom);
      shift_en = ($urandom % 8) != 0;
      @(posedge clk);
      if (shift_en) model = step(model, ch);
      #1;
      checks++;
      if (state !== model) begin
        failures++;
        if (failures < 5) $display("mismatch cycle %0d: %h vs %h", i, state, model);
      end
    end
    // Period of the 16-stage ring: inject a single 1, then step with no
    // injection until the state comes back.
    shift_en = 0;
    @(negedge clk); inj = 1; en16 = 1;
    @(negedge clk); inj = 0;
    first = s16;
    checks++; if (first != 16'h0100) failures++;
    period = 0;
    do begin
      @(posedge clk); #1; period++;
    end while (s16 != first && period < 70000);
    checks++;
    if (period != 65535) begin
      failures++;
      $display("period %0d", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
