// tb_control_register -- self-checking test of the control register.
//
// A random 57-bit word D is sent as a 60-bit stream {D, 3'b0}, four bits per
// load cycle with channel 0 as the low bit; afterwards the register must
// hold exactly D.  With load low the content must not move, whatever the
// channels carry.
module tb_control_register;
  localparam int unsigned C = 4, W = 57, CYC = (W + C - 1) / C;

  logic clk = 0, rst_n = 0, load = 0;
  logic [C-1:0] ch = '0;
  logic [W-1:0] ctrl, d;
  logic [CYC*C-1:0] stream;
  int checks = 0, failures = 0;

  control_register #(.N_CHANNELS(C), .W(W)) dut (.clk, .rst_n, .load, .ch_in(ch), .ctrl);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (ctrl !== '0) failures++;
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      d = {$urandom, $urandom};
      stream = {d, {(CYC*C-W){1'b0}}};
      for (int c = 0; c < CYC; c++) begin
        @(negedge clk);
        load = 1; ch = stream[c*C +: C];
      end
      @(negedge clk);
      load = 0; ch = 4'($urandom);
      checks++;
      if (ctrl !== d) begin
        failures++;
        $display("pattern %0d: %h vs %h", p, ctrl, d);
      end
      repeat (5) begin
        @(negedge clk); ch = 4'($urandom);
      end
      checks++;
      if (ctrl !== d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
