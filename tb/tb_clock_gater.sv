// tb_clock_gater -- self-checking test of the clock-gating cell.
//
// Counts gclk pulses per clock period for random enables and checks that a
// pulse passes exactly when en | test_en was high before the rising edge.
// Enables that change while clk is high must not alter the current pulse:
// gclk must never rise except together with clk, and never fall except
// together with clk.  A cascaded pair checks the hierarchy: the leaf pulses
// only when both levels are enabled.
module tb_clock_gater;
  logic clk = 0, en = 0, ten = 0, gclk;
  logic en2 = 0, gclk2;
  int checks = 0, failures = 0, pulses = 0, pulses2 = 0, bad_edge = 0;
  int n_on = 0, n_off = 0;

  clock_gater dut  (.clk, .en, .test_en(ten), .gclk);
  clock_gater leaf (.clk(gclk), .en(en2), .test_en(1'b0), .gclk(gclk2));

  always #5 clk = ~clk;

  always @(posedge gclk)  begin pulses++;  if (!clk) bad_edge++; end
  always @(negedge gclk)  if (clk) bad_edge++;
  always @(posedge gclk2) pulses2++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic exp, exp2;
      @(negedge clk);
      en = 1'($urandom); ten = ($urandom % 4) == 0; en2 = 1'($urandom);
      exp = en | ten; exp2 = exp & en2;
      pulses = 0; pulses2 = 0;
      @(posedge clk);
      #2;
      // change the enables in the middle of the high phase
      en = ~en; ten = 0; en2 = ~en2;
      @(negedge clk);
      #0;
      checks += 2;
      if (pulses != int'(exp)) failures++;
      if (pulses2 != int'(exp2)) failures++;
      if (exp) n_on++; else n_off++;
    end
    checks += 2;
    if (bad_edge != 0) failures++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
