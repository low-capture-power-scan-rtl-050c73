// tb_biasing_circuit -- self-checking test of the reconfigurable biasing.
//
// Random XOR-network outputs and select values are applied in both modes.
// A model shift counter gives the segment (43 shift cycles each, the last
// segment open-ended, cleared by seg_clear); every chain's gate must equal
// the AND of the first sel+1 of its three inputs.  The fraction of chains
// left connected must come out near 50 %, 25 % and 12.5 % for the three
// select values, and every segment must have been visited.
module tb_biasing_circuit;
  localparam int unsigned N = 164, G = 3, K = 3, S = 4, SL = 43, SELW = 2;

  logic clk = 0, rst_n = 0, shift_en = 0, seg_clear = 0, per_seg = 0;
  logic [S*SELW-1:0] sel = '0;
  logic [N*G-1:0]    xo = '0;
  logic [N-1:0]      gate_a;
  logic [2:0]        segment;
  int checks = 0, failures = 0;
  int cnt = 0;
  longint ones [3] = '{0, 0, 0};
  longint tot  [3] = '{0, 0, 0};
  int seg_seen [S] = '{0, 0, 0, 0};

  biasing_circuit #(.N_CHAINS(N), .G(G), .BIAS_INPUTS(K), .SEGMENTS(S), .SEG_LEN(SL)) dut (
    .clk, .rst_n, .shift_en, .seg_clear, .per_seg, .sel, .xo, .gate_a, .segment);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int seg, s;
      logic [N-1:0] exp;
      @(negedge clk);
      for (int w = 0; w < N * G; w += 32) xo[w +: 32] = $urandom;
      if (i % 400 == 0) begin
        per_seg = 1'($urandom);
        for (int k = 0; k < S; k++) sel[k*SELW +: SELW] = 2'($urandom % 3);
      end
      seg_clear = (i % 200 == 199);
      shift_en  = ($urandom % 10) != 0;
      seg = cnt / SL; if (seg > S - 1) seg = S - 1;
      s = per_seg ? int'(sel[seg*SELW +: SELW]) : int'(sel[SELW-1:0]);
      #1;
      for (int j = 0; j < N; j++) begin
        exp[j] = xo[j*G];
        if (s >= 1) exp[j] &= xo[j*G+1];
        if (s >= 2) exp[j] &= xo[j*G+2];
      end
      checks += 2;
      if (gate_a !== exp) failures++;
      if (int'(segment) != seg) failures++;
      seg_seen[seg]++;
      ones[s] += $countones(gate_a); tot[s] += N;
      @(posedge clk);
      if (seg_clear) cnt = 0;
      else if (shift_en && cnt < S * SL) cnt++;
    end
    for (int s = 0; s < 3; s++) begin
      real f, e;
      f = real'(ones[s]) / real'(tot[s]);
      e = 0.5 / real'(1 << s);
      $display("select %0d: %0.3f of chains connected (expected %0.3f)", s, f, e);
      checks++;
      if (tot[s] == 0 || f < e * 0.9 || f > e * 1.1) failures++;
    end
    for (int k = 0; k < S; k++) begin
      checks++;
      if (seg_seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
