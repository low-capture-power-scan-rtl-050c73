// tb_xor_network -- self-checking test of the control block's XOR network.
//
// Checks the wiring recovered by one-hot probing (three control bits per
// output, matching lp_edt_pkg::tap_mask, no two outputs alike) and random control words against
// the recovered columns.  It then plays the test generator: for random sets
// of target outputs with random required values it solves the linear
// equations by Gaussian elimination over GF(2), loads the solution and
// checks that every target output takes its required value.  It also checks
// that an unconstrained output is 1 for roughly half of random control
// words.
module tb_xor_network;
  import lp_edt_pkg::*;

  localparam int unsigned M = 48, N = 164, G = 3, NO = N * G;
  logic [M-1:0]  ctrl;
  logic [NO-1:0] gate;
  logic [NO-1:0] col [M];
  logic [M-1:0]  row [NO];
  int checks = 0, failures = 0, encoded = 0, attempted = 0;

  xor_network #(.CTRL_BITS(M), .N_CHAINS(N), .G(G)) dut (.ctrl, .gate);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Solve row[t[i]] . x = v[i]; returns 0 when inconsistent.
  function automatic bit gf2_solve(int t[], logic v[], output logic [M-1:0] x);
    logic [M-1:0] a [];
    logic         b [];
    int           piv [];
    int           r;
    a = new[t.size()]; b = new[t.size()]; piv = new[t.size()];
    for (int i = 0; i < t.size(); i++) begin a[i] = row[t[i]]; b[i] = v[i]; end
    r = 0;
    for (int c = 0; c < M && r < t.size(); c++) begin
      int p;
      p = -1;
      for (int i = r; i < t.size(); i++) if (a[i][c]) begin p = i; break; end
      if (p < 0) continue;
      begin
        logic [M-1:0] ta; logic tb;
        ta = a[p]; a[p] = a[r]; a[r] = ta;
        tb = b[p]; b[p] = b[r]; b[r] = tb;
      end
      for (int i = 0; i < t.size(); i++)
        if (i != r && a[i][c]) begin a[i] ^= a[r]; b[i] ^= b[r]; end
      piv[r] = c;
      r++;
    end
    for (int i = r; i < t.size(); i++) if (b[i]) return 0;
    x = '0;
    for (int i = 0; i < r; i++) x[piv[i]] = b[i];
    return 1;
  endfunction

  initial begin
    int ones;
    for (int b = 0; b < M; b++) begin
      ctrl = '0; ctrl[b] = 1'b1; #1;
      col[b] = gate;
    end
    for (int j = 0; j < NO; j++) begin
      logic [MAX_W-1:0] m;
      for (int b = 0; b < M; b++) row[j][b] = col[b][j];
      m = tap_mask(j, M, 3, XN_SALT);
      checks++;
      if ($countones(row[j]) != 3 || row[j] !== m[M-1:0]) failures++;
      for (int k = 0; k < j; k++) begin
        checks++;
        if (row[j] == row[k]) failures++;
      end
    end
    ones = 0;
    for (int t = 0; t < 300; t++) begin
      logic [NO-1:0] exp;
      ctrl = {$urandom, $urandom}; #1;
      exp = '0;
      for (int b = 0; b < M; b++) if (ctrl[b]) exp ^= col[b];
      checks++;
      if (gate !== exp) failures++;
      ones += $countones(gate);
    end
    checks++;
    if (ones < 300 * NO * 45 / 100 || ones > 300 * NO * 55 / 100) failures++;
    // Encoding: 30 random targets per trial (well under the 48 variables).
    for (int trial = 0; trial < 200; trial++) begin
      int   t [] = new[30];
      logic v [] = new[30];
      logic [M-1:0] x;
      for (int i = 0; i < 30; i++) begin
        t[i] = $urandom % NO; v[i] = 1'($urandom);
        for (int k = 0; k < i; k++) if (t[k] == t[i]) v[i] = v[k];
      end
      attempted++;
      if (gf2_solve(t, v, x)) begin
        encoded++;
        ctrl = x; #1;
        for (int i = 0; i < 30; i++) begin
          checks++;
          if (gate[t[i]] !== v[i]) failures++;
        end
      end
    end
    $display("encoded %0d of %0d random sets of 30 gating values", encoded, attempted);
    checks++;
    if (encoded < attempted / 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
