// tb_phase_shifter -- self-checking test of the phase shifter.
//
// Probing with one-hot states recovers the wiring of every output; each
// output must depend on exactly three state bits and no two outputs may
// share the same triple.  Random states are then checked against the XOR of
// the recovered columns (linearity) and against the wiring derived from
// lp_edt_pkg::tap_mask.
module tb_phase_shifter;
  import lp_edt_pkg::*;

  localparam int unsigned L = 32, N = 164;
  logic [L-1:0] state;
  logic [N-1:0] out;
  logic [N-1:0] col [L];
  int checks = 0, failures = 0;

  phase_shifter #(.RING_LEN(L), .N_CHAINS(N)) dut (.state, .dec_out(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp;
    logic [L-1:0] row [N];
    for (int b = 0; b < L; b++) begin
      state = '0; state[b] = 1'b1; #1;
      col[b] = out;
    end
    for (int j = 0; j < N; j++) begin
      logic [MAX_W-1:0] m;
      for (int b = 0; b < L; b++) row[j][b] = col[b][j];
      checks++;
      if ($countones(row[j]) != 3) failures++;
      m = tap_mask(j, L, 3, PS_SALT);
      checks++;
      if (row[j] !== m[L-1:0]) failures++;
      for (int k = 0; k < j; k++) begin
        checks++;
        if (row[j] == row[k]) failures++;
      end
    end
    for (int t = 0; t < 500; t++) begin
      state = $urandom; #1;
      exp = '0;
      for (int b = 0; b < L; b++) if (state[b]) exp ^= col[b];
      checks++;
      if (out !== exp) failures++;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out[j] !== ^(state & row[j])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
