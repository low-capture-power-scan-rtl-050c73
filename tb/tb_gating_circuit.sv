// tb_gating_circuit -- exhaustive test of the stimulus and scan-enable gates.
//
// Four instances (constant 0, constant 1, both constants, and constant 0
// with partly separated scan enable) see every combination of test_mode,
// scan_enable, decompressor bit, the two gating signals and the capture
// control, one combination per chain.  Expected values follow the truth
// tables: in test mode a chain not fed by the decompressor gets its constant
// and keeps scan enable high; otherwise scan enable follows the global pin.
// With random inputs the two-constant instance must give close to 50 % 0,
// 25 % 1 and 25 % decompressor-fed chains.
module tb_gating_circuit;
  import lp_edt_pkg::*;
  localparam int unsigned N = 32;

  logic tm, se;
  logic [N-1:0] dec, a, b, cap;
  logic [N-1:0] fd0, si0, se0, fd1, si1, se1, fd2, si2, se2, fd3, si3, se3;
  int checks = 0, failures = 0;

  gating_circuit #(.N_CHAINS(N), .CONST_MODE(CONST_ZERO)) u0 (
    .test_mode(tm), .scan_enable(se), .dec, .gate_a(a), .gate_b(b), .cap,
    .from_dec(fd0), .chain_si(si0), .chain_se(se0));
  gating_circuit #(.N_CHAINS(N), .CONST_MODE(CONST_ONE)) u1 (
    .test_mode(tm), .scan_enable(se), .dec, .gate_a(a), .gate_b(b), .cap,
    .from_dec(fd1), .chain_si(si1), .chain_se(se1));
  gating_circuit #(.N_CHAINS(N), .CONST_MODE(CONST_BOTH)) u2 (
    .test_mode(tm), .scan_enable(se), .dec, .gate_a(a), .gate_b(b), .cap,
    .from_dec(fd2), .chain_si(si2), .chain_se(se2));

  gating_circuit #(.N_CHAINS(N), .CONST_MODE(CONST_ZERO), .SEPARATE_SE(1'b1)) u3 (
    .test_mode(tm), .scan_enable(se), .dec, .gate_a(a), .gate_b(b), .cap,
    .from_dec(fd3), .chain_si(si3), .chain_se(se3));

  task automatic chk(logic got, logic exp);
    checks++;
    if (got !== exp) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, n1, nd;
    // All 32 combinations of {tm, se, dec, a, b} on 32 chains at once.
    for (int j = 0; j < N; j++) begin
      dec[j] = j[0]; a[j] = j[1]; b[j] = j[2];
    end
    for (int t = 0; t < 8; t++) begin
      tm = t[0]; se = t[1]; cap = t[2] ? '1 : '0;
      if (t >= 4) for (int j = 0; j < N; j++) cap[j] = j[3];
      #1;
      for (int j = 0; j < N; j++) begin
        logic d, ga, gb, e0, e1, e2, f2;
        d = dec[j]; ga = a[j]; gb = b[j];
        // expected, from the gate descriptions
        e0 = tm ? (ga ? d : 1'b0) : d;
        e1 = tm ? (ga ? d : 1'b1) : d;
        f2 = ga && gb;
        e2 = tm ? (!ga ? 1'b0 : (!gb ? 1'b1 : d)) : d;
        chk(si0[j], e0); chk(si1[j], e1); chk(si2[j], e2);
        chk(fd0[j], ga); chk(fd1[j], ga); chk(fd2[j], f2);
        chk(se0[j], se || (tm && !ga));
        chk(se1[j], se || (tm && !ga));
        chk(se2[j], se || (tm && !f2));
        // partly separated controls: decompressor only when ga and cap;
        // scan enable held exactly for cap = 0, and then the chain is constant
        chk(fd3[j], ga && cap[j]);
        chk(si3[j], tm ? (ga && cap[j] ? d : 1'b0) : d);
        chk(se3[j], se || (tm && !cap[j]));
        if (tm && !se && se3[j]) chk(fd3[j], 1'b0);
      end
    end
    // Distribution of the two-constant gating with random gating signals.
    tm = 1; se = 1; n0 = 0; n1 = 0; nd = 0;
    for (int t = 0; t < 2000; t++) begin
      a = $urandom; b = $urandom; dec = $urandom;
      #1;
      for (int j = 0; j < N; j++)
        if (fd2[j]) nd++;
        else if (si2[j]) n1++;
        else n0++;
    end
    $display("two constants: %0d zero, %0d one, %0d decompressor", n0, n1, nd);
    checks += 3;
    if (n0 < 2000 * N * 45 / 100 || n0 > 2000 * N * 55 / 100) failures++;
    if (n1 < 2000 * N * 20 / 100 || n1 > 2000 * N * 30 / 100) failures++;
    if (nd < 2000 * N * 20 / 100 || nd > 2000 * N * 30 / 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
