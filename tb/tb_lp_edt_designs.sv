// tb_lp_edt_designs -- runs lp_edt_top at the sizes of the three larger
// evaluated designs, side by side, through lp_edt_env:
//   D2: 203 chains x 300 cells, 4 channels,  64 control variables
//   D3: 832 chains x 158 cells, 8 channels, 256 control variables (64-stage ring)
//   D4: 321 chains x 258 cells, 4 channels,  96 control variables
// and the default (D1) size twice more: with two-constant gating
// (CONST_BOTH) and with scan enable partly separated per group of 8 chains
// (SE_GROUP = 8), and with OR gating (CONST_ONE) plus a dedicated shadow
// reload channel (HOLD_CHANNEL).  The default configuration itself is covered by
// tb_lp_edt_top.
module tb_lp_edt_designs;
  import lp_edt_pkg::*;
  logic d2_done, d3_done, d4_done, v2_done, vs_done, vh_done;
  int   d2_c, d2_f, d3_c, d3_f, d4_c, d4_f, v2_c, v2_f, vs_c, vs_f, vh_c, vh_f;

  lp_edt_env #(.N(203), .L(300), .C(4), .RL(32), .M(64))  u_d2 (.done(d2_done), .checks(d2_c), .failures(d2_f));
  lp_edt_env #(.N(832), .L(158), .C(8), .RL(64), .M(256)) u_d3 (.done(d3_done), .checks(d3_c), .failures(d3_f));
  lp_edt_env #(.N(321), .L(258), .C(4), .RL(32), .M(96))  u_d4 (.done(d4_done), .checks(d4_c), .failures(d4_f));

  // Default size with the alternative gate and scan-enable options.
  lp_edt_env #(.N(164), .L(169), .C(4), .RL(32), .M(48), .CONST_MODE(CONST_BOTH))
    u_two (.done(v2_done), .checks(v2_c), .failures(v2_f));
  lp_edt_env #(.N(164), .L(169), .C(4), .RL(32), .M(48), .SE_GROUP(8))
    u_sep (.done(vs_done), .checks(vs_c), .failures(vs_f));
  lp_edt_env #(.N(164), .L(169), .C(4), .RL(32), .M(48), .CONST_MODE(CONST_ONE),
               .HOLD_SRC(HOLD_CHANNEL))
    u_hch (.done(vh_done), .checks(vh_c), .failures(vh_f));

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", d2_c + d3_c + d4_c + v2_c + vs_c + vh_c, d2_f + d3_f + d4_f + v2_f + vs_f + vh_f + 1);
    $finish;
  end

  initial begin
    wait (d2_done && d3_done && d4_done && v2_done && vs_done && vh_done);
    $display("D2 checks=%0d failures=%0d", d2_c, d2_f);
    $display("D3 checks=%0d failures=%0d", d3_c, d3_f);
    $display("D4 checks=%0d failures=%0d", d4_c, d4_f);
    $display("two constants checks=%0d failures=%0d", v2_c, v2_f);
    $display("separated scan enable checks=%0d failures=%0d", vs_c, vs_f);
    $display("constant 1, hold channel checks=%0d failures=%0d", vh_c, vh_f);
    $display("TB_RESULT checks=%0d failures=%0d", d2_c + d3_c + d4_c + v2_c + vs_c + vh_c, d2_f + d3_f + d4_f + v2_f + vs_f + vh_f);
    $finish;
  end
endmodule
