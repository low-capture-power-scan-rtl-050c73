// gating_circuit -- per-chain stimulus gating and scan-enable control.
//
// For each scan chain the gating signal a (from the biasing circuit) decides
// whether the chain is fed by the decompressor (a = 1) or by a constant for
// the whole scan load (a = 0).  The same signal controls that chain's scan
// enable: a chain loaded with a constant keeps scan enable high through the
// capture cycle, so it captures nothing and keeps its low-toggle content for
// shift-out, while a decompressor-fed chain follows the global scan_enable
// and captures normally.  Tying the two together means one solver decision
// covers both stimulus and capture for a chain.
//
//   CONST_ZERO : si = dec & a                (gated chains get 0; default)
//   CONST_ONE  : si = dec | ~a               (gated chains get 1)
//   CONST_BOTH : si = (dec | ~b) & a         (a = 0 -> 0, a = 1 & b = 0 -> 1,
//                                             a = b = 1 -> decompressor)
//   chain_se   = scan_enable | (test_mode & ~from_dec)     (SEPARATE_SE = 0)
//
// With SEPARATE_SE = 1 the stimulus and scan-enable controls are partly
// separated: cap (one signal shared by a group of chains) decides capture,
// and a chain is fed by the decompressor only when both its own gating
// signal and cap are 1.  Every chain kept in shift during capture (cap = 0)
// is then constant-loaded, while a capturing chain may still be loaded with
// a constant.  This helps when scan enable can only be controlled per group:
//   a_eff    = gate_a & cap, used in place of gate_a above
//   chain_se = scan_enable | (test_mode & ~cap)
//
// With test_mode = 0 (mission mode) the gating is transparent: si = dec and
// chain_se = scan_enable.  The source keeps test_mode at 1 for the whole test
// session.
//
// Interface: purely combinational.  In the default configuration from_dec
// is gate_a itself; it stays an output so that the top can report which
// chains are decompressor-fed in every configuration.
//
// The AND / OR gate structure, the scan-enable tie and the partly separated
// variant follow the source; the mission-mode bypass of the stimulus gates
// and the group form of cap are this design's own choice.
module gating_circuit
  import lp_edt_pkg::*;
#(
  parameter int unsigned N_CHAINS   = 164,
  parameter const_mode_e CONST_MODE = CONST_ZERO,
  parameter bit          SEPARATE_SE = 1'b0
) (
  input  logic                test_mode,
  input  logic                scan_enable,
  input  logic [N_CHAINS-1:0] dec,
  input  logic [N_CHAINS-1:0] gate_a,
  input  logic [N_CHAINS-1:0] gate_b,
  input  logic [N_CHAINS-1:0] cap,
  output logic [N_CHAINS-1:0] from_dec,
  output logic [N_CHAINS-1:0] chain_si,
  output logic [N_CHAINS-1:0] chain_se
);

  logic [N_CHAINS-1:0] gated, a_eff, keep;

  always_comb begin
    a_eff = SEPARATE_SE ? (gate_a & cap) : gate_a;
    case (CONST_MODE)
      CONST_ONE:  begin from_dec = a_eff;          gated = dec | ~a_eff;           end
      CONST_BOTH: begin from_dec = a_eff & gate_b; gated = (dec | ~gate_b) & a_eff; end
      default:    begin from_dec = a_eff;          gated = dec & a_eff;            end
    endcase
    keep     = SEPARATE_SE ? ~cap : ~from_dec;
    chain_si = test_mode ? gated : dec;
    chain_se = {N_CHAINS{scan_enable}} | ({N_CHAINS{test_mode}} & keep);
  end

endmodule
