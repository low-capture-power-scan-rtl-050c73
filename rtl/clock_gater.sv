// clock_gater -- integrated clock-gating cell of the circuit under test, as
// used for capture-power control.
//
// In mission mode the functional enable en decides whether clock pulses
// reach the downstream flip-flops.  During scan shift the gater is forced on
// by test_en (driven by scan enable) so that every scan cell shifts.  During
// capture, en comes from functional logic fed by scan cells, so test
// generation can turn gaters off with a few specified scan bits and keep
// large groups of flip-flops from toggling.  Gaters can be cascaded: a gater
// fed by another gater's output forms a clock-gating hierarchy.
//
// How it works: a latch, transparent while clk is low, samples en | test_en;
// gclk = clk & latched enable, so an enable change while clk is high cannot
// cut or create a pulse (glitch-free gating).  The latch is intended; it is
// the standard structure of such a cell.
//
// Interface: en and test_en must settle while clk is low, before its
// rising edge; gclk follows clk with the gate delay only.
//
// The source describes the function and its use in test; the latch-based
// cell is the common implementation, chosen here.
module clock_gater (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_l;

  always_latch
    if (!clk) en_l = en | test_en;

  assign gclk = clk & en_l;

endmodule
