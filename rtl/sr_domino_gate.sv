`timescale 1ps/1ps
// sr_domino_gate: single-rail domino gate of the noncritical data paths.
//
// The gate has one output rail. While pc (precharge/evaluate control) is low the output is
// precharged to 0. While pc is high the pull-down network may discharge the dynamic node: the
// output rises as soon as the input rails that are already high force the function to 1, and a
// keeper then holds it at 1 until the next precharge, even when the inputs return to spacer.
// If the function is 0 the gate never fires and the output stays 0, so a single rail carries
// the data but not its validity; validity comes from the stage's critical bit.
// Inputs are dual-rail (dr_t); a monotonic function (BUF, AND, CARRY) only looks at the true
// rails, while SUM also needs the false rails, which an encoding splitter provides.
//
// Timing: output changes T_SR picoseconds after the condition that causes them (evaluation or
// precharge). The delay is a simulation annotation; synthesis ignores it.
// The keeper is modelled as a level-sensitive latch, so synthesis reports a latch here: it is
// the dynamic node of the domino gate and is intended.
// The early-firing behaviour follows the original design's domino style; modelling the
// keeper as a latch and the delay value are this implementation's choices.
module sr_domino_gate
  import apcdp_pkg::*;
#(
  parameter gate_e       G    = G_BUF,
  parameter int unsigned T_SR = 40
) (
  input  logic     pc,
  input  dr_t [3:0] in,
  output logic     y
);

  logic node;

  // The rails already high force the output to 1.
  function automatic logic fires(dr_t [3:0] x);
    logic [1:0] r;
    r = gate_resolve(G, x);
    return r[1];
  endfunction

  always_latch begin
    if (!pc)           node = 1'b0;
    else if (fires(in)) node = 1'b1;
  end

  initial y = 1'b0;
  always @(node) y <= #(T_SR) node;

endmodule
