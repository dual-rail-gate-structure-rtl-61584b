`timescale 1ps/1ps
// encoding_splitter: converts one single-rail domino output into a dual-rail pair.
//
// A single-rail bit that stays 0 cannot be told from a bit that has not evaluated yet, so a
// dual-rail gate downstream cannot use it directly. The splitter waits for the valid signal of
// its stage's critical bit (ref_valid = crit.t | crit.f): because the critical bit is the last
// bit of the stage to evaluate, every single-rail bit is final at that point. The splitter then
// raises t if x is 1 or f if x is 0. It is itself a domino element precharged by the stage's pc,
// so it returns to spacer together with its stage and never glitches.
//
// Interface: pc of the stage that drives x, x single-rail, ref_valid, y dual-rail.
// Timing: y changes T_SPL picoseconds after its cause (simulation annotation only). The keeper
// is a latch; synthesis reports it and it is intended.
// The splitter's purpose comes from the original design; using the critical bit as its timing reference is
// this implementation's choice.
module encoding_splitter
  import apcdp_pkg::*;
#(
  parameter int unsigned T_SPL = 30
) (
  input  logic pc,
  input  logic x,
  input  logic ref_valid,
  output dr_t  y
);

  dr_t node;

  always_latch begin
    if (!pc) node = DR_SPACER;
    else if (ref_valid) begin
      if (x) node.t = 1'b1;
      else   node.f = 1'b1;
    end
  end

  initial y = DR_SPACER;
  always @(node) y <= #(T_SPL) node;

endmodule
