`timescale 1ps/1ps
// slg_gate: dual-rail domino gate of the constructed critical data path.
//
// An ordinary dual-rail domino gate may fire early (an AND with one input at 0 is decided
// before the other input arrives), so its delay depends on the data. This gate only starts to
// evaluate once every input pair and the link input are valid, so its evaluation always comes
// last and at a fixed delay. The link input is the critical bit of the previous stage: chaining
// the SLGs of all stages this way makes the SLG the last gate of its stage to evaluate, which is
// what lets one NOR gate on its output stand for the completion of the whole stage.
// pc low precharges both rails to 0 (spacer); pc high lets exactly one rail rise, and a keeper
// holds it until the next precharge.
//
// Interface: in[3:0] dual-rail operands, link dual-rail, y dual-rail result.
// Timing: y changes T_SLG picoseconds after the cause (simulation annotation only). The keeper
// is a latch and is reported as one by synthesis; that is intended.
// The wait-for-all-inputs property and the linking follow the original design; the transistor network is
// not given there, so only the logic function is modelled.
module slg_gate
  import apcdp_pkg::*;
#(
  parameter gate_e       G     = G_SUM,
  parameter int unsigned T_SLG = 50
) (
  input  logic      pc,
  input  dr_t [3:0] in,
  input  dr_t       link,
  output dr_t       y
);

  dr_t node;

  // All operand pairs and the link valid.
  function automatic logic complete(dr_t [3:0] x, dr_t l);
    logic ok;
    ok = l.t | l.f;
    for (int j = 0; j < 4; j++) ok = ok & (x[j].t | x[j].f);
    return ok;
  endfunction

  // Function value from the true rails of complete inputs.
  function automatic logic value(dr_t [3:0] x);
    logic [3:0] v;
    for (int j = 0; j < 4; j++) v[j] = x[j].t;
    return gate_fn(G, v);
  endfunction

  always_latch begin
    if (!pc) node = DR_SPACER;
    else if (complete(in, link)) begin
      if (value(in)) node.t = 1'b1;
      else           node.f = 1'b1;
    end
  end

  initial y = DR_SPACER;
  always @(node) y <= #(T_SLG) node;

endmodule
