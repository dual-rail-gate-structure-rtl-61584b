`timescale 1ps/1ps
// apcdp_multiplier: N x N unsigned array multiplier built as an asynchronous, latch-free domino
// pipeline whose completion is detected on one constructed critical data path.
//
// 2N gate-level stages (apcdp_stage) are chained: stage 0 forms the first partial-product row,
// stages 1..N-1 are the carry-save rows of the array, stages N..2N-1 the bits of the final
// ripple-carry adder. In every stage one bit is computed by a dual-rail SLG linked to the SLG of
// the stage before, forming the critical data path; all other bits are single-rail. Each
// stage's NOR completion detector drives the precharge/evaluate port of the previous stage,
// so there are no latches, registers or clock.
//
// Input side (four-phase dual-rail, return to zero): the source presents a and b in dual-rail
// together with a dual-rail request in_req (any valid value), waits for in_ack to fall (stage 0
// has evaluated), returns all of them to spacer, and waits for in_ack to rise before the next
// operand pair. The source must reach spacer before stage 0 is told to evaluate again.
// Output side: out_req (the data request) becomes valid when the product out_p is valid. The
// sink answers with out_ack: 1 lets the last stage evaluate, 0 makes it precharge (the sink
// behaves like one more stage whose done signal is out_ack).
// rst forces every stage to precharge; it is this implementation's addition for start-up.
// Throughput follows the PS0 cycle of three evaluations, two completion detections and one
// precharge; latency is about 2N stage delays.
// Synthesis reports latches (the domino keepers) and logic loops: each loop is the handshake
// ring gate -> NOR -> previous stage's precharge port -> gate, which is how a clockless pipeline
// works, so they stand. Stage partition, interfaces, reset and delays are this
// implementation's choices; the stage structure and the handshake follow the original design.
module apcdp_multiplier
  import apcdp_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned T_SR  = 40,
  parameter int unsigned T_SLG = 50,
  parameter int unsigned T_SPL = 30,
  parameter int unsigned T_NOR = 20,
  parameter int unsigned T_BUF = 15,
  parameter int unsigned N_BUF = 2
) (
  input  logic            rst,
  input  dr_t  [N-1:0]    in_a,
  input  dr_t  [N-1:0]    in_b,
  input  dr_t             in_req,
  output logic            in_ack,
  output logic [2*N-1:0]  out_p,
  output dr_t             out_req,
  input  logic            out_ack
);

  localparam int unsigned W = 6 * N + 1;
  localparam int unsigned S = 2 * N;

  dr_t [W-1:0] in_word;

  // Stage 0 input word: operands in dual-rail, every other position a constant 0.
  always_comb begin
    for (int i = 0; i < int'(W); i++) in_word[i] = DR_ZERO;
    for (int j = 0; j < int'(N); j++) begin
      in_word[pos_a(int'(N), j)] = in_a[j];
      in_word[pos_b(int'(N), j)] = in_b[j];
    end
  end

  // Each stage keeps its own output nets; neighbours are reached by name, so every net has a
  // single driver and no array is shared along the ring of handshakes.
  for (genvar k = 0; k < int'(S); k++) begin : g_stage
    dr_t  [W-1:0] dr_i;    // word into this stage
    dr_t          link_i;  // critical bit of the previous stage
    logic         pc;      // precharge/evaluate control
    dr_t  [W-1:0] dr_o;
    logic [W-1:0] sr_o;
    dr_t          crit_o;
    logic         done_o;

    if (k == 0) begin : g_first
      assign dr_i   = in_word;
      assign link_i = in_req;
    end else begin : g_next
      assign dr_i   = g_stage[k-1].dr_o;
      assign link_i = g_stage[k-1].crit_o;
    end
    if (k == int'(S) - 1) begin : g_last
      assign pc = out_ack & ~rst;
    end else begin : g_mid
      assign pc = g_stage[k+1].done_o & ~rst;
    end

    apcdp_stage #(
      .N(N), .K(k), .T_SR(T_SR), .T_SLG(T_SLG), .T_SPL(T_SPL),
      .T_NOR(T_NOR), .T_BUF(T_BUF), .N_BUF(N_BUF)
    ) u_stage (
      .pc      (pc),
      .in_dr   (dr_i),
      .in_link (link_i),
      .out_sr  (sr_o),
      .out_crit(crit_o),
      .out_dr  (dr_o),
      .done    (done_o)
    );
  end

  assign in_ack  = g_stage[0].done_o;
  assign out_req = g_stage[S-1].crit_o;
  assign out_p   = g_stage[S-1].sr_o[4*N +: 2*N];

endmodule
