`timescale 1ps/1ps
// apcdp_stage: one latch-free domino pipeline stage with a constructed critical data path.
//
// The stage computes word bits of stage K of the N x N array multiplier (see apcdp_pkg).
// One bit, the critical bit, is computed by an SLG (slg_gate): dual-rail, evaluating only when
// all its inputs and the link from the previous stage's critical bit are valid, so it is the
// last bit of the stage to evaluate. Every other live bit is a single-rail domino gate
// (sr_domino_gate); bits with no gate stay 0. Bits that the next stage reads in dual-rail form
// (inputs of its SLG or of a SUM gate) pass through an encoding splitter, which uses the
// critical bit as its valid reference; the rest go on as single rail with a tied-low false rail.
// A completion detector (one NOR gate and a drive buffer chain) on the critical bit produces
// the stage's done signal for the previous stage.
//
// Handshake (four-phase, PS0 style): pc is the done signal of the next stage. pc=1 evaluate,
// pc=0 precharge. done=0 tells the previous stage this stage has evaluated (it may precharge),
// done=1 that this stage has precharged (the previous stage may evaluate its next token).
// Timing: data flows with T_SPL (splitter of the previous stage) + T_SLG per stage; the done
// signal follows the critical bit by T_NOR + N_BUF*T_BUF. The stage is correct if no other bit
// of the stage is slower than the critical bit by more than that detector delay (the rule the
// text states), and, because the splitters sample when the critical bit is valid, if bits that
// feed a splitter are not slower than it at all (this implementation's rule). Both hold here
// because T_SR <= T_SLG.
// The stage organisation follows the original design; the multiplier partition and the delays are this
// implementation's choice.
module apcdp_stage
  import apcdp_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned K     = 1,
  parameter int unsigned T_SR  = 40,
  parameter int unsigned T_SLG = 50,
  parameter int unsigned T_SPL = 30,
  parameter int unsigned T_NOR = 20,
  parameter int unsigned T_BUF = 15,
  parameter int unsigned N_BUF = 2,
  localparam int unsigned W    = 6 * N + 1
) (
  input  logic          pc,       // from the next stage's done: 1 evaluate, 0 precharge
  input  dr_t  [W-1:0]  in_dr,    // word from the previous stage
  input  dr_t           in_link,  // previous stage's critical bit
  output logic [W-1:0]  out_sr,   // single-rail view of this stage's word
  output dr_t           out_crit, // this stage's critical bit (link to the next SLG)
  output dr_t  [W-1:0]  out_dr,   // word for the next stage, split where it needs dual rail
  output logic          done      // total done signal for the previous stage
);

  localparam int CRIT = crit_pos(int'(N), int'(K));

  // Input word with one extra position, W, that holds a constant valid 0; gate inputs that
  // point past the word read it.
  dr_t [W:0] ext;
  assign ext = {DR_ZERO, in_dr};

  function automatic int clip(logic [15:0] p);
    return (int'(p) >= int'(W)) ? int'(W) : int'(p);
  endfunction

  logic crit_valid;
  assign crit_valid = out_crit.t | out_crit.f;

  for (genvar i = 0; i < int'(W); i++) begin : g_bit
    localparam gate_spec_t S = gate_spec(int'(N), int'(K), i);
    if (i == CRIT) begin : g_slg
      dr_t [3:0] gin;
      assign gin = {ext[clip(S.i3)], ext[clip(S.i2)], ext[clip(S.i1)], ext[clip(S.i0)]};
      slg_gate #(.G(S.g), .T_SLG(T_SLG)) u_slg (
        .pc(pc), .in(gin), .link(in_link), .y(out_crit)
      );
      assign out_sr[i] = out_crit.t;
      assign out_dr[i] = out_crit;
    end else begin : g_sr
      if (S.g == G_NONE) begin : g_none
        assign out_sr[i] = 1'b0;
      end else begin : g_gate
        dr_t [3:0] gin;
        assign gin = {ext[clip(S.i3)], ext[clip(S.i2)], ext[clip(S.i1)], ext[clip(S.i0)]};
        sr_domino_gate #(.G(S.g), .T_SR(T_SR)) u_gate (.pc(pc), .in(gin), .y(out_sr[i]));
      end
      if (needs_split(int'(N), int'(K), i)) begin : g_split
        encoding_splitter #(.T_SPL(T_SPL)) u_split (
          .pc(pc), .x(out_sr[i]), .ref_valid(crit_valid), .y(out_dr[i])
        );
      end else begin : g_single
        assign out_dr[i] = '{t: out_sr[i], f: 1'b0};
      end
    end
  end

  logic nor_out;  // NOR output before the drive buffers; kept for observation

  completion_detector #(.T_NOR(T_NOR), .T_BUF(T_BUF), .N_BUF(N_BUF)) u_cd (
    .crit(out_crit), .nor_out(nor_out), .done(done)
  );

endmodule
