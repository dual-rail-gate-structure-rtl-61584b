`timescale 1ps/1ps
// completion_detector: one-bit completion detector of a pipeline stage.
//
// A static NOR gate watches the two rails of the stage's critical bit: its output is 1 while
// the bit is spacer (stage precharged) and 0 once the bit is valid (stage evaluated). A chain of
// N_BUF non-inverting drive buffers carries this total done signal to the precharge/evaluate
// port of the previous stage, where 1 means evaluate and 0 means precharge. However wide the
// data path is, this is the whole detector.
//
// Interface: crit dual-rail in, nor_out (the NOR output), done (after the buffer chain).
// Timing: nor_out follows crit after T_NOR, done follows nor_out after N_BUF * T_BUF
// picoseconds (simulation annotations only).
// The NOR detector and the drive buffers come from the original design; the number of buffers and the
// delays are this implementation's choice.
module completion_detector
  import apcdp_pkg::*;
#(
  parameter int unsigned T_NOR = 20,
  parameter int unsigned T_BUF = 15,
  parameter int unsigned N_BUF = 2
) (
  input  dr_t  crit,
  output logic nor_out,
  output logic done
);

  logic [N_BUF:0] chain;

  initial nor_out = 1'b1;
  always @(crit) nor_out <= #(T_NOR) ~(crit.t | crit.f);
  assign chain[0] = nor_out;

  for (genvar i = 0; i < int'(N_BUF); i++) begin : g_buf
    initial chain[i+1] = 1'b1;
    always @(chain[i]) chain[i+1] <= #(T_BUF) chain[i];
  end

  assign done = chain[N_BUF];

endmodule
