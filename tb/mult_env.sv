`timescale 1ps/1ps
// mult_env: source, sink and scoreboard for one apcdp_multiplier, for testbenches.
// The source sends NTOK random operand pairs (four-phase dual-rail: data and request valid,
// wait for ack low, back to spacer, wait for ack high). The sink acts like one more stage: it
// reads the product when out_req is valid, drops out_ack T_ACK later, and raises it T_ACK after
// out_req has returned to spacer. good/bad count products that match / do not match a*b;
// finished goes high when every token has come back.
module mult_env
  import apcdp_pkg::*;
#(
  parameter int N     = 8,
  parameter int NTOK  = 50,
  parameter int T_ACK = 50
) (
  input  logic           rst,
  output dr_t  [N-1:0]   in_a,
  output dr_t  [N-1:0]   in_b,
  output dr_t            in_req,
  input  logic           in_ack,
  input  logic [2*N-1:0] out_p,
  input  dr_t            out_req,
  output logic           out_ack,
  output int             good,
  output int             bad,
  output logic           finished
);

  longint unsigned exp_q[$];

  initial begin
    dr_t [N-1:0] da, db;
    logic [N-1:0] a, b;
    in_a = '0;
    in_b = '0;
    in_req = DR_SPACER;
    while (rst !== 1'b0) @(rst);
    #500;
    for (int i = 0; i < NTOK; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      while (in_ack !== 1'b1) @(in_ack);
      for (int j = 0; j < N; j++) begin
        da[j] = a[j] ? DR_ONE : DR_ZERO;
        db[j] = b[j] ? DR_ONE : DR_ZERO;
      end
      in_a = da;
      in_b = db;
      in_req = DR_ONE;
      exp_q.push_back(64'(a) * 64'(b));
      while (in_ack !== 1'b0) @(in_ack);
      in_a = '0;
      in_b = '0;
      in_req = DR_SPACER;
    end
  end

  initial begin
    good = 0;
    bad = 0;
    finished = 1'b0;
    out_ack = 1'b1;
    forever begin
      @(posedge (out_req.t | out_req.f));
      if (exp_q.size() == 0 || 64'(out_p) != exp_q.pop_front()) bad++;
      else good++;
      if (good + bad == NTOK) finished = 1'b1;
      #(T_ACK);
      out_ack = 1'b0;
      while (out_req.t | out_req.f) @(out_req);
      #(T_ACK);
      out_ack = 1'b1;
    end
  end

endmodule
