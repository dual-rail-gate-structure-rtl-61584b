`timescale 1ps/1ps
// tb_apcdp_failure: the timing assumption of the constructed critical data path.
// The pipeline is correct only if no bit of a stage finishes later than the stage's critical
// bit by more than the completion detector's delay; bits that feed a splitter must be final
// when the critical bit is. Two multipliers run the same kind of random stream:
//   - "edge": single-rail gates exactly as slow as the SLG (T_SR = T_SLG), the limit of the
//     assumption: every product must be correct;
//   - "late": single-rail gates slower than the SLG by more than the detector delay
//     (T_SR = T_SLG + T_NOR + 2*T_BUF + 20): the critical bit no longer stands for the stage,
//     and wrong products (pipeline failure) must appear.
module tb_apcdp_failure;
  import apcdp_pkg::*;

  localparam int N = 8;
  localparam int NTOK = 60;
  localparam int T_SLG = 50;
  localparam int T_CD = 20 + 2 * 15;

  logic rst;
  int   checks = 0, failures = 0;

  dr_t [N-1:0] ea, eb, la, lb;
  dr_t e_req, l_req, e_oreq, l_oreq;
  logic e_ack, l_ack, e_oack, l_oack;
  logic [2*N-1:0] e_p, l_p;
  int e_good, e_bad, l_good, l_bad;
  logic e_fin, l_fin;

  apcdp_multiplier #(.N(N), .T_SR(T_SLG), .T_SLG(T_SLG)) u_edge (
    .rst(rst), .in_a(ea), .in_b(eb), .in_req(e_req), .in_ack(e_ack),
    .out_p(e_p), .out_req(e_oreq), .out_ack(e_oack)
  );
  mult_env #(.N(N), .NTOK(NTOK)) u_eenv (
    .rst(rst), .in_a(ea), .in_b(eb), .in_req(e_req), .in_ack(e_ack), .out_p(e_p),
    .out_req(e_oreq), .out_ack(e_oack), .good(e_good), .bad(e_bad), .finished(e_fin)
  );

  apcdp_multiplier #(.N(N), .T_SR(T_SLG + T_CD + 20), .T_SLG(T_SLG)) u_late (
    .rst(rst), .in_a(la), .in_b(lb), .in_req(l_req), .in_ack(l_ack),
    .out_p(l_p), .out_req(l_oreq), .out_ack(l_oack)
  );
  mult_env #(.N(N), .NTOK(NTOK)) u_lenv (
    .rst(rst), .in_a(la), .in_b(lb), .in_req(l_req), .in_ack(l_ack), .out_p(l_p),
    .out_req(l_oreq), .out_ack(l_oack), .good(l_good), .bad(l_bad), .finished(l_fin)
  );

  initial begin
    rst = 1'b1;
    #1000;
    rst = 1'b0;
    // the late pipeline may also lose tokens and stop; give both a fixed time
    #(NTOK * 2000);
    checks++;
    if (!e_fin || e_bad != 0 || e_good != NTOK) begin
      failures++;
      $display("FAIL edge pipeline: good=%0d bad=%0d", e_good, e_bad);
    end
    checks++;
    if (l_fin && l_bad == 0) begin
      failures++;
      $display("FAIL late pipeline showed no failure");
    end
    $display("edge: %0d of %0d correct; late: good=%0d bad=%0d finished=%0b",
             e_good, NTOK, l_good, l_bad, l_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
