`timescale 1ps/1ps
// tb_sr_domino_gate: checks the single-rail domino gate.
// For every gate kind and every input value: the output is 0 while precharged; in evaluation
// it rises T_SR after the inputs arrive exactly when the function is 1 and stays 0 otherwise;
// a monotonic gate fires early from true rails alone; the keeper holds a 1 after the inputs
// return to spacer; precharge clears it. Expected values are computed here with integer
// arithmetic.
module tb_sr_domino_gate;
  import apcdp_pkg::*;

  localparam int T = 40;

  logic      pc;
  dr_t [3:0] in;
  logic      y_sum, y_car, y_and, y_buf;

  sr_domino_gate #(.G(G_SUM),   .T_SR(T)) u_sum (.pc(pc), .in(in), .y(y_sum));
  sr_domino_gate #(.G(G_CARRY), .T_SR(T)) u_car (.pc(pc), .in(in), .y(y_car));
  sr_domino_gate #(.G(G_AND),   .T_SR(T)) u_and (.pc(pc), .in(in), .y(y_and));
  sr_domino_gate #(.G(G_BUF),   .T_SR(T)) u_buf (.pc(pc), .in(in), .y(y_buf));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dr_t [3:0] d;
    pc = 1'b0;
    in = '0;
    #(2 * T);
    check({y_sum, y_car, y_and, y_buf} == 4'b0, "precharged outputs");
    for (int v = 0; v < 16; v++) begin
      int pp, tot;
      pp  = (v & 1) & ((v >> 1) & 1);
      tot = pp + ((v >> 2) & 1) + ((v >> 3) & 1);
      pc = 1'b1;
      #10;
      for (int j = 0; j < 4; j++) d[j] = ((v >> j) & 1) ? DR_ONE : DR_ZERO;
      in = d;
      #(T - 1);
      check({y_sum, y_car, y_and, y_buf} == 4'b0, "no output before T_SR");
      #2;
      check(y_sum == tot[0], $sformatf("sum of %b", v[3:0]));
      check(y_car == (tot >= 2), $sformatf("carry of %b", v[3:0]));
      check(y_and == pp[0], $sformatf("and of %b", v[3:0]));
      check(y_buf == v[0], $sformatf("buf of %b", v[3:0]));
      in = '0;
      #(2 * T);
      check(y_sum == tot[0] && y_car == (tot >= 2) && y_and == pp[0], "keeper holds");
      pc = 1'b0;
      #(T + 1);
      check({y_sum, y_car, y_and, y_buf} == 4'b0, "precharge clears");
    end
    // early firing: a carry with two true inputs fires although the third is missing
    pc = 1'b1;
    in = '0;
    in[2] = DR_ONE;
    in[3] = DR_ONE;
    #(T + 1);
    check(y_car == 1'b1, "carry fires early from two ones");
    check(y_sum == 1'b0, "sum waits for its missing inputs");
    in[0] = DR_ONE;
    in[1] = DR_ZERO;
    #(T + 1);
    check(y_sum == 1'b0, "sum of 0,1,1 stays 0");
    pc = 1'b0;
    in = '0;
    #(T + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
