`timescale 1ps/1ps
// tb_slg_gate: checks the SLG dual-rail domino gate.
// For every gate kind and every input value it checks that the gate
//   - stays at spacer while any input pair or the link is still spacer (no early evaluation),
//   - raises exactly the right rail T_SLG after the last input arrives, never earlier,
//   - holds its value when the inputs return to spacer (keeper),
//   - returns to spacer T_SLG after pc falls.
// Expected values come from integer arithmetic written here, not from the package.
module tb_slg_gate;
  import apcdp_pkg::*;

  localparam int T = 50;

  logic      pc;
  dr_t [3:0] in_sum, in_car, in_and, in_buf;
  dr_t       link;
  dr_t       y_sum, y_car, y_and, y_buf;

  slg_gate #(.G(G_SUM),   .T_SLG(T)) u_sum (.pc(pc), .in(in_sum), .link(link), .y(y_sum));
  slg_gate #(.G(G_CARRY), .T_SLG(T)) u_car (.pc(pc), .in(in_car), .link(link), .y(y_car));
  slg_gate #(.G(G_AND),   .T_SLG(T)) u_and (.pc(pc), .in(in_and), .link(link), .y(y_and));
  slg_gate #(.G(G_BUF),   .T_SLG(T)) u_buf (.pc(pc), .in(in_buf), .link(link), .y(y_buf));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic dr_t enc(logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  task automatic drive(logic [3:0] v, int upto);
    // inputs 0..upto-1 valid, the rest spacer
    for (int j = 0; j < 4; j++) begin
      in_sum[j] = (j < upto) ? enc(v[j]) : DR_SPACER;
      in_car[j] = in_sum[j];
      in_and[j] = in_sum[j];
      in_buf[j] = in_sum[j];
    end
  endtask

  task automatic expect_val(dr_t y, logic e, string what);
    check(y == (e ? DR_ONE : DR_ZERO), $sformatf("%s = %b%b expected %0d", what, y.t, y.f, e));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 1'b0;
    link = DR_SPACER;
    drive(4'b0, 0);
    #(2 * T);
    check(y_sum == DR_SPACER && y_car == DR_SPACER, "precharged");
    for (int v = 0; v < 16; v++) begin
      logic [3:0] x;
      int pp, e_sum, e_car;
      x = 4'(v);
      pp = x[0] & x[1];
      e_sum = (pp + x[2] + x[3]) % 2;
      e_car = (pp + x[2] + x[3]) >= 2;
      pc = 1'b1;
      // data arrives first, the link last
      drive(x, 3);
      #(2 * T);
      check(y_sum == DR_SPACER && y_and == DR_SPACER, "no evaluation with one input missing");
      drive(x, 4);
      #(2 * T);
      check(y_sum == DR_SPACER && y_car == DR_SPACER && y_buf == DR_SPACER,
            "no evaluation before the link");
      link = v[0] ? DR_ONE : DR_ZERO;
      #(T - 1);
      check(y_sum == DR_SPACER, "evaluation not before T_SLG");
      #2;
      expect_val(y_sum, e_sum[0], "sum");
      expect_val(y_car, e_car[0], "carry");
      expect_val(y_and, pp[0], "and");
      expect_val(y_buf, x[0], "buf");
      // inputs back to spacer: the keeper holds the result
      drive(4'b0, 0);
      link = DR_SPACER;
      #(2 * T);
      expect_val(y_sum, e_sum[0], "sum held");
      expect_val(y_car, e_car[0], "carry held");
      pc = 1'b0;
      #(T + 1);
      check(y_sum == DR_SPACER && y_car == DR_SPACER && y_and == DR_SPACER, "precharge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
