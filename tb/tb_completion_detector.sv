`timescale 1ps/1ps
// tb_completion_detector: checks the NOR completion detector and its drive buffers.
// nor_out must be 1 for a spacer critical bit and 0 for either valid value, T_NOR after the
// change, and done must follow nor_out after N_BUF*T_BUF.
module tb_completion_detector;
  import apcdp_pkg::*;

  localparam int T_NOR = 20, T_BUF = 15, N_BUF = 2;

  dr_t  crit;
  logic nor_out, done;
  int   checks = 0, failures = 0;

  completion_detector #(.T_NOR(T_NOR), .T_BUF(T_BUF), .N_BUF(N_BUF)) dut (
    .crit(crit), .nor_out(nor_out), .done(done)
  );

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
    crit = DR_SPACER;
    #200;
    check(nor_out == 1'b1 && done == 1'b1, "spacer reads as precharged");
    for (int it = 0; it < 20; it++) begin
      crit = (it % 2) ? DR_ONE : DR_ZERO;
      #(T_NOR - 1);
      check(nor_out == 1'b1, "NOR not before T_NOR");
      #2;
      check(nor_out == 1'b0, "NOR falls for a valid bit");
      check(done == 1'b1, "done still high inside the buffer chain");
      #(N_BUF * T_BUF);
      check(done == 1'b0, "done falls after the buffers");
      crit = DR_SPACER;
      #(T_NOR + 1);
      check(nor_out == 1'b1, "NOR rises for spacer");
      #(N_BUF * T_BUF);
      check(done == 1'b1, "done rises after the buffers");
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
