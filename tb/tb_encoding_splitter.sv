`timescale 1ps/1ps
// tb_encoding_splitter: checks the single-rail to dual-rail encoding splitter.
// The splitter must stay at spacer until its reference (the critical bit valid) arrives, then
// raise t for x=1 or f for x=0 exactly T_SPL later, hold the pair while x and the reference
// return to 0, and return to spacer T_SPL after pc falls without ever raising both rails.
module tb_encoding_splitter;
  import apcdp_pkg::*;

  localparam int T = 30;

  logic pc, x, ref_valid;
  dr_t  y;
  int   checks = 0, failures = 0;
  int   both_high = 0;

  encoding_splitter #(.T_SPL(T)) dut (.pc(pc), .x(x), .ref_valid(ref_valid), .y(y));

  always @(y) if (y.t && y.f) both_high++;

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
    pc = 1'b0;
    x = 1'b0;
    ref_valid = 1'b0;
    #100;
    check(y == DR_SPACER, "precharged");
    for (int it = 0; it < 40; it++) begin
      logic b;
      b = 1'($urandom);
      pc = 1'b1;
      #20;
      x = b;
      #(2 * T);
      check(y == DR_SPACER, "waits for the reference");
      ref_valid = 1'b1;
      #(T - 1);
      check(y == DR_SPACER, "not before T_SPL");
      #2;
      check(y == (b ? DR_ONE : DR_ZERO), $sformatf("split of %0d", b));
      x = 1'b0;
      ref_valid = 1'b0;
      #(2 * T);
      check(y == (b ? DR_ONE : DR_ZERO), "held while the source precharges");
      pc = 1'b0;
      #(T + 1);
      check(y == DR_SPACER, "precharge");
    end
    check(both_high == 0, "never both rails high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
