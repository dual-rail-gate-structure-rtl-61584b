`timescale 1ps/1ps
// tb_apcdp_stage: checks single pipeline stages of the multiplier in isolation.
// Three stages are tested side by side: stage 0 (first partial-product row), a carry-save row
// and a bit of the final ripple adder. For random operands the testbench builds the word that
// enters each stage with its own carry-save array model, drives it in dual-rail with the link
// arriving last, and checks
//   - the stage's word against the model and against the arithmetic invariant that the
//     weighted sum of the word equals the part of a*b accumulated so far,
//   - the critical bit valid exactly T_SLG after the link, done falling T_CD later,
//   - the split dual-rail outputs valid T_SPL after the critical bit,
//   - that the stage holds its outputs while its inputs return to spacer and precharges on pc.
module tb_apcdp_stage;
  import apcdp_pkg::*;

  localparam int N = 8;
  localparam int W = 6 * N + 1;
  localparam int NS = 3;
  localparam int KS[NS] = '{0, 5, 11};
  localparam int T_SLG = 50, T_SPL = 30, T_CD = 20 + 2 * 15;

  logic              pc;
  dr_t  [W-1:0]      in_dr [NS];
  dr_t               link;
  logic [W-1:0]      out_sr [NS];
  dr_t               crit [NS];
  dr_t  [W-1:0]      out_dr [NS];
  logic              done [NS];

  for (genvar q = 0; q < NS; q++) begin : g_dut
    apcdp_stage #(.N(N), .K(KS[q])) u_stage (
      .pc(pc), .in_dr(in_dr[q]), .in_link(link), .out_sr(out_sr[q]), .out_crit(crit[q]),
      .out_dr(out_dr[q]), .done(done[q])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Carry-save array model: the word after stage k.
  function automatic logic [W-1:0] model(logic [N-1:0] a, logic [N-1:0] b, int k);
    logic [N-1:0]   s, c;
    logic [2*N-1:0] p;
    logic           r;
    logic [W-1:0]   w;
    int             x, t;
    s = '0; c = '0; p = '0; r = 1'b0;
    for (int j = 0; j < N; j++) s[j] = a[j] & b[0];
    p[0] = s[0];
    s[0] = 1'b0;
    for (int row = 1; row <= k && row < N; row++) begin
      logic [N-1:0] ns, nc;
      for (int j = 0; j < N; j++) begin
        x = (j < N - 1) ? int'(s[j+1]) : 0;
        t = int'(a[j] & b[row]) + x + int'(c[j]);
        ns[j] = t[0];
        nc[j] = t[1];
      end
      p[row] = ns[0];
      ns[0] = 1'b0;
      s = ns;
      c = nc;
    end
    for (int m = 0; m + N <= k; m++) begin
      x = (m < N - 1) ? int'(s[m+1]) : 0;
      t = x + int'(c[m]) + int'(r);
      p[N+m] = t[0];
      r = (m < N - 1) ? t[1] : 1'b0;
      if (m < N - 1) s[m+1] = 1'b0;
      c[m] = 1'b0;
    end
    w = '0;
    for (int j = 0; j < N; j++) begin
      w[pos_a(N, j)] = (k < N - 1) ? a[j] : 1'b0;
      w[pos_b(N, j)] = (j > k) ? b[j] : 1'b0;
      w[pos_s(N, j)] = s[j];
      w[pos_c(N, j)] = c[j];
    end
    for (int j = 0; j < 2 * N; j++) w[pos_p(N, j)] = p[j];
    w[pos_r(N)] = r;
    return w;
  endfunction

  // Weighted value of a word after stage k: must equal a * (b mod 2^(k+1)) for rows and a*b
  // during the final adder.
  function automatic longint unsigned value(logic [W-1:0] w, int k);
    longint unsigned v;
    int sh;
    v = 0;
    for (int j = 0; j < 2 * N; j++) if (w[pos_p(N, j)]) v += 64'(1) << j;
    sh = (k < N) ? k : N - 1;
    for (int j = 1; j < N; j++) if (w[pos_s(N, j)]) v += 64'(1) << (j + sh);
    for (int j = 0; j < N; j++) if (w[pos_c(N, j)]) v += 64'(1) << (j + sh + 1);
    if (w[pos_r(N)]) v += 64'(1) << (k + 1);
    return v;
  endfunction

  function automatic dr_t enc(logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] a, b;
    logic [W-1:0] exp_w;
    longint unsigned lim;
    time t_link;
    pc = 1'b0;
    link = DR_SPACER;
    for (int q = 0; q < NS; q++) in_dr[q] = '0;
    #500;
    for (int it = 0; it < 60; it++) begin
      a = (it == 0) ? '1 : N'($urandom);
      b = (it == 0) ? '1 : N'($urandom);
      pc = 1'b1;
      #100;
      for (int q = 0; q < NS; q++) begin
        logic [W-1:0] w;
        w = (KS[q] == 0) ? '0 : model(a, b, KS[q] - 1);
        if (KS[q] == 0)
          for (int j = 0; j < N; j++) begin
            w[pos_a(N, j)] = a[j];
            w[pos_b(N, j)] = b[j];
          end
        for (int i = 0; i < W; i++) in_dr[q][i] = enc(w[i]);
      end
      #100;
      for (int q = 0; q < NS; q++) check(crit[q] == DR_SPACER, "critical bit waits for the link");
      link = DR_ONE;
      t_link = $time;
      #(T_SLG - 1);
      for (int q = 0; q < NS; q++) check(crit[q] == DR_SPACER, "critical bit not before T_SLG");
      #2;
      for (int q = 0; q < NS; q++) begin
        check(crit[q] != DR_SPACER, "critical bit valid at T_SLG");
        exp_w = model(a, b, KS[q]);
        check(out_sr[q] == exp_w,
              $sformatf("stage %0d word %h expected %h", KS[q], out_sr[q], exp_w));
        lim = (KS[q] < N) ? 64'(a) * (64'(b) & ((64'(1) << (KS[q] + 1)) - 1)) : 64'(a) * 64'(b);
        check(value(out_sr[q], KS[q]) == lim,
              $sformatf("stage %0d value %0d expected %0d", KS[q], value(out_sr[q], KS[q]), lim));
        check(crit[q] == enc(exp_w[crit_pos(N, KS[q])]), "critical bit value");
      end
      #(T_SPL);
      for (int q = 0; q < NS; q++) begin
        logic ok;
        ok = 1'b1;
        for (int i = 0; i < W; i++)
          if (out_dr[q][i].t !== out_sr[q][i] || (out_dr[q][i].f && out_sr[q][i])) ok = 1'b0;
        check(ok, "split outputs agree with the single-rail word");
      end
      #(T_CD - T_SPL - 3);
      for (int q = 0; q < NS; q++) check(done[q] == 1'b1, "done not before T_CD");
      #3;
      for (int q = 0; q < NS; q++) check(done[q] == 1'b0, "done falls T_CD after the critical bit");
      // inputs return to spacer: outputs are held
      for (int q = 0; q < NS; q++) in_dr[q] = '0;
      link = DR_SPACER;
      #200;
      for (int q = 0; q < NS; q++)
        check(out_sr[q] == model(a, b, KS[q]) && crit[q] != DR_SPACER, "keeper holds the word");
      pc = 1'b0;
      #200;
      for (int q = 0; q < NS; q++)
        check(out_sr[q] == '0 && crit[q] == DR_SPACER && out_dr[q] == '0 && done[q] == 1'b1,
              "precharge returns the stage to spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
