`timescale 1ps/1ps
// tb_apcdp_patterns: switching activity of the multiplier under different data patterns.
// Domino energy is spent on the nodes that discharge in each evaluation. This test counts,
// token by token, every rising rail in every stage of the default-size multiplier:
//   - single-rail gates: they fire only for a 1, so their count depends on the data. It must
//     equal the number of 1 bits (the critical bit excepted) in the words of all 2N stages,
//     which this testbench computes with its own carry-save array model;
//   - dual-rail parts (the SLG of each stage and the encoding splitters): exactly one rail
//     each per token, whatever the data.
// Patterns: best case 0 x 0, worst case 255 x 255, and random operands. The counts are printed
// next to the number of gates a fully dual-rail version of the same stages would discharge.
module tb_apcdp_patterns;
  import apcdp_pkg::*;

  localparam int N = 8;
  localparam int S = 2 * N;
  localparam int W = 6 * N + 1;

  logic              rst;
  dr_t  [N-1:0]      in_a, in_b;
  dr_t               in_req;
  logic              in_ack;
  logic [2*N-1:0]    out_p;
  dr_t               out_req;
  logic              out_ack;

  apcdp_multiplier dut (.*);

  int checks = 0, failures = 0;
  int sr_cnt = 0, dr_cnt = 0;

  for (genvar k = 0; k < S; k++) begin : g_cnt
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i != crit_pos(N, k)) begin : g_sr
        always @(posedge dut.g_stage[k].sr_o[i]) sr_cnt++;
        if (needs_split(N, k, i)) begin : g_split
          always @(posedge dut.g_stage[k].dr_o[i].t) dr_cnt++;
          always @(posedge dut.g_stage[k].dr_o[i].f) dr_cnt++;
        end
      end
    end
    always @(posedge dut.g_stage[k].crit_o.t) dr_cnt++;
    always @(posedge dut.g_stage[k].crit_o.f) dr_cnt++;
  end

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


  // Single-rail discharges expected for one token.
  function automatic int expect_sr(logic [N-1:0] a, logic [N-1:0] b);
    logic [W-1:0] w;
    int n;
    n = 0;
    for (int k = 0; k < S; k++) begin
      w = model(a, b, k);
      w[crit_pos(N, k)] = 1'b0;
      n += $countones(w);
    end
    return n;
  endfunction

  // Live gates and splitters of all stages: the constants of the comparison.
  function automatic int count_live();
    int n;
    n = 0;
    for (int k = 0; k < S; k++)
      for (int i = 0; i < W; i++) if (gate_spec(N, k, i).g != G_NONE) n++;
    return n;
  endfunction

  function automatic int count_split();
    int n;
    n = 0;
    for (int k = 0; k < S; k++)
      for (int i = 0; i < W; i++) if (i != crit_pos(N, k) && needs_split(N, k, i)) n++;
    return n;
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: one more stage
  initial begin
    out_ack = 1'b1;
    forever begin
      @(posedge (out_req.t | out_req.f));
      #50;
      out_ack = 1'b0;
      while (out_req.t | out_req.f) @(out_req);
      #50;
      out_ack = 1'b1;
    end
  end

  task automatic one_token(logic [N-1:0] a, logic [N-1:0] b, output int sr, output int dr);
    dr_t [N-1:0] da, db;
    int sr0, dr0;
    while (in_ack !== 1'b1) @(in_ack);
    #3000;  // pipeline empty and quiet
    sr0 = sr_cnt;
    dr0 = dr_cnt;
    for (int j = 0; j < N; j++) begin
      da[j] = a[j] ? DR_ONE : DR_ZERO;
      db[j] = b[j] ? DR_ONE : DR_ZERO;
    end
    in_a = da;
    in_b = db;
    in_req = DR_ONE;
    while (in_ack !== 1'b0) @(in_ack);
    in_a = '0;
    in_b = '0;
    in_req = DR_SPACER;
    @(posedge (out_req.t | out_req.f));
    check(32'(out_p) == 32'(a) * 32'(b), $sformatf("%0d x %0d = %0d", a, b, out_p));
    #3000;
    sr = sr_cnt - sr0;
    dr = dr_cnt - dr0;
  endtask

  initial begin
    int sr, dr, live, nsplit, e;
    int sr_best, sr_worst;
    longint sr_sum;
    logic [N-1:0] a, b;
    live = count_live();
    nsplit = count_split();
    in_a = '0; in_b = '0; in_req = DR_SPACER;
    rst = 1'b1;
    #1000;
    rst = 1'b0;

    one_token('0, '0, sr, dr);
    sr_best = sr;
    check(sr == expect_sr('0, '0), $sformatf("best case single-rail %0d expected %0d", sr, expect_sr('0, '0)));
    check(dr == S + nsplit, $sformatf("best case dual-rail %0d expected %0d", dr, S + nsplit));
    $display("best  0x0:     single-rail %0d + dual-rail %0d discharges (fully dual-rail: %0d)", sr, dr, live);

    one_token('1, '1, sr, dr);
    sr_worst = sr;
    check(sr == expect_sr('1, '1), $sformatf("worst case single-rail %0d expected %0d", sr, expect_sr('1, '1)));
    check(dr == S + nsplit, $sformatf("worst case dual-rail %0d expected %0d", dr, S + nsplit));
    $display("worst 255x255: single-rail %0d + dual-rail %0d discharges (fully dual-rail: %0d)", sr, dr, live);

    sr_sum = 0;
    for (int i = 0; i < 40; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      one_token(a, b, sr, dr);
      e = expect_sr(a, b);
      check(sr == e, $sformatf("random single-rail %0d expected %0d", sr, e));
      check(dr == S + nsplit, "random dual-rail count is data independent");
      sr_sum += sr;
    end
    $display("random mean:   single-rail %0d + dual-rail %0d discharges (fully dual-rail: %0d)",
             sr_sum / 40, S + nsplit, live);
    check(sr_best < sr_worst, "activity depends on the data pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
