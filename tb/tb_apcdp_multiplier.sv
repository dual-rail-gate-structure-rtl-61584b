`timescale 1ps/1ps
// tb_apcdp_multiplier: end-to-end test of the asynchronous 8x8 multiplier pipeline at its
// default parameters.
//
// A four-phase dual-rail source feeds operand pairs; a sink that acts like one more pipeline
// stage checks each product, in order, against a*b computed here. Phases:
//   1. one token through the empty pipeline: checks the forward latency
//      T_SLG + (2N-1)*(T_SPL+T_SLG);
//   2. a stream with a fast source and sink: checks the steady-state cycle time against the
//      PS0 cycle of three evaluations, two completion detections and one precharge;
//   3. a stalled sink: the pipeline must fill to N tokens (one in every other stage) and block
//      the source, then drain without losing or duplicating a token;
//   4. random operands with random source and sink delays.
// Each mechanism is counted and a failure is counted for one that never happened. A watchdog
// ends the run if the pipeline deadlocks.
module tb_apcdp_multiplier;
  import apcdp_pkg::*;

  localparam int N     = 8;
  localparam int S     = 2 * N;
  // Delays of the multiplier's defaults, used for the expected timing.
  localparam int T_SR  = 40;
  localparam int T_SLG = 50;
  localparam int T_SPL = 30;
  localparam int T_CD  = 20 + 2 * 15;  // NOR + two drive buffers
  localparam int T_EVAL = T_SPL + T_SLG;

  logic              rst;
  dr_t  [N-1:0]      in_a, in_b;
  dr_t               in_req;
  logic              in_ack;
  logic [2*N-1:0]    out_p;
  dr_t               out_req;
  logic              out_ack;

  apcdp_multiplier dut (.*);

  int checks = 0, failures = 0;
  int unsigned exp_q[$];
  int sent = 0, received = 0;
  int max_inflight = 0;
  int src_blocked = 0;     // source ready but pipeline not accepting for over a cycle
  int full_events = 0;     // pipeline held N tokens
  int period_meas = 0;     // steady-state periods measured
  int src_gap = 0, sink_hold = 0, sink_rel = 0;
  time t_last_out = 0, t_in = 0;
  time periods[$];

  function automatic dr_t enc(logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(logic [N-1:0] a, logic [N-1:0] b);
    time t0;
    dr_t [N-1:0] da, db;
    t0 = $time;
    while (in_ack !== 1'b1) @(in_ack);
    if ($time - t0 > 3 * (T_EVAL + T_CD)) src_blocked++;
    if (src_gap > 0) #(src_gap);
    for (int j = 0; j < N; j++) begin
      da[j] = enc(a[j]);
      db[j] = enc(b[j]);
    end
    in_a   = da;
    in_b   = db;
    in_req = DR_ONE;
    t_in = $time;
    exp_q.push_back(32'(a) * 32'(b));
    sent++;
    if (sent - received > max_inflight) max_inflight = sent - received;
    if (sent - received >= N) full_events++;
    while (in_ack !== 1'b0) @(in_ack);
    in_a   = '0;
    in_b   = '0;
    in_req = DR_SPACER;
  endtask

  // Sink: one more stage. It samples the product when out_req is valid, then precharges the
  // last stage and waits for it to return to spacer.
  initial begin
    out_ack = 1'b1;
    forever begin
      @(posedge (out_req.t | out_req.f));
      if (!rst) begin
        received++;
        if (t_last_out != 0) periods.push_back($time - t_last_out);
        t_last_out = $time;
        if (exp_q.size() == 0) check(0, "product with no operands sent");
        else begin
          int unsigned e;
          e = exp_q.pop_front();
          check(32'(out_p) == e, $sformatf("product %0d expected %0d", out_p, e));
        end
        #(T_CD + sink_hold);
        out_ack = 1'b0;
        while (out_req.t | out_req.f) @(out_req);
        #(T_CD + sink_rel);
        out_ack = 1'b1;
      end
    end
  end

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog: pipeline stopped, sent=%0d received=%0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time lat;
    int unsigned nrand;
    in_a = '0; in_b = '0; in_req = DR_SPACER;
    rst = 1'b1;
    #1000;
    rst = 1'b0;
    #1000;

    // 1. latency of one token through the empty pipeline
    send(8'd13, 8'd11);
    while (received < 1) #1;
    lat = t_last_out - t_in;
    check(lat == T_SLG + (S - 1) * T_EVAL,
          $sformatf("latency %0t expected %0d", lat, T_SLG + (S - 1) * T_EVAL));
    #5000;

    // 2. corner cases and a fast stream; measure the steady-state cycle
    t_last_out = 0;
    periods.delete();
    send(8'd0, 8'd0);
    send(8'd255, 8'd255);
    send(8'd255, 8'd1);
    send(8'd1, 8'd255);
    send(8'd128, 8'd128);
    for (int i = 0; i < 40; i++) send(8'($urandom), 8'($urandom));
    while (received < sent) #10;
    // skip the first outputs (pipeline filling) and the last (draining)
    for (int i = 8; i < periods.size() - 4; i++) begin
      check(periods[i] == T_SLG + 2 * T_EVAL + 2 * T_CD + T_SLG,
            $sformatf("cycle %0t expected %0d", periods[i], T_SLG + 2 * T_EVAL + 2 * T_CD + T_SLG));
      period_meas++;
    end
    $display("steady-state cycle %0t ps", periods[periods.size()/2]);
    #5000;

    // 3. stalled sink: the pipeline fills and the source is blocked
    sink_hold = 60000;
    for (int i = 0; i < 3 * N; i++) send(8'($urandom), 8'($urandom));
    sink_hold = 0;
    while (received < sent) #10;
    #5000;

    // 4. random operands, random source and sink delays
    nrand = 300;
    for (int unsigned i = 0; i < nrand; i++) begin
      src_gap   = int'($urandom_range(0, 400));
      sink_hold = int'($urandom_range(0, 400));
      sink_rel  = int'($urandom_range(0, 400));
      send(8'($urandom), 8'($urandom));
    end
    while (received < sent) #10;
    #2000;

    check(received == sent, "every token delivered");
    $display("tokens=%0d max_inflight=%0d full_events=%0d src_blocked=%0d periods_checked=%0d",
             received, max_inflight, full_events, src_blocked, period_meas);
    check(max_inflight == N, $sformatf("pipeline capacity %0d expected %0d", max_inflight, N));
    check(full_events > 0, "pipeline full never happened");
    check(src_blocked > 0, "source never blocked by back-pressure");
    check(period_meas > 0, "no steady-state cycle measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
