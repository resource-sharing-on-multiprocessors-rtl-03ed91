// tb_omega_xbox: directed, self-checking test of one Omega exchange box.
//
// Each output port is loaded with a model of the next stage: it reports a free count on
// S, and two clocks after a query answers with a completion for what it can give and a
// reject for the rest. A "stubborn" flag makes a port reject everything while still
// reporting free resources, which forces the box to re-route a rejected query.
// Scenarios and expected results are worked out by hand from the routing rules:
//   status sum, query to the output with more resources, held outputs masked from S,
//   split query with immediate reject, release forwarding, largest query first,
//   data steering, re-routing after a reject, and random choice on a tie.
// For every query the rejects plus completion returned must equal its count.
module tb_omega_xbox;
  localparam int CW = 6;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic [1:0]         q_in_v, l_in, j_out_v, c_out_v, j_in_v, c_in_v, q_out_v, l_out;
  logic [1:0][CW-1:0] q_in_cnt, s_out, j_out_cnt, c_out_cnt, s_in, j_in_cnt, c_in_cnt, q_out_cnt;
  logic [1:0]         d_in, d_out;

  int checks = 0, failures = 0;
  int f[2], rq[2], rdly[2];
  bit stubborn[2];
  int jsum[2], csum[2], lcnt[2], nq;
  int q_port[$], q_cnt[$];

  omega_xbox #(.CW(CW), .DATA_W(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next-stage model on each output port
  assign s_in[0] = CW'(f[0]);
  assign s_in[1] = CW'(f[1]);
  always @(posedge clk) begin
    if (!rst_n) rdly = '{0, 0};
    else for (int k = 0; k < 2; k++) begin
      j_in_v[k] <= 1'b0;  c_in_v[k] <= 1'b0;
      if (q_out_v[k]) begin
        rq[k] = int'(q_out_cnt[k]);
        rdly[k] = 2;
        q_port.push_back(k);
        q_cnt.push_back(int'(q_out_cnt[k]));
      end else if (rdly[k] > 0) begin
        rdly[k]--;
        if (rdly[k] == 0) begin
          automatic int alloc = stubborn[k] ? 0 : ((rq[k] < f[k]) ? rq[k] : f[k]);
          f[k] -= alloc;
          if (alloc > 0)     begin c_in_v[k] <= 1'b1; c_in_cnt[k] <= CW'(alloc); end
          if (rq[k] > alloc) begin j_in_v[k] <= 1'b1; j_in_cnt[k] <= CW'(rq[k] - alloc); end
        end
      end
      if (l_out[k]) lcnt[k]++;
    end
    for (int p = 0; p < 2; p++) begin
      if (j_out_v[p]) jsum[p] += int'(j_out_cnt[p]);
      if (c_out_v[p]) csum[p] += int'(c_out_cnt[p]);
    end
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  task automatic set_f(input int a, input int b);
    f[0] = a;
    f[1] = b;
  endtask

  task automatic clear_logs();
    jsum = '{0, 0}; csum = '{0, 0}; lcnt = '{0, 0};
    q_port.delete(); q_cnt.delete();
  endtask

  task automatic query(input int p, input int n);
    @(negedge clk);
    q_in_v[p] = 1'b1; q_in_cnt[p] = CW'(n);
    @(negedge clk);
    q_in_v[p] = 1'b0;
  endtask

  task automatic release_in(input int p);
    @(negedge clk);
    l_in[p] = 1'b1;
    @(negedge clk);
    l_in[p] = 1'b0;
  endtask

  // wait until input p has been answered for n resources
  task automatic wait_answer(input int p, input int n);
    for (int t = 0; t < 50 && (jsum[p] + csum[p]) < n; t++) @(posedge clk);
    repeat (3) @(posedge clk);
    check($sformatf("answers on input %0d", p), jsum[p] + csum[p], n);
  endtask

  initial begin
    int reroutes = 0, tie_port[2];
    tie_port = '{0, 0};
    q_in_v = '0; q_in_cnt = '0; l_in = '0; d_in = '0;
    set_f(0, 0); rdly = '{0, 0}; stubborn = '{0, 0};
    j_in_v = '0; c_in_v = '0; j_in_cnt = '0; c_in_cnt = '0;
    clear_logs();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. status: S = A0 + A1 on both input ports
    set_f(3, 5);
    repeat (3) @(posedge clk);
    check("status in0", int'(s_out[0]), 8);
    check("status in1", int'(s_out[1]), 8);

    // 2. a query goes to the output with more resources; S then masks the held output
    clear_logs();
    query(0, 2);
    wait_answer(0, 2);
    check("q2 port", q_port[0], 1);
    check("q2 count", q_cnt[0], 2);
    check("q2 completion", csum[0], 2);
    check("status after q2", int'(s_out[0]), 3);

    // 3. a query larger than what can be reached: part goes out, the rest is rejected
    clear_logs();
    query(1, 4);
    wait_answer(1, 4);
    check("q3 port", q_port[0], 0);
    check("q3 count", q_cnt[0], 3);
    check("q3 reject", jsum[1], 1);
    check("q3 completion", csum[1], 3);

    // 7. data follows the connections: input 0 -> output 1, input 1 -> output 0
    @(negedge clk);
    d_in = 2'b01;  #1;
    check("data in0->out1", int'(d_out), 2);
    d_in = 2'b10;  #1;
    check("data in1->out0", int'(d_out), 1);
    d_in = 2'b00;

    // 4. releases are forwarded to the held outputs
    clear_logs();
    release_in(0);
    release_in(1);
    repeat (2) @(posedge clk);
    check("release to out1", lcnt[1], 1);
    check("release to out0", lcnt[0], 1);
    check("status after release", int'(s_out[0]), 3);

    // 6. two queries at once: the larger is served first and takes the only output
    clear_logs();
    set_f(0, 0);
    repeat (2) @(posedge clk);
    set_f(4, 0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    q_in_v = 2'b11; q_in_cnt[0] = CW'(1); q_in_cnt[1] = CW'(3);
    @(negedge clk);
    q_in_v = 2'b00;
    wait_answer(1, 3);
    wait_answer(0, 1);
    check("largest first port", q_port[0], 0);
    check("largest first count", q_cnt[0], 3);
    check("smaller rejected", jsum[0], 1);
    check("larger completed", csum[1], 3);
    release_in(1);

    // 8. re-routing after a reject, and the random tie break
    stubborn[0] = 1'b1;
    for (int it = 0; it < 24; it++) begin
      clear_logs();
      set_f(0, 0);
      repeat (2) @(posedge clk);
      set_f(2, 2);
      repeat (3) @(posedge clk);
      query(0, 2);
      wait_answer(0, 2);
      check("reroute completion", csum[0], 2);
      check("reroute no reject", jsum[0], 0);
      tie_port[q_port[0]]++;
      if (q_port.size() == 2) begin
        reroutes++;
        check("reroute goes to other port", q_port[1], 1);
      end
      release_in(0);
      repeat (2) @(posedge clk);
    end
    checks += 3;
    if (reroutes == 0)    begin failures++; $display("FAIL no reject was re-routed"); end
    if (tie_port[0] == 0) begin failures++; $display("FAIL tie never chose output 0"); end
    if (tie_port[1] == 0) begin failures++; $display("FAIL tie never chose output 1"); end
    $display("reroutes=%0d tie choices %0d/%0d", reroutes, tie_port[0], tie_port[1]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
