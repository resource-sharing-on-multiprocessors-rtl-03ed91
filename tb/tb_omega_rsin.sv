// tb_omega_rsin: self-checking test of the 8 x 8 Omega resource sharing network.
//
// Around the network sit models of the processors and of the resource ports (two
// resources per port). A resource port reports its free resources, answers a query one
// clock later with a completion for what it can give and a reject for the rest, keeps
// the given resources connected until the release, then serves for a random time.
// A processor waits until its status says enough resources are reachable, queries for
// one or two resources, and on a partial or empty answer releases what it got and tries
// again after a random back-off. With everything found it sends its task: while it
// does, its identity must arrive at resource ports holding exactly the resources it
// was granted. Then it releases.
//
// Part 1 is the example of the 8 x 8 network with resources behind ports 0, 1, 4, 5
// free and processors 0, 3, 4, 5 asking for one each, run 24 times from random start
// clocks. Every round all four must be served without any processor seeing a reject.
// Two requests meet in one stage-1 box when the stage-0 tie-breaks send them there;
// then one of them must backtrack one stage and take the other path, making 5 box passes
// against 3 for the others (3.5 on average, one request in four backtracked). Both kinds
// of round must occur.
// Part 2 runs 160 random tasks to completion. Checked: rejects plus completion equal
// every query, no port gives more than it has or serves two links at once, data
// reaches the right resources, every task finishes. Counted, and required: rejects
// inside the network (backtracking), two-resource queries, partial grants and
// releases.
module tb_omega_rsin;
  localparam int N = 8, R = 2, DW = 4;
  localparam int CW = $clog2(N * R + 1);
  localparam int TASKS = 160;
  localparam int EX_ROUNDS = 24;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        p_q_v, p_l, p_j_v, p_c_v, r_j_v, r_c_v, r_q_v, r_l;
  logic [N-1:0][CW-1:0] p_q_cnt, p_s, p_j_cnt, p_c_cnt, r_s, r_j_cnt, r_c_cnt, r_q_cnt;
  logic [N-1:0][DW-1:0] p_d, r_d;

  int checks = 0, failures = 0;

  omega_rsin #(.N(N), .R_PER_PORT(R), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // ------------------------------------------------------------ resource ports
  int  cap[N];            // resources installed and working behind each port
  int  rfree[N];          // free resources
  int  conn_cnt[N];       // resources held by the current connection
  int  timers[N][$];      // service time left of released resources
  bit  busy_link[N];

  always_comb for (int k = 0; k < N; k++) r_s[k] = CW'(rfree[k]);

  always @(posedge clk) begin
    if (!rst_n) begin
      r_j_v <= '0;  r_c_v <= '0;
    end else begin
      for (int k = 0; k < N; k++) begin
        r_j_v[k] <= 1'b0;  r_c_v[k] <= 1'b0;
        // service completions
        for (int t = timers[k].size() - 1; t >= 0; t--) begin
          timers[k][t]--;
          if (timers[k][t] == 0) begin
            timers[k].delete(t);
            rfree[k]++;
          end
        end
        if (r_l[k]) begin
          for (int t = 0; t < conn_cnt[k]; t++) timers[k].push_back($urandom_range(1, 30));
          conn_cnt[k] = 0;
          busy_link[k] = 1'b0;
        end
        if (r_q_v[k]) begin
          automatic int n = int'(r_q_cnt[k]);
          automatic int a = (n < rfree[k]) ? n : rfree[k];
          checks++;
          if (busy_link[k]) begin
            failures++;
            $display("FAIL query on port %0d while its link is held", k);
          end
          rfree[k] -= a;
          conn_cnt[k] = a;
          busy_link[k] = (a > 0);
          if (a > 0) begin r_c_v[k] <= 1'b1; r_c_cnt[k] <= CW'(a); end
          if (n > a) begin r_j_v[k] <= 1'b1; r_j_cnt[k] <= CW'(n - a); end
        end
      end
    end
  end

  // ------------------------------------------------------------ processors
  typedef enum int {P_IDLE, P_WAIT_S, P_WAIT_ANS, P_BACKOFF, P_XMIT} pstate_e;
  pstate_e pst[N];
  int need[N], jgot[N], cgot[N], tmr[N];
  int tasks_issued = 0, tasks_done = 0;
  int n_multi = 0, n_partial = 0, n_release = 0, n_internal_rej = 0;
  bit random_traffic = 1'b0;

  // rejects sent back by stages 1.. are backtracking inside the network
  always @(posedge clk)
    if (rst_n)
      for (int s = 1; s < $clog2(N); s++)
        for (int u = 0; u < N; u++)
          if (dut.bj_v[s][u]) n_internal_rej++;

  // box passes during one round of the example: a query entering a box, or a reject
  // coming back into a box, is one pass; rejects reaching a processor are counted apart
  int  ex_pass = 0, ex_rej = 0, ex_proc_rej = 0;
  bit  ex_count = 1'b0;
  always @(posedge clk)
    if (rst_n && ex_count) begin
      for (int s = 0; s < $clog2(N); s++)
        for (int u = 0; u < N; u++)
          if (dut.fq_v[s][u]) ex_pass++;
      for (int s = 1; s < $clog2(N); s++)
        for (int u = 0; u < N; u++)
          if (dut.bj_v[s][u]) begin ex_pass++; ex_rej++; end
      for (int u = 0; u < N; u++) if (p_j_v[u]) ex_proc_rej++;
    end

  always @(posedge clk) begin
    if (!rst_n) begin
      p_q_v <= '0;  p_l <= '0;
      for (int p = 0; p < N; p++) pst[p] = P_IDLE;
    end else begin
      for (int p = 0; p < N; p++) begin
        p_q_v[p] <= 1'b0;
        p_l[p]   <= 1'b0;
        if (p_j_v[p]) jgot[p] += int'(p_j_cnt[p]);
        if (p_c_v[p]) cgot[p] += int'(p_c_cnt[p]);
        case (pst[p])
          P_IDLE:
            if (random_traffic && tasks_issued < TASKS && $urandom_range(0, 15) == 0) begin
              tasks_issued++;
              need[p] = $urandom_range(1, 2);
              if (need[p] == 2) n_multi++;
              pst[p] = P_WAIT_S;
            end
          P_WAIT_S:
            if (int'(p_s[p]) >= need[p]) begin
              p_q_v[p]   <= 1'b1;
              p_q_cnt[p] <= CW'(need[p]);
              jgot[p] = 0;
              cgot[p] = 0;
              pst[p] = P_WAIT_ANS;
            end
          P_WAIT_ANS:
            if (jgot[p] + cgot[p] >= need[p]) begin
              check("rejects+completion equal query", jgot[p] + cgot[p], need[p]);
              if (cgot[p] == need[p]) begin
                tmr[p] = $urandom_range(3, 12);
                pst[p] = P_XMIT;
              end else begin
                if (cgot[p] > 0) begin
                  n_partial++;
                  n_release++;
                  p_l[p] <= 1'b1;
                end
                tmr[p] = $urandom_range(2, 20);
                pst[p] = P_BACKOFF;
              end
            end
          P_BACKOFF: begin
            tmr[p]--;
            if (tmr[p] == 0) pst[p] = P_WAIT_S;
          end
          P_XMIT: begin
            // the task travels to exactly the resources granted
            automatic int held = 0;
            for (int k = 0; k < N; k++) if (int'(r_d[k]) == p + 1) held += conn_cnt[k];
            check($sformatf("resources receiving P%0d", p), held, need[p]);
            tmr[p]--;
            if (tmr[p] == 0) begin
              p_l[p] <= 1'b1;
              n_release++;
              tasks_done++;
              pst[p] = P_IDLE;
            end
          end
          default: pst[p] = P_IDLE;
        endcase
      end
    end
  end

  always_comb for (int p = 0; p < N; p++) p_d[p] = (pst[p] == P_XMIT) ? DW'(p + 1) : '0;

  initial begin
    for (int k = 0; k < N; k++) begin rfree[k] = 0; conn_cnt[k] = 0; busy_link[k] = 0; end
    p_q_cnt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- part 1: the 8 x 8 example, resources behind ports 0, 1, 4, 5 free and
    // processors 0, 3, 4, 5 asking for one each, repeated from random start clocks so
    // that the boxes' random tie-breaks differ from round to round
    rfree[0] = 1; rfree[1] = 1; rfree[4] = 1; rfree[5] = 1;
    begin
      automatic int rounds_bt = 0;
      for (int rd = 0; rd < EX_ROUNDS; rd++) begin
        // the previous round's releases and services must be over
        for (int t = 0; t < 400 && rfree[0] + rfree[1] + rfree[4] + rfree[5] < 4; t++)
          @(posedge clk);
        repeat ($urandom_range(20, 40)) @(posedge clk);
        check("status seen by P0", int'(p_s[0]), 4);
        @(negedge clk);
        tasks_done = 0; ex_pass = 0; ex_rej = 0; ex_proc_rej = 0; ex_count = 1'b1;
        foreach (need[p]) begin need[p] = 1; jgot[p] = 0; cgot[p] = 0; end
        pst[0] = P_WAIT_S; pst[3] = P_WAIT_S; pst[4] = P_WAIT_S; pst[5] = P_WAIT_S;
        for (int t = 0; t < 300 && tasks_done < 4; t++) @(posedge clk);
        ex_count = 1'b0;
        check("example: tasks done", tasks_done, 4);
        check("example: no request turned back to its processor", ex_proc_rej, 0);
        check("example: at most one request backtracks", int'(ex_rej <= 1), 1);
        check("example: box passes", ex_pass, 12 + 2 * ex_rej);
        if (ex_rej == 1) rounds_bt++;
      end
      $display("example: %0d of %0d rounds had one of the four requests backtrack (3.5 boxes per request), the others 3 boxes per request",
               rounds_bt, EX_ROUNDS);
      checks++;
      if (rounds_bt == 0 || rounds_bt == EX_ROUNDS) begin
        failures++;
        $display("FAIL example: backtracking in %0d of %0d rounds", rounds_bt, EX_ROUNDS);
      end
    end

    // ---- part 2: random traffic with two resources per port
    repeat (50) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      cap[k] = R;
      rfree[k] = R - conn_cnt[k] - timers[k].size();
    end
    tasks_done = 0;
    random_traffic = 1'b1;
    for (int t = 0; t < 150000 && tasks_done < TASKS; t++) @(posedge clk);
    check("random tasks done", tasks_done, TASKS);
    repeat (100) @(posedge clk);
    for (int k = 0; k < N; k++) check($sformatf("port %0d free at end", k), rfree[k], R);
    checks += 4;
    if (n_internal_rej == 0) begin failures++; $display("FAIL no backtracking"); end
    if (n_multi == 0)        begin failures++; $display("FAIL no two-resource query"); end
    if (n_partial == 0)      begin failures++; $display("FAIL no partial grant"); end
    if (n_release == 0)      begin failures++; $display("FAIL no release"); end
    $display("tasks=%0d internal_rejects=%0d multi=%0d partial=%0d releases=%0d",
             tasks_done, n_internal_rej, n_multi, n_partial, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
