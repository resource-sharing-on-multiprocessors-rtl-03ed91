// tb_fig2_omega: the 4 x 4 Omega example with three requesters.
//
// Processors 0, 1 and 2 each ask for one resource; resources 0, 1 and 2 are free and
// resource 3 is busy. A central scheduler that picked the mapping {(0,1), (1,2), (2,0)}
// or {(0,0), (1,2), (2,1)} would block one request inside the network and reach only
// two resources (67 % utilisation). The distributed algorithm has no mapping to choose:
// a blocked query is sent back and re-routed, so all three processors must hold one
// resource each, every query must be answered in full, and the three resources must
// end up allocated. Repeated over 40 rounds with different random tie breaks; a
// processor that gets a reject retries after a short random delay.
module tb_fig2_omega;
  localparam int N = 4, R = 1, DW = 1;
  localparam int CW = $clog2(N * R + 1);

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]         p_q_v, p_l, p_j_v, p_c_v, r_j_v, r_c_v, r_q_v, r_l;
  logic [N-1:0][CW-1:0] p_q_cnt, p_s, p_j_cnt, p_c_cnt, r_s, r_j_cnt, r_c_cnt, r_q_cnt;
  logic [N-1:0][DW-1:0] p_d, r_d;
  int checks = 0, failures = 0;

  omega_rsin #(.N(N), .R_PER_PORT(R), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  // resource ports: one resource each
  int rfree[N], held[N];
  always_comb for (int k = 0; k < N; k++) r_s[k] = CW'(rfree[k]);
  always @(posedge clk) begin
    if (!rst_n) begin r_j_v <= '0; r_c_v <= '0; end
    else for (int k = 0; k < N; k++) begin
      r_j_v[k] <= 1'b0; r_c_v[k] <= 1'b0;
      if (r_l[k]) held[k] = 0;
      if (r_q_v[k]) begin
        if (rfree[k] > 0 && r_q_cnt[k] == 1) begin
          rfree[k]--; held[k] = 1;
          r_c_v[k] <= 1'b1; r_c_cnt[k] <= CW'(1);
        end else begin
          r_j_v[k] <= 1'b1; r_j_cnt[k] <= r_q_cnt[k];
        end
      end
    end
  end

  // processors 0..2
  int  want[N], got_c[N], got_j[N], wait_t[N], retries = 0, backtracks = 0;
  always @(posedge clk) begin
    if (!rst_n) p_q_v <= '0;
    else for (int p = 0; p < N; p++) begin
      p_q_v[p] <= 1'b0;
      if (p_c_v[p]) got_c[p] += int'(p_c_cnt[p]);
      if (p_j_v[p]) begin
        got_j[p] += int'(p_j_cnt[p]);
        retries++;
        wait_t[p] = $urandom_range(1, 6);
      end
      if (want[p] > 0 && got_c[p] == 0 && wait_t[p] > 0) begin
        wait_t[p]--;
        if (wait_t[p] == 0 && int'(p_s[p]) >= 1) begin
          p_q_v[p] <= 1'b1; p_q_cnt[p] <= CW'(1);
        end else if (wait_t[p] == 0) wait_t[p] = 1;
      end
    end
  end
  always @(posedge clk)
    if (rst_n) for (int s = 1; s < $clog2(N); s++) for (int u = 0; u < N; u++)
      if (dut.bj_v[s][u]) backtracks++;
  assign p_d = '0;

  initial begin
    p_l = '0; p_q_cnt = '0;
    for (int k = 0; k < N; k++) begin rfree[k] = 0; held[k] = 0; want[k] = 0; got_c[k] = 0; got_j[k] = 0; wait_t[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 40; round++) begin
      rfree[0] = 1; rfree[1] = 1; rfree[2] = 1; rfree[3] = 0;
      repeat (10) @(posedge clk);
      check("status reaches the processors", int'(p_s[0]), 3);
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin want[p] = 1; got_c[p] = 0; got_j[p] = 0; wait_t[p] = 1; end
      for (int t = 0; t < 400 && (got_c[0] + got_c[1] + got_c[2]) < 3; t++) @(posedge clk);
      for (int p = 0; p < 3; p++) check($sformatf("round %0d P%0d holds a resource", round, p), got_c[p], 1);
      check("all three resources allocated", held[0] + held[1] + held[2], 3);
      // give everything back
      @(negedge clk);
      for (int p = 0; p < 3; p++) want[p] = 0;
      p_l = 3'b111;
      @(negedge clk);
      p_l = '0;
      repeat (10) @(posedge clk);
      rfree[0] = 0; rfree[1] = 0; rfree[2] = 0;
      repeat (10) @(posedge clk);
      for (int k = 0; k < N; k++) check("released", held[k], 0);
    end
    $display("rejects back to processors=%0d backtracks inside the network=%0d", retries, backtracks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
