// tb_rsin_top: end-to-end test of the four resource sharing networks at their default
// sizes (16 processors, 32 resources), each driven by its own processor and resource
// models running a stream of tasks to completion.
//
//  cross-bar  Processors raise requests in request cycles and give their resources back
//             in reset cycles. The switch never blocks: in every request cycle the number
//             of new connections must equal min(requests, free resources). At most one
//             processor holds a resource; the resource data is its holder's.
//  Omega      Processors query for one or two resources when their status allows,
//             release and retry after a partial answer, send their task and release.
//             Rejects plus completion equal the query; the task reaches exactly the
//             granted resources; every task finishes and every resource is free at the end.
//  shared bus Processors ask for one or two resources; every grant has them reserved,
//             every task is transmitted.
//  private    Each processor uses its own bus with two resources.
// A cross-bar resource lowers its free line in the clock after it is taken.
// Counted and required at least once: cross-bar unsatisfied requests, resets and
// cycles with more requests than free resources; Omega backtracking, partial grants and two-resource
// queries; shared-bus contention and requests held back for lack of free resources;
// a private-bus two-resource grant on every processor.
module tb_rsin_top;
  import rsin_pkg::*;

  localparam int NP = 16, NR = 32, RO = 2, RP = 2, DW = 1;
  localparam int CWO = $clog2(NP * RO + 1), CWS = $clog2(NR + 1), CWP = $clog2(RP + 1);
  localparam int XT = 120, OT = 120, ST = 120, PT = 8;   // tasks per network (PT per processor)

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // cross-bar
  xbar_mode_e               xbar_mode;
  logic [NP-1:0]            xbar_req, xbar_unsat;
  logic [NR-1:0]            xbar_free_in, xbar_free_out;
  logic [NP-1:0][DW-1:0]    xbar_proc_data;
  logic [NR-1:0][DW-1:0]    xbar_res_data;
  logic [NP-1:0][NR-1:0]    xbar_conn;
  // Omega
  logic [NP-1:0]            om_p_q_v, om_p_l, om_p_j_v, om_p_c_v, om_r_j_v, om_r_c_v, om_r_q_v, om_r_l;
  logic [NP-1:0][CWO-1:0]   om_p_q_cnt, om_p_s, om_p_j_cnt, om_p_c_cnt, om_r_s, om_r_j_cnt, om_r_c_cnt, om_r_q_cnt;
  logic [NP-1:0][DW-1:0]    om_p_d, om_r_d;
  // shared bus
  logic [NP-1:0]            sb_req, sb_grant, sb_done;
  logic [NP-1:0][CWS-1:0]   sb_req_cnt;
  logic [NP-1:0][DW-1:0]    sb_proc_data;
  logic [CWS-1:0]           sb_free_cnt;
  logic                     sb_bus_busy;
  logic [NR-1:0]            sb_res_free, sb_res_sel, sb_res_start;
  logic [DW-1:0]            sb_bus_data;
  // private buses
  logic [NP-1:0]            pb_req, pb_grant, pb_done, pb_bus_busy;
  logic [NP-1:0][CWP-1:0]   pb_req_cnt, pb_free_cnt;
  logic [NP-1:0][DW-1:0]    pb_proc_data, pb_bus_data;
  logic [NP-1:0][RP-1:0]    pb_res_free, pb_res_sel, pb_res_start;

  rsin_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  // ================================================================ cross-bar
  int  x_hold[NP];                 // clocks left before the holder gives its resources back
  int  x_rtimer[NR];               // service time left after a resource is given back
  int  x_started = 0, x_done = 0, n_x_unsat = 0, n_x_reset = 0, n_x_contend = 0;
  bit  x_run = 1'b0;

  always @(posedge clk) begin
    if (!rst_n) begin
      xbar_mode <= MODE_REQUEST; xbar_req <= '0; xbar_free_in <= '1;
      for (int i = 0; i < NP; i++) x_hold[i] = 0;
      for (int j = 0; j < NR; j++) x_rtimer[j] = 0;
    end else begin
      #1;
      // choose the next cycle from the connections just made
      if (x_run && $urandom_range(0, 3) == 0) begin
        // reset cycle: processors whose task is done give their resources back
        xbar_mode <= MODE_RESET;
        for (int i = 0; i < NP; i++) begin
          automatic bit give = (xbar_conn[i] != '0) && x_hold[i] == 0;
          xbar_req[i] <= give;
          if (give) begin
            n_x_reset++;
            x_done++;
            for (int j = 0; j < NR; j++) if (xbar_conn[i][j]) x_rtimer[j] = $urandom_range(2, 40);
          end
        end
      end else begin
        xbar_mode <= MODE_REQUEST;
        for (int i = 0; i < NP; i++) begin
          automatic bit ask = x_run && x_started < XT && (xbar_conn[i] == '0) && $urandom_range(0, 1);
          xbar_req[i] <= ask;
        end
      end
      for (int i = 0; i < NP; i++) if (x_hold[i] > 0) x_hold[i]--;
    end
  end

  // check a request cycle combinationally before its closing edge
  always @(negedge clk) if (rst_n && xbar_mode == MODE_REQUEST && xbar_req != '0) begin
    automatic int n_req = $countones(xbar_req), n_free = 0, n_sat;
    automatic logic [NR-1:0] col_held = '0;
    for (int i = 0; i < NP; i++) col_held |= xbar_conn[i];
    for (int j = 0; j < NR; j++) if (xbar_free_in[j] && !col_held[j]) n_free++;
    n_sat = n_req - $countones(xbar_req & xbar_unsat);
    check("cross-bar grants = min(requests, free)", n_sat, (n_req < n_free) ? n_req : n_free);
    if (n_req > 1 && n_free > 0 && n_req > n_free) n_x_contend++;
    n_x_unsat += $countones(xbar_req & xbar_unsat);
    for (int i = 0; i < NP; i++) if (xbar_req[i] && !xbar_unsat[i]) begin
      x_started++;
      x_hold[i] = $urandom_range(1, 12);
    end
  end

  // resources on the cross-bar; one holder per column; data is the holder's
  always @(posedge clk) if (rst_n) begin
    automatic logic [NR-1:0] col_held = '0;
    for (int j = 0; j < NR; j++) begin
      automatic int holders = 0;
      for (int i = 0; i < NP; i++) holders += int'(xbar_conn[i][j]);
      if (holders > 1) begin checks++; failures++; $display("FAIL two holders of resource %0d", j); end
    end
    for (int i = 0; i < NP; i++) col_held |= xbar_conn[i];
    for (int j = 0; j < NR; j++) begin
      if (xbar_mode == MODE_REQUEST && xbar_free_in[j] && !xbar_free_out[j])
        xbar_free_in[j] <= 1'b0;
      else if (!xbar_free_in[j] && !col_held[j]) begin
        if (x_rtimer[j] > 0) x_rtimer[j]--;
        else xbar_free_in[j] <= 1'b1;
      end
    end
  end
  always_comb for (int i = 0; i < NP; i++) xbar_proc_data[i] = DW'(i);
  always @(negedge clk) if (rst_n) begin
    for (int j = 0; j < NR; j++) begin
      automatic logic [DW-1:0] e = '0;
      for (int i = 0; i < NP; i++) if (xbar_conn[i][j]) e |= xbar_proc_data[i];
      check("cross-bar resource data", int'(xbar_res_data[j]), int'(e));
    end
  end

  // ================================================================ Omega
  int  o_free[NP], o_conn[NP];
  int  o_timers[NP][$];
  bit  o_link[NP];
  always_comb for (int k = 0; k < NP; k++) om_r_s[k] = CWO'(o_free[k]);
  always @(posedge clk) begin
    if (!rst_n) begin
      om_r_j_v <= '0; om_r_c_v <= '0;
      for (int k = 0; k < NP; k++) begin o_free[k] = RO; o_conn[k] = 0; o_link[k] = 0; end
    end else for (int k = 0; k < NP; k++) begin
      om_r_j_v[k] <= 1'b0; om_r_c_v[k] <= 1'b0;
      for (int t = o_timers[k].size() - 1; t >= 0; t--) begin
        o_timers[k][t]--;
        if (o_timers[k][t] == 0) begin o_timers[k].delete(t); o_free[k]++; end
      end
      if (om_r_l[k]) begin
        for (int t = 0; t < o_conn[k]; t++) o_timers[k].push_back($urandom_range(1, 30));
        o_conn[k] = 0; o_link[k] = 0;
      end
      if (om_r_q_v[k]) begin
        automatic int n = int'(om_r_q_cnt[k]);
        automatic int a = (n < o_free[k]) ? n : o_free[k];
        checks++;
        if (o_link[k]) begin failures++; $display("FAIL Omega query on a held link %0d", k); end
        o_free[k] -= a; o_conn[k] = a; o_link[k] = (a > 0);
        if (a > 0) begin om_r_c_v[k] <= 1'b1; om_r_c_cnt[k] <= CWO'(a); end
        if (n > a) begin om_r_j_v[k] <= 1'b1; om_r_j_cnt[k] <= CWO'(n - a); end
      end
    end
  end

  typedef enum int {O_IDLE, O_WAIT_S, O_WAIT_ANS, O_BACKOFF, O_XMIT} ostate_e;
  ostate_e ost[NP];
  int o_need[NP], o_j[NP], o_c[NP], o_tmr[NP];
  int o_issued = 0, o_done = 0, n_o_multi = 0, n_o_partial = 0, n_o_back = 0;
  bit o_run = 1'b0;

  always @(posedge clk)
    if (rst_n)
      for (int s = 1; s < $clog2(NP); s++)
        for (int u = 0; u < NP; u++)
          if (dut.u_omega.bj_v[s][u]) n_o_back++;

  always @(posedge clk) begin
    if (!rst_n) begin
      om_p_q_v <= '0; om_p_l <= '0; om_p_q_cnt <= '0;
      for (int p = 0; p < NP; p++) ost[p] = O_IDLE;
    end else for (int p = 0; p < NP; p++) begin
      om_p_q_v[p] <= 1'b0; om_p_l[p] <= 1'b0;
      if (om_p_j_v[p]) o_j[p] += int'(om_p_j_cnt[p]);
      if (om_p_c_v[p]) o_c[p] += int'(om_p_c_cnt[p]);
      case (ost[p])
        O_IDLE: if (o_run && o_issued < OT && $urandom_range(0, 7) == 0) begin
          o_issued++;
          o_need[p] = $urandom_range(1, 2);
          if (o_need[p] == 2) n_o_multi++;
          ost[p] = O_WAIT_S;
        end
        O_WAIT_S: if (int'(om_p_s[p]) >= o_need[p]) begin
          om_p_q_v[p] <= 1'b1; om_p_q_cnt[p] <= CWO'(o_need[p]);
          o_j[p] = 0; o_c[p] = 0;
          ost[p] = O_WAIT_ANS;
        end
        O_WAIT_ANS: if (o_j[p] + o_c[p] >= o_need[p]) begin
          check("Omega rejects+completion equal query", o_j[p] + o_c[p], o_need[p]);
          if (o_c[p] == o_need[p]) begin
            o_tmr[p] = $urandom_range(3, 10);
            ost[p] = O_XMIT;
          end else begin
            if (o_c[p] > 0) begin n_o_partial++; om_p_l[p] <= 1'b1; end
            o_tmr[p] = $urandom_range(2, 24);
            ost[p] = O_BACKOFF;
          end
        end
        O_BACKOFF: begin
          o_tmr[p]--;
          if (o_tmr[p] == 0) ost[p] = O_WAIT_S;
        end
        O_XMIT: begin
          o_tmr[p]--;
          if (o_tmr[p] == 0) begin
            om_p_l[p] <= 1'b1; o_done++; ost[p] = O_IDLE;
          end
        end
        default: ost[p] = O_IDLE;
      endcase
    end
  end
  // one-bit data lines: a processor sends 1 while transmitting; the resources holding
  // its connection must see exactly as many ones as it was granted
  always_comb for (int p = 0; p < NP; p++) om_p_d[p] = (ost[p] == O_XMIT);
  always @(negedge clk) if (rst_n) begin
    automatic int sending = 0, seen = 0;
    for (int p = 0; p < NP; p++) if (ost[p] == O_XMIT) sending += o_need[p];
    for (int k = 0; k < NP; k++) if (om_r_d[k]) seen += o_conn[k];
    check("Omega data reaches the granted resources", seen, sending);
  end

  // ================================================================ shared bus
  int  s_rt[NR], s_pt[NP];
  int  s_issued = 0, s_done = 0, n_s_contend = 0, n_s_held = 0;
  bit  s_run = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin
      sb_res_free <= '1; sb_req <= '0; sb_done <= '0; sb_req_cnt <= '0;
    end else begin
      for (int r = 0; r < NR; r++) begin
        if (sb_res_start[r]) begin sb_res_free[r] <= 1'b0; s_rt[r] = $urandom_range(10, 120); end
        else if (!sb_res_free[r]) begin s_rt[r]--; if (s_rt[r] == 0) sb_res_free[r] <= 1'b1; end
      end
      if (!sb_bus_busy) begin
        automatic int elig = 0;
        for (int p = 0; p < NP; p++) begin
          if (sb_req[p] && sb_req_cnt[p] <= sb_free_cnt) elig++;
          if (sb_req[p] && sb_req_cnt[p] > sb_free_cnt) n_s_held++;
        end
        if (elig > 1) n_s_contend++;
      end
      for (int p = 0; p < NP; p++) begin
        sb_done[p] <= 1'b0;
        if (!sb_req[p] && s_pt[p] == 0 && s_run && s_issued < ST && $urandom_range(0, 3) == 0) begin
          s_issued++;
          sb_req[p] <= 1'b1; sb_req_cnt[p] <= CWS'($urandom_range(1, 2) * 4);
        end else if (sb_req[p] && sb_grant[p]) begin
          sb_req[p] <= 1'b0;
          check("shared bus resources reserved", $countones(sb_res_sel), int'(sb_req_cnt[p]));
          s_pt[p] = $urandom_range(1, 4);
        end else if (s_pt[p] > 0) begin
          s_pt[p]--;
          if (s_pt[p] == 0) begin sb_done[p] <= 1'b1; s_done++; end
        end
      end
    end
  end
  always_comb for (int p = 0; p < NP; p++) sb_proc_data[p] = DW'(p & 1);
  always @(negedge clk) if (rst_n && sb_bus_busy)
    for (int p = 0; p < NP; p++) if (sb_grant[p]) check("shared bus data", int'(sb_bus_data), p & 1);

  // ================================================================ private buses
  int  pv_rt[NP][RP], pv_pt[NP], pv_issued[NP], pv_done[NP], pv_two[NP];
  bit  pv_run = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin
      pb_res_free <= '1; pb_req <= '0; pb_done <= '0; pb_req_cnt <= '0;
      for (int p = 0; p < NP; p++) begin pv_pt[p] = 0; pv_issued[p] = 0; pv_done[p] = 0; pv_two[p] = 0; end
    end else for (int p = 0; p < NP; p++) begin
      for (int r = 0; r < RP; r++) begin
        if (pb_res_start[p][r]) begin pb_res_free[p][r] <= 1'b0; pv_rt[p][r] = $urandom_range(5, 30); end
        else if (!pb_res_free[p][r]) begin pv_rt[p][r]--; if (pv_rt[p][r] == 0) pb_res_free[p][r] <= 1'b1; end
      end
      pb_done[p] <= 1'b0;
      if (!pb_req[p] && pv_pt[p] == 0 && pv_run && pv_issued[p] < PT && $urandom_range(0, 3) == 0) begin
        pv_issued[p]++;
        pb_req[p] <= 1'b1; pb_req_cnt[p] <= CWP'($urandom_range(1, 2));
      end else if (pb_req[p] && pb_grant[p]) begin
        pb_req[p] <= 1'b0;
        check("private bus resources reserved", $countones(pb_res_sel[p]), int'(pb_req_cnt[p]));
        if (pb_req_cnt[p] == 2) pv_two[p]++;
        pv_pt[p] = $urandom_range(1, 4);
      end else if (pv_pt[p] > 0) begin
        pv_pt[p]--;
        if (pv_pt[p] == 0) begin pb_done[p] <= 1'b1; pv_done[p]++; end
      end
    end
  end
  always_comb for (int p = 0; p < NP; p++) pb_proc_data[p] = DW'(~p & 1);

  // ================================================================ run
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    x_run = 1'b1; o_run = 1'b1; s_run = 1'b1; pv_run = 1'b1;
    for (int t = 0; t < 60000; t++) begin
      automatic bit pv_all = 1'b1;
      for (int p = 0; p < NP; p++) if (pv_done[p] < PT) pv_all = 1'b0;
      if (x_done >= XT && o_done >= OT && s_done >= ST && pv_all) break;
      @(posedge clk);
    end
    x_run = 1'b0;
    repeat (200) @(posedge clk);
    check("cross-bar tasks finished", (x_done >= XT) ? 1 : 0, 1);
    check("Omega tasks finished", o_done, OT);
    check("shared bus tasks finished", s_done, ST);
    for (int p = 0; p < NP; p++) check($sformatf("private bus %0d tasks", p), pv_done[p], PT);
    for (int k = 0; k < NP; k++) check($sformatf("Omega port %0d free at end", k), o_free[k], RO);
    begin
      automatic int two_all = 1;
      for (int p = 0; p < NP; p++) if (pv_two[p] == 0) two_all = 0;
      check("private two-resource grant on every bus", two_all, 1);
    end
    checks += 8;
    if (n_x_unsat == 0)   begin failures++; $display("FAIL cross-bar: no unsatisfied request"); end
    if (n_x_reset == 0)   begin failures++; $display("FAIL cross-bar: no reset"); end
    if (n_x_contend == 0) begin failures++; $display("FAIL cross-bar: never more requests than free resources"); end
    if (n_o_back == 0)    begin failures++; $display("FAIL Omega: no backtracking"); end
    if (n_o_partial == 0) begin failures++; $display("FAIL Omega: no partial grant"); end
    if (n_o_multi == 0)   begin failures++; $display("FAIL Omega: no two-resource query"); end
    if (n_s_contend == 0) begin failures++; $display("FAIL shared bus: no contention"); end
    if (n_s_held == 0)    begin failures++; $display("FAIL shared bus: no request held back"); end
    $display("cross-bar: started=%0d done=%0d unsat=%0d resets=%0d contention=%0d",
             x_started, x_done, n_x_unsat, n_x_reset, n_x_contend);
    $display("Omega: done=%0d backtracks=%0d partial=%0d multi=%0d", o_done, n_o_back, n_o_partial, n_o_multi);
    $display("shared bus: done=%0d contention=%0d held_back=%0d", s_done, n_s_contend, n_s_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
