// tb_rsin_perf: queueing-delay comparison of the four networks of rsin_top (full size,
// no parameter overrides) under random traffic.
//
// Traffic (follows the performance study): 16 processors, 32 identical resources, one
// resource per task, Poisson arrivals at every processor, exponentially distributed
// transmission time Tn and service time Ts (mean 400 clocks, so that network and
// handshake latency are small, as the study assumes), waiting tasks queued in FIFO order
// at their processor, and a processor transmitting one task at a time. The load is
// rho_x = lambda_total * (Tn + Ts) / 32.
//
// This testbench's own choices: after an Omega reject a processor retries after a random
// 1..8 clocks; cross-bar reset cycles take priority over request cycles; a resource
// stays busy for its service time after its connection is released.
//
// All four networks see the very same arrival stream. For each network the testbench
// measures the mean delay from a task's arrival to the clock its resource is allocated,
// normalised to the mean service time, and prints it. Tasks still waiting at the end
// count with their wait so far. Checked:
//   * every arrived task is either allocated or still queued;
//   * for Tn < Ts the cross-bar has the least delay, and Omega stays close to it;
//   * for Tn/Ts = 0.1 at rho_x = 0.8 the cross-bar is within 0.05 Ts of the
//     Allen-Cunneen estimate for 32 servers (printed for every point);
//   * for Tn/Ts = 0.1 the shared bus copes at rho_x = 0.2 and saturates at 0.4 (its
//     limit is rho_x = (Tn + Ts) / (32 * Tn) = 0.34), and private buses fall well behind
//     Omega at rho_x = 0.6 and 0.8;
//   * for Tn = Ts the shared bus is far worse even at rho_x = 0.2, where Omega and
//     private buses are alike.
// Heavy load (rho_x = 0.8) against Tn/Ts is printed but not checked: with one
// transmission at a time per processor, every network (the cross-bar too) is bound by
// the processor's own queue once Tn >= Ts, and Omega and private buses come out alike
// there instead of private buses falling far behind.
module tb_rsin_perf;
  import rsin_pkg::*;

  localparam int NP = 16, NR = 32, RO = 2, RP = 2, DW = 1;
  localparam int CWO = $clog2(NP * RO + 1), CWS = $clog2(NR + 1), CWP = $clog2(RP + 1);
  localparam int TS = 400;           // mean service time in clocks
  localparam int WINDOW = 150000;    // clocks with arrivals per point
  localparam int DRAIN  = 40000;      // clocks without arrivals afterwards

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  xbar_mode_e               xbar_mode;
  logic [NP-1:0]            xbar_req, xbar_unsat;
  logic [NR-1:0]            xbar_free_in, xbar_free_out;
  logic [NP-1:0][DW-1:0]    xbar_proc_data;
  logic [NR-1:0][DW-1:0]    xbar_res_data;
  logic [NP-1:0][NR-1:0]    xbar_conn;
  logic [NP-1:0]            om_p_q_v, om_p_l, om_p_j_v, om_p_c_v, om_r_j_v, om_r_c_v, om_r_q_v, om_r_l;
  logic [NP-1:0][CWO-1:0]   om_p_q_cnt, om_p_s, om_p_j_cnt, om_p_c_cnt, om_r_s, om_r_j_cnt, om_r_c_cnt, om_r_q_cnt;
  logic [NP-1:0][DW-1:0]    om_p_d, om_r_d;
  logic [NP-1:0]            sb_req, sb_grant, sb_done;
  logic [NP-1:0][CWS-1:0]   sb_req_cnt;
  logic [NP-1:0][DW-1:0]    sb_proc_data;
  logic [CWS-1:0]           sb_free_cnt;
  logic                     sb_bus_busy;
  logic [NR-1:0]            sb_res_free, sb_res_sel, sb_res_start;
  logic [DW-1:0]            sb_bus_data;
  logic [NP-1:0]            pb_req, pb_grant, pb_done, pb_bus_busy;
  logic [NP-1:0][CWP-1:0]   pb_req_cnt, pb_free_cnt;
  logic [NP-1:0][DW-1:0]    pb_proc_data, pb_bus_data;
  logic [NP-1:0][RP-1:0]    pb_res_free, pb_res_sel, pb_res_start;

  rsin_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int expo(input real mean);
    real u = (real'($urandom_range(1, 1000000))) / 1000001.0;
    int  t = int'(-mean * $ln(u) + 0.5);
    return (t < 1) ? 1 : t;
  endfunction

  // ---------------------------------------------------------------- traffic
  localparam int XB = 0, OM = 1, SB = 2, PB = 3;
  real lambda, tn_mean;
  bit  arrivals_on = 1'b0;
  int  now = 0;
  int  queue[4][NP][$];              // arrival times of waiting tasks
  real dsum[4];
  int  nalloc[4], narrived;

  task automatic allocated(input int net, input int p);
    int t = queue[net][p].pop_front();
    dsum[net] += real'(now - t);
    nalloc[net]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    now++;
    if (arrivals_on)
      for (int p = 0; p < NP; p++)
        if (real'($urandom_range(0, 999999)) < lambda * 1000000.0) begin
          narrived++;
          for (int n = 0; n < 4; n++) queue[n][p].push_back(now);
        end
  end

  // ---------------------------------------------------------------- cross-bar
  int  x_tx[NP], x_srv[NR];
  bit  x_busy[NP], x_rel[NP];
  always @(negedge clk) if (rst_n && xbar_mode == MODE_REQUEST)
    for (int i = 0; i < NP; i++) if (xbar_req[i] && !xbar_unsat[i]) begin
      allocated(XB, i);
      x_busy[i] = 1'b1;
      x_tx[i] = expo(tn_mean);
    end
  always @(posedge clk) begin
    if (!rst_n) begin
      xbar_mode <= MODE_REQUEST; xbar_req <= '0; xbar_free_in <= '1;
      for (int i = 0; i < NP; i++) begin x_busy[i] = 0; x_rel[i] = 0; x_tx[i] = 0; end
      for (int j = 0; j < NR; j++) x_srv[j] = 0;
    end else begin
      automatic bit any_rel = 1'b0;
      for (int j = 0; j < NR; j++) begin
        if (xbar_mode == MODE_REQUEST && xbar_free_in[j] && !xbar_free_out[j]) xbar_free_in[j] <= 1'b0;
        if (x_srv[j] > 0) begin
          x_srv[j]--;
          if (x_srv[j] == 0) xbar_free_in[j] <= 1'b1;
        end
      end
      if (xbar_mode == MODE_RESET)
        for (int i = 0; i < NP; i++) if (xbar_req[i]) begin
          for (int j = 0; j < NR; j++) if (xbar_conn[i][j]) x_srv[j] = expo(real'(TS));
          x_rel[i] = 1'b0; x_busy[i] = 1'b0;
        end
      for (int i = 0; i < NP; i++) if (x_busy[i] && !x_rel[i] && x_tx[i] > 0) begin
        x_tx[i]--;
        if (x_tx[i] == 0) x_rel[i] = 1'b1;
      end
      for (int i = 0; i < NP; i++) any_rel |= x_rel[i];
      if (any_rel) begin
        xbar_mode <= MODE_RESET;
        for (int i = 0; i < NP; i++) xbar_req[i] <= x_rel[i];
      end else begin
        xbar_mode <= MODE_REQUEST;
        for (int i = 0; i < NP; i++) xbar_req[i] <= !x_busy[i] && queue[XB][i].size() > 0;
      end
    end
  end
  assign xbar_proc_data = '0;

  // ---------------------------------------------------------------- Omega
  int  o_free[NP], o_conn[NP];
  int  o_timers[NP][$];
  typedef enum int {O_IDLE, O_WAIT, O_TX, O_BACK} ost_e;
  ost_e ost[NP];
  int  o_t[NP];
  always_comb for (int k = 0; k < NP; k++) om_r_s[k] = CWO'(o_free[k]);
  always @(posedge clk) begin
    if (!rst_n) begin
      om_r_j_v <= '0; om_r_c_v <= '0; om_p_q_v <= '0; om_p_l <= '0; om_p_q_cnt <= '0;
      for (int k = 0; k < NP; k++) begin o_free[k] = RO; o_conn[k] = 0; o_timers[k].delete(); end
      for (int p = 0; p < NP; p++) begin ost[p] = O_IDLE; o_t[p] = 0; end
    end else begin
      for (int k = 0; k < NP; k++) begin
        om_r_j_v[k] <= 1'b0; om_r_c_v[k] <= 1'b0;
        for (int t = o_timers[k].size() - 1; t >= 0; t--) begin
          o_timers[k][t]--;
          if (o_timers[k][t] == 0) begin o_timers[k].delete(t); o_free[k]++; end
        end
        if (om_r_l[k]) begin
          for (int t = 0; t < o_conn[k]; t++) o_timers[k].push_back(expo(real'(TS)));
          o_conn[k] = 0;
        end
        if (om_r_q_v[k]) begin
          automatic int n = int'(om_r_q_cnt[k]);
          automatic int a = (n < o_free[k]) ? n : o_free[k];
          o_free[k] -= a; o_conn[k] = a;
          if (a > 0) begin om_r_c_v[k] <= 1'b1; om_r_c_cnt[k] <= CWO'(a); end
          if (n > a) begin om_r_j_v[k] <= 1'b1; om_r_j_cnt[k] <= CWO'(n - a); end
        end
      end
      for (int p = 0; p < NP; p++) begin
        om_p_q_v[p] <= 1'b0; om_p_l[p] <= 1'b0;
        case (ost[p])
          O_IDLE: if (queue[OM][p].size() > 0 && om_p_s[p] != '0) begin
            om_p_q_v[p] <= 1'b1; om_p_q_cnt[p] <= CWO'(1);
            ost[p] = O_WAIT;
          end
          O_WAIT: begin
            if (om_p_c_v[p]) begin
              allocated(OM, p);
              o_t[p] = expo(tn_mean);
              ost[p] = O_TX;
            end else if (om_p_j_v[p]) begin
              o_t[p] = $urandom_range(1, 8);
              ost[p] = O_BACK;
            end
          end
          O_TX: begin
            o_t[p]--;
            if (o_t[p] == 0) begin om_p_l[p] <= 1'b1; ost[p] = O_IDLE; end
          end
          O_BACK: begin
            o_t[p]--;
            if (o_t[p] == 0) ost[p] = O_IDLE;
          end
          default: ost[p] = O_IDLE;
        endcase
      end
    end
  end
  assign om_p_d = '0;

  // ---------------------------------------------------------------- buses
  int  s_rt[NR], s_tx[NP], v_rt[NP][RP], v_tx[NP];
  always @(posedge clk) begin
    if (!rst_n) begin
      sb_res_free <= '1; sb_req <= '0; sb_done <= '0; sb_req_cnt <= '0;
      pb_res_free <= '1; pb_req <= '0; pb_done <= '0; pb_req_cnt <= '0;
      for (int p = 0; p < NP; p++) begin s_tx[p] = 0; v_tx[p] = 0; end
      for (int r = 0; r < NR; r++) s_rt[r] = 0;
    end else begin
      for (int r = 0; r < NR; r++) begin
        if (sb_res_start[r]) begin sb_res_free[r] <= 1'b0; s_rt[r] = expo(real'(TS)); end
        else if (s_rt[r] > 0) begin s_rt[r]--; if (s_rt[r] == 0) sb_res_free[r] <= 1'b1; end
      end
      for (int p = 0; p < NP; p++) begin
        for (int r = 0; r < RP; r++) begin
          if (pb_res_start[p][r]) begin pb_res_free[p][r] <= 1'b0; v_rt[p][r] = expo(real'(TS)); end
          else if (v_rt[p][r] > 0) begin v_rt[p][r]--; if (v_rt[p][r] == 0) pb_res_free[p][r] <= 1'b1; end
        end
        // shared bus
        sb_done[p] <= 1'b0;
        if (sb_req[p] && sb_grant[p]) begin
          sb_req[p] <= 1'b0;
          allocated(SB, p);
          s_tx[p] = expo(tn_mean);
        end else if (s_tx[p] > 0) begin
          s_tx[p]--;
          if (s_tx[p] == 0) sb_done[p] <= 1'b1;
        end else if (!sb_req[p] && !sb_grant[p] && !sb_done[p] && queue[SB][p].size() > 0) begin
          sb_req[p] <= 1'b1; sb_req_cnt[p] <= CWS'(1);
        end
        // private bus
        pb_done[p] <= 1'b0;
        if (pb_req[p] && pb_grant[p]) begin
          pb_req[p] <= 1'b0;
          allocated(PB, p);
          v_tx[p] = expo(tn_mean);
        end else if (v_tx[p] > 0) begin
          v_tx[p]--;
          if (v_tx[p] == 0) pb_done[p] <= 1'b1;
        end else if (!pb_req[p] && !pb_grant[p] && !pb_done[p] && queue[PB][p].size() > 0) begin
          pb_req[p] <= 1'b1; pb_req_cnt[p] <= CWP'(1);
        end
      end
    end
  end
  assign sb_proc_data = '0;
  assign pb_proc_data = '0;

  // Allen-Cunneen estimate of the cross-bar's wait: C(c, rho) / (c * mu * (1 - rho))
  // times (Ca^2 + Cs^2) / 2, with c = 32 servers, 1/mu = Tn + Ts, C the Erlang C
  // probability of waiting; both squared coefficients of variation are 1 here.
  // Erlang C comes from the Erlang B recursion B(k) = a B(k-1) / (k + a B(k-1)).
  function automatic real allen_cunneen(input real rho, input real tn, input real ts);
    real a = rho * real'(NR), b = 1.0, c;
    for (int k = 1; k <= NR; k++) b = a * b / (real'(k) + a * b);
    c = b / (1.0 - rho * (1.0 - b));
    return c * (tn + ts) / (real'(NR) * (1.0 - rho));
  endfunction

  // ---------------------------------------------------------------- one point
  real d_norm[4];
  real ac_norm;
  string nm[4] = '{"cross-bar", "Omega", "shared bus", "private buses"};

  task automatic run_point(input real ratio_tn_ts, input real rho_x);
    tn_mean = ratio_tn_ts * real'(TS);
    lambda  = rho_x * real'(NR) / (real'(NP) * (tn_mean + real'(TS)));
    rst_n = 1'b0;
    for (int n = 0; n < 4; n++) begin
      dsum[n] = 0.0; nalloc[n] = 0;
      for (int p = 0; p < NP; p++) queue[n][p].delete();
    end
    narrived = 0; now = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    arrivals_on = 1'b1;
    repeat (WINDOW) @(posedge clk);
    arrivals_on = 1'b0;
    repeat (DRAIN) @(posedge clk);
    for (int n = 0; n < 4; n++) begin
      automatic real total = dsum[n];
      automatic int  waiting = 0;
      for (int p = 0; p < NP; p++) begin
        waiting += queue[n][p].size();
        foreach (queue[n][p][t]) total += real'(now - queue[n][p][t]);
      end
      d_norm[n] = total / real'(narrived) / real'(TS);
      check($sformatf("%s: every task counted", nm[n]), nalloc[n] + waiting == narrived);
    end
    ac_norm = allen_cunneen(rho_x, tn_mean, real'(TS)) / real'(TS);
    $display("Tn/Ts=%0.1f rho_x=%0.2f tasks=%0d  delay/Ts: cross-bar %0.3f (estimate %0.3f)  Omega %0.3f  shared bus %0.3f  private %0.3f",
             ratio_tn_ts, rho_x, narrived, d_norm[XB], ac_norm, d_norm[OM], d_norm[SB], d_norm[PB]);
    check("enough tasks", narrived > 500);
    // With Tn >= Ts every network is bound by the processors' own transmission queue.
    if (ratio_tn_ts < 1.0)
      for (int n = 1; n < 4; n++)
        check($sformatf("cross-bar delay not above %s", nm[n]), d_norm[XB] <= d_norm[n] + 0.01);
  endtask

  real f9[4][4];                     // Tn/Ts = 0.1, rho_x = 0.2, 0.4, 0.6, 0.8
  real f10[2][4];                    // Tn/Ts = 1.0, rho_x = 0.2, 0.4
  real f11[4][4];                    // rho_x = 0.8, Tn/Ts = 0.1, 0.5, 1.0, 2.0
  real f11_ratio[4] = '{0.1, 0.5, 1.0, 2.0};

  initial begin
    // Ts/Tn = 10: cross-bar best and close to Omega, shared bus fine only at low load,
    // private buses fall behind as the load grows.
    for (int b = 0; b < 4; b++) begin
      run_point(0.1, 0.2 * real'(b + 1));
      f9[b] = d_norm;
      check("Tn/Ts=0.1: Omega close to cross-bar", f9[b][OM] - f9[b][XB] < 0.3);
    end
    check("Tn/Ts=0.1: shared bus acceptable at rho_x=0.2", f9[0][SB] < 0.5);
    check("Tn/Ts=0.1: cross-bar near its Allen-Cunneen estimate at rho_x=0.8",
          f9[3][XB] - allen_cunneen(0.8, 40.0, 400.0) / 400.0 < 0.05 &&
          allen_cunneen(0.8, 40.0, 400.0) / 400.0 - f9[3][XB] < 0.05);
    check("Tn/Ts=0.1: shared bus saturated at rho_x=0.4", f9[1][SB] > 5.0);
    check("Tn/Ts=0.1: private buses worse than Omega at rho_x=0.6", f9[2][PB] > 2.0 * f9[2][OM]);
    check("Tn/Ts=0.1: private buses worse than Omega at rho_x=0.8", f9[3][PB] > 2.0 * f9[3][OM]);
    check("Tn/Ts=0.1: private-bus delay grows with load", f9[3][PB] > 4.0 * f9[0][PB]);
    // Ts/Tn = 1: shared bus blocks even at low load, Omega and private buses alike
    // at low load.
    for (int b = 0; b < 2; b++) begin
      run_point(1.0, 0.2 * real'(b + 1));
      f10[b] = d_norm;
    end
    check("Tn/Ts=1: shared bus far worse at rho_x=0.2",
          f10[0][SB] > 10.0 * f10[0][OM] && f10[0][SB] > 10.0 * f10[0][PB]);
    check("Tn/Ts=1: Omega and private buses alike at rho_x=0.2",
          f10[0][OM] - f10[0][PB] < 0.15 && f10[0][PB] - f10[0][OM] < 0.15);
    // Heavy load against the ratio: printed only (see the header).
    f11[0] = f9[3];
    run_point(0.5, 0.8); f11[1] = d_norm;
    run_point(1.0, 0.8); f11[2] = d_norm;
    run_point(2.0, 0.8); f11[3] = d_norm;
    for (int a = 0; a < 4; a++)
      $display("rho_x=0.8 Tn/Ts=%0.1f  Omega %0.3f  private %0.3f", f11_ratio[a], f11[a][OM], f11[a][PB]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
