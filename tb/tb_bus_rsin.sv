// tb_bus_rsin: self-checking test of the shared-bus resource sharing network.
//
// Six processors and five resources. Processors ask for one to three resources at
// random times, keep req high until granted, send their task for a few clocks and then
// pulse done. A resource goes busy on res_start and is free again after a random
// service time. Each clock the testbench checks, from its own bookkeeping, the
// broadcast free count, that a grant goes only to a request that was eligible (not more
// resources than free) in the clock the bus was idle, that exactly that many free,
// unpromised resources are reserved, that the bus carries the owner's data, and that
// done starts exactly the reserved resources. Counted and required: contention between
// eligible requests with a winner other than the lowest index (random arbitration),
// requests held back because too few resources were free, and multi-resource grants.
module tb_bus_rsin;
  localparam int NP = 6, NR = 5, DW = 4;
  localparam int CW = $clog2(NR + 1);

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0]          req, grant, done;
  logic [NP-1:0][CW-1:0]  req_cnt;
  logic [NP-1:0][DW-1:0]  proc_data;
  logic [CW-1:0]          free_cnt;
  logic                   bus_busy;
  logic [NR-1:0]          res_free, res_sel, res_start;
  logic [DW-1:0]          bus_data;

  int checks = 0, failures = 0;
  int n_contend_nonlowest = 0, n_contend = 0, n_held_back = 0, n_multi = 0, n_grants = 0;

  bus_rsin #(.N_PROC(NP), .N_RES(NR), .DATA_W(DW)) dut (.*);

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

  function automatic int ones(input logic [NR-1:0] v);
    int n = 0;
    for (int r = 0; r < NR; r++) n += int'(v[r]);
    return n;
  endfunction

  // resources
  int rtimer[NR];
  always @(posedge clk) begin
    if (!rst_n) res_free <= '1;
    else for (int r = 0; r < NR; r++) begin
      if (res_start[r]) begin
        res_free[r] <= 1'b0;
        rtimer[r] = $urandom_range(5, 40);
      end else if (!res_free[r]) begin
        rtimer[r]--;
        if (rtimer[r] == 0) res_free[r] <= 1'b1;
      end
    end
  end

  // processors
  typedef enum int {P_IDLE, P_REQ, P_XMIT} pstate_e;
  pstate_e pst[NP];
  int ptimer[NP];
  int issued = 0, finished = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      req <= '0; done <= '0;
      for (int p = 0; p < NP; p++) pst[p] = P_IDLE;
    end else for (int p = 0; p < NP; p++) begin
      done[p] <= 1'b0;
      case (pst[p])
        P_IDLE: if (issued < 300 && $urandom_range(0, 9) == 0) begin
          issued++;
          req[p] <= 1'b1;
          req_cnt[p] <= CW'($urandom_range(1, 3));
          pst[p] = P_REQ;
        end
        P_REQ: if (grant[p]) begin
          req[p] <= 1'b0;
          ptimer[p] = $urandom_range(1, 6);
          pst[p] = P_XMIT;
        end
        P_XMIT: begin
          ptimer[p]--;
          if (ptimer[p] == 0) begin
            done[p] <= 1'b1;
            finished++;
            pst[p] = P_IDLE;
          end
        end
        default: pst[p] = P_IDLE;
      endcase
    end
  end
  always_comb for (int p = 0; p < NP; p++) proc_data[p] = DW'(p + 1);

  // checker
  logic [NR-1:0] promised, sel_prev, starting;
  logic          busy_prev;
  logic [NP-1:0] elig_prev;
  int            free_prev;
  always @(posedge clk) begin
    if (!rst_n) begin
      promised = '0; starting = '0; busy_prev = 1'b0; elig_prev = '0; sel_prev = '0;
    end else begin
      #1;
      // state after the edge
      if (bus_busy && !busy_prev) begin
        automatic int w = -1;
        for (int p = 0; p < NP; p++) if (grant[p]) w = p;
        n_grants++;
        checks++;
        if (w < 0 || !elig_prev[w]) begin
          failures++;
          $display("FAIL grant to a processor that was not eligible at %0t", $time);
        end else begin
          check("resources reserved", ones(res_sel), int'(req_cnt[w]));
          checks++;
          if ((res_sel & ~(res_free & ~promised)) != '0) begin
            failures++;
            $display("FAIL reserved a resource that was busy or promised at %0t", $time);
          end
          if (ones(res_sel) > 1) n_multi++;
          if (ones(elig_prev) > 1) begin
            n_contend++;
            for (int p = 0; p < w; p++) if (elig_prev[p]) begin n_contend_nonlowest++; break; end
          end
        end
        promised |= res_sel;
      end
      check("free count", int'(free_cnt), ones(res_free & ~promised));
      if (bus_busy) begin
        automatic int w = 0;
        for (int p = 0; p < NP; p++) if (grant[p]) w = p;
        check("one grant", $countones(grant), 1);
        check("bus data", int'(bus_data), w + 1);
      end
      if (res_start != '0) begin
        check("started = reserved", int'(res_start), int'(sel_prev));
        starting |= res_start;
      end
      // a started resource stays promised until it reports itself busy
      promised &= ~(starting & ~res_free);
      starting &= res_free;
      // eligibility of the requests for the next clock, as the arbitrator sees it
      elig_prev = '0;
      for (int p = 0; p < NP; p++) begin
        if (req[p] && int'(req_cnt[p]) <= ones(res_free & ~promised)) elig_prev[p] = 1'b1;
        if (req[p] && !bus_busy && int'(req_cnt[p]) > ones(res_free & ~promised)) n_held_back++;
      end
      if (bus_busy) elig_prev = '0;
      busy_prev = bus_busy;
      sel_prev  = res_sel;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100000 && finished < 300; t++) @(posedge clk);
    check("all tasks transmitted", finished, 300);
    checks += 4;
    if (n_contend_nonlowest == 0) begin failures++; $display("FAIL arbitration never chose past the lowest index"); end
    if (n_held_back == 0)         begin failures++; $display("FAIL no request held back"); end
    if (n_multi == 0)             begin failures++; $display("FAIL no multi-resource grant"); end
    if (n_grants == 0)            begin failures++; $display("FAIL no grant"); end
    $display("grants=%0d contention=%0d nonlowest=%0d held_back=%0d multi=%0d",
             n_grants, n_contend, n_contend_nonlowest, n_held_back, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
