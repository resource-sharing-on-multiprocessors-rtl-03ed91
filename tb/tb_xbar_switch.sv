// tb_xbar_switch: self-checking test of the cross-bar switch with processors and
// resources modelled around it.
//
// 8 processors and 6 resources, so requests often outnumber free resources. Each clock
// is a request cycle or (one time in three) a reset cycle. Processors raise random
// requests; a resource lowers its free line in the clock after it sees itself taken
// (free_out = 0 while free_in = 1), and raises it again some time after nobody holds it.
// A reference model walks the processors in index order and gives each requester the
// lowest-numbered resource whose free signal reaches it, which is what the wave of
// signals through the array does. Checked every cycle: unsat, free_out, every latch and
// every resource's data. Counted: granted requests, unsatisfied requests, free signals
// absorbed by a latch set in an earlier cycle, and resets; each must occur.
module tb_xbar_switch;
  import rsin_pkg::*;

  localparam int NP = 8, NR = 6, DW = 3;

  logic                      clk = 1'b0, rst_n = 1'b0;
  xbar_mode_e                mode;
  logic [NP-1:0]             req, unsat;
  logic [NR-1:0]             free_in, free_out;
  logic [NP-1:0][DW-1:0]     proc_data;
  logic [NR-1:0][DW-1:0]     res_data;
  logic [NP-1:0][NR-1:0]     conn, conn_m;
  int checks = 0, failures = 0;
  int n_grant = 0, n_unsat = 0, n_latch_block = 0, n_reset = 0;

  xbar_switch #(.N_PROC(NP), .N_RES(NR), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  initial begin
    logic [NR-1:0]         col_y, ex_free_out;
    logic [NP-1:0]         ex_unsat;
    logic [NP-1:0][NR-1:0] conn_next;
    logic [NR-1:0][DW-1:0] ex_data;
    logic                  xr;

    mode = MODE_REQUEST; req = '0; free_in = '1; proc_data = '0; conn_m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      mode = ($urandom_range(0, 2) == 0) ? MODE_RESET : MODE_REQUEST;
      for (int i = 0; i < NP; i++) begin
        req[i] = (mode == MODE_REQUEST) ? ($urandom_range(0, 2) == 0) : ($urandom_range(0, 3) == 0);
        proc_data[i] = DW'($urandom);
      end
      #1;
      // reference model
      conn_next = conn_m;
      if (mode == MODE_REQUEST) begin
        col_y = free_in;
        for (int i = 0; i < NP; i++) begin
          xr = req[i];
          for (int j = 0; j < NR; j++) begin
            if (xr && col_y[j]) begin
              conn_next[i][j] = 1'b1;
              xr = 1'b0;
              col_y[j] = 1'b0;
              n_grant++;
            end else if (!xr && col_y[j] && conn_m[i][j]) begin
              col_y[j] = 1'b0;
              n_latch_block++;
            end
          end
          ex_unsat[i] = xr;
          if (xr) n_unsat++;
        end
        ex_free_out = col_y;
      end else begin
        for (int i = 0; i < NP; i++) if (req[i]) begin
          conn_next[i] = '0;
          n_reset++;
        end
        ex_unsat    = req;
        ex_free_out = free_in;
      end
      for (int j = 0; j < NR; j++) begin
        ex_data[j] = '0;
        for (int i = 0; i < NP; i++) if (conn_m[i][j]) ex_data[j] |= proc_data[i];
      end
      check("unsat", 64'(unsat), 64'(ex_unsat));
      check("free_out", 64'(free_out), 64'(ex_free_out));
      check("res_data", 64'(res_data), 64'(ex_data));
      check("conn", 64'(conn), 64'(conn_m));
      @(posedge clk);
      // resources: a taken resource lowers its free line, at once or one request
      // cycle later (its free signal is then absorbed by the latch); a resource nobody holds
      // finishes its service at some random later time and raises it again
      for (int j = 0; j < NR; j++) begin
        logic held;
        held = 1'b0;
        for (int i = 0; i < NP; i++) held |= conn_next[i][j];
        if (mode == MODE_REQUEST && free_in[j] && !free_out[j] && $urandom_range(0, 1) == 1)
          free_in[j] <= 1'b0;
        else if (!free_in[j] && !held && $urandom_range(0, 3) == 0) free_in[j] <= 1'b1;
      end
      conn_m = conn_next;
    end
    @(negedge clk);
    check("final conn", 64'(conn), 64'(conn_m));
    checks += 4;
    if (n_grant == 0)       begin failures++; $display("FAIL no grant"); end
    if (n_unsat == 0)       begin failures++; $display("FAIL no unsatisfied request"); end
    if (n_latch_block == 0) begin failures++; $display("FAIL no free signal blocked by a latch"); end
    if (n_reset == 0)       begin failures++; $display("FAIL no reset"); end
    $display("grants=%0d unsat=%0d latch_blocks=%0d resets=%0d", n_grant, n_unsat, n_latch_block, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
