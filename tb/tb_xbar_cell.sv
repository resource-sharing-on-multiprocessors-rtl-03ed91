// tb_xbar_cell: self-checking test of one cross-bar cell.
//
// Drives random mode, X, Y and data for 400 clocks and compares the cell's outputs
// with the cell's truth table written out here in words of the rows (request mode: a
// request passes a busy resource, a free resource passes an idle cell whose latch is
// off; reset mode: both pass unchanged and X clears the latch). The expected latch
// state is tracked alongside. Also checks that every row of both truth tables was hit.
module tb_xbar_cell;
  import rsin_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  xbar_mode_e mode;
  logic       x_in, y_in, x_out, y_out, latch_q;
  logic [3:0] di, do_in, do_out;
  int         checks = 0, failures = 0;
  logic       l_model;
  int         rows_hit [2][4];

  xbar_cell #(.DATA_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (mode=%0d x=%0b y=%0b L=%0b)",
               what, got, exp, mode, x_in, y_in, l_model);
    end
  endtask

  initial begin
    logic ex_x, ex_y;
    mode = MODE_REQUEST; x_in = 0; y_in = 0; di = 0; do_in = 0;
    l_model = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      mode  = xbar_mode_e'($urandom_range(0, 1));
      x_in  = 1'($urandom_range(0, 1));
      y_in  = 1'($urandom_range(0, 1));
      di    = 4'($urandom);
      do_in = 4'($urandom);
      #1;
      rows_hit[mode][{x_in, y_in}]++;
      if (mode == MODE_REQUEST) begin
        ex_x = (x_in && !y_in);
        ex_y = (!x_in && y_in && !l_model);
      end else begin
        ex_x = x_in;
        ex_y = y_in;
      end
      check("x_out", {3'b0, x_out}, {3'b0, ex_x});
      check("y_out", {3'b0, y_out}, {3'b0, ex_y});
      check("do_out", do_out, (l_model ? di : 4'h0) | do_in);
      @(posedge clk);
      if (mode == MODE_REQUEST && x_in && y_in) l_model = 1'b1;
      if (mode == MODE_RESET && x_in)           l_model = 1'b0;
      #1;
      check("latch", {3'b0, latch_q}, {3'b0, l_model});
    end
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rows_hit[m][r] == 0) begin
          failures++;
          $display("FAIL truth-table row mode=%0d xy=%0d never exercised", m, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
