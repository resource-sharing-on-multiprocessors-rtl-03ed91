// xbar_switch: N_PROC x N_RES cross-bar switch that schedules resources without a
// central scheduler.
//
// Processor i raises req[i] (X(i,0)) to look for any free resource; resource j raises
// free_in[j] (Y(0,j)) while it can accept a task. The request travels right along row
// i and the free signal travels down column j; the first cell where both meet sets its
// latch and absorbs both signals. The wave therefore runs from the top-left corner to
// the bottom-right one, and processors with lower indices win when requests collide.
//
// Boundary signals returned at the end of the cycle:
//   unsat[i]    = X(i,N_RES): the request of processor i was not satisfied and must be
//                 raised again in a later request cycle;
//   free_out[j] = Y(N_PROC,j): resource j was not taken and keeps free_in high;
//                 when it reads 0 after a request cycle in which free_in was 1, the
//                 resource has been allocated and lowers free_in.
//   res_data[j] = DO(0,j): data of the processor connected to resource j (0 if none).
//   conn[i][j]  = L(i,j): processor i holds resource j.
// In reset mode (mode = MODE_RESET) req[i] clears every latch of row i.
//
// Timing: one clock is one request or reset cycle. req must be a one-clock pulse in a
// request cycle (X returns to 0 at the end of each mode); unsat and free_out are valid
// combinationally in that clock and the latches change on its closing edge. The
// request-cycle path is about four gates per cell along n+m cells, the reset path one
// gate per cell. Sizes default to the 16 x 32 switch of the performance comparison.
module xbar_switch
  import rsin_pkg::*;
#(
  parameter int unsigned N_PROC = 16,
  parameter int unsigned N_RES  = 32,
  parameter int unsigned DATA_W = 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  xbar_mode_e                     mode,
  input  logic [N_PROC-1:0]              req,
  output logic [N_PROC-1:0]              unsat,
  input  logic [N_RES-1:0]               free_in,
  output logic [N_RES-1:0]               free_out,
  input  logic [N_PROC-1:0][DATA_W-1:0]  proc_data,
  output logic [N_RES-1:0][DATA_W-1:0]   res_data,
  output logic [N_PROC-1:0][N_RES-1:0]   conn
);
  // x[i][j] enters cell (i,j) from the left; y[i][j] enters from above;
  // d[i][j] leaves cell (i,j) upwards.
  logic [N_PROC-1:0][N_RES:0]           x;
  logic [N_PROC:0][N_RES-1:0]           y;
  logic [N_PROC:0][N_RES-1:0][DATA_W-1:0] d;

  for (genvar i = 0; i < N_PROC; i++) begin : g_row_edge
    assign x[i][0] = req[i];
    assign unsat[i] = x[i][N_RES];
  end

  for (genvar j = 0; j < N_RES; j++) begin : g_col_edge
    assign y[0][j]      = free_in[j];
    assign free_out[j]  = y[N_PROC][j];
    assign d[N_PROC][j] = '0;
    assign res_data[j]  = d[0][j];
  end

  for (genvar i = 0; i < N_PROC; i++) begin : g_row
    for (genvar j = 0; j < N_RES; j++) begin : g_col
      xbar_cell #(.DATA_W(DATA_W)) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .mode    (mode),
        .x_in    (x[i][j]),
        .y_in    (y[i][j]),
        .x_out   (x[i][j+1]),
        .y_out   (y[i+1][j]),
        .di      (proc_data[i]),
        .do_in   (d[i+1][j]),
        .do_out  (d[i][j]),
        .latch_q (conn[i][j])
      );
    end
  end
endmodule
