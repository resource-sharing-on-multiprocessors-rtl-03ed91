// xbar_cell: one cell C(i,j) of the distributed-scheduling cross-bar switch.
//
// The cell sits where the row of processor i crosses the column of resource j. The row
// carries the request signal X (processor i looks for a free resource, or in reset mode
// wants to give its resources back); the column carries the free signal Y (resource j
// can take a task). A control latch L records that processor i is connected to
// resource j. The logic is the cell's truth table:
//
//   request mode:  X(i,j+1) = X & ~Y        set = X & Y       reset = 0
//                  Y(i+1,j) = ~X & Y & ~L
//   reset mode:    X(i,j+1) = X             set = 0           reset = X
//                  Y(i+1,j) = Y
//   both modes:    DO(i,j)  = (L ? DI(i) : 0) | DO(i+1,j)
//
// So a request is absorbed by the first free resource it meets and the free signal of
// that resource is absorbed by the first request it meets; a free signal is also
// blocked by a cell whose latch is already on, so a connection made in an earlier
// request cycle is never disturbed. The data of processor i is ORed onto column j
// whenever the latch is on, and reaches the resource at the top of the column.
//
// Timing: X and Y propagate combinationally through the cell. The document's latch is a
// set/reset latch settled asynchronously at the end of a cycle; here it is a flip-flop
// loaded on the rising clock edge, so one clock is one request or reset cycle. Reset
// (rst_n low) clears the latch, which is this design's choice.
module xbar_cell
  import rsin_pkg::*;
#(
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  xbar_mode_e        mode,
  input  logic              x_in,     // X(i,j)   from the left
  input  logic              y_in,     // Y(i,j)   from above
  output logic              x_out,    // X(i,j+1) to the right
  output logic              y_out,    // Y(i+1,j) downwards
  input  logic [DATA_W-1:0] di,       // DI(i)    processor data along the row
  input  logic [DATA_W-1:0] do_in,    // DO(i+1,j) column data from below
  output logic [DATA_W-1:0] do_out,   // DO(i,j)  column data upwards
  output logic              latch_q   // L(i,j)   connection state
);
  logic set_s, reset_s;

  always_comb begin
    if (mode == MODE_REQUEST) begin
      x_out   = x_in & ~y_in;
      y_out   = ~x_in & y_in & ~latch_q;
      set_s   = x_in & y_in;
      reset_s = 1'b0;
    end else begin
      x_out   = x_in;
      y_out   = y_in;
      set_s   = 1'b0;
      reset_s = x_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       latch_q <= 1'b0;
    else if (set_s)   latch_q <= 1'b1;
    else if (reset_s) latch_q <= 1'b0;
  end

  assign do_out = (latch_q ? di : '0) | do_in;
endmodule
