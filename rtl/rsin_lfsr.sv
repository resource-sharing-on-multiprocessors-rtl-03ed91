// rsin_lfsr: free-running 16-bit Fibonacci LFSR (taps 16,14,13,11) used where the
// scheduling rules call for a random choice: a tie between two output ports of an
// Omega exchange box, and the shared-bus arbitrator picking one of several requests.
// The LFSR advances every clock; rnd is its current state. SEED sets the reset value
// (any non-zero value) so that different instances do not move in lock-step.
// The choice of an LFSR as the random source is this design's own.
module rsin_lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rnd
);
  logic fb;
  assign fb = rnd[15] ^ rnd[13] ^ rnd[12] ^ rnd[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd <= (SEED == 16'h0) ? 16'h0001 : SEED;
    else        rnd <= {rnd[14:0], fb};
  end
endmodule
