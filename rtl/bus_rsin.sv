// bus_rsin: resource sharing over a single shared bus.
//
// All N_RES resources hang on one bus shared by N_PROC processors. The bus broadcasts
// free_cnt, the number of resources that are free and not yet promised to anyone.
// A processor whose request needs no more than free_cnt resources raises req with
// req_cnt. When several do so at once, an arbitrator picks one of them at random and
// the others stay queued at their processors. The winner gets grant, the lowest-numbered
// free resources (req_cnt of them) are reserved for it, and it transmits its task over
// the bus (bus_data, delivered to the resources marked in res_sel). When it pulses
// done, res_start tells those resources to begin service and the bus becomes idle.
// A resource raises res_free while idle and must lower it in the clock after res_start.
//
// The same block with N_PROC = 1 and a few resources is a processor with a private bus
// and private resources.
//
// Timing: an arbitration happens in any clock in which the bus is idle and some request
// is eligible; grant rises on the next edge and stays high until the edge after done.
// rst_n clears the bus state.
//
// Broadcasting the free count, the eligibility rule, random arbitration and queueing of
// losers follow the document. The LFSR-based random pick (random starting point of a
// round scan), lowest-index resource allocation and the done/res_start handshake are
// this design's choices.
module bus_rsin #(
  parameter int unsigned N_PROC = 16,
  parameter int unsigned N_RES  = 32,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned CW     = $clog2(N_RES + 1),
  parameter logic [15:0] SEED   = 16'hB5A3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processors
  input  logic [N_PROC-1:0]             req,
  input  logic [N_PROC-1:0][CW-1:0]     req_cnt,
  output logic [N_PROC-1:0]             grant,
  input  logic [N_PROC-1:0]             done,
  input  logic [N_PROC-1:0][DATA_W-1:0] proc_data,
  output logic [CW-1:0]                 free_cnt,
  output logic                          bus_busy,
  // resources
  input  logic [N_RES-1:0]              res_free,
  output logic [N_RES-1:0]              res_sel,
  output logic [N_RES-1:0]              res_start,
  output logic [DATA_W-1:0]             bus_data
);
  localparam int unsigned IW = (N_PROC > 1) ? $clog2(N_PROC) : 1;

  logic [N_RES-1:0]  reserved, alloc_q, avail, alloc_n;
  logic [IW-1:0]     owner, pick;
  logic              pick_v;
  logic [N_PROC-1:0] elig;
  logic [15:0]       rnd;

  rsin_lfsr #(.SEED(SEED)) u_rnd (.clk(clk), .rst_n(rst_n), .rnd(rnd));

  assign avail = res_free & ~reserved;

  always_comb begin
    free_cnt = '0;
    for (int r = 0; r < N_RES; r++) free_cnt = free_cnt + CW'(avail[r]);
  end

  // eligible requests and the random pick among them
  always_comb begin
    automatic int unsigned start = int'(rnd) % N_PROC;
    for (int p = 0; p < N_PROC; p++)
      elig[p] = req[p] && (req_cnt[p] != '0) && (req_cnt[p] <= free_cnt);
    pick_v = 1'b0;
    pick   = '0;
    for (int o = N_PROC - 1; o >= 0; o--) begin
      automatic int unsigned p = (start + o) % N_PROC;
      if (elig[p]) begin
        pick_v = 1'b1;
        pick   = IW'(p);
      end
    end
  end

  // the lowest-numbered free resources, as many as the picked request needs
  always_comb begin
    automatic logic [CW-1:0] n = '0;
    alloc_n = '0;
    for (int r = 0; r < N_RES; r++) begin
      if (avail[r] && n < req_cnt[pick]) begin
        alloc_n[r] = 1'b1;
        n = n + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_busy  <= 1'b0;
      owner     <= '0;
      alloc_q   <= '0;
      reserved  <= '0;
      res_start <= '0;
    end else begin
      res_start <= '0;
      reserved  <= reserved & res_free;
      if (!bus_busy) begin
        if (pick_v) begin
          bus_busy <= 1'b1;
          owner    <= pick;
          alloc_q  <= alloc_n;
          reserved <= (reserved | alloc_n) & res_free;
        end
      end else if (done[owner]) begin
        bus_busy  <= 1'b0;
        res_start <= alloc_q;
        alloc_q   <= '0;
      end
    end
  end

  always_comb begin
    grant = '0;
    if (bus_busy) grant[owner] = 1'b1;
  end

  assign res_sel  = bus_busy ? alloc_q : '0;
  assign bus_data = bus_busy ? proc_data[owner] : '0;

  // a granted transmission always has resources behind it
  a_grant_has_res: assert property (@(posedge clk) disable iff (!rst_n)
      $rose(bus_busy) |-> (alloc_q != '0))
    else $error("bus_rsin: bus granted with no resource allocated");
endmodule
