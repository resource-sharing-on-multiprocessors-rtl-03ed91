// omega_rsin: N x N Omega network of omega_xbox exchange boxes used as a resource
// sharing interconnection network.
//
// The network has log2(N) stages of N/2 boxes. Before every stage the links go through
// a perfect shuffle: link u of the previous stage feeds input position
// rotate-left(u), so box b of every stage receives links b and b + N/2 (input 0 and 1)
// and drives links 2b and 2b+1 of the next stage. Processor i is link i in front of
// stage 0; output link j of the last stage is resource port j, behind which sit the
// R_PER_PORT resources of that port.
//
// A processor reads p_s[i] (resources currently reachable from its link), sends a query
// p_q_v/p_q_cnt for the number of resources it needs, and later gets one completion
// (p_c_*) for the resources found and possibly rejects (p_j_*) for those not found;
// their counts add up to the query. It then sends its task on p_d and ends the
// connection with p_l. A resource port reports r_s[j] free resources, answers each
// query r_q_* with a completion r_c_* and/or reject r_j_*, and sees releases on r_l.
// Request routing is fully distributed: every box decides on its own, and a request
// blocked in one stage is sent back and re-routed by the stage before it.
//
// Timing: each box adds two clocks to a query on its way down and one clock to a
// reject or completion on its way back up; the status levels take one clock per box.
// Defaults are the 16 x 16 network with two resources per port of the performance
// comparison. The cube network differs only by a renaming of ports and is not built
// separately.
module omega_rsin #(
  parameter int unsigned N          = 16,
  parameter int unsigned R_PER_PORT = 2,
  parameter int unsigned DATA_W     = 1,
  parameter int unsigned CW         = $clog2(N * R_PER_PORT + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor side
  input  logic [N-1:0]                p_q_v,
  input  logic [N-1:0][CW-1:0]        p_q_cnt,
  input  logic [N-1:0]                p_l,
  output logic [N-1:0][CW-1:0]        p_s,
  output logic [N-1:0]                p_j_v,
  output logic [N-1:0][CW-1:0]        p_j_cnt,
  output logic [N-1:0]                p_c_v,
  output logic [N-1:0][CW-1:0]        p_c_cnt,
  input  logic [N-1:0][DATA_W-1:0]    p_d,
  // resource side
  input  logic [N-1:0][CW-1:0]        r_s,
  input  logic [N-1:0]                r_j_v,
  input  logic [N-1:0][CW-1:0]        r_j_cnt,
  input  logic [N-1:0]                r_c_v,
  input  logic [N-1:0][CW-1:0]        r_c_cnt,
  output logic [N-1:0]                r_q_v,
  output logic [N-1:0][CW-1:0]        r_q_cnt,
  output logic [N-1:0]                r_l,
  output logic [N-1:0][DATA_W-1:0]    r_d
);
  localparam int unsigned LOG = $clog2(N);

  // link[s][u]: forward signals driven by stage s-1 (processors for s = 0),
  // backward signals driven by stage s (resource ports for s = LOG)
  logic [N-1:0]             fq_v [LOG+1];
  logic [N-1:0][CW-1:0]     fq_c [LOG+1];
  logic [N-1:0]             fl   [LOG+1];
  logic [N-1:0][DATA_W-1:0] fd   [LOG+1];
  logic [N-1:0][CW-1:0]     bs   [LOG+1];
  logic [N-1:0]             bj_v [LOG+1];
  logic [N-1:0][CW-1:0]     bj_c [LOG+1];
  logic [N-1:0]             bc_v [LOG+1];
  logic [N-1:0][CW-1:0]     bc_c [LOG+1];

  assign fq_v[0] = p_q_v;
  assign fq_c[0] = p_q_cnt;
  assign fl[0]   = p_l;
  assign fd[0]   = p_d;
  assign p_s     = bs[0];
  assign p_j_v   = bj_v[0];
  assign p_j_cnt = bj_c[0];
  assign p_c_v   = bc_v[0];
  assign p_c_cnt = bc_c[0];

  assign r_q_v       = fq_v[LOG];
  assign r_q_cnt     = fq_c[LOG];
  assign r_l         = fl[LOG];
  assign r_d         = fd[LOG];
  assign bs[LOG]     = r_s;
  assign bj_v[LOG]   = r_j_v;
  assign bj_c[LOG]   = r_j_cnt;
  assign bc_v[LOG]   = r_c_v;
  assign bc_c[LOG]   = r_c_cnt;

  for (genvar s = 0; s < LOG; s++) begin : g_stage
    for (genvar b = 0; b < N / 2; b++) begin : g_box
      // perfect shuffle: input 0 from link b, input 1 from link b + N/2
      localparam int unsigned U0 = b;
      localparam int unsigned U1 = b + N / 2;
      localparam int unsigned O0 = 2 * b;
      localparam int unsigned O1 = 2 * b + 1;

      logic [1:0]              q_in_v, l_in, j_out_v, c_out_v, j_in_v, c_in_v, q_out_v, l_out;
      logic [1:0][CW-1:0]      q_in_cnt, s_out, j_out_cnt, c_out_cnt;
      logic [1:0][CW-1:0]      s_in, j_in_cnt, c_in_cnt, q_out_cnt;
      logic [1:0][DATA_W-1:0]  d_in, d_out;

      assign q_in_v   = {fq_v[s][U1], fq_v[s][U0]};
      assign q_in_cnt = {fq_c[s][U1], fq_c[s][U0]};
      assign l_in     = {fl[s][U1],   fl[s][U0]};
      assign d_in     = {fd[s][U1],   fd[s][U0]};
      assign bs[s][U0]   = s_out[0];      assign bs[s][U1]   = s_out[1];
      assign bj_v[s][U0] = j_out_v[0];    assign bj_v[s][U1] = j_out_v[1];
      assign bj_c[s][U0] = j_out_cnt[0];  assign bj_c[s][U1] = j_out_cnt[1];
      assign bc_v[s][U0] = c_out_v[0];    assign bc_v[s][U1] = c_out_v[1];
      assign bc_c[s][U0] = c_out_cnt[0];  assign bc_c[s][U1] = c_out_cnt[1];

      assign s_in     = {bs[s+1][O1],   bs[s+1][O0]};
      assign j_in_v   = {bj_v[s+1][O1], bj_v[s+1][O0]};
      assign j_in_cnt = {bj_c[s+1][O1], bj_c[s+1][O0]};
      assign c_in_v   = {bc_v[s+1][O1], bc_v[s+1][O0]};
      assign c_in_cnt = {bc_c[s+1][O1], bc_c[s+1][O0]};
      assign fq_v[s+1][O0] = q_out_v[0];    assign fq_v[s+1][O1] = q_out_v[1];
      assign fq_c[s+1][O0] = q_out_cnt[0];  assign fq_c[s+1][O1] = q_out_cnt[1];
      assign fl[s+1][O0]   = l_out[0];      assign fl[s+1][O1]   = l_out[1];
      assign fd[s+1][O0]   = d_out[0];      assign fd[s+1][O1]   = d_out[1];

      omega_xbox #(
        .CW     (CW),
        .DATA_W (DATA_W),
        .SEED   (16'(16'hACE1 + 16'(97 * (s * N + b + 1))))
      ) u_box (
        .clk, .rst_n,
        .q_in_v, .q_in_cnt, .l_in, .s_out, .j_out_v, .j_out_cnt, .c_out_v, .c_out_cnt, .d_in,
        .s_in, .j_in_v, .j_in_cnt, .c_in_v, .c_in_cnt, .q_out_v, .q_out_cnt, .l_out, .d_out
      );
    end
  end
endmodule
