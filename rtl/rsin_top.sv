// rsin_top: the four resource sharing interconnection networks (RSINs) for 16
// processors and 32 identical resources, side by side.
//
//   xbar_*  16/1x16x32 XBAR/1   cross-bar switch, one resource per column
//   om_*    16/1x16x16 CUBE/2   16 x 16 Omega network, two resources per output port
//   sb_*    16/1x1x1 UNIBUS/32  one shared bus with all 32 resources
//   pb_*    16/16x1x1 UNIBUS/2  a private bus per processor with two private resources
//
// (The notation p/i x j x k N/r reads: p processors, i networks of j inputs and k
// outputs of kind N, r resources per output port.) The four networks share only the
// clock and reset; each brings its processor-side and resource-side signals out, since
// the processors and resources themselves are outside this design. See xbar_switch,
// omega_rsin and bus_rsin for the protocol and timing of each group of ports; the
// private buses use the bus_rsin ports with one processor each, indexed by processor.
module rsin_top
  import rsin_pkg::*;
#(
  parameter int unsigned N_PROC  = 16,
  parameter int unsigned N_RES   = 32,
  parameter int unsigned R_OMEGA = 2,
  parameter int unsigned R_PRIV  = 2,
  parameter int unsigned DATA_W  = 1,
  parameter int unsigned CW_OM   = $clog2(N_PROC * R_OMEGA + 1),
  parameter int unsigned CW_SB   = $clog2(N_RES + 1),
  parameter int unsigned CW_PB   = $clog2(R_PRIV + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // cross-bar switch
  input  xbar_mode_e                        xbar_mode,
  input  logic [N_PROC-1:0]                 xbar_req,
  output logic [N_PROC-1:0]                 xbar_unsat,
  input  logic [N_RES-1:0]                  xbar_free_in,
  output logic [N_RES-1:0]                  xbar_free_out,
  input  logic [N_PROC-1:0][DATA_W-1:0]     xbar_proc_data,
  output logic [N_RES-1:0][DATA_W-1:0]      xbar_res_data,
  output logic [N_PROC-1:0][N_RES-1:0]      xbar_conn,
  // Omega network
  input  logic [N_PROC-1:0]                 om_p_q_v,
  input  logic [N_PROC-1:0][CW_OM-1:0]      om_p_q_cnt,
  input  logic [N_PROC-1:0]                 om_p_l,
  output logic [N_PROC-1:0][CW_OM-1:0]      om_p_s,
  output logic [N_PROC-1:0]                 om_p_j_v,
  output logic [N_PROC-1:0][CW_OM-1:0]      om_p_j_cnt,
  output logic [N_PROC-1:0]                 om_p_c_v,
  output logic [N_PROC-1:0][CW_OM-1:0]      om_p_c_cnt,
  input  logic [N_PROC-1:0][DATA_W-1:0]     om_p_d,
  input  logic [N_PROC-1:0][CW_OM-1:0]      om_r_s,
  input  logic [N_PROC-1:0]                 om_r_j_v,
  input  logic [N_PROC-1:0][CW_OM-1:0]      om_r_j_cnt,
  input  logic [N_PROC-1:0]                 om_r_c_v,
  input  logic [N_PROC-1:0][CW_OM-1:0]      om_r_c_cnt,
  output logic [N_PROC-1:0]                 om_r_q_v,
  output logic [N_PROC-1:0][CW_OM-1:0]      om_r_q_cnt,
  output logic [N_PROC-1:0]                 om_r_l,
  output logic [N_PROC-1:0][DATA_W-1:0]     om_r_d,
  // single shared bus
  input  logic [N_PROC-1:0]                 sb_req,
  input  logic [N_PROC-1:0][CW_SB-1:0]      sb_req_cnt,
  output logic [N_PROC-1:0]                 sb_grant,
  input  logic [N_PROC-1:0]                 sb_done,
  input  logic [N_PROC-1:0][DATA_W-1:0]     sb_proc_data,
  output logic [CW_SB-1:0]                  sb_free_cnt,
  output logic                              sb_bus_busy,
  input  logic [N_RES-1:0]                  sb_res_free,
  output logic [N_RES-1:0]                  sb_res_sel,
  output logic [N_RES-1:0]                  sb_res_start,
  output logic [DATA_W-1:0]                 sb_bus_data,
  // private buses
  input  logic [N_PROC-1:0]                 pb_req,
  input  logic [N_PROC-1:0][CW_PB-1:0]      pb_req_cnt,
  output logic [N_PROC-1:0]                 pb_grant,
  input  logic [N_PROC-1:0]                 pb_done,
  input  logic [N_PROC-1:0][DATA_W-1:0]     pb_proc_data,
  output logic [N_PROC-1:0][CW_PB-1:0]      pb_free_cnt,
  output logic [N_PROC-1:0]                 pb_bus_busy,
  input  logic [N_PROC-1:0][R_PRIV-1:0]     pb_res_free,
  output logic [N_PROC-1:0][R_PRIV-1:0]     pb_res_sel,
  output logic [N_PROC-1:0][R_PRIV-1:0]     pb_res_start,
  output logic [N_PROC-1:0][DATA_W-1:0]     pb_bus_data
);
  xbar_switch #(.N_PROC(N_PROC), .N_RES(N_RES), .DATA_W(DATA_W)) u_xbar (
    .clk, .rst_n,
    .mode      (xbar_mode),
    .req       (xbar_req),
    .unsat     (xbar_unsat),
    .free_in   (xbar_free_in),
    .free_out  (xbar_free_out),
    .proc_data (xbar_proc_data),
    .res_data  (xbar_res_data),
    .conn      (xbar_conn)
  );

  omega_rsin #(.N(N_PROC), .R_PER_PORT(R_OMEGA), .DATA_W(DATA_W), .CW(CW_OM)) u_omega (
    .clk, .rst_n,
    .p_q_v (om_p_q_v), .p_q_cnt (om_p_q_cnt), .p_l (om_p_l), .p_s (om_p_s),
    .p_j_v (om_p_j_v), .p_j_cnt (om_p_j_cnt), .p_c_v (om_p_c_v), .p_c_cnt (om_p_c_cnt),
    .p_d   (om_p_d),
    .r_s   (om_r_s), .r_j_v (om_r_j_v), .r_j_cnt (om_r_j_cnt), .r_c_v (om_r_c_v),
    .r_c_cnt (om_r_c_cnt), .r_q_v (om_r_q_v), .r_q_cnt (om_r_q_cnt), .r_l (om_r_l),
    .r_d   (om_r_d)
  );

  bus_rsin #(.N_PROC(N_PROC), .N_RES(N_RES), .DATA_W(DATA_W), .CW(CW_SB)) u_shared (
    .clk, .rst_n,
    .req (sb_req), .req_cnt (sb_req_cnt), .grant (sb_grant), .done (sb_done),
    .proc_data (sb_proc_data), .free_cnt (sb_free_cnt), .bus_busy (sb_bus_busy),
    .res_free (sb_res_free), .res_sel (sb_res_sel), .res_start (sb_res_start),
    .bus_data (sb_bus_data)
  );

  for (genvar p = 0; p < N_PROC; p++) begin : g_private
    bus_rsin #(
      .N_PROC (1), .N_RES (R_PRIV), .DATA_W (DATA_W), .CW (CW_PB),
      .SEED   (16'(16'h1D2B + 16'(131 * (p + 1))))
    ) u_private (
      .clk, .rst_n,
      .req (pb_req[p]), .req_cnt (pb_req_cnt[p]), .grant (pb_grant[p]), .done (pb_done[p]),
      .proc_data (pb_proc_data[p]), .free_cnt (pb_free_cnt[p]), .bus_busy (pb_bus_busy[p]),
      .res_free (pb_res_free[p]), .res_sel (pb_res_sel[p]), .res_start (pb_res_start[p]),
      .bus_data (pb_bus_data[p])
    );
  end
endmodule
