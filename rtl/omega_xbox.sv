// omega_xbox: 2-input, 2-output exchange box of the distributed-scheduling Omega (or
// cube) network.
//
// Requests carry no destination: the box itself steers them towards free resources.
// Five kinds of control signal pass between neighbouring stages, each a count:
//   Q  query      - resources requested            (input side in,  output side out)
//   L  release    - give back the held connection  (input side in,  output side out)
//   S  status     - resources reachable via a link (output side in, input side out)
//   J  reject     - requested resources not found  (output side in, input side out)
//   C  completion - requested resources found      (output side in, input side out)
// Input ports face the processors (stage i-1), output ports face the resources
// (stage i+1). Q, L, J and C are one-clock pulses with a count; S is a level.
//
// How it works:
// * Availability registers A[0..1] store the status of each output port whenever that
//   status changes. The box reports S = sum of A over output ports that are not in use,
//   on both input ports.
// * A query on input p becomes pending work of p. Each clock the box services one
//   input: rejected work before new queries, then the larger count, then input 0. It
//   sends a query for min(pending, A[k]) on the free output k with the largest A (a tie
//   is broken by a random bit), zeroes A[k] and marks k as held by p. If no output can
//   take the work, the remainder goes back upstream as a reject on input p.
// * A reject arriving on output k returns that count to the pending work of its input,
//   which then searches the other output; an output left with nothing outstanding and
//   nothing found is given up.
// * Completions arriving on the outputs are summed; when nothing of the query is
//   pending or outstanding, one completion carrying the total found goes upstream.
//   Hence, for every query, rejects plus completion sent upstream equal its count.
// * A release on input p is forwarded to every output held by p, and frees them.
// * Data of input p is steered to every output p holds (straight, exchange or one of
//   the two broadcast settings).
//
// Timing: all pulses leave from registers; a query entering the box leaves it two
// clocks later at the earliest. rst_n clears all state.
//
// The five signals, the availability registers, the service order, the random tie
// break, zeroing A after a query and collecting all completions follow the document's
// control algorithm. One service action per clock, the reject/completion counting
// rules, the masking of held outputs in S, releases freeing the whole connection and
// forward-only data are this design's choices.
module omega_xbox #(
  parameter int unsigned CW     = 6,       // width of every count
  parameter int unsigned DATA_W = 1,
  parameter logic [15:0] SEED   = 16'hACE1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // input ports (towards the processors)
  input  logic [1:0]                  q_in_v,
  input  logic [1:0][CW-1:0]          q_in_cnt,
  input  logic [1:0]                  l_in,
  output logic [1:0][CW-1:0]          s_out,
  output logic [1:0]                  j_out_v,
  output logic [1:0][CW-1:0]          j_out_cnt,
  output logic [1:0]                  c_out_v,
  output logic [1:0][CW-1:0]          c_out_cnt,
  input  logic [1:0][DATA_W-1:0]      d_in,
  // output ports (towards the resources)
  input  logic [1:0][CW-1:0]          s_in,
  input  logic [1:0]                  j_in_v,
  input  logic [1:0][CW-1:0]          j_in_cnt,
  input  logic [1:0]                  c_in_v,
  input  logic [1:0][CW-1:0]          c_in_cnt,
  output logic [1:0]                  q_out_v,
  output logic [1:0][CW-1:0]          q_out_cnt,
  output logic [1:0]                  l_out,
  output logic [1:0][DATA_W-1:0]      d_out
);
  // ---------------------------------------------------------------- state
  logic [1:0][CW-1:0]       a_q, s_prev;        // availability registers
  logic [1:0]               own_v, own_p;       // output k held, and by which input
  logic [1:0]               done_k;             // output k has delivered a completion
  logic [1:0]               act, rej, csent;    // per input: query active, work from reject, completion sent
  logic [1:0][CW-1:0]       pend, got;          // per input: work to place, resources found
  logic [1:0][1:0][CW-1:0]  infl;               // per input, per output: outstanding count

  logic [1:0][CW-1:0]       n_a, n_s_prev, n_pend, n_got;
  logic [1:0]               n_own_v, n_own_p, n_done_k, n_act, n_rej, n_csent;
  logic [1:0][1:0][CW-1:0]  n_infl;
  logic [1:0]               n_q_v, n_l, n_j_v, n_c_v;
  logic [1:0][CW-1:0]       n_q_cnt, n_j_cnt, n_c_cnt;

  logic [15:0] rnd;
  rsin_lfsr #(.SEED(SEED)) u_rnd (.clk(clk), .rst_n(rst_n), .rnd(rnd));

  // service choice
  logic             in_any, in_sel, out_any, out_sel;
  logic [1:0]       in_cand, out_cand;
  logic [CW-1:0]    place_n;

  always_comb begin
    for (int p = 0; p < 2; p++) in_cand[p] = act[p] && (pend[p] != '0);
    for (int k = 0; k < 2; k++) out_cand[k] = !own_v[k] && (a_q[k] != '0);

    in_any = |in_cand;
    if (in_cand == 2'b11) begin
      if (rej[0] != rej[1]) in_sel = rej[1];
      else                  in_sel = (pend[1] > pend[0]);
    end else begin
      in_sel = in_cand[1] && !in_cand[0];
    end

    out_any = |out_cand;
    if (out_cand == 2'b11) begin
      if (a_q[1] > a_q[0])      out_sel = 1'b1;
      else if (a_q[0] > a_q[1]) out_sel = 1'b0;
      else                      out_sel = rnd[0];
    end else begin
      out_sel = out_cand[1] && !out_cand[0];
    end

    place_n = (pend[in_sel] < a_q[out_sel]) ? pend[in_sel] : a_q[out_sel];
  end

  // ---------------------------------------------------------------- next state
  always_comb begin
    n_a = a_q;  n_s_prev = s_prev;  n_pend = pend;  n_got = got;
    n_own_v = own_v;  n_own_p = own_p;  n_done_k = done_k;
    n_act = act;  n_rej = rej;  n_csent = csent;  n_infl = infl;
    n_q_v = '0;  n_l = '0;  n_j_v = '0;  n_c_v = '0;
    n_q_cnt = '0;  n_j_cnt = '0;  n_c_cnt = '0;

    // status change from the next stage: store into the availability register
    for (int k = 0; k < 2; k++) begin
      if (s_in[k] != s_prev[k]) n_a[k] = s_in[k];
      n_s_prev[k] = s_in[k];
    end

    // service one input: query the best output, or reject what cannot be placed
    if (in_any) begin
      if (out_any) begin
        n_q_v[out_sel]            = 1'b1;
        n_q_cnt[out_sel]          = place_n;
        n_a[out_sel]              = '0;
        n_own_v[out_sel]          = 1'b1;
        n_own_p[out_sel]          = in_sel;
        n_done_k[out_sel]         = 1'b0;
        n_infl[in_sel][out_sel]   = infl[in_sel][out_sel] + place_n;
        n_pend[in_sel]            = pend[in_sel] - place_n;
        if (n_pend[in_sel] == '0) n_rej[in_sel] = 1'b0;
      end else begin
        n_j_v[in_sel]   = 1'b1;
        n_j_cnt[in_sel] = pend[in_sel];
        n_pend[in_sel]  = '0;
        n_rej[in_sel]   = 1'b0;
      end
    end

    // rejects and completions from the next stage
    for (int k = 0; k < 2; k++) begin
      if (own_v[k] && (j_in_v[k] || c_in_v[k])) begin
        automatic logic          p = own_p[k];
        automatic logic [CW-1:0] r = j_in_v[k] ? j_in_cnt[k] : '0;
        automatic logic [CW-1:0] c = c_in_v[k] ? c_in_cnt[k] : '0;
        n_infl[p][k] = n_infl[p][k] - r - c;
        n_pend[p]    = n_pend[p] + r;
        n_got[p]     = n_got[p] + c;
        if (r != '0) n_rej[p]    = 1'b1;
        if (c != '0) n_done_k[k] = 1'b1;
        if (n_infl[p][k] == '0 && !n_done_k[k]) n_own_v[k] = 1'b0;
      end
    end

    // all completions collected: report upstream, or drop a query found nowhere
    for (int p = 0; p < 2; p++) begin
      if (act[p] && !csent[p] && pend[p] == '0 && infl[p] == '0) begin
        if (got[p] != '0) begin
          n_c_v[p]   = 1'b1;
          n_c_cnt[p] = got[p];
          n_csent[p] = 1'b1;
        end else begin
          n_act[p] = 1'b0;
        end
      end
    end

    // new query on an input port
    for (int p = 0; p < 2; p++) begin
      if (q_in_v[p] && q_in_cnt[p] != '0) begin
        n_act[p]   = 1'b1;
        n_pend[p]  = q_in_cnt[p];
        n_got[p]   = '0;
        n_infl[p]  = '0;
        n_rej[p]   = 1'b0;
        n_csent[p] = 1'b0;
      end
    end

    // release: forward to the outputs held by the input and free them
    for (int p = 0; p < 2; p++) begin
      if (l_in[p]) begin
        for (int k = 0; k < 2; k++) begin
          if (n_own_v[k] && n_own_p[k] == p[0]) begin
            n_l[k]     = 1'b1;
            n_own_v[k] = 1'b0;
          end
        end
        n_act[p]   = 1'b0;
        n_pend[p]  = '0;
        n_got[p]   = '0;
        n_infl[p]  = '0;
        n_rej[p]   = 1'b0;
        n_csent[p] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;  s_prev <= '0;  pend <= '0;  got <= '0;
      own_v <= '0;  own_p <= '0;  done_k <= '0;
      act <= '0;  rej <= '0;  csent <= '0;  infl <= '0;
      q_out_v <= '0;  q_out_cnt <= '0;  l_out <= '0;
      j_out_v <= '0;  j_out_cnt <= '0;  c_out_v <= '0;  c_out_cnt <= '0;
    end else begin
      a_q <= n_a;  s_prev <= n_s_prev;  pend <= n_pend;  got <= n_got;
      own_v <= n_own_v;  own_p <= n_own_p;  done_k <= n_done_k;
      act <= n_act;  rej <= n_rej;  csent <= n_csent;  infl <= n_infl;
      q_out_v <= n_q_v;  q_out_cnt <= n_q_cnt;  l_out <= n_l;
      j_out_v <= n_j_v;  j_out_cnt <= n_j_cnt;  c_out_v <= n_c_v;  c_out_cnt <= n_c_cnt;
    end
  end

  // status towards the previous stage: resources reachable through free outputs
  logic [CW-1:0] s_sum;
  assign s_sum = (own_v[0] ? '0 : a_q[0]) + (own_v[1] ? '0 : a_q[1]);
  assign s_out = {s_sum, s_sum};

  // data steering
  for (genvar k = 0; k < 2; k++) begin : g_data
    assign d_out[k] = own_v[k] ? d_in[own_p[k]] : '0;
  end

  // a downstream box never answers for more resources than it was asked for
  for (genvar k = 0; k < 2; k++) begin : g_chk
    a_answer_le_query: assert property (@(posedge clk) disable iff (!rst_n)
      (own_v[k] && (j_in_v[k] || c_in_v[k])) |->
        ({1'b0, j_in_v[k] ? j_in_cnt[k] : '0} + {1'b0, c_in_v[k] ? c_in_cnt[k] : '0}
           <= {1'b0, infl[own_p[k]][k]}))
      else $error("omega_xbox: more rejects/completions than queried on output %0d", k);
  end
endmodule
