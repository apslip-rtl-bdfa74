// apslip_alloc: adaptive-effort pipelined iSLIP switch allocator.
//
// iSLIP matches input ports to output ports in three steps: request (RQ),
// output arbitration (OA: each output grants one requesting input, chosen
// round-robin from its priority counter) and input arbitration with counter
// update (IA/CU: each input accepts one granting output, chosen round-robin
// from its own counter; both counters of an accepted pair move to one past
// the partner). Here each step is one pipeline stage and a new allocation
// round starts every cycle. Two read-after-write hazards of that pipeline are
// handled as follows:
//  * Requests of a round are formed before the outcome of the two previous
//    rounds is known, so a flit may be requested for again after it was
//    granted. Such superfluous grants are left to the router, which uses them
//    for the next flit of the same virtual output queue or drops them.
//  * Priority counters are written in IA/CU and read in OA of the next round.
//    Instead of stalling, every counter exists twice: rounds started in even
//    cycles use set 0, rounds started in odd cycles set 1. A set is written
//    in cycle t and next read in cycle t+1 by the round two behind, so each
//    set behaves like an unpipelined iSLIP allocator and every counter moves
//    exactly once per accepted grant.
//
// The pipeline always holds two iterations (six stages):
//   1 RQ   register the request matrix (router stage 1, with look-ahead routing)
//   2 OA   iteration 1 output arbitration
//   3 IA/CU iteration 1 input arbitration and counter update -> match1
//   4 RQ   requests of unmatched inputs to unmatched outputs (wires only)
//   5 OA   iteration 2 output arbitration
//   6 IA   iteration 2 input arbitration -> match2 = match1 + new pairs
// Following iSLIP, counters are updated in the first iteration only; the
// second iteration reads the counter set of its round. `two_iter` selects
// which result drives `match`: match1 three cycles after the request, or
// match2 six cycles after it. Either is a legal matching in every cycle.
//
// Interface: req[i][o] asks for a connection from input i to output o in the
// current cycle; match[i] is a one-hot (or zero) vector of the output input
// i may use in the current cycle.
module apslip_alloc #(
  parameter int N = 7,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req    [N],
  input  logic         two_iter,
  output logic [N-1:0] match  [N],
  output logic [N-1:0] match1 [N],
  output logic [N-1:0] match2 [N],
  output logic         ptr_upd [2]   // a counter of set s was written this cycle
);

  // Privatized priority counters: [set][port].
  logic [IW-1:0] g_ptr [2][N];   // output ports (grant counters)
  logic [IW-1:0] a_ptr [2][N];   // input ports (accept counters)

  logic par;                     // parity of the round entering stage 1

  logic [N-1:0] s1_req [N];  logic s1_par;
  logic [N-1:0] s2_gnt [N];  logic s2_par;
  logic [N-1:0] s3_mat [N];  logic s3_par;  logic [N-1:0] s3_req [N];
  logic [N-1:0] s2_req [N];
  logic [N-1:0] s4_req [N];  logic s4_par;  logic [N-1:0] s4_mat [N];
  logic [N-1:0] s5_gnt [N];  logic s5_par;  logic [N-1:0] s5_mat [N];
  logic [N-1:0] s6_mat [N];

  // ---------------- iteration 1: OA (stage 2) ----------------
  logic [N-1:0]  oa1_col [N];
  logic [N-1:0]  oa1_win [N];
  logic [IW-1:0] oa1_idx [N];
  logic          oa1_v   [N];

  // ---------------- iteration 1: IA/CU (stage 3) -------------
  logic [N-1:0]  ia1_win [N];
  logic [IW-1:0] ia1_idx [N];
  logic          ia1_v   [N];

  // ---------------- iteration 2 -------------------------------
  logic [N-1:0]  rq2     [N];
  logic [N-1:0]  oa2_col [N];
  logic [N-1:0]  oa2_win [N];
  logic [IW-1:0] oa2_idx [N];
  logic          oa2_v   [N];
  logic [N-1:0]  ia2_win [N];
  logic [IW-1:0] ia2_idx [N];
  logic          ia2_v   [N];

  for (genvar o = 0; o < N; o++) begin : g_oa
    always_comb
      for (int i = 0; i < N; i++) begin
        oa1_col[o][i] = s1_req[i][o];
        oa2_col[o][i] = s4_req[i][o];
      end
    apslip_rr_arb #(.N(N)) u_oa1 (
      .req(oa1_col[o]), .ptr(g_ptr[s1_par][o]),
      .gnt(oa1_win[o]), .gnt_idx(oa1_idx[o]), .gnt_valid(oa1_v[o]));
    apslip_rr_arb #(.N(N)) u_oa2 (
      .req(oa2_col[o]), .ptr(g_ptr[s4_par][o]),
      .gnt(oa2_win[o]), .gnt_idx(oa2_idx[o]), .gnt_valid(oa2_v[o]));
  end

  for (genvar i = 0; i < N; i++) begin : g_ia
    apslip_rr_arb #(.N(N)) u_ia1 (
      .req(s2_gnt[i]), .ptr(a_ptr[s2_par][i]),
      .gnt(ia1_win[i]), .gnt_idx(ia1_idx[i]), .gnt_valid(ia1_v[i]));
    apslip_rr_arb #(.N(N)) u_ia2 (
      .req(s5_gnt[i]), .ptr(a_ptr[s5_par][i]),
      .gnt(ia2_win[i]), .gnt_idx(ia2_idx[i]), .gnt_valid(ia2_v[i]));
  end

  // Requests of iteration 2: pairs whose input and output are both still free.
  always_comb begin
    logic [N-1:0] out_taken;
    out_taken = '0;
    for (int i = 0; i < N; i++) out_taken |= s3_mat[i];
    for (int i = 0; i < N; i++)
      rq2[i] = (s3_mat[i] != '0) ? '0 : (s3_req[i] & ~out_taken);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par    <= 1'b0;
      s1_par <= 1'b0; s2_par <= 1'b0; s3_par <= 1'b0; s4_par <= 1'b0; s5_par <= 1'b0;
      for (int k = 0; k < N; k++) begin
        s1_req[k] <= '0; s2_gnt[k] <= '0; s2_req[k] <= '0;
        s3_mat[k] <= '0; s3_req[k] <= '0;
        s4_req[k] <= '0; s4_mat[k] <= '0;
        s5_gnt[k] <= '0; s5_mat[k] <= '0;
        s6_mat[k] <= '0;
        for (int s = 0; s < 2; s++) begin
          g_ptr[s][k] <= '0;
          a_ptr[s][k] <= '0;
        end
      end
    end else begin
      par <= ~par;
      // stage 1: RQ
      s1_req <= req;
      s1_par <= par;
      // stage 2: OA, iteration 1
      for (int i = 0; i < N; i++)
        for (int o = 0; o < N; o++) s2_gnt[i][o] <= oa1_win[o][i];
      s2_req <= s1_req;
      s2_par <= s1_par;
      // stage 3: IA/CU, iteration 1
      s3_mat <= ia1_win;
      s3_req <= s2_req;
      s3_par <= s2_par;
      for (int i = 0; i < N; i++) begin
        if (ia1_v[i]) begin
          a_ptr[s2_par][i]          <= IW'((int'(ia1_idx[i]) + 1) % N);
          g_ptr[s2_par][ia1_idx[i]] <= IW'((i + 1) % N);
        end
      end
      // stage 4: RQ, iteration 2
      s4_req <= rq2;
      s4_mat <= s3_mat;
      s4_par <= s3_par;
      // stage 5: OA, iteration 2
      for (int i = 0; i < N; i++)
        for (int o = 0; o < N; o++) s5_gnt[i][o] <= oa2_win[o][i];
      s5_mat <= s4_mat;
      s5_par <= s4_par;
      // stage 6: IA, iteration 2
      for (int i = 0; i < N; i++) s6_mat[i] <= s5_mat[i] | ia2_win[i];
    end
  end

  always_comb begin
    logic any;
    any = 1'b0;
    for (int i = 0; i < N; i++) any |= ia1_v[i];
    ptr_upd[0] = any && !s2_par;
    ptr_upd[1] = any &&  s2_par;
    for (int i = 0; i < N; i++) begin
      match1[i] = s3_mat[i];
      match2[i] = s6_mat[i];
      match[i]  = two_iter ? s6_mat[i] : s3_mat[i];
    end
  end

  // The result must be a matching: one output per input, one input per output.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      logic [N-1:0] seen;
      seen = '0;
      for (int i = 0; i < N; i++) begin
        assert ($onehot0(match[i])) else $error("input %0d matched twice", i);
        assert ((seen & match[i]) == '0) else $error("output matched twice");
        seen |= match[i];
      end
    end
  end

endmodule
