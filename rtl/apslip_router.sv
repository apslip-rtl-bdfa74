// apslip_router: virtual-output-queued mesh router with the apSLIP switch
// allocator.
//
// Every input port keeps one queue per output port (virtual output queues,
// VOQs), so a flit never waits behind a flit bound elsewhere (no head-of-line
// blocking) and virtual channels and their allocation stage disappear. Flow
// control stays credit based: the upstream router learns, by routing one hop
// ahead, which VOQ a flit will occupy here and holds a credit counter per
// VOQ. The switch allocator is iSLIP, pipelined so that a new allocation
// starts every cycle, and its effort adapts to load (one iteration at low
// occupancy, two at high occupancy).
//
// Pipeline of a flit (one stage per cycle):
//   1  LAR + RQ  the flit is written into its VOQ; look-ahead routing computes
//                its VOQ at the next router; requests of all VOQs are formed
//                (a VOQ requests output o if it holds a flit, or one is
//                arriving, and output o has a credit for its head flit)
//   2..3 (or 2..6) switch allocation, one or two iSLIP iterations
//   4 (or 7)     switch traversal: the matched VOQ's head flit crosses the
//                crossbar into the output register (the link)
// so a flit arriving at cycle c leaves on the output link at c+4 with one
// iteration and c+7 with two, with no contention.
//
// Because requests are formed before earlier grants are known, a VOQ with a
// single flit keeps requesting for three rounds. A grant is used in switch
// traversal if the VOQ still holds a flit and the output still has a credit
// for it, otherwise it is dropped. With VOQs any flit of the queue can use the
// grant since all go to the same output.
//
// Ports: in_flit[i].lar names the VOQ (output port here) of an arriving flit;
// out_flit[o].lar names its VOQ at the next router (0 for ejection ports).
// credit_out_* returns one credit per departing flit to the upstream sender,
// with the VOQ it left; credit_in_* receives the downstream router's credits.
// my_x/my_y are the router's mesh coordinates. two_iter shows the allocator
// effort, grant_used/grant_dropped tell per output whether this cycle's
// grant moved a flit or was dropped.
//
// What follows the document: VOQs in a 64-flit shared pool per input port,
// look-ahead XY routing in stage 1, the RQ/OA/IA-CU pipeline with odd/even
// private priority counters, the 50% queue-occupancy threshold with return to one
// iteration only when empty, 4-to-7-cycle router latency. This design's own
// choices: port numbering, the pool split, measuring occupancy per VOQ, the
// credit check in the request stage and the ejection-port credits. Because
// the threshold is measured per VOQ, the buffers' whole-pool occupancy output
// (occ) is not used. Virtual networks share the VOQs: the flit's vnet field
// is carried but does not select a queue.
module apslip_router
  import apslip_pkg::*;
#(
  parameter int POOL          = POOL_FLITS,
  parameter int THRESH_PCT    = 50,
  parameter int EJECT_CREDITS = 8,
  localparam int P  = NUM_PORTS,
  localparam int CW = $clog2(POOL + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // input links
  input  logic               in_valid         [P],
  input  flit_t              in_flit          [P],
  output logic               credit_out_valid [P],
  output logic [PORT_W-1:0]  credit_out_voq   [P],
  // output links
  output logic               out_valid        [P],
  output flit_t              out_flit         [P],
  input  logic               credit_in_valid  [P],
  input  logic [PORT_W-1:0]  credit_in_voq    [P],
  // status
  output logic               two_iter,
  output logic               grant_used       [P],
  output logic               grant_dropped    [P]
);

  // ---------------- stage 1: buffer write, look-ahead routing ----------
  logic [PORT_W-1:0] nxt_lar  [P];
  flit_t             wr_flit  [P];
  logic [CW-1:0]     count    [P][P];
  logic [PORT_W-1:0] head_lar [P][P];
  logic [CW-1:0]     occ      [P];
  flit_t             rd_flit  [P];
  logic              pop      [P];
  logic [PORT_W-1:0] pop_voq  [P];

  // credits per output and downstream VOQ
  logic              has_credit [P][P];
  logic              consume     [P];
  logic [PORT_W-1:0] consume_voq [P];

  for (genvar i = 0; i < P; i++) begin : g_in
    apslip_lar u_lar (
      .my_x(my_x), .my_y(my_y), .out_port(in_flit[i].lar),
      .dst_x(in_flit[i].dst_x), .dst_y(in_flit[i].dst_y),
      .dst_unit(in_flit[i].dst_unit), .next_port(nxt_lar[i]));

    always_comb begin
      wr_flit[i]     = in_flit[i];
      wr_flit[i].lar = nxt_lar[i];
    end

    apslip_voq_buffer #(.IN_PORT(i), .POOL(POOL)) u_voq (
      .clk(clk), .rst_n(rst_n),
      .wr_valid(in_valid[i]), .wr_voq(in_flit[i].lar), .wr_flit(wr_flit[i]),
      .rd_valid(pop[i]), .rd_voq(pop_voq[i]), .rd_flit(rd_flit[i]),
      .count(count[i]), .head_lar(head_lar[i]), .occupancy(occ[i]));
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    logic [$clog2(((POOL > EJECT_CREDITS) ? POOL : EJECT_CREDITS) + 1)-1:0] cred_unused [P];
    apslip_credit_tracker #(.OUT_PORT(o), .POOL(POOL), .EJECT_CREDITS(EJECT_CREDITS)) u_cred (
      .clk(clk), .rst_n(rst_n),
      .consume(consume[o]), .consume_voq(consume_voq[o]),
      .credit_in(credit_in_valid[o]), .credit_in_voq(credit_in_voq[o]),
      .has_credit(has_credit[o]), .credits(cred_unused));
  end

  // Requests (RQ): queued or arriving flit, and a credit for the head flit.
  logic [P-1:0] req [P];
  always_comb begin
    for (int i = 0; i < P; i++) begin
      for (int o = 0; o < P; o++) begin
        logic queued, arriving;
        logic [PORT_W-1:0] hl;
        queued   = (count[i][o] != '0);
        arriving = in_valid[i] && (int'(in_flit[i].lar) == o);
        hl       = queued ? head_lar[i][o] : nxt_lar[i];
        req[i][o] = (queued || arriving) && has_credit[o][hl];
      end
    end
  end

  // ---------------- stages 2..6: switch allocation ---------------------
  logic [P-1:0] match  [P];
  logic [P-1:0] match1 [P];
  logic [P-1:0] match2 [P];
  logic         ptr_upd [2];
  logic         go_deep, go_shallow;

  apslip_effort_ctrl #(.POOL(POOL), .THRESH_PCT(THRESH_PCT)) u_effort (
    .clk(clk), .rst_n(rst_n), .occ(count),
    .two_iter(two_iter), .go_deep(go_deep), .go_shallow(go_shallow));

  apslip_alloc #(.N(P)) u_alloc (
    .clk(clk), .rst_n(rst_n), .req(req), .two_iter(two_iter),
    .match(match), .match1(match1), .match2(match2), .ptr_upd(ptr_upd));

  // ---------------- switch traversal ------------------------------------
  logic              sel_valid [P];
  logic [PORT_W-1:0] sel_idx   [P];
  logic              avail     [P];
  logic [FLIT_W-1:0] xb_in     [P];
  logic [FLIT_W-1:0] xb_out    [P];
  logic              xb_valid  [P];

  always_comb begin
    for (int o = 0; o < P; o++) begin
      sel_valid[o] = 1'b0;
      sel_idx[o]   = '0;
      for (int i = 0; i < P; i++) begin
        if (match[i][o]) begin
          sel_valid[o] = 1'b1;
          sel_idx[o]   = PORT_W'(i);
        end
      end
    end
    for (int o = 0; o < P; o++) begin
      avail[o]       = sel_valid[o] && (count[sel_idx[o]][o] != '0)
                       && has_credit[o][head_lar[sel_idx[o]][o]];
      consume[o]     = avail[o];
      consume_voq[o] = head_lar[sel_idx[o]][o];
      grant_used[o]    = avail[o];
      grant_dropped[o] = sel_valid[o] && !avail[o];
    end
    for (int i = 0; i < P; i++) begin
      pop[i]     = 1'b0;
      pop_voq[i] = '0;
      for (int o = 0; o < P; o++) begin
        if (match[i][o]) begin
          pop_voq[i] = PORT_W'(o);
          pop[i]     = avail[o];
        end
      end
      xb_in[i] = rd_flit[i];
    end
  end

  apslip_crossbar #(.N(P), .W(FLIT_W)) u_xbar (
    .in_data(xb_in), .sel_valid(avail), .sel_idx(sel_idx),
    .out_data(xb_out), .out_valid(xb_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) begin
        out_valid[p]        <= 1'b0;
        out_flit[p]         <= '0;
        credit_out_valid[p] <= 1'b0;
        credit_out_voq[p]   <= '0;
      end
    end else begin
      for (int p = 0; p < P; p++) begin
        out_valid[p]        <= xb_valid[p];
        out_flit[p]         <= xb_out[p];
        credit_out_valid[p] <= pop[p];
        credit_out_voq[p]   <= pop_voq[p];
      end
    end
  end

endmodule
