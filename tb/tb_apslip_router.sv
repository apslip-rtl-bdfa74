// tb_apslip_router: end-to-end test of the router at its default sizes
// (seven ports, 64-flit pools, 128-bit flits), placed at (3,3) of an 8x8
// mesh.
//
// Every input is driven by a sender model that keeps its own credit count
// for each VOQ of that input (split of 64 flits computed here from the XY
// turn rules) and only produces destinations that XY routing can bring in
// through that port. Every output feeds a receiver model that holds the
// flits as the downstream queue would, drains them at a phase-dependent rate
// and returns credits. The scoreboard checks that every flit comes out of the
// right output exactly once, in order per input/output pair, unchanged, with
// the right look-ahead route for the next router, and that no downstream
// queue is ever overfilled.
//
// Phases and the mechanisms they must show (each is counted; one never seen
// is a failure):
//   1 lone flits at zero load: 4-cycle router latency, one-iteration mode,
//     dropped superfluous grants of single-flit queues
//   2 heavy random load from all inputs: back-to-back grants used by later
//     flits of the same queue, both priority-counter sets in use
//   3 network outputs blocked while a local port floods them: downstream
//     credits run out, occupancy crosses 50% and the allocator goes to two
//     iterations; a lone flit then takes 7 cycles
//   4 everything drains: the mode returns to one iteration once empty
module tb_apslip_router;
  import apslip_pkg::*;
  localparam int P = 7;
  localparam int MX = 3, MY = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid [P];
  flit_t             in_flit [P];
  logic              credit_out_valid [P];
  logic [2:0]        credit_out_voq [P];
  logic              out_valid [P];
  flit_t             out_flit [P];
  logic              credit_in_valid [P];
  logic [2:0]        credit_in_voq [P];
  logic              two_iter;
  logic              grant_used [P], grant_dropped [P];

  apslip_router dut (
    .clk, .rst_n, .my_x(3'(MX)), .my_y(3'(MY)),
    .in_valid, .in_flit, .credit_out_valid, .credit_out_voq,
    .out_valid, .out_flit, .credit_in_valid, .credit_in_voq,
    .two_iter, .grant_used, .grant_dropped);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference routing and queue sizes --------------------
  function automatic int route(int cx, int cy, int dx, int dy, int unit);
    if (dx > cx) return 0;
    if (dx < cx) return 1;
    if (dy > cy) return 2;
    if (dy < cy) return 3;
    return 4 + unit;
  endfunction

  // VOQs an input may use under XY routing (no U-turns, Y never turns to X)
  function automatic bit usable(int in_p, int q);
    if (in_p >= 4 || q >= 4) return 1;
    if (in_p == 0 || in_p == 1) return q != in_p;
    return (in_p == 2) ? (q == 3) : (q == 2);
  endfunction

  function automatic int qsize(int in_p, int q);
    int n, nbelow;
    n = 0; nbelow = 0;
    for (int k = 0; k < P; k++) if (usable(in_p, k)) begin
      n++;
      if (k < q) nbelow++;
    end
    if (!usable(in_p, q)) return 0;
    return (64 / n) + ((nbelow < 64 % n) ? 1 : 0);
  endfunction

  function automatic int peer(int o);
    return (o < 4) ? (o ^ 1) : o;
  endfunction

  function automatic int cap_down(int o, int q);
    if (o < 4) return qsize(peer(o), q);
    return (q == 0) ? 8 : 0;
  endfunction

  function automatic int expected_lar(int o, int dx, int dy, int unit);
    int nx, ny;
    if (o >= 4) return 0;
    nx = MX + ((o == 0) ? 1 : 0) - ((o == 1) ? 1 : 0);
    ny = MY + ((o == 2) ? 1 : 0) - ((o == 3) ? 1 : 0);
    return route(nx, ny, dx, dy, unit);
  endfunction

  // ---------------- senders ------------------------------------------------
  int   snd_cred [P][P];
  bit   pend_v [P];
  flit_t pend [P];
  int   inj_pct [P];
  int   force_out [P];      // -1: random destination, else only this output
  int   next_id = 0;
  int   sent = 0, received = 0;
  flit_t sb [P][P][$];      // expected flits per (input, output)
  int   sent_cycle [int];

  function automatic flit_t make_flit(int i, int want_out);
    flit_t f;
    int dx, dy, u, q;
    do begin
      u = $urandom_range(2, 0);
      case (i)
        0: begin dx = $urandom_range(MX, 0); dy = $urandom_range(7, 0); end
        1: begin dx = $urandom_range(7, MX); dy = $urandom_range(7, 0); end
        2: begin dx = MX; dy = $urandom_range(MY, 0); end
        3: begin dx = MX; dy = $urandom_range(7, MY); end
        default: begin dx = $urandom_range(7, 0); dy = $urandom_range(7, 0); end
      endcase
      q = route(MX, MY, dx, dy, u);
    end while (want_out >= 0 && q != want_out);
    f.data = {$urandom, $urandom, 29'(0), 3'(i), 32'(next_id)};
    f.dst_x = 3'(dx); f.dst_y = 3'(dy); f.vnet = 2'($urandom); f.dst_unit = 2'(u);
    f.lar = 3'(q);
    next_id++;
    return f;
  endfunction

  // ---------------- receivers ----------------------------------------------
  int   rcv_occ [P][P];
  int   rcv_fifo [P][$];
  int   drain_pct [P];

  // ---------------- mechanism counters ---------------------------------------
  int lat4 = 0, lat7 = 0, lat_bad = 0, ups = 0, downs = 0;
  int dropped = 0, back_to_back = 0, credit_out = 0, set0 = 0, set1 = 0;
  int last_pop_voq [P];
  bit last_pop [P];
  bit prev_mode = 0;
  int lone_check = 0;        // expected latency for lone flits, 0 = none

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: sent %0d received %0d", sent, received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All model work happens at the falling edge: observe, then drive.
  always @(negedge clk) if (rst_n) begin
    // mode changes and allocator statistics
    if (two_iter && !prev_mode) ups++;
    if (!two_iter && prev_mode) downs++;
    prev_mode = two_iter;
    if (dut.u_alloc.ptr_upd[0]) set0++;
    if (dut.u_alloc.ptr_upd[1]) set1++;
    for (int o = 0; o < P; o++) if (grant_dropped[o]) dropped++;

    // credits returned by the router to the senders
    for (int i = 0; i < P; i++) begin
      if (credit_out_valid[i]) begin
        snd_cred[i][credit_out_voq[i]]++;
        if (last_pop[i] && last_pop_voq[i] == int'(credit_out_voq[i])) back_to_back++;
      end
      last_pop[i] = credit_out_valid[i];
      last_pop_voq[i] = credit_out_voq[i];
    end

    // output links
    for (int o = 0; o < P; o++) begin
      if (out_valid[o]) begin
        int src, id, lat, elar;
        flit_t exp;
        src = int'(out_flit[o].data[34:32]);
        id  = int'(out_flit[o].data[31:0]);
        checks++;
        if (sb[src][o].size() == 0) begin
          failures++;
          $display("FAIL output %0d: unexpected flit id %0d from %0d", o, id, src);
        end else begin
          exp = sb[src][o].pop_front();
          elar = expected_lar(o, exp.dst_x, exp.dst_y, exp.dst_unit);
          if (out_flit[o].data != exp.data || out_flit[o].dst_x != exp.dst_x ||
              out_flit[o].dst_y != exp.dst_y || out_flit[o].vnet != exp.vnet ||
              out_flit[o].dst_unit != exp.dst_unit || int'(out_flit[o].lar) != elar) begin
            failures++;
            $display("FAIL output %0d: flit id %0d wrong or out of order (lar %0d exp %0d)",
                     o, id, out_flit[o].lar, elar);
          end
        end
        lat = cycle - sent_cycle[id];
        if (lone_check != 0) begin
          checks++;
          if (lat == 4 && lone_check == 4) lat4++;
          else if (lat == 7 && lone_check == 7) lat7++;
          else begin
            lat_bad++;
            failures++;
            $display("FAIL lone flit latency %0d expected %0d", lat, lone_check);
          end
        end
        received++;
        rcv_occ[o][out_flit[o].lar]++;
        rcv_fifo[o].push_back(int'(out_flit[o].lar));
        checks++;
        if (rcv_occ[o][out_flit[o].lar] > cap_down(o, int'(out_flit[o].lar))) begin
          failures++;
          $display("FAIL output %0d overfilled downstream queue %0d", o, out_flit[o].lar);
        end
      end
    end

    // downstream credits exhausted anywhere?
    for (int o = 0; o < P; o++)
      for (int q = 0; q < P; q++)
        if (cap_down(o, q) > 0 && rcv_occ[o][q] == cap_down(o, q)) credit_out++;

    // receivers drain and return credits
    for (int o = 0; o < P; o++) begin
      credit_in_valid[o] = 1'b0;
      credit_in_voq[o] = '0;
      if (rcv_fifo[o].size() > 0 && $urandom_range(99, 0) < drain_pct[o]) begin
        int q;
        q = rcv_fifo[o].pop_front();
        rcv_occ[o][q]--;
        credit_in_valid[o] = 1'b1;
        credit_in_voq[o] = 3'(q);
      end
    end

    // senders
    for (int i = 0; i < P; i++) begin
      in_valid[i] = 1'b0;
      if (!pend_v[i] && $urandom_range(99, 0) < inj_pct[i]) begin
        pend[i] = make_flit(i, force_out[i]);
        pend_v[i] = 1'b1;
      end
      if (pend_v[i] && snd_cred[i][pend[i].lar] > 0) begin
        in_valid[i] = 1'b1;
        in_flit[i] = pend[i];
        snd_cred[i][pend[i].lar]--;
        sb[i][pend[i].lar].push_back(pend[i]);
        sent_cycle[int'(pend[i].data[31:0])] = cycle;
        sent++;
        pend_v[i] = 1'b0;
      end
    end
  end

  task automatic set_inj(int pct);
    for (int i = 0; i < P; i++) inj_pct[i] = pct;
  endtask

  task automatic wait_idle();
    int guard;
    guard = 0;
    while ((sent != received || pend_v.or() != 0) && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
  endtask

  // one flit from input i to output o, alone in the router
  task automatic lone_flit(int i, int o, int lat);
    lone_check = lat;
    force_out[i] = o;
    inj_pct[i] = 100;
    @(negedge clk);
    #1;
    inj_pct[i] = 0;
    force_out[i] = -1;
    repeat (12) @(posedge clk);
    lone_check = 0;
  endtask

  initial begin
    for (int i = 0; i < P; i++) begin
      in_valid[i] = 0; in_flit[i] = '0; credit_in_valid[i] = 0; credit_in_voq[i] = 0;
      pend_v[i] = 0; inj_pct[i] = 0; force_out[i] = -1; drain_pct[i] = 100;
      last_pop[i] = 0; last_pop_voq[i] = 0;
      for (int q = 0; q < P; q++) begin
        snd_cred[i][q] = qsize(i, q);
        rcv_occ[i][q] = 0;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // phase 1: zero load, one flit at a time
    for (int k = 0; k < 40; k++) begin
      int i, o;
      i = $urandom_range(6, 0);
      do o = $urandom_range(6, 0); while (!usable(i, o) ||
                                          (i == 2 && o < 4 && o != 3) || (i == 3 && o < 4 && o != 2));
      if (i < 2 && o < 4 && o != (i ^ 1)) o = i ^ 1;
      lone_flit(i, o, 4);
    end
    checks++;
    if (two_iter) begin failures++; $display("FAIL deep mode at zero load"); end

    // phase 2: heavy random load
    set_inj(90);
    repeat (4000) @(posedge clk);
    set_inj(0);
    wait_idle();

    // phase 3: block the mesh outputs and flood them from local port L0
    for (int o = 0; o < 4; o++) drain_pct[o] = 0;
    inj_pct[4] = 100;
    for (int k = 0; k < 3000; k++) begin
      int pick_o;
      pick_o = -1;
      for (int o = 0; o < 4; o++) if (snd_cred[4][(o + k) % 4] > 0 && pick_o < 0) pick_o = (o + k) % 4;
      if (pick_o < 0) break;
      force_out[4] = pick_o;
      @(posedge clk);
    end
    inj_pct[4] = 0;
    force_out[4] = -1;
    repeat (20) @(posedge clk);
    checks++;
    if (!two_iter) begin failures++; $display("FAIL no two-iteration mode with full queues"); end
    lone_flit(5, 6, 7);   // L1 -> L2, uncontended, deep pipeline
    for (int o = 0; o < 4; o++) drain_pct[o] = 60;

    // phase 4: drain everything, back to one iteration
    wait_idle();
    repeat (20) @(posedge clk);
    checks++;
    if (two_iter) begin failures++; $display("FAIL still in two-iteration mode when empty"); end
    lone_flit(6, 0, 4);

    // every sent flit delivered
    checks++;
    if (sent != received) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, received);
    end
    for (int i = 0; i < P; i++)
      for (int o = 0; o < P; o++) begin
        checks++;
        if (sb[i][o].size() != 0) begin failures++; $display("FAIL %0d flits lost %0d->%0d", sb[i][o].size(), i, o); end
      end

    $display("flits %0d; lone latency 4: %0d, 7: %0d; mode up %0d down %0d", received, lat4, lat7, ups, downs);
    $display("dropped grants %0d, back-to-back grants used %0d, credit-exhausted cycles %0d, counter sets %0d/%0d",
             dropped, back_to_back, credit_out, set0, set1);
    if (lat4 == 0)         begin failures++; $display("FAIL mechanism: 4-cycle latency never seen"); end
    if (lat7 == 0)         begin failures++; $display("FAIL mechanism: 7-cycle latency never seen"); end
    if (ups == 0)          begin failures++; $display("FAIL mechanism: never went to two iterations"); end
    if (downs == 0)        begin failures++; $display("FAIL mechanism: never returned to one iteration"); end
    if (dropped == 0)      begin failures++; $display("FAIL mechanism: no superfluous grant dropped"); end
    if (back_to_back == 0) begin failures++; $display("FAIL mechanism: no back-to-back grant used"); end
    if (credit_out == 0)   begin failures++; $display("FAIL mechanism: credits never ran out"); end
    if (set0 == 0 || set1 == 0) begin failures++; $display("FAIL mechanism: a counter set unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
