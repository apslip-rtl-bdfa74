// tb_mesh_env: traffic generator and checker for an apSLIP mesh, shared by
// the mesh testbenches. It models the network interface of every local port:
// senders that route their own flits for the first router and keep credits
// for its local-input VOQs, and receivers that drain ejected flits at a
// phase-dependent rate and return credits.
//
// Checks: every flit reaches the tile and local port it was sent to, exactly
// once, with an ejection look-ahead route of 0, in order per source/
// destination pair (XY routing and FIFO queues keep that order), and no
// ejection queue is overfilled. A lone flit must take 4*(hops+1) cycles, four
// per router with one-iteration allocation.
//
// Traffic is made of packets as in the synthetic runs the router was designed
// for: data packets of 5 flits and control packets of 1 flit, in equal
// numbers. A packet's flits go to the same destination but are allocated one
// by one, like any other flits. A sender that has no credit holds its flit
// and stops injecting, so a saturated network slows the sources down.
//
// Phases: lone flits; uniform random, bit-complement and transpose traffic
// (transpose needs MX == MY); a hot spot where every
// interface sends to one port that drains slowly (queues fill, credits run
// out, routers go to two iterations); then everything drains and every
// router must be back to one iteration. Each of these mechanisms is counted
// and one never seen is a failure. `done` rises at the end with the counts.
module tb_mesh_env
  import apslip_pkg::*;
#(
  parameter int MX = 3,
  parameter int MY = 3,
  parameter int LOAD_CYCLES = 1500,
  parameter int LOAD_PCT = 30,
  localparam int T = MX * MY,
  localparam int L = 3
) (
  input  logic       clk,
  output logic       rst_n,
  output logic       inj_valid        [T][L],
  output flit_t      inj_flit         [T][L],
  input  logic       inj_credit_valid [T][L],
  input  logic [2:0] inj_credit_voq   [T][L],
  input  logic       ej_valid         [T][L],
  input  flit_t      ej_flit          [T][L],
  output logic       ej_credit_valid  [T][L],
  output logic [2:0] ej_credit_voq    [T][L],
  input  logic       two_iter         [T],
  output logic       done,
  output int         checks,
  output int         failures
);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int route(int cx, int cy, int dx, int dy, int unit);
    if (dx > cx) return 0;
    if (dx < cx) return 1;
    if (dy > cy) return 2;
    if (dy < cy) return 3;
    return 4 + unit;
  endfunction

  // local input pool of 64 flits over 7 VOQs: 10 + 6 x 9
  function automatic int local_voq_size(int q);
    return (q == 0) ? 10 : 9;
  endfunction

  int    cred [T][L][7];
  bit    pend_v [T][L];
  flit_t pend [T][L];
  int    ej_occ [T][L];
  int    ej_fifo_n [T][L];
  int    inj_pct = 0;
  int    hot = -1;            // hot-spot destination tile (port 0), -1: pattern
  int    pattern = 0;         // 0 uniform random, 1 bit complement, 2 transpose
  int    pkt_left [T][L];     // flits still to send of the current packet
  int    pkt_dt [T][L], pkt_du [T][L];
  int    pat_flits [3];       // flits received per pattern
  int    long_pkts = 0;
  int    drain_pct = 100;
  int    hot_drain_pct = 100;
  int    next_id = 0, sent = 0, received = 0;
  int    exp_q [int][$];      // ids per source/destination pair
  int    sent_cycle [int];
  int    lone_hops = -1;      // expected hops of the flit in flight, -1: none

  int lat_ok = 0, ups = 0, downs = 0, inj_stall = 0, ej_full = 0, lat_sum = 0, lat_n = 0;
  bit prev_mode [T];

  function automatic flit_t make_flit(int t, int k, int dt, int du);
    flit_t f;
    int x, y;
    x = t % MX; y = t / MX;
    f.data = {$urandom, $urandom, 16'(dt * L + du), 16'(t * L + k), 32'(next_id)};
    f.dst_x = 3'(dt % MX); f.dst_y = 3'(dt / MX);
    f.vnet = 2'($urandom); f.dst_unit = 2'(du);
    f.lar = 3'(route(x, y, dt % MX, dt / MX, du));
    next_id++;
    return f;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int t = 0; t < T; t++) begin
      if (two_iter[t] && !prev_mode[t]) ups++;
      if (!two_iter[t] && prev_mode[t]) downs++;
      prev_mode[t] = two_iter[t];
    end
    for (int t = 0; t < T; t++)
      for (int k = 0; k < L; k++) begin
        // credits from the first router
        if (inj_credit_valid[t][k]) cred[t][k][inj_credit_voq[t][k]]++;
        // ejected flits
        if (ej_valid[t][k]) begin
          int src, dst, id, key, lat, hops;
          id  = int'(ej_flit[t][k].data[31:0]);
          src = int'(ej_flit[t][k].data[47:32]);
          dst = int'(ej_flit[t][k].data[63:48]);
          key = src * 4096 + dst;
          checks++;
          if (dst != t * L + k || int'(ej_flit[t][k].dst_x) != t % MX ||
              int'(ej_flit[t][k].dst_y) != t / MX || ej_flit[t][k].lar != '0) begin
            failures++;
            $display("FAIL flit %0d ejected at tile %0d port %0d, meant for %0d", id, t, k, dst);
          end
          checks++;
          if (!exp_q.exists(key) || exp_q[key].size() == 0 || exp_q[key][0] != id) begin
            failures++;
            $display("FAIL flit %0d from %0d to %0d duplicated or out of order", id, src, dst);
          end else void'(exp_q[key].pop_front());
          lat = cycle - sent_cycle[id];
          lat_sum += lat; lat_n++;
          if (lone_hops >= 0) begin
            hops = ((src / L) % MX > t % MX ? (src / L) % MX - t % MX : t % MX - (src / L) % MX)
                 + ((src / L) / MX > t / MX ? (src / L) / MX - t / MX : t / MX - (src / L) / MX);
            checks++;
            if (lat == 4 * (hops + 1)) lat_ok++;
            else begin
              failures++;
              $display("FAIL lone flit over %0d hops took %0d cycles, expected %0d", hops, lat, 4 * (hops + 1));
            end
          end
          received++;
          if (hot < 0 && lone_hops < 0) pat_flits[pattern]++;
          ej_occ[t][k]++;
          checks++;
          if (ej_occ[t][k] > 8) begin
            failures++;
            $display("FAIL ejection queue %0d/%0d overfilled", t, k);
          end
        end
        if (ej_occ[t][k] == 8) ej_full++;
        // interface drains and returns a credit
        ej_credit_valid[t][k] = 1'b0;
        ej_credit_voq[t][k] = '0;
        if (ej_occ[t][k] > 0 &&
            $urandom_range(99, 0) < ((t == hot && k == 0) ? hot_drain_pct : drain_pct)) begin
          ej_occ[t][k]--;
          ej_credit_valid[t][k] = 1'b1;
        end
        // senders
        inj_valid[t][k] = 1'b0;
        if (!pend_v[t][k] && (pkt_left[t][k] > 0 || $urandom_range(99, 0) < inj_pct)) begin
          int dt, du;
          if (pkt_left[t][k] == 0) begin
            pkt_left[t][k] = $urandom_range(1, 0) ? 5 : 1;
            if (pkt_left[t][k] == 5) long_pkts++;
            case (pattern)
              1: pkt_dt[t][k] = (MY - 1 - t / MX) * MX + (MX - 1 - t % MX);
              2: pkt_dt[t][k] = (t % MX) * MX + t / MX;
              default: pkt_dt[t][k] = $urandom_range(T - 1, 0);
            endcase
            pkt_du[t][k] = (pattern == 0) ? $urandom_range(L - 1, 0) : k;
          end
          pkt_left[t][k]--;
          dt = (hot >= 0) ? hot : pkt_dt[t][k];
          du = (hot >= 0) ? 0 : pkt_du[t][k];
          pend[t][k] = make_flit(t, k, dt, du);
          pend_v[t][k] = 1'b1;
        end
        if (pend_v[t][k]) begin
          if (cred[t][k][pend[t][k].lar] > 0) begin
            int key;
            key = (t * L + k) * 4096 + int'(pend[t][k].data[63:48]);
            inj_valid[t][k] = 1'b1;
            inj_flit[t][k] = pend[t][k];
            cred[t][k][pend[t][k].lar]--;
            exp_q[key].push_back(int'(pend[t][k].data[31:0]));
            sent_cycle[int'(pend[t][k].data[31:0])] = cycle;
            sent++;
            pend_v[t][k] = 1'b0;
          end else inj_stall++;
        end
      end
  end

  task automatic wait_idle(int limit);
    int g;
    bit busy;
    g = 0;
    do begin
      @(posedge clk);
      g++;
      busy = (sent != received);
      for (int t = 0; t < T; t++) for (int k = 0; k < L; k++) if (pend_v[t][k] || pkt_left[t][k] > 0) busy = 1;
    end while (busy && g < limit);
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; rst_n = 0;
    for (int p = 0; p < 3; p++) pat_flits[p] = 0;
    for (int t = 0; t < T; t++) begin
      prev_mode[t] = 0;
      for (int k = 0; k < L; k++) begin
        inj_valid[t][k] = 0; inj_flit[t][k] = '0; ej_credit_valid[t][k] = 0; ej_credit_voq[t][k] = 0;
        pend_v[t][k] = 0; ej_occ[t][k] = 0; pkt_left[t][k] = 0; pkt_dt[t][k] = 0; pkt_du[t][k] = 0; ej_fifo_n[t][k] = 0;
        for (int q = 0; q < 7; q++) cred[t][k][q] = local_voq_size(q);
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // lone flits between random tiles
    for (int n = 0; n < 12; n++) begin
      int s, sk, d, dk;
      s = $urandom_range(T - 1, 0); sk = $urandom_range(L - 1, 0);
      d = $urandom_range(T - 1, 0); dk = $urandom_range(L - 1, 0);
      @(negedge clk);
      #1;
      lone_hops = 0;
      pend[s][sk] = make_flit(s, sk, d, dk);
      pend_v[s][sk] = 1'b1;
      repeat (4 * (MX + MY + 2) + 4) @(posedge clk);
      lone_hops = -1;
    end

    // uniform random, bit-complement and transpose traffic
    for (int p = 0; p < 3; p++) begin
      if (p == 2 && MX != MY) break;
      pattern = p;
      inj_pct = LOAD_PCT;
      repeat (LOAD_CYCLES) @(posedge clk);
      inj_pct = 0;
      wait_idle(50000);
    end
    pattern = 0;

    // hot spot
    hot = T / 2;
    hot_drain_pct = 20;
    inj_pct = 50;
    repeat (LOAD_CYCLES) @(posedge clk);
    inj_pct = 0;
    hot_drain_pct = 100;
    wait_idle(200000);
    hot = -1;
    repeat (10) @(posedge clk);

    checks++;
    if (sent != received) begin failures++; $display("FAIL sent %0d received %0d", sent, received); end
    for (int t = 0; t < T; t++) begin
      checks++;
      if (two_iter[t]) begin failures++; $display("FAIL router %0d still in two-iteration mode", t); end
    end
    $display("mesh %0dx%0d: %0d flits, mean latency %0d cycles", MX, MY, received, (lat_n > 0) ? lat_sum / lat_n : 0);
    $display("flits per pattern: uniform %0d, bit complement %0d, transpose %0d; 5-flit packets %0d",
             pat_flits[0], pat_flits[1], pat_flits[2], long_pkts);
    $display("lone-flit latencies ok %0d, mode up %0d down %0d, injection stalls %0d, full ejection queue cycles %0d",
             lat_ok, ups, downs, inj_stall, ej_full);
    for (int p = 0; p < ((MX == MY) ? 3 : 2); p++)
      if (pat_flits[p] == 0) begin failures++; $display("FAIL mechanism: pattern %0d delivered nothing", p); end
    if (long_pkts == 0) begin failures++; $display("FAIL mechanism: no 5-flit packet sent"); end
    if (lat_ok == 0)    begin failures++; $display("FAIL mechanism: no lone-flit latency checked"); end
    if (ups == 0)       begin failures++; $display("FAIL mechanism: no router went to two iterations"); end
    if (downs == 0)     begin failures++; $display("FAIL mechanism: no router returned to one iteration"); end
    if (inj_stall == 0) begin failures++; $display("FAIL mechanism: injection never waited for credits"); end
    if (ej_full == 0)   begin failures++; $display("FAIL mechanism: no ejection queue filled"); end
    done = 1;
  end
endmodule
