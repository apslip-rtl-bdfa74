// tb_apslip_alloc: checks the pipelined iSLIP allocator against a cycle-level
// reference model written from the algorithm:
//  * round k's requests are sampled at clock edge k; output arbitration at
//    edge k+1 uses the grant counters of set k%2, input arbitration at edge
//    k+2 uses the accept counters of set k%2 and moves both counters of each
//    accepted pair one past the partner; the first-iteration matching is then
//    visible until edge k+3;
//  * iteration 2 takes round k's requests between still-unmatched ports,
//    arbitrates at edges k+4 and k+5 without moving counters, and its
//    matching is visible after edge k+5;
//  * `match` shows the first or the second result depending on two_iter.
// Phases: random requests in one- and two-iteration mode, mode flips, and a
// saturated phase in which every input requests every output. There, once
// the counters have spread out, every cycle must deliver a full 7-pair
// matching (one complete matching per cycle is the pipeline's rate), and a
// lone request must come out 3 or 6 cycles later.
module tb_apslip_alloc;
  localparam int N = 7;
  localparam int H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req [N];
  logic two_iter;
  logic [N-1:0] match [N], match1 [N], match2 [N];
  logic ptr_upd [2];

  apslip_alloc #(.N(N)) dut (.clk, .rst_n, .req, .two_iter, .match, .match1, .match2, .ptr_upd);

  int checks = 0, failures = 0;
  int edge_n = 0;
  int g [2][N], a [2][N];
  logic [N-1:0] rq_h [H][N];    // requests of round k
  logic [N-1:0] gn1_h [H][N];   // iteration-1 grants, per input
  logic [N-1:0] m1_h [H][N];    // iteration-1 matching
  logic [N-1:0] gn2_h [H][N];   // iteration-2 grants
  logic [N-1:0] m2_h [H][N];    // iteration-2 matching
  int full_cycles = 0, partial_cycles = 0, upd0 = 0, upd1 = 0, deeper = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first requester at cyclic distance 0,1,2,... from ptr
  function automatic int pick(logic [N-1:0] r, int ptr);
    int d;
    d = 0;
    while (d < N) begin
      if (r[(ptr + d) % N]) return (ptr + d) % N;
      d++;
    end
    return -1;
  endfunction

  function automatic int slot(int k);
    return ((k % H) + H) % H;
  endfunction

  // reference model, advanced at every clock edge after reset
  always @(posedge clk) if (rst_n) begin
    int e, k1, k2, k4, k5;
    int upd_in [N], upd_out [N];
    int upd_par;
    logic [N-1:0] g1 [N], m1 [N], g2 [N], m2 [N];
    e = edge_n;
    for (int i = 0; i < N; i++) rq_h[slot(e)][i] = req[i];
    k1 = e - 1; k2 = e - 2; k4 = e - 4; k5 = e - 5;
    for (int i = 0; i < N; i++) begin
      g1[i] = '0; m1[i] = '0; g2[i] = '0; m2[i] = '0;
      upd_in[i] = -1; upd_out[i] = -1;
    end
    // OA, iteration 1, round e-1
    if (k1 >= 0)
      for (int o = 0; o < N; o++) begin
        logic [N-1:0] col;
        int w;
        for (int i = 0; i < N; i++) col[i] = rq_h[slot(k1)][i][o];
        w = pick(col, g[k1 % 2][o]);
        if (w >= 0) g1[w][o] = 1'b1;
      end
    // IA/CU, iteration 1, round e-2
    upd_par = (k2 >= 0) ? k2 % 2 : 0;
    if (k2 >= 0)
      for (int i = 0; i < N; i++) begin
        int w;
        w = pick(gn1_h[slot(k2)][i], a[k2 % 2][i]);
        if (w >= 0) begin
          m1[i][w] = 1'b1;
          upd_in[i] = w;
          upd_out[w] = i;
        end
      end
    // OA, iteration 2, round e-4 (requests of free inputs to free outputs)
    if (k4 >= 0)
      for (int o = 0; o < N; o++) begin
        logic [N-1:0] col;
        bit out_taken;
        int w;
        out_taken = 0;
        for (int i = 0; i < N; i++) if (m1_h[slot(k4)][i][o]) out_taken = 1;
        for (int i = 0; i < N; i++)
          col[i] = rq_h[slot(k4)][i][o] && (m1_h[slot(k4)][i] == '0) && !out_taken;
        w = pick(col, g[k4 % 2][o]);
        if (w >= 0) g2[w][o] = 1'b1;
      end
    // IA, iteration 2, round e-5
    if (k5 >= 0)
      for (int i = 0; i < N; i++) begin
        int w;
        m2[i] = m1_h[slot(k5)][i];
        w = pick(gn2_h[slot(k5)][i], a[k5 % 2][i]);
        if (w >= 0) m2[i][w] = 1'b1;
      end
    // commit
    for (int i = 0; i < N; i++) begin
      if (k1 >= 0) gn1_h[slot(k1)][i] = g1[i];
      if (k2 >= 0) m1_h[slot(k2)][i]  = m1[i];
      if (k4 >= 0) gn2_h[slot(k4)][i] = g2[i];
      if (k5 >= 0) m2_h[slot(k5)][i]  = m2[i];
      if (upd_in[i] >= 0)  a[upd_par][i] = (upd_in[i] + 1) % N;
      if (upd_out[i] >= 0) g[upd_par][i] = (upd_out[i] + 1) % N;
    end
    edge_n++;
  end

  task automatic check_now();
    logic [N-1:0] exp1 [N], exp2 [N];
    int pairs, pairs1;
    pairs = 0; pairs1 = 0;
    for (int i = 0; i < N; i++) begin
      exp1[i] = (edge_n - 3 >= 0) ? m1_h[slot(edge_n - 3)][i] : '0;
      exp2[i] = (edge_n - 6 >= 0) ? m2_h[slot(edge_n - 6)][i] : '0;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (match1[i] != exp1[i] || match2[i] != exp2[i] ||
          match[i] != (two_iter ? exp2[i] : exp1[i])) begin
        failures++;
        if (failures < 10)
          $display("FAIL edge %0d input %0d: m1=%b/%b m2=%b/%b", edge_n, i,
                   match1[i], exp1[i], match2[i], exp2[i]);
      end
      pairs  += $countones(match[i]);
      pairs1 += $countones(match1[i]);
    end
    if ($countones({match2[0], match2[1], match2[2], match2[3], match2[4], match2[5], match2[6]}) > pairs1)
      deeper++;
  endtask

  function automatic int pairs_now();
    int p;
    p = 0;
    for (int i = 0; i < N; i++) p += $countones(match[i]);
    return p;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) req[i] = '0;
    two_iter = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. random requests, one then two iterations, with mode flips
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < N; i++) req[i] = N'($urandom) & N'($urandom);
      if (t == 1000) two_iter = 1;
      if (t > 2000 && t % 37 == 0) two_iter = ~two_iter;
      @(negedge clk);
      check_now();
      if (ptr_upd[0]) upd0++;
      if (ptr_upd[1]) upd1++;
    end
    // 2. saturated load, one iteration: full matching every cycle
    two_iter = 0;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) req[i] = '1;
      @(negedge clk);
      check_now();
      if (t >= 40) begin
        checks++;
        if (pairs_now() == N) full_cycles++;
        else begin
          partial_cycles++;
          failures++;
          $display("FAIL saturated cycle %0d: only %0d pairs", t, pairs_now());
        end
      end
    end
    // 3. latency of a lone request, one and two iterations
    for (int mode = 0; mode < 2; mode++) begin
      int lat;
      for (int i = 0; i < N; i++) req[i] = '0;
      two_iter = mode[0];
      repeat (8) begin @(negedge clk); check_now(); end
      req[2] = 7'b0010000;
      @(negedge clk);
      check_now();
      req[2] = '0;
      lat = 1;
      while (match[2] == '0 && lat < 20) begin
        @(negedge clk);
        check_now();
        lat++;
      end
      checks++;
      if (lat != (mode ? 6 : 3) || match[2] != 7'b0010000) begin
        failures++;
        $display("FAIL latency %0d iteration(s): %0d cycles", mode + 1, lat);
      end
    end
    checks++;
    if (upd0 == 0 || upd1 == 0 || deeper == 0) begin
      failures++;
      $display("FAIL mechanisms not seen: set0 %0d set1 %0d deeper %0d", upd0, upd1, deeper);
    end
    $display("full matchings %0d, counter updates set0 %0d set1 %0d, second iteration added pairs %0d times",
             full_cycles, upd0, upd1, deeper);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
