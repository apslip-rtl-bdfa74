// tb_apslip_voq_buffer: random writes and reads on two input ports with
// different pool splits, compared with per-queue reference FIFOs.
// A North input (flits travelling south) may use only the South and the three
// local VOQs, 16 flits each; a local input uses all seven, 10+9*6 flits.
// Writes go only where the reference queue has room, so every VOQ is driven
// to full; the head flit, its look-ahead field, the counts and the total
// occupancy are checked every cycle.
module tb_apslip_voq_buffer;
  import apslip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int cap [2][7] = '{'{0, 0, 0, 16, 16, 16, 16}, '{10, 9, 9, 9, 9, 9, 9}};

  logic       wr_valid [2], rd_valid [2];
  logic [2:0] wr_voq [2], rd_voq [2];
  flit_t      wr_flit [2], rd_flit [2];
  logic [6:0] count [2][7];
  logic [2:0] head_lar [2][7];
  logic [6:0] occupancy [2];
  flit_t      q [2][7][$];
  int checks = 0, failures = 0, fulls = 0;

  apslip_voq_buffer #(.IN_PORT(2)) dut_n (
    .clk, .rst_n, .wr_valid(wr_valid[0]), .wr_voq(wr_voq[0]), .wr_flit(wr_flit[0]),
    .rd_valid(rd_valid[0]), .rd_voq(rd_voq[0]), .rd_flit(rd_flit[0]),
    .count(count[0]), .head_lar(head_lar[0]), .occupancy(occupancy[0]));
  apslip_voq_buffer #(.IN_PORT(4)) dut_l (
    .clk, .rst_n, .wr_valid(wr_valid[1]), .wr_voq(wr_voq[1]), .wr_flit(wr_flit[1]),
    .rd_valid(rd_valid[1]), .rd_voq(rd_voq[1]), .rd_flit(rd_flit[1]),
    .count(count[1]), .head_lar(head_lar[1]), .occupancy(occupancy[1]));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t rand_flit();
    flit_t f;
    f.data     = {$urandom, $urandom, $urandom, $urandom};
    f.dst_x    = 3'($urandom); f.dst_y = 3'($urandom);
    f.vnet     = 2'($urandom); f.dst_unit = 2'($urandom_range(2, 0));
    f.lar      = 3'($urandom_range(6, 0));
    return f;
  endfunction

  task automatic compare();
    for (int d = 0; d < 2; d++) begin
      int tot;
      tot = 0;
      for (int v = 0; v < 7; v++) begin
        tot += q[d][v].size();
        checks++;
        if (int'(count[d][v]) != q[d][v].size() ||
            (q[d][v].size() > 0 && head_lar[d][v] != q[d][v][0].lar)) begin
          failures++;
          $display("FAIL dut %0d voq %0d count %0d expected %0d", d, v, count[d][v], q[d][v].size());
        end
        if (q[d][v].size() == cap[d][v] && cap[d][v] > 0) fulls++;
      end
      checks++;
      if (int'(occupancy[d]) != tot) begin
        failures++;
        $display("FAIL dut %0d occupancy %0d expected %0d", d, occupancy[d], tot);
      end
    end
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      wr_valid[d] = 0; rd_valid[d] = 0; wr_voq[d] = 0; rd_voq[d] = 0; wr_flit[d] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      // write-heavy and read-heavy phases so queues fill and drain
      int wp;
      wp = ((t / 500) % 2 == 0) ? 80 : 30;
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        int wv, rv;
        wv = $urandom_range(6, 0);
        rv = $urandom_range(6, 0);
        wr_valid[d] = (q[d][wv].size() < cap[d][wv]) && ($urandom_range(99, 0) < wp);
        wr_voq[d]   = 3'(wv);
        wr_flit[d]  = rand_flit();
        rd_valid[d] = (q[d][rv].size() > 0) && ($urandom_range(99, 0) < 100 - wp);
        rd_voq[d]   = 3'(rv);
      end
      #1;
      for (int d = 0; d < 2; d++) begin
        if (rd_valid[d]) begin
          checks++;
          if (rd_flit[d] != q[d][rd_voq[d]][0]) begin
            failures++;
            $display("FAIL dut %0d voq %0d wrong head flit", d, rd_voq[d]);
          end
        end
      end
      @(posedge clk);
      for (int d = 0; d < 2; d++) begin
        if (rd_valid[d]) void'(q[d][rd_voq[d]].pop_front());
        if (wr_valid[d]) q[d][wr_voq[d]].push_back(wr_flit[d]);
      end
      #1;
      compare();
    end
    if (fulls == 0) begin
      failures++;
      $display("FAIL no queue ever filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
