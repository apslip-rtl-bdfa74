// apslip_voq_buffer: virtual output queues of one router input port.
//
// All flits of an input port live in one shared pool of POOL entries (64 in
// the document's configuration), the way VOQs are usually carved out of a
// single SRAM array. The pool is split statically and unevenly into one
// circular FIFO per output port; the split comes from apslip_pkg::voq_size
// and gives space only to the VOQs that XY routing can reach from this input
// port. Because every flit in a VOQ goes to the same output, flits of
// different packets may share a queue; the order of flits within a queue is
// kept.
//
// Interface and timing:
//  * wr_valid/wr_voq/wr_flit write one flit at the tail of VOQ wr_voq at the
//    clock edge. The upstream sender guarantees space through credits; an
//    assertion flags a write into a full queue.
//  * rd_valid/rd_voq pop the head of VOQ rd_voq at the clock edge; rd_flit
//    shows that head combinationally in the same cycle (switch traversal).
//  * count[q] is the occupancy of VOQ q, head_lar[q] the look-ahead route of
//    its head flit (used to check downstream credits when requesting), and
//    occupancy the total number of flits held.
// The head look-ahead routes are kept in a small register array next to the
// flit storage so all of them can be read at once; the flit storage needs
// one write and one read port only.
module apslip_voq_buffer
  import apslip_pkg::*;
#(
  parameter int IN_PORT = 0,
  parameter int POOL    = POOL_FLITS,
  localparam int AW = $clog2(POOL),
  localparam int CW = $clog2(POOL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic [PORT_W-1:0] wr_voq,
  input  flit_t             wr_flit,
  input  logic              rd_valid,
  input  logic [PORT_W-1:0] rd_voq,
  output flit_t             rd_flit,
  output logic [CW-1:0]     count    [NUM_PORTS],
  output logic [PORT_W-1:0] head_lar [NUM_PORTS],
  output logic [CW-1:0]     occupancy
);

  flit_t             mem     [POOL];
  logic [PORT_W-1:0] lar_mem [POOL];

  logic [AW-1:0] head [NUM_PORTS];
  logic [AW-1:0] tail [NUM_PORTS];
  logic [CW-1:0] cnt  [NUM_PORTS];

  logic [CW-1:0] cap [NUM_PORTS];   // partition size per VOQ (constant)

  // One circular FIFO region per VOQ; its bounds are elaboration constants.
  for (genvar q = 0; q < NUM_PORTS; q++) begin : g_q
    localparam int BASE = voq_base(IN_PORT, q, POOL);
    localparam int SIZE = voq_size(IN_PORT, q, POOL);
    localparam int LAST = (SIZE > 0) ? BASE + SIZE - 1 : BASE;
    logic do_wr, do_rd;

    assign cap[q] = CW'(SIZE);
    assign do_wr  = wr_valid && (int'(wr_voq) == q);
    assign do_rd  = rd_valid && (int'(rd_voq) == q) && (cnt[q] != '0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        head[q] <= AW'(BASE);
        tail[q] <= AW'(BASE);
        cnt[q]  <= '0;
      end else begin
        if (do_wr) tail[q] <= (int'(tail[q]) == LAST) ? AW'(BASE) : tail[q] + 1'b1;
        if (do_rd) head[q] <= (int'(head[q]) == LAST) ? AW'(BASE) : head[q] + 1'b1;
        cnt[q] <= cnt[q] + CW'(do_wr) - CW'(do_rd);
      end
    end
  end

  // Flit storage: one write port, no reset needed (only read where valid).
  always_ff @(posedge clk) begin
    if (wr_valid) begin
      mem[tail[wr_voq]]     <= wr_flit;
      lar_mem[tail[wr_voq]] <= wr_flit.lar;
    end
  end

  assign rd_flit = mem[head[rd_voq]];

  always_comb begin
    occupancy = '0;
    for (int q = 0; q < NUM_PORTS; q++) begin
      count[q]    = cnt[q];
      head_lar[q] = lar_mem[head[q]];
      occupancy   = occupancy + cnt[q];
    end
  end

  // A write must find space (credit discipline) in a VOQ that has any.
  always_ff @(posedge clk) begin
    if (rst_n && wr_valid) begin
      assert (cnt[wr_voq] < cap[wr_voq])
        else $error("VOQ %0d of input %0d written while full", wr_voq, IN_PORT);
    end
    if (rst_n && rd_valid) begin
      assert (cnt[rd_voq] != '0)
        else $error("VOQ %0d of input %0d read while empty", rd_voq, IN_PORT);
    end
  end

endmodule
