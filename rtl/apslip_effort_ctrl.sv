// apslip_effort_ctrl: chooses how many iSLIP iterations the allocator runs.
//
// The allocator always has the full two-iteration, six-stage pipeline; this
// controller only decides whether the matching is taken after the first
// iteration (three stages, low latency) or after the second (six stages,
// better matching). It switches to two iterations when queue occupancy
// crosses the threshold (50% in the document) and goes back to one iteration
// only once all queues are empty, which gives hysteresis and means no
// two-iteration matching that is still in flight can meet a new
// one-iteration one for flits that exist.
//
// Occupancy is judged per virtual output queue against that queue's own
// share of the pool: the mode rises when any VOQ of any input port holds at
// least THRESH_PCT percent of its entries (rounded up). Measuring single
// queues rather than whole pools is this design's choice; with the uneven
// static split a whole pool rarely passes half full, since traffic through a
// router concentrates on a few of its queues.
//
// Interface and timing: `occ[i][q]` is the occupancy of VOQ q of input port
// i; `two_iter` is registered and changes one cycle after the condition.
// `go_deep`/`go_shallow` pulse in the cycle the mode is changed.
module apslip_effort_ctrl
  import apslip_pkg::*;
#(
  parameter int POOL       = POOL_FLITS,
  parameter int THRESH_PCT = 50,
  localparam int N  = NUM_PORTS,
  localparam int CW = $clog2(POOL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] occ [N][N],
  output logic          two_iter,
  output logic          go_deep,
  output logic          go_shallow
);

  // Per-queue comparisons against constant thresholds (rounded up).
  logic [N-1:0] q_over  [N];
  logic [N-1:0] q_empty [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    for (genvar q = 0; q < N; q++) begin : g_q
      localparam int SIZE   = voq_size(i, q, POOL);
      localparam int THRESH = (SIZE * THRESH_PCT + 99) / 100;
      assign q_over[i][q]  = (SIZE > 0) && (int'(occ[i][q]) >= THRESH);
      assign q_empty[i][q] = (occ[i][q] == '0);
    end
  end

  logic over, empty;

  always_comb begin
    over  = 1'b0;
    empty = 1'b1;
    for (int i = 0; i < N; i++) begin
      over  = over  | (|q_over[i]);
      empty = empty & (&q_empty[i]);
    end
    go_deep    = !two_iter && over;
    go_shallow =  two_iter && empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          two_iter <= 1'b0;
    else if (go_deep)    two_iter <= 1'b1;
    else if (go_shallow) two_iter <= 1'b0;
  end

endmodule
