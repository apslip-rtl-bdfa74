// apslip_credit_tracker: credit counters of one router output port.
//
// With virtual output queues the sending router, not the receiving one,
// decides which queue a flit will occupy downstream (look-ahead routing), so
// it keeps one credit counter per VOQ of the downstream input port, the way a
// virtual-channel router tracks downstream VCs. A flit may be sent only
// while the counter of its downstream VOQ is above zero.
//
// The counters start at the downstream VOQ sizes: for a mesh output the
// sizes of the neighbour's input port opposite(OUT_PORT) (apslip_pkg
// partition), for a local (ejection) output a single queue 0 of EJECT_CREDITS
// entries in the network interface (this design's choice; the document does
// not size the interface).
//
// Interface and timing: `consume` with `consume_voq` takes a credit at the
// clock edge when a flit is sent; `credit_in` with `credit_in_voq` returns
// one when the downstream router frees an entry. Both may happen in the same
// cycle. `has_credit[q]` is combinational from the registered counters.
module apslip_credit_tracker
  import apslip_pkg::*;
#(
  parameter int OUT_PORT      = 0,
  parameter int POOL          = POOL_FLITS,
  parameter int EJECT_CREDITS = 8,
  localparam int CW = $clog2(((POOL > EJECT_CREDITS) ? POOL : EJECT_CREDITS) + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              consume,
  input  logic [PORT_W-1:0] consume_voq,
  input  logic              credit_in,
  input  logic [PORT_W-1:0] credit_in_voq,
  output logic              has_credit [NUM_PORTS],
  output logic [CW-1:0]     credits    [NUM_PORTS]
);

  function automatic int init_credits(input int q);
    if (OUT_PORT < NUM_NET) return voq_size(opposite(OUT_PORT), q, POOL);
    return (q == 0) ? EJECT_CREDITS : 0;
  endfunction

  logic [CW-1:0] cred    [NUM_PORTS];
  logic [CW-1:0] cred_max [NUM_PORTS];   // downstream queue sizes (constant)

  for (genvar q = 0; q < NUM_PORTS; q++) begin : g_q
    localparam int INIT = init_credits(q);
    logic dec, inc;

    assign cred_max[q] = CW'(INIT);
    assign dec = consume   && (int'(consume_voq)   == q);
    assign inc = credit_in && (int'(credit_in_voq) == q);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) cred[q] <= CW'(INIT);
      else        cred[q] <= cred[q] - CW'(dec) + CW'(inc);
    end
  end

  always_comb begin
    for (int q = 0; q < NUM_PORTS; q++) begin
      has_credit[q] = (cred[q] != '0);
      credits[q]    = cred[q];
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && consume)
      assert (cred[consume_voq] != '0)
        else $error("output %0d sent without credit for VOQ %0d", OUT_PORT, consume_voq);
    if (rst_n && credit_in)
      assert (cred[credit_in_voq] < cred_max[credit_in_voq])
        else $error("output %0d received a credit beyond VOQ %0d size", OUT_PORT, credit_in_voq);
  end

endmodule
