// apslip_rr_arb: round-robin arbiter driven by an external priority counter.
//
// Used for both arbitration steps of iSLIP: an output port choosing among the
// input ports that request it (output arbitration, OA) and an input port
// choosing among the output ports that granted it (input arbitration, IA).
// The winner is the first requester at or after index `ptr`, searching
// upwards and wrapping around. The priority counter itself lives outside the
// arbiter, because the allocator keeps two private copies of every counter
// (one for even and one for odd allocation rounds) and moves them only when
// a grant is accepted, as iSLIP requires.
//
// Purely combinational. `gnt` is one-hot (or zero when nothing requests),
// `gnt_idx` its index and `gnt_valid` is high when any request is present.
module apslip_rr_arb #(
  parameter int N = 7,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          gnt_valid
);

  always_comb begin
    int idx;
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = (int'(ptr) + k) % N;
      if (!gnt_valid && req[idx]) begin
        gnt[idx]  = 1'b1;
        gnt_idx   = IW'(idx);
        gnt_valid = 1'b1;
      end
    end
  end

endmodule
