// apslip_crossbar: the router's P x P switch fabric.
//
// Each output port has its own multiplexer over all input ports. The switch
// allocator's matching connects at most one input to each output and at most
// one output to each input, so every output simply selects the input named
// by `sel_idx` when `sel_valid` is set and drives zeros otherwise.
//
// Combinational; it performs the switch-traversal stage of the router. The
// document names the fabric only; the mux-per-output structure is this
// design's choice.
module apslip_crossbar #(
  parameter int N = 7,
  parameter int W = 147,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  in_data   [N],
  input  logic          sel_valid [N],   // per output
  input  logic [IW-1:0] sel_idx   [N],   // per output: which input
  output logic [W-1:0]  out_data  [N],
  output logic          out_valid [N]
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_valid[o] = sel_valid[o];
      out_data[o]  = sel_valid[o] ? in_data[sel_idx[o]] : '0;
    end
  end

endmodule
