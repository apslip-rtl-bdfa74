// tb_apslip_mesh: end-to-end test of a 3x3 apSLIP mesh (the size of the
// full-system network the design was evaluated in), driven and checked by
// tb_mesh_env: lone flits; uniform random, bit-complement and transpose
// traffic in 5-flit and 1-flit packets; a hot spot; drain. Router sizes are
// the defaults.
module tb_apslip_mesh;
  import apslip_pkg::*;
  localparam int MX = 3, MY = 3, T = MX * MY, L = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, done;
  logic inj_valid [T][L], inj_credit_valid [T][L], ej_valid [T][L], ej_credit_valid [T][L];
  flit_t inj_flit [T][L], ej_flit [T][L];
  logic [2:0] inj_credit_voq [T][L], ej_credit_voq [T][L];
  logic two_iter [T];
  int checks, failures;

  apslip_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_credit_valid, .inj_credit_voq,
    .ej_valid, .ej_flit, .ej_credit_valid, .ej_credit_voq, .two_iter);

  tb_mesh_env #(.MX(MX), .MY(MY), .LOAD_CYCLES(2000), .LOAD_PCT(30)) env (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_credit_valid, .inj_credit_voq,
    .ej_valid, .ej_flit, .ej_credit_valid, .ej_credit_voq, .two_iter,
    .done, .checks, .failures);

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
