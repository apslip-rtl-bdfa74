// tb_apslip_mesh_full: end-to-end test of the mesh at its default size, an
// 8x8 mesh of 64 routers with all router sizes at their defaults, driven and
// checked by tb_mesh_env: lone flits; uniform random, bit-complement and
// transpose traffic in 5-flit and 1-flit packets at 10% per local port, i.e.
// 0.3 flits per tile per cycle, the injection range of the high-load
// workloads the design was evaluated with; a hot spot; drain.
module tb_apslip_mesh_full;
  import apslip_pkg::*;
  localparam int MX = 8, MY = 8, T = MX * MY, L = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, done;
  logic inj_valid [T][L], inj_credit_valid [T][L], ej_valid [T][L], ej_credit_valid [T][L];
  flit_t inj_flit [T][L], ej_flit [T][L];
  logic [2:0] inj_credit_voq [T][L], ej_credit_voq [T][L];
  logic two_iter [T];
  int checks, failures;

  apslip_mesh dut (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_credit_valid, .inj_credit_voq,
    .ej_valid, .ej_flit, .ej_credit_valid, .ej_credit_voq, .two_iter);

  tb_mesh_env #(.MX(MX), .MY(MY), .LOAD_CYCLES(1000), .LOAD_PCT(10)) env (
    .clk, .rst_n, .inj_valid, .inj_flit, .inj_credit_valid, .inj_credit_voq,
    .ej_valid, .ej_flit, .ej_credit_valid, .ej_credit_voq, .two_iter,
    .done, .checks, .failures);

  initial begin
    repeat (400000) @(posedge clk);
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
