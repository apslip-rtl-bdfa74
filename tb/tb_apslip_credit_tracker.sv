// tb_apslip_credit_tracker: checks the credit counters of an East output
// (downstream is the neighbour's West input) and of an ejection output
// against a reference count started from hand-computed VOQ sizes. Sends and
// returns are random, including both in one cycle; sends happen only with
// credit and returns only below the start value, as a real neighbour does.
module tb_apslip_credit_tracker;
  import apslip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Expected start values: West input of a 64-flit pool under XY routing may
  // use E, N, S and the three local VOQs: 64 = 11+11+11+11+10+10.
  int init_e [7] = '{11, 0, 11, 11, 11, 10, 10};
  int init_l [7] = '{8, 0, 0, 0, 0, 0, 0};

  logic       cons [2], cin [2];
  logic [2:0] cons_q [2], cin_q [2];
  logic       has [2][7];
  logic [6:0] cred [2][7];
  int model [2][7];
  int checks = 0, failures = 0;

  apslip_credit_tracker #(.OUT_PORT(0)) dut_e (
    .clk, .rst_n, .consume(cons[0]), .consume_voq(cons_q[0]),
    .credit_in(cin[0]), .credit_in_voq(cin_q[0]), .has_credit(has[0]), .credits(cred[0]));
  apslip_credit_tracker #(.OUT_PORT(4)) dut_l (
    .clk, .rst_n, .consume(cons[1]), .consume_voq(cons_q[1]),
    .credit_in(cin[1]), .credit_in_voq(cin_q[1]), .has_credit(has[1]), .credits(cred[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int d = 0; d < 2; d++)
      for (int q = 0; q < 7; q++) begin
        checks++;
        if (int'(cred[d][q]) != model[d][q] || has[d][q] != (model[d][q] > 0)) begin
          failures++;
          $display("FAIL dut %0d voq %0d: %0d expected %0d", d, q, cred[d][q], model[d][q]);
        end
      end
  endtask

  initial begin
    for (int q = 0; q < 7; q++) begin
      model[0][q] = init_e[q];
      model[1][q] = init_l[q];
    end
    for (int d = 0; d < 2; d++) begin
      cons[d] = 0; cin[d] = 0; cons_q[d] = 0; cin_q[d] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 3000; t++) begin
      for (int d = 0; d < 2; d++) begin
        int a, b;
        a = (d == 0) ? $urandom_range(6, 0) : 0;
        b = (d == 0) ? $urandom_range(6, 0) : 0;
        cons[d]   = (model[d][a] > 0) && ($urandom_range(2, 0) != 0);
        cons_q[d] = 3'(a);
        // a credit can only come back for a flit sent earlier
        cin[d]    = (model[d][b] < ((d == 0) ? init_e[b] : init_l[b])) && ($urandom_range(2, 0) != 0);
        cin_q[d]  = 3'(b);
        if (cons[d]) model[d][a]--;
        if (cin[d])  model[d][b]++;
      end
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
