// tb_apslip_effort_ctrl: checks the adaptive-effort mode against a reference
// written from hand-computed VOQ sizes (64-flit pools split over the queues
// XY routing can use). Directed steps first (one queue just below half full,
// then at half, then draining without emptying, then empty), then random
// occupancies: the mode must rise when any queue holds at least half its
// entries (rounded up) and fall only when every queue is empty, one cycle
// after the condition.
module tb_apslip_effort_ctrl;
  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [6:0] occ [N][N];
  logic two_iter, go_deep, go_shallow;
  int checks = 0, failures = 0, ups = 0, downs = 0;
  bit model = 0;

  int size [N][N] = '{
    '{ 0, 11, 11, 11, 11, 10, 10},   // East input
    '{11,  0, 11, 11, 11, 10, 10},   // West input
    '{ 0,  0,  0, 16, 16, 16, 16},   // North input
    '{ 0,  0, 16,  0, 16, 16, 16},   // South input
    '{10,  9,  9,  9,  9,  9,  9},   // local inputs
    '{10,  9,  9,  9,  9,  9,  9},
    '{10,  9,  9,  9,  9,  9,  9}};

  apslip_effort_ctrl #(.POOL(64), .THRESH_PCT(50)) dut (
    .clk, .rst_n, .occ, .two_iter, .go_deep, .go_shallow);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_check();
    bit any_over, all_empty;
    any_over = 0; all_empty = 1;
    for (int i = 0; i < N; i++)
      for (int q = 0; q < N; q++) begin
        if (size[i][q] > 0 && 2 * int'(occ[i][q]) >= size[i][q]) any_over = 1;
        if (occ[i][q] != 0) all_empty = 0;
      end
    @(posedge clk);
    if (!model && any_over) begin model = 1; ups++; end
    else if (model && all_empty) begin model = 0; downs++; end
    @(negedge clk);
    checks++;
    if (two_iter != model) begin
      failures++;
      $display("FAIL at %0t: two_iter=%0d expected %0d", $time, two_iter, model);
    end
  endtask

  task automatic clear();
    for (int i = 0; i < N; i++) for (int q = 0; q < N; q++) occ[i][q] = '0;
  endtask

  initial begin
    clear();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    occ[2][3] = 7;  step_check(); step_check();      // 7 of 16: below
    occ[4][1] = 4;  step_check();                    // 4 of 9: below
    occ[4][1] = 5;  step_check();                    // 5 of 9: crosses
    occ[4][1] = 1;  step_check(); step_check();      // below, not empty: stays
    occ[2][3] = 0;  step_check();
    occ[4][1] = 0;  step_check();                    // empty: back to one
    occ[0][0] = 0;  occ[0][5] = 5; step_check();     // 5 of 10: crosses
    clear();        step_check();
    if (ups != 2 || downs != 2) begin
      failures++;
      $display("FAIL directed sequence: %0d ups %0d downs", ups, downs);
    end
    for (int t = 0; t < 4000; t++) begin
      int sel;
      sel = $urandom_range(9, 0);
      clear();
      if (sel >= 3)
        for (int k = 0; k < 3; k++) begin
          int i, q;
          i = $urandom_range(N - 1, 0);
          q = $urandom_range(N - 1, 0);
          if (size[i][q] > 0) occ[i][q] = 7'($urandom_range((sel < 7) ? (size[i][q] - 1) / 2 : size[i][q], 0));
        end
      step_check();
    end
    $display("mode changes: %0d up, %0d down", ups, downs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
