// tb_apslip_rr_arb: exhaustive self-check of the round-robin arbiter.
// Every request pattern is tried with every priority counter value; the
// expected winner is the requester with the smallest cyclic distance from the
// counter, and at most one grant may be raised.
module tb_apslip_rr_arb;
  localparam int N = 7;
  logic [N-1:0] req;
  logic [2:0]   ptr;
  logic [N-1:0] gnt;
  logic [2:0]   gnt_idx;
  logic         gnt_valid;
  int checks = 0, failures = 0;

  apslip_rr_arb #(.N(N)) dut (.req, .ptr, .gnt, .gnt_idx, .gnt_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) begin
      for (int r = 0; r < (1 << N); r++) begin
        int best, bestd;
        req = N'(r);
        ptr = 3'(p);
        #1;
        best = -1;
        bestd = N;
        for (int i = 0; i < N; i++)
          if (req[i] && ((i - p + N) % N) < bestd) begin
            bestd = (i - p + N) % N;
            best  = i;
          end
        checks++;
        if (best < 0) begin
          if (gnt_valid || gnt != '0) begin
            failures++;
            $display("FAIL req=%b ptr=%0d: grant without request", req, p);
          end
        end else if (!gnt_valid || gnt != (N'(1) << best) || int'(gnt_idx) != best) begin
          failures++;
          $display("FAIL req=%b ptr=%0d: gnt=%b idx=%0d expected %0d", req, p, gnt, gnt_idx, best);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
