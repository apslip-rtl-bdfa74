// tb_apslip_crossbar: random permutations and partial matchings through the
// crossbar; every valid output must carry its selected input's word and every
// unselected output must be idle and zero.
module tb_apslip_crossbar;
  localparam int N = 7, W = 147;
  logic [W-1:0] in_data [N], out_data [N];
  logic sel_valid [N], out_valid [N];
  logic [2:0] sel_idx [N];
  int checks = 0, failures = 0;

  apslip_crossbar #(.N(N), .W(W)) dut (.in_data, .sel_valid, .sel_idx, .out_data, .out_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [N];
      for (int k = 0; k < N; k++) perm[k] = k;
      for (int k = N - 1; k > 0; k--) begin
        int j, tmp;
        j = $urandom_range(k, 0);
        tmp = perm[k]; perm[k] = perm[j]; perm[j] = tmp;
      end
      for (int k = 0; k < N; k++) begin
        in_data[k]   = {$urandom, $urandom, $urandom, $urandom, $urandom};
        sel_valid[k] = ($urandom_range(3, 0) != 0);
        sel_idx[k]   = 3'(perm[k]);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_valid[o] != sel_valid[o] ||
            out_data[o] != (sel_valid[o] ? in_data[perm[o]] : '0)) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
