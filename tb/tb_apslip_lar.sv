// tb_apslip_lar: self-check of look-ahead routing over an 8x8 mesh.
// For every router position, every output direction that stays inside the
// mesh and every destination, the expected port at the neighbour is worked
// out by walking the XY route: first fix X, then Y, then eject at the local
// unit.
module tb_apslip_lar;
  import apslip_pkg::*;
  logic [2:0] my_x, my_y, dst_x, dst_y, out_port, next_port;
  logic [1:0] dst_unit;
  int checks = 0, failures = 0;

  apslip_lar dut (.my_x, .my_y, .out_port, .dst_x, .dst_y, .dst_unit, .next_port);

  function automatic int xy_port(int cx, int cy, int dx, int dy, int unit);
    if (dx != cx) return (dx > cx) ? 0 : 1;
    if (dy != cy) return (dy > cy) ? 2 : 3;
    return 4 + unit;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        for (int o = 0; o < 7; o++) begin
          int nx, ny;
          nx = x + ((o == 0) ? 1 : 0) - ((o == 1) ? 1 : 0);
          ny = y + ((o == 2) ? 1 : 0) - ((o == 3) ? 1 : 0);
          if (nx < 0 || nx > 7 || ny < 0 || ny > 7) continue;
          for (int dx = 0; dx < 8; dx++)
            for (int dy = 0; dy < 8; dy++)
              for (int u = 0; u < 3; u++) begin
                int exp;
                my_x = 3'(x); my_y = 3'(y); out_port = 3'(o);
                dst_x = 3'(dx); dst_y = 3'(dy); dst_unit = 2'(u);
                #1;
                exp = (o >= 4) ? 0 : xy_port(nx, ny, dx, dy, u);
                checks++;
                if (int'(next_port) != exp) begin
                  failures++;
                  if (failures < 10)
                    $display("FAIL at (%0d,%0d) out %0d dst (%0d,%0d,%0d): got %0d expected %0d",
                             x, y, o, dx, dy, u, next_port, exp);
                end
              end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
