// apslip_mesh: a 2-D mesh of apSLIP routers (8x8 by default), the network the
// router was designed for.
//
// Each tile has one router with three local ports (core with L1, L2 bank,
// directory slice), brought out here as injection and ejection channels.
// Neighbouring routers are joined by their output registers, which form the
// 1-cycle link: output port o of router (x,y) feeds input port opposite(o)
// of the neighbour, and that input port's credit output feeds credit input o
// of router (x,y). Mesh-edge ports are tied off (no flits, no credits); XY
// routing never uses them for destinations inside the mesh.
//
// Tile t = y*MESH_X + x sits at (x,y); X grows East, Y grows North.
// Local channel k of tile t is router port 4+k. An injecting interface must
// set flit.lar to the flit's output port at its own router (routing from its
// own tile) and may send only with a credit for that VOQ; the router returns
// credits on inj_credit_*. Ejected flits arrive on ej_*; the interface returns
// one credit per consumed flit on ej_credit_* (queue index 0).
module apslip_mesh
  import apslip_pkg::*;
#(
  parameter int MESH_X        = 8,
  parameter int MESH_Y        = 8,
  parameter int POOL          = POOL_FLITS,
  parameter int THRESH_PCT    = 50,
  parameter int EJECT_CREDITS = 8,
  localparam int T = MESH_X * MESH_Y,
  localparam int P = NUM_PORTS,
  localparam int L = NUM_LOCAL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inj_valid        [T][L],
  input  flit_t             inj_flit         [T][L],
  output logic              inj_credit_valid [T][L],
  output logic [PORT_W-1:0] inj_credit_voq   [T][L],
  output logic              ej_valid         [T][L],
  output flit_t             ej_flit          [T][L],
  input  logic              ej_credit_valid  [T][L],
  input  logic [PORT_W-1:0] ej_credit_voq    [T][L],
  output logic              two_iter         [T]
);

  logic              r_out_valid [T][P];
  flit_t             r_out_flit  [T][P];
  logic              r_cr_valid  [T][P];
  logic [PORT_W-1:0] r_cr_voq    [T][P];
  logic              r_in_valid  [T][P];
  flit_t             r_in_flit   [T][P];
  logic              r_ci_valid  [T][P];
  logic [PORT_W-1:0] r_ci_voq    [T][P];
  logic              r_used      [T][P];
  logic              r_dropped   [T][P];

  // neighbour tile in direction d, or -1 outside the mesh
  function automatic int neighbour(input int t, input int d);
    int x, y;
    x = t % MESH_X;
    y = t / MESH_X;
    case (d)
      P_EAST:  return (x + 1 < MESH_X) ? t + 1 : -1;
      P_WEST:  return (x > 0) ? t - 1 : -1;
      P_NORTH: return (y + 1 < MESH_Y) ? t + MESH_X : -1;
      P_SOUTH: return (y > 0) ? t - MESH_X : -1;
      default: return -1;
    endcase
  endfunction

  for (genvar t = 0; t < T; t++) begin : g_tile
    for (genvar d = 0; d < NUM_NET; d++) begin : g_dir
      localparam int NB = neighbour(t, d);
      if (NB >= 0) begin : g_link
        assign r_in_valid[t][d] = r_out_valid[NB][opposite(d)];
        assign r_in_flit[t][d]  = r_out_flit[NB][opposite(d)];
        assign r_ci_valid[t][d] = r_cr_valid[NB][opposite(d)];
        assign r_ci_voq[t][d]   = r_cr_voq[NB][opposite(d)];
      end else begin : g_edge
        assign r_in_valid[t][d] = 1'b0;
        assign r_in_flit[t][d]  = '0;
        assign r_ci_valid[t][d] = 1'b0;
        assign r_ci_voq[t][d]   = '0;
      end
    end
    for (genvar k = 0; k < L; k++) begin : g_loc
      assign r_in_valid[t][NUM_NET+k]  = inj_valid[t][k];
      assign r_in_flit[t][NUM_NET+k]   = inj_flit[t][k];
      assign r_ci_valid[t][NUM_NET+k]  = ej_credit_valid[t][k];
      assign r_ci_voq[t][NUM_NET+k]    = ej_credit_voq[t][k];
      assign inj_credit_valid[t][k]    = r_cr_valid[t][NUM_NET+k];
      assign inj_credit_voq[t][k]      = r_cr_voq[t][NUM_NET+k];
      assign ej_valid[t][k]            = r_out_valid[t][NUM_NET+k];
      assign ej_flit[t][k]             = r_out_flit[t][NUM_NET+k];
    end

    apslip_router #(.POOL(POOL), .THRESH_PCT(THRESH_PCT), .EJECT_CREDITS(EJECT_CREDITS)) u_router (
      .clk(clk), .rst_n(rst_n),
      .my_x(COORD_W'(t % MESH_X)), .my_y(COORD_W'(t / MESH_X)),
      .in_valid(r_in_valid[t]), .in_flit(r_in_flit[t]),
      .credit_out_valid(r_cr_valid[t]), .credit_out_voq(r_cr_voq[t]),
      .out_valid(r_out_valid[t]), .out_flit(r_out_flit[t]),
      .credit_in_valid(r_ci_valid[t]), .credit_in_voq(r_ci_voq[t]),
      .two_iter(two_iter[t]), .grant_used(r_used[t]), .grant_dropped(r_dropped[t]));
  end

endmodule
