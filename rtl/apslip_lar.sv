// apslip_lar: look-ahead routing unit.
//
// A VOQ router has to know, before it sends a flit, which VOQ of the next
// router the flit will occupy, because the sender tracks the free space of
// every downstream VOQ with credits. This unit therefore evaluates the
// routing function one hop ahead: given this router's coordinates, the output
// port the flit will leave through (its VOQ here) and the flit's destination,
// it returns the output port the flit will take at the next router.
//
// Routing is XY dimension-ordered (X first, then Y), as in the document;
// mesh coordinates grow towards East (X+) and North (Y+). A flit that leaves
// through a local (ejection) port has no next router: its look-ahead route is
// 0, which the network interface's credit counter uses as its only queue.
// The local port at the destination tile is taken from the flit's dst_unit
// field (this design's choice; dst_unit values above 2 select L2).
//
// Combinational; it sits in router stage 1, next to the request stage.
module apslip_lar
  import apslip_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [PORT_W-1:0]  out_port,   // output port at this router
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic [UNIT_W-1:0]  dst_unit,
  output logic [PORT_W-1:0]  next_port   // output port at the next router
);

  logic [COORD_W-1:0] nx, ny;
  logic [PORT_W-1:0]  local_port;

  always_comb begin
    nx = my_x;
    ny = my_y;
    case (int'(out_port))
      P_EAST:  nx = my_x + 1'b1;
      P_WEST:  nx = my_x - 1'b1;
      P_NORTH: ny = my_y + 1'b1;
      P_SOUTH: ny = my_y - 1'b1;
      default: ;
    endcase

    local_port = (dst_unit > 2'd2) ? PORT_W'(P_L0 + 2) : PORT_W'(P_L0) + PORT_W'(dst_unit);

    if (int'(out_port) >= NUM_NET)  next_port = '0;
    else if (dst_x > nx)            next_port = PORT_W'(P_EAST);
    else if (dst_x < nx)            next_port = PORT_W'(P_WEST);
    else if (dst_y > ny)            next_port = PORT_W'(P_NORTH);
    else if (dst_y < ny)            next_port = PORT_W'(P_SOUTH);
    else                            next_port = local_port;
  end

endmodule
