// apslip_pkg: types, constants and elaboration-time functions shared by the
// apSLIP virtual-output-queued (VOQ) router.
//
// The router has seven ports: four mesh directions and three local ports
// (core with its L1, L2 bank, directory slice), as in the tiled 8x8 system
// the design targets. Port numbering is this design's own choice:
//   0 = East (X+), 1 = West (X-), 2 = North (Y+), 3 = South (Y-),
//   4..6 = local ports L0..L2.
// Input port d receives the link that comes from direction d, so a flit sent
// out of output port o arrives at input port opposite(o) of the neighbour.
//
// A flit carries 128 payload bits plus the 8-bit per-flit address the VOQ
// scheme needs in an 8x8 mesh with up to four virtual networks (3+3 bits of
// destination coordinates, 2 bits of virtual network). Two further sideband
// fields are this design's own: dst_unit picks one of the three local ports
// at the destination tile, and lar is the look-ahead route, i.e. the VOQ the
// flit is to occupy in the router that receives it.
//
// Under XY dimension-ordered routing some VOQs can never be used (a flit
// arriving on a Y port never turns into X). The shared 64-flit pool of an
// input port is therefore split unevenly: only VOQs reachable under XY
// routing get space, shared as evenly as the pool size allows. The exact
// split is this design's choice; the static, non-uniform partitioning is the
// document's.
package apslip_pkg;

  localparam int NUM_PORTS   = 7;   // 4 mesh + 3 local
  localparam int NUM_NET     = 4;
  localparam int NUM_LOCAL   = 3;
  localparam int PORT_W      = 3;
  localparam int DATA_W      = 128; // flit payload width
  localparam int COORD_W     = 3;   // 8x8 mesh
  localparam int VNET_W      = 2;   // up to four virtual networks
  localparam int UNIT_W      = 2;   // selects one of the three local ports
  localparam int POOL_FLITS  = 64;  // shared VOQ pool per input port

  localparam int P_EAST  = 0;
  localparam int P_WEST  = 1;
  localparam int P_NORTH = 2;
  localparam int P_SOUTH = 3;
  localparam int P_L0    = 4;

  typedef struct packed {
    logic [DATA_W-1:0]  data;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [VNET_W-1:0]  vnet;
    logic [UNIT_W-1:0]  dst_unit;
    logic [PORT_W-1:0]  lar;      // VOQ (output port) at the receiving router
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Port on the other end of a mesh link.
  function automatic int opposite(input int p);
    case (p)
      0: return 1;
      1: return 0;
      2: return 3;
      3: return 2;
      default: return p;
    endcase
  endfunction

  // Can a flit arriving on input port in_p leave through output port out_p
  // under XY routing without a U-turn?
  function automatic bit xy_allowed(input int in_p, input int out_p);
    if (in_p >= NUM_NET) return 1'b1;                  // injection: anywhere
    if (out_p >= NUM_NET) return 1'b1;                 // ejection always
    if (out_p == in_p) return 1'b0;                    // no U-turn
    if (in_p <= 1) return 1'b1;                        // X input: X straight or turn to Y
    return (out_p == opposite(in_p));                  // Y input: Y straight only
  endfunction

  // Flits of the pool given to VOQ out_p of input port in_p.
  function automatic int voq_size(input int in_p, input int out_p, input int pool);
    int n, rank;
    n = 0;
    rank = 0;
    for (int q = 0; q < NUM_PORTS; q++) begin
      if (xy_allowed(in_p, q)) begin
        if (q < out_p) rank++;
        n++;
      end
    end
    if (!xy_allowed(in_p, out_p)) return 0;
    return pool / n + ((rank < pool % n) ? 1 : 0);
  endfunction

  // First pool entry of VOQ out_p of input port in_p.
  function automatic int voq_base(input int in_p, input int out_p, input int pool);
    int b;
    b = 0;
    for (int q = 0; q < out_p; q++) b += voq_size(in_p, q, pool);
    return b;
  endfunction

endpackage
