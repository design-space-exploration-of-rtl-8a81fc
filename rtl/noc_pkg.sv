// noc_pkg: types and constants shared by the 3x3 mesh NoC router family.
//
// Port order and direction codes. A router has five ports. Inside the RTL a
// port is an index 0..4 (N, E, S, W, L). The direction decoder hands the
// arbiter a 3-bit direction code: 001 North, 010 East, 011 South, 100 West,
// 101 Local (these codes follow the document); code 000 is unused.
//
// Head flit (FLIT_SIZE bits, 8 by default): the top 4 bits carry the
// destination node number (1..9 in the 3x3 mesh, R1 at the top-left corner,
// numbered row by row). In the wormhole versions the low FLIT_SIZE-4 bits carry
// the packet length in flits, head included. In the virtual-cut-through version
// the packet length is a fixed design parameter and only the least significant
// bit is used: the source sets it to 1 to announce the packet. Body flits carry
// payload only; there is no tail flit and no flit-type field.
//
// Router versions:
//   VCTR      virtual cut-through, fixed packet length, a packet is only
//             started when the next input buffer can hold all of it
//   WHR_1CLK  wormhole, packet length taken from the head flit, per-flit credit
//   WHR_2CLK  wormhole with the dual-clock mechanism: heads are routed only on
//             head-clock cycles, body flits move on every (fast) body-clock
//             cycle. In this RTL the head clock is a clock enable.
package noc_pkg;

  typedef enum logic [1:0] {
    VCTR     = 2'd0,
    WHR_1CLK = 2'd1,
    WHR_2CLK = 2'd2
  } router_version_e;

  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PORT_W    = 3;   // width of a port index / direction code
  localparam int unsigned ADDR_W    = 4;   // destination-address field of the head flit

  // Port indices
  localparam logic [PORT_W-1:0] P_N = 3'd0;
  localparam logic [PORT_W-1:0] P_E = 3'd1;
  localparam logic [PORT_W-1:0] P_S = 3'd2;
  localparam logic [PORT_W-1:0] P_W = 3'd3;
  localparam logic [PORT_W-1:0] P_L = 3'd4;

  // Direction codes produced by the direction decoder (document's encoding)
  localparam logic [2:0] DIR_NORTH = 3'b001;
  localparam logic [2:0] DIR_EAST  = 3'b010;
  localparam logic [2:0] DIR_SOUTH = 3'b011;
  localparam logic [2:0] DIR_WEST  = 3'b100;
  localparam logic [2:0] DIR_LOCAL = 3'b101;

  // Arbiter state: idle, or forwarding the packet of one input port
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_N    = 3'd1,
    ST_E    = 3'd2,
    ST_S    = 3'd3,
    ST_W    = 3'd4,
    ST_L    = 3'd5
  } arb_state_e;

  // Default sizes (document: flit size 8 bits, buffer depth 8, VCT packet 8 flits)
  localparam int unsigned DEF_FLIT_SIZE   = 8;
  localparam int unsigned DEF_BUFFER_SIZE = 8;
  localparam int unsigned DEF_PACKET_SIZE = 8;
  localparam int unsigned MESH_COLS       = 3;
  localparam int unsigned MESH_ROWS       = 3;
  localparam int unsigned NUM_NODES       = MESH_COLS * MESH_ROWS;

  // XY routing for node `node` (1-based, row by row) towards destination `dest`.
  // X first: East if the destination column is to the right, West if left;
  // then Y: North if the destination row is above, South if below; else Local.
  // Addresses outside 1..NUM_NODES are delivered to the local port.
  function automatic logic [2:0] xy_direction(input int unsigned node,
                                              input logic [ADDR_W-1:0] dest);
    int unsigned mx, my, dx, dy;
    if (dest == '0 || int'(dest) > NUM_NODES) return DIR_LOCAL;
    mx = (node - 1) % MESH_COLS;
    my = (node - 1) / MESH_COLS;
    dx = (int'(dest) - 1) % MESH_COLS;
    dy = (int'(dest) - 1) / MESH_COLS;
    if (dx > mx) return DIR_EAST;
    if (dx < mx) return DIR_WEST;
    if (dy < my) return DIR_NORTH;
    if (dy > my) return DIR_SOUTH;
    return DIR_LOCAL;
  endfunction

endpackage
