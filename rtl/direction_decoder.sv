// direction_decoder: turns a waiting packet's destination address into the
// output direction for this node (XY routing).
//
// How it works: two parts, as in the document. LUT_mux is a 5-to-1
// multiplexer that picks the 4-bit destination address of one input port
// (lut_mux_sel = port index N=0, E=1, S=2, W=3, L=4, driven by the arbiter).
// LUT5_of_mesh3x3 is a lookup table, specific to the node's position, that maps
// the address to a 3-bit direction code: 001 North, 010 East, 011 South,
// 100 West, 101 Local (the document's codes). The document fills the table by
// hand for each node of its 3x3 prototype; here the table is computed at
// elaboration from NODE_ID with X-first-then-Y routing (noc_pkg::xy_direction),
// so the same module serves every node. Addresses that name no node of the
// mesh (0 and 10..15) decode to Local, a choice of this design.
//
// Interface: five addresses in, select in, direction code out.
// Timing: purely combinational.
module direction_decoder
  import noc_pkg::*;
#(
  parameter int unsigned NODE_ID = 5   // 1..9, R1 top-left, row by row
) (
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [ADDR_W-1:0] e_addr,
  input  logic [ADDR_W-1:0] s_addr,
  input  logic [ADDR_W-1:0] w_addr,
  input  logic [ADDR_W-1:0] l_addr,
  input  logic [PORT_W-1:0] lut_mux_sel,
  output logic [2:0]        dest_out
);

  logic [ADDR_W-1:0] lut_mux_out;
  logic [2:0]        lut5 [2**ADDR_W];

  // LUT_mux
  always_comb begin
    unique case (lut_mux_sel)
      P_N:     lut_mux_out = n_addr;
      P_E:     lut_mux_out = e_addr;
      P_S:     lut_mux_out = s_addr;
      P_W:     lut_mux_out = w_addr;
      default: lut_mux_out = l_addr;
    endcase
  end

  // LUT5_of_mesh3x3: constant table for this node
  for (genvar a = 0; a < 2**ADDR_W; a++) begin : g_lut
    assign lut5[a] = xy_direction(NODE_ID, ADDR_W'(a));
  end

  assign dest_out = lut5[lut_mux_out];

endmodule
