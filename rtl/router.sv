// router: five-port packet-switched NoC router for a 2D mesh.
//
// What it does: receives packets on its North, East, South, West and Local
// input ports and forwards each one, by X-then-Y routing on the destination in
// its head flit, to one output channel. VERSION selects the document's three
// variants: VCTR (virtual cut-through, fixed 8-flit packets), WHR_1CLK
// (wormhole, packet length in the head flit) and WHR_2CLK (wormhole with heads
// routed on a slower head clock and bodies forwarded at the full clock rate).
//
// Structure (document's four components): one fifo_buffer per input port, one
// direction_decoder, one central arbiter and one switch. Port index order
// everywhere is N=0, E=1, S=2, W=3, L=4.
//
// Link protocol (credit based, one wire back per link): an output port drives
// channel (the flit) and req_out (flit valid this cycle); the receiving buffer
// stores the flit at the next rising edge. The receiver's credit_out comes back
// as this router's credit_in. Flits are sent only while credit_in is high. The
// document names the forward strobe NoC_in_req on the sending side and In_req
// on the receiving side.
//
// Timing: a head flit stored in an input buffer at edge k leaves on a channel
// during the following cycle and is stored downstream at edge k+1 (one cycle
// per hop); body flits follow one per cycle. Zero-load latency from the first
// flit entering the source router to the last flit leaving the destination
// router is therefore hops + packet length - 1 cycles, the document's
// T = Rd*Rc + (Ps-1) with Rd = 1. In WHR_2CLK the head additionally waits at
// each hop for the next head_ce tick. Single rising-edge clock; active-low
// synchronous reset.
module router
  import noc_pkg::*;
#(
  parameter router_version_e VERSION     = WHR_1CLK,
  parameter int unsigned     NODE_ID     = 5,
  parameter int unsigned     FLIT_SIZE   = DEF_FLIT_SIZE,
  parameter int unsigned     BUFFER_SIZE = DEF_BUFFER_SIZE,
  parameter int unsigned     PACKET_SIZE = DEF_PACKET_SIZE   // VCTR packet length
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                head_ce,     // head-clock tick; tie 1 for VCTR / WHR_1CLK
  // input ports
  input  logic [NUM_PORTS-1:0][FLIT_SIZE-1:0] flit_in,
  input  logic [NUM_PORTS-1:0]                req_in,
  output logic [NUM_PORTS-1:0]                credit_out,
  // output ports
  output logic [NUM_PORTS-1:0][FLIT_SIZE-1:0] channel,
  output logic [NUM_PORTS-1:0]                req_out,
  input  logic [NUM_PORTS-1:0]                credit_in,
  // observation
  output arb_state_e                          arb_state
);

  localparam int unsigned CREDIT_SPACE = (VERSION == VCTR) ? PACKET_SIZE : 1;

  logic [NUM_PORTS-1:0][FLIT_SIZE-1:0] front;
  logic [NUM_PORTS-1:0]                not_empty, pop, out_en;
  logic [PORT_W-1:0]                   lut_sel, sel;
  logic [2:0]                          direction;
  logic                                head_tick;

  assign head_tick = (VERSION == WHR_2CLK) ? head_ce : 1'b1;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    fifo_buffer #(
      .FLIT_SIZE   (FLIT_SIZE),
      .BUFFER_SIZE (BUFFER_SIZE),
      .CREDIT_SPACE(CREDIT_SPACE)
    ) u_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .flit_in   (flit_in[p]),
      .in_req    (req_in[p]),
      .out_req   (pop[p]),
      .flit_out  (front[p]),
      .not_empty (not_empty[p]),
      .credit_out(credit_out[p])
    );
  end

  direction_decoder #(.NODE_ID(NODE_ID)) u_dir (
    .n_addr     (front[P_N][FLIT_SIZE-1 -: ADDR_W]),
    .e_addr     (front[P_E][FLIT_SIZE-1 -: ADDR_W]),
    .s_addr     (front[P_S][FLIT_SIZE-1 -: ADDR_W]),
    .w_addr     (front[P_W][FLIT_SIZE-1 -: ADDR_W]),
    .l_addr     (front[P_L][FLIT_SIZE-1 -: ADDR_W]),
    .lut_mux_sel(lut_sel),
    .dest_out   (direction)
  );

  arbiter #(
    .VERSION    (VERSION),
    .FLIT_SIZE  (FLIT_SIZE),
    .PACKET_SIZE(PACKET_SIZE)
  ) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .head_ce   (head_tick),
    .front_flit(front),
    .not_empty (not_empty),
    .credit_in (credit_in),
    .direction (direction),
    .lut_sel   (lut_sel),
    .pop       (pop),
    .out_en    (out_en),
    .sel       (sel),
    .state     (arb_state)
  );

  switch #(.FLIT_SIZE(FLIT_SIZE)) u_sw (
    .in_flit (front),
    .en      (out_en),
    .sel     (sel),
    .out_flit(channel)
  );

  assign req_out = out_en;

endmodule
