// arbiter: the router's central routing and arbitration unit.
//
// What it does: serves the input ports one packet at a time. It picks the next
// input port with a waiting packet in dynamic round-robin order, asks the
// direction decoder where that packet goes, checks the downstream credit,
// then forwards the packet's flits through the switch one per cycle, popping
// them from the input buffer, until the packet's length has been counted out.
// One packet crosses the router at a time, as in the document's simulations
// where the arbiter state steps N, E, S, W, L and a single output channel is
// busy in each state.
//
// Packet start and end without flit-type fields (document's technique): a
// port "notifies" a packet when its front flit is non-zero in the field the
// version uses. Wormhole versions read the packet length from the low
// FLIT_SIZE-4 bits of the head flit (non-zero length = a packet is waiting) and
// load it into a down-counter; VCTR reads the "arrived" bit (bit 0) of the head
// and counts the fixed PACKET_SIZE. When the counter runs out the next flit in
// that buffer is by construction a head flit.
//
// Round robin: the document's service order is North, East, South, West,
// Local, and the port served last gets the lowest priority next time. After
// reset Local counts as served last, so North has the highest priority.
//
// Timing (single rising edge): in the idle state the grant, the direction
// lookup and the credit check are combinational, and the head flit is sent in
// the same cycle it is first seen at the buffer front, giving the document's
// routing delay of one cycle per hop. Each following cycle sends one body
// flit. Wormhole versions send a body flit only while credit_in of the output
// is high; VCTR checks credit only before the head (its credit means room for
// the whole packet) and then sends whenever the input buffer holds a flit.
// The document checks credit "before opening the channel" but does not say
// what happens when there is none; here the head is not sent and the port is
// treated as served, so the next cycle offers the turn to the following
// waiting port (with a single shared direction decoder only one port can be
// looked up per cycle). Once a packet has started, the arbiter stays with it
// until its last flit, as the document's state sequence shows; with wormhole
// switching this can lock two neighbouring routers that each wait for the
// other mid-packet (see the README). For WHR_2CLK a head is only granted in a cycle with head_ce high
// (a tick of the slower head clock); body flits move every cycle. The document
// makes the two clocks physical and also uses the falling clock edge; both are
// replaced here by one rising-edge clock plus this enable.
module arbiter
  import noc_pkg::*;
#(
  parameter router_version_e VERSION     = WHR_1CLK,
  parameter int unsigned     FLIT_SIZE   = DEF_FLIT_SIZE,
  parameter int unsigned     PACKET_SIZE = DEF_PACKET_SIZE   // VCTR only
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                head_ce,     // head-clock tick (tie 1 unless WHR_2CLK)
  input  logic [NUM_PORTS-1:0][FLIT_SIZE-1:0] front_flit,  // SR[0] of each input buffer
  input  logic [NUM_PORTS-1:0]                not_empty,
  input  logic [NUM_PORTS-1:0]                credit_in,   // per output port
  input  logic [2:0]                          direction,   // from the direction decoder
  output logic [PORT_W-1:0]                   lut_sel,     // to the direction decoder
  output logic [NUM_PORTS-1:0]                pop,         // in_out_Ctrl to the buffers
  output logic [NUM_PORTS-1:0]                out_en,      // switch enables, one per output
  output logic [PORT_W-1:0]                   sel,         // switch select
  output arb_state_e                          state
);

  localparam int unsigned SIZE_W = FLIT_SIZE - ADDR_W;
  localparam int unsigned CNT_W  = (SIZE_W > $clog2(PACKET_SIZE + 1)) ? SIZE_W
                                                                      : $clog2(PACKET_SIZE + 1);

  logic [NUM_PORTS-1:0] notif;
  logic [PORT_W-1:0]    rr_last, winner, cur_port, dir_q;
  logic                 any_notif, grant, send;
  logic [PORT_W-1:0]    dir_idx;
  logic                 dir_ok;
  logic [CNT_W-1:0]     head_len, remaining;

  // Notifications from the front flits
  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (VERSION == VCTR) notif[p] = not_empty[p] && front_flit[p][0];
      else                 notif[p] = not_empty[p] && (front_flit[p][SIZE_W-1:0] != '0);
    end
  end

  // Round robin: first notifying port after the one served last
  always_comb begin
    logic [PORT_W-1:0] idx;
    winner    = '0;
    any_notif = 1'b0;
    for (int k = NUM_PORTS; k >= 1; k--) begin
      idx = PORT_W'((int'(rr_last) + k) % NUM_PORTS);
      if (notif[idx]) begin
        winner    = PORT_W'(idx);
        any_notif = 1'b1;
      end
    end
  end

  assign lut_sel = (state == ST_IDLE) ? winner : cur_port;
  assign dir_ok  = (direction >= DIR_NORTH) && (direction <= DIR_LOCAL);
  assign dir_idx = direction - 3'd1;

  always_comb begin
    if (VERSION == VCTR) head_len = CNT_W'(PACKET_SIZE);
    else                 head_len = CNT_W'(front_flit[winner][SIZE_W-1:0]);
  end

  always_comb begin
    pop    = '0;
    out_en = '0;
    sel    = cur_port;
    grant  = 1'b0;
    send   = 1'b0;
    if (state == ST_IDLE) begin
      if (any_notif && head_ce && dir_ok && credit_in[dir_idx]) begin
        grant           = 1'b1;
        pop[winner]     = 1'b1;
        out_en[dir_idx] = 1'b1;
        sel             = winner;
      end
    end else begin
      send = not_empty[cur_port] && ((VERSION == VCTR) || credit_in[dir_q]);
      if (send) begin
        pop[cur_port] = 1'b1;
        out_en[dir_q] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      rr_last   <= P_L;
      cur_port  <= P_N;
      dir_q     <= P_N;
      remaining <= '0;
    end else if (state == ST_IDLE) begin
      if (any_notif && head_ce && !grant) begin
        rr_last <= winner;              // no room downstream: pass the turn on
      end else if (grant) begin
        rr_last <= winner;
        if (head_len > CNT_W'(1)) begin
          state     <= arb_state_e'(winner + 3'd1);
          cur_port  <= winner;
          dir_q     <= dir_idx;
          remaining <= head_len - 1'b1;
        end
      end
    end else if (send) begin
      remaining <= remaining - 1'b1;
      if (remaining == CNT_W'(1)) state <= ST_IDLE;
    end
  end

  a_one_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_en))
    else $error("arbiter: more than one output enabled");
  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pop))
    else $error("arbiter: more than one buffer popped");

endmodule
