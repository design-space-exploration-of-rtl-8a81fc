// fifo_buffer: input-port buffer of the NoC router.
//
// What it does: stores the flits arriving on one input port until the arbiter
// forwards them, and tells the upstream node through a single credit wire
// whether it may send.
//
// How it works: as in the document, the data path is a row of BUFFER_SIZE
// shift registers (SR) and the control unit holds an occupancy counter and a
// decoder that selects the SR to be written. SR[0] is the front of the queue
// and drives flit_out directly, so the head flit of a waiting packet is visible
// to the direction decoder and arbiter without delay. A read (out_req) shifts
// every SR one place towards SR[0] and loads zero into the last one, so unused
// locations always hold zero and flit_out is zero while the buffer is empty;
// the arbiter relies on that to tell a waiting head flit from an empty port.
// A write (in_req) stores flit_in in the first free SR; a simultaneous read
// and write is allowed. The control-unit state (empty / partly full / full) is
// encoded by the counter itself rather than by a separate state register.
//
// Credit: credit_out is high while at least CREDIT_SPACE locations are free.
// Wormhole routers use CREDIT_SPACE = 1 (space for the next flit); the
// virtual-cut-through router uses CREDIT_SPACE = packet length so that a packet
// is only started when the whole of it fits. The document only says the credit
// is withdrawn "when FIFO Buffer becomes nearly full"; the threshold is this
// design's choice. credit_out is decoded from the registered counter, so the
// upstream node can use it in the same cycle.
//
// Timing: single clock, rising edge, active-low synchronous reset. A flit
// written at edge k is on flit_out after edge k if the buffer was empty. The
// document additionally uses the falling clock edge inside its FIFO state
// machine; this design uses the rising edge only.
module fifo_buffer
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_SIZE    = DEF_FLIT_SIZE,
  parameter int unsigned BUFFER_SIZE  = DEF_BUFFER_SIZE,
  parameter int unsigned CREDIT_SPACE = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [FLIT_SIZE-1:0] flit_in,
  input  logic                 in_req,      // write flit_in this cycle
  input  logic                 out_req,     // drop the front flit this cycle
  output logic [FLIT_SIZE-1:0] flit_out,    // front flit (zero when empty)
  output logic                 not_empty,
  output logic                 credit_out
);

  localparam int unsigned CNT_W = $clog2(BUFFER_SIZE + 1);

  logic [FLIT_SIZE-1:0] sr [BUFFER_SIZE];
  logic [CNT_W-1:0]     count;
  logic                 do_pop, do_push;
  logic [CNT_W-1:0]     wr_pos;
  logic [BUFFER_SIZE-1:0] wr_sel;          // one-hot write-location decoder

  assign not_empty  = (count != '0);
  assign flit_out   = sr[0];
  assign credit_out = (BUFFER_SIZE - 32'(count)) >= CREDIT_SPACE;

  assign do_pop  = out_req && not_empty;
  assign do_push = in_req && ((32'(count) < BUFFER_SIZE) || do_pop);
  assign wr_pos  = do_pop ? count - 1'b1 : count;

  always_comb begin
    for (int i = 0; i < BUFFER_SIZE; i++)
      wr_sel[i] = do_push && (wr_pos == CNT_W'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < BUFFER_SIZE; i++) sr[i] <= '0;
    end else begin
      for (int i = 0; i < BUFFER_SIZE; i++) begin
        if (wr_sel[i])
          sr[i] <= flit_in;
        else if (do_pop)
          sr[i] <= (i == BUFFER_SIZE - 1) ? '0 : sr[i+1];
      end
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A sender that honours the credit never writes into a full buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_req |-> ((32'(count) < BUFFER_SIZE) || do_pop))
    else $error("fifo_buffer: write into a full buffer");

endmodule
