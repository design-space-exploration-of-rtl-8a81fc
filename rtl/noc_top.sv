// noc_top: the three router versions, each as its own 3x3 mesh NoC.
//
// What it does: places side by side one 3x3 mesh built from each of the
// document's router versions, so that they can be exercised and compared
// under the same traffic: mesh 0 uses VCTR (virtual cut-through), mesh 1
// WHR_1CLK (wormhole), mesh 2 WHR_2CLK (wormhole, dual clock). The meshes
// share clock and reset but nothing else; every mesh has its own nine local
// IP ports, brought out as arrays indexed [mesh][node] (node n is R(n+1)).
//
// Dual clock: the WHR_2CLK mesh runs on `clk`, which plays the fast body
// clock. The slow head clock is a one-cycle enable, head_ce, that this module
// raises once every HEAD_CLK_DIV cycles from a free-running counter. The
// document does not give the ratio of its two clocks nor how they are made;
// HEAD_CLK_DIV = 2 is this design's choice. head_ce is also an output so that
// an IP attached to mesh 2 can see it.
//
// Timing: single rising-edge clock, active-low synchronous reset; see router
// for per-hop timing.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_SIZE    = DEF_FLIT_SIZE,
  parameter int unsigned BUFFER_SIZE  = DEF_BUFFER_SIZE,
  parameter int unsigned PACKET_SIZE  = DEF_PACKET_SIZE,
  parameter int unsigned HEAD_CLK_DIV = 2
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic [2:0][NUM_NODES-1:0][FLIT_SIZE-1:0]    local_flit_in,
  input  logic [2:0][NUM_NODES-1:0]                   local_req_in,
  output logic [2:0][NUM_NODES-1:0]                   local_credit_out,
  output logic [2:0][NUM_NODES-1:0][FLIT_SIZE-1:0]    local_flit_out,
  output logic [2:0][NUM_NODES-1:0]                   local_req_out,
  input  logic [2:0][NUM_NODES-1:0]                   local_credit_in,
  output arb_state_e [2:0][NUM_NODES-1:0]             arb_state,
  output logic                                        head_ce
);

  localparam int unsigned DIV_W = (HEAD_CLK_DIV > 1) ? $clog2(HEAD_CLK_DIV) : 1;

  logic [DIV_W-1:0] div_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                                   div_cnt <= '0;
    else if (32'(div_cnt) == HEAD_CLK_DIV - 1)    div_cnt <= '0;
    else                                          div_cnt <= div_cnt + 1'b1;
  end

  assign head_ce = (32'(div_cnt) == HEAD_CLK_DIV - 1);

  localparam router_version_e VERS [3] = '{VCTR, WHR_1CLK, WHR_2CLK};

  for (genvar m = 0; m < 3; m++) begin : g_mesh
    noc_mesh3x3 #(
      .VERSION    (VERS[m]),
      .FLIT_SIZE  (FLIT_SIZE),
      .BUFFER_SIZE(BUFFER_SIZE),
      .PACKET_SIZE(PACKET_SIZE)
    ) u_mesh (
      .clk             (clk),
      .rst_n           (rst_n),
      .head_ce         (head_ce),
      .local_flit_in   (local_flit_in[m]),
      .local_req_in    (local_req_in[m]),
      .local_credit_out(local_credit_out[m]),
      .local_flit_out  (local_flit_out[m]),
      .local_req_out   (local_req_out[m]),
      .local_credit_in (local_credit_in[m]),
      .arb_state       (arb_state[m])
    );
  end

endmodule
