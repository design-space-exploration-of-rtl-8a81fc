// noc_mesh3x3: nine routers R1..R9 connected as a 3x3 2D mesh.
//
// What it does: carries packets between the nine local IP ports. R1 is the
// top-left node and nodes are numbered row by row, so R5 is the centre
// (the document's numbering). Every router is the same `router` module with
// VERSION applied to all nine; its NODE_ID configures its routing table.
//
// How it is wired: for neighbouring routers A (west) and B (east), A's East
// output channel and req drive B's West input, and B's West-input credit drives
// A's East credit_in; North/South pairs are wired the same way. Ports at the
// mesh border are unused: their inputs are tied to zero and their credit_in to
// 0, so nothing is ever sent off the mesh (XY routing never selects them for
// addresses 1..9). The document builds its mesh the same way, with full
// five-port routers at every position.
//
// Local ports: index n = 0..8 is node R(n+1). The IP side drives
// local_flit_in / local_req_in and must only send while local_credit_out is
// high; it receives local_flit_out / local_req_out and controls the flow with
// local_credit_in.
//
// Timing: one cycle per hop (see router). head_ce is used only when VERSION is
// WHR_2CLK.
module noc_mesh3x3
  import noc_pkg::*;
#(
  parameter router_version_e VERSION     = WHR_1CLK,
  parameter int unsigned     FLIT_SIZE   = DEF_FLIT_SIZE,
  parameter int unsigned     BUFFER_SIZE = DEF_BUFFER_SIZE,
  parameter int unsigned     PACKET_SIZE = DEF_PACKET_SIZE
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                head_ce,
  input  logic [NUM_NODES-1:0][FLIT_SIZE-1:0] local_flit_in,
  input  logic [NUM_NODES-1:0]                local_req_in,
  output logic [NUM_NODES-1:0]                local_credit_out,
  output logic [NUM_NODES-1:0][FLIT_SIZE-1:0] local_flit_out,
  output logic [NUM_NODES-1:0]                local_req_out,
  input  logic [NUM_NODES-1:0]                local_credit_in,
  output arb_state_e [NUM_NODES-1:0]          arb_state
);

  logic [NUM_NODES-1:0][NUM_PORTS-1:0][FLIT_SIZE-1:0] r_flit_in, r_channel;
  logic [NUM_NODES-1:0][NUM_PORTS-1:0]                r_req_in, r_req_out;
  logic [NUM_NODES-1:0][NUM_PORTS-1:0]                r_credit_in, r_credit_out;

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    localparam int unsigned X = n % MESH_COLS;
    localparam int unsigned Y = n / MESH_COLS;

    // North side
    if (Y > 0) begin : g_n
      assign r_flit_in[n][P_N]   = r_channel[n-MESH_COLS][P_S];
      assign r_req_in[n][P_N]    = r_req_out[n-MESH_COLS][P_S];
      assign r_credit_in[n][P_N] = r_credit_out[n-MESH_COLS][P_S];
    end else begin : g_n_edge
      assign r_flit_in[n][P_N]   = '0;
      assign r_req_in[n][P_N]    = 1'b0;
      assign r_credit_in[n][P_N] = 1'b0;
    end
    // South side
    if (Y < MESH_ROWS - 1) begin : g_s
      assign r_flit_in[n][P_S]   = r_channel[n+MESH_COLS][P_N];
      assign r_req_in[n][P_S]    = r_req_out[n+MESH_COLS][P_N];
      assign r_credit_in[n][P_S] = r_credit_out[n+MESH_COLS][P_N];
    end else begin : g_s_edge
      assign r_flit_in[n][P_S]   = '0;
      assign r_req_in[n][P_S]    = 1'b0;
      assign r_credit_in[n][P_S] = 1'b0;
    end
    // East side
    if (X < MESH_COLS - 1) begin : g_e
      assign r_flit_in[n][P_E]   = r_channel[n+1][P_W];
      assign r_req_in[n][P_E]    = r_req_out[n+1][P_W];
      assign r_credit_in[n][P_E] = r_credit_out[n+1][P_W];
    end else begin : g_e_edge
      assign r_flit_in[n][P_E]   = '0;
      assign r_req_in[n][P_E]    = 1'b0;
      assign r_credit_in[n][P_E] = 1'b0;
    end
    // West side
    if (X > 0) begin : g_w
      assign r_flit_in[n][P_W]   = r_channel[n-1][P_E];
      assign r_req_in[n][P_W]    = r_req_out[n-1][P_E];
      assign r_credit_in[n][P_W] = r_credit_out[n-1][P_E];
    end else begin : g_w_edge
      assign r_flit_in[n][P_W]   = '0;
      assign r_req_in[n][P_W]    = 1'b0;
      assign r_credit_in[n][P_W] = 1'b0;
    end
    // Local port
    assign r_flit_in[n][P_L]   = local_flit_in[n];
    assign r_req_in[n][P_L]    = local_req_in[n];
    assign r_credit_in[n][P_L] = local_credit_in[n];
    assign local_credit_out[n] = r_credit_out[n][P_L];
    assign local_flit_out[n]   = r_channel[n][P_L];
    assign local_req_out[n]    = r_req_out[n][P_L];

    router #(
      .VERSION    (VERSION),
      .NODE_ID    (n + 1),
      .FLIT_SIZE  (FLIT_SIZE),
      .BUFFER_SIZE(BUFFER_SIZE),
      .PACKET_SIZE(PACKET_SIZE)
    ) u_router (
      .clk       (clk),
      .rst_n     (rst_n),
      .head_ce   (head_ce),
      .flit_in   (r_flit_in[n]),
      .req_in    (r_req_in[n]),
      .credit_out(r_credit_out[n]),
      .channel   (r_channel[n]),
      .req_out   (r_req_out[n]),
      .credit_in (r_credit_in[n]),
      .arb_state (arb_state[n])
    );
  end

endmodule
