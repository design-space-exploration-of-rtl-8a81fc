// switch: the router's crossbar.
//
// What it does: connects the front flit of the granted input buffer to the
// output channel chosen by the arbiter.
//
// How it works: as in the document, five 5-to-1 multiplexers, one per output
// channel (N, E, S, W, L). All five share the select `sel` (the input port
// index being served, N=0 .. L=4) and each has its own enable en[o]. A disabled
// output drives zero, so an idle channel reads 0. The document chose full
// 5-to-1 multiplexers everywhere, including at mesh edges, and so does this
// design.
//
// Timing: purely combinational.
module switch
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_SIZE = DEF_FLIT_SIZE
) (
  input  logic [NUM_PORTS-1:0][FLIT_SIZE-1:0] in_flit,   // from the input buffers
  input  logic [NUM_PORTS-1:0]                en,        // N_en .. L_en
  input  logic [PORT_W-1:0]                   sel,       // input port to connect
  output logic [NUM_PORTS-1:0][FLIT_SIZE-1:0] out_flit   // to the output channels
);

  logic [FLIT_SIZE-1:0] selected;

  always_comb begin
    selected = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (sel == PORT_W'(p)) selected = in_flit[p];
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      out_flit[o] = en[o] ? selected : '0;
  end

endmodule
