// tb_direction_decoder: self-checking test of the XY-routing direction lookup.
//
// One decoder per node R1..R9 is instantiated. For every node, every select
// value and every 4-bit address the expected code is worked out here from the
// node and destination coordinates (columns left to right, rows top to bottom,
// X before Y), independently of the package function the RTL uses. The other
// four address inputs carry random values to show the multiplexer picks the
// right one. A few hand-checked cases from the document's 3x3 example are
// also checked literally (R5: 2 -> North, 8 -> South, 6 -> East, 4 -> West,
// 5 -> Local).
`timescale 1ns/1ps
module tb_direction_decoder;
  import noc_pkg::*;

  logic [8:0][3:0] n_addr, e_addr, s_addr, w_addr, l_addr;
  logic [8:0][2:0] sel;
  logic [8:0][2:0] dest;
  int checks = 0, failures = 0;

  for (genvar n = 0; n < 9; n++) begin : g_dut
    direction_decoder #(.NODE_ID(n + 1)) dut (
      .n_addr(n_addr[n]), .e_addr(e_addr[n]), .s_addr(s_addr[n]),
      .w_addr(w_addr[n]), .l_addr(l_addr[n]), .lut_mux_sel(sel[n]), .dest_out(dest[n]));
  end

  function automatic logic [2:0] expected(int node, int a);
    int r, c, dr, dc;
    if (a < 1 || a > 9) return 3'b101;
    r = (node - 1) / 3;  c = (node - 1) % 3;
    dr = (a - 1) / 3;    dc = (a - 1) % 3;
    if (dc > c) return 3'b010;
    if (dc < c) return 3'b100;
    if (dr < r) return 3'b001;
    if (dr > r) return 3'b011;
    return 3'b101;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 5; s++) begin
      for (int a = 0; a < 16; a++) begin
        for (int n = 0; n < 9; n++) begin
          n_addr[n] = 4'($urandom); e_addr[n] = 4'($urandom); s_addr[n] = 4'($urandom);
          w_addr[n] = 4'($urandom); l_addr[n] = 4'($urandom);
          case (s)
            0: n_addr[n] = 4'(a);
            1: e_addr[n] = 4'(a);
            2: s_addr[n] = 4'(a);
            3: w_addr[n] = 4'(a);
            default: l_addr[n] = 4'(a);
          endcase
          sel[n] = 3'(s);
        end
        #1;
        for (int n = 0; n < 9; n++)
          check(dest[n] == expected(n + 1, a),
                $sformatf("node %0d sel %0d addr %0d: got %b exp %b", n + 1, s, a, dest[n],
                          expected(n + 1, a)));
      end
    end
    // Literal cases for the centre node R5 (index 4), select = South input
    begin
      int unsigned addrs [5] = '{2, 8, 6, 4, 5};
      logic [2:0]  codes [5] = '{3'b001, 3'b011, 3'b010, 3'b100, 3'b101};
      for (int i = 0; i < 5; i++) begin
        sel[4] = 3'd2; s_addr[4] = 4'(addrs[i]);
        #1 check(dest[4] == codes[i], $sformatf("R5 address %0d", addrs[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
