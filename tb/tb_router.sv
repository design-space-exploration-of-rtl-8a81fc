// tb_router: self-checking test of the complete five-port router.
//
// The centre router R5 of the 3x3 mesh receives five packets at once, one on
// every input, and must route them by X-then-Y routing one packet after the
// other in round-robin order N, E, S, W, L. The wormhole packets are those of
// the document's WHR-1clk example (head 0x52 on North: two flits to node 5,
// Local; 0x86 on East: six flits to node 8, South; 0x24 on South: four flits
// to node 2, North; 0x66 on West: six flits to node 6, East; 0x48 on Local:
// eight flits to node 4, West). The VCTR router gets eight-flit packets to the
// same destinations with the "arrived" bit set in the head.
//
// Three routers run in parallel: VCTR, WHR_1CLK and WHR_2CLK (head_ce high
// every other cycle). Checks:
//  * every output carries exactly the expected flits, in order;
//  * VCTR and WHR_1CLK: the first head leaves one cycle after it was written
//    (one-cycle routing delay) and all 26 (resp. 40) flits leave on
//    consecutive cycles, i.e. back-to-back packets need no idle cycle;
//  * WHR_2CLK: heads leave only in head_ce cycles, body flits follow on
//    consecutive cycles, and the whole transfer ends later than WHR_1CLK by
//    no more than one cycle per packet;
//  * the arbiter state visits N, E, S, W, L in that order.
// A second phase sends a long stream of random packets with random
// back-pressure on the outputs (credit_in) to the wormhole router and checks
// every flit arrives at the right output in order.
`timescale 1ns/1ps
module tb_router;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic head_ce;
  int done_cnt = 0;
  int first_out [3], last_out [3];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int r5_dir(int dest);
    int r, c;
    r = (dest - 1) / 3; c = (dest - 1) % 3;
    if (c > 1) return 1;
    if (c < 1) return 3;
    if (r < 1) return 0;
    if (r > 1) return 2;
    return 4;
  endfunction

  for (genvar v = 0; v < 3; v++) begin : g_v
    localparam router_version_e VER = (v == 0) ? VCTR : (v == 1) ? WHR_1CLK : WHR_2CLK;

    logic [4:0][7:0] flit_in, channel;
    logic [4:0]      req_in, credit_out, req_out, credit_in;
    arb_state_e      arb_state;

    router #(.VERSION(VER), .NODE_ID(5)) dut (
      .clk, .rst_n, .head_ce, .flit_in, .req_in, .credit_out,
      .channel, .req_out, .credit_in, .arb_state);

    logic [7:0] src  [5][$];
    logic [7:0] exp_out [5][$];
    int         out_cyc [$];
    arb_state_e states [$];

    initial begin
      int dests [5] = '{5, 8, 2, 6, 4};
      logic [7:0] wh_pk [5][$];
      int inject_cyc;
      wh_pk[0] = '{8'h52, 8'h11};
      wh_pk[1] = '{8'h86, 8'h21, 8'h22, 8'h23, 8'h24, 8'h25};
      wh_pk[2] = '{8'h24, 8'h31, 8'h32, 8'h33};
      wh_pk[3] = '{8'h66, 8'h41, 8'h42, 8'h43, 8'h44, 8'h45};
      wh_pk[4] = '{8'h48, 8'h51, 8'h52, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57};
      for (int p = 0; p < 5; p++) begin
        if (VER == VCTR) begin
          src[p].push_back({4'(dests[p]), 4'b0001});
          for (int i = 1; i < 8; i++) src[p].push_back(8'(16 * (p + 1) + i));
        end else begin
          src[p] = wh_pk[p];
        end
        foreach (src[p][i]) exp_out[r5_dir(dests[p])].push_back(src[p][i]);
      end
      flit_in = '0; req_in = '0; credit_in = '1;
      @(posedge rst_n);
      @(posedge clk); #1;
      inject_cyc = cyc;
      // Phase 1: directed packets
      for (int k = 0; k < 80; k++) begin
        for (int p = 0; p < 5; p++) begin
          // VCTR sources check the credit (room for a whole packet) before
          // the head only; wormhole sources check it for every flit.
          req_in[p] = (src[p].size() > 0) &&
                      (credit_out[p] || (VER == VCTR && src[p].size() % 8 != 0));
          flit_in[p] = req_in[p] ? src[p][0] : 8'h00;
        end
        for (int o = 0; o < 5; o++) if (req_out[o]) begin
          check(exp_out[o].size() > 0 && channel[o] == exp_out[o][0],
                $sformatf("v%0d output %0d flit %h", v, o, channel[o]));
          if (exp_out[o].size() > 0) void'(exp_out[o].pop_front());
          out_cyc.push_back(cyc);
        end
        if (arb_state != ST_IDLE && (states.size() == 0 || states[$] != arb_state))
          states.push_back(arb_state);
        @(posedge clk); #1;
        for (int p = 0; p < 5; p++) if (req_in[p]) void'(src[p].pop_front());
      end
      req_in = '0;
      for (int o = 0; o < 5; o++) check(exp_out[o].size() == 0, $sformatf("v%0d output %0d complete", v, o));
      check(out_cyc.size() == ((VER == VCTR) ? 40 : 26), $sformatf("v%0d flit count %0d", v, out_cyc.size()));
      check(states.size() == 5 && states[0] == ST_N && states[1] == ST_E && states[2] == ST_S
            && states[3] == ST_W && states[4] == ST_L, $sformatf("v%0d state order", v));
      if (out_cyc.size() > 0) begin
        first_out[v] = out_cyc[0];
        last_out[v]  = out_cyc[$];
        if (VER != WHR_2CLK) begin
          check(out_cyc[0] == inject_cyc + 1, $sformatf("v%0d first head after %0d cycles", v, out_cyc[0] - inject_cyc));
          check(out_cyc[$] - out_cyc[0] == out_cyc.size() - 1, $sformatf("v%0d flits not back to back", v));
        end
      end
      done_cnt++;
    end

    // WHR_2CLK: heads only on head_ce; bodies back to back
    if (VER == WHR_2CLK) begin : g_2clk
      int plen = 0;
      int last_cyc = -10;
      always @(negedge clk) if (rst_n && cyc < 100) begin
        for (int o = 0; o < 5; o++) if (req_out[o]) begin
          if (plen == 0) begin
            plen = channel[o][3:0];
            check(head_ce, "v2 head sent outside head_ce");
          end else begin
            check(cyc == last_cyc + 1, "v2 body flit not on the next cycle");
          end
          last_cyc = cyc;
          plen--;
        end
      end
    end
  end

  // Phase 2: random traffic on a separate wormhole router with back-pressure
  logic [4:0][7:0] r_flit_in, r_channel;
  logic [4:0]      r_req_in, r_credit_out, r_req_out, r_credit_in;
  arb_state_e      r_state;
  logic            r_rst_n;
  router #(.VERSION(WHR_1CLK), .NODE_ID(5)) dut_rand (
    .clk, .rst_n(r_rst_n), .head_ce(1'b1), .flit_in(r_flit_in), .req_in(r_req_in),
    .credit_out(r_credit_out), .channel(r_channel), .req_out(r_req_out),
    .credit_in(r_credit_in), .arb_state(r_state));

  initial begin
    logic [7:0] q [5][$];
    logic [7:0] e [5][5][$];   // expected flits per (input, output)
    int n_stall = 0, n_nocredit = 0, n_pk = 0, outstanding = 0;
    r_rst_n = 1'b0; r_req_in = '0; r_flit_in = '0; r_credit_in = '1;
    wait (done_cnt == 3);
    @(posedge clk); #1 r_rst_n = 1'b1;
    for (int k = 0; k < 6000 || outstanding > 0; k++) begin
      if (k > 12000) break;
      for (int p = 0; p < 5; p++) if (k < 6000 && q[p].size() == 0 && $urandom_range(99) < 10) begin
        int dest, len;
        do dest = $urandom_range(1, 9); while (r5_dir(dest) == p);
        len = $urandom_range(1, 15);
        q[p].push_back({4'(dest), 4'(len)});
        for (int i = 1; i < len; i++) q[p].push_back(8'($urandom));
        for (int i = 0; i < len; i++) e[p][r5_dir(dest)].push_back(q[p][i]);
        outstanding += len;
        n_pk++;
      end
      r_credit_in = 5'($urandom) | 5'($urandom) | 5'($urandom);
      for (int p = 0; p < 5; p++) begin
        r_req_in[p]  = q[p].size() > 0 && r_credit_out[p] && $urandom_range(99) < 80;
        r_flit_in[p] = r_req_in[p] ? q[p][0] : 8'h00;
        if (q[p].size() > 0 && !r_credit_out[p]) n_nocredit++;
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        if (!r_credit_in[o] && r_state != ST_IDLE) n_stall++;
        if (r_req_out[o]) begin
          int sp;
          sp = int'(dut_rand.sel);   // input being served
          check(r_credit_in[o], "flit sent without credit");
          check(sp < 5 && e[sp][o].size() > 0 && e[sp][o][0] == r_channel[o],
                $sformatf("random: unexpected flit %h from input %0d on output %0d", r_channel[o], sp, o));
          if (sp < 5 && e[sp][o].size() > 0) void'(e[sp][o].pop_front());
          outstanding--;
        end
      end
      @(posedge clk); #1;
      for (int p = 0; p < 5; p++) if (r_req_in[p]) void'(q[p].pop_front());
    end
    for (int p = 0; p < 5; p++) for (int o = 0; o < 5; o++)
      check(e[p][o].size() == 0, $sformatf("random: %0d flits from %0d to %0d missing", e[p][o].size(), p, o));
    check(n_stall > 0 && n_nocredit > 0, "back-pressure exercised");
    $display("random phase: packets=%0d output stalls=%0d input credit waits=%0d", n_pk, n_stall, n_nocredit);
    $display("first/last output cycle: VCTR %0d/%0d WHR_1CLK %0d/%0d WHR_2CLK %0d/%0d",
             first_out[0], last_out[0], first_out[1], last_out[1], first_out[2], last_out[2]);
    check(last_out[2] - first_out[1] <= (last_out[1] - first_out[1]) + 5 + 1, "2clk overhead bounded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; head_ce = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  end
  always @(posedge clk) head_ce <= ~head_ce;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
