// tb_arbiter: self-checking test of the central routing and arbitration unit.
//
// Two arbiters are tested side by side, one wormhole (WHR_1CLK) and one
// virtual cut-through (VCTR), each in the centre node R5 of the 3x3 mesh. The
// testbench plays the five input buffers (queues), the direction decoder (X
// then Y routing worked out here from the address) and the five downstream
// credits (random). Packets trickle into the queues one flit at a time, so
// buffers sometimes run dry in the middle of a packet. The wormhole arbiter
// also gets a random head_ce, as in the dual-clock router.
//
// Every cycle a reference model of the arbitration rules predicts pop, out_en
// and sel: round robin after the port served last (North first after reset),
// a head sent in the same cycle as it is granted, only with credit and (for
// the head) head_ce, a port without downstream credit losing its turn, body flits one per cycle, wormhole body flits only with
// credit, VCTR body flits without a credit check, and return to idle after
// the packet length. Each flit sent must also go to the output its packet
// is headed for. Counts are kept of contended grants,
// credit stalls, head_ce waits and empty-buffer stalls; each must occur.
`timescale 1ns/1ps
module tb_arbiter;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int xy_dir_idx(int dest);  // node R5, returns port index
    int r, c;
    r = (dest - 1) / 3; c = (dest - 1) % 3;
    if (c > 1) return 1;  // East
    if (c < 1) return 3;  // West
    if (r < 1) return 0;  // North
    if (r > 1) return 2;  // South
    return 4;             // Local
  endfunction

  localparam int NV = 2;
  int done_cnt = 0;
  int n_contended [NV], n_credit_stall [NV], n_ce_wait [NV], n_dry [NV], n_pkts [NV];

  for (genvar v = 0; v < NV; v++) begin : g_v
    localparam router_version_e VER = (v == 0) ? WHR_1CLK : VCTR;

    logic [4:0][7:0] front;
    logic [4:0]      not_empty, credit_in, pop, out_en;
    logic [2:0]      direction, lut_sel, sel;
    logic            head_ce;
    arb_state_e      state;

    arbiter #(.VERSION(VER), .FLIT_SIZE(8), .PACKET_SIZE(8)) dut (
      .clk, .rst_n, .head_ce, .front_flit(front), .not_empty, .credit_in,
      .direction, .lut_sel, .pop, .out_en, .sel, .state);

    logic [7:0] q       [5][$];   // buffer contents
    logic [7:0] pending [5][$];   // flits not yet arrived
    int         expect_dir [5][$];// expected output of every flit, per input

    // model state
    int m_busy = 0, m_port = 0, m_dir = 0, m_rem = 0, m_last = 4;

    task automatic show_fronts();
      for (int p = 0; p < 5; p++) begin
        not_empty[p] = (q[p].size() > 0);
        front[p]     = not_empty[p] ? q[p][0] : 8'h00;
      end
    endtask
    function automatic bit all_idle();
      for (int p = 0; p < 5; p++)
        if (q[p].size() > 0 || pending[p].size() > 0) return 0;
      return 1;
    endfunction
    always_comb begin
      int d;
      d = xy_dir_idx(int'(front[lut_sel][7:4]));
      direction = 3'(d + 1);
    end

    initial begin
      int injected;
      injected = 0;
      head_ce = 1'b1; credit_in = '1;
      show_fronts();
      @(posedge rst_n);
      for (int cyc = 0; cyc < 7000 || !all_idle(); cyc++) begin
        logic [4:0] e_pop, e_en;
        logic [2:0] e_sel;
        logic [4:0] notif;
        int win, nn;
        // new packets
        for (int p = 0; p < 5; p++) begin
          if (cyc < 7000 && pending[p].size() == 0 && $urandom_range(99) < 2) begin
            int dest, len;
            do dest = $urandom_range(1, 9); while (xy_dir_idx(dest) == p);
            len = (VER == VCTR) ? 8 : $urandom_range(1, 15);
            pending[p].push_back((VER == VCTR) ? {4'(dest), 4'b0001} : {4'(dest), 4'(len)});
            for (int i = 1; i < len; i++) pending[p].push_back(8'($urandom));
            for (int i = 0; i < len; i++) expect_dir[p].push_back(xy_dir_idx(dest));
            injected++;
          end
        end
        // drive random inputs
        if (VER != VCTR) head_ce = ($urandom_range(99) < 50);
        credit_in = 5'($urandom) | 5'($urandom);
        show_fronts();
        #1;
        // reference model
        e_pop = '0; e_en = '0; e_sel = 3'(m_port);
        for (int p = 0; p < 5; p++)
          notif[p] = not_empty[p] && ((VER == VCTR) ? front[p][0] : (front[p][3:0] != 0));
        win = -1; nn = 0;
        for (int k = 1; k <= 5; k++) if (notif[(m_last + k) % 5] && win < 0) win = (m_last + k) % 5;
        for (int p = 0; p < 5; p++) nn += notif[p];
        if (!m_busy) begin
          if (win >= 0) begin
            int d, len;
            d = xy_dir_idx(int'(front[win][7:4]));
            len = (VER == VCTR) ? 8 : int'(front[win][3:0]);
            if (!head_ce) n_ce_wait[v]++;
            else if (!credit_in[d]) begin
              n_credit_stall[v]++;
              m_last = win;                 // turn passes to the next port
            end
            else begin
              e_pop[win] = 1'b1; e_en[d] = 1'b1; e_sel = 3'(win);
              if (nn > 1) n_contended[v]++;
              m_last = win;
              if (len > 1) begin m_busy = 1; m_port = win; m_dir = d; m_rem = len - 1; end
              n_pkts[v]++;
            end
          end
        end else begin
          if (!not_empty[m_port]) n_dry[v]++;
          else if (VER != VCTR && !credit_in[m_dir]) n_credit_stall[v]++;
          else begin
            e_pop[m_port] = 1'b1; e_en[m_dir] = 1'b1;
            m_rem--;
            if (m_rem == 0) m_busy = 0;
          end
        end
        check(pop == e_pop, $sformatf("v%0d pop %b exp %b", v, pop, e_pop));
        check(out_en == e_en, $sformatf("v%0d out_en %b exp %b", v, out_en, e_en));
        if (e_en != 0) begin
          check(sel == e_sel, $sformatf("v%0d sel %0d exp %0d", v, sel, e_sel));
          // the flit leaving must go where its packet is headed
          for (int o = 0; o < 5; o++) if (out_en[o]) begin
            check(expect_dir[sel].size() > 0 && expect_dir[sel][0] == o,
                  $sformatf("v%0d input %0d flit sent to output %0d", v, sel, o));
            if (expect_dir[sel].size() > 0) void'(expect_dir[sel].pop_front());
          end
        end
        @(posedge clk);
        #1;
        for (int p = 0; p < 5; p++) if (e_pop[p] && q[p].size() > 0) void'(q[p].pop_front());
        for (int p = 0; p < 5; p++)
          if (pending[p].size() > 0 && $urandom_range(99) < 70) q[p].push_back(pending[p].pop_front());
      end
      for (int p = 0; p < 5; p++) check(expect_dir[p].size() == 0, "all packets delivered");
      check(n_contended[v] > 0 && n_credit_stall[v] > 0 && n_dry[v] > 0, "mechanisms seen");
      if (VER != VCTR) check(n_ce_wait[v] > 0, "head_ce wait seen");
      $display("v%0d injected=%0d granted=%0d contended=%0d credit_stalls=%0d ce_waits=%0d dry=%0d",
               v, injected, n_pkts[v], n_contended[v], n_credit_stall[v], n_ce_wait[v], n_dry[v]);
      done_cnt++;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done_cnt == NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
