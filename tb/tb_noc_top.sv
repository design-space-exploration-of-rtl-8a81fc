// tb_noc_top: end-to-end test of the whole design at default parameters.
//
// All three 3x3 meshes of noc_top (VCTR, WHR_1CLK, WHR_2CLK) carry random
// uniform traffic at the same time: every IP injects packets to random other
// nodes (wormhole lengths 2..15 flits, VCTR 8 flits) and every IP sink
// withdraws its credit now and then. The source models follow each version's
// credit rule: wormhole sources send a flit only with credit; VCTR sources need
// credit (room for a whole packet) only before a head.
//
// The VCTR mesh gets uniform traffic between all nodes. The wormhole meshes
// get it in alternating phases, first towards the south-east (destination
// column and row not smaller than the source's) and then, once the network
// has drained, towards the north-west, and so on. Within a phase no chain of
// routers waiting on each other can close into a loop, which a router that
// serves one packet at a time would otherwise allow under wormhole switching.
//
// Checking: the second flit of every packet carries its source node and a
// sequence number. Each sink rebuilds packets from its local output, checks
// the destination field, and compares the packet flit by flit with the next
// packet that source sent to this node (X-then-Y routing keeps packets of one
// source/destination pair in order). At the end every packet must have
// arrived; the watchdog catches a network that stops.
//
// Mechanisms counted (through the routers' internal signals), each of which
// must occur in the mesh where it applies:
//   contention   a grant while more than one input port had a packet waiting
//   credit_stall a wormhole body flit held because the next buffer was full
//   vct_wait     a VCTR head held until the next buffer could take the packet
//   head_wait    a WHR_2CLK head held until the next head-clock tick
//   cut_through  a VCTR head forwarded before the whole packet had arrived
//   buffer_full  an input buffer withdrawing its credit
// The head-clock enable is also checked every cycle against its expected
// rate of one cycle in two.
`timescale 1ns/1ps
module tb_noc_top;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [2:0][8:0][7:0] lf_in, lf_out;
  logic [2:0][8:0]      lreq_in, lcr_out, lreq_out, lcr_in;
  arb_state_e [2:0][8:0] st;
  logic                 head_ce;

  noc_top dut (
    .clk, .rst_n,
    .local_flit_in(lf_in), .local_req_in(lreq_in), .local_credit_out(lcr_out),
    .local_flit_out(lf_out), .local_req_out(lreq_out), .local_credit_in(lcr_in),
    .arb_state(st), .head_ce);

  localparam int INJECT_CYCLES = 20000;
  localparam int NEV = 6;
  localparam string EV_NAME [NEV] = '{"contention", "credit_stall", "vct_wait", "head_wait",
                                      "cut_through", "buffer_full"};

  int checks = 0, failures = 0;
  int ev [3][9][NEV];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- events
  for (genvar m = 0; m < 3; m++) begin : g_em
    for (genvar n = 0; n < 9; n++) begin : g_en
      always @(posedge clk) if (rst_n) begin
        if (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.grant &&
            $countones(dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.notif) > 1)
          ev[m][n][0]++;
        if (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.state != ST_IDLE &&
            dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.not_empty[dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.cur_port] &&
            !dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.send)
          ev[m][n][1]++;
        if (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.state == ST_IDLE &&
            dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.any_notif &&
            dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.head_ce &&
            !dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.grant)
          ev[m][n][2]++;
        if (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.state == ST_IDLE &&
            dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.any_notif &&
            !dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.head_ce)
          ev[m][n][3]++;
        if (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.grant &&
            ((dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.pop[0] && dut.g_mesh[m].u_mesh.g_node[n].u_router.g_in[0].u_fifo.count < 8) ||
             (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.pop[1] && dut.g_mesh[m].u_mesh.g_node[n].u_router.g_in[1].u_fifo.count < 8) ||
             (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.pop[2] && dut.g_mesh[m].u_mesh.g_node[n].u_router.g_in[2].u_fifo.count < 8) ||
             (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.pop[3] && dut.g_mesh[m].u_mesh.g_node[n].u_router.g_in[3].u_fifo.count < 8) ||
             (dut.g_mesh[m].u_mesh.g_node[n].u_router.u_arb.pop[4] && dut.g_mesh[m].u_mesh.g_node[n].u_router.g_in[4].u_fifo.count < 8)))
          ev[m][n][4]++;
        if (dut.g_mesh[m].u_mesh.g_node[n].u_router.credit_out != '1)
          ev[m][n][5]++;
      end
    end
  end

  // The head clock: head_ce must be high in exactly one cycle out of every
  // two (HEAD_CLK_DIV = 2), counted from the release of reset.
  int ce_cycle = 0;
  always @(posedge clk) if (rst_n) begin
    ce_cycle <= ce_cycle + 1;
    check(head_ce == (ce_cycle % 2 == 1), $sformatf("head_ce %0b in cycle %0d after reset", head_ce, ce_cycle));
  end

  // ------------------------------------------------------- traffic and checks
  logic [7:0] srcq [3][9][$];          // flits waiting at each source
  int         src_rem [3][9];          // VCTR: body flits still to send
  logic [7:0] expq [3][9][9][$];       // [mesh][src][dst] flits expected
  logic [7:0] rx   [3][9][$];          // packet being received at each sink
  int         rx_len [3][9];
  int         sent_pk [3], recv_pk [3], seq [3][9];
  int         outstanding;

  // Wormhole traffic phases: 0 = towards the south-east (destination column
  // and row both >= the source's), 1 = towards the north-west.
  localparam int PHASE_CYCLES = 2500;
  bit phase [3];
  int phase_end [3], n_phases [3];

  function automatic bit allowed(int s, int d, bit ph);
    int sx, sy, dx, dy;
    sx = s % 3; sy = s / 3; dx = d % 3; dy = d / 3;
    return ph ? (dx <= sx && dy <= sy) : (dx >= sx && dy >= sy);
  endfunction

  function automatic bit has_dest(int s, bit ph);
    for (int d = 0; d < 9; d++) if (d != s && allowed(s, d, ph)) return 1;
    return 0;
  endfunction

  function automatic int plen(int m, logic [7:0] head);
    return (m == 0) ? 8 : int'(head[3:0]);
  endfunction

  initial begin
    int cyc;
    lf_in = '0; lreq_in = '0; lcr_in = '1;
    outstanding = 0;
    for (int m = 0; m < 3; m++) begin
      sent_pk[m] = 0; recv_pk[m] = 0;
      for (int n = 0; n < 9; n++) begin src_rem[m][n] = 0; rx_len[m][n] = 0; seq[m][n] = 0; end
      phase[m] = 1'b1; phase_end[m] = 0; n_phases[m] = 0;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < INJECT_CYCLES || outstanding > 0; cyc++) begin
      // new packets
      // wormhole meshes: switch traffic direction once a phase has drained
      for (int m = 1; m < 3; m++)
        if (cyc >= phase_end[m] && sent_pk[m] == recv_pk[m]) begin
          phase[m] = !phase[m];
          phase_end[m] = cyc + PHASE_CYCLES;
          n_phases[m]++;
        end
      if (cyc < INJECT_CYCLES)
        for (int m = 0; m < 3; m++)
          for (int n = 0; n < 9; n++)
            if (srcq[m][n].size() == 0 && (m == 0 || cyc < phase_end[m]) &&
                (m == 0 || has_dest(n, phase[m])) && $urandom_range(999) < 25) begin
              int d, len;
              if (m == 0) do d = $urandom_range(0, 8); while (d == n);
              else        do d = $urandom_range(0, 8); while (d == n || !allowed(n, d, phase[m]));
              len = (m == 0) ? 8 : $urandom_range(2, 15);
              srcq[m][n].push_back((m == 0) ? {4'(d + 1), 4'b0001} : {4'(d + 1), 4'(len)});
              srcq[m][n].push_back({4'(n + 1), 4'(seq[m][n])});
              for (int i = 2; i < len; i++) srcq[m][n].push_back(8'($urandom));
              for (int i = 0; i < len; i++) expq[m][n][d].push_back(srcq[m][n][i]);
              seq[m][n]++;
              sent_pk[m]++;
              outstanding++;
            end
      // drive sources and sink credits
      for (int m = 0; m < 3; m++)
        for (int n = 0; n < 9; n++) begin
          logic go;
          if (m == 0) go = srcq[m][n].size() > 0 && (src_rem[m][n] > 0 || lcr_out[m][n]);
          else        go = srcq[m][n].size() > 0 && lcr_out[m][n];
          lreq_in[m][n] = go;
          lf_in[m][n]   = go ? srcq[m][n][0] : 8'h00;
          lcr_in[m][n]  = ($urandom_range(99) < 85);
        end
      #1;
      // sinks
      for (int m = 0; m < 3; m++)
        for (int n = 0; n < 9; n++)
          if (lreq_out[m][n]) begin
            logic [7:0] f;
            f = lf_out[m][n];
            if (rx[m][n].size() == 0) begin
              check(int'(f[7:4]) == n + 1, $sformatf("mesh %0d: head for node %0d delivered at node %0d", m, f[7:4], n + 1));
              rx_len[m][n] = plen(m, f);
            end
            rx[m][n].push_back(f);
            if (rx[m][n].size() == rx_len[m][n]) begin
              int s;
              bit ok;
              s = int'(rx[m][n][1][7:4]) - 1;
              ok = (s >= 0 && s < 9 && expq[m][s][n].size() >= rx_len[m][n]);
              if (ok) for (int i = 0; i < rx_len[m][n]; i++) ok &= (expq[m][s][n][i] == rx[m][n][i]);
              check(ok, $sformatf("mesh %0d: packet at node %0d from node %0d differs", m, n + 1, s + 1));
              if (s >= 0 && s < 9)
                for (int i = 0; i < rx_len[m][n] && expq[m][s][n].size() > 0; i++) void'(expq[m][s][n].pop_front());
              rx[m][n].delete();
              recv_pk[m]++;
              outstanding--;
            end
          end
      @(posedge clk); #1;
      for (int m = 0; m < 3; m++)
        for (int n = 0; n < 9; n++)
          if (lreq_in[m][n]) begin
            void'(srcq[m][n].pop_front());
            if (m == 0) src_rem[m][n] = (src_rem[m][n] > 0) ? src_rem[m][n] - 1 : 7;
          end
    end
    // summary
    for (int m = 0; m < 3; m++) begin
      int tot [NEV];
      for (int k = 0; k < NEV; k++) begin
        tot[k] = 0;
        for (int n = 0; n < 9; n++) tot[k] += ev[m][n][k];
      end
      $display("mesh %0d: sent %0d received %0d packets; contention=%0d credit_stall=%0d vct_wait=%0d head_wait=%0d cut_through=%0d buffer_full=%0d",
               m, sent_pk[m], recv_pk[m], tot[0], tot[1], tot[2], tot[3], tot[4], tot[5]);
      check(sent_pk[m] == recv_pk[m] && sent_pk[m] > 0, $sformatf("mesh %0d all packets delivered", m));
      check(tot[0] > 0, $sformatf("mesh %0d contention seen", m));
      check(tot[5] > 0, $sformatf("mesh %0d buffer_full seen", m));
      if (m == 0) check(tot[2] > 0 && tot[4] > 0, "VCTR whole-packet wait and cut-through seen");
      else begin
        check(tot[1] > 0, $sformatf("mesh %0d wormhole credit stall seen", m));
        check(n_phases[m] >= 2, $sformatf("mesh %0d both traffic directions run", m));
      end
      if (m == 2) check(tot[3] > 0, "dual-clock head wait seen");
    end
    $display("cycles: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (INJECT_CYCLES + 30000) @(posedge clk);
    failures++;
    $display("watchdog expired: network did not drain (%0d packets outstanding)", outstanding);
    for (int m = 0; m < 3; m++) $display("mesh %0d: sent %0d received %0d; arbiter states %p", m, sent_pk[m], recv_pk[m], st[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
