// tb_noc_mesh3x3: zero-load latency of the 3x3 mesh, all source/destination
// pairs, for each router version.
//
// One mesh of each version runs at default parameters. Packets are sent one
// at a time (no contention): first the document's case study, an 8-flit
// packet from R2 to R6 crossing three routers (R2, R3, R6), then one 8-flit
// packet for every ordered pair of different nodes. For each packet the
// testbench measures the cycles from the head flit entering the source router
// to the last flit leaving the destination router, and compares it with
// T = Rd * Rc + (Ps - 1) with Rd = 1 cycle, Rc = routers on the X-then-Y path
// (Manhattan distance + 1) and Ps = 8, worked out here from the node
// coordinates. For the case study that is 3 + 7 = 10 cycles. The dual-clock
// mesh (head_ce every other cycle) may lose at most one cycle per router
// while a head waits for head_ce, so its bound is 2 * Rc + 7. Each delivered
// packet is also compared flit by flit with what was sent and must come out
// at the right node only.
`timescale 1ns/1ps
module tb_noc_mesh3x3;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic head_ce;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int done_cnt = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) head_ce <= rst_n ? ~head_ce : 1'b0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int routers_on_path(int s, int d);
    int sx, sy, dx, dy, h;
    sx = (s - 1) % 3; sy = (s - 1) / 3; dx = (d - 1) % 3; dy = (d - 1) / 3;
    h = ((sx > dx) ? sx - dx : dx - sx) + ((sy > dy) ? sy - dy : dy - sy);
    return h + 1;
  endfunction

  for (genvar v = 0; v < 3; v++) begin : g_v
    localparam router_version_e VER = (v == 0) ? VCTR : (v == 1) ? WHR_1CLK : WHR_2CLK;

    logic [8:0][7:0] lf_in, lf_out;
    logic [8:0]      lreq_in, lcr_out, lreq_out, lcr_in;
    arb_state_e [8:0] st;

    noc_mesh3x3 #(.VERSION(VER)) dut (
      .clk, .rst_n, .head_ce,
      .local_flit_in(lf_in), .local_req_in(lreq_in), .local_credit_out(lcr_out),
      .local_flit_out(lf_out), .local_req_out(lreq_out), .local_credit_in(lcr_in),
      .arb_state(st));

    initial begin
      int pairs [$];
      int worst;
      worst = 0;
      lf_in = '0; lreq_in = '0; lcr_in = '1;
      pairs.push_back(2 * 16 + 6);                    // case study R2 -> R6
      for (int s = 1; s <= 9; s++)
        for (int d = 1; d <= 9; d++)
          if (s != d) pairs.push_back(s * 16 + d);
      @(posedge rst_n);
      @(posedge clk); #1;
      foreach (pairs[i]) begin
        int s, d, t_head, t_last, got, sent, expect_t;
        logic [7:0] pk [8];
        s = pairs[i] / 16; d = pairs[i] % 16;
        pk[0] = (VER == VCTR) ? {4'(d), 4'b0001} : {4'(d), 4'd8};
        for (int k = 1; k < 8; k++) pk[k] = 8'($urandom);
        t_head = -1; t_last = -1; got = 0; sent = 0;
        for (int k = 0; k < 200 && got < 8; k++) begin
          // source: one flit per cycle while it has credit (VCTR: before the head)
          if (sent < 8 && (lcr_out[s-1] || (VER == VCTR && sent > 0))) begin
            lreq_in[s-1] = 1'b1; lf_in[s-1] = pk[sent];
            if (sent == 0) t_head = cyc;
          end else begin
            lreq_in[s-1] = 1'b0; lf_in[s-1] = '0;
          end
          #1;
          for (int n = 0; n < 9; n++) if (lreq_out[n]) begin
            check(n == d - 1, $sformatf("v%0d packet %0d->%0d came out at node %0d", v, s, d, n + 1));
            check(got < 8 && lf_out[n] == pk[got], $sformatf("v%0d packet %0d->%0d flit %0d", v, s, d, got));
            got++;
            t_last = cyc;
          end
          @(posedge clk); #1;
          if (lreq_in[s-1]) sent++;
        end
        lreq_in = '0; lf_in = '0;
        check(got == 8, $sformatf("v%0d packet %0d->%0d delivered %0d flits", v, s, d, got));
        expect_t = routers_on_path(s, d) + 7;
        if (VER == WHR_2CLK) begin
          check(t_last - t_head >= expect_t && t_last - t_head <= expect_t + routers_on_path(s, d),
                $sformatf("v%0d %0d->%0d latency %0d", v, s, d, t_last - t_head));
        end else begin
          check(t_last - t_head == expect_t,
                $sformatf("v%0d %0d->%0d latency %0d expected %0d", v, s, d, t_last - t_head, expect_t));
        end
        if (i == 0) $display("v%0d case study R2->R6 (3 routers, 8 flits): %0d cycles", v, t_last - t_head);
        if (t_last - t_head > worst) worst = t_last - t_head;
        repeat (4) @(posedge clk);
        #1;
      end
      $display("v%0d worst zero-load latency over all pairs: %0d cycles", v, worst);
      done_cnt++;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done_cnt == 3);
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
