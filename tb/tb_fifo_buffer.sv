// tb_fifo_buffer: self-checking test of the router's input buffer.
//
// Two buffers of depth 8 are driven with the same random writes and reads: one
// with the wormhole credit rule (credit while >= 1 location is free) and one
// with the virtual-cut-through rule (credit while >= 8 locations are free).
// A queue model gives the expected front flit (zero when empty), the
// not_empty flag and both credit outputs every cycle. Writes are only issued
// while the wormhole credit is high, as a well-behaved upstream would do, so
// the buffer runs full and empty many times. The test also checks that a
// flit written into an empty buffer is at the front one cycle later.
`timescale 1ns/1ps
module tb_fifo_buffer;
  import noc_pkg::*;

  localparam int unsigned FW = 8;
  localparam int unsigned D  = 8;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [FW-1:0] flit_in;
  logic          in_req, out_req;
  logic [FW-1:0] flit_out_a, flit_out_b;
  logic          ne_a, ne_b, cr_a, cr_b;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0;
  logic [FW-1:0] model [$];

  fifo_buffer #(.FLIT_SIZE(FW), .BUFFER_SIZE(D), .CREDIT_SPACE(1)) dut_a (
    .clk, .rst_n, .flit_in, .in_req, .out_req,
    .flit_out(flit_out_a), .not_empty(ne_a), .credit_out(cr_a));
  fifo_buffer #(.FLIT_SIZE(FW), .BUFFER_SIZE(D), .CREDIT_SPACE(D)) dut_b (
    .clk, .rst_n, .flit_in, .in_req, .out_req,
    .flit_out(flit_out_b), .not_empty(ne_b), .credit_out(cr_b));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FW-1:0] exp_front;
    rst_n = 1'b0; in_req = 1'b0; out_req = 1'b0; flit_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed: write one flit into the empty buffer, see it next cycle.
    flit_in = 8'hA5; in_req = 1'b1;
    @(posedge clk); model.push_back(8'hA5);
    #1 in_req = 1'b0;
    check(flit_out_a == 8'hA5 && ne_a, "flit at front one cycle after write");
    out_req = 1'b1;
    @(posedge clk); void'(model.pop_front());
    #1 out_req = 1'b0;
    check(flit_out_a == '0 && !ne_a, "front reads zero after last read");
    // Random phase with changing read/write biases
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int wbias, rbias;
      wbias = ((cyc / 500) % 2) ? 80 : 30;
      rbias = ((cyc / 500) % 2) ? 30 : 80;
      // compare current outputs with model
      exp_front = (model.size() > 0) ? model[0] : '0;
      check(flit_out_a == exp_front, $sformatf("front a %h exp %h", flit_out_a, exp_front));
      check(flit_out_b == exp_front, "front b");
      check(ne_a == (model.size() > 0), "not_empty");
      check(cr_a == (model.size() < D), "wormhole credit");
      check(cr_b == (model.size() == 0), "cut-through credit");
      if (model.size() == D) n_full++;
      if (model.size() == 0) n_empty++;
      // choose inputs
      in_req  = cr_a && ($urandom_range(99) < wbias);
      out_req = $urandom_range(99) < rbias;
      flit_in = FW'($urandom);
      if (in_req && out_req && model.size() > 0) n_both++;
      @(posedge clk);
      if (out_req && model.size() > 0) void'(model.pop_front());
      if (in_req) model.push_back(flit_in);
      #1;
    end
    check(n_full > 0 && n_empty > 0 && n_both > 0, "full, empty and simultaneous read/write all seen");
    $display("full=%0d empty=%0d simultaneous=%0d", n_full, n_empty, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
