// tb_switch: self-checking test of the 5x5 crossbar.
//
// Random flits on the five inputs, a random select and random enables; each
// enabled output must carry the selected input's flit and each disabled
// output must read zero. Every select value and every output enable is
// covered exhaustively before the random phase.
`timescale 1ns/1ps
module tb_switch;
  import noc_pkg::*;

  logic [4:0][7:0] in_flit, out_flit;
  logic [4:0]      en;
  logic [2:0]      sel;
  int checks = 0, failures = 0;

  switch #(.FLIT_SIZE(8)) dut (.in_flit, .en, .sel, .out_flit);

  task automatic check_all();
    for (int o = 0; o < 5; o++) begin
      checks++;
      if (out_flit[o] !== (en[o] ? in_flit[sel] : 8'h00)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: sel=%0d en=%b out[%0d]=%h", sel, en, o, out_flit[o]);
      end
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
    for (int s = 0; s < 5; s++)
      for (int e = 0; e < 32; e++) begin
        for (int i = 0; i < 5; i++) in_flit[i] = 8'($urandom) | 8'h01;
        sel = 3'(s); en = 5'(e);
        #1 check_all();
      end
    for (int k = 0; k < 2000; k++) begin
      in_flit = 40'({$urandom, $urandom});
      sel = 3'($urandom_range(4));
      en  = 5'($urandom);
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
