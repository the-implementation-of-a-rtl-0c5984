// tb_flit_munger: loads random flits with random output virtual channels at
// the end of flit cycles and checks the two 40-bit halves of the following
// flit cycle, and an all-zero bus after a cycle with nothing loaded.
`timescale 1ns/1ps
module tb_flit_munger;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, ph, load;
  logic [FLIT_W-1:0] flit;
  logic [VC_W-1:0] out_vc;
  logic [XB_W-1:0] xb_out;

  flit_munger dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    logic [WORD_W-1:0] w;
    ph = 0; load = 0; flit = '0; out_vc = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic l;
      // second cycle of a flit cycle: present a flit to load
      @(negedge clk);
      ph = 1;
      l = ($urandom % 4) != 0;
      load = l;
      flit = {13'($urandom), 32'($urandom), 32'($urandom)};
      out_vc = VC_W'($urandom % 5);
      w = l ? {out_vc, flit} : '0;
      @(negedge clk);
      ph = 0; load = 0;
      #1 chk(xb_out == w[39:0], "lower half in first cycle");
      @(negedge clk);
      ph = 1;
      #1 chk(xb_out == w[79:40], "upper half in second cycle");
      @(posedge clk);
      @(negedge clk);
      ph = 0;
      // an idle flit cycle
      #1 chk(xb_out == '0, "idle bus is zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
