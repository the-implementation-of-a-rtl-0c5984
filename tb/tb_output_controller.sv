// tb_output_controller: drives random flits (two 40-bit halves per flit
// cycle), idle cycles and credits into the output controller and samples
// the link in the middle of every half period. Each four-beat frame must
// carry the frame mark, the valid and credit bits, the credit's virtual
// channel, the 80 data bits and correct even parity in every beat. The
// beats of a half must be on the wire in the clock cycle after the half
// was on the bus.
`timescale 1ns/1ps
module tb_output_controller;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, ph = 1'b0;
  logic [XB_W-1:0] xb_in;
  logic xb_valid, cred_valid;
  logic [VC_W-1:0] cred_vc;
  logic [LINK_W-1:0] link_out;

  output_controller dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t %s", $time, what); end
  endtask

  logic [LINK_W-1:0] beats [4];
  initial begin
    xb_in = '0; xb_valid = 0; cred_valid = 0; cred_vc = 0;
    for (int t = 0; t < 400; t++) begin
      logic [WORD_W-1:0] w;
      logic v, cv;
      logic [VC_W-1:0] cvc;
      w = {16'($urandom), 32'($urandom), 32'($urandom)};
      v = 1'($urandom);
      cv = 1'($urandom);
      cvc = VC_W'($urandom % 5);
      // the bus changes in mid-cycle here; the controller samples at edges
      @(negedge clk);
      ph = 0; xb_valid = v; cred_valid = cv; cred_vc = cvc;
      xb_in = v ? w[39:0] : '0;
      @(posedge clk); #2.5 beats[0] = link_out;
      @(negedge clk);
      ph = 1; xb_in = v ? w[79:40] : '0;
      #2.5 beats[1] = link_out;
      @(posedge clk); #2.5 beats[2] = link_out;
      @(negedge clk);
      ph = 0; xb_valid = 0; cred_valid = 0; xb_in = '0;
      #2.5 beats[3] = link_out;
      for (int k = 0; k < 4; k++) chk(^beats[k] == 1'b0, "even parity");
      chk(beats[0][23:21] == {1'b1, v, cv}, "beat 0 control");
      chk(beats[1][23] == 1'b0 && beats[2][23] == 1'b0 && beats[3][23] == 1'b0, "frame mark only in beat 0");
      if (cv) chk({beats[2][21], beats[1][22:21]} == cvc, "credit vc");
      if (v) chk({beats[3][19:0], beats[2][19:0], beats[1][19:0], beats[0][19:0]} == w, "data");
      @(posedge clk);
      @(negedge clk) ph = 1;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
