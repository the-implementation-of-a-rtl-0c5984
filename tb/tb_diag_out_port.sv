// tb_diag_out_port: checks that the diagnostic output keeps the first four
// flits routed to it, raises flag when it holds four and empties on a clear.
//
// How: the testbench plays the arbiter and crossbar. While credit_ok is high
// it may grant a flit (grant in the second cycle of a flit cycle) and send
// its low half in the next first cycle and its high half in the next second
// cycle, as the crossbar does. After four flits credit_ok must be low and
// flag high, and flits[] must hold the four words in order. A rising edge
// on jtag_clear (an asynchronous signal in the chip) must clear flag and
// return all four credits; a clear while flag is low must be ignored.
`timescale 1ns/1ps
module tb_diag_out_port;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, ph;
  logic [XB_W-1:0] xb_in = '0;
  logic xb_valid = 0, grant = 0, jtag_clear = 0;
  logic [NVC-1:0] credit_ok;
  logic [3:0][WORD_W-1:0] flits;
  logic flag;

  diag_out_port dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 0; else ph <= ~ph;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  logic [WORD_W-1:0] w [4];

  task automatic clear_pulse();
    #3 jtag_clear = 1;
    repeat (5) @(posedge clk);
    #3 jtag_clear = 0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int r = 0; r < 30; r++) begin
      for (int k = 0; k < 4; k++) begin
        w[k] = {16'($urandom), 32'($urandom), 32'($urandom)};
        // wait for a second cycle, then grant
        @(negedge clk); while (ph != 1) @(negedge clk);
        chk(&credit_ok == 1, "credit before fourth flit");
        chk(flag == 0, "flag low before fourth flit");
        grant = 1;
        @(negedge clk); grant = 0;
        xb_valid = 1; xb_in = w[k][XB_W-1:0];
        @(negedge clk); xb_in = w[k][WORD_W-1:XB_W];
        @(negedge clk); xb_valid = 0; xb_in = '0;
        repeat ($urandom % 4) @(negedge clk);
      end
      @(posedge clk); #1;
      chk(flag == 1, "flag after fourth flit");
      chk(credit_ok == 0, "no credit when full");
      for (int k = 0; k < 4; k++) chk(flits[k] == w[k], "stored flit");
      if (r % 3 == 0) begin
        // a stray write while full must not overwrite
        @(negedge clk); while (ph != 0) @(negedge clk);
        xb_valid = 1; xb_in = '1;
        @(negedge clk); @(negedge clk); xb_valid = 0; xb_in = '0;
        for (int k = 0; k < 4; k++) chk(flits[k] == w[k], "full buffer kept");
      end
      clear_pulse();
      chk(flag == 0, "flag cleared");
      chk(&credit_ok == 1, "credit returned");
      clear_pulse();
      chk(flag == 0 && &credit_ok == 1, "clear while empty ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
