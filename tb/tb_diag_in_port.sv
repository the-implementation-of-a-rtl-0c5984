// tb_diag_in_port: checks that the diagnostic input sends the four flits
// loaded by the test port, in order, once per rising edge of flit-ready.
//
// How: the testbench loads four random flits, raises jtag_flit_rdy (an
// asynchronous signal in the chip, here changed at random times) and keeps
// q_room random. Every write (wr_en) must come in the second cycle of a flit
// cycle (ph=1), on virtual channel 0, with the next flit in order; exactly
// four writes must follow each rising edge and flag must be high from the
// edge until the last write. Without a new rising edge there must be no
// write. Timing: 10 ns clock, ph toggles every cycle.
`timescale 1ns/1ps
module tb_diag_in_port;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, ph;
  logic [3:0][FLIT_W-1:0] jtag_flits;
  logic jtag_flit_rdy = 0, q_room = 0;
  logic wr_en, flag;
  logic [VC_W-1:0] wr_vc;
  logic [FLIT_W-1:0] wr_flit;

  diag_in_port dut (.*);

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

  int n_wr = 0;
  logic [FLIT_W-1:0] expect_q [$];

  always @(posedge clk) if (rst_n) begin
    q_room <= ($urandom % 4) != 0;
    if (wr_en) begin
      chk(ph == 1, "write in second cycle");
      chk(wr_vc == 0, "virtual channel 0");
      chk(flag == 1, "flag high while sending");
      chk(expect_q.size() > 0, "write expected");
      if (expect_q.size() > 0) chk(wr_flit == expect_q.pop_front(), "flit order");
      n_wr++;
    end
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      for (int k = 0; k < 4; k++)
        jtag_flits[k] = {13'($urandom), 32'($urandom), 32'($urandom)};
      for (int k = 0; k < 4; k++) expect_q.push_back(jtag_flits[k]);
      #($urandom % 17 + 1) jtag_flit_rdy = 1;
      repeat (4) @(posedge clk);
      #1 chk(flag == 1, "flag set after ready");
      #($urandom % 30) jtag_flit_rdy = 0;
      wait (expect_q.size() == 0);
      @(posedge clk); #1 chk(flag == 0, "flag clear after fourth flit");
      repeat ($urandom % 20 + 4) @(posedge clk);
      chk(n_wr == 4 * (r + 1), "four writes per request");
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
