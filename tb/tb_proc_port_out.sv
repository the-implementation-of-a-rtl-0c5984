// tb_proc_port_out: checks the processor output port: buffering, credits
// and the half-word handshake towards the processor.
//
// How: the testbench plays the arbiter and crossbar. Whenever credit_ok is
// high it may grant (in the second cycle of a flit cycle) and then drive the
// word's low half in the next first cycle and its high half in the next
// second cycle. The processor side drops pout_cts at random. Every cycle
// with pout_valid high must carry the next half of the stream in order (low
// half first); a started word must finish in the next cycle whatever
// pout_cts does; the port may start a word only while pout_cts is high; and
// the grants outstanding may never exceed the SLOTS words of buffer.
`timescale 1ns/1ps
module tb_proc_port_out;
  import rr_pkg::*;
  localparam int unsigned SLOTS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, ph;
  logic [XB_W-1:0] xb_in = '0, pout_data;
  logic xb_valid = 0, grant = 0, pout_valid, pout_cts = 0;
  logic [NVC-1:0] credit_ok;

  proc_port_out #(.SLOTS(SLOTS)) dut (.*);

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

  logic [XB_W-1:0] halves [$];
  int in_flight = 0, sent = 0, got = 0, stalls = 0;
  logic prev_first = 0;
  logic full_seen = 0, slow = 0;

  // processor side
  always @(posedge clk) if (rst_n) begin
    if (pout_valid) begin
      chk(halves.size() > 0, "output expected");
      if (halves.size() > 0) chk(pout_data == halves.pop_front(), "half order");
      if (!prev_first) chk(pout_cts, "word starts only with cts");
      prev_first <= !prev_first;
      got++;
    end else begin
      chk(!prev_first, "second half follows at once");
      if (!pout_cts && halves.size() > 0) stalls++;
    end
    if ($urandom % 50 == 0) slow <= !slow;
    pout_cts <= slow ? ($urandom % 8) == 0 : ($urandom % 3) != 0;
  end

  // arbiter and crossbar side
  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      automatic logic [WORD_W-1:0] w = {16'($urandom), 32'($urandom), 32'($urandom)};
      @(negedge clk); while (ph != 1) @(negedge clk);
      if (!credit_ok[0]) begin
        full_seen = 1;
        chk(in_flight >= 0, "no credit");
        continue;
      end
      if ($urandom % 4 == 0) continue;
      grant = 1;
      @(negedge clk); grant = 0;
      xb_valid = 1; xb_in = w[XB_W-1:0];
      halves.push_back(w[XB_W-1:0]);
      halves.push_back(w[WORD_W-1:XB_W]);
      @(negedge clk); xb_in = w[WORD_W-1:XB_W];
      @(posedge clk); #1 xb_valid = 0; xb_in = '0;
      sent++;
      chk(halves.size() <= 2 * SLOTS + 2, "buffer bound");
    end
    pout_cts = 1;
    repeat (40) @(posedge clk);
    chk(halves.size() == 0, "all words delivered");
    chk(got == 2 * sent, "half count");
    chk(full_seen, "credit ran out at least once");
    chk(stalls > 0, "processor stalled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
