// tb_proc_port_in: drives the processor input port as a processor would and
// checks what reaches the crossbar side.
//
// How: the processor model sends flits as two 40-bit halves on consecutive
// cycles (low half first, virtual channel in bits 79:77), on random channels,
// and starts a flit on channel v only while pin_cts[v] is high. Packets go
// from node (0,0) to (1,0), so every bid must name port 0. The arbiter's ack
// is random and often low, so queues fill and clear-to-send must drop.
// Checks: every flit arrives once on the crossbar side, low half in the
// first and high half in the second cycle of a flit cycle, in order within
// its channel; clear-to-send dropped at least once; a queue never overflows
// (which would show as a lost flit).
`timescale 1ns/1ps
module tb_proc_port_in;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, ph;
  logic pin_valid = 0;
  logic [XB_W-1:0] pin_data = '0, xb_out;
  logic [NVC-1:0] pin_cts;
  logic [NPORTS-1:0][NVC-1:0] busy = '0, credit_ok = '1;
  bid_t bid;
  logic ack;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 0; else ph <= ~ph;

  proc_port_in dut (.clk, .rst_n, .ph, .pin_valid, .pin_data, .pin_cts,
    .my_x(4'd0), .my_y(4'd0), .busy, .credit_ok, .bid, .ack, .xb_out);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  int next_seq [NVC], exp_seq [NVC], left [NVC];
  int sent = 0, got = 0, cts_low = 0;
  logic stop_src = 0, acked = 1, lo_pending = 0, slow = 0;
  logic [XB_W-1:0] lo_half;

  // processor model
  initial begin
    for (int v = 0; v < NVC; v++) begin
      next_seq[v] = 0; exp_seq[v] = 0; left[v] = 0;
    end
    #1 rst_n = 0;
    #20 rst_n = 1;
    while (!stop_src || left[0] + left[1] + left[2] + left[3] + left[4] != 0) begin
      automatic int v = $urandom % NVC;
      automatic flit_t f = '0;
      automatic logic [WORD_W-1:0] w;
      @(negedge clk);
      pin_valid = 0; pin_data = '0;
      if (!pin_cts[v]) begin
        cts_low++;
        continue;
      end
      if (stop_src && left[v] == 0) continue;
      if ($urandom % 3 == 0) continue;
      if (left[v] == 0) begin
        left[v] = $urandom % 4 + 1;
        f.head = 1;
      end
      f.tail  = left[v] == 1;
      f.dst_x = 4'd1;
      f.body[65:62] = 4'(v);
      f.body[61:30] = 32'(next_seq[v]);
      f.body[29:0]  = 30'($urandom);
      next_seq[v]++; left[v]--; sent++;
      w = {3'(v), f};
      pin_valid = 1; pin_data = w[XB_W-1:0];
      @(negedge clk) pin_data = w[WORD_W-1:XB_W];
    end
    @(negedge clk) pin_valid = 0; pin_data = '0;
  end

  // arbiter and crossbar side
  assign ack = bid.valid && acked;
  always @(posedge clk) if (rst_n) begin
    if (bid.valid) chk(bid.port == P_XPOS, "route to +x");
    if ($urandom % 500 == 0) slow <= !slow;
    if (!ph) acked <= slow ? ($urandom % 8) == 0 : ($urandom % 3) != 0;
    if (!ph && xb_out != '0) begin
      lo_half = xb_out;
      lo_pending = 1;
    end else if (ph && lo_pending) begin
      automatic logic [WORD_W-1:0] w = {xb_out, lo_half};
      automatic flit_t f = flit_t'(w[FLIT_W-1:0]);
      automatic int v = f.body[65:62];
      lo_pending = 0;
      got++;
      chk(v < NVC && int'(f.body[61:30]) == exp_seq[v], "order within channel");
      if (v < NVC) exp_seq[v] = int'(f.body[61:30]) + 1;
    end
  end

  initial begin
    repeat (8000) @(posedge clk);
    stop_src = 1;
    slow = 0;
    wait (left[0] + left[1] + left[2] + left[3] + left[4] == 0);
    repeat (400) @(posedge clk);
    chk(sent > 1000, "traffic");
    chk(got == sent, "every flit delivered");
    chk(cts_low > 0, "clear-to-send dropped");
    chk(pin_cts == '1, "all queues empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
