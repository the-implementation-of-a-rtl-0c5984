// tb_flit_fifo: random writes and pops on the five virtual-channel queues,
// compared each cycle with a queue model (front word, empty, count),
// including writes to full queues, which must be dropped (also when the
// same edge pops from that queue).
`timescale 1ns/1ps
module tb_flit_fifo;
  localparam int NVC = 5, DEPTH = 16, W = 77;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic wr_en, pop;
  logic [2:0] wr_vc, pop_vc;
  logic [W-1:0] wr_data;
  logic [NVC-1:0][W-1:0] front;
  logic [NVC-1:0] empty;
  logic [NVC-1:0][4:0] count;

  flit_fifo #(.NVC(NVC), .DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  logic [W-1:0] model [NVC][$];
  int full_writes = 0;

  initial begin
    wr_en = 0; pop = 0; wr_vc = 0; pop_vc = 0; wr_data = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (empty[v] != (model[v].size() == 0) || count[v] != model[v].size() ||
            (model[v].size() != 0 && front[v] != model[v][0])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d vc %0d count %0d model %0d", t, v, count[v], model[v].size());
        end
      end
      // bias towards filling in the first half, draining in the second
      wr_en   = ($urandom % 100) < (t < 2000 ? 70 : 30);
      wr_vc   = 3'($urandom % NVC);
      wr_data = {13'($urandom), 32'($urandom), 32'($urandom)};
      pop     = ($urandom % 100) < (t < 2000 ? 30 : 70);
      pop_vc  = 3'($urandom % NVC);
      @(posedge clk);
      // a write is refused when the queue is full before the edge, even if
      // the same edge pops from it
      begin
        bit acc;
        acc = wr_en && model[wr_vc].size() < DEPTH;
        if (wr_en && !acc) full_writes++;
        if (pop && model[pop_vc].size() != 0) void'(model[pop_vc].pop_front());
        if (acc) model[wr_vc].push_back(wr_data);
      end
    end
    checks++;
    if (full_writes == 0) begin failures++; $display("FAIL no queue became full"); end
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
