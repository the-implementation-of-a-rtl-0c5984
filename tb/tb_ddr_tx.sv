// tb_ddr_tx: checks the double-data-rate serializer.
// Random low/high words are applied before each rising edge; in the clock
// high phase that follows the wire must carry the low word and in the low
// phase the high word.
`timescale 1ns/1ps
module tb_ddr_tx;
  localparam int W = 24;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] d_lo, d_hi, txd, exp_lo, exp_hi;

  ddr_tx #(.W(W)) dut (.clk, .d_lo, .d_hi, .txd);

  always #5 clk = ~clk;

  initial begin
    d_lo = '0; d_hi = '0;
    repeat (200) begin
      @(negedge clk);
      d_lo = W'($urandom);
      d_hi = W'($urandom);
      exp_lo = d_lo;
      exp_hi = d_hi;
      @(posedge clk);
      #2;
      checks++;
      if (txd !== exp_lo) begin failures++; $display("FAIL high phase %h vs %h", txd, exp_lo); end
      @(negedge clk);
      d_lo = ~exp_lo;   // changes after the edge must not reach the wire
      d_hi = ~exp_hi;
      #2;
      checks++;
      if (txd !== exp_hi) begin failures++; $display("FAIL low phase %h vs %h", txd, exp_hi); end
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
