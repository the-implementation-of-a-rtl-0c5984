// tb_front_end: feeds link frames built by the testbench into the front end.
// Each frame is four 24-bit beats, placed on the wires in the half periods
// that the front end samples (falling edge: beats 0 and 2, rising edge:
// beats 1 and 3). Frames carry random flits, virtual channels and credits,
// some are idle, and some have a corrupted bit. The recovered flit, virtual
// channel, credit and parity error flag are checked for every frame.
`timescale 1ns/1ps
module tb_front_end;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [LINK_W-1:0] link_in;
  logic              flit_valid, credit_valid, parity_err;
  logic [VC_W-1:0]   flit_vc, credit_vc;
  logic [FLIT_W-1:0] flit;

  front_end dut (.*);
  always #5 clk = ~clk;

  function automatic logic [LINK_W-1:0] beat(logic [2:0] ctl, logic [19:0] d);
    logic [LINK_W-1:0] b = {ctl, 1'b0, d};
    b[20] = ^{ctl, d};
    return b;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  logic [3:0][LINK_W-1:0] fr;
  int seen;
  logic              e_valid, e_cv, e_err;
  logic [VC_W-1:0]   e_vc, e_cvc;
  logic [FLIT_W-1:0] e_flit;

  always @(posedge clk) if (rst_n && (flit_valid || credit_valid || parity_err)) begin
    seen++;
    chk(flit_valid == e_valid && credit_valid == e_cv && parity_err == e_err, $sformatf("flags %b%b%b exp %b%b%b fr %h", flit_valid, credit_valid, parity_err, e_valid, e_cv, e_err, fr));
    if (e_valid && !e_err) chk(flit == e_flit && flit_vc == e_vc, "flit and vc");
    if (e_cv && !e_err)    chk(credit_vc == e_cvc, "credit vc");
  end

  initial begin
    link_in = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [WORD_W-1:0] w;
      int expect_out;
      w      = {VC_W'($urandom % 5), 13'($urandom), 32'($urandom), 32'($urandom)};
      e_valid = ($urandom % 4) != 0;
      e_cv    = ($urandom % 2) != 0;
      e_cvc   = VC_W'($urandom % 5);
      e_flit  = w[FLIT_W-1:0];
      e_vc    = w[WORD_W-1:FLIT_W];
      fr[0] = beat({1'b1, e_valid, e_cv}, w[19:0]);
      fr[1] = beat({1'b0, e_cvc[1:0]},   w[39:20]);
      fr[2] = beat({2'b00, e_cvc[2]},     w[59:40]);
      fr[3] = beat(3'b000,                w[79:60]);
      e_err = ($urandom % 8) == 0;
      if (e_err) begin
        int bi, bb;
        bi = $urandom % 4;
        bb = $urandom % 23;   // never the frame mark
        fr[bi][bb] = !fr[bi][bb];
      end
      e_valid = fr[0][22];
      e_cv    = fr[0][21];
      expect_out = e_valid || e_cv || e_err;
      seen = 0;
      // beat k is on the wire in the half period before the edge that samples it
      @(posedge clk); #1 link_in = fr[0];
      @(negedge clk); #1 link_in = fr[1];
      @(posedge clk); #1 link_in = fr[2];
      @(negedge clk); #1 link_in = fr[3];
      @(posedge clk); #1 link_in = '0;
      repeat (2) @(posedge clk);
      #1;
      chk(seen == expect_out, "one output per frame");
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
