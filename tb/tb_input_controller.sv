// tb_input_controller: runs packets over a link into one input controller
// and checks what it hands to the crossbar and the credits it returns.
//
// How: a sending output controller (the block that drives links in the
// router) turns 80-bit words into link frames; the link has 1 ns of delay.
// The testbench sends packets on all five virtual channels and never sends
// more flits on a channel than the receiver has returned credits for. The
// receiver sits at mesh node (0,0) and every packet goes to (1,0), so each
// bid must name port 0. The arbiter's ack is random. Checks: each flit leaves
// the crossbar side once, low half in the first and high half in the second
// cycle of a flit cycle, in order within its channel, with one output
// channel for all flits of a packet; every flit sent returns one credit on
// the right channel. The output credit counter is also checked: sixteen
// grants on a channel without a returned credit must clear its credit_ok,
// and a credit arriving on the link must set it again.
`timescale 1ns/1ps
module tb_input_controller;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, ph;
  logic [LINK_W-1:0] link_src, link_in;
  logic [NPORTS-1:0][NVC-1:0] busy = '0, credit_ok = '1;
  bid_t bid;
  logic ack;
  logic [XB_W-1:0] xb_out;
  logic ret_valid, out_grant = 0, parity_err;
  logic [VC_W-1:0] ret_vc, out_grant_vc = 0;
  logic [NVC-1:0] out_credit_ok;
  // sender
  logic [XB_W-1:0] s_xb = '0;
  logic s_valid = 0, s_cv = 0;
  logic [VC_W-1:0] s_cvc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 0; else ph <= ~ph;

  output_controller u_src (.clk, .ph, .xb_in(s_xb), .xb_valid(s_valid),
                           .cred_valid(s_cv), .cred_vc(s_cvc), .link_out(link_src));
  assign #1 link_in = link_src;

  input_controller dut (.clk, .rst_n, .ph, .link_in, .my_x(4'd0), .my_y(4'd0),
    .busy, .credit_ok, .bid, .ack, .xb_out, .ret_valid, .ret_vc,
    .out_grant, .out_grant_vc, .out_credit_ok, .parity_err);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  // body tag: [65:62] channel, [61:30] sequence number
  int credits [NVC];
  int next_seq [NVC], exp_seq [NVC], left [NVC];
  int sent = 0, got = 0, rets = 0;
  logic [VC_W-1:0] pkt_ovc [NVC];
  logic [WORD_W-1:0] cur;
  logic sending = 0, stop_src = 0;
  logic acked, lo_pending = 0;
  logic [XB_W-1:0] lo_half;

  // sender: one word per flit cycle at most, halves in ph 0 / ph 1
  always @(posedge clk) if (rst_n) begin
    if (ph) begin
      automatic int v = $urandom % NVC;
      s_valid <= 0; s_xb <= '0;
      if (!(stop_src && left[v] == 0) && credits[v] > 0 && ($urandom % 4) != 0) begin
        automatic flit_t f = '0;
        if (left[v] == 0) begin
          left[v] = $urandom % 4 + 1;
          f.head = 1;
        end
        f.tail  = left[v] == 1;
        f.dst_x = 4'd1; f.dst_y = 4'd0;
        f.body[65:62] = 4'(v);
        f.body[61:30] = 32'(next_seq[v]);
        f.body[29:0]  = 30'($urandom);
        next_seq[v]++; left[v]--; credits[v]--; sent++;
        cur = {3'(v), f};
        s_valid <= 1; s_xb <= cur[XB_W-1:0];
      end
    end else if (s_valid) s_xb <= cur[WORD_W-1:XB_W];
    // a returned credit is held for the whole flit cycle: count it once
    if (ret_valid && ph) begin
      rets++;
      credits[ret_vc]++;
      chk(credits[ret_vc] <= QDEPTH, "credit not above queue size");
    end
  end

  // arbiter and crossbar side
  assign ack = bid.valid && acked;
  always @(posedge clk) if (rst_n) begin
    if (bid.valid) chk(bid.port == P_XPOS, "route to +x");
    if (!ph) acked <= ($urandom % 3) != 0;
    // receive: the word of a flit popped at the end of a ph=1 cycle
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
      if (v < NVC) begin
        exp_seq[v] = int'(f.body[61:30]) + 1;
        if (f.head) pkt_ovc[v] = w[WORD_W-1:FLIT_W];
        else chk(pkt_ovc[v] == w[WORD_W-1:FLIT_W], "packet keeps its output channel");
      end
    end
  end

  initial begin
    for (int v = 0; v < NVC; v++) begin
      credits[v] = QDEPTH; next_seq[v] = 0; exp_seq[v] = 0; left[v] = 0;
    end
    acked = 1;
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (6000) @(posedge clk);
    // finish the open packets, then let everything drain
    stop_src = 1;
    wait (left[0] == 0 && left[1] == 0 && left[2] == 0 && left[3] == 0 && left[4] == 0);
    repeat (200) @(posedge clk);
    chk(sent > 1000, "traffic");
    chk(got == sent, "every flit delivered");
    chk(rets == sent, "every flit returned a credit");
    chk(parity_err == 0, "no parity errors");
    // output credit counter of channel 2
    chk(out_credit_ok == '1, "all output credits at start");
    for (int k = 0; k < QDEPTH; k++) begin
      @(negedge clk); while (ph != 1) @(negedge clk);
      out_grant = 1; out_grant_vc = 2;
      @(negedge clk); out_grant = 0;
    end
    #1 chk(out_credit_ok == 5'b11011, "channel 2 out of credits");
    @(posedge clk); while (ph != 1) @(posedge clk);
    s_cv <= 1; s_cvc <= 2;
    @(posedge clk); @(posedge clk);
    s_cv <= 0;
    repeat (6) @(posedge clk);
    chk(out_credit_ok == '1, "credit from the link");
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
