// tb_arbiter: random bids from six inputs, random credit patterns, and a
// model of the arbiter: per output a round-robin pointer that advances by
// one place per grant, eligibility (credit present; a head flit also needs
// the output virtual channel not BUSY), BUSY set by a granted head and
// cleared by a granted tail. ACK, the grant outputs, the registered
// crossbar setting and BUSY are compared every flit cycle. It also checks
// that an input bidding continuously for a contested output gets at least
// one grant in every six.
`timescale 1ns/1ps
module tb_arbiter;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, fe;
  bid_t [NPORTS-1:0] bids;
  logic [NPORTS-1:0][NVC-1:0] credit_ok, busy;
  logic [NPORTS-1:0] ack, out_grant, xb_valid;
  logic [NPORTS-1:0][VC_W-1:0] out_grant_vc;
  logic [NPORTS-1:0][PORT_W-1:0] xb_sel;

  arbiter dut (.*);
  always #5 clk = ~clk;

  int ptr [NPORTS];
  logic [NPORTS-1:0][NVC-1:0] m_busy;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    int since_win, worst;
    logic [NPORTS-1:0] e_ack;
    int e_win [NPORTS];
    fe = 1; bids = '0; credit_ok = '1;
    for (int o = 0; o < NPORTS; o++) ptr[o] = 0;
    m_busy = '0;
    since_win = 0; worst = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        bids[i].valid = ($urandom % 100) < 80;
        bids[i].port  = PORT_W'($urandom % NPORTS);
        bids[i].vc    = VC_W'($urandom % NVC);
        bids[i].head  = ($urandom % 3) == 0;
        bids[i].tail  = ($urandom % 3) == 0;
      end
      // input 0 always competes for output 2
      bids[0] = '{1'b1, 3'd2, 3'd1, 1'b0, 1'b0};
      for (int o = 0; o < NPORTS; o++)
        for (int v = 0; v < NVC; v++) credit_ok[o][v] = ($urandom % 100) < 85;
      credit_ok[2][1] = 1'b1;
      #1;
      e_ack = '0;
      for (int o = 0; o < NPORTS; o++) begin
        e_win[o] = -1;
        for (int k = 0; k < NPORTS && e_win[o] < 0; k++) begin
          int i;
          i = (ptr[o] + k) % NPORTS;
          if (bids[i].valid && bids[i].port == o && credit_ok[o][bids[i].vc] &&
              !(bids[i].head && m_busy[o][bids[i].vc])) e_win[o] = i;
        end
        chk(out_grant[o] == (e_win[o] >= 0), "out_grant");
        if (e_win[o] >= 0) begin
          e_ack[e_win[o]] = 1'b1;
          chk(out_grant_vc[o] == bids[e_win[o]].vc, "out_grant_vc");
        end
      end
      chk(ack == e_ack, $sformatf("ack %b expected %b", ack, e_ack));
      if (e_win[2] == 0) since_win = 0;
      else since_win++;
      if (since_win > worst) worst = since_win;
      @(posedge clk);
      for (int o = 0; o < NPORTS; o++)
        if (e_win[o] >= 0) begin
          ptr[o] = (ptr[o] + 1) % NPORTS;
          if (bids[e_win[o]].tail) m_busy[o][bids[e_win[o]].vc] = 1'b0;
          else if (bids[e_win[o]].head) m_busy[o][bids[e_win[o]].vc] = 1'b1;
        end
      #1;
      chk(busy == m_busy, "busy");
      for (int o = 0; o < NPORTS; o++) begin
        chk(xb_valid[o] == (e_win[o] >= 0), "xb_valid");
        if (e_win[o] >= 0) chk(xb_sel[o] == PORT_W'(e_win[o]), "xb_sel");
      end
    end
    chk(worst < NPORTS, $sformatf("input 0 waited %0d grants", worst));
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
