// tb_ic_control: checks the input controller's choice of which queued flit
// to bid with, and that a packet's body follows the route of its head.
//
// How: the testbench keeps five virtual-channel queues of packets (random
// lengths, one-flit packets included) and presents their front flits, random
// routing results and random downstream credits. A reference model keeps,
// per channel, whether a packet is in progress and the route its head took,
// and the channel served last. Each cycle the bid must come from the first
// eligible channel after the last one served (a head with a route, or a body
// flit whose held route has credit), and carry the head's route or the held
// one. The arbiter's ack is random; pop must follow it in a cycle with fe.
`timescale 1ns/1ps
module tb_ic_control;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, fe = 0;
  logic [NVC-1:0] empty, front_head, front_tail;
  route_t [NVC-1:0] routes;
  logic [NPORTS-1:0][NVC-1:0] credit_ok;
  bid_t bid;
  logic ack = 0, pop;
  logic [VC_W-1:0] pop_vc, pop_out_vc;

  ic_control dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  // queues: remaining flits of the current packet (0 = empty), head pending
  int     left [NVC];
  logic   at_head [NVC];
  logic   m_routed [NVC];
  route_t m_held [NVC];
  int     m_last;
  int     pops = 0, body = 0;

  task automatic drive();
    for (int v = 0; v < NVC; v++) begin
      if (left[v] == 0 && $urandom % 3 == 0) begin
        left[v] = $urandom % 4 + 1;
        at_head[v] = 1;
      end
      empty[v]      = left[v] == 0;
      front_head[v] = left[v] != 0 && at_head[v];
      front_tail[v] = left[v] == 1;
      routes[v].valid = ($urandom % 3) != 0;
      routes[v].port  = PORT_W'($urandom % NPORTS);
      routes[v].vc    = VC_W'($urandom % NVC);
    end
    for (int p = 0; p < NPORTS; p++) credit_ok[p] = NVC'($urandom);
    fe  = 1'($urandom);
    ack = 1'($urandom);
  endtask

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int v = 0; v < NVC; v++) begin
      left[v] = 0; at_head[v] = 0; m_routed[v] = 0; m_held[v] = '0;
    end
    m_last = NVC - 1;
    for (int t = 0; t < 20000; t++) begin
      int   pick;
      logic cnd [NVC];
      route_t r;
      @(negedge clk);
      drive();
      #1;
      for (int v = 0; v < NVC; v++)
        cnd[v] = empty[v] ? 0 : front_head[v] ? routes[v].valid && !m_routed[v]
                                              : m_routed[v] && credit_ok[m_held[v].port][m_held[v].vc];
      pick = -1;
      for (int k = 1; k <= NVC; k++)
        if (pick < 0 && cnd[(m_last + k) % NVC]) pick = (m_last + k) % NVC;
      chk(bid.valid == (pick >= 0), "bid valid");
      // the arbiter only acks a valid bid
      if (!bid.valid) ack = 0;
      #1;
      if (pick >= 0) begin
        r = front_head[pick] ? routes[pick] : m_held[pick];
        chk(pop_vc == VC_W'(pick), "round-robin choice");
        chk(bid.port == r.port && bid.vc == r.vc, "bid route");
        chk(bid.head == front_head[pick] && bid.tail == front_tail[pick], "bid head/tail");
        chk(pop_out_vc == r.vc, "output channel");
      end
      chk(pop == (fe && ack && pick >= 0), "pop");
      @(posedge clk);
      if (fe && ack && pick >= 0) begin
        pops++;
        if (!front_head[pick]) body++;
        m_last = pick;
        if (front_tail[pick]) m_routed[pick] = 0;
        else if (front_head[pick]) begin
          m_routed[pick] = 1;
          m_held[pick]   = routes[pick];
        end
        left[pick]--;
        at_head[pick] = 0;
      end
    end
    chk(pops > 1000 && body > 200, "enough traffic");
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
