// tb_reliable_router: end-to-end test of a 2 x 2 mesh of routers.
//
// Four routers at their default sizes are connected into a 2 x 2 mesh; each
// link has a 1 ns wire delay. The testbench plays the four processors and
// the JTAG host:
//   1. sets each node's coordinates through JTAG (SETUP register),
//   2. measures the latency of a lone one-flit packet over 0, 1 and 2 hops
//      (each hop must take 5 or 6 clock cycles),
//   3. injects a frame with a parity error on an unconnected link,
//   4. runs random traffic (random sources, destinations, lengths and
//      virtual channels) with a processor that sometimes refuses output,
//   5. runs a hot spot into one node whose processor stops accepting, so
//      credits and clear-to-send run out,
//   6. sends a packet from the diagnostic input port of node 0 (loaded and
//      started through JTAG),
//   7. catches a packet in the diagnostic output port of node 2 and reads it
//      through JTAG, then clears it and catches a second one.
// Every flit received is checked against what was sent: contents, the node
// it reached, and packet order on its virtual channel. At the end every flit
// must have arrived. Mechanisms counted (each must happen at least once):
// adaptive and escape virtual channel grants, arbitration conflicts, credit
// exhaustion, head flits waiting for a route, CTS stalls in both directions,
// parity errors, diagnostic input and output.
`timescale 1ns/1ps
module tb_reliable_router;
  import rr_pkg::*;
  import jtag_pkg::*;

  localparam int N = 4;          // nodes, node n at x = n % 2, y = n / 2
  localparam int HOP_MIN = 5;    // clock cycles per hop of this design: 5 or 6,
  localparam int HOP_MAX = 6;    // depending on where in the flit cycle a flit arrives
  localparam int MAXID = 4096;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  // ---- routers and mesh wiring ---------------------------------------
  logic [N-1:0][NNET-1:0][LINK_W-1:0] lout, lin, edge_drv;
  logic [N-1:0][NNET-1:0]             perr;
  logic [N-1:0]                       pin_valid, pout_valid, pout_cts;
  logic [N-1:0][XB_W-1:0]             pin_data, pout_data;
  logic [N-1:0][NVC-1:0]              pin_cts;
  logic tck = 1'b0, tms = 1'b1, trst_n = 1'b1;
  logic [N-1:0] tdi, tdo, tdo_en;

  function automatic int nbr(int n, int p);   // neighbour node or -1
    int x = n % 2, y = n / 2;
    case (p)
      0: return x == 0 ? n + 1 : -1;
      1: return x == 1 ? n - 1 : -1;
      2: return y == 0 ? n + 2 : -1;
      default: return y == 1 ? n - 2 : -1;
    endcase
  endfunction

  // counters of mechanisms, per node
  int c_adapt[N], c_escape[N], c_conflict[N], c_nocredit[N], c_blocked[N];
  int c_pincts[N], c_perr[N];

  for (genvar n = 0; n < N; n++) begin : g_node
    reliable_router u_rr (
      .clk, .rst_n,
      .link_in(lin[n]), .link_out(lout[n]), .link_parity_err(perr[n]),
      .pin_valid(pin_valid[n]), .pin_data(pin_data[n]), .pin_cts(pin_cts[n]),
      .pout_valid(pout_valid[n]), .pout_data(pout_data[n]), .pout_cts(pout_cts[n]),
      .tck, .trst_n, .tms, .tdi(tdi[n]), .tdo(tdo[n]), .tdo_en(tdo_en[n])
    );
    for (genvar p = 0; p < NNET; p++) begin : g_link
      localparam int M = (p == 0) ? ((n % 2 == 0) ? n + 1 : -1) :
                         (p == 1) ? ((n % 2 == 1) ? n - 1 : -1) :
                         (p == 2) ? ((n / 2 == 0) ? n + 2 : -1) :
                                    ((n / 2 == 1) ? n - 2 : -1);
      localparam int Q = p ^ 1;   // port of the neighbour facing back
      if (M >= 0) begin : g_conn
        assign #1 lin[n][p] = lout[M][Q];
      end else begin : g_edge
        assign #1 lin[n][p] = edge_drv[n][p];
      end
    end

    always @(posedge clk) if (rst_n) begin
      if (u_rr.ph) begin
        for (int o = 0; o < NNET; o++)
          if (u_rr.out_grant[o]) begin
            if (u_rr.out_grant_vc[o] == 0) c_escape[n]++;
            else c_adapt[n]++;
          end
        for (int o = 0; o < NPORTS; o++) begin
          int nb;
          nb = 0;
          for (int i = 0; i < NPORTS; i++)
            if (u_rr.bids[i].valid && u_rr.bids[i].port == o) nb++;
          if (nb > 1) c_conflict[n]++;
        end
      end
      for (int o = 0; o < NNET; o++)
        if (u_rr.credit_ok[o] != '1) c_nocredit[n]++;
      for (int v = 0; v < NVC; v++) begin
        if (!u_rr.g_net[0].u_ic.u_core.empty[v] && u_rr.g_net[0].u_ic.u_core.front_head[v] &&
            !u_rr.g_net[0].u_ic.u_core.routes[v].valid) c_blocked[n]++;
        if (!u_rr.g_net[1].u_ic.u_core.empty[v] && u_rr.g_net[1].u_ic.u_core.front_head[v] &&
            !u_rr.g_net[1].u_ic.u_core.routes[v].valid) c_blocked[n]++;
        if (!u_rr.g_net[2].u_ic.u_core.empty[v] && u_rr.g_net[2].u_ic.u_core.front_head[v] &&
            !u_rr.g_net[2].u_ic.u_core.routes[v].valid) c_blocked[n]++;
        if (!u_rr.g_net[3].u_ic.u_core.empty[v] && u_rr.g_net[3].u_ic.u_core.front_head[v] &&
            !u_rr.g_net[3].u_ic.u_core.routes[v].valid) c_blocked[n]++;
        if (!u_rr.u_pin.u_core.empty[v] && u_rr.u_pin.u_core.front_head[v] &&
            !u_rr.u_pin.u_core.routes[v].valid) c_blocked[n]++;
      end
      if (pin_cts[n] != '1) c_pincts[n]++;
      if (perr[n] != '0) c_perr[n]++;
    end
  end

  // ---- processors: sending ---------------------------------------------
  logic [FLIT_W-1:0] exp_flit [MAXID][4];
  int                exp_len  [MAXID];
  int                exp_dst  [MAXID];
  bit                exp_diag [MAXID];
  int next_id = 1;
  int sent_flits = 0, recv_flits = 0;

  function automatic logic [FLIT_W-1:0] mk_flit(int id, int fidx, int len, int dst, bit to_diag);
    flit_t f;
    f.head    = fidx == 0;
    f.tail    = fidx == len - 1;
    f.body    = {16'(id), 4'(fidx), 14'($urandom), 32'($urandom)};
    f.to_diag = to_diag;
    f.dst_x   = COORD_W'(dst % 2);
    f.dst_y   = COORD_W'(dst / 2);
    if (fidx != 0) begin
      f.to_diag = 1'($urandom);
      f.dst_x   = COORD_W'($urandom);
      f.dst_y   = COORD_W'($urandom);
    end
    return f;
  endfunction

  // Reserve an id and make its flits.
  function automatic int new_packet(int len, int dst, bit to_diag);
    int id = next_id++;
    exp_len[id]  = len;
    exp_dst[id]  = dst;
    exp_diag[id] = to_diag;
    for (int k = 0; k < len; k++) exp_flit[id][k] = mk_flit(id, k, len, dst, to_diag);
    return id;
  endfunction

  semaphore tx_lock[N];
  longint t_sent[MAXID];

  task automatic send_packet(int n, int id, int vc);
    tx_lock[n].get();
    for (int k = 0; k < exp_len[id]; k++) begin
      logic [WORD_W-1:0] w;
      w = {VC_W'(vc), exp_flit[id][k]};
      @(negedge clk);
      while (!pin_cts[n][vc]) begin
        pin_valid[n] = 1'b0;
        @(negedge clk);
      end
      pin_valid[n] = 1'b1;
      pin_data[n]  = w[XB_W-1:0];
      @(negedge clk);
      pin_data[n]  = w[WORD_W-1:XB_W];
      t_sent[id]   = cyc;
      sent_flits++;
    end
    @(negedge clk);
    pin_valid[n] = 1'b0;
    pin_data[n]  = '0;
    tx_lock[n].put();
  endtask

  // ---- processors: receiving -------------------------------------------
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [N-1:0]           rx_second;
  logic [N-1:0][XB_W-1:0] rx_lo;
  int  cur_id [N][NVC];
  int  cur_idx[N][NVC];
  longint t_recv[MAXID];
  int  recv_local = 0, recv_multi = 0, c_poutstall = 0;

  task automatic got_flit(int n, logic [WORD_W-1:0] w);
    int v = int'(w[WORD_W-1:FLIT_W]);
    flit_t f = flit_t'(w[FLIT_W-1:0]);
    int id = int'(f.body[65:50]);
    int k  = int'(f.body[49:46]);
    recv_flits++;
    if (id <= 0 || id >= next_id || k >= exp_len[id]) begin
      check(0, $sformatf("node %0d: unknown flit id %0d idx %0d", n, id, k));
      return;
    end
    check(exp_flit[id][k] == w[FLIT_W-1:0], $sformatf("node %0d: flit %0d.%0d contents", n, id, k));
    check(exp_dst[id] == n && !exp_diag[id], $sformatf("node %0d: packet %0d misdelivered", n, id));
    if (f.head) begin
      check(cur_id[n][v] == 0 && k == 0, $sformatf("node %0d vc %0d: head inside packet", n, v));
      t_recv[id] = cyc;
    end else
      check(cur_id[n][v] == id && cur_idx[n][v] == k - 1,
            $sformatf("node %0d vc %0d: flit %0d.%0d out of order", n, v, id, k));
    cur_id[n][v]  = f.tail ? 0 : id;
    cur_idx[n][v] = k;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (pout_valid[n]) begin
        if (!rx_second[n]) rx_lo[n] <= pout_data[n];
        else got_flit(n, {pout_data[n], rx_lo[n]});
        rx_second[n] <= !rx_second[n];
      end
      if (!pout_cts[n] && g_cnt_used(n)) c_poutstall++;
    end
  end

  function automatic bit g_cnt_used(int n);
    case (n)
      0: return g_node[0].u_rr.u_pout.used != 0;
      1: return g_node[1].u_rr.u_pout.used != 0;
      2: return g_node[2].u_rr.u_pout.used != 0;
      default: return g_node[3].u_rr.u_pout.used != 0;
    endcase
  endfunction

  // ---- JTAG host --------------------------------------------------------
  task automatic tck_pulse(bit tms_v, logic [N-1:0] tdi_v, output logic [N-1:0] tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #10;
    tdo_v = tdo;
    tck = 1'b1;
    #20;
    tck = 1'b0;
    #10;
  endtask

  task automatic jtag_ir(logic [IR_W-1:0] ins);
    logic [N-1:0] d;
    tck_pulse(1, '0, d); tck_pulse(1, '0, d); tck_pulse(0, '0, d); tck_pulse(0, '0, d);
    for (int k = 0; k < IR_W; k++) tck_pulse(k == IR_W - 1, {N{ins[k]}}, d);
    tck_pulse(1, '0, d); tck_pulse(0, '0, d);
  endtask

  logic [N-1:0][4*WORD_W-1:0] dr_in, dr_out;
  task automatic jtag_dr(int len);
    logic [N-1:0] d, o;
    tck_pulse(1, '0, d); tck_pulse(0, '0, d); tck_pulse(0, '0, d);
    for (int k = 0; k < len; k++) begin
      for (int n = 0; n < N; n++) d[n] = dr_in[n][k];
      tck_pulse(k == len - 1, d, o);
      for (int n = 0; n < N; n++) dr_out[n][k] = o[n];
    end
    tck_pulse(1, '0, d); tck_pulse(0, '0, d);
  endtask

  task automatic jtag_ctl(logic [N-1:0] rdy, logic [N-1:0] clr);
    jtag_ir(IR_DIAG_CTL);
    dr_in = '0;
    for (int n = 0; n < N; n++) dr_in[n][1:0] = {clr[n], rdy[n]};
    jtag_dr(4);
  endtask

  // ---- test sequence ----------------------------------------------------
  int diag_in_done = 0, diag_out_done = 0;

  task automatic wait_all(int limit);
    int t = 0;
    while (recv_flits < sent_flits && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(recv_flits == sent_flits, $sformatf("%0d of %0d flits delivered", recv_flits, sent_flits));
  endtask

  initial begin
    int lat[3];
    for (int n = 0; n < N; n++) tx_lock[n] = new(1);
    pin_valid = '0; pin_data = '0; pout_cts = '1; tdi = '0; edge_drv = '0;
    rx_second = '0; rx_lo = '0;
    for (int n = 0; n < N; n++) for (int v = 0; v < NVC; v++) begin
      cur_id[n][v] = 0; cur_idx[n][v] = 0;
    end
    #1 rst_n = 1'b0;
    trst_n = 1'b0;
    #100 trst_n = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. coordinates through JTAG
    begin
      logic [N-1:0] d;
      tck_pulse(0, '0, d);   // Test-Logic-Reset to Run-Test/Idle
    end
    jtag_ir(IR_SETUP);
    dr_in = '0;
    for (int n = 0; n < N; n++) dr_in[n][7:0] = {4'(n / 2), 4'(n % 2)};
    jtag_dr(8);
    check(g_node[3].u_rr.my_x == 1 && g_node[3].u_rr.my_y == 1, "node 3 coordinates");
    check(g_node[1].u_rr.my_x == 1 && g_node[1].u_rr.my_y == 0, "node 1 coordinates");

    // 2. latency over 0, 1, 2 hops
    for (int h = 0; h < 3; h++) begin
      automatic int dst = (h == 0) ? 0 : (h == 1) ? 1 : 3;
      automatic int id  = new_packet(1, dst, 0);
      send_packet(0, id, 1);
      wait_all(200);
      lat[h] = int'(t_recv[id] - t_sent[id]);
      $display("packet %0d sent %0d received %0d", id, t_sent[id], t_recv[id]);
    end
    $display("latency: 0 hops %0d, 1 hop %0d, 2 hops %0d cycles", lat[0], lat[1], lat[2]);
    for (int h = 1; h < 3; h++)
      check(lat[h] - lat[h-1] >= HOP_MIN && lat[h] - lat[h-1] <= HOP_MAX, "cycles per hop");

    // 3. parity error on an unconnected link of node 0 (port 1, -x)
    @(negedge clk) edge_drv[0][1] = 24'h800000;   // frame start, bad parity
    @(negedge clk) edge_drv[0][1] = '0;
    repeat (4) @(posedge clk);

    // 4. random traffic, processors sometimes not ready
    fork
      begin
        repeat (8000) begin
          @(negedge clk);
          pout_cts = N'($urandom) | N'($urandom);
        end
        pout_cts = '1;
      end
      for (int n = 0; n < N; n++) begin
        automatic int s = n;
        fork
          repeat (150) begin
            automatic int len = 1 + $urandom % 4;
            automatic int id  = new_packet(len, $urandom % N, 0);
            send_packet(s, id, $urandom % NVC);
          end
        join_none
      end
    join
    wait fork;
    wait_all(5000);

    // 5. hot spot into node 3 while its processor refuses
    pout_cts[3] = 1'b0;
    for (int n = 0; n < N; n++) begin
      automatic int s = n;
      fork
        repeat (30) begin
          automatic int id = new_packet(4, 3, 0);
          send_packet(s, id, $urandom % NVC);
        end
      join_none
    end
    repeat (1500) @(posedge clk);
    pout_cts[3] = 1'b1;
    wait fork;
    wait_all(5000);

    // 6. diagnostic input of node 0: one 4-flit packet to node 3
    begin
      automatic int id = new_packet(4, 3, 0);
      jtag_ir(IR_DIAG_IN);
      dr_in = '0;
      for (int k = 0; k < 4; k++) dr_in[0][k*FLIT_W +: FLIT_W] = exp_flit[id][k];
      jtag_dr(4 * FLIT_W);
      sent_flits += 4;
      jtag_ctl(4'b0001, '0);
      repeat (60) @(posedge clk);
      jtag_ctl('0, '0);
      check(dr_out[0][2] == 1'b0, "diagnostic input flag cleared after sending");
      wait_all(500);
      if (t_recv[id] != 0) diag_in_done++;
    end

    // 7. diagnostic output of node 2, twice
    for (int r = 0; r < 2; r++) begin
      automatic int id = new_packet(4, 2, 1);
      send_packet(1, id, 2);
      sent_flits -= 4;
      repeat (80) @(posedge clk);
      jtag_ctl('0, '0);
      check(dr_out[2][3] == 1'b1, "diagnostic output flag set after four flits");
      jtag_ir(IR_DIAG_OUT);
      dr_in = '0;
      jtag_dr(4 * WORD_W);
      for (int k = 0; k < 4; k++)
        check(dr_out[2][k*WORD_W +: FLIT_W] == exp_flit[id][k],
              $sformatf("diagnostic output flit %0d", k));
      jtag_ctl('0, 4'b0100);
      jtag_ctl('0, '0);
      check(dr_out[2][3] == 1'b0, "diagnostic output flag cleared");
      diag_out_done++;
    end

    // mechanism report
    begin
      int a = 0, e = 0, c = 0, nc = 0, b = 0, pc = 0, pe = 0;
      for (int n = 0; n < N; n++) begin
        a += c_adapt[n]; e += c_escape[n]; c += c_conflict[n]; nc += c_nocredit[n];
        b += c_blocked[n]; pc += c_pincts[n]; pe += c_perr[n];
      end
      $display("mechanisms: adaptive vc grants %0d, escape vc grants %0d, arbitration conflicts %0d",
               a, e, c);
      $display("            credit exhausted %0d, head waiting for route %0d, input CTS low %0d",
               nc, b, pc);
      $display("            output CTS stall %0d, parity errors %0d, diag in %0d, diag out %0d",
               c_poutstall, pe, diag_in_done, diag_out_done);
      check(a > 0, "adaptive virtual channels used");
      check(e > 0, "escape virtual channel used");
      check(c > 0, "arbitration conflicts occurred");
      check(nc > 0, "credits ran out");
      check(b > 0, "head flit waited for a route");
      check(pc > 0, "processor input CTS went low");
      check(c_poutstall > 0, "processor output stalled");
      check(pe == 1, "exactly one parity error seen");
      check(diag_in_done == 1, "diagnostic input packet delivered");
      check(diag_out_done == 2, "diagnostic output caught twice");
      $display("flits sent %0d received %0d", sent_flits, recv_flits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
