// reliable_router: one node of a two-dimensional mesh network of processors.
//
// Six input ports and six output ports meet at a 6 x 6 crossbar: four
// network ports (0: +x, 1: -x, 2: +y, 3: -y), the port of the local
// processor (4) and a diagnostic port reached through JTAG (5). Packets are
// routed wormhole-style, flit by flit, over five virtual channels per link.
// Each input controller queues flits per virtual channel, computes routes
// with an adaptive deadlock-free rule and bids for an output; the arbiter
// grants each output to one input per 50 MHz flit cycle in round-robin order,
// sets up the crossbar and records which output virtual channels are owned.
// Output controllers send 80-bit flits as four 24-bit beats on both edges of
// the 100 MHz clock. The JTAG port sets the node's mesh coordinates and
// loads/reads flits through the diagnostic port.
//
// Clocking: one 100 MHz clock. A flit cycle is two clock cycles; ph is 0 in
// the first and 1 in the second, and all flit-rate state changes at the end
// of the second. Network links must be connected with a small delay (less
// than half a clock period) so that each clock edge samples the beat sent
// in the preceding half period; neighbours share the clock.
//
// The port structure, widths, virtual channel count, queue depth and
// diagnostic flit count are the router's; the routing rule, flit layout,
// link framing and flow-control details are this design's (see the blocks).
module reliable_router
  import rr_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // network links
  input  logic [NNET-1:0][LINK_W-1:0]   link_in,
  output logic [NNET-1:0][LINK_W-1:0]   link_out,
  output logic [NNET-1:0]               link_parity_err,
  // processor port
  input  logic                          pin_valid,
  input  logic [XB_W-1:0]               pin_data,
  output logic [NVC-1:0]                pin_cts,
  output logic                          pout_valid,
  output logic [XB_W-1:0]               pout_data,
  input  logic                          pout_cts,
  // JTAG
  input  logic                          tck,
  input  logic                          trst_n,
  input  logic                          tms,
  input  logic                          tdi,
  output logic                          tdo,
  output logic                          tdo_en
);
  logic ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 1'b0;
    else        ph <= ~ph;

  logic [COORD_W-1:0]               my_x, my_y;
  bid_t [NPORTS-1:0]                bids;
  logic [NPORTS-1:0]                ack, out_grant, xb_valid;
  logic [NPORTS-1:0][VC_W-1:0]      out_grant_vc;
  logic [NPORTS-1:0][PORT_W-1:0]    xb_sel;
  logic [NPORTS-1:0][NVC-1:0]       busy, credit_ok;
  logic [NPORTS-1:0][XB_W-1:0]      xb_in, xb_out;
  logic [NNET-1:0]                  ret_valid;
  logic [NNET-1:0][VC_W-1:0]        ret_vc;

  // ---- network ports -------------------------------------------------
  for (genvar p = 0; p < NNET; p++) begin : g_net
    input_controller u_ic (
      .clk, .rst_n, .ph,
      .link_in(link_in[p]),
      .my_x, .my_y, .busy, .credit_ok,
      .bid(bids[p]), .ack(ack[p]), .xb_out(xb_in[p]),
      .ret_valid(ret_valid[p]), .ret_vc(ret_vc[p]),
      .out_grant(out_grant[p]), .out_grant_vc(out_grant_vc[p]),
      .out_credit_ok(credit_ok[p]),
      .parity_err(link_parity_err[p])
    );
    output_controller u_oc (
      .clk, .ph,
      .xb_in(xb_out[p]), .xb_valid(xb_valid[p]),
      .cred_valid(ret_valid[p]), .cred_vc(ret_vc[p]),
      .link_out(link_out[p])
    );
  end

  // ---- processor port ------------------------------------------------
  proc_port_in u_pin (
    .clk, .rst_n, .ph,
    .pin_valid, .pin_data, .pin_cts,
    .my_x, .my_y, .busy, .credit_ok,
    .bid(bids[P_PROC]), .ack(ack[P_PROC]), .xb_out(xb_in[P_PROC])
  );
  proc_port_out #(.SLOTS(LOCAL_SLOTS)) u_pout (
    .clk, .rst_n, .ph,
    .xb_in(xb_out[P_PROC]), .xb_valid(xb_valid[P_PROC]),
    .grant(out_grant[P_PROC]), .credit_ok(credit_ok[P_PROC]),
    .pout_valid, .pout_data, .pout_cts
  );

  // ---- diagnostic port -----------------------------------------------
  logic [3:0][FLIT_W-1:0] diag_flits;
  logic [3:0][WORD_W-1:0] diag_words;
  logic                   diag_flit_rdy, diag_clear, diag_in_flag, diag_out_flag;
  logic                   d_wr;
  logic [VC_W-1:0]        d_vc;
  logic [FLIT_W-1:0]      d_flit;
  logic [NVC-1:0][$clog2(QDEPTH+1)-1:0] d_count;
  logic                   d_ret_valid;
  logic [VC_W-1:0]        d_ret_vc;

  diag_in_port u_din (
    .clk, .rst_n, .ph,
    .jtag_flits(diag_flits), .jtag_flit_rdy(diag_flit_rdy),
    .q_room(d_count[0] < QDEPTH - 1),
    .wr_en(d_wr), .wr_vc(d_vc), .wr_flit(d_flit),
    .flag(diag_in_flag)
  );
  ic_core u_diag_ic (
    .clk, .rst_n, .ph,
    .wr_en(d_wr), .wr_vc(d_vc), .wr_flit(d_flit),
    .my_x, .my_y, .busy, .credit_ok,
    .bid(bids[P_DIAG]), .ack(ack[P_DIAG]), .xb_out(xb_in[P_DIAG]),
    .ret_valid(d_ret_valid), .ret_vc(d_ret_vc), .q_count(d_count)
  );
  diag_out_port u_dout (
    .clk, .rst_n, .ph,
    .xb_in(xb_out[P_DIAG]), .xb_valid(xb_valid[P_DIAG]),
    .grant(out_grant[P_DIAG]), .credit_ok(credit_ok[P_DIAG]),
    .flits(diag_words), .flag(diag_out_flag), .jtag_clear(diag_clear)
  );

  jtag_port u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo, .tdo_en,
    .node_x(my_x), .node_y(my_y),
    .diag_flits, .diag_flit_rdy, .diag_clear,
    .diag_in_flag, .diag_out_flag, .diag_out_words(diag_words)
  );

  // ---- arbiter and crossbar -------------------------------------------
  arbiter u_arb (
    .clk, .rst_n, .fe(ph),
    .bids, .credit_ok,
    .ack, .out_grant, .out_grant_vc,
    .xb_sel, .xb_valid, .busy
  );
  crossbar u_xbar (
    .in(xb_in), .sel(xb_sel), .valid(xb_valid), .out(xb_out)
  );
endmodule
