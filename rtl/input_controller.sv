// input_controller: one network input port of the router.
//
// A front end recovers flits and returned credits from the 24-bit
// double-data-rate link; the flits go into the virtual-channel queues of an
// ic_core, which routes them and bids for the crossbar. The same controller
// also keeps the free-slot count of the neighbouring router's queues for the
// output link with the same port number (vc_credits): the credits arrive on
// this input link, and the arbiter reports each flit it grants to that output.
//
// The split into front end, FIFO, router, control and flit munger is the
// router's; keeping the neighbour's slot count as credits is this design's.
module input_controller
  import rr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ph,
  input  logic [LINK_W-1:0]          link_in,
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  input  logic [NPORTS-1:0][NVC-1:0] busy,
  input  logic [NPORTS-1:0][NVC-1:0] credit_ok,
  output bid_t                       bid,
  input  logic                       ack,
  output logic [XB_W-1:0]            xb_out,
  output logic                       ret_valid,
  output logic [VC_W-1:0]            ret_vc,
  input  logic                       out_grant,
  input  logic [VC_W-1:0]            out_grant_vc,
  output logic [NVC-1:0]             out_credit_ok,
  output logic                       parity_err
);
  logic              f_valid, c_valid;
  logic [VC_W-1:0]   f_vc, c_vc;
  logic [FLIT_W-1:0] f_flit;
  logic [NVC-1:0][$clog2(QDEPTH+1)-1:0] q_count;

  front_end u_fe (
    .clk, .rst_n, .link_in,
    .flit_valid(f_valid), .flit_vc(f_vc), .flit(f_flit),
    .credit_valid(c_valid), .credit_vc(c_vc),
    .parity_err
  );

  ic_core u_core (
    .clk, .rst_n, .ph,
    .wr_en(f_valid), .wr_vc(f_vc), .wr_flit(f_flit),
    .my_x, .my_y, .busy, .credit_ok,
    .bid, .ack, .xb_out, .ret_valid, .ret_vc, .q_count
  );

  vc_credits #(.SLOTS(QDEPTH)) u_credits (
    .clk, .rst_n,
    .take(ph && out_grant), .take_vc(out_grant_vc),
    .give(c_valid), .give_vc(c_vc),
    .credit_ok(out_credit_ok)
  );
endmodule
