// ic_core: the queueing, routing and bidding part of an input controller.
//
// Holds the five virtual-channel queues (flit_fifo), one route computation
// per virtual channel (route_logic), the control module (ic_control) and the
// flit munger. Flits enter through a simple write port, so the same core
// serves a network input (behind a front end), the processor input and the
// diagnostic input. When a flit leaves its queue, the core reports the freed
// slot for one flit cycle on ret_valid/ret_vc, which a network input returns
// to its upstream neighbour as a credit.
//
// Timing: ph is 0 in the first and 1 in the second 100 MHz cycle of a 50 MHz
// flit cycle; 50 MHz state changes at the edge that ends a ph = 1 cycle.
// A flit acknowledged in flit cycle t is on the crossbar in cycle t+1.
module ic_core
  import rr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ph,
  input  logic                       wr_en,
  input  logic [VC_W-1:0]            wr_vc,
  input  logic [FLIT_W-1:0]          wr_flit,
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  input  logic [NPORTS-1:0][NVC-1:0] busy,
  input  logic [NPORTS-1:0][NVC-1:0] credit_ok,
  output bid_t                       bid,
  input  logic                       ack,
  output logic [XB_W-1:0]            xb_out,
  output logic                       ret_valid,
  output logic [VC_W-1:0]            ret_vc,
  output logic [NVC-1:0][$clog2(QDEPTH+1)-1:0] q_count
);
  logic [NVC-1:0][FLIT_W-1:0] front;
  logic [NVC-1:0]             empty;
  logic                       pop;
  logic [VC_W-1:0]            pop_vc, pop_out_vc;
  route_t [NVC-1:0]           routes;
  logic [NVC-1:0]             front_head, front_tail;

  flit_fifo #(.NVC(NVC), .DEPTH(QDEPTH), .W(FLIT_W)) u_fifo (
    .clk, .rst_n,
    .wr_en, .wr_vc, .wr_data(wr_flit),
    .pop, .pop_vc,
    .front, .empty, .count(q_count)
  );

  for (genvar v = 0; v < NVC; v++) begin : g_router
    flit_t f;
    assign f = flit_t'(front[v]);
    assign front_head[v] = f.head;
    assign front_tail[v] = f.tail;
    route_logic u_route (
      .my_x, .my_y,
      .dst_x(f.dst_x), .dst_y(f.dst_y), .to_diag(f.to_diag),
      .busy, .credit_ok,
      .route(routes[v])
    );
  end

  ic_control u_ctrl (
    .clk, .rst_n, .fe(ph),
    .empty, .front_head, .front_tail, .routes, .credit_ok,
    .bid, .ack,
    .pop, .pop_vc, .pop_out_vc
  );

  flit_munger u_munger (
    .clk, .rst_n, .ph,
    .load(pop), .flit(front[pop_vc]), .out_vc(pop_out_vc),
    .xb_out
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ret_valid <= 1'b0;
      ret_vc    <= '0;
    end else if (ph) begin
      ret_valid <= pop;
      ret_vc    <= pop_vc;
    end
  end
endmodule
