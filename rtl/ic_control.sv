// ic_control: the control module of an input controller.
//
// It keeps, for each virtual channel (VC), whether a packet on it has been
// routed and, if so, the output port and output VC it holds until its tail
// flit passes (wormhole routing). Each flit cycle it picks, round robin
// starting after the VC that last won, one VC whose front flit can move:
//   - a head flit whose route computation found a free output VC, or
//   - a body/tail flit of a routed packet whose output VC has a credit,
// and bids for that output with the arbiter. When the arbiter acknowledges
// the bid, it tells the queue which VC to read (pop) and updates the route
// state: a head flit stores its route, a tail flit releases it.
//
// Routes, round-robin selection and reading the queue on ACK follow the
// router description; the bid format and the exact candidate rule are this
// design's choices.
//
// Timing: bid and the combinational ack are evaluated during a flit cycle;
// state changes and the pop happen at the clock edge where fe (end of flit
// cycle) is high.
module ic_control
  import rr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       fe,
  input  logic [NVC-1:0]             empty,
  input  logic [NVC-1:0]             front_head,
  input  logic [NVC-1:0]             front_tail,
  input  route_t [NVC-1:0]           routes,
  input  logic [NPORTS-1:0][NVC-1:0] credit_ok,
  output bid_t                       bid,
  input  logic                       ack,
  output logic                       pop,
  output logic [VC_W-1:0]            pop_vc,
  output logic [VC_W-1:0]            pop_out_vc
);
  logic [NVC-1:0]    routed;
  route_t [NVC-1:0]  held;
  logic [VC_W-1:0]   last;

  logic [NVC-1:0] cand;
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      if (empty[v])           cand[v] = 1'b0;
      else if (front_head[v]) cand[v] = routes[v].valid && !routed[v];
      else                    cand[v] = routed[v] && credit_ok[held[v].port][held[v].vc];
    end
  end

  logic [VC_W-1:0] pick;
  logic            any;
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int k = NVC; k >= 1; k--) begin
      int v;
      v = (int'(last) + k) % NVC;
      if (cand[v]) begin
        pick = VC_W'(v);
        any  = 1'b1;
      end
    end
  end

  route_t sel_route;
  assign sel_route = front_head[pick] ? routes[pick] : held[pick];

  always_comb begin
    bid.valid = any;
    bid.port  = sel_route.port;
    bid.vc    = sel_route.vc;
    bid.head  = front_head[pick];
    bid.tail  = front_tail[pick];
  end

  assign pop        = fe && ack && any;
  assign pop_vc     = pick;
  assign pop_out_vc = sel_route.vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      routed <= '0;
      held   <= '0;
      last   <= VC_W'(NVC - 1);
    end else if (pop) begin
      last <= pick;
      if (bid.tail) routed[pick] <= 1'b0;
      else if (bid.head) begin
        routed[pick] <= 1'b1;
        held[pick]   <= sel_route;
      end
    end
  end

  // A flit may only be acknowledged when it was bid for.
  a_ack_needs_bid: assert property (@(posedge clk) disable iff (!rst_n)
    fe && ack |-> bid.valid);
endmodule
