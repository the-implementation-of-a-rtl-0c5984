// route_logic: route computation for the head flit of one virtual channel.
//
// Purely combinational; an input controller holds one copy per virtual
// channel. From the destination in the head flit, the node's own mesh
// position, and the BUSY (owned by a packet) and credit (free downstream
// slot) status of every output virtual channel it picks an output port and
// a virtual channel on it, or reports that no route is free this cycle.
//
// The router description says the algorithm is a deadlock-free adaptive one
// but does not give it. This block uses the common escape-channel scheme:
//   - destination reached: the processor port (or the diagnostic port when the
//     head flit's to_diag bit is set), any free virtual channel there;
//   - otherwise virtual channels 1..4 are adaptive: any free one on any
//     productive direction (x direction tried first, then y);
//   - virtual channel 0 is the escape channel, used only in dimension order
//     (x first, then y), which keeps the network deadlock free.
// An output virtual channel is free when it is not BUSY and has a credit.
module route_logic
  import rr_pkg::*;
(
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  input  logic [COORD_W-1:0]         dst_x,
  input  logic [COORD_W-1:0]         dst_y,
  input  logic                       to_diag,
  input  logic [NPORTS-1:0][NVC-1:0] busy,
  input  logic [NPORTS-1:0][NVC-1:0] credit_ok,
  output route_t                     route
);
  logic [NPORTS-1:0][NVC-1:0] free;
  assign free = ~busy & credit_ok;

  logic [PORT_W-1:0] dx_port, dy_port, local_port;
  logic              need_x, need_y;

  always_comb begin
    need_x     = dst_x != my_x;
    need_y     = dst_y != my_y;
    dx_port    = (dst_x > my_x) ? P_XPOS : P_XNEG;
    dy_port    = (dst_y > my_y) ? P_YPOS : P_YNEG;
    local_port = to_diag ? P_DIAG : P_PROC;
  end

  always_comb begin
    route = '0;
    if (!need_x && !need_y) begin
      for (int v = NVC - 1; v >= 0; v--)
        if (free[local_port][v]) route = '{1'b1, local_port, VC_W'(v)};
    end else begin
      // escape channel in dimension order, lowest preference
      if (need_x) begin
        if (free[dx_port][0]) route = '{1'b1, dx_port, VC_W'(0)};
      end else if (free[dy_port][0]) route = '{1'b1, dy_port, VC_W'(0)};
      // adaptive channels on productive directions, x preferred
      if (need_y)
        for (int v = NVC - 1; v >= 1; v--)
          if (free[dy_port][v]) route = '{1'b1, dy_port, VC_W'(v)};
      if (need_x)
        for (int v = NVC - 1; v >= 1; v--)
          if (free[dx_port][v]) route = '{1'b1, dx_port, VC_W'(v)};
    end
  end
endmodule
