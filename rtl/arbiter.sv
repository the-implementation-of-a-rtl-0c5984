// arbiter: decides which input wins each output port, one flit per output
// per flit cycle.
//
// Every input controller presents one bid (output port, output virtual
// channel, head/tail marks). For each output the arbiter considers the bids
// aimed at it whose output virtual channel has a free downstream slot and,
// for a head flit, is not BUSY. Priority among the six inputs is a one-hot
// token in a shift register per output: the input holding the token is
// served first, then the following ones in order, and the token shifts by
// one place every time that output grants a flit, so every input is first in
// line once in any six grants and gets at least a sixth of the output.
// The winner receives ACK; the crossbar connection for the next flit cycle
// is registered. The arbiter also keeps the BUSY bit of the 30 output
// virtual channels (5 per output): set when a head flit is granted, cleared
// when the tail flit is granted. BUSY is broadcast to the route logic.
//
// Round-robin shift-register priority, ACK bus, crossbar setup and BUSY
// record follow the router description; the exact bid checks are this
// design's.
//
// Timing: ack, out_grant and out_grant_vc are combinational in the flit
// cycle; xb_sel/xb_valid (the connection the flit uses in the next flit
// cycle), busy and the priorities change at the edge where fe is high.
module arbiter
  import rr_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fe,
  input  bid_t [NPORTS-1:0]            bids,
  input  logic [NPORTS-1:0][NVC-1:0]   credit_ok,
  output logic [NPORTS-1:0]            ack,
  output logic [NPORTS-1:0]            out_grant,
  output logic [NPORTS-1:0][VC_W-1:0]  out_grant_vc,
  output logic [NPORTS-1:0][PORT_W-1:0] xb_sel,
  output logic [NPORTS-1:0]            xb_valid,
  output logic [NPORTS-1:0][NVC-1:0]   busy
);
  logic [NPORTS-1:0][NPORTS-1:0] prio;   // [output] one-hot token over inputs
  logic [NPORTS-1:0][NPORTS-1:0] grant;  // [output][input]
  logic [NPORTS-1:0][PORT_W-1:0] win;

  always_comb begin
    ack          = '0;
    grant        = '0;
    win          = '0;
    out_grant    = '0;
    out_grant_vc = '0;
    for (int o = 0; o < NPORTS; o++) begin
      logic [NPORTS-1:0] req;
      int start;
      start = 0;
      for (int i = 0; i < NPORTS; i++) begin
        req[i] = bids[i].valid && bids[i].port == o &&
                 credit_ok[o][bids[i].vc] &&
                 !(bids[i].head && busy[o][bids[i].vc]);
        if (prio[o][i]) start = i;
      end
      for (int k = NPORTS - 1; k >= 0; k--) begin
        int i;
        i = (start + k) % NPORTS;
        if (req[i]) begin
          grant[o]  = '0;
          grant[o][i] = 1'b1;
          win[o]    = PORT_W'(i);
        end
      end
      if (grant[o] != '0) begin
        out_grant[o]    = 1'b1;
        out_grant_vc[o] = bids[win[o]].vc;
      end
      ack |= grant[o];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) prio[o] <= NPORTS'(1);
      xb_sel   <= '0;
      xb_valid <= '0;
      busy     <= '0;
    end else if (fe) begin
      for (int o = 0; o < NPORTS; o++) begin
        xb_valid[o] <= out_grant[o];
        xb_sel[o]   <= win[o];
        if (out_grant[o]) begin
          prio[o] <= {prio[o][NPORTS-2:0], prio[o][NPORTS-1]};
          if (bids[win[o]].tail)      busy[o][bids[win[o]].vc] <= 1'b0;
          else if (bids[win[o]].head) busy[o][bids[win[o]].vc] <= 1'b1;
        end
      end
    end
  end

  // Only a valid bid can be acknowledged.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n)
      ack[i] |-> bids[i].valid);
  end
endmodule
