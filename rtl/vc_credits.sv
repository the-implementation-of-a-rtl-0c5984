// vc_credits: free-slot counters for the queues of the adjacent router.
//
// One counter per virtual channel of one output link, starting at the
// neighbour's queue depth. A flit granted to that output on a VC takes a
// slot (at the end of the flit cycle it was granted in); a credit returned
// by the neighbour over the reverse link gives one back. credit_ok[v] is
// high while VC v has a free slot. The router keeps this count in the
// control logic of its input controllers; counting credits is this design's
// way of keeping it.
module vc_credits
  import rr_pkg::*;
#(
  parameter int unsigned SLOTS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            take,
  input  logic [VC_W-1:0] take_vc,
  input  logic            give,
  input  logic [VC_W-1:0] give_vc,
  output logic [NVC-1:0]  credit_ok
);
  localparam int unsigned CW = $clog2(SLOTS + 1);
  logic [NVC-1:0][CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) cnt[v] <= CW'(SLOTS);
    end else begin
      for (int v = 0; v < NVC; v++) begin
        logic t, g;
        t = take && take_vc == v && cnt[v] != 0;
        g = give && give_vc == v && cnt[v] != CW'(SLOTS);
        if (t && !g)      cnt[v] <= cnt[v] - 1'b1;
        else if (g && !t) cnt[v] <= cnt[v] + 1'b1;
      end
    end
  end

  always_comb
    for (int v = 0; v < NVC; v++) credit_ok[v] = cnt[v] != 0;
endmodule
