// output_controller: one network output port of the router.
//
// The crossbar delivers a flit as two 40-bit halves in the two 100 MHz
// cycles of a flit cycle. The output controller cuts each half into two
// 20-bit beats, adds to every beat an even-parity bit and three control bits
// (frame start, flit valid, and a credit for the neighbour's upstream
// queues), and sends the 24-bit beats on both clock edges through ddr_tx,
// 200 Mbit/s per wire. Every flit cycle sends a frame, valid or not, so the
// receiver can always find the frame boundary. The beat layout is described
// in front_end.
//
// The 40-to-24-bit retiming with parity and flow-control bits is the
// router's; the placement of the control bits is this design's.
//
// Timing: the beats of a half are captured by ddr_tx at the end of the cycle
// the half is on the crossbar and are on the wires during the next cycle.
module output_controller
  import rr_pkg::*;
(
  input  logic              clk,
  input  logic              ph,
  input  logic [XB_W-1:0]   xb_in,
  input  logic              xb_valid,
  input  logic              cred_valid,
  input  logic [VC_W-1:0]   cred_vc,
  output logic [LINK_W-1:0] link_out
);
  logic [LINK_W-1:0] b_lo, b_hi;

  function automatic logic [LINK_W-1:0] mk_beat(input logic [2:0] ctl,
                                                input logic [BEAT_D-1:0] d);
    logic [LINK_W-1:0] b;
    b     = {ctl, 1'b0, d};
    b[20] = ^{ctl, d};
    return b;
  endfunction

  always_comb begin
    if (!ph) begin
      b_lo = mk_beat({1'b1, xb_valid, cred_valid}, xb_in[19:0]);
      b_hi = mk_beat({1'b0, cred_vc[1:0]},         xb_in[39:20]);
    end else begin
      b_lo = mk_beat({2'b00, cred_vc[2]},          xb_in[19:0]);
      b_hi = mk_beat(3'b000,                       xb_in[39:20]);
    end
  end

  ddr_tx #(.W(LINK_W)) u_ddr (
    .clk, .d_lo(b_lo), .d_hi(b_hi), .txd(link_out)
  );
endmodule
