// proc_port_in: the processor's input into the router network.
//
// The processor writes a flit as two 40-bit halves on consecutive 100 MHz
// cycles (pin_valid high on both): first bits 39:0 of the 80-bit word, then
// bits 79:40, where bits 79:77 name the virtual channel and 76:0 are the
// flit. From there on the port works like a network input controller (an
// ic_core). Flow control uses explicit clear-to-send signals instead of
// credits: pin_cts[v] is high while queue v has at least two free slots,
// and the processor may begin a flit on VC v only while pin_cts[v] is high.
//
// The 40-bit bus and CTS flow control are the router's. The processor here
// runs on the router clock; the router description also allows integer
// fractions of it, which this port does not implement. The half order, the
// per-VC CTS and its two-slot margin are this design's choices.
module proc_port_in
  import rr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ph,
  input  logic                       pin_valid,
  input  logic [XB_W-1:0]            pin_data,
  output logic [NVC-1:0]             pin_cts,
  input  logic [COORD_W-1:0]         my_x,
  input  logic [COORD_W-1:0]         my_y,
  input  logic [NPORTS-1:0][NVC-1:0] busy,
  input  logic [NPORTS-1:0][NVC-1:0] credit_ok,
  output bid_t                       bid,
  input  logic                       ack,
  output logic [XB_W-1:0]            xb_out
);
  logic [XB_W-1:0] half_a;
  logic            have_a;
  logic [WORD_W-1:0] word;
  logic [NVC-1:0][$clog2(QDEPTH+1)-1:0] q_count;
  logic            ret_valid;
  logic [VC_W-1:0] ret_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_a <= 1'b0;
      half_a <= '0;
    end else if (pin_valid) begin
      have_a <= !have_a;
      if (!have_a) half_a <= pin_data;
    end
  end

  assign word = {pin_data, half_a};

  always_comb
    for (int v = 0; v < NVC; v++) pin_cts[v] = q_count[v] < QDEPTH - 1;

  ic_core u_core (
    .clk, .rst_n, .ph,
    .wr_en(pin_valid && have_a), .wr_vc(word[WORD_W-1:FLIT_W]),
    .wr_flit(word[FLIT_W-1:0]),
    .my_x, .my_y, .busy, .credit_ok,
    .bid, .ack, .xb_out, .ret_valid, .ret_vc, .q_count
  );
endmodule
