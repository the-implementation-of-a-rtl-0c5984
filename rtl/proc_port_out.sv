// proc_port_out: the router's output to its processor.
//
// Flits switched to the processor port arrive from the crossbar as two
// 40-bit halves and are kept, as 80-bit words (virtual channel and flit), in
// a small buffer of SLOTS words. While the processor's clear-to-send input
// pout_cts is high, the port hands it the oldest word as two halves on
// consecutive cycles (pout_valid high on both, bits 39:0 first). A word once
// started is always finished. The arbiter is only allowed to send a flit here
// while a buffer slot is free: the port counts its free slots, one taken per
// grant, one given back per word delivered, and shows the result on
// credit_ok for every virtual channel.
//
// The 40-bit bus and CTS flow control are the router's; the buffer and its
// size are this design's choices.
module proc_port_out
  import rr_pkg::*;
#(
  parameter int unsigned SLOTS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ph,
  input  logic [XB_W-1:0]   xb_in,
  input  logic              xb_valid,
  input  logic              grant,
  output logic [NVC-1:0]    credit_ok,
  output logic              pout_valid,
  output logic [XB_W-1:0]   pout_data,
  input  logic              pout_cts
);
  localparam int unsigned AW = $clog2(SLOTS);
  localparam int unsigned CW = $clog2(SLOTS + 1);

  logic [WORD_W-1:0] buf_q [SLOTS];
  logic [XB_W-1:0]   lo_half;
  logic [AW-1:0]     wp, rp;
  logic [CW-1:0]     used, free;
  logic              second;   // sending the upper half
  logic              wr, done;

  assign wr   = ph && xb_valid;
  assign done = second;        // the upper half goes out this cycle

  always_ff @(posedge clk) begin
    if (!ph && xb_valid) lo_half <= xb_in;
    if (wr) buf_q[wp] <= {xb_in, lo_half};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      rp     <= '0;
      used   <= '0;
      free   <= CW'(SLOTS);
      second <= 1'b0;
    end else begin
      if (wr) wp <= wp + 1'b1;
      if (done) rp <= rp + 1'b1;
      used <= used + CW'(wr) - CW'(done);
      free <= free - CW'(ph && grant) + CW'(done);
      if (second)                       second <= 1'b0;
      else if (used != 0 && pout_cts)   second <= 1'b1;
    end
  end

  assign pout_valid = second || (used != 0 && pout_cts);
  assign pout_data  = !pout_valid ? '0 :
                      second ? buf_q[rp][WORD_W-1:XB_W] : buf_q[rp][XB_W-1:0];
  assign credit_ok  = {NVC{free != 0}};
endmodule
