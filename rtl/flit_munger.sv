// flit_munger: puts a flit from the input queue onto the crossbar.
//
// When the control module pops a flit, the munger stores it together with
// the virtual channel chosen for it on the next link (three appended bits),
// an 80-bit word. During the following flit cycle (two 100 MHz cycles) it
// drives the 40-bit crossbar bus with the lower half of the word in the
// first cycle (ph = 0) and the upper half in the second (ph = 1): doubling
// the bit rate halves the crossbar width. The 77-bit input, the 40-bit
// output and the rate doubling are the router's; what the appended bits hold
// is this design's choice.
//
// Timing: loaded at the edge where load is high (end of a flit cycle);
// halves on xb_out in the next two cycles. The bus holds zero when idle.
module flit_munger
  import rr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ph,
  input  logic              load,
  input  logic [FLIT_W-1:0] flit,
  input  logic [VC_W-1:0]   out_vc,
  output logic [XB_W-1:0]   xb_out
);
  logic [WORD_W-1:0] word;
  logic              fe;
  assign fe = ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  word <= '0;
    else if (fe) word <= load ? {out_vc, flit} : '0;
  end

  assign xb_out = ph ? word[WORD_W-1:XB_W] : word[XB_W-1:0];
endmodule
