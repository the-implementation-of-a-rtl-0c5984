// ddr_tx: double-data-rate output retiming of the link wires.
//
// Each wire carries two bits per 100 MHz cycle. On the rising clock edge two
// flip-flops capture the "low" and "high" bit of the cycle. A multiplexer
// whose select is the clock itself puts the low bit on the wire while the
// clock is high and the high bit while it is low. The high bit passes through
// a level-sensitive latch that is open while the clock is low, so the value
// the multiplexer selects in the low phase cannot change during that phase.
// The structure (two flip-flops named I5 and I6, a latch I7, a mux selected by
// clk100) is the one drawn for the router's output controller; the polarity
// of the latch enable is this design's reading of that drawing.
//
// Timing: d_lo/d_hi sampled at a rising edge appear on txd during the next
// clock high phase (d_lo) and the low phase that follows it (d_hi).
// The latch and the clock used as a mux select are intentional: this is the
// drawn circuit, a clock-edge serializer.
module ddr_tx #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic [W-1:0] d_lo,
  input  logic [W-1:0] d_hi,
  output logic [W-1:0] txd
);
  logic [W-1:0] lo_q, hi_q, hi_l;

  always_ff @(posedge clk) begin
    lo_q <= d_lo;
    hi_q <= d_hi;
  end

  always_latch begin
    if (!clk) hi_l = hi_q;
  end

  assign txd = clk ? lo_q : hi_l;
endmodule
