// crossbar: 6 x 6 switch of 40-bit buses.
//
// Each output selects the input the arbiter connected to it for the current
// flit cycle and carries both 40-bit halves of the flit; an output with no
// connection carries zero. The size (6 x 6, 40 bits) is the router's; a
// multiplexer per output is this design's realisation.
module crossbar
  import rr_pkg::*;
(
  input  logic [NPORTS-1:0][XB_W-1:0]   in,
  input  logic [NPORTS-1:0][PORT_W-1:0] sel,
  input  logic [NPORTS-1:0]             valid,
  output logic [NPORTS-1:0][XB_W-1:0]   out
);
  always_comb
    for (int o = 0; o < NPORTS; o++)
      out[o] = valid[o] && sel[o] < NPORTS ? in[sel[o]] : '0;
endmodule
