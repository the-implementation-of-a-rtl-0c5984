// jtag_data_reg: an N-bit JTAG register made of chained scan cells.
//
// Cell N-1 takes TDI and cell 0 drives the serial output, so the register
// shifts towards bit 0 and bit 0 leaves first. All cells share clockDR,
// updateDR, shift and mode; data_in[] is captured in Capture-DR and
// data_out[] shows the updated value when mode is high. A register formed by
// a number of cells in series is how the router builds its test data
// registers.
module jtag_data_reg #(
  parameter int unsigned N = 8
) (
  input  logic         clockDR,
  input  logic         updateDR,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         mode,
  input  logic         tdi,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] data_out,
  output logic         tdo
);
  logic [N:0] chain;   // chain[k+1] feeds cell k
  assign chain[N] = tdi;

  for (genvar k = 0; k < N; k++) begin : g_cell
    jtag_scan_cell u_cell (
      .clockDR, .updateDR, .rst_n, .shift, .mode,
      .data_in(data_in[k]),
      .shift_data_in(chain[k+1]),
      .shift_data_out(chain[k]),
      .data_out(data_out[k])
    );
  end

  assign tdo = chain[0];
endmodule
