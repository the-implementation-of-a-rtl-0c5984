// jtag_scan_cell: one bit of a boundary or test data register.
//
// A capture/shift flip-flop, clocked by clockDR, loads either the parallel
// input data_in (shift low: capture) or the serial input shift_data_in
// (shift high: shift); its output is the serial output shift_data_out to the
// next cell. An update flip-flop, clocked by updateDR, copies it. The output
// data_out is the updated value when mode is high and data_in otherwise.
// Registers are made by chaining cells. This is the cell drawn for the
// router: two multiplexers and two flip-flops, shifted on a rising clockDR
// and loaded on a rising updateDR. The update flip-flop's reset (rst_n) is
// this design's addition, so the outputs start at zero.
module jtag_scan_cell (
  input  logic clockDR,
  input  logic updateDR,
  input  logic rst_n,
  input  logic shift,
  input  logic mode,
  input  logic data_in,
  input  logic shift_data_in,
  output logic shift_data_out,
  output logic data_out
);
  logic upd_q;

  always_ff @(posedge clockDR)
    shift_data_out <= shift ? shift_data_in : data_in;

  always_ff @(posedge updateDR or negedge rst_n)
    if (!rst_n) upd_q <= 1'b0;
    else        upd_q <= shift_data_out;

  assign data_out = mode ? upd_q : data_in;
endmodule
