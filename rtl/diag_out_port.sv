// diag_out_port: catches four flits from the network for JTAG readout.
//
// Flits switched to the diagnostic output arrive from the crossbar as two
// 40-bit halves and are stored as 80-bit words (virtual channel and flit) in
// four flit registers, in arrival order. When the fourth has arrived a flag
// is set; the JTAG user reads the flag, shifts the four words out, and then
// raises jtag_clear, which empties the registers and clears the flag. The
// port admits flits only into free registers: it counts free registers, one
// taken per arbiter grant, all four given back on clear, and shows the
// result on credit_ok.
//
// Four flit registers, the flag and JTAG readout follow the router's
// description; the clear handshake, the synchroniser for the JTAG-clocked
// clear level (acted on at its rising edge) and the slot counting are this
// design's.
module diag_out_port
  import rr_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ph,
  input  logic [XB_W-1:0]              xb_in,
  input  logic                         xb_valid,
  input  logic                         grant,
  output logic [NVC-1:0]               credit_ok,
  output logic [3:0][WORD_W-1:0]       flits,
  output logic                         flag,
  input  logic                         jtag_clear
);
  logic [XB_W-1:0] lo_half;
  logic [2:0]      stored, free;
  logic [2:0]      clr_sync;
  logic            clr_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clr_sync <= '0;
    else        clr_sync <= {clr_sync[1:0], jtag_clear};
  end
  assign clr_rise = clr_sync[1] && !clr_sync[2] && flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_half <= '0;
      flits   <= '0;
      stored  <= '0;
      free    <= 3'd4;
      flag    <= 1'b0;
    end else begin
      if (!ph && xb_valid) lo_half <= xb_in;
      if (ph && xb_valid && stored < 3'd4) begin
        flits[stored[1:0]] <= {xb_in, lo_half};
        stored <= stored + 1'b1;
        if (stored == 3'd3) flag <= 1'b1;
      end
      if (ph && grant) free <= free - 1'b1;
      if (clr_rise) begin
        flag   <= 1'b0;
        stored <= '0;
        free   <= 3'd4;
      end
    end
  end

  assign credit_ok = {NVC{free != 0}};
endmodule
