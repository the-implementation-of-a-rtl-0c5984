// diag_in_port: sends four flits loaded through JTAG into the router.
//
// Four 77-bit flits are shifted in through the JTAG port and held in flit
// registers outside this block. When the JTAG user raises jtag_flit_rdy, a
// flag is set; the state machine then sends flit 0, 1, 2 and 3, one per flit
// cycle, into virtual channel 0 of the diagnostic input controller, and
// clears the flag after the last one. It waits in a send state while that
// queue has fewer than two free slots. The flag can be read back through
// JTAG so the user knows when the flits have gone.
//
// As drawn for the router, the state machine is one-hot: one register per
// state (idle, send0..send3). The flit registers, flag and sequential sending
// follow the router's description; the choice of virtual channel 0, the wait
// on a full queue and the two-flop synchroniser for the JTAG-clocked
// jtag_flit_rdy level are this design's. The flag is set on a rising edge of
// jtag_flit_rdy, so the user writes 0 before requesting the next send.
//
// Timing: state advances at the end of a flit cycle (ph high); wr_en pulses
// for one 100 MHz cycle per flit.
module diag_in_port
  import rr_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ph,
  input  logic [3:0][FLIT_W-1:0]       jtag_flits,
  input  logic                         jtag_flit_rdy,
  input  logic                         q_room,
  output logic                         wr_en,
  output logic [VC_W-1:0]              wr_vc,
  output logic [FLIT_W-1:0]            wr_flit,
  output logic                         flag
);
  typedef enum int unsigned {S_IDLE = 0, S_SEND0 = 1, S_SEND1 = 2, S_SEND2 = 3, S_SEND3 = 4} state_e;

  logic [4:0] state;   // one-hot, bit index = state_e
  logic [2:0] rdy_sync;
  logic       rdy_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdy_sync <= '0;
    else        rdy_sync <= {rdy_sync[1:0], jtag_flit_rdy};
  end
  assign rdy_rise = rdy_sync[1] && !rdy_sync[2];

  logic sending;
  logic [1:0] idx;
  always_comb begin
    sending = 1'b0;
    idx     = '0;
    for (int k = 0; k < 4; k++)
      if (state[S_SEND0 + k]) begin
        sending = 1'b1;
        idx     = 2'(k);
      end
  end

  assign wr_en   = ph && sending && q_room;
  assign wr_vc   = '0;
  assign wr_flit = jtag_flits[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= 5'b00001;
      flag  <= 1'b0;
    end else begin
      if (rdy_rise) flag <= 1'b1;
      if (ph) begin
        if (state[S_IDLE] && flag) state <= 5'b00010;
        else if (wr_en) begin
          state <= {state[3:0], 1'b0} | {4'b0, state[S_SEND3]};
          if (state[S_SEND3]) flag <= 1'b0;
        end
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));
endmodule
