// jtag_port: the router's IEEE 1149.1 serial port for setup and diagnosis.
//
// A TAP controller (jtag_tap) follows TMS. An instruction register, shifted
// through the IR path, selects which data register sits between TDI and TDO
// during the DR path. The clocks of the selected register are derived from
// TCK and the TAP state: clockDR pulses on the rising TCK edges of
// Capture-DR and Shift-DR, updateDR rises at the falling TCK edge in
// Update-DR. The enables for clockDR and the shift select are registered on
// the falling edge of TCK, so they are steady when clockDR rises. TDO changes
// on the falling edge of TCK, as the standard requires.
//
// Data registers (instruction codes in jtag_pkg):
//   SETUP     8 bits  node coordinates: [3:0] x, [7:4] y
//   DIAG_IN   308     four 77-bit flits for the diagnostic input, flit 0 in
//                     bits 76:0; captures zero
//   DIAG_CTL  4       write [0] flit-ready, [1] clear output flag;
//                     capture [0],[1] zero, [2] input-port flag (flits still
//                     being sent), [3] output-port flag (four flits held)
//   DIAG_OUT  320     capture only: the four 80-bit words of the diagnostic
//                     output, word 0 in bits 79:0
//   BYPASS    1
// Test-Logic-Reset selects BYPASS. The register lengths follow from the
// router's four-flit diagnostic ports; codes, the SETUP register and the
// control bits are this design's. The boundary register over the pins is not
// part of this port. The flags are sampled from the router clock domain
// without a synchroniser; the JTAG user reads them again if in doubt.
module jtag_port
  import rr_pkg::*;
  import jtag_pkg::*;
(
  input  logic                       tck,
  input  logic                       trst_n,
  input  logic                       tms,
  input  logic                       tdi,
  output logic                       tdo,
  output logic                       tdo_en,
  output logic [COORD_W-1:0]         node_x,
  output logic [COORD_W-1:0]         node_y,
  output logic [3:0][FLIT_W-1:0]     diag_flits,
  output logic                       diag_flit_rdy,
  output logic                       diag_clear,
  input  logic                       diag_in_flag,
  input  logic                       diag_out_flag,
  input  logic [3:0][WORD_W-1:0]     diag_out_words
);
  localparam int unsigned NREG = 4;   // SETUP, DIAG_IN, DIAG_CTL, DIAG_OUT

  tap_state_e state;
  jtag_tap u_tap (.tck, .trst_n, .tms, .state);

  // ---- instruction register -----------------------------------------
  logic [IR_W-1:0] ir_sh, ir;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) ir_sh <= IR_BYPASS;
    else if (state == CAPTURE_IR) ir_sh <= IR_W'(1);
    else if (state == SHIFT_IR)   ir_sh <= {tdi, ir_sh[IR_W-1:1]};
  end
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) ir <= IR_BYPASS;
    else if (state == TEST_LOGIC_RESET) ir <= IR_BYPASS;
    else if (state == UPDATE_IR)        ir <= ir_sh;
  end

  logic [NREG-1:0] sel;
  assign sel = {ir == IR_DIAG_OUT, ir == IR_DIAG_CTL, ir == IR_DIAG_IN, ir == IR_SETUP};

  // ---- data register clocks --------------------------------------------
  logic [NREG-1:0] clk_en;
  logic            shift_q, rst_regs_n;
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      clk_en  <= '0;
      shift_q <= 1'b0;
    end else begin
      clk_en  <= (state == CAPTURE_DR || state == SHIFT_DR) ? sel : '0;
      shift_q <= state == SHIFT_DR;
    end
  end
  assign rst_regs_n = trst_n;

  logic [NREG-1:0] clockDR, updateDR;
  assign clockDR  = {NREG{tck}} & clk_en;
  assign updateDR = {NREG{~tck && state == UPDATE_DR}} & sel;

  // ---- data registers ---------------------------------------------------
  logic [NREG-1:0] reg_tdo;
  logic [7:0]      setup_q;
  logic [3:0]      ctl_q;
  logic [4*FLIT_W-1:0]  din_q;
  logic [4*WORD_W-1:0]  dout_unused;

  jtag_data_reg #(.N(8)) u_setup (
    .clockDR(clockDR[0]), .updateDR(updateDR[0]), .rst_n(rst_regs_n),
    .shift(shift_q), .mode(1'b1), .tdi, .data_in('0),
    .data_out(setup_q), .tdo(reg_tdo[0]));

  jtag_data_reg #(.N(4*FLIT_W)) u_diag_in (
    .clockDR(clockDR[1]), .updateDR(updateDR[1]), .rst_n(rst_regs_n),
    .shift(shift_q), .mode(1'b1), .tdi, .data_in('0),
    .data_out(din_q), .tdo(reg_tdo[1]));

  jtag_data_reg #(.N(4)) u_diag_ctl (
    .clockDR(clockDR[2]), .updateDR(updateDR[2]), .rst_n(rst_regs_n),
    .shift(shift_q), .mode(1'b1), .tdi,
    .data_in({diag_out_flag, diag_in_flag, 2'b00}),
    .data_out(ctl_q), .tdo(reg_tdo[2]));

  jtag_data_reg #(.N(4*WORD_W)) u_diag_out (
    .clockDR(clockDR[3]), .updateDR(updateDR[3]), .rst_n(rst_regs_n),
    .shift(shift_q), .mode(1'b0), .tdi, .data_in(diag_out_words),
    .data_out(dout_unused), .tdo(reg_tdo[3]));

  logic bypass_q;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                  bypass_q <= 1'b0;
    else if (state == CAPTURE_DR) bypass_q <= 1'b0;
    else if (state == SHIFT_DR)   bypass_q <= tdi;
  end

  assign node_x        = setup_q[3:0];
  assign node_y        = setup_q[7:4];
  assign diag_flits    = din_q;
  assign diag_flit_rdy = ctl_q[0];
  assign diag_clear    = ctl_q[1];

  // ---- output multiplexer --------------------------------------------
  logic tdo_mux;
  always_comb begin
    if (state == SHIFT_IR) tdo_mux = ir_sh[0];
    else begin
      tdo_mux = bypass_q;
      for (int r = 0; r < NREG; r++)
        if (sel[r]) tdo_mux = reg_tdo[r];
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= tdo_mux;
      tdo_en <= state == SHIFT_IR || state == SHIFT_DR;
    end
  end
endmodule
