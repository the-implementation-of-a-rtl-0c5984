// jtag_pkg: states of the IEEE 1149.1 test access port controller and the
// instruction codes of the router's JTAG port.
//
// The sixteen state names are those of the standard. The 4-bit instruction
// register and the codes are this design's choice; BYPASS is all ones as the
// standard requires.
package jtag_pkg;
  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'd0,
    RUN_TEST_IDLE    = 4'd1,
    SELECT_DR_SCAN   = 4'd2,
    CAPTURE_DR       = 4'd3,
    SHIFT_DR         = 4'd4,
    EXIT1_DR         = 4'd5,
    PAUSE_DR         = 4'd6,
    EXIT2_DR         = 4'd7,
    UPDATE_DR        = 4'd8,
    SELECT_IR_SCAN   = 4'd9,
    CAPTURE_IR       = 4'd10,
    SHIFT_IR         = 4'd11,
    EXIT1_IR         = 4'd12,
    PAUSE_IR         = 4'd13,
    EXIT2_IR         = 4'd14,
    UPDATE_IR        = 4'd15
  } tap_state_e;

  localparam int unsigned IR_W = 4;
  localparam logic [IR_W-1:0] IR_SETUP    = 4'h1;  // node coordinates
  localparam logic [IR_W-1:0] IR_DIAG_IN  = 4'h2;  // four flits to send
  localparam logic [IR_W-1:0] IR_DIAG_CTL = 4'h3;  // flit-ready / clear, flags
  localparam logic [IR_W-1:0] IR_DIAG_OUT = 4'h4;  // four flits received
  localparam logic [IR_W-1:0] IR_BYPASS   = 4'hF;
endpackage
