// tb_jtag_port: drives the router's test port through its TAP pins only and
// checks each instruction: bypass, the node-coordinate register, loading
// four diagnostic flits, the control/flag register and reading four
// received words.
//
// How: tasks generate TCK (40 ns period), TMS and TDI; TDO is read just
// before each rising TCK edge, so in Shift-DR bit k of a register appears
// at the k-th read. Reference values are random words made by the
// testbench. Checks: after reset the instruction is bypass (one-bit delay
// from TDI to TDO); the instruction register captures 0001; parallel
// outputs change only at Update-DR; capture registers sample the flag and
// word inputs; TDO is enabled only while shifting.
`timescale 1ns/1ps
module tb_jtag_port;
  import rr_pkg::*;
  import jtag_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, tdo_en;
  logic [COORD_W-1:0] node_x, node_y;
  logic [3:0][FLIT_W-1:0] diag_flits;
  logic diag_flit_rdy, diag_clear;
  logic diag_in_flag = 0, diag_out_flag = 0;
  logic [3:0][WORD_W-1:0] diag_out_words = '0;

  jtag_port dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  task automatic pulse(logic tms_v, logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #10;
    tdo_v = tdo;
    tck = 1;
    #20;
    tck = 0;
    #10;
  endtask

  logic [4*WORD_W-1:0] din, dout;
  logic d;

  task automatic ir(logic [IR_W-1:0] ins, output logic [IR_W-1:0] cap);
    pulse(1, 0, d); pulse(1, 0, d); pulse(0, 0, d); pulse(0, 0, d);
    for (int k = 0; k < IR_W; k++) pulse(k == IR_W - 1, ins[k], cap[k]);
    pulse(1, 0, d); pulse(0, 0, d);
  endtask

  // Run-Test/Idle -> Shift-DR, shift len bits, -> Update-DR -> Run-Test/Idle
  task automatic dr(int len, logic check_hold = 0, logic [7:0] hold_val = 0);
    pulse(1, 0, d); pulse(0, 0, d); pulse(0, 0, d);
    for (int k = 0; k < len; k++) begin
      pulse(k == len - 1, din[k], dout[k]);
      chk(tdo_en == (k < len - 1), "tdo enabled while shifting");
      if (check_hold) chk({node_y, node_x} == hold_val, "output held while shifting");
    end
    pulse(1, 0, d); pulse(0, 0, d);
  endtask

  logic [IR_W-1:0] cap;
  logic [7:0] prev_setup;

  initial begin
    #1 trst_n = 0;
    #50 trst_n = 1;
    pulse(0, 0, d);   // to Run-Test/Idle
    // bypass after reset: one-bit register
    din = '0;
    for (int k = 0; k < 64; k++) din[k] = 1'($urandom);
    dr(64);
    chk(dout[0] == 0, "bypass captures 0");
    for (int k = 1; k < 64; k++) chk(dout[k] == din[k-1], "bypass delay");
    chk(tdo_en == 0, "tdo disabled in idle");
    // setup register
    prev_setup = 0;
    for (int r = 0; r < 10; r++) begin
      ir(IR_SETUP, cap);
      chk(cap == 4'b0001, "instruction capture");
      din = '0;
      din[7:0] = 8'($urandom);
      dr(8, 1, prev_setup);
      chk(node_x == din[3:0] && node_y == din[7:4], "node coordinates");
      prev_setup = din[7:0];
    end
    // diagnostic flits
    for (int r = 0; r < 5; r++) begin
      ir(IR_DIAG_IN, cap);
      for (int k = 0; k < 4 * FLIT_W; k++) din[k] = 1'($urandom);
      dr(4 * FLIT_W);
      chk(diag_flits == din[4*FLIT_W-1:0], "diagnostic flits");
      chk(node_x == prev_setup[3:0], "setup untouched by other instructions");
    end
    // control register: write ready/clear, capture flags
    for (int r = 0; r < 12; r++) begin
      ir(IR_DIAG_CTL, cap);
      diag_in_flag  = 1'($urandom);
      diag_out_flag = 1'($urandom);
      din = '0;
      din[1:0] = 2'($urandom);
      dr(4);
      chk(dout[2] == diag_in_flag && dout[3] == diag_out_flag, "flags captured");
      chk(diag_flit_rdy == din[0] && diag_clear == din[1], "control bits");
    end
    // received words
    for (int r = 0; r < 5; r++) begin
      ir(IR_DIAG_OUT, cap);
      for (int k = 0; k < 4; k++)
        diag_out_words[k] = {16'($urandom), 32'($urandom), 32'($urandom)};
      din = '0;
      dr(4 * WORD_W);
      chk(dout == diag_out_words, "received words");
    end
    // five TMS ones return to bypass
    for (int k = 0; k < 5; k++) pulse(1, 0, d);
    pulse(0, 0, d);
    for (int k = 0; k < 16; k++) din[k] = 1'($urandom);
    dr(16);
    for (int k = 1; k < 16; k++) chk(dout[k] == din[k-1], "bypass after test-logic-reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
