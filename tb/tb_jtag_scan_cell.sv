// tb_jtag_scan_cell: checks one boundary-scan style cell on its own.
//
// How: clockDR and updateDR are driven as pulses. In capture (shift=0) the
// shift flop must take data_in, in shift (shift=1) it must take
// shift_data_in. An updateDR pulse copies the shift flop into the update
// flop, and data_out must show the update flop when mode=1 and data_in when
// mode=0. The reference is a pair of variables updated by the testbench.
`timescale 1ns/1ps
module tb_jtag_scan_cell;
  int checks = 0, failures = 0;
  logic clockDR = 0, updateDR = 0, rst_n = 1, shift = 0, mode = 0;
  logic data_in = 0, shift_data_in = 0, shift_data_out, data_out;
  logic m_sh, m_up;

  jtag_scan_cell dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1;
    m_up = 0;
    mode = 1;
    #1 chk(data_out == 0, "update flop reset");
    // give the shift flop a known value
    shift = 0; data_in = 0;
    #1 clockDR = 1; #1 clockDR = 0;
    m_sh = 0;
    for (int t = 0; t < 4000; t++) begin
      shift         = 1'($urandom);
      data_in       = 1'($urandom);
      shift_data_in = 1'($urandom);
      mode          = 1'($urandom);
      #1;
      chk(data_out == (mode ? m_up : data_in), "data_out mux");
      case ($urandom % 3)
        0: begin
          clockDR = 1; #1 clockDR = 0;
          m_sh = shift ? shift_data_in : data_in;
        end
        1: begin
          updateDR = 1; #1 updateDR = 0;
          m_up = m_sh;
        end
        default: ;
      endcase
      #1;
      chk(shift_data_out == m_sh, "shift flop");
      chk(data_out == (mode ? m_up : data_in), "update flop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
