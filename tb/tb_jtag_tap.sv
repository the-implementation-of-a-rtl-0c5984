// tb_jtag_tap: checks the test access port controller against a table of
// the sixteen states of the standard test-port state diagram.
//
// How: a random TMS stream is clocked in on rising TCK edges and after each
// edge the state is compared with a reference next-state table written out
// below. Five TMS ones from any state must reach Test-Logic-Reset, and the
// asynchronous test reset must force that state at once. Timing: TCK period
// 20 ns, TMS changes on the falling edge.
`timescale 1ns/1ps
module tb_jtag_tap;
  import jtag_pkg::*;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state, model;

  jtag_tap dut (.*);

  always #10 tck = ~tck;

  function automatic tap_state_e nxt(tap_state_e s, logic m);
    case (s)
      TEST_LOGIC_RESET: return m ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    return m ? SELECT_DR_SCAN : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   return m ? SELECT_IR_SCAN : CAPTURE_DR;
      CAPTURE_DR:       return m ? EXIT1_DR : SHIFT_DR;
      SHIFT_DR:         return m ? EXIT1_DR : SHIFT_DR;
      EXIT1_DR:         return m ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:         return m ? EXIT2_DR : PAUSE_DR;
      EXIT2_DR:         return m ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:        return m ? SELECT_DR_SCAN : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   return m ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       return m ? EXIT1_IR : SHIFT_IR;
      SHIFT_IR:         return m ? EXIT1_IR : SHIFT_IR;
      EXIT1_IR:         return m ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:         return m ? EXIT2_IR : PAUSE_IR;
      EXIT2_IR:         return m ? UPDATE_IR : SHIFT_IR;
      default:          return m ? SELECT_DR_SCAN : RUN_TEST_IDLE;
    endcase
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s state=%0d model=%0d", $time, what, state, model);
    end
  endtask

  int seen [16];

  initial begin
    #1 trst_n = 0;
    #5 chk(state == TEST_LOGIC_RESET, "async reset");
    trst_n = 1;
    model = TEST_LOGIC_RESET;
    for (int t = 0; t < 5000; t++) begin
      @(negedge tck);
      tms = ($urandom % 3) == 0;
      @(posedge tck); #1;
      model = nxt(model, tms);
      seen[model]++;
      chk(state == model, "next state");
      if (t % 700 == 699) begin
        for (int k = 0; k < 5; k++) begin
          @(negedge tck) tms = 1;
          @(posedge tck);
        end
        #1 chk(state == TEST_LOGIC_RESET, "five ones reset");
        model = TEST_LOGIC_RESET;
      end
    end
    for (int s = 0; s < 16; s++) chk(seen[s] > 0, "every state reached");
    @(negedge tck) tms = 0;
    @(posedge tck); #1;
    trst_n = 0;
    #2 chk(state == TEST_LOGIC_RESET, "async reset in mid-cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
