// tb_crossbar: random connections and data; each output must carry the
// selected input's bus when valid and zero otherwise.
`timescale 1ns/1ps
module tb_crossbar;
  import rr_pkg::*;
  int checks = 0, failures = 0;
  logic [NPORTS-1:0][XB_W-1:0]   in, out;
  logic [NPORTS-1:0][PORT_W-1:0] sel;
  logic [NPORTS-1:0]             valid;

  crossbar dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NPORTS; i++) begin
        in[i]    = {8'($urandom), 32'($urandom)};
        sel[i]   = PORT_W'($urandom % NPORTS);
        valid[i] = 1'($urandom);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (out[o] != (valid[o] ? in[sel[o]] : '0)) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
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
