// tb_gf_mult: exhaustive check of the GF(2^8) multiplier against the
// log/antilog reference model (all 65536 operand pairs).
`timescale 1ns/1ps
module tb_gf_mult;
  import rs_tb_pkg::*;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;
  gf_mult dut (.a, .b, .p);
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p != ref_mul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL: %h * %h = %h, expected %h", a, b, p, ref_mul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
