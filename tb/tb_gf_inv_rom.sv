// tb_gf_inv_rom: checks every entry of the inversion ROM: a * inv(a) = 1 for
// a != 0 (using the reference multiplier) and inv(0) = 0.
`timescale 1ns/1ps
module tb_gf_inv_rom;
  import rs_tb_pkg::*;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;
  gf_inv_rom dut (.addr, .data);
  initial begin
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if ((i == 0 && data != 0) || (i != 0 && ref_mul(addr, data) != 8'h01)) begin
        failures++;
        if (failures < 10) $display("FAIL: inv(%h) = %h", addr, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
