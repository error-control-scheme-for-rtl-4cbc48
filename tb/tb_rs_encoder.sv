// tb_rs_encoder: encodes random messages with the RS(182,172) row code and the
// RS(208,192) column code and compares every output symbol with the reference
// long-division encoder; also checks that the encoder stalls its input for
// exactly N-K cycles per codeword while it emits parity.
`timescale 1ns/1ps
module tb_rs_encoder;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       iv_a = 0, ir_a, ov_a, ol_a, iv_b = 0, ir_b, ov_b, ol_b;
  logic [7:0] id_a = 0, od_a, id_b = 0, od_b;

  rs_encoder #(.N(182), .K(172)) u_pi (.clk, .rst_n, .in_valid(iv_a), .in_ready(ir_a), .in_data(id_a),
                                       .out_valid(ov_a), .out_data(od_a), .out_last(ol_a));
  rs_encoder u_po (.clk, .rst_n, .in_valid(iv_b), .in_ready(ir_b), .in_data(id_b),
                   .out_valid(ov_b), .out_data(od_b), .out_last(ol_b));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n, input int k, input bit which);
    automatic cw_t msg = new[k], cw;
    automatic int o = 0, stall = 0, bad = 0;
    automatic bit last_ok = 0;
    foreach (msg[i]) msg[i] = 8'($urandom);
    cw = encode(n, k, msg);
    while (o < n) begin
      @(negedge clk);
      if (which) begin iv_b = (o < k); id_b = (o < k) ? msg[o] : 8'h00; end
      else       begin iv_a = (o < k); id_a = (o < k) ? msg[o] : 8'h00; end
      #1;
      if ((which ? ov_b : ov_a)) begin
        if ((which ? od_b : od_a) != cw[o]) bad++;
        if ((which ? ol_b : ol_a)) last_ok = (o == n - 1);
        if (!(which ? ir_b : ir_a)) stall++;
        o++;
      end
    end
    @(negedge clk);
    iv_a = 0; iv_b = 0;
    check(bad == 0, $sformatf("RS(%0d,%0d): %0d wrong symbols", n, k, bad));
    check(stall == n - k, $sformatf("RS(%0d,%0d): %0d parity cycles", n, k, stall));
    check(last_ok, $sformatf("RS(%0d,%0d): out_last misplaced", n, k));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6; c++) begin
      run(182, 172, 0);
      run(208, 192, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
