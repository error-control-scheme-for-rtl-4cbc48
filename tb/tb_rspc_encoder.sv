// tb_rspc_encoder: encodes two random 192 x 172 data blocks and compares the
// 208 x 182 output block with the reference (PO on every column, then PI on
// every row); also checks the block length and that every row and column of
// the result is a codeword (all syndromes zero).
`timescale 1ns/1ps
module tb_rspc_encoder;
  import rs_tb_pkg::*;
  localparam int NR = 208, KR = 192, NC = 182, KC = 172;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_last;
  logic [7:0] in_data = 0, out_data;

  rspc_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  u8 info [KR][KC];
  u8 ref_blk [NR][NC];
  u8 got [NR][NC];

  task automatic one_block(input int b);
    automatic int n = 0, bad = 0, nz = 0;
    for (int r = 0; r < KR; r++) for (int c = 0; c < KC; c++) info[r][c] = 8'($urandom);
    for (int c = 0; c < KC; c++) begin
      automatic cw_t m = new[KR], col;
      for (int r = 0; r < KR; r++) m[r] = info[r][c];
      col = encode(NR, KR, m);
      for (int r = 0; r < NR; r++) ref_blk[r][c] = col[r];
    end
    for (int r = 0; r < NR; r++) begin
      automatic cw_t m = new[KC], row;
      for (int c = 0; c < KC; c++) m[c] = ref_blk[r][c];
      row = encode(NC, KC, m);
      for (int c = 0; c < NC; c++) ref_blk[r][c] = row[c];
    end
    fork
      begin
        for (int r = 0; r < KR; r++) for (int c = 0; c < KC; c++) begin
          @(negedge clk);
          in_valid = 1; in_data = info[r][c];
          while (!in_ready) @(negedge clk);
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        automatic bit done = 0;
        while (!done) begin
          @(posedge clk);
          if (out_valid) begin
            if (n < NR * NC) got[n / NC][n % NC] = out_data;
            if (out_last) done = 1;
            n++;
          end
        end
      end
    join
    check(n == NR * NC, $sformatf("block %0d: %0d bytes", b, n));
    for (int r = 0; r < NR; r++) for (int c = 0; c < NC; c++) if (got[r][c] != ref_blk[r][c]) bad++;
    check(bad == 0, $sformatf("block %0d: %0d bytes differ", b, bad));
    for (int c = 0; c < NC; c++) begin
      automatic cw_t col = new[NR];
      for (int r = 0; r < NR; r++) col[r] = got[r][c];
      for (int i = 0; i < NR - KR; i++) if (syndrome(col, i) != 0) nz++;
    end
    check(nz == 0, $sformatf("block %0d: %0d nonzero column syndromes", b, nz));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one_block(0);
    one_block(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2 * 120000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
