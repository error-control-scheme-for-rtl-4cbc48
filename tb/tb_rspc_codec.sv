// tb_rspc_codec: end-to-end test of the RSPC encoder/decoder at full size, with
// the top's default parameters. Each block of random data goes through the
// encoder; the ECC block it produces is corrupted as a disc read would be, with
// the demodulator's error flag on bytes it could detect, and fed to the decoder,
// whose output must be the original data. Blocks:
//   1  rows with up to 5 undetected errors, rows with 10 flagged bytes, rows with
//      6 flagged + 2 undetected errors, and 10 rows with more than 10 flags
//   2  the longest correctable flagged burst, 182*16 + 10*2 = 2932 bytes
//   3  17 fully flagged rows, beyond the outer code: all data must be flagged
// Mechanisms counted (each must occur): inner error decoding, inner erasure
// decoding, inner failure, outer erasure decoding, outer failure, input stall.
`timescale 1ns/1ps
module tb_rspc_codec;
  import rs_tb_pkg::*;
  localparam int NR = 208, KR = 192, NC = 182, KC = 172;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       enc_in_valid = 0, enc_in_ready, enc_out_valid, enc_out_last;
  logic [7:0] enc_in_data = 0, enc_out_data;
  logic       dec_in_valid = 0, dec_in_ready, dec_in_erasure = 0;
  logic [7:0] dec_in_data = 0;
  logic       dec_out_valid, dec_out_ready = 1, dec_out_erasure, dec_out_last, dec_blk_done;
  logic [7:0] dec_out_data, dec_inner_fail_rows, dec_outer_fail_cols;

  rspc_codec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  u8  info [KR][KC];
  u8  blk  [NR][NC];
  bit flg  [NR][NC];
  int m_inner_err = 0, m_inner_era = 0, m_inner_fail = 0, m_outer_era = 0, m_outer_fail = 0, m_stall = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dec_in_valid && !dec_in_ready) m_stall++;
  end

  task automatic encode_block();
    for (int r = 0; r < KR; r++) for (int c = 0; c < KC; c++) info[r][c] = 8'($urandom);
    fork
      begin
        for (int r = 0; r < KR; r++) for (int c = 0; c < KC; c++) begin
          @(negedge clk);
          enc_in_valid = 1; enc_in_data = info[r][c];
          while (!enc_in_ready) @(negedge clk);
        end
        @(negedge clk);
        enc_in_valid = 0;
      end
      begin
        automatic int n = 0;
        automatic bit done = 0;
        while (!done) begin
          @(posedge clk);
          if (enc_out_valid) begin
            blk[n / NC][n % NC] = enc_out_data;
            flg[n / NC][n % NC] = 0;
            if (enc_out_last) done = 1;
            n++;
          end
        end
        check(n == NR * NC, $sformatf("encoder produced %0d bytes", n));
      end
    join
  endtask

  function automatic void hit_row(input int r, input int n, input bit flagged);
    int pos [$];
    for (int c = 0; c < NC; c++) if (!flg[r][c]) pos.push_back(c);
    pos.shuffle();
    for (int i = 0; i < n; i++) begin
      blk[r][pos[i]] ^= 8'($urandom_range(1, 255));
      flg[r][pos[i]] = flagged;
    end
  endfunction

  task automatic decode_block(input string name, input int exp_rows, input bit exp_fail);
    automatic int bad = 0, era = 0, n = 0;
    fork
      begin
        for (int r = 0; r < NR; r++) for (int c = 0; c < NC; c++) begin
          @(negedge clk);
          dec_in_valid = 1; dec_in_data = blk[r][c]; dec_in_erasure = flg[r][c];
          while (!dec_in_ready) @(negedge clk);
        end
        @(negedge clk);
        dec_in_valid = 0;
      end
      begin
        automatic bit done = 0;
        while (!done) begin
          @(posedge clk);
          if (dec_out_valid && dec_out_ready) begin
            if (dec_out_data != info[n / KC][n % KC]) bad++;
            if (dec_out_erasure) era++;
            if (dec_out_last) done = 1;
            n++;
          end
        end
      end
    join
    @(posedge clk);
    check(n == KR * KC, $sformatf("%s: %0d output bytes", name, n));
    check(dec_inner_fail_rows == 8'(exp_rows), $sformatf("%s: %0d failed rows, expected %0d", name, dec_inner_fail_rows, exp_rows));
    if (dec_inner_fail_rows == 8'(exp_rows) && exp_rows > 0) m_inner_fail++;
    if (exp_fail) begin
      check(era == KR * KC && dec_outer_fail_cols == 8'(KC), $sformatf("%s: %0d bytes flagged", name, era));
      if (era == KR * KC) m_outer_fail++;
    end else begin
      check(bad == 0 && era == 0, $sformatf("%s: %0d wrong, %0d flagged", name, bad, era));
      if (bad == 0 && exp_rows > 0) m_outer_era++;
    end
    $display("%s: cycle %0d, failed rows %0d, failed columns %0d, wrong bytes %0d",
             name, cyc, dec_inner_fail_rows, dec_outer_fail_cols, bad);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    encode_block();
    for (int r = 0; r < NR; r++)
      case (r % 4)
        0: begin hit_row(r, $urandom_range(1, 5), 0); m_inner_err++; end
        1: begin hit_row(r, 10, 1); m_inner_era++; end
        2: begin hit_row(r, 6, 1); hit_row(r, 2, 0); m_inner_era++; m_inner_err++; end
        default: if (r < 40) hit_row(r, $urandom_range(11, NC), 1);
      endcase
    decode_block("mixed", 10, 0);

    encode_block();
    for (int i = 50 * NC - 10; i < 50 * NC - 10 + 2932; i++) begin
      blk[i / NC][i % NC] ^= 8'($urandom_range(1, 255));
      flg[i / NC][i % NC] = 1;
    end
    decode_block("burst 2932", 16, 0);

    encode_block();
    for (int r = 150; r < 167; r++) hit_row(r, NC, 1);
    decode_block("17 rows lost", 17, 1);

    check(m_inner_err > 0,  "inner error decoding never exercised");
    check(m_inner_era > 0,  "inner erasure decoding never exercised");
    check(m_inner_fail > 0, "inner failure never exercised");
    check(m_outer_era > 0,  "outer erasure decoding never exercised");
    check(m_outer_fail > 0, "outer failure never exercised");
    check(m_stall > 0,      "input stall never happened");
    $display("mechanisms: inner errors %0d rows, inner erasures %0d rows, inner failure %0d blocks, outer erasure %0d blocks, outer failure %0d blocks, stall %0d cycles",
             m_inner_err, m_inner_era, m_inner_fail, m_outer_era, m_outer_fail, m_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 240000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
