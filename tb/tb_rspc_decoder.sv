// tb_rspc_decoder: end-to-end test of the RSPC decoder at full block size.
//
// Builds complete 208 x 182 ECC blocks with the reference encoder (PO on the
// columns first, then PI on the rows), corrupts them, flags corrupted bytes the
// way the EFMPlus demodulator would, streams them in row by row and compares the
// 192 x 172 output with the original data. Four blocks:
//   A  mixed: rows with <= 5 unflagged errors, rows with 10 flagged erasures,
//      rows with flags + errors, and 6 rows with > 10 flags (inner failure)
//   B  the longest correctable burst, 182*16 + 10*2 = 2932 flagged bytes
//   C  the most correctable errors, 16 fully flagged rows + 10 flagged bytes in
//      each of the other 192 rows = 4832 bytes
//   D  17 fully flagged rows: every column must be reported uncorrectable
// The mechanisms exercised (inner erasure decoding, inner error decoding, inner
// failure handed to the outer code, outer erasure decoding, outer failure,
// input stall) are counted, and one that never happened is a failure.
`timescale 1ns/1ps
module tb_rspc_decoder;
  import rs_tb_pkg::*;

  localparam int NR = 208, KR = 192, NC = 182, KC = 172;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_ready, in_erasure = 0;
  logic [7:0] in_data = 0;
  logic       out_valid, out_ready = 1, out_erasure, out_last, blk_done;
  logic [7:0] out_data;
  logic [7:0] inner_fail_rows;
  logic [7:0] outer_fail_cols;

  rspc_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  u8  info [KR][KC];
  u8  blk  [NR][NC];
  bit flg  [NR][NC];
  int exp_fail_rows;
  bit exp_all_fail;

  // mechanism counters
  int m_inner_erasure = 0, m_inner_errors = 0, m_inner_fail = 0;
  int m_outer_erasure = 0, m_outer_fail = 0, m_stall = 0;

  function automatic void build_block();
    cw_t col, row;
    for (int r = 0; r < KR; r++) for (int c = 0; c < KC; c++) info[r][c] = 8'($urandom);
    for (int c = 0; c < KC; c++) begin
      cw_t m = new[KR];
      for (int r = 0; r < KR; r++) m[r] = info[r][c];
      col = encode(NR, KR, m);
      for (int r = 0; r < NR; r++) blk[r][c] = col[r];
    end
    for (int r = 0; r < NR; r++) begin
      cw_t m = new[KC];
      for (int c = 0; c < KC; c++) m[c] = blk[r][c];
      row = encode(NC, KC, m);
      for (int c = 0; c < NC; c++) blk[r][c] = row[c];
      for (int c = 0; c < NC; c++) flg[r][c] = 0;
    end
  endfunction

  // corrupt n distinct bytes of row r, flagged or not
  function automatic void hit_row(input int r, input int n, input bit flagged);
    int pos [$];
    for (int c = 0; c < NC; c++) if (!flg[r][c]) pos.push_back(c);
    pos.shuffle();
    for (int i = 0; i < n; i++) begin
      blk[r][pos[i]] ^= 8'($urandom_range(1, 255));
      flg[r][pos[i]] = flagged;
    end
  endfunction

  // flag (and corrupt) a run of len bytes starting at linear position start
  function automatic void burst(input int start, input int len);
    for (int i = start; i < start + len; i++) begin
      blk[i / NC][i % NC] ^= 8'($urandom_range(1, 255));
      flg[i / NC][i % NC] = 1;
    end
  endfunction

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (in_valid && !in_ready && dut.phase == dut.P_INNER) m_stall++;
  end

  task automatic send_block();
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        in_valid   = 1;
        in_data    = blk[r][c];
        in_erasure = flg[r][c];
        while (!in_ready) @(negedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic receive_block(input string name);
    int r = 0, c = 0, bad = 0, era = 0;
    bit done = 0;
    while (!done) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (out_data != info[r][c]) bad++;
        if (out_erasure) era++;
        if (out_last) begin
          done = 1;
          check(r == KR - 1 && c == KC - 1, $sformatf("%s: output ended at %0d,%0d", name, r, c));
        end
        if (c == KC - 1) begin c = 0; r++; end else c++;
      end
    end
    @(posedge clk);
    check(inner_fail_rows == 8'(exp_fail_rows),
          $sformatf("%s: %0d failed rows, expected %0d", name, inner_fail_rows, exp_fail_rows));
    if (exp_fail_rows > 0) m_inner_fail++;
    if (exp_all_fail) begin
      check(era == KR * KC, $sformatf("%s: %0d bytes flagged uncorrectable", name, era));
      check(outer_fail_cols == 8'(KC), $sformatf("%s: %0d columns failed", name, outer_fail_cols));
      if (era == KR * KC) m_outer_fail++;
    end else begin
      check(bad == 0, $sformatf("%s: %0d wrong bytes", name, bad));
      check(era == 0 && outer_fail_cols == 0, $sformatf("%s: %0d bytes flagged", name, era));
      if (bad == 0 && exp_fail_rows > 0) m_outer_erasure++;
    end
    $display("%s: done at cycle %0d, failed rows %0d, failed columns %0d, wrong bytes %0d",
             name, cyc, inner_fail_rows, outer_fail_cols, bad);
  endtask

  task automatic run_block(input string name);
    fork
      send_block();
      receive_block(name);
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // A: mixed
    build_block();
    exp_fail_rows = 0; exp_all_fail = 0;
    for (int r = 0; r < NR; r++) begin
      case (r % 8)
        0: begin hit_row(r, $urandom_range(1, 5), 0); m_inner_errors++; end
        1: begin hit_row(r, 10, 1); m_inner_erasure++; end
        2: begin hit_row(r, 6, 1); hit_row(r, 2, 0); m_inner_erasure++; m_inner_errors++; end
        3: if (r < 6 * 8) begin hit_row(r, 11 + $urandom_range(0, 20), 1); exp_fail_rows++; end
        default: ;
      endcase
    end
    run_block("A mixed");

    // B: longest correctable burst
    build_block();
    burst(3 * NC + NC - 10, 10 + 16 * NC + 10);
    exp_fail_rows = 16; exp_all_fail = 0;
    run_block("B burst 2932");

    // C: most correctable errors
    build_block();
    for (int r = 0; r < NR; r++) if (r >= 100 && r < 116) hit_row(r, NC, 1); else hit_row(r, 10, 1);
    exp_fail_rows = 16; exp_all_fail = 0;
    run_block("C 4832 errors");

    // D: beyond the outer code
    build_block();
    for (int r = 20; r < 37; r++) hit_row(r, NC, 1);
    exp_fail_rows = 17; exp_all_fail = 1;
    run_block("D 17 failed rows");

    check(m_inner_errors > 0,  "inner error decoding never exercised");
    check(m_inner_erasure > 0, "inner erasure decoding never exercised");
    check(m_inner_fail > 0,    "inner failure never exercised");
    check(m_outer_erasure > 0, "outer erasure decoding never exercised");
    check(m_outer_fail > 0,    "outer failure never exercised");
    check(m_stall > 0,         "input stall never happened");
    $display("mechanisms: inner errors %0d, inner erasures %0d, inner fail blocks %0d, outer erasure blocks %0d, outer fail blocks %0d, stall cycles %0d",
             m_inner_errors, m_inner_erasure, m_inner_fail, m_outer_erasure, m_outer_fail, m_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 130000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
