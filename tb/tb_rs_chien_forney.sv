// tb_rs_chien_forney: stage 3 at RS(208,192). The testbench builds Psi(x) (times a
// random nonzero scale, as the inverse-free BM delivers it) and
// Omega(x) = S(x)Psi(x) mod x^16 from the errata of a corrupted codeword, serves
// the corrupted symbols as the delay buffer, and checks that the N symbols come
// out corrected, on consecutive cycles, two cycles after the first buffer read,
// without the fail flag. A locator with a root outside the 208 positions must
// be flagged, and an input marked failed must pass the data unchanged.
`timescale 1ns/1ps
module tb_rs_chien_forney;
  import rs_tb_pkg::*;
  localparam int N = 208, K = 192, NP = N - K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_fail = 0, buf_rd, out_valid, out_last, out_fail;
  logic [7:0] in_psi [NP+1];
  logic [7:0] in_omega [NP];
  logic [4:0] in_len = 0;
  logic [7:0] buf_data, out_data;

  rs_chien_forney #(.N(N), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  cw_t rx;
  int  rd_idx = 0;
  assign buf_data = (rd_idx < N) ? rx[rd_idx] : 8'h00;
  always @(posedge clk) if (buf_rd) rd_idx <= rd_idx + 1;

  initial begin
    foreach (in_psi[i]) in_psi[i] = 0;
    foreach (in_omega[i]) in_omega[i] = 0;
    rx = new[N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20; c++) begin
      automatic int mode = (c == 18) ? 1 : (c == 19 ? 2 : 0);  // 1: bad root, 2: failed input
      automatic int nerr = (c < 17) ? c : 5;
      automatic cw_t msg = new[K], cw, psi, sx;
      automatic bit used [N];
      automatic u8 locs [$];
      automatic u8 scale = 8'($urandom_range(1, 255));
      automatic int first_rd = -1, first_out = -1, nout = 0, cyc = 0, bad = 0;
      automatic bit fail_seen = 0, contiguous = 1;
      foreach (msg[i]) msg[i] = 8'($urandom);
      cw = encode(N, K, msg);
      rx = new[N](cw);
      foreach (used[i]) used[i] = 0;
      for (int e = 0; e < nerr; e++) begin
        automatic int p;
        do p = $urandom_range(0, N - 1); while (used[p]);
        used[p] = 1;
        rx[p] ^= 8'($urandom_range(1, 255));
        locs.push_back(ref_exp(N - 1 - p));
      end
      if (mode == 1) locs.push_back(ref_exp(230));   // position outside the shortened code
      psi = locator_poly(locs, NP);
      sx  = new[NP];
      foreach (sx[i]) sx[i] = syndrome(rx, i);
      for (int i = 0; i <= NP; i++) in_psi[i] = ref_mul(psi[i], scale);
      for (int i = 0; i < NP; i++) begin
        automatic u8 acc = 0;
        for (int j = 0; j <= i; j++) acc ^= ref_mul(sx[i - j], in_psi[j]);
        in_omega[i] = acc;
      end
      in_len  = 5'(locs.size());
      in_fail = (mode == 2);
      rd_idx  = 0;
      @(negedge clk);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      // collect N outputs
      while (nout < N) begin
        @(posedge clk);
        cyc++;
        if (buf_rd && first_rd < 0) first_rd = cyc;
        if (out_valid) begin
          if (first_out < 0) first_out = cyc;
          else if (cyc != first_out + nout) contiguous = 0;
          if (out_data != ((mode == 2) ? rx[nout] : cw[nout])) bad++;
          if (out_last) begin
            fail_seen = out_fail;
            check(nout == N - 1, $sformatf("case %0d: last at %0d", c, nout));
          end
          nout++;
        end
      end
      check(contiguous, $sformatf("case %0d: gaps in output", c));
      check(first_out - first_rd == 1, $sformatf("case %0d: latency %0d", c, first_out - first_rd));
      if (mode == 0) begin
        check(bad == 0, $sformatf("case %0d (%0d errors): %0d wrong symbols", c, nerr, bad));
        check(!fail_seen, $sformatf("case %0d: flagged", c));
      end else if (mode == 1) begin
        check(fail_seen, "root outside the code not flagged");
      end else begin
        check(bad == 0, "failed input was modified");
        check(fail_seen, "failed input not flagged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20 * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
