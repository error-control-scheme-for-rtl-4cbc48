// tb_rs_syndrome: stage 1 at RS(208,192). Feeds corrupted codewords with erasure
// flags and compares the syndromes, the erasure locator polynomial and the
// erasure count with the reference model; a codeword with 18 flags must raise
// out_erase_fail. Stage latency must be N + rho + 1 cycles from the first
// symbol to out_valid (at most N + (N-K) + 1).
`timescale 1ns/1ps
module tb_rs_syndrome;
  import rs_tb_pkg::*;
  localparam int N = 208, K = 192, NP = N - K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_erasure = 0, out_valid, out_ready = 0, out_erase_fail;
  logic [7:0] in_data = 0;
  logic [7:0] out_syn [NP];
  logic [7:0] out_gamma [NP+1];
  logic [7:0] out_rho;

  rs_syndrome #(.N(N), .K(K)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 12; c++) begin
      automatic cw_t msg = new[K], cw, g;
      automatic bit era [N];
      automatic u8 locs [$];
      automatic int rho = (c == 11) ? 18 : (c == 10 ? NP : $urandom_range(0, NP));
      automatic int t0, lat;
      foreach (msg[i]) msg[i] = 8'($urandom);
      cw = encode(N, K, msg);
      foreach (era[i]) era[i] = 0;
      for (int e = 0; e < rho; e++) begin
        int p;
        do p = $urandom_range(0, N - 1); while (era[p]);
        era[p] = 1;
        cw[p] ^= 8'($urandom);
      end
      if (c % 3 == 0) cw[$urandom_range(0, N - 1)] ^= 8'h5A;   // plus an unflagged error
      for (int i = 0; i < N; i++) if (era[i]) locs.push_back(ref_exp(N - 1 - i));
      g = locator_poly(locs, NP);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1; in_data = cw[i]; in_erasure = era[i];
        while (!in_ready) @(negedge clk);
        if (i == 0) t0 = cyc;
      end
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      lat = cyc - t0;
      check(lat == N + ((rho > NP) ? 0 : rho) + 1, $sformatf("cw %0d: latency %0d with rho %0d", c, lat, rho));
      check(out_rho == 8'((rho > NP) ? NP + 1 : rho), $sformatf("cw %0d: rho %0d vs %0d", c, out_rho, rho));
      check(out_erase_fail == (rho > NP), $sformatf("cw %0d: erase_fail", c));
      for (int i = 0; i < NP; i++)
        check(out_syn[i] == syndrome(cw, i), $sformatf("cw %0d: S%0d %h vs %h", c, i, out_syn[i], syndrome(cw, i)));
      if (rho <= NP)
        for (int i = 0; i <= NP; i++)
          check(out_gamma[i] == g[i], $sformatf("cw %0d: Gamma%0d %h vs %h", c, i, out_gamma[i], g[i]));
      // results must be held until taken
      repeat (3) @(negedge clk);
      check(out_valid && !in_ready, "results not held");
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12 * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
