// tb_rs_keyeq_bm: stage 2 at RS(208,192). Syndromes and erasure locator are
// computed by the reference model for random errata patterns with
// rho + 2*nu <= 16. Checked independently of the BM recursion: Psi has degree
// L = rho + nu, vanishes at the inverse of every errata locator, and the Forney
// ratio X*Omega(1/X)/Psi'(1/X) gives back every injected error value. An input
// marked as erasure overflow must come out failed. The stage must finish within
// N + (N-K) cycles so that it never slows the pipeline.
`timescale 1ns/1ps
module tb_rs_keyeq_bm;
  import rs_tb_pkg::*;
  localparam int N = 208, K = 192, NP = N - K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_erase_fail = 0, out_valid, out_ready = 0, out_fail;
  logic [7:0] in_syn [NP];
  logic [7:0] in_gamma [NP+1];
  logic [7:0] in_rho = 0;
  logic [7:0] out_psi [NP+1];
  logic [7:0] out_omega [NP];
  logic [4:0] out_len;

  rs_keyeq_bm #(.N(N), .K(K)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, worst = 0;
  always @(posedge clk) cyc++;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (in_syn[i]) in_syn[i] = 0;
    foreach (in_gamma[i]) in_gamma[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 40; c++) begin
      automatic int rho = (c < 17) ? c : $urandom_range(0, NP);
      automatic int nu  = (c < 17) ? (NP - rho) / 2 : $urandom_range(0, (NP - rho) / 2);
      automatic bit efail = (c == 39);
      automatic cw_t err = new[N];
      automatic bit used [N];
      automatic u8 elocs [$], all_locs [$];
      automatic int epos [$];
      automatic cw_t g, psi, omg, psid;
      automatic int t0, lat;
      foreach (err[i]) begin err[i] = 0; used[i] = 0; end
      for (int e = 0; e < rho + nu; e++) begin
        automatic int p;
        do p = $urandom_range(0, N - 1); while (used[p]);
        used[p] = 1;
        err[p] = (e < rho) ? 8'($urandom) : 8'($urandom_range(1, 255));
        if (e < rho) elocs.push_back(ref_exp(N - 1 - p));
        all_locs.push_back(ref_exp(N - 1 - p));
        epos.push_back(p);
      end
      g = locator_poly(elocs, NP);
      for (int i = 0; i < NP; i++) in_syn[i] = syndrome(err, i);
      for (int i = 0; i <= NP; i++) in_gamma[i] = g[i];
      in_rho = 8'(efail ? NP + 1 : rho);
      in_erase_fail = efail;
      @(negedge clk);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      lat = cyc - t0;
      if (lat > worst) worst = lat;
      check(lat <= N + NP, $sformatf("case %0d: %0d cycles", c, lat));
      if (efail) begin
        check(out_fail, "erasure overflow not passed on as failure");
      end else begin
        check(!out_fail, $sformatf("case %0d (rho %0d nu %0d) failed", c, rho, nu));
        check(out_len == 5'(rho + nu), $sformatf("case %0d: L %0d vs %0d", c, out_len, rho + nu));
        psi  = new[NP + 1];
        omg  = new[NP];
        psid = new[NP];
        foreach (psi[i]) psi[i] = out_psi[i];
        foreach (omg[i]) omg[i] = out_omega[i];
        foreach (psid[i]) psid[i] = (i % 2 == 0) ? psi[i + 1] : 8'h00;   // formal derivative
        for (int d = rho + nu + 1; d <= NP; d++) check(psi[d] == 0, $sformatf("case %0d: Psi degree", c));
        foreach (all_locs[l]) begin
          automatic u8 xinv = ref_inv(all_locs[l]);
          automatic u8 y = ref_mul(ref_mul(all_locs[l], poly_eval(omg, xinv)), ref_inv(poly_eval(psid, xinv)));
          check(poly_eval(psi, xinv) == 0, $sformatf("case %0d: locator %0d not a root", c, l));
          check(y == err[epos[l]], $sformatf("case %0d: value %h vs %h", c, y, err[epos[l]]));
        end
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("worst stage-2 time %0d cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40 * 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
