// tb_rs_decoder: self-checking test of the three-stage RS decoder at RS(208,192).
//
// Random codewords from the reference encoder get random errors and erasures and
// are fed back to back. With rho + 2*errors <= 16 the decoder must return the
// original codeword without the fail flag; with more than 16 erasures it must
// raise the fail flag. The spacing between accepted codewords is checked against
// the balanced-pipeline bound of N + NP + 2 cycles per codeword.
`timescale 1ns/1ps
module tb_rs_decoder;
  import rs_tb_pkg::*;

  localparam int N  = 208;
  localparam int K  = 192;
  localparam int NP = N - K;
  localparam int NCW = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_erasure, out_valid, out_last, out_fail;
  logic [7:0] in_data, out_data;

  rs_decoder dut (.*);

  int checks = 0, failures = 0;
  cw_t sent_cw [NCW];
  bit  expect_ok [NCW];
  bit  expect_fail [NCW];
  int  n_corrected = 0, n_failed = 0, n_erasure_only = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // stimulus
  int start_cyc [NCW];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    in_valid = 0; in_data = 0; in_erasure = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCW; c++) begin
      automatic cw_t msg = new[K];
      automatic cw_t rx;
      automatic bit era [N];
      automatic int rho, nu, kind;
      foreach (msg[i]) msg[i] = 8'($urandom);
      sent_cw[c] = encode(N, K, msg);
      rx = new[N](sent_cw[c]);
      foreach (era[i]) era[i] = 0;
      kind = c % 6;
      case (kind)
        0: begin rho = 0; nu = (c == 0) ? 0 : 1; end
        1: begin rho = 0; nu = 8; end                       // errors only, full capacity
        2: begin rho = 16; nu = 0; end                      // erasures only, full capacity
        3: begin rho = $urandom_range(0, 14); nu = (NP - rho) / 2; end
        4: begin rho = 17 + $urandom_range(0, 3); nu = 0; end // too many erasures
        default: begin rho = $urandom_range(0, 6); nu = $urandom_range(0, (NP - rho) / 2); end
      endcase
      expect_ok[c]   = (rho + 2 * nu <= NP);
      expect_fail[c] = (rho > NP);
      // distinct positions
      begin
        automatic int pos [$];
        for (int i = 0; i < N; i++) pos.push_back(i);
        pos.shuffle();
        for (int i = 0; i < rho; i++) begin
          era[pos[i]] = 1;
          if ($urandom_range(0, 1)) rx[pos[i]] ^= 8'($urandom_range(1, 255));
        end
        for (int i = rho; i < rho + nu; i++) rx[pos[i]] ^= 8'($urandom_range(1, 255));
      end
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid   = 1;
        in_data    = rx[i];
        in_erasure = era[i];
        while (!in_ready) @(negedge clk);
        if (i == 0) start_cyc[c] = cyc;
      end
      @(negedge clk);
      in_valid = 0;
    end
  end

  // output checking
  int oc = 0, oi = 0;
  bit cw_ok = 1;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (oc < NCW) begin
      if (out_data != sent_cw[oc][oi]) cw_ok = 0;
      if (out_last) begin
        check(oi == N - 1, $sformatf("codeword %0d length %0d", oc, oi + 1));
        if (expect_ok[oc]) begin
          check(cw_ok, $sformatf("codeword %0d not corrected", oc));
          check(!out_fail, $sformatf("codeword %0d flagged failed", oc));
          n_corrected++;
        end
        if (expect_fail[oc]) begin
          check(out_fail, $sformatf("codeword %0d with >NP erasures not flagged", oc));
          n_failed++;
        end
        oc++; oi = 0; cw_ok = 1;
      end else oi++;
    end
  end

  initial begin
    wait (oc == NCW);
    for (int c = 1; c < NCW; c++)
      check(start_cyc[c] - start_cyc[c-1] <= N + NP + 2,
            $sformatf("codeword %0d accepted %0d cycles after previous", c, start_cyc[c] - start_cyc[c-1]));
    check(n_corrected > 0 && n_failed > 0, "both decodable and failing codewords seen");
    $display("decoded %0d, flagged %0d, worst spacing checked against %0d", n_corrected, n_failed, N + NP + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCW * 300 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
