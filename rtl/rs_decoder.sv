// rs_decoder: three-stage pipelined errors-and-erasures Reed-Solomon decoder over
// GF(2^8), parameterised for RS(N,K) with NP = N-K parity symbols (defaults: the
// RS(208,192,17) column code; the RS(182,172,11) row code uses N=182, K=172).
//
//   stage 1  rs_syndrome      syndromes, then erasure locator Gamma(x)  N+rho cycles
//   stage 2  rs_keyeq_bm      serial inverse-free BM -> Psi(x), Omega(x) <= 221 cycles
//   stage 3  rs_chien_forney  Chien search + Forney + correction         N+2 cycles
//   rs_fifo                   holds the received symbols until stage 3
//
// Each stage works on a different codeword, so with the stages balanced at about
// N+NP cycles a codeword can enter every N+rho+1 cycles. Input: one symbol per
// accepted cycle (in_valid && in_ready), first symbol = coefficient of x^(N-1),
// with an erasure flag per symbol. in_ready drops while stage 1 expands Gamma or
// waits for stage 2. Output: the N corrected symbols on consecutive cycles with
// out_valid, out_last on the final one, and out_fail (valid with out_last) when
// the codeword could not be decoded: more than NP erasures, rho + 2*errors > NP,
// or a locator whose roots do not all lie in the codeword. The output cannot be
// stalled. The split into three balanced stages, the shared multipliers and the
// buffer follow the decoder architecture; the handshakes are this design's.
module rs_decoder
  import gf_pkg::*;
#(
  parameter int N = 208,
  parameter int K = 192,
  localparam int NP = N - K,
  localparam int CW = $clog2(N + 1),
  localparam int JW = $clog2(NP + 2)
)(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_data,
  input  logic in_erasure,
  output logic out_valid,
  output gf_t  out_data,
  output logic out_last,
  output logic out_fail
);

  // stage 1 -> stage 2
  logic          s1_valid, s1_ready, s1_efail;
  gf_t           s1_syn   [NP];
  gf_t           s1_gamma [NP+1];
  logic [CW-1:0] s1_rho;
  // stage 2 -> stage 3
  logic          s2_valid, s2_ready, s2_fail;
  gf_t           s2_psi   [NP+1];
  gf_t           s2_omega [NP];
  logic [JW-1:0] s2_len;
  // buffer
  logic          buf_rd;
  gf_t           buf_data;
  logic          buf_empty, buf_full;
  logic [$clog2(3*N+1)-1:0] buf_count;

  rs_syndrome #(.N(N), .K(K)) u_s1 (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_erasure,
    .out_valid(s1_valid), .out_ready(s1_ready),
    .out_syn(s1_syn), .out_gamma(s1_gamma), .out_rho(s1_rho), .out_erase_fail(s1_efail)
  );

  rs_keyeq_bm #(.N(N), .K(K)) u_s2 (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ready(s1_ready),
    .in_syn(s1_syn), .in_gamma(s1_gamma), .in_rho(s1_rho), .in_erase_fail(s1_efail),
    .out_valid(s2_valid), .out_ready(s2_ready),
    .out_psi(s2_psi), .out_omega(s2_omega), .out_len(s2_len), .out_fail(s2_fail)
  );

  rs_chien_forney #(.N(N), .K(K)) u_s3 (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_ready(s2_ready),
    .in_psi(s2_psi), .in_omega(s2_omega), .in_len(s2_len), .in_fail(s2_fail),
    .buf_rd, .buf_data,
    .out_valid, .out_data, .out_last, .out_fail
  );

  rs_fifo #(.W(8), .DEPTH(3 * N)) u_buf (
    .clk, .rst_n,
    .wr_en(in_valid && in_ready), .wr_data(in_data),
    .rd_en(buf_rd), .rd_data(buf_data),
    .empty(buf_empty), .full(buf_full), .count(buf_count)
  );

endmodule
