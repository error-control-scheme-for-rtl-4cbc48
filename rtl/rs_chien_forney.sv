// rs_chien_forney: stage 3 of the RS decoder, Chien search, Forney errata-value
// evaluation and correction.
//
// After accepting Psi(x), Omega(x) and the register length L from stage 2 it walks
// the N codeword positions p = N-1 .. 0 in transmission order, one per cycle. Per
// coefficient k a register holds Psi_k * alpha^(-k*p) (and likewise for Omega); it
// starts at Psi_k * alpha^(-k*(N-1)) and is multiplied by the constant alpha^k each
// cycle, so Psi(alpha^-p), its odd part and Omega(alpha^-p) are plain XOR sums.
// Position p is in error when Psi(alpha^-p) = 0. With first generator root alpha^0
// the Forney value is e_p = alpha^p Omega(alpha^-p) / Psi'(alpha^-p)
//                         = Omega(alpha^-p) / Psi_odd(alpha^-p),
// so the derivative input of the inversion ROM is the odd-coefficient sum.
// The sums, the zero test and the received symbol (read from the delay buffer)
// are registered; the next cycle multiplies Omega by the ROM output, gates the
// product with the registered zero test and adds it to the symbol.
//
// Timing: one cycle to load, then N output symbols on N consecutive cycles one
// cycle after the matching buffer read (N+2 cycles in all). out_last marks the last
// symbol; out_fail, valid with out_last, is set when stage 2 failed or when the
// number of roots found differs from L (roots outside the shortened code). When
// stage 2 failed no correction is applied. The evaluation/ROM/correction order is
// the one of the decoder's correction block; the loading and fail rules are this
// design's.
module rs_chien_forney
  import gf_pkg::*;
#(
  parameter int N = 208,
  parameter int K = 192,
  localparam int NP = N - K,
  localparam int CW = $clog2(N + 1),
  localparam int JW = $clog2(NP + 2)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  gf_t           in_psi   [NP+1],
  input  gf_t           in_omega [NP],
  input  logic [JW-1:0] in_len,
  input  logic          in_fail,
  // delayed received symbols
  output logic          buf_rd,
  input  gf_t           buf_data,
  // corrected output
  output logic          out_valid,
  output gf_t           out_data,
  output logic          out_last,
  output logic          out_fail
);

  // per-coefficient constants: alpha^k (step) and alpha^(-k(N-1)) (start)
  typedef gf_t cvec_t [NP+1];
  function automatic cvec_t make_consts(input bit start);
    cvec_t v;
    for (int k = 0; k <= NP; k++) v[k] = gf_alpha_pow(start ? (-k * (N - 1)) : k);
    return v;
  endfunction
  localparam cvec_t STEP  = make_consts(1'b0);
  localparam cvec_t START = make_consts(1'b1);

  logic          busy;
  logic [CW-1:0] pos;        // symbols read so far
  gf_t           cpsi [NP+1];
  gf_t           comg [NP];
  logic [JW-1:0] len;
  logic          fail_in;
  logic [JW-1:0] roots;

  // evaluation of the current position
  gf_t psi_even, psi_odd, omg_val;
  always_comb begin
    psi_even = '0;
    psi_odd  = '0;
    omg_val  = '0;
    for (int k = 0; k <= NP; k++) begin
      if (k % 2 == 0) psi_even = psi_even ^ cpsi[k];
      else            psi_odd  = psi_odd  ^ cpsi[k];
    end
    for (int k = 0; k < NP; k++) omg_val = omg_val ^ comg[k];
  end

  // pipeline register between evaluation and correction
  logic r_valid, r_last, r_zero;
  gf_t  r_omg, r_dat, r_odd;

  gf_t inv_odd, evalue;
  gf_inv_rom u_inv (.addr(r_odd), .data(inv_odd));
  gf_mult    u_fmul (.a(r_omg), .b(inv_odd), .p(evalue));

  assign in_ready = !busy;
  assign buf_rd   = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      pos     <= '0;
      len     <= '0;
      fail_in <= 1'b0;
      roots   <= '0;
      for (int k = 0; k <= NP; k++) cpsi[k] <= '0;
      for (int k = 0; k < NP; k++) comg[k] <= '0;
      r_valid <= 1'b0;
      r_last  <= 1'b0;
      r_zero  <= 1'b0;
      r_omg   <= '0;
      r_dat   <= '0;
      r_odd   <= '0;
    end else begin
      r_valid <= busy;
      r_last  <= busy && (pos == CW'(N - 1));
      r_zero  <= busy && !fail_in && ((psi_even ^ psi_odd) == 8'h00);
      r_omg   <= omg_val;
      r_odd   <= psi_odd;
      r_dat   <= buf_data;
      if (r_valid && r_zero) roots <= roots + 1'b1;
      if (!busy) begin
        if (in_valid) begin
          busy    <= 1'b1;
          pos     <= '0;
          len     <= in_len;
          fail_in <= in_fail;
          roots   <= '0;
          for (int k = 0; k <= NP; k++) cpsi[k] <= gf_mul(in_psi[k], START[k]);
          for (int k = 0; k < NP; k++) comg[k] <= gf_mul(in_omega[k], START[k]);
        end
      end else begin
        for (int k = 0; k <= NP; k++) cpsi[k] <= gf_mul(cpsi[k], STEP[k]);
        for (int k = 0; k < NP; k++) comg[k] <= gf_mul(comg[k], STEP[k]);
        if (pos == CW'(N - 1)) busy <= 1'b0;
        pos <= pos + 1'b1;
      end
    end
  end

  assign out_valid = r_valid;
  assign out_data  = r_dat ^ (r_zero ? evalue : 8'h00);
  assign out_last  = r_last;
  assign out_fail  = fail_in || (roots + JW'(r_zero) != len);

endmodule
