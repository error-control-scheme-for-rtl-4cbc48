// rs_syndrome: stage 1 of the RS errors-and-erasures decoder.
//
// Receives one codeword of N symbols, highest-degree symbol r(N-1) first, one
// symbol per accepted cycle, with a one-bit erasure indicator per symbol. While the
// symbols stream in, the N-K syndromes S_i = R(alpha^i), i = 0..N-K-1, are
// accumulated by Horner's rule (S_i <- S_i*alpha^i + r). Each flagged position p
// is turned into its erasure locator beta = alpha^p and buffered. After the last
// symbol the same bank of N-K multipliers expands the erasure locator polynomial
// Gamma(x) = prod(1 + beta_j x), one erasure per cycle, so the stage takes N + rho
// cycles (rho = number of erasures), N + (N-K) at worst.
//
// More than N-K erasures cannot be decoded: the expansion is skipped and
// out_erase_fail is raised so the caller passes the codeword on as failed.
// out_gamma[0], Gamma's constant term, is always 1; it stays a port so stage 2
// receives the whole polynomial and can start its iterations from it.
// Results are held on the out_* ports with out_valid high until out_ready; no new
// symbol is taken (in_ready low) while Gamma is being expanded or results are held.
// The serial schedule (syndromes, then expansion on shared multipliers) follows the
// decoder architecture; the handshake and the overflow rule are this design's.
module rs_syndrome
  import gf_pkg::*;
#(
  parameter int N = 208,
  parameter int K = 192,
  localparam int NP = N - K,
  localparam int CW = $clog2(N + 1)
)(
  input  logic          clk,
  input  logic          rst_n,
  // symbol input
  input  logic          in_valid,
  output logic          in_ready,
  input  gf_t           in_data,
  input  logic          in_erasure,
  // results to stage 2
  output logic          out_valid,
  input  logic          out_ready,
  output gf_t           out_syn   [NP],
  output gf_t           out_gamma [NP+1],
  output logic [CW-1:0] out_rho,
  output logic          out_erase_fail
);

  typedef enum logic [1:0] {S_RECV, S_EXPAND, S_HOLD} state_e;
  state_e state;

  gf_t           syn   [NP];
  gf_t           gam   [NP+1];
  gf_t           loc   [NP];          // buffered erasure locators
  logic [CW-1:0] sym_cnt;             // symbols received in this codeword
  logic [CW-1:0] rho;                 // erasures seen (saturates at NP+1)
  logic [CW-1:0] exp_cnt;             // erasures already multiplied into Gamma
  gf_t           beta;                // alpha^(position of the current symbol)

  // shared multiplier bank
  gf_t mul_a [NP];
  gf_t mul_b [NP];
  gf_t mul_p [NP];

  localparam gf_t ALPHA_TOP = gf_alpha_pow(N - 1);
  localparam gf_t ALPHA_INV = gf_alpha_pow(254);

  typedef gf_t rvec_t [NP];
  function automatic rvec_t make_roots();
    rvec_t v;
    for (int i = 0; i < NP; i++) v[i] = gf_alpha_pow(i);
    return v;
  endfunction
  localparam rvec_t ROOT = make_roots();   // alpha^i, the generator roots

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      if (state == S_EXPAND) begin
        mul_a[i] = gam[i];             // term beta*Gamma_i feeds Gamma_{i+1}
        mul_b[i] = loc[exp_cnt[$clog2(NP)-1:0]];
      end else begin
        mul_a[i] = (sym_cnt == '0) ? 8'h00 : syn[i];
        mul_b[i] = ROOT[i];
      end
    end
  end

  for (genvar g = 0; g < NP; g++) begin : g_ffm
    gf_mult u_ffm (.a(mul_a[g]), .b(mul_b[g]), .p(mul_p[g]));
  end

  assign in_ready = (state == S_RECV);
  wire   take     = in_valid && in_ready;
  wire   last_sym = (sym_cnt == CW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_RECV;
      sym_cnt <= '0;
      rho     <= '0;
      exp_cnt <= '0;
      beta    <= ALPHA_TOP;
      for (int i = 0; i < NP; i++) begin
        syn[i] <= '0;
        loc[i] <= '0;
      end
      for (int i = 0; i <= NP; i++) gam[i] <= '0;
    end else begin
      case (state)
        S_RECV: if (take) begin
          for (int i = 0; i < NP; i++) syn[i] <= mul_p[i] ^ in_data;
          if (in_erasure) begin
            if (rho < CW'(NP)) loc[rho[$clog2(NP)-1:0]] <= beta;
            if (rho <= CW'(NP)) rho <= rho + 1'b1;
          end
          beta <= gf_mul(beta, ALPHA_INV);
          if (last_sym) begin
            sym_cnt <= '0;
            beta    <= ALPHA_TOP;
            exp_cnt <= '0;
            gam[0]  <= 8'h01;
            for (int i = 1; i <= NP; i++) gam[i] <= '0;
            state   <= S_EXPAND;
          end else begin
            sym_cnt <= sym_cnt + 1'b1;
          end
        end
        S_EXPAND: begin
          // rho is final here; skip the expansion on overflow or when done
          if (rho > CW'(NP) || exp_cnt == rho) begin
            state <= S_HOLD;
          end else begin
            for (int i = 1; i <= NP; i++) gam[i] <= gam[i] ^ mul_p[i-1];
            exp_cnt <= exp_cnt + 1'b1;
          end
        end
        default: if (out_ready) begin
          rho   <= '0;
          state <= S_RECV;
        end
      endcase
    end
  end

  assign out_valid      = (state == S_HOLD);
  assign out_syn        = syn;
  assign out_gamma      = gam;
  assign out_rho        = rho;
  assign out_erase_fail = (rho > CW'(NP));

endmodule
