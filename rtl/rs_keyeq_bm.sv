// rs_keyeq_bm: stage 2 of the RS decoder, a symbol-serial inverse-free
// Berlekamp-Massey (BM) key-equation solver for errors and erasures.
//
// From the syndromes S_0..S_{NP-1} (NP = N-K) and the erasure locator Gamma(x)
// it produces the errata locator Psi(x) and the errata evaluator
// Omega(x) = S(x)Psi(x) mod x^NP. It works one polynomial coefficient per cycle
// with three finite-field multipliers:
//   1. initial discrepancy Delta_rho = sum_j Gamma_j S_{rho-j}: rho+1 cycles, one
//      multiplier;
//   2. BM iterations q = rho .. NP-1, q+3 cycles each. In cycle j of an iteration
//      coefficient j is updated, Psi_j <- gamma*Psi_j + Delta*B_{j-1}; the new
//      coefficient is registered and in the next cycle multiplied by
//      S_{q+1-j} and accumulated into the discrepancy of the next iteration, so
//      no separate discrepancy pass is needed and no path crosses more than one
//      multiplier. No field inversion is used: the previous nonzero discrepancy gamma
//      scales Psi instead (Psi comes out scaled by a nonzero constant, which
//      cancels in the Forney ratio);
//   3. Omega_i = sum_{j<=i} Psi_j S_{i-j}, i = 0..NP-1, three products per cycle.
// Psi starts as Gamma, L (register length) starts at rho; an iteration with a
// nonzero discrepancy and 2L <= q + rho lengthens the register to L = q+1+rho-L.
// Worst case (rho = 0, NP = 16) is 221 cycles from acceptance to out_valid, within
// the N + NP cycles of the other stages.
//
// out_fail is set when stage 1 reported too many erasures or when
// rho + 2*errors = 2L - rho exceeds NP. Results are held with out_valid high until
// out_ready. The serial, three-multiplier organisation follows the decoder
// architecture; the exact cycle schedule and the Omega phase are this design's.
module rs_keyeq_bm
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
  input  gf_t           in_syn   [NP],
  input  gf_t           in_gamma [NP+1],
  input  logic [CW-1:0] in_rho,         // at most NP+1; upper bits unused
  input  logic          in_erase_fail,
  output logic          out_valid,
  input  logic          out_ready,
  output gf_t           out_psi   [NP+1],
  output gf_t           out_omega [NP],
  output logic [JW-1:0] out_len,
  output logic          out_fail
);

  typedef enum logic [2:0] {B_IDLE, B_DELTA0, B_ITER, B_OMEGA, B_HOLD} state_e;
  state_e state;

  gf_t           syn [NP];
  gf_t           lam [NP+1];          // Psi under construction
  gf_t           bpl [NP+1];          // correction polynomial B(x)
  gf_t           omg [NP];
  gf_t           gam_c;               // previous nonzero discrepancy (gamma)
  gf_t           delta;               // discrepancy of the current iteration
  gf_t           dacc;                // accumulator (next discrepancy / Omega_i)
  gf_t           bprev;               // old B_{j-1}
  gf_t           plam;                // Psi_{j-1} just updated, for the discrepancy
  logic [JW-1:0] len;                 // L
  logic [JW-1:0] rho;
  logic [JW-1:0] q;                   // iteration index / Omega index
  logic [JW-1:0] j;                   // coefficient index
  logic          swap;                // B <- old Psi in this iteration
  logic          efail;

  // three shared finite-field multipliers
  gf_t f0a, f0b, f0p;
  gf_t f1a, f1b, f1p;
  gf_t f2a, f2b, f2p;
  gf_mult u_ffm0 (.a(f0a), .b(f0b), .p(f0p));
  gf_mult u_ffm1 (.a(f1a), .b(f1b), .p(f1p));
  gf_mult u_ffm2 (.a(f2a), .b(f2b), .p(f2p));

  function automatic gf_t syn_at(input gf_t s [NP], input int idx);
    return (idx >= 0 && idx < NP) ? s[idx] : 8'h00;
  endfunction

  function automatic gf_t lam_at(input gf_t l [NP+1], input int idx);
    return (idx >= 0 && idx <= NP) ? l[idx] : 8'h00;
  endfunction

  gf_t lam_new;  // updated coefficient j in an iteration

  always_comb begin
    lam_new = f0p ^ f1p;
    f0a = 8'h00; f0b = 8'h00;
    f1a = 8'h00; f1b = 8'h00;
    f2a = 8'h00; f2b = 8'h00;
    case (state)
      B_DELTA0: begin
        f0a = lam_at(lam, int'(j));
        f0b = syn_at(syn, int'(rho) - int'(j));
      end
      B_ITER: begin
        f0a = gam_c;
        f0b = lam_at(lam, int'(j));
        f1a = delta;
        f1b = bprev;
        f2a = (j == '0) ? 8'h00 : plam;
        f2b = syn_at(syn, int'(q) + 2 - int'(j));
      end
      B_OMEGA: begin
        f0a = lam_at(lam, int'(j));
        f0b = syn_at(syn, int'(q) - int'(j));
        f1a = (int'(j) + 1 <= int'(q)) ? lam_at(lam, int'(j) + 1) : 8'h00;
        f1b = syn_at(syn, int'(q) - int'(j) - 1);
        f2a = (int'(j) + 2 <= int'(q)) ? lam_at(lam, int'(j) + 2) : 8'h00;
        f2b = syn_at(syn, int'(q) - int'(j) - 2);
      end
      default: ;
    endcase
  end

  assign in_ready = (state == B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE;
      for (int i = 0; i < NP; i++) begin
        syn[i] <= '0;
        omg[i] <= '0;
      end
      for (int i = 0; i <= NP; i++) begin
        lam[i] <= '0;
        bpl[i] <= '0;
      end
      gam_c <= 8'h01;
      delta <= '0;
      dacc  <= '0;
      bprev <= '0;
      plam  <= '0;
      len   <= '0;
      rho   <= '0;
      q     <= '0;
      j     <= '0;
      swap  <= 1'b0;
      efail <= 1'b0;
    end else begin
      case (state)
        B_IDLE: if (in_valid) begin
          syn   <= in_syn;
          lam   <= in_gamma;
          bpl   <= in_gamma;
          efail <= in_erase_fail;
          gam_c <= 8'h01;
          dacc  <= '0;
          j     <= '0;
          if (in_erase_fail) begin
            // nothing to solve; hand a failed result on
            for (int i = 0; i <= NP; i++) lam[i] <= (i == 0) ? 8'h01 : 8'h00;
            for (int i = 0; i < NP; i++) omg[i] <= '0;
            len   <= '0;
            state <= B_HOLD;
          end else begin
            rho   <= JW'(in_rho);
            len   <= JW'(in_rho);
            q     <= JW'(in_rho);
            state <= B_DELTA0;
          end
        end

        B_DELTA0: begin
          if (j == rho) begin
            delta <= dacc ^ f0p;
            dacc  <= '0;
            j     <= '0;
            bprev <= '0;
            if (rho == JW'(NP)) begin
              q     <= '0;
              state <= B_OMEGA;
            end else begin
              swap  <= ((dacc ^ f0p) != 8'h00) && ({len, 1'b0} <= {1'b0, q} + {1'b0, rho});
              state <= B_ITER;
            end
          end else begin
            dacc <= dacc ^ f0p;
            j    <= j + 1'b1;
          end
        end

        B_ITER: begin
          // cycles j = 0..q+1 update coefficient j; the product of coefficient
          // j-1 with its syndrome is accumulated one cycle later (j = 1..q+2)
          if (j <= q + 1'b1) begin
            lam[j] <= lam_new;
            bpl[j] <= swap ? lam[j] : bprev;
            bprev  <= bpl[j];
            plam   <= lam_new;
          end
          if (j == q + JW'(2)) begin
            // end of iteration q: commit, prepare iteration q+1
            automatic gf_t      nd   = dacc ^ f2p;
            automatic logic [JW-1:0] nlen = swap ? (q + 1'b1 + rho - len) : len;
            if (swap) gam_c <= delta;
            len   <= nlen;
            delta <= nd;
            dacc  <= '0;
            bprev <= '0;
            j     <= '0;
            if (q == JW'(NP - 1)) begin
              q     <= '0;
              state <= B_OMEGA;
            end else begin
              q     <= q + 1'b1;
              swap  <= (nd != 8'h00) && ({nlen, 1'b0} <= {1'b0, q + 1'b1} + {1'b0, rho});
            end
          end else begin
            dacc <= dacc ^ f2p;
            j    <= j + 1'b1;
          end
        end

        B_OMEGA: begin
          if (int'(j) + 3 > int'(q)) begin
            omg[q[$clog2(NP)-1:0]] <= dacc ^ f0p ^ f1p ^ f2p;
            dacc   <= '0;
            j      <= '0;
            if (q == JW'(NP - 1)) state <= B_HOLD;
            else q <= q + 1'b1;
          end else begin
            dacc <= dacc ^ f0p ^ f1p ^ f2p;
            j    <= j + JW'(3);
          end
        end

        default: if (out_ready) state <= B_IDLE;
      endcase
    end
  end

  assign out_valid = (state == B_HOLD);
  assign out_psi   = lam;
  assign out_omega = omg;
  assign out_len   = len;
  assign out_fail  = efail || ({len, 1'b0} > {1'b0, rho} + (JW+1)'(NP));

endmodule
