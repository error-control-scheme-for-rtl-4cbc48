// rs_encoder: systematic RS(N,K) encoder over GF(2^8), as used to build the PI
// (row, RS(182,172)) and PO (column, RS(208,192)) parity of the product code.
//
// The K message symbols, highest degree first, pass straight through while a
// linear-feedback shift register of NP = N-K symbols divides
// m(x)*x^NP by g(x) = prod_{i=0}^{NP-1} (x + alpha^i); the NP remainder symbols are
// then shifted out as parity. The generator coefficients are computed at
// elaboration. Timing: one symbol per cycle in and out with no latency (out_* is
// combinational from the input during the message, from the register during the
// parity); in_ready is low for the NP parity cycles. The generator roots follow
// the DVD format; the streaming interface is this design's choice.
module rs_encoder
  import gf_pkg::*;
#(
  parameter int N = 208,
  parameter int K = 192,
  localparam int NP = N - K,
  localparam int CW = $clog2(N + 1)
)(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  gf_t  in_data,
  output logic out_valid,
  output gf_t  out_data,
  output logic out_last
);

  typedef gf_t gpoly_t [NP+1];

  function automatic gpoly_t gen_poly();
    gpoly_t g;
    for (int i = 0; i <= NP; i++) g[i] = (i == 0) ? 8'h01 : 8'h00;
    for (int i = 0; i < NP; i++) begin
      for (int d = NP; d >= 1; d--) g[d] = g[d-1] ^ gf_mul(g[d], gf_alpha_pow(i));
      g[0] = gf_mul(g[0], gf_alpha_pow(i));
    end
    return g;
  endfunction

  localparam gpoly_t G = gen_poly();

  gf_t           rem [NP];   // rem[NP-1] is the highest-degree remainder term
  logic [CW-1:0] cnt;        // symbols produced in this codeword
  logic          in_par;     // shifting out parity

  gf_t fb;
  assign fb = in_data ^ rem[NP-1];

  assign in_ready  = !in_par;
  assign out_valid = in_par || in_valid;
  assign out_data  = in_par ? rem[NP-1] : in_data;
  assign out_last  = in_par && (cnt == CW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) rem[i] <= '0;
      cnt    <= '0;
      in_par <= 1'b0;
    end else if (in_par) begin
      for (int i = NP - 1; i >= 1; i--) rem[i] <= rem[i-1];
      rem[0] <= '0;
      if (cnt == CW'(N - 1)) begin
        cnt    <= '0;
        in_par <= 1'b0;
      end else cnt <= cnt + 1'b1;
    end else if (in_valid) begin
      for (int i = NP - 1; i >= 1; i--) rem[i] <= rem[i-1] ^ gf_mul(fb, G[i]);
      rem[0] <= gf_mul(fb, G[0]);
      cnt    <= cnt + 1'b1;
      if (cnt == CW'(K - 1)) in_par <= 1'b1;
    end
  end
endmodule
