// gf_mult: combinational GF(2^8) finite-field multiplier (FFM).
//
// p = a * b over GF(2^8) with p(x) = x^8 + x^4 + x^3 + x^2 + 1. The product is the
// XOR of the shifted partial products of a, each reduced modulo p(x); this is a
// plain array multiplier of this design's choosing, standing in for the modular
// FFM cell the decoder is built from. Purely combinational, no latency.
module gf_mult
  import gf_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);
  always_comb p = gf_mul(a, b);
endmodule
