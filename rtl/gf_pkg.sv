// gf_pkg: GF(2^8) arithmetic shared by the RS/RSPC decoder.
//
// The field is built on the primitive polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1
// (0x11D), the polynomial of the DVD RSPC block, with alpha = 0x02 as primitive
// element. Multiplication is the shift-and-add form of a finite-field multiplier
// (FFM); exponentiation and inversion are built from it, so every table the design
// needs is computed at elaboration time rather than stored as constants.
// The generator roots of both codes are alpha^0 .. alpha^(n-k-1) (first consecutive
// root 0), as in the DVD format; this is a choice of this design.
package gf_pkg;

  typedef logic [7:0] gf_t;

  localparam logic [8:0] GF_POLY = 9'h11D;

  // multiply by alpha (x) once
  function automatic gf_t gf_xtime(input gf_t a);
    return a[7] ? ((a << 1) ^ GF_POLY[7:0]) : (a << 1);
  endfunction

  // full 8x8 multiplication, bit-serial shift-and-add, unrolled
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t acc;
    gf_t sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = gf_xtime(sh);
    end
    return acc;
  endfunction

  // alpha^e, e taken modulo 255
  function automatic gf_t gf_alpha_pow(input int e);
    gf_t r;
    int  m;
    m = e % 255;
    if (m < 0) m = m + 255;
    r = 8'h01;
    for (int i = 0; i < m; i++) r = gf_xtime(r);
    return r;
  endfunction

  // multiplicative inverse (a^254); 0 maps to 0
  function automatic gf_t gf_inv(input gf_t a);
    gf_t r;
    gf_t p;
    r = 8'h01;
    p = a;
    // 254 = 0b11111110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, p);
      p = gf_mul(p, p);
    end
    return (a == 8'h00) ? 8'h00 : r;
  endfunction

endpackage
