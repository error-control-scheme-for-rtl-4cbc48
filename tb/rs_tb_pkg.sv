// rs_tb_pkg: reference arithmetic for the RS/RSPC testbenches.
//
// An independent GF(2^8) model (p(x) = x^8+x^4+x^3+x^2+1) built on log/antilog
// tables, and a systematic RS encoder by long division with
// g(x) = prod_{i=0}^{n-k-1} (x + alpha^i). Codewords are byte arrays in
// transmission order: element 0 is the coefficient of x^(n-1).
package rs_tb_pkg;

  typedef bit [7:0] u8;
  typedef u8 cw_t [];

  u8  exp_tab [512];
  int log_tab [256];
  bit tab_ready = 0;

  function automatic void build_tables();
    u8 r = 8'h01;
    for (int e = 0; e < 512; e++) begin
      exp_tab[e] = r;
      if (e < 255) log_tab[r] = e;
      r = r[7] ? ((r << 1) ^ 8'h1D) : (r << 1);
    end
    log_tab[0] = -1;
    tab_ready = 1;
  endfunction

  function automatic u8 ref_exp(input int e);
    int m = e % 255;
    if (!tab_ready) build_tables();
    if (m < 0) m += 255;
    return exp_tab[m];
  endfunction

  function automatic int ref_log(input u8 a);
    if (!tab_ready) build_tables();
    return log_tab[a];
  endfunction

  // multiplication through logarithms
  function automatic u8 ref_mul(input u8 a, input u8 b);
    if (a == 0 || b == 0) return 8'h00;
    return ref_exp(ref_log(a) + ref_log(b));
  endfunction

  // generator polynomial, g[0] = coefficient of x^0, monic of degree np
  function automatic cw_t gen_poly(input int np);
    cw_t g = new[np + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int i = 0; i < np; i++) begin
      u8 root = ref_exp(i);
      for (int d = i + 1; d >= 1; d--) g[d] = g[d-1] ^ ref_mul(g[d], root);
      g[0] = ref_mul(g[0], root);
    end
    return g;
  endfunction

  // systematic encoding: msg[0] is the highest-degree message symbol
  function automatic cw_t encode(input int n, input int k, input cw_t msg);
    int   np  = n - k;
    cw_t  g   = gen_poly(np);
    cw_t  rem = new[np];
    cw_t  cw  = new[n];
    foreach (rem[i]) rem[i] = 0;
    for (int i = 0; i < k; i++) begin
      u8 fb = msg[i] ^ rem[np-1];
      for (int d = np - 1; d >= 1; d--) rem[d] = rem[d-1] ^ ref_mul(fb, g[d]);
      rem[0] = ref_mul(fb, g[0]);
    end
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int i = 0; i < np; i++) cw[k + i] = rem[np - 1 - i];
    return cw;
  endfunction

  // syndrome S_i = R(alpha^i), for checking codewords
  function automatic u8 syndrome(input cw_t r, input int i);
    u8 s = 0;
    foreach (r[j]) s = ref_mul(s, ref_exp(i)) ^ r[j];
    return s;
  endfunction

  function automatic u8 ref_inv(input u8 a);
    if (a == 0) return 8'h00;
    return ref_exp(255 - ref_log(a));
  endfunction

  // evaluate a polynomial stored lowest degree first
  function automatic u8 poly_eval(input cw_t p, input u8 x);
    u8 acc = 0;
    for (int i = p.size() - 1; i >= 0; i--) acc = ref_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // prod (1 + X_l x) over the given locators, lowest degree first, size np+1
  function automatic cw_t locator_poly(input u8 locs [$], input int np);
    cw_t g = new[np + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    foreach (locs[l])
      for (int d = np; d >= 1; d--) g[d] = g[d] ^ ref_mul(locs[l], g[d-1]);
    return g;
  endfunction

endpackage
