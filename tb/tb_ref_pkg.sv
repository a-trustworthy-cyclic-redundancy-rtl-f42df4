// tb_ref_pkg - reference models for the testbenches.
//
// Written independently of the RTL: remainders are formed bit-serially, the
// way a shift-register CRC consumes a word from its top bit, and field
// products by Horner's rule (doubling then adding), instead of the alpha
// array the multiplier uses. Polynomials are 128-bit vectors, bit i holding
// the coefficient of x^i; generators are given in full, leading term included.
package tb_ref_pkg;

  typedef logic [127:0] rpoly_t;

  // v(x) mod g(x), v of vw bits, g of degree gd given in full.
  function automatic rpoly_t ref_mod(rpoly_t v, int vw, rpoly_t g_full, int gd);
    rpoly_t r;
    r = '0;
    for (int i = vw - 1; i >= 0; i--) begin
      r = (r << 1) | rpoly_t'(v[i]);
      if (r[gd]) r = r ^ g_full;
    end
    return r;
  endfunction

  // a * b in GF(2^m) with f(x) given in full (degree m).
  function automatic rpoly_t ref_gfmul(rpoly_t a, rpoly_t b, int m, rpoly_t f_full);
    rpoly_t acc;
    acc = '0;
    for (int i = m - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc[m]) acc = acc ^ f_full;
      if (b[i]) acc = acc ^ a;
    end
    return acc;
  endfunction

  // Random 32-bit-limited vector of w bits.
  function automatic rpoly_t rand_bits(int w);
    rpoly_t v;
    for (int i = 0; i < 4; i++) v[32*i +: 32] = $urandom();
    return (w >= 128) ? v : (v & ((rpoly_t'(1) << w) - 1));
  endfunction

  // CRC_ECC words: 23 bits, check bits in [22:16], data in [15:0]. Polynomial
  // order puts the data in the top 16 coefficients; g(x) = x^7 + x^3 + 1.
  function automatic rpoly_t as_poly(logic [22:0] w);
    return rpoly_t'({w[15:0], w[22:16]});
  endfunction

  function automatic logic [6:0] syndrome(logic [22:0] w);
    rpoly_t r;
    r = ref_mod(as_poly(w), 23, 128'h89, 7);
    return r[6:0];
  endfunction

  function automatic logic [22:0] encode(logic [15:0] d);
    rpoly_t r;
    r = ref_mod(rpoly_t'(d) << 7, 23, 128'h89, 7);
    return {r[6:0], d};
  endfunction

endpackage
