// gf_crc_pkg - polynomial arithmetic over GF(2) shared by the CRC-protected
// finite-field multiplier and the CRC_ECC unit.
//
// A polynomial is held in a poly_t vector, bit i being the coefficient of x^i.
// Moduli are passed without their leading term: a generator g(x) of degree d
// is given as its low d coefficients plus the degree d. All functions are
// pure combinational XOR logic once their width and polynomial arguments are
// constants, which is how every module in this design calls them.
//
// The default polynomials are this design's choice (the method leaves both the
// field polynomial f(x) and the CRC-5 generator g(x) open):
//   f(x) = x^8 + x^4 + x^3 + x + 1   byte field of the LUOV reference code
//   g(x) = x^5 + x^2 + 1             primitive CRC-5 (also the USB CRC-5)
//   g(x) = x^5 + x^3 + 1             primitive CRC-5 of EPC Gen2 RFID (alternative)
//   g(x) = x^7 + x^3 + 1             primitive CRC-7 used by the CRC_ECC unit
package gf_crc_pkg;

  localparam int unsigned MAX_W = 128;
  typedef logic [MAX_W-1:0] poly_t;

  // Mask of the low n bits.
  function automatic poly_t low_mask(int unsigned n);
    return (n >= MAX_W) ? '1 : ((poly_t'(1) << n) - poly_t'(1));
  endfunction

  // v(x) mod g(x) for a vw-bit v and a degree-gd generator with low terms g_low.
  // Long division from the top coefficient down.
  function automatic poly_t poly_mod(poly_t v, int unsigned vw, poly_t g_low, int unsigned gd);
    poly_t r;
    r = v & low_mask(vw);
    for (int i = int'(vw) - 1; i >= int'(gd); i--) begin
      if (r[i]) begin
        r[i] = 1'b0;
        r    = r ^ (g_low << (i - int'(gd)));
      end
    end
    return r & low_mask(gd);
  endfunction

  // alpha * a mod f(x) in GF(2^m): shift up by one, fold x^m back with f.
  function automatic poly_t mul_alpha(poly_t a, int unsigned m, poly_t f_low);
    poly_t r;
    r = (a << 1) & low_mask(m);
    if (a[m-1]) r = r ^ (f_low & low_mask(m));
    return r;
  endfunction

endpackage
