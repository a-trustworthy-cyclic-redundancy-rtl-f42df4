// gf_alpha - the alpha module of the finite-field multiplier.
//
// Multiplies an element a of GF(2^M), in polynomial basis, by alpha (the root
// of f(x)) and reduces the result modulo f(x): the word is shifted up by one
// and, when the bit shifted out of position M-1 is set, the low terms of f(x)
// are XORed in. The alpha modules form the "alpha array" that produces the
// successive products x^(i) = alpha^i * A.
//
// Parameters: M field width, F_POLY low M coefficients of f(x) (the x^M term
// is implied). The function is the method's; the field size and f(x) defaults
// are this design's choice. Purely combinational.
module gf_alpha #(
  parameter int unsigned    M      = 8,
  parameter logic [M-1:0]   F_POLY = 8'h1B
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  always_comb begin
    y = {a[M-2:0], 1'b0};
    if (a[M-1]) y = y ^ F_POLY;
  end

endmodule
