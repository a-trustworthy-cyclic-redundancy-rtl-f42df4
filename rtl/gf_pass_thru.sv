// gf_pass_thru - the pass-thru module of the finite-field multiplier.
//
// Multiplies an element a of GF(2^M) by an element b of GF(2): every bit of a
// is ANDed with b, so the output is a when b = 1 and zero when b = 0. In the
// multiplier, b is one bit b_i of the second operand and a is alpha^i * A.
//
// Parameter: M field width. Function as the method describes it; purely
// combinational.
module gf_pass_thru #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic         b,
  output logic [M-1:0] y
);

  always_comb y = a & {M{b}};

endmodule
