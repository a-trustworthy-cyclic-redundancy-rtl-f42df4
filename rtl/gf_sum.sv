// gf_sum - the sum module of the finite-field multiplier.
//
// Adds two elements of GF(2^M): addition in characteristic two is a bitwise
// XOR, one gate per bit. The sum modules accumulate the pass-thru outputs
// into the product C = A*B.
//
// Parameter: M field width. Function as the method describes it; purely
// combinational.
module gf_sum #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  always_comb y = a ^ b;

endmodule
