// crc_pred_alpha - predicted CRC (PCRC) of the alpha module.
//
// Predicts the CRC_W-bit signature ((alpha * a) mod f(x)) mod g(x) from the
// alpha module's input a, without using the alpha module's output. Both
// steps are linear over GF(2), so input bit i contributes a constant column
// col(i) = ((alpha * x^i) mod f) mod g and the prediction is the XOR of the
// columns of the set input bits: a small XOR network fed only by a. A fault
// in the alpha module therefore makes its actual CRC differ from this one.
//
// Parameters: M, F_POLY as in gf_alpha; CRC_W, G_POLY as in crc_actual.
// The column construction is this design's; the method only states that the
// predicted CRC is derived from the module's input. Purely combinational.
module crc_pred_alpha
  import gf_crc_pkg::*;
#(
  parameter int unsigned       M      = 8,
  parameter logic [M-1:0]      F_POLY = 8'h1B,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]     a,
  output logic [CRC_W-1:0] crc
);

  // Column contributed by input bit i (a constant once i is fixed).
  function automatic logic [CRC_W-1:0] column(int unsigned i);
    poly_t prod;
    prod = mul_alpha(poly_t'(1) << i, M, poly_t'(F_POLY));
    return CRC_W'(poly_mod(prod, M, poly_t'(G_POLY), CRC_W));
  endfunction

  always_comb begin
    crc = '0;
    for (int unsigned i = 0; i < M; i++)
      if (a[i]) crc = crc ^ column(i);
  end

endmodule
