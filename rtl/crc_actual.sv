// crc_actual - actual CRC (ACRC) of a module's output.
//
// Computes the CRC_W-bit signature d(x) mod g(x) of an M-bit word, where bit
// i of d is the coefficient of x^i. Each signature bit is the parity of a
// fixed group of output bits, so the word is covered by CRC_W parity groups;
// bit k-1 of the signature is the flag source EF_k. With a generator whose
// period exceeds M (both CRC-5 defaults have period 31), every single- and
// double-bit error in the word changes the signature.
//
// Parameters: M word width, CRC_W generator degree (5, CRC-5 as the method
// specifies), G_POLY low CRC_W coefficients of g(x). The default generator is
// this design's choice. Purely combinational.
module crc_actual
  import gf_crc_pkg::*;
#(
  parameter int unsigned       M      = 8,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]     d,
  output logic [CRC_W-1:0] crc
);

  always_comb begin
    crc = CRC_W'(poly_mod(poly_t'(d), M, poly_t'(G_POLY), CRC_W));
  end

endmodule
