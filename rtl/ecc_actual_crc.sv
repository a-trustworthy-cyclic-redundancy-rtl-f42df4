// ecc_actual_crc - syndrome unit of the CRC_ECC unit (actual_CRC, U1).
//
// Adds the error-injection pattern err to the codeword (error_data = codeword
// xor err) and computes the R-bit syndrome alpha of the received word: the
// word is reordered into polynomial form r(x) = data(x) * x^R + check(x) and
// alpha = r(x) mod g(x). alpha is zero for a valid codeword; for a single
// error at polynomial position j it equals x^j mod g(x), a power of the
// generator's root, hence its name.
//
// Layout of codeword, err and error_data as produced by crc_parity_generator:
// check bits in [N-1:K], data in [K-1:0]. Port names follow the design; the
// code itself is this design's choice. Purely combinational.
module ecc_actual_crc
  import gf_crc_pkg::*;
#(
  parameter int unsigned       K  = 16,
  parameter int unsigned       N  = 23,
  parameter logic [N-K-1:0]    G7 = 7'h09
) (
  input  logic [N-1:0]   err,
  input  logic [N-1:0]   codeword,
  output logic [N-K-1:0] alpha,
  output logic [N-1:0]   error_data
);

  localparam int unsigned R = N - K;

  always_comb begin
    error_data = codeword ^ err;
    alpha      = R'(poly_mod(poly_t'({error_data[K-1:0], error_data[N-1:K]}), N, poly_t'(G7), R));
  end

endmodule
