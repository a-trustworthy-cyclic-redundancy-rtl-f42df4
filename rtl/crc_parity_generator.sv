// crc_parity_generator - encoder of the CRC_ECC unit (E1).
//
// Encodes K = 16 data bits into an N = 23-bit codeword of a systematic cyclic
// code with R = N - K = 7 check bits: check(x) = data(x) * x^R mod g(x), so
// that data(x) * x^R + check(x) is a multiple of g(x). With the default
// g(x) = x^7 + x^3 + 1, which is primitive, the code is a cyclic Hamming code
// shortened to (23,16): every single-bit error has its own nonzero syndrome.
//
// Output layout: parity_out[N-1:K] = check bits (parity_out[N-1] is the x^6
// coefficient), parity_out[K-1:0] = data, i.e. Parity_out[23:17] and
// Parity_out[16:1] in 1-based numbering. The port widths, the block's role and
// the check bits at the top of the word follow the design; the generator
// polynomial is this design's choice. Purely combinational.
module crc_parity_generator
  import gf_crc_pkg::*;
#(
  parameter int unsigned       K  = 16,
  parameter int unsigned       N  = 23,
  parameter logic [N-K-1:0]    G7 = 7'h09
) (
  input  logic [K-1:0] data_in,
  output logic [N-1:0] parity_out
);

  localparam int unsigned R = N - K;

  logic [R-1:0] check_bits;

  always_comb begin
    check_bits = R'(poly_mod(poly_t'(data_in) << R, N, poly_t'(G7), R));
    parity_out = {check_bits, data_in};
  end

endmodule
