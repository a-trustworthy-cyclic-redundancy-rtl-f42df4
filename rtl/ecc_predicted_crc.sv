// ecc_predicted_crc - prediction and correction unit of CRC_ECC (predicted_CRC, U2).
//
// Knowing the injected pattern err_in, this unit predicts the syndrome the
// received word should have, pred = err_in(x) mod g(x), using its own XOR
// network. The residual res = alpha xor pred is the syndrome of whatever
// error is present beyond the injected one:
//   res == 0                 only the injected pattern: it is removed, and
//                            crc_ec_out is the data part of error_data xor err_in
//   res == x^j mod g(x)      one extra bit error at polynomial position j: it
//                            is removed as well (single-error correction)
//   anything else            uncorrectable: uncorrectable is raised and the
//                            data part of error_data xor err_in is passed on
// With a primitive g(x) of degree 7 the 23 positions have distinct nonzero
// syndromes. Ports follow the design's block diagram; the prediction and
// correction rules and the uncorrectable flag are this design's. Purely combinational.
module ecc_predicted_crc
  import gf_crc_pkg::*;
#(
  parameter int unsigned       K  = 16,
  parameter int unsigned       N  = 23,
  parameter logic [N-K-1:0]    G7 = 7'h09
) (
  input  logic [N-K-1:0] alpha,
  input  logic [N-1:0]   error_data,
  input  logic [N-1:0]   err_in,
  output logic [K-1:0]   crc_ec_out,
  output logic           uncorrectable
);

  localparam int unsigned R = N - K;

  // Syndrome of a single error at polynomial position j (constant for fixed j).
  function automatic logic [R-1:0] position_syndrome(int unsigned j);
    return R'(poly_mod(poly_t'(1) << j, N, poly_t'(G7), R));
  endfunction

  logic [R-1:0] pred;
  logic [R-1:0] res;
  logic [N-1:0] word;   // polynomial order: [N-1:R] data, [R-1:0] check

  always_comb begin
    pred = R'(poly_mod(poly_t'({err_in[K-1:0], err_in[N-1:K]}), N, poly_t'(G7), R));
    res  = alpha ^ pred;
    word = {error_data[K-1:0], error_data[N-1:K]} ^ {err_in[K-1:0], err_in[N-1:K]};
    uncorrectable = (res != '0);
    for (int unsigned j = 0; j < N; j++)
      if (res == position_syndrome(j)) begin
        word[j]       = ~word[j];
        uncorrectable = 1'b0;
      end
    crc_ec_out = word[N-1:R];
  end

endmodule
