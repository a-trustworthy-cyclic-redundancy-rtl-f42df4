// crc_ecc - CRC_ECC unit: CRC encoding, error injection and correction of 16-bit data.
//
// data_in (16 bits) is encoded by crc_parity_generator into the 23-bit
// codeword parity_out: 7 CRC check bits on top of the data. The codeword then
// passes through ecc_actual_crc, which XORs in the error-injection pattern
// error_in and computes the 7-bit syndrome alpha of the corrupted word.
// ecc_predicted_crc predicts the syndrome of error_in, removes the injected
// pattern and corrects one further bit error, giving crc_ec_out, which equals
// data_in whenever at most one bit beyond the injected pattern is wrong.
//
// line_error models an error on the codeword that the unit is not told about
// (a transient fault on the link between encoder and checker): it is XORed
// onto parity_out ahead of the syndrome unit. A single-bit line_error is
// corrected; a heavier one that the code cannot correct raises uncorrectable
// (a heavier one whose syndrome equals a single-bit syndrome is miscorrected,
// as with any Hamming code). Tie line_error to zero for the plain CRC_ECC
// behaviour, in which crc_ec_out always equals data_in.
//
// Ports (1-based in the design's naming, 0-based here): data_in = in[16:1],
// error_in[23:1], crc_ec_out[16:1], parity_out = Parity_out[23:1]. The three
// sub-blocks and their connections follow the design's block diagram; the
// CRC-7 generator, the correction rule and the line_error / uncorrectable
// ports are this design's choices. Purely
// combinational, no clock.
module crc_ecc #(
  parameter int unsigned K = 16,
  parameter int unsigned N = 23
) (
  input  logic [K-1:0] data_in,
  input  logic [N-1:0] error_in,
  input  logic [N-1:0] line_error,
  output logic [K-1:0] crc_ec_out,
  output logic [N-1:0] parity_out,
  output logic         uncorrectable
);

  logic [N-K-1:0] alpha;
  logic [N-1:0]   error_data;
  logic [N-1:0]   received;   // codeword as it reaches the checker

  assign received = parity_out ^ line_error;

  crc_parity_generator #(.K(K), .N(N)) e1 (.data_in(data_in), .parity_out(parity_out));

  ecc_actual_crc #(.K(K), .N(N)) u1 (
    .err(error_in), .codeword(received), .alpha(alpha), .error_data(error_data)
  );

  ecc_predicted_crc #(.K(K), .N(N)) u2 (
    .alpha(alpha), .error_data(error_data), .err_in(error_in), .crc_ec_out(crc_ec_out),
    .uncorrectable(uncorrectable)
  );

endmodule
