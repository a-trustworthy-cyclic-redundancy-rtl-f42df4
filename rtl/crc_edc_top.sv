// crc_edc_top - CRC-based error control for finite-field arithmetic: both units side by side.
//
// Two independent units share this top and nothing else:
//   u_mult  gf_mult_crc  GF(2^M) multiplier C = A*B whose every alpha,
//                        pass-thru and sum module carries an actual and a
//                        predicted CRC-5 signature and five XOR error flags
//   u_ecc   crc_ecc      16-bit CRC_ECC unit: CRC-7 encoding into a 23-bit
//                        codeword, error injection, syndrome and correction
// All ports of both are brought out unchanged; mult_error is the OR of all
// the multiplier's error flags. Both units are combinational.
module crc_edc_top #(
  parameter int unsigned       M      = 8,
  parameter logic [M-1:0]      F_POLY = 8'h1B,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  // CRC-protected finite-field multiplier
  input  logic [M-1:0]                mult_a,
  input  logic [M-1:0]                mult_b,
  input  logic [M-2:0][M-1:0]         fault_alpha,
  input  logic [M-1:0][M-1:0]         fault_pt,
  input  logic [M-2:0][M-1:0]         fault_sum,
  output logic [M-1:0]                mult_c,
  output logic [M-2:0][CRC_W-1:0]     ef_alpha,
  output logic [M-1:0][CRC_W-1:0]     ef_pt,
  output logic [M-2:0][CRC_W-1:0]     ef_sum,
  output logic                        mult_error,
  // CRC_ECC unit
  input  logic [15:0]                 ecc_in,
  input  logic [22:0]                 ecc_error_in,
  input  logic [22:0]                 ecc_line_error,
  output logic [15:0]                 ecc_crc_ec_out,
  output logic [22:0]                 ecc_parity_out,
  output logic                        ecc_uncorrectable
);

  gf_mult_crc #(.M(M), .F_POLY(F_POLY), .CRC_W(CRC_W), .G_POLY(G_POLY)) u_mult (
    .a(mult_a), .b(mult_b),
    .fault_alpha(fault_alpha), .fault_pt(fault_pt), .fault_sum(fault_sum),
    .c(mult_c), .ef_alpha(ef_alpha), .ef_pt(ef_pt), .ef_sum(ef_sum), .error(mult_error)
  );

  crc_ecc u_ecc (
    .data_in(ecc_in), .error_in(ecc_error_in), .line_error(ecc_line_error),
    .crc_ec_out(ecc_crc_ec_out), .parity_out(ecc_parity_out), .uncorrectable(ecc_uncorrectable)
  );

endmodule
