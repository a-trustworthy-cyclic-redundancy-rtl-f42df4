// sum_edc - sum module with CRC-based error detection.
//
// The sum module (gf_sum) computes y = a xor b. The actual CRC of y is
// compared by XOR with the CRC predicted from a and b; bit k-1 of ef is error
// flag EF_k and is zero in fault-free operation.
//
// fault is an M-bit mask XORed onto the module output ahead of the actual
// CRC for fault-injection experiments (zero in normal use; this design's
// addition). Purely combinational.
module sum_edc #(
  parameter int unsigned       M      = 8,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]     a,
  input  logic [M-1:0]     b,
  input  logic [M-1:0]     fault,
  output logic [M-1:0]     y,
  output logic [CRC_W-1:0] ef
);

  logic [M-1:0]     y_raw;
  logic [CRC_W-1:0] acrc, pcrc;

  gf_sum #(.M(M)) u_sum (.a(a), .b(b), .y(y_raw));

  assign y = y_raw ^ fault;

  crc_actual #(.M(M), .CRC_W(CRC_W), .G_POLY(G_POLY)) u_acrc (.d(y), .crc(acrc));

  crc_pred_sum #(.M(M), .CRC_W(CRC_W), .G_POLY(G_POLY))
    u_pcrc (.a(a), .b(b), .crc(pcrc));

  assign ef = acrc ^ pcrc;

endmodule
