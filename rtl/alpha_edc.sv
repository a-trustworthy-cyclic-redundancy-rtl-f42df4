// alpha_edc - alpha module with CRC-based error detection.
//
// The alpha module (gf_alpha) computes y = alpha * a mod f(x). In parallel,
// the actual CRC is taken of the produced output and the predicted CRC is
// formed from the input a alone; the two CRC_W-bit signatures are compared by
// XOR, bit k-1 of ef being error flag EF_k. In fault-free operation ef is
// zero; any error pattern e on y that is not a multiple of g(x) makes it
// nonzero, with ef = e(x) mod g(x).
//
// fault is an M-bit mask XORed onto the alpha module's output ahead of the
// actual CRC, so faults can be injected for evaluation; tie it to zero in
// normal use. Where the flags and the comparison come from the method; the
// injection port is this design's. Purely combinational.
module alpha_edc #(
  parameter int unsigned       M      = 8,
  parameter logic [M-1:0]      F_POLY = 8'h1B,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]     a,
  input  logic [M-1:0]     fault,
  output logic [M-1:0]     y,
  output logic [CRC_W-1:0] ef
);

  logic [M-1:0]     y_raw;
  logic [CRC_W-1:0] acrc, pcrc;

  gf_alpha #(.M(M), .F_POLY(F_POLY)) u_alpha (.a(a), .y(y_raw));

  assign y = y_raw ^ fault;

  crc_actual #(.M(M), .CRC_W(CRC_W), .G_POLY(G_POLY)) u_acrc (.d(y), .crc(acrc));

  crc_pred_alpha #(.M(M), .F_POLY(F_POLY), .CRC_W(CRC_W), .G_POLY(G_POLY))
    u_pcrc (.a(a), .crc(pcrc));

  assign ef = acrc ^ pcrc;

endmodule
