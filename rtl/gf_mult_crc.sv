// gf_mult_crc - GF(2^M) multiplier with CRC-5 error detection in every module.
//
// Computes C = A * B mod f(x) in polynomial basis as C = sum_i b_i * alpha^i * A.
// The datapath has three kinds of module, each wrapped with its own actual
// CRC, predicted CRC and XOR error flags:
//   alpha array   M-1 alpha modules, x^(0) = A, x^(i) = alpha * x^(i-1)
//   pass-thru     M modules, p_i = b_i * x^(i)
//   sum chain     M-1 sum modules, s_0 = p_0, s_i = s_(i-1) + p_i, C = s_(M-1)
// Because every predicted CRC is formed from its module's own inputs, a fault
// inside one module raises only that module's flags, even though the wrong
// value then flows on through the modules after it. The flags therefore
// locate the faulty module as well as detecting the fault.
//
// Ports: a, b operands; fault_alpha[i-1], fault_pt[i], fault_sum[i-1] are
// fault-injection masks XORed onto the output of alpha module i, pass-thru
// module i and sum module i (tie to zero in normal use); ef_* are the
// CRC_W-bit error-flag vectors of each module (bit k-1 = EF_k); error is the
// OR of all flags. Structure and flags follow the method; the injection
// ports, the combined error output and the default polynomials are this
// design's choices. Purely combinational: the product and flags are valid one
// propagation delay after the operands.
module gf_mult_crc #(
  parameter int unsigned       M      = 8,
  parameter logic [M-1:0]      F_POLY = 8'h1B,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]                a,
  input  logic [M-1:0]                b,
  input  logic [M-2:0][M-1:0]         fault_alpha,
  input  logic [M-1:0][M-1:0]         fault_pt,
  input  logic [M-2:0][M-1:0]         fault_sum,
  output logic [M-1:0]                c,
  output logic [M-2:0][CRC_W-1:0]     ef_alpha,
  output logic [M-1:0][CRC_W-1:0]     ef_pt,
  output logic [M-2:0][CRC_W-1:0]     ef_sum,
  output logic                        error
);

  logic [M-1:0][M-1:0] x;   // x[i] = alpha^i * A
  logic [M-1:0][M-1:0] p;   // p[i] = b_i * x[i]
  logic [M-1:0][M-1:0] s;   // running sums, s[M-1] = C

  assign x[0] = a;

  for (genvar i = 1; i < M; i++) begin : g_alpha
    alpha_edc #(.M(M), .F_POLY(F_POLY), .CRC_W(CRC_W), .G_POLY(G_POLY)) u_alpha (
      .a(x[i-1]), .fault(fault_alpha[i-1]), .y(x[i]), .ef(ef_alpha[i-1])
    );
  end

  for (genvar i = 0; i < M; i++) begin : g_pt
    pass_thru_edc #(.M(M), .CRC_W(CRC_W), .G_POLY(G_POLY)) u_pt (
      .a(x[i]), .b(b[i]), .fault(fault_pt[i]), .y(p[i]), .ef(ef_pt[i])
    );
  end

  assign s[0] = p[0];

  for (genvar i = 1; i < M; i++) begin : g_sum
    sum_edc #(.M(M), .CRC_W(CRC_W), .G_POLY(G_POLY)) u_sum (
      .a(s[i-1]), .b(p[i]), .fault(fault_sum[i-1]), .y(s[i]), .ef(ef_sum[i-1])
    );
  end

  assign c     = s[M-1];
  assign error = (|ef_alpha) | (|ef_pt) | (|ef_sum);

endmodule
