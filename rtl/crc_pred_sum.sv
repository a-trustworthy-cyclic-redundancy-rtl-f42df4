// crc_pred_sum - predicted CRC (PCRC) of the sum module.
//
// The CRC is linear: crc(a xor b) = crc(a) xor crc(b). The prediction is
// therefore the XOR of the signatures of the two addends, each formed by its
// own XOR network from the sum module's inputs, never from its output.
//
// Parameters: M, CRC_W, G_POLY as in crc_actual. The use of linearity is this
// design's reading; the method only states that the predicted CRC comes from
// the module's inputs. Purely combinational.
module crc_pred_sum
  import gf_crc_pkg::*;
#(
  parameter int unsigned       M      = 8,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]     a,
  input  logic [M-1:0]     b,
  output logic [CRC_W-1:0] crc
);

  always_comb begin
    crc = CRC_W'(poly_mod(poly_t'(a), M, poly_t'(G_POLY), CRC_W))
        ^ CRC_W'(poly_mod(poly_t'(b), M, poly_t'(G_POLY), CRC_W));
  end

endmodule
