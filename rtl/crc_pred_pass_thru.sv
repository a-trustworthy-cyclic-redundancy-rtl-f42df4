// crc_pred_pass_thru - predicted CRC (PCRC) of the pass-thru module.
//
// Predicts the signature of b * a from the pass-thru module's two inputs: the
// CRC of a, (a mod g(x)), is formed by its own XOR network and then gated by
// b, since the CRC of the all-zero word is zero. It never looks at the
// pass-thru output, so a fault there shows as a mismatch with the actual CRC.
//
// Parameters: M, CRC_W, G_POLY as in crc_actual. The gating formula is this
// design's; the method only states that the predicted CRC comes from the
// module's inputs. Purely combinational.
module crc_pred_pass_thru
  import gf_crc_pkg::*;
#(
  parameter int unsigned       M      = 8,
  parameter int unsigned       CRC_W  = 5,
  parameter logic [CRC_W-1:0]  G_POLY = 5'h05
) (
  input  logic [M-1:0]     a,
  input  logic             b,
  output logic [CRC_W-1:0] crc
);

  always_comb begin
    crc = CRC_W'(poly_mod(poly_t'(a), M, poly_t'(G_POLY), CRC_W)) & {CRC_W{b}};
  end

endmodule
