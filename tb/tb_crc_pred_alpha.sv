// tb_crc_pred_alpha - the predicted CRC of the alpha module must equal the
// reference CRC of the reference product alpha * a, for every a, with both
// CRC-5 generators.
module tb_crc_pred_alpha;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic [7:0] a;
  logic [4:0] crc_p, crc_e;
  rpoly_t     prod;

  crc_pred_alpha dut_p (.a(a), .crc(crc_p));
  crc_pred_alpha #(.G_POLY(5'h09)) dut_e (.a(a), .crc(crc_e));

  initial begin
    for (int v = 0; v < 256; v++) begin
      a    = 8'(v);
      prod = ref_gfmul(rpoly_t'(a), 128'd2, 8, 128'h11B);
      @(posedge clk);
      check(rpoly_t'(crc_p) == ref_mod(prod, 8, 128'h25, 5), $sformatf("prim a=%h crc=%h", a, crc_p));
      check(rpoly_t'(crc_e) == ref_mod(prod, 8, 128'h29, 5), $sformatf("epc a=%h crc=%h", a, crc_e));
    end
    finish_test();
  end
endmodule
