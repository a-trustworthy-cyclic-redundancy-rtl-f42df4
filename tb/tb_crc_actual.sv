// tb_crc_actual - the actual-CRC unit against a bit-serial reference remainder
// for every 8-bit word, with the default generator x^5+x^2+1 and with the
// EPC generator x^5+x^3+1; also a 47-bit word (LUOV field size) at random.
module tb_crc_actual;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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

  logic [7:0]  d;
  logic [4:0]  crc_p, crc_e, crc_w;
  logic [46:0] dw;

  crc_actual dut_p (.d(d), .crc(crc_p));
  crc_actual #(.G_POLY(5'h09)) dut_e (.d(d), .crc(crc_e));
  crc_actual #(.M(47)) dut_w (.d(dw), .crc(crc_w));

  initial begin
    for (int v = 0; v < 256; v++) begin
      d  = 8'(v);
      dw = 47'(rand_bits(47));
      @(posedge clk);
      check(rpoly_t'(crc_p) == ref_mod(rpoly_t'(d), 8, 128'h25, 5), $sformatf("prim d=%h crc=%h", d, crc_p));
      check(rpoly_t'(crc_e) == ref_mod(rpoly_t'(d), 8, 128'h29, 5), $sformatf("epc d=%h crc=%h", d, crc_e));
      check(rpoly_t'(crc_w) == ref_mod(rpoly_t'(dw), 47, 128'h25, 5), $sformatf("47b d=%h crc=%h", dw, crc_w));
    end
    finish_test();
  end
endmodule
