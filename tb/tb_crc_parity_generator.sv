// tb_crc_parity_generator - the CRC-7 encoder of the CRC_ECC unit.
// For random and corner data words: the low 16 bits of the codeword must be
// the data, the codeword must have a zero syndrome under g(x) = x^7+x^3+1,
// and the check bits must equal a bit-serial reference remainder.
module tb_crc_parity_generator;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  logic [15:0] d;
  logic [22:0] cw;

  crc_parity_generator dut (.data_in(d), .parity_out(cw));

  initial begin
    for (int v = 0; v < 3000; v++) begin
      d = (v < 16) ? 16'(1 << v) : 16'($urandom());
      if (v == 16) d = 16'h0000;
      if (v == 17) d = 16'hFFFF;
      @(posedge clk);
      check(cw[15:0] == d, $sformatf("data field d=%h cw=%h", d, cw));
      check(syndrome(cw) == '0, $sformatf("not a codeword d=%h cw=%h", d, cw));
      check(cw == encode(d), $sformatf("check bits d=%h cw=%h", d, cw));
    end
    finish_test();
  end
endmodule
