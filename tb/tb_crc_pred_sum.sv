// tb_crc_pred_sum - predicted CRC of a + b against the reference CRC of the
// sum, for all operand pairs of GF(2^8).
module tb_crc_pred_sum;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
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

  logic [7:0] a, b;
  logic [4:0] crc;

  crc_pred_sum dut (.a(a), .b(b), .crc(crc));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a = v[7:0];
      b = v[15:8];
      @(posedge clk);
      check(rpoly_t'(crc) == ref_mod(rpoly_t'(a ^ b), 8, 128'h25, 5), $sformatf("a=%h b=%h crc=%h", a, b, crc));
    end
    finish_test();
  end
endmodule
