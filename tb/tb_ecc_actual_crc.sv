// tb_ecc_actual_crc - the syndrome unit of CRC_ECC: error_data must be the
// codeword with the error pattern added, and alpha the reference syndrome of
// it; a valid codeword with no error must give alpha = 0, and the 23 single
// errors nonzero, distinct syndromes.
module tb_ecc_actual_crc;
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

  logic [22:0] err, cw, ed;
  logic [6:0]  alpha;
  logic [6:0]  seen [23];

  ecc_actual_crc dut (.err(err), .codeword(cw), .alpha(alpha), .error_data(ed));

  initial begin
    for (int v = 0; v < 2000; v++) begin
      cw  = encode(16'($urandom()));
      err = (v < 23) ? 23'(1 << v) : ((v < 100) ? '0 : 23'($urandom()));
      @(posedge clk);
      check(ed == (cw ^ err), "error_data");
      check(alpha == syndrome(cw ^ err), $sformatf("alpha=%h", alpha));
      if (v < 23) begin
        seen[v] = alpha;
        check(alpha != '0, "single error gives zero syndrome");
        for (int j = 0; j < v; j++) check(seen[j] != alpha, "two positions share a syndrome");
      end else if (v < 100) check(alpha == '0, "clean codeword");
    end
    finish_test();
  end
endmodule
