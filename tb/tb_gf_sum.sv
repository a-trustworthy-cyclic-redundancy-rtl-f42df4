// tb_gf_sum - the sum module against a bit-by-bit reference addition mod 2
// over all 65536 operand pairs of GF(2^8).
module tb_gf_sum;
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

  logic [7:0] a, b, y, expect_y;

  gf_sum dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a = v[7:0];
      b = v[15:8];
      for (int i = 0; i < 8; i++) expect_y[i] = (a[i] + b[i]) % 2 == 1;
      @(posedge clk);
      check(y == expect_y, $sformatf("a=%h b=%h y=%h", a, b, y));
    end
    finish_test();
  end
endmodule
