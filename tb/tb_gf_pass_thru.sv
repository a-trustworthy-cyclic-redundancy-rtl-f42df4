// tb_gf_pass_thru - exhaustive test of the pass-thru module: every a with
// b = 0 (output must be zero) and b = 1 (output must be a).
module tb_gf_pass_thru;
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

  logic [7:0] a, y;
  logic       b;

  gf_pass_thru dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 512; v++) begin
      a = 8'(v);
      b = v[8];
      @(posedge clk);
      check(y == (b ? a : 8'h00), $sformatf("a=%h b=%b y=%h", a, b, y));
    end
    finish_test();
  end
endmodule
