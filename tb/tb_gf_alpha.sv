// tb_gf_alpha - exhaustive test of the alpha module.
// Every element of GF(2^8) (f = x^8+x^4+x^3+x+1) and of GF(2^7)
// (f = x^7+x+1) is multiplied by alpha and compared with a Horner-rule
// reference product a * x mod f.
module tb_gf_alpha;
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

  logic [7:0] a8, y8;
  logic [6:0] a7, y7;

  gf_alpha dut8 (.a(a8), .y(y8));
  gf_alpha #(.M(7), .F_POLY(7'h03)) dut7 (.a(a7), .y(y7));

  initial begin
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v);
      a7 = 7'(v);
      @(posedge clk);
      check(rpoly_t'(y8) == ref_gfmul(rpoly_t'(a8), 128'd2, 8, 128'h11B), $sformatf("M=8 a=%h y=%h", a8, y8));
      if (v < 128)
        check(rpoly_t'(y7) == ref_gfmul(rpoly_t'(a7), 128'd2, 7, 128'h83), $sformatf("M=7 a=%h y=%h", a7, y7));
    end
    finish_test();
  end
endmodule
