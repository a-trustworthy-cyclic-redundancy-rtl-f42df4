// tb_alpha_edc - alpha module with error detection.
// Fault-free: y must be alpha * a and all five error flags clear, for every a.
// With an injected fault mask e: y must be alpha * a xor e and the flags must
// equal e mod g(x); every single- and double-bit fault must be flagged.
module tb_alpha_edc;
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

  logic [7:0] a, fault, y;
  logic [4:0] ef;
  rpoly_t     prod;
  int         flagged;

  alpha_edc dut (.a(a), .fault(fault), .y(y), .ef(ef));

  initial begin
    flagged = 0;
    for (int v = 0; v < 256; v++) begin
      a     = 8'(v);
      fault = '0;
      prod  = ref_gfmul(rpoly_t'(a), 128'd2, 8, 128'h11B);
      @(posedge clk);
      check(rpoly_t'(y) == prod && ef == '0, $sformatf("fault-free a=%h y=%h ef=%b", a, y, ef));
      // every fault pattern once, paired with this a
      fault = 8'(v * 37 + 11);
      @(posedge clk);
      check(rpoly_t'(y) == (prod ^ rpoly_t'(fault)), $sformatf("faulty y a=%h", a));
      check(rpoly_t'(ef) == ref_mod(rpoly_t'(fault), 8, 128'h25, 5), $sformatf("flags a=%h e=%h ef=%b", a, fault, ef));
      if ($countones(fault) inside {1, 2}) begin
        check(ef != '0, $sformatf("low-weight fault missed e=%h", fault));
        flagged++;
      end
    end
    check(flagged > 0, "no low-weight fault exercised");
    finish_test();
  end
endmodule
