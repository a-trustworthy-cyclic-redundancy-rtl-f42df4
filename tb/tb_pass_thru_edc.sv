// tb_pass_thru_edc - pass-thru module with error detection: fault-free
// outputs and clear flags for every (a, b); flags equal to e mod g(x) under an
// injected fault e, with single-bit faults always flagged.
module tb_pass_thru_edc;
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
  logic       b;
  logic [4:0] ef;

  pass_thru_edc dut (.a(a), .b(b), .fault(fault), .y(y), .ef(ef));

  initial begin
    for (int v = 0; v < 512; v++) begin
      a     = 8'(v);
      b     = v[8];
      fault = '0;
      @(posedge clk);
      check(y == (b ? a : 8'h00) && ef == '0, $sformatf("fault-free a=%h b=%b y=%h ef=%b", a, b, y, ef));
      fault = 8'($urandom_range(1, 255));
      if (v < 16) fault = 8'(1 << (v % 8));
      @(posedge clk);
      check(y == ((b ? a : 8'h00) ^ fault), "faulty output");
      check(rpoly_t'(ef) == ref_mod(rpoly_t'(fault), 8, 128'h25, 5), $sformatf("flags e=%h ef=%b", fault, ef));
      if (v < 16) check(ef != '0, "single-bit fault missed");
    end
    finish_test();
  end
endmodule
