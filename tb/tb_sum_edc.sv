// tb_sum_edc - sum module with error detection: fault-free outputs and clear
// flags on random operands; flags equal to e mod g(x) under an injected
// fault e, with single-bit faults always flagged. Also run with the EPC
// generator x^5+x^3+1.
module tb_sum_edc;
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

  logic [7:0] a, b, fault, y, y_e;
  logic [4:0] ef, ef_e;

  sum_edc dut (.a(a), .b(b), .fault(fault), .y(y), .ef(ef));
  sum_edc #(.G_POLY(5'h09)) dut_e (.a(a), .b(b), .fault(fault), .y(y_e), .ef(ef_e));

  initial begin
    for (int v = 0; v < 1000; v++) begin
      a     = 8'($urandom());
      b     = 8'($urandom());
      fault = '0;
      @(posedge clk);
      check(y == (a ^ b) && ef == '0 && ef_e == '0, $sformatf("fault-free a=%h b=%h ef=%b", a, b, ef));
      fault = (v < 8) ? 8'(1 << v) : 8'($urandom_range(1, 255));
      @(posedge clk);
      check(y == (a ^ b ^ fault), "faulty output");
      check(rpoly_t'(ef) == ref_mod(rpoly_t'(fault), 8, 128'h25, 5), $sformatf("flags e=%h ef=%b", fault, ef));
      check(rpoly_t'(ef_e) == ref_mod(rpoly_t'(fault), 8, 128'h29, 5), $sformatf("epc flags e=%h ef=%b", fault, ef_e));
      if (v < 8) check(ef != '0 && ef_e != '0, "single-bit fault missed");
    end
    finish_test();
  end
endmodule
