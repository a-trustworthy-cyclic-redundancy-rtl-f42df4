// tb_crc_pred_pass_thru - predicted CRC of b * a against the reference CRC of
// the reference pass-thru output, for every a and both values of b.
module tb_crc_pred_pass_thru;
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

  logic [7:0] a;
  logic       b;
  logic [4:0] crc;

  crc_pred_pass_thru dut (.a(a), .b(b), .crc(crc));

  initial begin
    for (int v = 0; v < 512; v++) begin
      a = 8'(v);
      b = v[8];
      @(posedge clk);
      check(rpoly_t'(crc) == ref_mod(b ? rpoly_t'(a) : '0, 8, 128'h25, 5), $sformatf("a=%h b=%b crc=%h", a, b, crc));
    end
    finish_test();
  end
endmodule
