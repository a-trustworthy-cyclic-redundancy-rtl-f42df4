// tb_crc_ecc - the CRC_ECC unit end to end.
// 1. The example vector of the unit's reference simulation: data 000B with
//    error_in = 001_0101_1010_0100_1100_1111 must come out as 000B, and the
//    data field of Parity_out must be 000B.
// 2. Random data with random injected patterns must always come out intact.
// 3. A single unannounced bit error on the codeword (line_error) must be
//    corrected; a double one must be flagged as uncorrectable or come out
//    visibly wrong, never as the right data with the flag low.
module tb_crc_ecc;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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

  logic [15:0] d, out;
  logic [22:0] err, line, cw;
  logic        unc;
  int          n_corrected, n_flagged;

  crc_ecc dut (.data_in(d), .error_in(err), .line_error(line), .crc_ec_out(out), .parity_out(cw), .uncorrectable(unc));

  initial begin
    n_corrected = 0;
    n_flagged   = 0;
    d    = 16'h000B;
    err  = 23'b00101011010010011001111;
    line = '0;
    @(posedge clk);
    check(out == 16'h000B && cw[15:0] == 16'h000B && !unc, $sformatf("example vector out=%h cw=%h", out, cw));
    check(cw == encode(d), "example codeword");
    for (int v = 0; v < 3000; v++) begin
      d    = 16'($urandom());
      err  = 23'($urandom());
      line = '0;
      if (v % 3 == 1) line = 23'(1 << $urandom_range(0, 22));
      if (v % 3 == 2) line = 23'(3 << $urandom_range(0, 21));
      @(posedge clk);
      check(cw == encode(d), "codeword");
      if ($countones(line) <= 1) begin
        check(out == d && !unc, $sformatf("d=%h err=%h line=%h out=%h", d, err, line, out));
        if (line != '0 && out == d) n_corrected++;
      end else begin
        check(unc || out != d, "double error reported as clean");
        if (unc) n_flagged++;
      end
    end
    check(n_corrected > 0 && n_flagged > 0, "correction or flagging never exercised");
    finish_test();
  end
endmodule
