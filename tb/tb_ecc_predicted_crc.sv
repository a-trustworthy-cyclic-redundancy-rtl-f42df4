// tb_ecc_predicted_crc - correction unit of CRC_ECC.
// Received word = codeword + injected pattern err_in + extra error x, with
// alpha its true syndrome. With x = 0 or a single bit the data must come back
// exactly and uncorrectable stay low; with x of two bits the unit must flag
// uncorrectable exactly when the reference finds no single-bit syndrome equal
// to that of x, and otherwise flip that one bit.
module tb_ecc_predicted_crc;
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
  logic [22:0] err_in, x, ed, flip, word_exp;
  logic [6:0]  alpha, sx;
  logic        unc, expect_unc;
  int          n_unc, n_mis;

  ecc_predicted_crc dut (.alpha(alpha), .error_data(ed), .err_in(err_in), .crc_ec_out(out), .uncorrectable(unc));

  initial begin
    n_unc = 0;
    n_mis = 0;
    for (int v = 0; v < 3000; v++) begin
      d      = 16'($urandom());
      err_in = 23'($urandom());
      case (v % 3)
        0: x = '0;
        1: x = 23'(1 << $urandom_range(0, 22));
        default: begin
          x = 23'(1 << $urandom_range(0, 22));
          do flip = 23'(1 << $urandom_range(0, 22)); while (flip == x);
          x = x | flip;
        end
      endcase
      ed    = encode(d) ^ err_in ^ x;
      alpha = syndrome(ed);
      // reference decision, by search over word positions
      sx         = syndrome(x);
      expect_unc = (sx != '0);
      word_exp   = encode(d) ^ x;
      for (int j = 0; j < 23; j++)
        if (sx != '0 && syndrome(23'(1 << j)) == sx) begin
          expect_unc  = 1'b0;
          word_exp[j] = ~word_exp[j];
        end
      @(posedge clk);
      if ($countones(x) <= 1)
        check(out == d && !unc, $sformatf("d=%h x=%h out=%h unc=%b", d, x, out, unc));
      else begin
        check(unc == expect_unc, $sformatf("double x=%h unc=%b", x, unc));
        check(out == word_exp[15:0], $sformatf("double x=%h out=%h exp=%h", x, out, word_exp[15:0]));
        if (unc) n_unc++; else n_mis++;
      end
    end
    $display("double extra errors: %0d flagged uncorrectable, %0d miscorrected", n_unc, n_mis);
    check(n_unc > 0, "uncorrectable never exercised");
    finish_test();
  end
endmodule
