// tb_crc_edc_top - end-to-end test of both units at their default sizes.
// Multiplier, GF(2^8): random products with no fault (no flag may rise), then
// random faults injected into a random module of each kind; the combined
// error output must rise exactly when the fault is not a multiple of g(x),
// and only the faulty module's flags may be set. A fault equal to g(x)
// itself is injected too, to show the one class of pattern CRC-5 cannot see.
// CRC_ECC: random data and injected patterns, with no, one and two
// unannounced codeword errors.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_crc_edc_top;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  localparam int M = 8;

  logic [M-1:0]            a, b, c;
  logic [M-2:0][M-1:0]     fa, fs;
  logic [M-1:0][M-1:0]     fp;
  logic [M-2:0][4:0]       efa, efs;
  logic [M-1:0][4:0]       efp;
  logic                    err;
  logic [15:0]             d, out;
  logic [22:0]             inj, line, cw;
  logic                    unc;

  int n_product, n_det_alpha, n_det_pt, n_det_sum, n_escape;
  int n_inj_removed, n_corrected, n_flagged;

  crc_edc_top dut (
    .mult_a(a), .mult_b(b), .fault_alpha(fa), .fault_pt(fp), .fault_sum(fs),
    .mult_c(c), .ef_alpha(efa), .ef_pt(efp), .ef_sum(efs), .mult_error(err),
    .ecc_in(d), .ecc_error_in(inj), .ecc_line_error(line),
    .ecc_crc_ec_out(out), .ecc_parity_out(cw), .ecc_uncorrectable(unc)
  );

  function automatic int flagged_modules();
    int n = 0;
    for (int i = 0; i < M - 1; i++) n += int'(efa[i] != '0) + int'(efs[i] != '0);
    for (int i = 0; i < M; i++)     n += int'(efp[i] != '0);
    return n;
  endfunction

  initial begin
    {n_product, n_det_alpha, n_det_pt, n_det_sum, n_escape} = '0;
    {n_inj_removed, n_corrected, n_flagged} = '0;
    fa = '0; fp = '0; fs = '0;
    d = '0; inj = '0; line = '0;

    for (int v = 0; v < 3000; v++) begin
      int kind, idx;
      logic [M-1:0] e;
      a = M'($urandom());
      b = M'($urandom());
      fa = '0; fp = '0; fs = '0;
      @(posedge clk);
      check(rpoly_t'(c) == ref_gfmul(rpoly_t'(a), rpoly_t'(b), M, 128'h11B) && !err, $sformatf("product a=%h b=%h c=%h", a, b, c));
      n_product++;

      kind = v % 3;
      e    = (v % 50 == 7) ? M'(8'h25) : M'($urandom_range(1, 255));
      idx  = $urandom_range(0, (kind == 1) ? M - 1 : M - 2);
      b    = b | M'(1 << ((kind == 1) ? idx : 0));
      case (kind)
        0: fa[idx] = e;
        1: fp[idx] = e;
        default: fs[idx] = e;
      endcase
      @(posedge clk);
      if (ref_mod(rpoly_t'(e), M, 128'h25, 5) == '0) begin
        check(!err, "fault that is a multiple of g(x) flagged");
        n_escape++;
      end else begin
        check(err && flagged_modules() == 1, $sformatf("fault kind %0d idx %0d e=%h not located", kind, idx, e));
        case (kind)
          0: begin check(efa[idx] != '0, "alpha flag"); n_det_alpha++; end
          1: begin check(efp[idx] != '0, "pass-thru flag"); n_det_pt++; end
          default: begin check(efs[idx] != '0, "sum flag"); n_det_sum++; end
        endcase
      end
    end
    fa = '0; fp = '0; fs = '0;

    for (int v = 0; v < 3000; v++) begin
      d    = 16'($urandom());
      inj  = 23'($urandom());
      line = '0;
      if (v % 3 == 1) line = 23'(1 << $urandom_range(0, 22));
      if (v % 3 == 2) line = 23'(5 << $urandom_range(0, 20));
      @(posedge clk);
      check(cw == encode(d), "codeword");
      if (line == '0) begin
        check(out == d && !unc, "injected pattern not removed");
        if (inj != '0) n_inj_removed++;
      end else if ($countones(line) == 1) begin
        check(out == d && !unc, "single codeword error not corrected");
        n_corrected++;
      end else begin
        check(unc || out != d, "double error passed as clean");
        if (unc) n_flagged++;
      end
    end

    $display("products %0d, faults located: alpha %0d pass-thru %0d sum %0d, undetectable %0d",
             n_product, n_det_alpha, n_det_pt, n_det_sum, n_escape);
    $display("CRC_ECC: injected removed %0d, single corrected %0d, uncorrectable flagged %0d",
             n_inj_removed, n_corrected, n_flagged);
    check(n_product > 0, "no product");
    check(n_det_alpha > 0, "no alpha-module fault detected");
    check(n_det_pt > 0, "no pass-thru fault detected");
    check(n_det_sum > 0, "no sum-module fault detected");
    check(n_escape > 0, "undetectable pattern never injected");
    check(n_inj_removed > 0, "injection never removed");
    check(n_corrected > 0, "no single-error correction");
    check(n_flagged > 0, "uncorrectable never flagged");
    finish_test();
  end
endmodule
