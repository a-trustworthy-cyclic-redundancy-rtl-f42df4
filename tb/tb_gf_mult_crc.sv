// tb_gf_mult_crc - the CRC-protected GF(2^8) multiplier.
// 1. Every product A*B (65536 pairs) against a Horner-rule reference, with no
//    fault injected: no error flag may be raised.
// 2. Fault injection into each alpha, pass-thru and sum module in turn: only
//    that module's flags may be raised, and they must equal e mod g(x); a
//    fault on the last sum module must appear on C unchanged.
// 3. A GF(2^7) instance (f = x^7 + x + 1) on random operands.
module tb_gf_mult_crc;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  logic [6:0]              a7, b7, c7;
  logic [5:0][4:0]         efa7, efs7;
  logic [6:0][4:0]         efp7;
  logic                    err7;

  gf_mult_crc dut (
    .a(a), .b(b), .fault_alpha(fa), .fault_pt(fp), .fault_sum(fs),
    .c(c), .ef_alpha(efa), .ef_pt(efp), .ef_sum(efs), .error(err)
  );

  gf_mult_crc #(.M(7), .F_POLY(7'h03)) dut7 (
    .a(a7), .b(b7), .fault_alpha('0), .fault_pt('0), .fault_sum('0),
    .c(c7), .ef_alpha(efa7), .ef_pt(efp7), .ef_sum(efs7), .error(err7)
  );

  // kind: 0 alpha, 1 pass-thru, 2 sum; only flags of (kind, idx) may be set
  task automatic fault_case(int kind, int idx, logic [M-1:0] e);
    rpoly_t expect_ef;
    bit     others_clear;
    logic [4:0] got;
    a  = M'($urandom());
    b  = M'($urandom()) | M'(1);
    fa = '0; fp = '0; fs = '0;
    case (kind)
      0: fa[idx] = e;
      1: fp[idx] = e;
      default: fs[idx] = e;
    endcase
    @(posedge clk);
    expect_ef    = ref_mod(rpoly_t'(e), M, 128'h25, 5);
    others_clear = 1'b1;
    got          = '0;
    for (int i = 0; i < M - 1; i++) begin
      if (kind == 0 && i == idx) got = efa[i]; else if (efa[i] != '0) others_clear = 1'b0;
      if (kind == 2 && i == idx) got = efs[i]; else if (efs[i] != '0) others_clear = 1'b0;
    end
    for (int i = 0; i < M; i++)
      if (kind == 1 && i == idx) got = efp[i]; else if (efp[i] != '0) others_clear = 1'b0;
    check(rpoly_t'(got) == expect_ef, $sformatf("kind %0d idx %0d e=%h ef=%b", kind, idx, e, got));
    check(others_clear, $sformatf("kind %0d idx %0d: flags raised elsewhere", kind, idx));
    check(err == (expect_ef != '0), "combined error output");
    if (kind == 2 && idx == M - 2)
      check(rpoly_t'(c) == (ref_gfmul(rpoly_t'(a), rpoly_t'(b), M, 128'h11B) ^ rpoly_t'(e)), "fault on last sum reaches C");
  endtask

  initial begin
    fa = '0; fp = '0; fs = '0;
    a7 = '0; b7 = '0;
    for (int v = 0; v < 65536; v++) begin
      a = v[7:0];
      b = v[15:8];
      @(posedge clk);
      check(rpoly_t'(c) == ref_gfmul(rpoly_t'(a), rpoly_t'(b), M, 128'h11B), $sformatf("a=%h b=%h c=%h", a, b, c));
      check(!err, $sformatf("false alarm a=%h b=%h", a, b));
    end
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < M - 1; i++) fault_case(0, i, (r < M) ? M'(1 << r) : M'($urandom_range(1, 255)));
      for (int i = 0; i < M; i++)     fault_case(1, i, (r < M) ? M'(1 << r) : M'($urandom_range(1, 255)));
      for (int i = 0; i < M - 1; i++) fault_case(2, i, (r < M) ? M'(1 << r) : M'($urandom_range(1, 255)));
    end
    for (int r = 0; r < 2000; r++) begin
      a7 = 7'($urandom());
      b7 = 7'($urandom());
      @(posedge clk);
      check(rpoly_t'(c7) == ref_gfmul(rpoly_t'(a7), rpoly_t'(b7), 7, 128'h83) && !err7, $sformatf("M=7 a=%h b=%h c=%h", a7, b7, c7));
    end
    finish_test();
  end
endmodule
