// tb_gf_mult_crc_wide - the CRC-protected multiplier at a wide field width.
// GF(2^79) with the irreducible trinomial f(x) = x^79 + x^9 + 1, the size of
// the widest LUOV field, and the default CRC-5 generator. Random products
// are checked against a Horner-rule reference with no flag raised; then a
// random fault is injected into a random module of each kind and must raise
// that module's flags (unless it is a multiple of g(x)) and no others.
module tb_gf_mult_crc_wide;
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

  localparam int M = 79;
  localparam logic [M-1:0] F = M'(128'h201);
  localparam rpoly_t F_FULL = (rpoly_t'(1) << M) | rpoly_t'(F);

  logic [M-1:0]            a, b, c;
  logic [M-2:0][M-1:0]     fa, fs;
  logic [M-1:0][M-1:0]     fp;
  logic [M-2:0][4:0]       efa, efs;
  logic [M-1:0][4:0]       efp;
  logic                    err;
  int                      n_located;

  gf_mult_crc #(.M(M), .F_POLY(F)) dut (
    .a(a), .b(b), .fault_alpha(fa), .fault_pt(fp), .fault_sum(fs),
    .c(c), .ef_alpha(efa), .ef_pt(efp), .ef_sum(efs), .error(err)
  );

  function automatic int flagged_modules();
    int n = 0;
    for (int i = 0; i < M - 1; i++) n += int'(efa[i] != '0) + int'(efs[i] != '0);
    for (int i = 0; i < M; i++)     n += int'(efp[i] != '0);
    return n;
  endfunction

  initial begin
    n_located = 0;
    fa = '0; fp = '0; fs = '0;
    for (int v = 0; v < 600; v++) begin
      int kind, idx;
      logic [M-1:0] e;
      a = M'(rand_bits(M));
      b = M'(rand_bits(M));
      if (v == 0) begin a = '1; b = '1; end
      fa = '0; fp = '0; fs = '0;
      @(posedge clk);
      check(rpoly_t'(c) == ref_gfmul(rpoly_t'(a), rpoly_t'(b), M, F_FULL) && !err, $sformatf("a=%h b=%h c=%h", a, b, c));
      kind = v % 3;
      idx  = $urandom_range(0, (kind == 1) ? M - 1 : M - 2);
      e    = M'(rand_bits(M)) | M'(1);
      if (kind == 1) b[idx] = 1'b1;
      case (kind)
        0: fa[idx] = e;
        1: fp[idx] = e;
        default: fs[idx] = e;
      endcase
      @(posedge clk);
      if (ref_mod(rpoly_t'(e), M, 128'h25, 5) == '0)
        check(!err, "multiple of g(x) flagged");
      else begin
        check(err && flagged_modules() == 1, $sformatf("kind %0d idx %0d not located", kind, idx));
        n_located++;
      end
    end
    check(n_located > 0, "no fault located");
    finish_test();
  end
endmodule
