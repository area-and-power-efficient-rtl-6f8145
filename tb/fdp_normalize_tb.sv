// fdp_normalize_tb: checks the normalization stage (single precision,
// two products: AW = 53, HEAD = 2). Random two's-complement sums are given
// with a leading-zero prediction that is exact, one short or one over; the
// stage must return the sign, the magnitude shifted so that its leading one
// is at the top, the exponent emax - 127 + 3 - lz and the zero flag.
module fdp_normalize_tb;
  localparam int EXP_W = 8, AW = 53, HEAD = 2, PEW = 9, CW = 6, ERW = 11;
  int checks = 0, failures = 0;
  int n_short = 0, n_over = 0;

  logic [AW-1:0]         sum;
  logic [CW-1:0]         lz_pred;
  logic [PEW-1:0]        emax;
  logic                  sign, is_zero;
  logic [AW-1:0]         mant;
  logic signed [ERW-1:0] exp_r;

  fdp_normalize #(.EXP_W(EXP_W), .AW(AW), .HEAD(HEAD), .PEW(PEW), .CW(CW), .ERW(ERW)) dut (
    .sum, .lz_pred, .emax, .sign, .is_zero, .mant, .exp_r);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic signed [AW-1:0] s;
      logic [AW-1:0] mag, want;
      int t, p, e;
      s = AW'(signed'({$urandom(), $urandom()})) >>> $urandom_range(1, AW - 1);
      if (n % 50 == 0) s = '0;
      sum  = s;
      emax = PEW'($urandom_range(2, 508));
      mag  = s < 0 ? -s : s;
      t = AW;
      for (int i = AW - 1; i >= 0; i--) if (mag[i]) begin t = AW - 1 - i; break; end
      p = t + int'($urandom_range(0, 2)) - 1;
      if (p < 0) p = 0;
      if (p > AW - 1) p = AW - 1;
      if (p < t) n_short++;
      if (p > t) n_over++;
      lz_pred = CW'(p);
      #1;
      checks += 2;
      if (is_zero !== (s == 0)) begin failures++; $display("FAIL: zero flag for %h", s); end
      if (sign !== s[AW-1]) begin failures++; $display("FAIL: sign for %h", s); end
      if (s != 0) begin
        want = mag << t;
        e = int'(emax) - 127 + HEAD + 1 - t;
        checks += 2;
        if (mant !== want) begin failures++; $display("FAIL: s=%h pred %0d mant %h expected %h", s, p, mant, want); end
        if (int'(exp_r) != e) begin failures++; $display("FAIL: s=%h exp %0d expected %0d", s, exp_r, e); end
      end
    end
    checks++;
    if (n_short == 0 || n_over == 0) begin failures++; $display("FAIL: corrections not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
