// fdp_exp_compare_tb: checks the exponent compare stage with three
// product exponents: the maximum over nonzero products, each distance,
// the clamp at MAX_SHIFT and the distance of zero products.
module fdp_exp_compare_tb;
  localparam int N = 3, PEW = 9, MAXS = 51, DW = 6;
  int checks = 0, failures = 0;

  logic [PEW-1:0] ep [N];
  logic           zero [N];
  logic [PEW-1:0] emax;
  logic [DW-1:0]  shamt [N];

  fdp_exp_compare #(.N_TERMS(N), .PEW(PEW), .MAX_SHIFT(MAXS), .DW(DW)) dut (.ep, .zero, .emax, .shamt);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int m, d;
      for (int i = 0; i < N; i++) begin
        ep[i]   = (n % 2) ? PEW'($urandom_range(200, 300)) : PEW'($urandom_range(1, 510));
        zero[i] = ($urandom_range(0, 5) == 0);
      end
      #1;
      m = 0;
      for (int i = 0; i < N; i++) if (!zero[i] && int'(ep[i]) > m) m = int'(ep[i]);
      checks++;
      if (int'(emax) != m) begin failures++; $display("FAIL: emax %0d expected %0d", emax, m); end
      for (int i = 0; i < N; i++) begin
        d = zero[i] ? MAXS : m - int'(ep[i]);
        if (d > MAXS) d = MAXS;
        checks++;
        if (int'(shamt[i]) != d) begin failures++; $display("FAIL: shift %0d = %0d expected %0d", i, shamt[i], d); end
      end
    end
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
