// csa_reduce_tb: checks carry-save reduction for 2 and 4 terms: the sum and
// carry vectors must add up to the sum of the inputs plus one for every
// negative term, modulo 2^AW.
module csa_reduce_tb;
  localparam int AW = 53;
  int checks = 0, failures = 0;

  logic [AW-1:0] v2 [2], v4 [4];
  logic          n2 [2], n4 [4];
  logic [AW-1:0] s2, c2, s4, c4;

  csa_reduce #(.N_TERMS(2), .AW(AW)) d2 (.v(v2), .neg(n2), .s(s2), .c(c2));
  csa_reduce #(.N_TERMS(4), .AW(AW)) d4 (.v(v4), .neg(n4), .s(s4), .c(c4));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [AW-1:0] e2, e4;
      e2 = '0; e4 = '0;
      for (int i = 0; i < 2; i++) begin
        v2[i] = AW'({$urandom(), $urandom()}); n2[i] = 1'($urandom());
        e2 += v2[i] + AW'(n2[i]);
      end
      for (int i = 0; i < 4; i++) begin
        v4[i] = AW'({$urandom(), $urandom()}); n4[i] = 1'($urandom());
        e4 += v4[i] + AW'(n4[i]);
      end
      #1;
      checks += 2;
      if (AW'(s2 + c2) !== e2) begin failures++; $display("FAIL 2 terms"); end
      if (AW'(s4 + c4) !== e4) begin failures++; $display("FAIL 4 terms"); end
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
