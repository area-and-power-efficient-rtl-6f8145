// fdp_align_tb: checks alignment of a 48-bit product into a 53-bit field
// (2 head bits, 3 guard bits): right shift, sticky OR of the lost bits into
// the LSB, and one's complement of negative products. The expected value is
// built from the exact shifted product held at full precision.
module fdp_align_tb;
  localparam int PW = 48, AW = 53, DW = 6, G = 3;
  int checks = 0, failures = 0;

  logic [PW-1:0] p;
  logic [DW-1:0] shamt;
  logic          neg;
  logic [AW-1:0] v;

  fdp_align #(.PW(PW), .AW(AW), .DW(DW)) dut (.p, .shamt, .neg, .v);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [127:0] exact;
      logic [AW-1:0] mag, want;
      logic          lost;
      p     = {1'b1, 47'({$urandom(), $urandom()})};
      if (n % 4 == 0) p = p & ~((48'd1 << $urandom_range(0, 40)) - 1);   // trailing zeros
      shamt = DW'($urandom_range(0, 51));
      neg   = 1'($urandom());
      #1;
      exact = 128'(p) << (G + 64);               // 64 extra fraction bits below the field
      exact = exact >> shamt;
      lost  = |exact[63:0];
      mag   = AW'(exact >> 64) | AW'(lost);
      want  = neg ? ~mag : mag;
      checks++;
      if (v !== want) begin failures++; $display("FAIL: p=%h s=%0d neg=%b v=%h expected %h", p, shamt, neg, v, want); end
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
