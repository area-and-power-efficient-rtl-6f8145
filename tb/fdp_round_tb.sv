// fdp_round_tb: checks rounding and packing (single precision, AW = 53).
// The expected value is worked out with integer arithmetic: keep the top
// 24 bits, compare the rest with one half, round ties to even, renormalize
// on a carry, then apply the exception rules (NaN, infinity, zero sum,
// overflow, underflow) in the design's priority order.
module fdp_round_tb;
  import fdp_pkg::*;
  localparam int EXP_W = 8, MAN_W = 23, AW = 53, ERW = 11, FW = 32;
  int checks = 0, failures = 0;
  int n_up = 0, n_tie = 0, n_ovf = 0, n_unf = 0;

  logic                  sign, is_zero, zero_sign, nonzero_in, spec_nan, spec_inf, spec_sign;
  logic [AW-1:0]         mant;
  logic signed [ERW-1:0] exp_r;
  logic [FW-1:0]         result;
  fdp_flags_t            flags;

  fdp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W), .AW(AW), .ERW(ERW), .FW(FW)) dut (.*);

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [63:0]  keep, rem, half;
      int           e;
      logic [FW-1:0] want;
      fdp_flags_t   wf;
      mant = {1'b1, 52'({$urandom(), $urandom()})};
      if (n % 5 == 0) mant[28:0] = {1'b1, 28'd0};                 // exact tie
      if (n % 7 == 0) mant[AW-1:29] = '1;                          // carry out of the fraction
      exp_r      = ERW'($urandom_range(0, 300)) - ERW'(20);
      sign       = 1'($urandom());
      is_zero    = ($urandom_range(0, 19) == 0);
      zero_sign  = 1'($urandom());
      nonzero_in = 1'($urandom());
      spec_nan   = ($urandom_range(0, 29) == 0);
      spec_inf   = ($urandom_range(0, 29) == 0);
      spec_sign  = 1'($urandom());
      #1;
      keep = 64'(mant >> 29);
      rem  = 64'(mant[28:0]);
      half = 64'(1) << 28;
      e    = int'(exp_r);
      if (rem > half || (rem == half && keep[0])) begin
        keep++;
        n_up++;
      end
      if (rem == half) n_tie++;
      if (keep[24]) begin keep >>= 1; e++; end
      wf = '0;
      if (spec_nan) begin
        want = 32'h7FC00000; wf.invalid = 1;
      end else if (spec_inf) begin
        want = {spec_sign, 8'hFF, 23'd0};
      end else if (is_zero) begin
        want = {zero_sign, 31'd0}; wf.cancel = nonzero_in;
      end else if (e >= 255) begin
        want = {sign, 8'hFF, 23'd0}; wf.overflow = 1; n_ovf++;
      end else if (e <= 0) begin
        want = {sign, 31'd0}; wf.underflow = 1; n_unf++;
      end else begin
        want = {sign, 8'(e), keep[22:0]};
      end
      checks += 2;
      if (result !== want) begin failures++; $display("FAIL: mant %h exp %0d result %h expected %h", mant, exp_r, result, want); end
      if (flags !== wf) begin failures++; $display("FAIL: flags %b expected %b", flags, wf); end
    end
    checks++;
    if (n_up == 0 || n_tie == 0 || n_ovf == 0 || n_unf == 0) begin failures++; $display("FAIL: a rounding case was not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
