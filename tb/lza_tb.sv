// lza_tb: checks the leading zero anticipator on 53-bit two's-complement
// addend pairs, many of them nearly cancelling. For a nonzero sum the
// predicted count must be within one of the true leading-zero count of
// |a+b|. How often it is exact, one short or one over is printed.
module lza_tb;
  localparam int W = 53, CW = 6;
  int checks = 0, failures = 0;
  int exact = 0, off = 0, over = 0, under = 0;

  logic [W-1:0]  a, b;
  logic [CW-1:0] count;

  lza #(.W(W), .CW(CW)) dut (.a, .b, .count);

  function automatic int lzc(logic [W-1:0] x);
    for (int i = W - 1; i >= 0; i--) if (x[i]) return W - 1 - i;
    return W;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic signed [W-1:0] sa, sb, s;
      logic [W-1:0] mag;
      int t;
      // operands within +/-2^(W-3) so that the sum cannot overflow
      sa = W'(signed'({$urandom(), $urandom()})) >>> ($urandom_range(3, W - 2));
      case (n % 3)
        0: sb = W'(signed'({$urandom(), $urandom()})) >>> ($urandom_range(3, W - 2));
        1: sb = -sa + W'(signed'(32'($urandom()))) >>> $urandom_range(0, 31);
        default: sb = -sa + W'($urandom_range(0, 3)) - W'(1);
      endcase
      a = sa; b = sb;
      #1;
      s = sa + sb;
      if (s == 0) continue;
      mag = s < 0 ? -s : s;
      t = lzc(mag);
      checks++;
      if (int'(count) == t) exact++;
      else if (int'(count) == t - 1) begin off++; under++; end
      else if (int'(count) == t + 1) begin off++; over++; end
      else begin failures++; $display("FAIL: a=%h b=%h count %0d true %0d", a, b, count, t); end
    end
    checks++;
    if (exact == 0) begin failures++; $display("FAIL: no exact prediction"); end
    $display("exact=%0d one_short=%0d one_over=%0d", exact, under, over);
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
