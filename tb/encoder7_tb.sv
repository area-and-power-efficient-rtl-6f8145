// encoder7_tb: checks the 7-bit window encoder.
//
// For every input 0..127 the 11-bit code is decoded independently
// (A = {1,3,5,7}, value = A(m1)<<n1 +/- A(m2)<<n2) and must give the input
// back. The two published examples, 125 -> 00_111_01_0_000 and
// 96 -> 00_101_00_1_110, are checked bit for bit.
module encoder7_tb;
  import fdp_pkg::*;
  logic [6:0] x;
  enc7_t      code;
  int checks = 0, failures = 0;

  encoder7 dut (.x(x), .code(code));

  function automatic int decode(enc7_t c);
    int t1, t2;
    t1 = (2 * int'(c.m1) + 1) << c.n1;
    t2 = (2 * int'(c.m2) + 1) << c.n2;
    return c.s2 ? t1 + t2 : t1 - t2;
  endfunction

  initial begin
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      #1;
      checks++;
      if (decode(code) != v) begin
        failures++;
        $display("FAIL: %0d encoded as %b decodes to %0d", v, code, decode(code));
      end
    end
    x = 7'd125; #1; checks++;
    if (code !== 11'b00_111_01_0_000) begin failures++; $display("FAIL: 125 -> %b", code); end
    x = 7'd96;  #1; checks++;
    if (code !== 11'b00_101_00_1_110) begin failures++; $display("FAIL: 96 -> %b", code); end
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
