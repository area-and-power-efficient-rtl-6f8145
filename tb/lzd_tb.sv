// lzd_tb: checks the leading zero detector on 53-bit vectors whose leading
// one is placed at every position, with random bits below it, and on zero.
module lzd_tb;
  localparam int W = 53, CW = 6;
  int checks = 0, failures = 0;

  logic [W-1:0]  v;
  logic [CW-1:0] count;
  logic          all_zero;

  lzd #(.W(W), .CW(CW)) dut (.v, .count, .all_zero);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int pos;
      pos = n % (W + 1);                 // W means: no one at all
      v = '0;
      if (pos < W) begin
        v = W'({$urandom(), $urandom()}) & ((W'(1) << pos) - 1);
        v[pos] = 1'b1;
      end
      #1;
      checks += 2;
      if (int'(count) != (pos < W ? W - 1 - pos : W)) begin
        failures++; $display("FAIL: v=%h count %0d", v, count);
      end
      if (all_zero !== (pos == W)) begin failures++; $display("FAIL: all_zero for v=%h", v); end
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
