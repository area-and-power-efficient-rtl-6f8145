// radix2r_multiplier_tb: checks the radix-2^r multiplier at 24, 32 and 53
// bits against '*'. Random and corner operands (zero, all ones, windows of
// 127) go in every cycle; each product must appear one cycle later.
module radix2r_multiplier_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [23:0] x24, y24;  logic [47:0]  p24, e24;
  logic [31:0] x32, y32;  logic [63:0]  p32, e32;
  logic [52:0] x53, y53;  logic [105:0] p53, e53;
  logic        have;

  radix2r_multiplier #(.WIDTH(24)) d24 (.clk, .rst_n, .x(x24), .y(y24), .product(p24));
  radix2r_multiplier #(.WIDTH(32)) d32 (.clk, .rst_n, .x(x32), .y(y32), .product(p32));
  radix2r_multiplier #(.WIDTH(53)) d53 (.clk, .rst_n, .x(x53), .y(y53), .product(p53));

  function automatic logic [63:0] pick(int n);
    case (n % 6)
      0: return '0;
      1: return '1;
      2: return 64'h7F7F_7F7F_7F7F_7F7F;
      default: return {$urandom(), $urandom()};
    endcase
  endfunction

  initial begin
    have = 1'b0;
    x24 = '0; y24 = '0; x32 = '0; y32 = '0; x53 = '0; y53 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (have) begin
        checks += 3;
        if (p24 !== e24) begin failures++; $display("FAIL 24: %h*%h = %h expected %h", x24, y24, p24, e24); end
        if (p32 !== e32) begin failures++; $display("FAIL 32: %h*%h = %h expected %h", x32, y32, p32, e32); end
        if (p53 !== e53) begin failures++; $display("FAIL 53: %h*%h = %h expected %h", x53, y53, p53, e53); end
      end
      x24 = 24'(pick(n < 40 ? n : 5)); y24 = 24'(pick(n < 40 ? n / 6 : 5));
      x32 = 32'(pick(n < 40 ? n : 5)); y32 = 32'(pick(n < 40 ? n / 6 : 5));
      x53 = 53'(pick(n < 40 ? n : 5)); y53 = 53'(pick(n < 40 ? n / 6 : 5));
      e24 = 48'(x24) * 48'(y24);
      e32 = 64'(x32) * 64'(y32);
      e53 = 106'(x53) * 106'(y53);
      have = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
