// pfcf_cla_adder_tb: checks the two-stage FCF adder.
//
// A new random pair (some with long carry chains across the halves) goes in
// every cycle; the sum of the pair sampled at an edge must be on the output
// after that edge (latency one cycle, throughput one per cycle).
module pfcf_cla_adder_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [47:0] a, b, sum, exp_sum;
  logic        have_exp;

  pfcf_cla_adder #(.WIDTH(48)) dut (.clk, .rst_n, .a, .b, .sum);

  initial begin
    a = '0; b = '0; have_exp = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (have_exp) begin
        checks++;
        if (sum !== exp_sum) begin failures++; $display("FAIL: sum %h expected %h", sum, exp_sum); end
      end
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      if (n % 5 == 0) b = (~a) + 48'(1 << $urandom_range(0, 23));   // carry out of the low half
      exp_sum  = a + b;
      have_exp = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
