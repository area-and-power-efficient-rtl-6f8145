// pfcf_accumulator_tb: checks the feedforward-cutset-free accumulator.
//
// Part 1 replays the published two-segment, 32-bit example: inputs
// 1511B9AD, 0502B9B9, 1606B9BA, then zeros. The register must read
// 1511B9AD one cycle after the first input, 1A13_7366 with a pending carry
// after the second, and the exact sum 301B2D20 with no carry pending two
// cycles after the last input. Every cycle the register and its pending
// carries are also compared with a cycle model of the segmented adder
// written here. Part 2 runs random streams on 2- and 4-segment
// accumulators and checks, after flushing with SEGMENTS-1 zero cycles,
// that the register equals the plain running sum.
module pfcf_accumulator_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clr2, clr4;
  logic [31:0] x2, acc2, x4, acc4;
  logic [0:0]  carry2;
  logic [2:0]  carry4;
  logic        settled2, settled4;

  pfcf_accumulator #(.WIDTH(32), .SEGMENTS(2)) d2 (.clk, .rst_n, .clr(clr2), .x(x2), .acc(acc2), .carry(carry2), .settled(settled2));
  pfcf_accumulator #(.WIDTH(32), .SEGMENTS(4)) d4 (.clk, .rst_n, .clr(clr4), .x(x4), .acc(acc4), .carry(carry4), .settled(settled4));

  // cycle model of the 2-segment accumulator
  logic [15:0] m_lo, m_hi;
  logic        m_c;

  task automatic model_step(input logic [31:0] x);
    logic [16:0] lo;
    lo   = 17'(m_lo) + 17'(x[15:0]);
    m_hi = m_hi + x[31:16] + 16'(m_c);
    m_lo = lo[15:0];
    m_c  = lo[16];
  endtask

  task automatic check2(input string what, input logic [31:0] want, input logic want_c);
    checks++;
    if (acc2 !== want || carry2 !== want_c) begin
      failures++;
      $display("FAIL %s: acc %h carry %b expected %h carry %b", what, acc2, carry2, want, want_c);
    end
  endtask

  initial begin
    logic [31:0] vec [5];
    logic [31:0] ref2, ref4;
    vec = '{32'h1511B9AD, 32'h0502B9B9, 32'h1606B9BA, 32'h0, 32'h0};
    clr2 = 1'b0; clr4 = 1'b0; x2 = '0; x4 = '0;
    m_lo = '0; m_hi = '0; m_c = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Part 1: published example, inputs in cycles 1..5
    for (int c = 0; c < 5; c++) begin
      x2 = vec[c];
      @(negedge clk);
      model_step(vec[c]);
      check2($sformatf("cycle %0d model", c + 2), {m_hi, m_lo}, m_c);
      if (c == 0) check2("cycle 2", 32'h1511B9AD, 1'b0);
      if (c == 1) check2("cycle 3", 32'h1A137366, 1'b1);
      if (c == 3) check2("cycle 5", 32'h301B2D20, 1'b0);
    end
    checks++;
    if (!settled2) begin failures++; $display("FAIL: not settled after flush"); end

    // Part 2: random streams
    for (int run = 0; run < 20; run++) begin
      clr2 = 1'b1; clr4 = 1'b1;
      @(negedge clk);
      clr2 = 1'b0; clr4 = 1'b0;
      ref2 = '0; ref4 = '0;
      for (int n = 0; n < 50; n++) begin
        x2 = $urandom(); x4 = $urandom();
        if (n % 3 == 0) x2 = 32'h0000FFFF;
        ref2 += x2; ref4 += x4;
        @(negedge clk);
      end
      x2 = '0; x4 = '0;
      repeat (3) @(negedge clk);
      checks += 2;
      if (acc2 !== ref2 || !settled2) begin failures++; $display("FAIL: 2-seg acc %h expected %h", acc2, ref2); end
      if (acc4 !== ref4 || !settled4) begin failures++; $display("FAIL: 4-seg acc %h expected %h", acc4, ref4); end
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
