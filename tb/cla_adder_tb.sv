// cla_adder_tb: checks the carry-lookahead adder against '+' at three
// widths (48, 13 and 4 bits, so whole and partial lookahead groups), with
// random operands, all-ones carry chains and both carry-in values.
module cla_adder_tb;
  int checks = 0, failures = 0;

  logic [47:0] a48, b48, s48;  logic c48, ci48;
  logic [12:0] a13, b13, s13;  logic c13, ci13;
  logic [3:0]  a4,  b4,  s4;   logic c4,  ci4;

  cla_adder #(.WIDTH(48)) d48 (.a(a48), .b(b48), .cin(ci48), .sum(s48), .cout(c48));
  cla_adder #(.WIDTH(13)) d13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(c13));
  cla_adder #(.WIDTH(4))  d4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(c4));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [48:0] e48; logic [13:0] e13; logic [4:0] e4;
      a48 = {$urandom(), $urandom()}; b48 = {$urandom(), $urandom()};
      a13 = 13'($urandom());          b13 = 13'($urandom());
      a4  = 4'($urandom());           b4  = 4'($urandom());
      if (n % 7 == 0) begin b48 = ~a48; b13 = ~a13; b4 = ~a4; end   // full propagate chains
      ci48 = 1'($urandom()); ci13 = 1'($urandom()); ci4 = 1'($urandom());
      #1;
      e48 = 49'(a48) + 49'(b48) + 49'(ci48);
      e13 = 14'(a13) + 14'(b13) + 14'(ci13);
      e4  = 5'(a4) + 5'(b4) + 5'(ci4);
      checks += 3;
      if ({c48, s48} !== e48) begin failures++; $display("FAIL 48: %h+%h+%b = %h", a48, b48, ci48, {c48, s48}); end
      if ({c13, s13} !== e13) begin failures++; $display("FAIL 13: %h+%h+%b = %h", a13, b13, ci13, {c13, s13}); end
      if ({c4, s4}   !== e4)  begin failures++; $display("FAIL 4: %h+%h+%b = %h",  a4,  b4,  ci4,  {c4, s4}); end
    end
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
