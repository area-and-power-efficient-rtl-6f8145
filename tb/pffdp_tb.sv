// pffdp_tb: self-checking testbench of the pipelined fused dot product unit.
//
// Three configurations run at once, each fed by fdp_tb_driver and checked
// against an exact reference: single precision with two products (the
// default), double precision with two products, and single precision with
// three products on short fractions. Results, all four flags and the
// four-cycle latency are checked; each exception path has to occur.
module pffdp_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done   [3];
  int   chk    [3], fail [3], ncan [3], novf [3], nunf [3], ninv [3], nneg [3];

  fdp_tb_driver #(.EXP_W(8),  .MAN_W(23), .N_TERMS(2), .NVEC(3000), .SEED(11)) d_sp (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_cancel(ncan[0]),
    .n_overflow(novf[0]), .n_underflow(nunf[0]), .n_invalid(ninv[0]), .n_negative(nneg[0]));
  fdp_tb_driver #(.EXP_W(11), .MAN_W(52), .N_TERMS(2), .NVEC(1000), .SEED(22)) d_dp (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_cancel(ncan[1]),
    .n_overflow(novf[1]), .n_underflow(nunf[1]), .n_invalid(ninv[1]), .n_negative(nneg[1]));
  fdp_tb_driver #(.EXP_W(8),  .MAN_W(23), .N_TERMS(3), .NVEC(1000), .SEED(33), .SHORT_MANT(1)) d_n3 (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_cancel(ncan[2]),
    .n_overflow(novf[2]), .n_underflow(nunf[2]), .n_invalid(ninv[2]), .n_negative(nneg[2]));

  int checks, failures;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    repeat (2) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks   += chk[i];
      failures += fail[i];
      $display("config %0d: checks=%0d failures=%0d cancel=%0d overflow=%0d underflow=%0d invalid=%0d negative=%0d",
               i, chk[i], fail[i], ncan[i], novf[i], nunf[i], ninv[i], nneg[i]);
      checks += 1;
      if (ncan[i] == 0 || nneg[i] == 0) begin failures++; $display("FAIL: config %0d missed cancellation or negative sums", i); end
      if (i < 2) begin
        checks += 1;
        if (novf[i] == 0 || nunf[i] == 0 || ninv[i] == 0) begin
          failures++; $display("FAIL: config %0d missed an exception path", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
