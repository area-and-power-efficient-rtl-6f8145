// pffdp_top: top level of the fused dot product design.
//
// Two units side by side, each with its own ports:
//  - pffdp, the four-stage pipelined fused floating-point dot product unit
//    (N_TERMS products of IEEE-754 operands, one rounding; single precision
//    by default, double with EXP_W = 11, MAN_W = 52), built from the
//    radix-2^r multipliers and the pipelined feedforward-cutset-free CLA
//    adder;
//  - pfcf_accumulator, the pipelined feedforward-cutset-free accumulator
//    (ACC_W bits in ACC_SEG segments, one carry flip-flop between segments).
//
// Timing: see the two units. The dot product has latency 4 and accepts one
// operand set per cycle; the accumulator adds acc_x every cycle and holds
// its sum with up to ACC_SEG-1 carries pending (acc_carry).
module pffdp_top
  import fdp_pkg::*;
#(
  parameter int unsigned EXP_W   = 8,
  parameter int unsigned MAN_W   = 23,
  parameter int unsigned N_TERMS = 2,
  parameter int unsigned ACC_W   = 32,
  parameter int unsigned ACC_SEG = 2,
  localparam int unsigned FW     = 1 + EXP_W + MAN_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // fused dot product
  input  logic               in_valid,
  input  logic [FW-1:0]      a [N_TERMS],
  input  logic [FW-1:0]      b [N_TERMS],
  output logic               out_valid,
  output logic [FW-1:0]      result,
  output fdp_flags_t         flags,
  // PFCF accumulator
  input  logic               acc_clr,
  input  logic [ACC_W-1:0]   acc_x,
  output logic [ACC_W-1:0]   acc_sum,
  output logic [ACC_SEG-2:0] acc_carry,
  output logic               acc_settled
);

  pffdp #(.EXP_W(EXP_W), .MAN_W(MAN_W), .N_TERMS(N_TERMS)) u_fdp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .result(result), .flags(flags)
  );

  pfcf_accumulator #(.WIDTH(ACC_W), .SEGMENTS(ACC_SEG)) u_acc (
    .clk(clk), .rst_n(rst_n), .clr(acc_clr), .x(acc_x),
    .acc(acc_sum), .carry(acc_carry), .settled(acc_settled)
  );

endmodule
