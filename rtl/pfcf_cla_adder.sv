// pfcf_cla_adder: two-stage pipelined carry-lookahead adder built on the
// feedforward-cutset-free (FCF) idea.
//
// Stage 1 adds the low halves of a and b with a CLA and keeps their carry
// out in a single flip-flop; the high halves are added in the same cycle
// without waiting for that carry. Stage 2 (after the register) folds the
// stored carry into the high half with a CLA incrementer. A conventional
// pipelined adder would instead register the high operand halves and the
// carry (WIDTH/2*2+1 flip-flops beside the result); here the only extra
// flip-flop is the carry. The two-stage split follows the published
// accumulator; the equal halves are this design's choice.
//
// Timing: a and b are sampled at a rising edge of clk; sum = a + b
// (mod 2^WIDTH) is valid after that edge, combinationally from the stage
// registers, until the next edge. No enable: a new addition every cycle.
// Reset (active low, asynchronous) clears the stage registers.
module pfcf_cla_adder #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  localparam int unsigned LO_W = WIDTH / 2;
  localparam int unsigned HI_W = WIDTH - LO_W;

  // Stage 1
  logic [LO_W-1:0] lo_s1;
  logic            lo_cout;
  logic [HI_W-1:0] hi_s1;
  logic            hi_cout_unused;

  cla_adder #(.WIDTH(LO_W)) u_lo (
    .a(a[LO_W-1:0]), .b(b[LO_W-1:0]), .cin(1'b0), .sum(lo_s1), .cout(lo_cout)
  );

  cla_adder #(.WIDTH(HI_W)) u_hi (
    .a(a[WIDTH-1:LO_W]), .b(b[WIDTH-1:LO_W]), .cin(1'b0), .sum(hi_s1), .cout(hi_cout_unused)
  );

  // Stage registers: the sums plus the single feedforward carry flip-flop.
  logic [LO_W-1:0] lo_q;
  logic [HI_W-1:0] hi_q;
  logic            carry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q    <= '0;
      hi_q    <= '0;
      carry_q <= 1'b0;
    end else begin
      lo_q    <= lo_s1;
      hi_q    <= hi_s1;
      carry_q <= lo_cout;
    end
  end

  // Stage 2: absorb the carry into the high half.
  logic [HI_W-1:0] hi_s2;
  logic            hi2_cout_unused;

  cla_adder #(.WIDTH(HI_W)) u_inc (
    .a(hi_q), .b('0), .cin(carry_q), .sum(hi_s2), .cout(hi2_cout_unused)
  );

  assign sum = {hi_s2, lo_q};

endmodule
