// fdp_normalize: magnitude, normalization shift and exponent of the sum.
//
// Input is the AW-bit two's-complement sum of the aligned terms, the
// leading-zero count predicted for it by the LZA, and emax, the largest
// product exponent (sum of two biased exponents). The stage
//  - takes the sign and the magnitude |sum|,
//  - detects an exactly zero sum with an OR over all its bits (catastrophic
//    cancellation),
//  - shifts the magnitude left by the predicted count into an AW+1 bit
//    window and corrects the LZA's one-position error either way: a one in
//    the extra top bit means the count was one too large, a zero in bit AW-1
//    means it was one too small,
//  - forms the biased result exponent
//      exp = emax - BIAS + HEAD + 1 - lz,
//    where lz is the corrected leading-zero count and HEAD the number of bits
//    above the product field in the aligned vector. exp may be out of range;
//    fdp_round deals with that.
// The normalized significand has its leading one at bit AW-1.
//
// Combinational.
module fdp_normalize #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned AW    = 53,
  parameter int unsigned HEAD  = 2,
  parameter int unsigned PEW   = EXP_W + 1,
  parameter int unsigned CW    = $clog2(AW + 1),
  parameter int unsigned ERW   = EXP_W + 3
) (
  input  logic [AW-1:0]         sum,
  input  logic [CW-1:0]         lz_pred,
  input  logic [PEW-1:0]        emax,
  output logic                  sign,
  output logic                  is_zero,
  output logic [AW-1:0]         mant,
  output logic signed [ERW-1:0] exp_r
);

  localparam int BIAS = (1 << (EXP_W - 1)) - 1;

  logic [AW-1:0] neg_sum;
  logic          neg_cout_unused;
  logic [AW-1:0] mag;
  logic [AW:0]   shifted;
  logic [CW:0]   lz;

  // |sum| = ~sum + 1 for a negative sum
  cla_adder #(.WIDTH(AW)) u_neg (
    .a(~sum), .b('0), .cin(1'b1), .sum(neg_sum), .cout(neg_cout_unused)
  );

  always_comb begin
    sign    = sum[AW-1];
    is_zero = ~|sum;
    mag     = sign ? neg_sum : sum;
    shifted = {1'b0, mag} << lz_pred;
    if (shifted[AW]) begin
      mant = shifted[AW:1];
      lz   = {1'b0, lz_pred} - 1'b1;
    end else if (shifted[AW-1]) begin
      mant = shifted[AW-1:0];
      lz   = {1'b0, lz_pred};
    end else begin
      mant = {shifted[AW-2:0], 1'b0};
      lz   = {1'b0, lz_pred} + 1'b1;
    end
    exp_r = ERW'(signed'({1'b0, emax})) - ERW'(BIAS) + ERW'(HEAD + 1) - ERW'(signed'({1'b0, lz}));
  end

endmodule
