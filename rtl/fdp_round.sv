// fdp_round: rounding, exponent adjust, exceptions and packing.
//
// The normalized significand (leading one at bit AW-1) is rounded to
// MAN_W fraction bits, round to nearest, ties to even: the bit below the
// fraction is the round bit, the OR of the rest is sticky. A carry out of
// the fraction increments the exponent. Then, in priority order:
//  - NaN (spec_nan): the quiet NaN 0/all-ones/100..0, flag invalid;
//  - infinite product (spec_inf): infinity with spec_sign;
//  - zero sum (is_zero): a zero with zero_sign, flag cancel when some product
//    was nonzero (nonzero_in);
//  - exponent >= all ones: infinity, flag overflow;
//  - exponent <= 0: zero of the result's sign, flag underflow (subnormal
//    results are flushed);
//  - otherwise {sign, exponent, fraction}.
//
// Combinational.
module fdp_round
  import fdp_pkg::*;
#(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  parameter int unsigned AW    = 53,
  parameter int unsigned ERW   = EXP_W + 3,
  parameter int unsigned FW    = 1 + EXP_W + MAN_W
) (
  input  logic                  sign,
  input  logic [AW-1:0]         mant,
  input  logic signed [ERW-1:0] exp_r,
  input  logic                  is_zero,
  input  logic                  zero_sign,
  input  logic                  nonzero_in,
  input  logic                  spec_nan,
  input  logic                  spec_inf,
  input  logic                  spec_sign,
  output logic [FW-1:0]         result,
  output fdp_flags_t            flags
);

  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  logic [MAN_W-1:0]      frac;
  logic                  rnd, sticky, lsb, inc;
  logic [MAN_W:0]        frac_r;
  logic signed [ERW-1:0] exp_f;
  logic                  mant_top_unused;

  always_comb begin
    mant_top_unused = mant[AW-1];
    frac   = mant[AW-2 -: MAN_W];
    rnd    = mant[AW-2-MAN_W];
    sticky = |mant[AW-3-MAN_W:0];
    lsb    = frac[0];
    inc    = rnd & (sticky | lsb);
    frac_r = {1'b0, frac} + (MAN_W+1)'(inc);
    exp_f  = exp_r + ERW'(frac_r[MAN_W]);

    flags  = '0;
    if (spec_nan) begin
      result        = {1'b0, EXP_MAX, 1'b1, {(MAN_W-1){1'b0}}};
      flags.invalid = 1'b1;
    end else if (spec_inf) begin
      result = {spec_sign, EXP_MAX, {MAN_W{1'b0}}};
    end else if (is_zero) begin
      result       = {zero_sign, {(EXP_W+MAN_W){1'b0}}};
      flags.cancel = nonzero_in;
    end else if (exp_f >= signed'(ERW'(EXP_MAX))) begin
      result         = {sign, EXP_MAX, {MAN_W{1'b0}}};
      flags.overflow = 1'b1;
    end else if (exp_f <= 0) begin
      result          = {sign, {(EXP_W+MAN_W){1'b0}}};
      flags.underflow = 1'b1;
    end else begin
      // a carry out of the fraction leaves frac_r[MAN_W-1:0] = 0, as required
      result = {sign, exp_f[EXP_W-1:0], frac_r[MAN_W-1:0]};
    end
  end

endmodule
