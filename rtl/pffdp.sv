// pffdp: pipelined fused floating-point dot product unit.
//
// Computes  result = round( sum_i a[i]*b[i] ),  i = 0..N_TERMS-1, for IEEE-754
// binary operands (EXP_W = 8, MAN_W = 23 for single precision, 11/52 for
// double), with one rounding (nearest, ties to even) for the whole sum:
// the products and their sum are kept exact up to a sticky bit.
//
// Four pipeline stages, one new operand set per cycle:
//  1. unpack, sign XOR, exponent add (Ea+Eb), special operands, and the
//     radix-2^r significand multipliers up to the first half of their PFCF
//     root adder;
//  2. multiplier root carry, exponent compare, alignment with sticky,
//     one's complement of negative products, 3:2 carry-save reduction with
//     the +1 corrections, first half of the PFCF-CLA adder, and in parallel
//     the leading zero anticipation on the two carry-save vectors;
//  3. second half of the PFCF-CLA adder (carry into the high half),
//     magnitude, cancellation detect, normalization shift with 1-bit LZA
//     correction, exponent;
//  4. rounding, exponent adjust, exceptions, packing.
// The stage split follows the published four-stage flow (multiplier,
// alignment/2's complement, addition, LZA/normalization/rounding); exactly
// where each register sits is this design's choice.
//
// Number handling chosen for this design: a zero exponent field is read as
// zero (subnormal inputs are flushed), subnormal results are flushed to a
// signed zero (flag underflow), overflow gives infinity, a NaN operand,
// inf*0 or +inf + -inf gives the quiet NaN. An exactly zero sum is +0 unless
// every product is -0.
//
// Timing: a, b are sampled with in_valid at a rising edge; result, flags and
// out_valid appear 4 rising edges later (latency 4, throughput 1 per cycle).
// rst_n is an active-low asynchronous reset of the control state.
module pffdp
  import fdp_pkg::*;
#(
  parameter int unsigned EXP_W   = 8,
  parameter int unsigned MAN_W   = 23,
  parameter int unsigned N_TERMS = 2,
  localparam int unsigned FW     = 1 + EXP_W + MAN_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [FW-1:0] a [N_TERMS],
  input  logic [FW-1:0] b [N_TERMS],
  output logic          out_valid,
  output logic [FW-1:0] result,
  output fdp_flags_t    flags
);

  localparam int unsigned SW        = MAN_W + 1;                 // significand
  localparam int unsigned PW        = 2 * SW;                    // product
  localparam int unsigned HEAD      = $clog2(N_TERMS) + 1;       // growth + sign
  localparam int unsigned AW        = HEAD + PW + GUARD_W;       // aligned term
  localparam int unsigned PEW       = EXP_W + 1;                 // Ea + Eb
  localparam int unsigned MAX_SHIFT = PW + GUARD_W;
  localparam int unsigned DW        = $clog2(MAX_SHIFT + 1);
  localparam int unsigned CW        = $clog2(AW + 1);
  localparam int unsigned ERW       = EXP_W + 3;
  localparam logic [EXP_W-1:0] EXP_ONES = '1;

  // ================================================================ stage 1
  logic [SW-1:0]  sig_a [N_TERMS], sig_b [N_TERMS];
  logic [PEW-1:0] ep_s1 [N_TERMS];
  logic           sgn_s1 [N_TERMS], zero_s1 [N_TERMS];
  logic           nan_s1, inf_s1, inf_sign_s1;

  always_comb begin
    logic pos_inf, neg_inf;
    nan_s1  = 1'b0;
    pos_inf = 1'b0;
    neg_inf = 1'b0;
    for (int i = 0; i < N_TERMS; i++) begin
      logic [EXP_W-1:0] ea, eb;
      logic [MAN_W-1:0] ma, mb;
      logic za, zb, ia, ib, na, nb;
      ea = a[i][FW-2 -: EXP_W];
      eb = b[i][FW-2 -: EXP_W];
      ma = a[i][MAN_W-1:0];
      mb = b[i][MAN_W-1:0];
      za = (ea == '0);
      zb = (eb == '0);
      ia = (ea == EXP_ONES) && (ma == '0);
      ib = (eb == EXP_ONES) && (mb == '0);
      na = (ea == EXP_ONES) && (ma != '0);
      nb = (eb == EXP_ONES) && (mb != '0);
      sgn_s1[i]  = a[i][FW-1] ^ b[i][FW-1];
      zero_s1[i] = za | zb;
      if (na | nb | (ia & zb) | (za & ib)) nan_s1 = 1'b1;
      else if (ia | ib) begin
        if (sgn_s1[i]) neg_inf = 1'b1;
        else           pos_inf = 1'b1;
      end
      sig_a[i] = za ? '0 : {1'b1, ma};
      sig_b[i] = zb ? '0 : {1'b1, mb};
      ep_s1[i] = (za | zb) ? '0 : PEW'(ea) + PEW'(eb);
    end
    if (pos_inf & neg_inf) nan_s1 = 1'b1;
    inf_s1      = pos_inf | neg_inf;
    inf_sign_s1 = neg_inf;
  end

  logic [PW-1:0]  prod   [N_TERMS];   // valid in stage 2
  for (genvar i = 0; i < N_TERMS; i++) begin : g_mul
    radix2r_multiplier #(.WIDTH(SW)) u_mul (
      .clk(clk), .rst_n(rst_n), .x(sig_a[i]), .y(sig_b[i]), .product(prod[i])
    );
  end

  logic           v_q1;
  logic [PEW-1:0] ep_q1   [N_TERMS];
  logic           sgn_q1  [N_TERMS], zero_q1 [N_TERMS];
  logic           nan_q1, inf_q1, inf_sign_q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q1 <= 1'b0;
    else        v_q1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    ep_q1       <= ep_s1;
    sgn_q1      <= sgn_s1;
    zero_q1     <= zero_s1;
    nan_q1      <= nan_s1;
    inf_q1      <= inf_s1;
    inf_sign_q1 <= inf_sign_s1;
  end

  // ================================================================ stage 2
  logic [PEW-1:0] emax_s2;
  logic [DW-1:0]  shamt_s2 [N_TERMS];
  logic [AW-1:0]  term_s2  [N_TERMS];
  logic [AW-1:0]  cs_s, cs_c;
  logic [CW-1:0]  lz_s2;

  fdp_exp_compare #(.N_TERMS(N_TERMS), .PEW(PEW), .MAX_SHIFT(MAX_SHIFT), .DW(DW)) u_cmp (
    .ep(ep_q1), .zero(zero_q1), .emax(emax_s2), .shamt(shamt_s2)
  );

  for (genvar i = 0; i < N_TERMS; i++) begin : g_align
    fdp_align #(.PW(PW), .AW(AW), .DW(DW)) u_align (
      .p(prod[i]), .shamt(shamt_s2[i]), .neg(sgn_q1[i]), .v(term_s2[i])
    );
  end

  csa_reduce #(.N_TERMS(N_TERMS), .AW(AW)) u_csa (
    .v(term_s2), .neg(sgn_q1), .s(cs_s), .c(cs_c)
  );

  lza #(.W(AW), .CW(CW)) u_lza (.a(cs_s), .b(cs_c), .count(lz_s2));

  logic [AW-1:0] sum_s3;   // valid in stage 3
  pfcf_cla_adder #(.WIDTH(AW)) u_add (
    .clk(clk), .rst_n(rst_n), .a(cs_s), .b(cs_c), .sum(sum_s3)
  );

  logic           zero_sign_s2, nonzero_s2;
  always_comb begin
    zero_sign_s2 = 1'b1;
    nonzero_s2   = 1'b0;
    for (int i = 0; i < N_TERMS; i++) begin
      zero_sign_s2 &= zero_q1[i] & sgn_q1[i];
      nonzero_s2   |= ~zero_q1[i];
    end
  end

  logic           v_q2;
  logic [PEW-1:0] emax_q2;
  logic [CW-1:0]  lz_q2;
  logic           zero_sign_q2, nonzero_q2, nan_q2, inf_q2, inf_sign_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q2 <= 1'b0;
    else        v_q2 <= v_q1;
  end

  always_ff @(posedge clk) begin
    emax_q2      <= emax_s2;
    lz_q2        <= lz_s2;
    zero_sign_q2 <= zero_sign_s2;
    nonzero_q2   <= nonzero_s2;
    nan_q2       <= nan_q1;
    inf_q2       <= inf_q1;
    inf_sign_q2  <= inf_sign_q1;
  end

  // ================================================================ stage 3
  logic                  sign_s3, is_zero_s3;
  logic [AW-1:0]         mant_s3;
  logic signed [ERW-1:0] exp_s3;

  fdp_normalize #(.EXP_W(EXP_W), .AW(AW), .HEAD(HEAD), .PEW(PEW), .CW(CW), .ERW(ERW)) u_norm (
    .sum(sum_s3), .lz_pred(lz_q2), .emax(emax_q2),
    .sign(sign_s3), .is_zero(is_zero_s3), .mant(mant_s3), .exp_r(exp_s3)
  );

  logic                  v_q3;
  logic                  sign_q3, is_zero_q3;
  logic [AW-1:0]         mant_q3;
  logic signed [ERW-1:0] exp_q3;
  logic                  zero_sign_q3, nonzero_q3, nan_q3, inf_q3, inf_sign_q3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q3 <= 1'b0;
    else        v_q3 <= v_q2;
  end

  always_ff @(posedge clk) begin
    sign_q3      <= sign_s3;
    is_zero_q3   <= is_zero_s3;
    mant_q3      <= mant_s3;
    exp_q3       <= exp_s3;
    zero_sign_q3 <= zero_sign_q2;
    nonzero_q3   <= nonzero_q2;
    nan_q3       <= nan_q2;
    inf_q3       <= inf_q2;
    inf_sign_q3  <= inf_sign_q2;
  end

  // ================================================================ stage 4
  logic [FW-1:0] result_s4;
  fdp_flags_t    flags_s4;

  fdp_round #(.EXP_W(EXP_W), .MAN_W(MAN_W), .AW(AW), .ERW(ERW), .FW(FW)) u_round (
    .sign(sign_q3), .mant(mant_q3), .exp_r(exp_q3), .is_zero(is_zero_q3),
    .zero_sign(zero_sign_q3), .nonzero_in(nonzero_q3),
    .spec_nan(nan_q3), .spec_inf(inf_q3), .spec_sign(inf_sign_q3),
    .result(result_s4), .flags(flags_s4)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
    end else begin
      out_valid <= v_q3;
      result    <= result_s4;
      flags     <= flags_s4;
    end
  end

endmodule
