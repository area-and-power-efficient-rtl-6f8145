// fdp_exp_compare: exponent compare stage of the fused dot product unit.
//
// Each product carries the sum of its operands' biased exponents
// (Ea + Eb, one bit wider than an IEEE exponent). The stage finds the
// largest one, emax, and for every product the distance emax - ep_i that its
// significand has to be shifted right to line up with the largest product.
// Distances beyond MAX_SHIFT are clamped to MAX_SHIFT, which the alignment
// stage treats as "everything shifted out". A zero product (zero[i]) takes
// no part in the maximum and gets the clamped distance.
//
// Combinational.
module fdp_exp_compare #(
  parameter int unsigned N_TERMS   = 2,
  parameter int unsigned PEW       = 9,    // product exponent width (EXP_W + 1)
  parameter int unsigned MAX_SHIFT = 51,   // clamp for the distances
  parameter int unsigned DW        = $clog2(MAX_SHIFT + 1)
) (
  input  logic [PEW-1:0] ep   [N_TERMS],
  input  logic           zero [N_TERMS],
  output logic [PEW-1:0] emax,
  output logic [DW-1:0]  shamt [N_TERMS]
);

  always_comb begin
    emax = '0;
    for (int i = 0; i < N_TERMS; i++)
      if (!zero[i] && ep[i] > emax) emax = ep[i];

    for (int i = 0; i < N_TERMS; i++) begin
      logic [PEW-1:0] diff;
      diff = emax - ep[i];
      if (zero[i] || diff >= PEW'(MAX_SHIFT)) shamt[i] = DW'(MAX_SHIFT);
      else                                    shamt[i] = DW'(diff);
    end
  end

endmodule
