// fdp_align: alignment and two's-complement preparation of one product.
//
// The PW-bit product significand p is placed in an AW-bit field with
// AW-PW-GUARD_W zero bits above it (room for the sum of several terms and
// the sign) and GUARD_W zero bits below it, then shifted right by shamt.
// Bits shifted out of the bottom are ORed into the lowest bit (sticky).
// A negative product is one's-complemented here; the +1 that completes its
// two's complement is added by the carry-save reduction (csa_reduce), so no
// carry-propagate adder is needed per term.
//
// Combinational.
module fdp_align
  import fdp_pkg::*;
#(
  parameter int unsigned PW = 48,
  parameter int unsigned AW = 53,
  parameter int unsigned DW = 6
) (
  input  logic [PW-1:0] p,
  input  logic [DW-1:0] shamt,
  input  logic          neg,
  output logic [AW-1:0] v
);

  localparam int unsigned EW = PW + GUARD_W;   // significand plus guard bits

  logic [2*EW-1:0] wide;
  logic [AW-1:0]   mag;
  logic            sticky;

  always_comb begin
    wide   = {p, {GUARD_W{1'b0}}, {EW{1'b0}}} >> shamt;
    sticky = |wide[EW-1:0];
    mag    = AW'(wide[2*EW-1:EW]) | AW'(sticky);
    v      = neg ? ~mag : mag;
  end

endmodule
