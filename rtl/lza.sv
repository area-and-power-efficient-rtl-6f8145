// lza: leading zero anticipator for a two's-complement sum a + b.
//
// Works on the two addend vectors, in parallel with the carry-propagate
// addition. Per bit it forms t = a^b, g = a&b, z = ~a&~b and the indicator
//   f_i = t_{i+1}&(g_i&~z_{i-1} | z_i&~g_{i-1}) | ~t_{i+1}&(z_i&~z_{i-1} | g_i&~g_{i-1}),
// whose leading one marks the first digit of the sum that differs from its
// sign, possibly one position off. The operands are sign-extended above the
// MSB and zero-extended below the LSB. A leading zero detector (lzd) turns
// f into a count. The count predicts the leading zeros of |a+b| within one
// position either way; the normalizer corrects that last position.
//
// Combinational.
module lza #(
  parameter int unsigned W  = 53,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [CW-1:0] count
);

  logic [W+1:0] t, g, z;   // index 0 is the bit below the LSB, W+1 above the MSB
  logic [W-1:0] f;
  logic         f_zero_unused;

  always_comb begin
    t = {a[W-1] ^ b[W-1], a ^ b, 1'b0};
    g = {a[W-1] & b[W-1], a & b, 1'b0};
    z = {~a[W-1] & ~b[W-1], ~a & ~b, 1'b1};
    for (int i = 1; i <= W; i++)
      f[i-1] = ( t[i+1] & ((g[i] & ~z[i-1]) | (z[i] & ~g[i-1])))
             | (~t[i+1] & ((z[i] & ~z[i-1]) | (g[i] & ~g[i-1])));
  end

  lzd #(.W(W), .CW(CW)) u_lzd (.v(f), .count(count), .all_zero(f_zero_unused));

endmodule
