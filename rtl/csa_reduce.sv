// csa_reduce: carry-save reduction of the aligned terms.
//
// Inputs are N_TERMS aligned vectors, negative ones already one's-
// complemented, and their negative flags. The count of negative terms is
// the two's-complement correction (+1 per negative term) and enters as one
// more vector. The N_TERMS+1 vectors are reduced to a sum and a carry vector
// by a chain of 3:2 carry-save adders (N_TERMS-1 rows), so that
// s + c = sum of the signed terms modulo 2^AW. No carry propagates here.
//
// Combinational.
module csa_reduce #(
  parameter int unsigned N_TERMS = 2,
  parameter int unsigned AW      = 53
) (
  input  logic [AW-1:0] v   [N_TERMS],
  input  logic          neg [N_TERMS],
  output logic [AW-1:0] s,
  output logic [AW-1:0] c
);

  logic [AW-1:0] corr;
  logic [AW-1:0] vec [N_TERMS+1];

  always_comb begin
    corr = '0;
    for (int i = 0; i < N_TERMS; i++) corr += AW'(neg[i]);

    for (int i = 0; i < N_TERMS; i++) vec[i] = v[i];
    vec[N_TERMS] = corr;

    s = vec[0];
    c = vec[1];
    for (int k = 2; k <= N_TERMS; k++) begin
      logic [AW-1:0] s_n, c_n;
      s_n = s ^ c ^ vec[k];
      c_n = ((s & c) | (s & vec[k]) | (c & vec[k])) << 1;
      s   = s_n;
      c   = c_n;
    end
  end

endmodule
