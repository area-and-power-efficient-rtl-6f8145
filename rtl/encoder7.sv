// encoder7: the 7-bit window encoder of the radix-2^r multiplier.
//
// Every value 0..127 is written as the sum of two terms
//   v = A(m1) * 2^n1 + (s2 ? +1 : -1) * A(m2) * 2^n2,  A in {1,3,5,7}, n in 0..7,
// where the first term is always positive. The encoder is a 128-entry
// look-up table of 11-bit words {m1,n1,m2,s2,n2} (fdp_pkg::enc7_t). The table
// is computed at elaboration: candidates are tried with m1, then m2, then n1,
// then n2 in increasing order and an added second term before a subtracted
// one, and the first candidate that hits a value is kept. This order
// reproduces both published examples (125 = 128 - 3, 96 = 32 + 64); the
// search order itself is this design's choice. Every 7-bit value has a
// representation, including 0 (= 1 - 1).
//
// Purely combinational: code is valid in the same cycle as x.
module encoder7
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] x,
  output enc7_t            code
);

  localparam int unsigned ENTRIES = 1 << WIN_W;

  function automatic logic [ENTRIES*$bits(enc7_t)-1:0] build_table();
    logic [ENTRIES*$bits(enc7_t)-1:0] tbl;
    logic [ENTRIES-1:0]               found;
    enc7_t                            e;
    int                               v;
    tbl   = '0;
    found = '0;
    for (int m1 = 0; m1 < 4; m1++)
      for (int m2 = 0; m2 < 4; m2++)
        for (int n1 = 0; n1 < 8; n1++)
          for (int n2 = 0; n2 < 8; n2++)
            for (int s = 1; s >= 0; s--) begin
              v = ((2 * m1 + 1) << n1) + (s == 1 ? 1 : -1) * ((2 * m2 + 1) << n2);
              if (v >= 0 && v < ENTRIES && !found[v]) begin
                found[v] = 1'b1;
                e.m1 = 2'(m1);
                e.n1 = 3'(n1);
                e.m2 = 2'(m2);
                e.s2 = 1'(s);
                e.n2 = 3'(n2);
                tbl[v*$bits(enc7_t) +: $bits(enc7_t)] = e;
              end
            end
    return tbl;
  endfunction

  localparam logic [ENTRIES*$bits(enc7_t)-1:0] TABLE = build_table();

  always_comb code = enc7_t'(TABLE[int'(x)*$bits(enc7_t) +: $bits(enc7_t)]);

endmodule
