// cla_adder: two-level carry-lookahead adder.
//
// Bits are grouped four at a time. Each group forms its generate and
// propagate signals; the carry into every group is then computed directly
// (not rippled) from the group signals and cin, and inside a group each
// bit's carry is again written out from the bit generate/propagate terms.
// The group size of four is this design's choice; the adder is used
// wherever the fused dot product unit needs a plain binary adder.
//
// Combinational: sum = a + b + cin, cout is the carry out of the top bit.
module cla_adder #(
  parameter int unsigned WIDTH = 48
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned GRP    = 4;
  localparam int unsigned NGROUP = (WIDTH + GRP - 1) / GRP;
  localparam int unsigned PW     = NGROUP * GRP;

  logic [PW-1:0]     g, p;
  logic [NGROUP-1:0] gg, gp;     // group generate / propagate
  logic [NGROUP:0]   gc;         // carry into each group
  logic [PW:0]       c;          // carry into each bit

  always_comb begin
    g = '0;
    p = '0;
    g[WIDTH-1:0] = a & b;
    p[WIDTH-1:0] = a ^ b;

    // Group generate and propagate.
    for (int n = 0; n < NGROUP; n++) begin
      gp[n] = &p[n*GRP +: GRP];
      gg[n] = 1'b0;
      for (int i = 0; i < GRP; i++) begin
        logic term;
        term = g[n*GRP+i];
        for (int j = i + 1; j < GRP; j++) term &= p[n*GRP+j];
        gg[n] |= term;
      end
    end

    // Lookahead across groups: gc[n] = OR_m (gg[m] & gp[m+1..n-1]) | (gp[0..n-1] & cin).
    for (int n = 0; n <= NGROUP; n++) begin
      logic term;
      term = cin;
      for (int l = 0; l < n; l++) term &= gp[l];
      gc[n] = term;
      for (int m = 0; m < n; m++) begin
        term = gg[m];
        for (int l = m + 1; l < n; l++) term &= gp[l];
        gc[n] |= term;
      end
    end

    // Lookahead inside each group.
    for (int n = 0; n < NGROUP; n++) begin
      for (int i = 0; i < GRP; i++) begin
        logic term;
        term = gc[n];
        for (int l = 0; l < i; l++) term &= p[n*GRP+l];
        c[n*GRP+i] = term;
        for (int k = 0; k < i; k++) begin
          logic t2;
          t2 = g[n*GRP+k];
          for (int l = k + 1; l < i; l++) t2 &= p[n*GRP+l];
          c[n*GRP+i] |= t2;
        end
      end
    end
    c[PW] = gc[NGROUP];

    sum  = p[WIDTH-1:0] ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule
