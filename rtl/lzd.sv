// lzd: leading zero detector.
//
// count is the number of zeros above the most significant one of v
// (W when v is zero); all_zero flags that case. Written as a priority scan
// from the MSB, which synthesizes to a priority encoder.
//
// Combinational.
module lzd #(
  parameter int unsigned W  = 53,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  v,
  output logic [CW-1:0] count,
  output logic          all_zero
);

  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++)
      if (v[i]) count = CW'(W - 1 - i);
    all_zero = ~|v;
  end

endmodule
