// pfcf_accumulator: pipelined feedforward-cutset-free accumulator.
//
// The WIDTH-bit accumulator is cut into SEGMENTS equal segments, each with
// its own CLA. In every cycle each segment adds its slice of x and the
// carry that the segment below produced in the previous cycle; its own
// carry out goes into one flip-flop for the segment above. SEGMENTS-1 carry
// flip-flops are all the pipelining costs, where a conventional pipelined
// accumulator would register (WIDTH+1)*(SEGMENTS-1) bits. The register
// therefore holds the running sum in a redundant form: acc plus the
// pending carries (carry[k] weighs 2^((k+1)*WIDTH/SEGMENTS)). Feeding zeros
// for SEGMENTS-1 cycles flushes the carries, after which acc is exact
// (mod 2^WIDTH). The carry out of the top segment is dropped.
//
// Timing: x is added at each rising edge of clk; acc and carry are register
// outputs. clr clears both synchronously (x is not added in that cycle);
// rst_n clears them asynchronously. settled is high when no carry is pending.
module pfcf_accumulator #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned SEGMENTS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [WIDTH-1:0]    x,
  output logic [WIDTH-1:0]    acc,
  output logic [SEGMENTS-2:0] carry,
  output logic                settled
);

  localparam int unsigned SEG_W = WIDTH / SEGMENTS;

  initial begin
    assert (SEGMENTS >= 2 && SEG_W * SEGMENTS == WIDTH)
      else $error("pfcf_accumulator: WIDTH must split into SEGMENTS>=2 equal segments");
  end

  logic [WIDTH-1:0]    acc_d;
  logic [SEGMENTS-1:0] cout;
  logic                top_cout_unused;   // carry out of the top segment is dropped

  assign top_cout_unused = cout[SEGMENTS-1];

  for (genvar k = 0; k < SEGMENTS; k++) begin : g_seg
    logic cin;
    if (k == 0) begin : g_first
      assign cin = 1'b0;
    end else begin : g_rest
      assign cin = carry[k-1];
    end
    cla_adder #(.WIDTH(SEG_W)) u_add (
      .a(acc[k*SEG_W +: SEG_W]), .b(x[k*SEG_W +: SEG_W]), .cin(cin),
      .sum(acc_d[k*SEG_W +: SEG_W]), .cout(cout[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      carry <= '0;
    end else if (clr) begin
      acc   <= '0;
      carry <= '0;
    end else begin
      acc   <= acc_d;
      carry <= cout[SEGMENTS-2:0];
    end
  end

  assign settled = ~|carry;

endmodule
