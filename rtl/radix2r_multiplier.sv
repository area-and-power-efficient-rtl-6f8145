// radix2r_multiplier: unsigned WIDTH x WIDTH multiplier on the radix-2^r
// (r = 7) principle.
//
// The multiplier x is cut into 7-bit windows from the LSB, the top window
// zero-padded (24 bits -> 4 windows, 53 bits -> 8, 32 bits -> 5). Each window
// goes through encoder7, which writes it as a1*2^n1 +/- a2*2^n2 with
// a1, a2 in {1,3,5,7}. The odd multiples of the multiplicand are formed once
// by shift-and-add: 3Y = (Y<<1)+Y, 5Y = (Y<<2)+Y, 7Y = (Y<<3)-Y. Per window,
// two multiplexers pick the multiples named by m1 and m2, two barrel shifters
// shift them by n1 and n2, and one adder/subtractor (chosen by s2) forms the
// window's partial product x_k*Y. The partial products are weighted by 2^(7k)
// and summed in a binary tree of CLA adders. The root of the tree is the
// two-stage PFCF-CLA adder, which is where this unit is pipelined: the low
// half and its carry are computed before the register, the high half's
// carry is folded in after it. Padding the tree to a power of two leaves
// (zero inputs) is this design's choice; a synthesis tool removes the
// adders that only see zeros.
//
// Timing: x and y are sampled at a rising edge; product = x*y is valid after
// that edge until the next one (latency 1, one new product per cycle).
module radix2r_multiplier
  import fdp_pkg::*;
#(
  parameter int unsigned WIDTH = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WIDTH-1:0]     x,
  input  logic [WIDTH-1:0]     y,
  output logic [2*WIDTH-1:0]   product
);

  localparam int unsigned NWIN  = num_windows(WIDTH);
  localparam int unsigned LOGN  = $clog2(NWIN);
  localparam int unsigned NP    = 1 << LOGN;       // leaves of the padded tree
  localparam int unsigned MW    = WIDTH + 3;       // width of 1Y..7Y
  localparam int unsigned TW    = MW + 7;          // width of a shifted multiple
  localparam int unsigned PPW   = WIDTH + WIN_W;   // width of one partial product
  localparam int unsigned OW    = 2 * WIDTH;

  initial begin
    assert (NWIN >= 2) else $error("radix2r_multiplier: WIDTH must exceed one window");
  end

  // ---------------------------------------------------------------- multiples
  logic [MW-1:0] y1, y3, y5, y7;
  logic [3:0]    mul_cout_unused;

  assign y1 = MW'(y);
  assign mul_cout_unused[0] = 1'b0;

  cla_adder #(.WIDTH(MW)) u_y3 (.a(MW'(y) << 1), .b(MW'(y)), .cin(1'b0), .sum(y3), .cout(mul_cout_unused[1]));
  cla_adder #(.WIDTH(MW)) u_y5 (.a(MW'(y) << 2), .b(MW'(y)), .cin(1'b0), .sum(y5), .cout(mul_cout_unused[2]));
  cla_adder #(.WIDTH(MW)) u_y7 (.a(MW'(y) << 3), .b(~MW'(y)), .cin(1'b1), .sum(y7), .cout(mul_cout_unused[3]));

  function automatic logic [MW-1:0] pick(logic [1:0] m, logic [MW-1:0] v1, logic [MW-1:0] v3,
                                         logic [MW-1:0] v5, logic [MW-1:0] v7);
    unique case (m)
      2'd0: return v1;
      2'd1: return v3;
      2'd2: return v5;
      default: return v7;
    endcase
  endfunction

  // ------------------------------------------------------- window products
  logic [NWIN*WIN_W-1:0] x_pad;
  assign x_pad = (NWIN*WIN_W)'(x);

  logic [OW-1:0] leaf [NP];

  for (genvar k = 0; k < NP; k++) begin : g_win
    if (k < NWIN) begin : g_used
      enc7_t         code;
      logic [TW-1:0] t1, t2, pp_full;
      logic          pp_cout_unused;
      logic [TW-PPW-1:0] pp_top_unused;   // always zero: x_k*y < 2^PPW

      encoder7 u_enc (.x(x_pad[k*WIN_W +: WIN_W]), .code(code));

      always_comb begin
        t1 = TW'(pick(code.m1, y1, y3, y5, y7)) << code.n1;
        t2 = TW'(pick(code.m2, y1, y3, y5, y7)) << code.n2;
      end

      // s2 = 1: t1 + t2, s2 = 0: t1 - t2 = t1 + ~t2 + 1
      cla_adder #(.WIDTH(TW)) u_addsub (
        .a(t1), .b(code.s2 ? t2 : ~t2), .cin(~code.s2), .sum(pp_full), .cout(pp_cout_unused)
      );

      assign pp_top_unused = pp_full[TW-1:PPW];

      // x_k * y < 2^PPW; weight 2^(7k), truncated to the product width.
      assign leaf[k] = OW'({pp_full[PPW-1:0], {(k*WIN_W){1'b0}}});
    end else begin : g_pad
      assign leaf[k] = '0;
    end
  end

  // ------------------------------------------------------- binary tree
  // Heap layout: node 0 is the root, node n has children 2n+1 and 2n+2,
  // leaves are nodes NP-1 .. 2NP-2.
  logic [OW-1:0] node [2*NP-1];

  for (genvar k = 0; k < NP; k++) begin : g_leaf
    assign node[NP-1+k] = leaf[k];
  end

  for (genvar n = 1; n < NP - 1; n++) begin : g_tree
    logic cout_unused;
    cla_adder #(.WIDTH(OW)) u_add (
      .a(node[2*n+1]), .b(node[2*n+2]), .cin(1'b0), .sum(node[n]), .cout(cout_unused)
    );
  end

  pfcf_cla_adder #(.WIDTH(OW)) u_root (
    .clk(clk), .rst_n(rst_n), .a(node[1]), .b(node[2]), .sum(node[0])
  );

  assign product = node[0];

endmodule
