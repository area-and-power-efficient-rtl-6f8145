// fdp_pkg: types and helpers shared by the fused dot product datapath.
//
// enc7_t is the 11-bit word produced by the 7-bit window encoder of the
// radix-2^r multiplier. It describes a window value v as
//   v = A(m1) * 2^n1  +/-  A(m2) * 2^n2,   A = {1,3,5,7}
// with the field order {m1, n1, m2, s2, n2}; s2 = 1 means the second term is
// added, s2 = 0 that it is subtracted (the order and the two worked examples,
// 125 -> 00_111_01_0_000 and 96 -> 00_101_00_1_110, follow the published
// encoding). fdp_flags_t groups the exception outputs of the unit.
package fdp_pkg;

  // Width of one multiplier window, in bits.
  localparam int unsigned WIN_W = 7;

  // Guard bits kept below the exact product when terms are aligned
  // (the lowest of them collects the sticky OR of everything shifted out).
  localparam int unsigned GUARD_W = 3;

  typedef struct packed {
    logic [1:0] m1;  // odd multiple of the first term: 00=1, 01=3, 10=5, 11=7
    logic [2:0] n1;  // power of two of the first term
    logic [1:0] m2;  // odd multiple of the second term
    logic       s2;  // 1: add second term, 0: subtract it
    logic [2:0] n2;  // power of two of the second term
  } enc7_t;

  typedef struct packed {
    logic invalid;    // NaN produced (NaN operand, inf*0, inf-inf)
    logic overflow;   // finite result rounded beyond the largest normal
    logic underflow;  // nonzero result below the smallest normal, flushed to zero
    logic cancel;     // nonzero products summed to exactly zero
  } fdp_flags_t;

  // Number of 7-bit windows needed to cover a multiplier operand.
  function automatic int unsigned num_windows(int unsigned width);
    return (width + WIN_W - 1) / WIN_W;
  endfunction

  // Odd multiplier selected by a 2-bit code.
  function automatic int unsigned odd_mult(logic [1:0] code);
    return 2 * int'(code) + 1;
  endfunction

endpackage
