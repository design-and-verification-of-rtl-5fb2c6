// 4x4 unsigned Wallace tree multiplier: out = a * b.
//
// Three steps, all combinational:
//   1. wallace_pp_gen forms the 16 partial products Pij = b[i] & a[j].
//   2. Two carry-save reduction stages (wallace_stage1, wallace_stage2) use
//      half adders on columns with two bits and full adders on columns with
//      three, leaving single bits untouched, until two rows remain.
//   3. wallace_stage3 adds those two rows with a 4-cell ripple chain.
// Bits that finish early go straight to the output:
//   out = {Cout, S24, S23, S22, S21, S11, S01, P00}.
// In all: 16 AND gates, 5 half adders and 7 full adders. There is no clock
// or register: out settles after the longest chain of gates, which runs
// through one cell of each reduction stage and then the whole ripple chain.
// The stages, the adder placed on each column, the bit names (Pij, S0k, C1k,
// S2k, Cout) and the output bit order follow the reference 4x4 design this
// RTL implements. Unsigned operands and the absence of any register are this
// design's own choices; the reference names no clock and its example
// products are all unsigned.
module wallace_tree_4x4
  import wallace_pkg::*;
(
  input  operand_t a,     // multiplicand
  input  operand_t b,     // multiplier
  output product_t out    // a * b
);

  pp_t        pp;
  csa_row_t   st1, st2;
  logic [4:0] hi;

  wallace_pp_gen u_pp (.a(a), .b(b), .pp(pp));

  wallace_stage1 u_st1 (
    .r0  (pp[0][3:1]),
    .r1  (pp[1]),
    .r2  (pp[2][2:0]),
    .st1 (st1)
  );

  wallace_stage2 u_st2 (
    .s1  (st1.s[4:2]),
    .c1  (st1.c),
    .p23 (pp[2][3]),
    .r3  (pp[3][2:0]),
    .st2 (st2)
  );

  wallace_stage3 u_st3 (
    .x  ({pp[3][3], st2.s[4:2]}),
    .y  (st2.c),
    .hi (hi)
  );

  assign out = {hi, st2.s[1], st1.s[1], pp[0][0]};

endmodule
