// Second reduction stage of the 4x4 Wallace tree multiplier.
//
// Reduces the three rows left after the first stage - its sum row
// (P23 S04 S03 S02 S01 P00), its carry row (C04..C01, columns 5..2) and
// partial product row 3 (P33..P30, columns 6..3) - column by column:
//   column 2: HA(S02, C01)      -> S11, carry C11 into column 3
//   column 3: FA(S03, C02, P30) -> S12, carry C12 into column 4
//   column 4: FA(S04, C03, P31) -> S13, carry C13 into column 5
//   column 5: FA(P23, C04, P32) -> S14, carry C14 into column 6
// Column 0 (P00), column 1 (S01) and column 6 (P33) hold one bit and pass on
// unchanged through the top. Pxy is b[x] & a[y].
// Output: st2.s[k] = S1k (column k+1), st2.c[k] = C1k (column k+2).
// Purely combinational.
module wallace_stage2
  import wallace_pkg::*;
(
  input  logic [4:2] s1,   // first-stage sums S04..S02 (S01 passes on)
  input  logic [4:1] c1,   // first-stage carries C04..C01
  input  logic       p23,  // P23, passed on from the first stage, column 5
  input  logic [2:0] r3,   // P32..P30, columns 5..3 (P33 passes on)
  output csa_row_t   st2
);

  half_adder u_ha11 (.a(s1[2]), .b(c1[1]),              .sum(st2.s[1]), .cout(st2.c[1]));
  full_adder u_fa12 (.a(s1[3]), .b(c1[2]), .cin(r3[0]), .sum(st2.s[2]), .cout(st2.c[2]));
  full_adder u_fa13 (.a(s1[4]), .b(c1[3]), .cin(r3[1]), .sum(st2.s[3]), .cout(st2.c[3]));
  full_adder u_fa14 (.a(p23),   .b(c1[4]), .cin(r3[2]), .sum(st2.s[4]), .cout(st2.c[4]));

endmodule
