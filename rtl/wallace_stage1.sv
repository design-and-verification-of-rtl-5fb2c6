// First reduction stage of the 4x4 Wallace tree multiplier.
//
// Takes the first three partial product rows (rows 0, 1, 2, offset by 0, 1
// and 2 columns) and reduces every column that holds two or three bits with
// a half or a full adder:
//   column 1: HA(P10, P01)      -> S01, carry C01 into column 2
//   column 2: FA(P20, P11, P02) -> S02, carry C02 into column 3
//   column 3: FA(P21, P12, P03) -> S03, carry C03 into column 4
//   column 4: HA(P22, P13)      -> S04, carry C04 into column 5
// Columns 0 (P00) and 5 (P23) hold one bit each; those bits are not touched
// here, are not ports, and the top passes them on unchanged. Pxy is pp[x][y] = b[x] & a[y].
// Output: st1.s[k] = S0k (column k), st1.c[k] = C0k (column k+1).
// Purely combinational.
module wallace_stage1
  import wallace_pkg::*;
(
  input  logic [3:1] r0,   // P03..P01, columns 3..1
  input  logic [3:0] r1,   // P13..P10, columns 4..1
  input  logic [2:0] r2,   // P22..P20, columns 4..2
  output csa_row_t st1
);

  half_adder u_ha01 (.a(r1[0]), .b(r0[1]),                .sum(st1.s[1]), .cout(st1.c[1]));
  full_adder u_fa02 (.a(r2[0]), .b(r1[1]), .cin(r0[2]),   .sum(st1.s[2]), .cout(st1.c[2]));
  full_adder u_fa03 (.a(r2[1]), .b(r1[2]), .cin(r0[3]),   .sum(st1.s[3]), .cout(st1.c[3]));
  half_adder u_ha04 (.a(r2[2]), .b(r1[3]),                .sum(st1.s[4]), .cout(st1.c[4]));

endmodule
