// Third (final) stage of the 4x4 Wallace tree multiplier.
//
// After two reduction stages only two rows remain over columns 3..6:
//   x = {P33, S14, S13, S12}   and   y = {C14, C13, C12, C11}.
// This stage adds them with a ripple-carry chain of one half adder and three
// full adders:
//   column 3: HA(S12, C11)      -> S21, carry C21
//   column 4: FA(S13, C12, C21) -> S22, carry C22
//   column 5: FA(S14, C13, C22) -> S23, carry C23
//   column 6: FA(P33, C14, C23) -> S24, carry Cout (column 7)
// Output hi = {Cout, S24, S23, S22, S21} is product bits 7..3. The carry
// ripples through all four cells, so this is the longest path of the
// multiplier. Purely combinational.
module wallace_stage3 (
  input  logic [3:0] x,    // {P33, S14, S13, S12}, columns 6..3
  input  logic [3:0] y,    // {C14, C13, C12, C11}, columns 6..3
  output logic [4:0] hi    // {Cout, S24, S23, S22, S21}
);

  logic [3:1] c;           // C21, C22, C23

  half_adder u_ha21 (.a(x[0]), .b(y[0]),              .sum(hi[0]), .cout(c[1]));
  full_adder u_fa22 (.a(x[1]), .b(y[1]), .cin(c[1]),  .sum(hi[1]), .cout(c[2]));
  full_adder u_fa23 (.a(x[2]), .b(y[2]), .cin(c[2]),  .sum(hi[2]), .cout(c[3]));
  full_adder u_fa24 (.a(x[3]), .b(y[3]), .cin(c[3]),  .sum(hi[3]), .cout(hi[4]));

endmodule
