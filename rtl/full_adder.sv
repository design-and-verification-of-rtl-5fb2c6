// Full adder: adds three bits.
//
// Built, as in the classic gate diagram, from two half adders and an OR gate:
// the first half adder adds a and b, the second adds that partial sum and
// cin, and the OR of the two half-adder carries is cout. Since the two
// carries can never both be 1, the OR gives the majority of a, b and cin.
// Purely combinational, no clock. Used for the columns of the Wallace tree
// that hold three bits and for the ripple cells of the final stage.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic s_ab, c_ab, c_abc;

  half_adder u_ha_ab  (.a(a),    .b(b),   .sum(s_ab), .cout(c_ab));
  half_adder u_ha_abc (.a(s_ab), .b(cin), .sum(sum),  .cout(c_abc));

  always_comb cout = c_ab | c_abc;

endmodule
