// Half adder: adds two bits.
//
// sum = a XOR b, cout = a AND b, as in the gate-level half adder the
// multiplier is built from (one XOR, one AND). Purely combinational, no
// clock. Used for the columns of the Wallace tree that hold two bits, and as
// the first cell of the final ripple stage.
module half_adder (
  input  logic a,     // augend bit
  input  logic b,     // addend bit
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule
