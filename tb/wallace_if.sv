// Bundle of the multiplier's signals, used by the class-based random
// testbench: the two operands and the product.
interface wallace_if;
  logic [3:0] a;
  logic [3:0] b;
  logic [7:0] out;
endinterface
