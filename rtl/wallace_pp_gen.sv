// Partial product generator of the 4x4 Wallace tree multiplier.
//
// Forms all 16 partial product bits with one AND gate each:
// pp[i][j] = b[i] & a[j], the product of multiplier bit i and multiplicand
// bit j, with weight 2^(i+j). Row i of pp is therefore the multiplicand
// gated by b[i], shifted i columns left when it is added. The row/column
// naming (row = multiplier bit) follows the usual dot diagram of the
// multiplier; which operand indexes the row does not change the product.
// Purely combinational.
module wallace_pp_gen
  import wallace_pkg::*;
(
  input  operand_t a,    // multiplicand A3..A0
  input  operand_t b,    // multiplier   B3..B0
  output pp_t      pp    // pp[i][j] = b[i] & a[j]
);

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = b[i] & a[j];
  end

endmodule
