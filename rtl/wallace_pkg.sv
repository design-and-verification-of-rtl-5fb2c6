// Shared types of the 4x4 Wallace tree multiplier.
//
// The multiplier is fixed at 4-bit unsigned operands and an 8-bit product.
// pp_t holds the 16 partial product bits as four rows: pp[i][j] = b[i] & a[j],
// which has weight 2^(i+j). csa_row_t is the result of one reduction stage:
// four sum bits and the four carries the same adders produced, with the
// column of each bit given where the type is used.
package wallace_pkg;

  localparam int unsigned N = 4;           // operand width

  typedef logic [N-1:0]   operand_t;       // multiplicand or multiplier
  typedef logic [2*N-1:0] product_t;       // product

  // Partial product matrix: row i comes from multiplier bit b[i].
  typedef logic [N-1:0][N-1:0] pp_t;

  // Sum and carry outputs of the four adders of one reduction stage.
  // s[k] and c[k] come from the same adder k (k = 1..4); c[k] sits one
  // column to the left of s[k].
  typedef struct packed {
    logic [4:1] s;
    logic [4:1] c;
  } csa_row_t;

endpackage
