// gpf_pkg: word format and shared types of the GPF solver.
//
// A product of literals is one 128-bit word. Bits [127:6] hold 61 variable
// fields of two bits; variable v occupies bits [127-2v -: 2]. A field reads
// 10 for the positive literal x, 01 for the negated literal, 11 for "variable
// absent" (don't care) and 00 for a contradiction. Bits [5:0] hold the cost,
// the number of literals in the product. With this code the product of two
// products is the bitwise AND of their words. The word size, the field code
// and the cost field in the least significant 6 bits follow the document; the
// placement of variable 0 at the most significant field is this design's
// choice. An all-zero word is the "empty product": it separates terms on the
// host streams and marks an unused register.
package gpf_pkg;
  parameter int unsigned WORD_W = 128;
  parameter int unsigned NVARS  = 61;
  parameter int unsigned COST_W = 6;

  typedef logic [WORD_W-1:0] product_t;
  typedef logic [COST_W-1:0] cost_t;

  // A product travelling through the sorter; valid=0 marks a padding slot
  // that sorts after every real product.
  typedef struct packed {
    logic     valid;
    product_t word;
  } item_t;

  // Literal bits of a word (everything but the cost field).
  localparam product_t LIT_MASK = {{(WORD_W-COST_W){1'b1}}, {COST_W{1'b0}}};
  localparam product_t EMPTY_PRODUCT = '0;
endpackage
