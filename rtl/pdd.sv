// pdd: Product Domination Detector.
//
// Compares the AR1 and AR2 registers of one position of the absorption unit.
// Product X dominates product Y when every literal bit set in X is also set in
// Y (X AND NOT Y is zero over the literal fields): X then implies Y, so X is
// the redundant one by the absorption law ab + a = a. The cost field is
// ignored. An all-zero word dominates everything, which is how an unused AR2
// slot takes in the next product. Purely combinational.
// The domination relation follows the document; the bitwise test is this
// design's reading of it for the two-bit literal code.
module pdd
  import gpf_pkg::*;
(
  input  product_t ar1,
  input  product_t ar2,
  output logic     ar2_dominates_ar1,
  output logic     ar1_dominates_ar2
);
  always_comb begin
    ar2_dominates_ar1 = ((ar2 & ~ar1 & LIT_MASK) == '0);
    ar1_dominates_ar2 = ((ar1 & ~ar2 & LIT_MASK) == '0);
  end
endmodule
