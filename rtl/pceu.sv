// pceu: Product Cost Evaluation Unit.
//
// Counts the literals of a product, i.e. the variable fields that hold 10 or
// 01, and writes the count into the 6-bit cost field (bits [5:0]); the
// literal bits pass unchanged. Combinational, one product per cycle. The
// function and the field follow the document; counting a field as a literal
// when its two bits differ is this design's reading.
module pceu
  import gpf_pkg::*;
(
  input  product_t in_word,
  output product_t out_word,
  output cost_t    cost
);
  always_comb begin
    cost = '0;
    for (int v = 0; v < NVARS; v++)
      if (in_word[WORD_W-1-2*v] != in_word[WORD_W-2-2*v]) cost += 1'b1;
    out_word = {in_word[WORD_W-1:COST_W], cost};
  end
endmodule
