// epdu: Empty Product Detection Unit.
//
// A product is empty when at least one of its 61 variable fields is 00
// (contradictory literals were multiplied, or the word is an unused all-zero
// slot). The unit passes each product on with valid cleared when it is empty,
// so the sorter treats it as a padding slot and it never leaves the SAPA.
// Combinational. Function as in the document.
module epdu
  import gpf_pkg::*;
(
  input  logic     in_valid,
  input  product_t in_word,
  output item_t    out_item,
  output logic     is_empty
);
  always_comb begin
    is_empty = 1'b0;
    for (int v = 0; v < NVARS; v++)
      if (in_word[WORD_W-1-2*v -: 2] == 2'b00) is_empty = 1'b1;
    out_item.valid = in_valid && !is_empty;
    out_item.word  = in_word;
  end
endmodule
