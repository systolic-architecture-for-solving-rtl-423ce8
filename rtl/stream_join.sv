// stream_join: joins the result streams of the two child BPPs into the input
// stream of their parent.
//
// Forwards stream a until its beat with a_last, with that last flag removed,
// then stream b until b_last, which is passed on as the end of the parent's
// input; then starts over with a. Each child's sum of products therefore
// reaches the parent as one term. The document shows both children feeding
// the parent PMU; the order (left child first) is this design's own.
module stream_join
  import gpf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     a_valid,
  output logic     a_ready,
  input  product_t a_word,
  input  logic     a_last,
  input  logic     b_valid,
  output logic     b_ready,
  input  product_t b_word,
  input  logic     b_last,
  output logic     y_valid,
  input  logic     y_ready,
  output product_t y_word,
  output logic     y_last
);
  logic sel_b;

  always_comb begin
    y_valid = sel_b ? b_valid : a_valid;
    y_word  = sel_b ? b_word : a_word;
    y_last  = sel_b && b_last;
    a_ready = !sel_b && y_ready;
    b_ready = sel_b && y_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_b <= 1'b0;
    else if (clear) sel_b <= 1'b0;
    else if (!sel_b && a_valid && a_ready && a_last) sel_b <= 1'b1;
    else if (sel_b && b_valid && b_ready && b_last) sel_b <= 1'b0;
  end
endmodule
