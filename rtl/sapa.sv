// sapa: Sorting and Absorbing Parallel Architecture.
//
// Simplifies one sum of products (SPF) at a time, as produced by the Cartesian
// product generator: the absorption unit removes duplicated and absorbed
// products, the AR2 buffer hands the survivors on serially, the cost unit
// writes each product's literal count into its cost field, the empty product
// detector marks contradictory products as padding, and the quad-tree sorter
// returns the batch cheapest first. Every SPF leaves as exactly N beats;
// out_item.valid tells the real products from padding, which always come
// last, and out_last marks the N-th beat. Because each stage hands its batch
// on before taking the next, the absorption of one SPF overlaps the sorting
// of the previous one.
// Interface: valid/ready product stream in with in_last on the last product
// of an SPF; valid/ready item stream out.
// The chain of units follows the document; the handshakes, the fixed batch of
// N beats and the padding are this design's own.
module sapa
  import gpf_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     in_valid,
  output logic     in_ready,
  input  product_t in_word,
  input  logic     in_last,
  output logic     out_valid,
  input  logic     out_ready,
  output item_t    out_item,
  output logic     out_last,
  output logic     overflow,
  output logic     absorbed,
  output logic     empty_seen,
  output logic     swap_event
);
  logic     au_valid, au_ready;
  product_t au_words [N];
  logic     bf_valid, bf_ready, bf_last;
  product_t bf_word, cost_word;
  cost_t    cost;
  item_t    ep_item;
  logic     ep_empty;

  au #(.N(N)) u_au (
    .clk, .rst_n, .clear,
    .in_valid, .in_ready, .in_word, .in_last,
    .out_valid(au_valid), .out_ready(au_ready), .out_words(au_words),
    .overflow, .absorbed);

  ar2_buffer #(.N(N)) u_buf (
    .clk, .rst_n, .clear,
    .load_valid(au_valid), .load_ready(au_ready), .load_words(au_words),
    .out_valid(bf_valid), .out_ready(bf_ready), .out_word(bf_word),
    .out_last(bf_last));

  pceu u_pceu (.in_word(bf_word), .out_word(cost_word), .cost);

  epdu u_epdu (.in_valid(1'b1), .in_word(cost_word), .out_item(ep_item),
               .is_empty(ep_empty));

  // an empty product here is either an unused AR2 slot or a contradiction
  assign empty_seen = bf_valid && bf_ready && ep_empty &&
                      (bf_word[WORD_W-1:COST_W] != '0);

  qts #(.N(N)) u_qts (
    .clk, .rst_n, .clear,
    .in_valid(bf_valid), .in_ready(bf_ready), .in_item(ep_item),
    .out_valid, .out_ready, .out_item, .out_last, .swap_event, .level_fwd());

  logic unused_last;
  assign unused_last = bf_last;
endmodule
