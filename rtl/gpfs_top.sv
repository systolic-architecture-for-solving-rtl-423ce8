// gpfs_top: GPF solver, a two-level data flow tree of three BPPs.
//
// The host hands a product of terms (a generalized propositional formula)
// split into two parts to the two leaf BPPs. Each leaf multiplies its terms
// down to one simplified sum of products and passes it to the root BPP, which
// multiplies the two sums and returns the final sum of products, cheapest
// product first, on result_*. no_solution rises when any BPP finds an empty
// sum, i.e. the formula cannot be satisfied; clear then resets every BPP for
// the next problem. load_me tells the host which leaf waits for a term.
// Streams: valid/ready, one 128-bit product per beat, terms closed by an
// all-zero product, *_last with the final separator.
// The tree shape (two leaves, one root) follows the document's example; the
// root's larger local memory follows its remark that higher levels need
// more; the sizes themselves are this design's own.
module gpfs_top
  import gpf_pkg::*;
#(
  parameter int unsigned N               = 16,
  parameter int unsigned AR_N            = 16,
  parameter int unsigned LEAF_MEM_DEPTH  = 64,
  parameter int unsigned ROOT_MEM_DEPTH  = 128,
  parameter int unsigned INIT_TERMS      = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [1:0] host_valid,
  output logic [1:0] host_ready,
  input  product_t   host_word [2],
  input  logic [1:0] host_last,
  output logic [1:0] load_me,
  output logic       result_valid,
  input  logic       result_ready,
  output product_t   result_word,
  output logic       result_last,
  output logic       done,
  output logic       no_solution,
  output logic [2:0] mem_overflow,
  output logic [2:0] ar_overflow,
  output logic [2:0] absorb_overflow,
  output logic [2:0] absorbed,
  output logic [2:0] ar_from_mem,
  output logic [2:0] empty_seen,
  output logic [2:0] swap_event
);
  logic [1:0] c_valid, c_ready, c_last;
  product_t   c_word [2];
  logic [2:0] b_done, b_unsat;
  logic       r_valid, r_ready, r_last;
  product_t   r_word;
  logic       r_load_me;

  for (genvar i = 0; i < 2; i++) begin : g_leaf
    bpp #(.N(N), .AR_N(AR_N), .MEM_DEPTH(LEAF_MEM_DEPTH), .INIT_TERMS(INIT_TERMS)) u_bpp (
      .clk, .rst_n, .clear,
      .in_valid(host_valid[i]), .in_ready(host_ready[i]), .in_word(host_word[i]),
      .in_last(host_last[i]), .load_me(load_me[i]),
      .out_valid(c_valid[i]), .out_ready(c_ready[i]), .out_word(c_word[i]),
      .out_last(c_last[i]),
      .done(b_done[i]), .unsat(b_unsat[i]), .mem_overflow(mem_overflow[i]),
      .ar_overflow(ar_overflow[i]), .absorb_overflow(absorb_overflow[i]), .absorbed(absorbed[i]),
      .ar_from_mem(ar_from_mem[i]), .empty_seen(empty_seen[i]),
      .swap_event(swap_event[i]));
  end

  stream_join u_join (
    .clk, .rst_n, .clear,
    .a_valid(c_valid[0]), .a_ready(c_ready[0]), .a_word(c_word[0]), .a_last(c_last[0]),
    .b_valid(c_valid[1]), .b_ready(c_ready[1]), .b_word(c_word[1]), .b_last(c_last[1]),
    .y_valid(r_valid), .y_ready(r_ready), .y_word(r_word), .y_last(r_last));

  bpp #(.N(N), .AR_N(AR_N), .MEM_DEPTH(ROOT_MEM_DEPTH), .INIT_TERMS(INIT_TERMS)) u_root (
    .clk, .rst_n, .clear,
    .in_valid(r_valid), .in_ready(r_ready), .in_word(r_word), .in_last(r_last),
    .load_me(r_load_me),
    .out_valid(result_valid), .out_ready(result_ready), .out_word(result_word),
    .out_last(result_last),
    .done(b_done[2]), .unsat(b_unsat[2]), .mem_overflow(mem_overflow[2]),
    .ar_overflow(ar_overflow[2]), .absorb_overflow(absorb_overflow[2]), .absorbed(absorbed[2]),
    .ar_from_mem(ar_from_mem[2]), .empty_seen(empty_seen[2]),
    .swap_event(swap_event[2]));

  assign done        = b_done[2];
  assign no_solution = |b_unsat;

  logic unused_root_load_me;
  assign unused_root_load_me = r_load_me;
endmodule
