// bpp: Boolean Product Processor, one node of the data flow tree.
//
// A PMU and its SAPA connected in a loop: the PMU sends the Cartesian products
// of two terms to the SAPA, and the SAPA returns the simplified, sorted sum of
// products, which the PMU keeps in its local memory for the next
// multiplication. The BPP takes terms on its input stream and delivers the
// final sum of products of all of them on its output stream (see pmu for the
// stream format). Composition as in the document; parameters pass through.
module bpp
  import gpf_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter int unsigned AR_N       = 16,
  parameter int unsigned MEM_DEPTH  = 64,
  parameter int unsigned INIT_TERMS = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     in_valid,
  output logic     in_ready,
  input  product_t in_word,
  input  logic     in_last,
  output logic     load_me,
  output logic     out_valid,
  input  logic     out_ready,
  output product_t out_word,
  output logic     out_last,
  output logic     done,
  output logic     unsat,
  output logic     mem_overflow,
  output logic     ar_overflow,
  output logic     absorb_overflow,
  output logic     absorbed,
  output logic     ar_from_mem,
  output logic     empty_seen,
  output logic     swap_event
);
  logic     sp_valid, sp_ready, sp_last;
  product_t sp_word;
  logic     fs_valid, fs_ready, fs_last;
  item_t    fs_item;

  pmu #(.AR_N(AR_N), .MEM_DEPTH(MEM_DEPTH), .INIT_TERMS(INIT_TERMS)) u_pmu (
    .clk, .rst_n, .clear,
    .in_valid, .in_ready, .in_word, .in_last, .load_me,
    .sp_valid, .sp_ready, .sp_word, .sp_last,
    .fs_valid, .fs_ready, .fs_item, .fs_last,
    .out_valid, .out_ready, .out_word, .out_last,
    .done, .unsat, .mem_overflow, .ar_overflow, .ar_from_mem);

  sapa #(.N(N)) u_sapa (
    .clk, .rst_n, .clear,
    .in_valid(sp_valid), .in_ready(sp_ready), .in_word(sp_word), .in_last(sp_last),
    .out_valid(fs_valid), .out_ready(fs_ready), .out_item(fs_item), .out_last(fs_last),
    .overflow(absorb_overflow), .absorbed, .empty_seen, .swap_event);
endmodule
