// pmu_local_mem: local memory of the PMU, product nodes in linked lists.
//
// DEPTH nodes, each a 128-bit product and a pointer to the next node. Free
// nodes form a linked free list. An allocation takes the node at the head of
// the free list, writes the product into it, ends it with a null pointer and,
// when link is set, chains it behind the node link_tail (the tail of the list
// that grows). A release returns node rel_ptr to the free list; its product
// and successor can be read on rd_word/rd_next in the same cycle through the
// read port rd_ptr. Reset and clear rebuild the free list with all nodes.
// When an allocation and a release happen in the same cycle, the released
// node is handed straight to the allocation (alloc_ptr shows it) and the free
// list is left alone. alloc_ok is low when no node can be handed out.
// Linked lists and dynamic allocation follow the document; the node format,
// the null pointer (all ones) and the ports are this design's own.
module pmu_local_mem
  import gpf_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     alloc,
  input  product_t alloc_word,
  input  logic     link,
  input  logic [$clog2(DEPTH+1)-1:0] link_tail,
  output logic [$clog2(DEPTH+1)-1:0] alloc_ptr,
  output logic     alloc_ok,
  input  logic     release_node,
  input  logic [$clog2(DEPTH+1)-1:0] rel_ptr,
  input  logic [$clog2(DEPTH+1)-1:0] rd_ptr,
  output product_t rd_word,
  output logic [$clog2(DEPTH+1)-1:0] rd_next,
  output logic [$clog2(DEPTH+1)-1:0] free_count
);
  localparam int unsigned PW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam logic [PW-1:0] NIL = '1;

  product_t       data [DEPTH];
  logic [PW-1:0]  nxt  [DEPTH];
  logic [PW-1:0]  free_head;

  // node index of a pointer (NIL is never used as an index)
  function automatic logic [AW-1:0] idx(logic [PW-1:0] p);
    return p[AW-1:0];
  endfunction

  assign alloc_ptr = release_node ? rel_ptr : free_head;
  assign alloc_ok  = release_node || (free_head != NIL);
  assign rd_word   = data[idx(rd_ptr)];
  assign rd_next   = nxt[idx(rd_ptr)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++)
        nxt[i] <= (i == DEPTH-1) ? NIL : PW'(i+1);
      free_head  <= '0;
      free_count <= PW'(DEPTH);
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++)
        nxt[i] <= (i == DEPTH-1) ? NIL : PW'(i+1);
      free_head  <= '0;
      free_count <= PW'(DEPTH);
    end else begin
      if (alloc && release_node) begin
        // the released node is reused at once
        data[idx(rel_ptr)] <= alloc_word;
        nxt[idx(rel_ptr)]  <= NIL;
        if (link) nxt[idx(link_tail)] <= rel_ptr;
      end else if (alloc && alloc_ok) begin
        data[idx(free_head)] <= alloc_word;
        nxt[idx(free_head)]  <= NIL;
        if (link) nxt[idx(link_tail)] <= free_head;
        free_head  <= nxt[idx(free_head)];
        free_count <= free_count - 1'b1;
      end else if (release_node) begin
        nxt[idx(rel_ptr)] <= free_head;
        free_head    <= rel_ptr;
        free_count   <= free_count + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   !(alloc && release_node && link && link_tail == rel_ptr))
    else $error("pmu_local_mem: released node is the tail being linked");
endmodule
