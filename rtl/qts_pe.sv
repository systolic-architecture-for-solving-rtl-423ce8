// qts_pe: processing element of the quad-tree sorter.
//
// Merges four sorted child lists of CHILD_LEN items each into one sorted list
// of 4*CHILD_LEN items, pushed into the PE's output PIPE. Comparator C1
// compares the heads of children 0 and 1, C2 those of children 2 and 3, and C3
// the two winners. Each status signal S is 1 when the left value is greater
// than the right one, so on equal cost the left item wins. Padding items
// (valid=0) sort after all real ones, and a child whose list is used up sorts
// last of all. The combinational control circuit moves the smallest item on
// when the PIPE has room and every child that still owes items shows one;
// en (the Enable signal E of C3) is 1 when C3's left cell is the one moved.
// fwd (the Forward signal F) is 0 while the PE is working on a batch and 1
// when it is idle. After 4*CHILD_LEN items the PE starts the next batch, so
// successive batches follow each other through the tree.
// Timing: one item per cycle when the children and the PIPE keep up.
// The comparator structure, the status rule and the left priority follow the
// document; the exhaustion counters and the fire rule are this design's own.
module qts_pe
  import gpf_pkg::*;
#(
  parameter int unsigned CHILD_LEN = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic [3:0] ch_avail,
  input  item_t      ch_item [4],
  output logic [3:0] ch_pop,
  input  logic       out_full,
  output logic       out_push,
  output item_t      out_item,
  output logic       s1,
  output logic       s2,
  output logic       s3,
  output logic       en,
  output logic       fwd
);
  localparam int unsigned CW = $clog2(CHILD_LEN+1);
  localparam int unsigned TW = $clog2(4*CHILD_LEN+1);
  typedef logic [COST_W+1:0] key_t;

  logic [CW-1:0] taken [4];
  logic [TW-1:0] total;
  logic [3:0] done;
  key_t key [4];
  logic [1:0] w1, w2, sel;
  logic ready_all;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      done[c] = (taken[c] == CW'(CHILD_LEN));
      key[c]  = {done[c], !ch_item[c].valid, ch_item[c].word[COST_W-1:0]};
    end
    s1  = key[0] > key[1];
    w1  = s1 ? 2'd1 : 2'd0;
    s2  = key[2] > key[3];
    w2  = s2 ? 2'd3 : 2'd2;
    s3  = key[w1] > key[w2];
    en  = !s3;
    sel = s3 ? w2 : w1;
    ready_all = &(ch_avail | done);
    out_push  = ready_all && !(&done) && !out_full;
    out_item  = ch_item[sel];
    ch_pop    = out_push ? (4'b0001 << sel) : 4'b0000;
    fwd       = (total == 0) && !(|ch_avail);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total <= '0;
      for (int c = 0; c < 4; c++) taken[c] <= '0;
    end else if (clear) begin
      total <= '0;
      for (int c = 0; c < 4; c++) taken[c] <= '0;
    end else if (out_push) begin
      if (total == TW'(4*CHILD_LEN-1)) begin
        total <= '0;
        for (int c = 0; c < 4; c++) taken[c] <= '0;
      end else begin
        total <= total + 1'b1;
        taken[sel] <= taken[sel] + 1'b1;
      end
    end
  end
endmodule
