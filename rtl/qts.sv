// qts: pipelined parallel quad-tree sorter (QTS).
//
// Sorts batches of N items (N a power of 4) by the cost field, smallest first,
// padding items last. Items arrive serially into a two-level input buffer of
// two rows of N/2 cells. When the buffer is full and the leaf cells are free,
// each column is compare-swapped so that the lower cost lies in row 1, next to
// the leaves, and all N items move in parallel into the cells of the leaf PEs:
// leaf PE k takes row 1 and row 2 of columns 2k and 2k+1. The tree has
// TL = log4(N) levels and TP = (4^TL-1)/3 PEs, numbered heap-wise (root 0,
// children of PE k are 4k+1..4k+4). Every PE has its own PIPE of N/4^j - 1
// cells, j being its level with the root at 0. Sorted items leave the root
// PIPE one per cycle; out_last marks the N-th item of a batch. The input
// buffer refills while the tree sorts the previous batch.
// level_fwd[j] is the Forward signal F of tree level j (root = 0): 1 when
// every PE of the level is idle, 0 while any of them works on a batch.
// swap_event pulses when the input buffer swapped a column.
// The tree, the PE, the PIPE sizes and the buffer follow the document; the
// mapping of buffer cells to leaf inputs and the handshakes are this design's.
module qts
  import gpf_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  output logic  in_ready,
  input  item_t in_item,
  output logic  out_valid,
  input  logic  out_ready,
  output item_t out_item,
  output logic  out_last,
  output logic  swap_event,
  output logic [$clog2(N)/2-1:0] level_fwd
);
  localparam int unsigned TL = $clog2(N) / 2;
  localparam int unsigned TP = ((4**TL) - 1) / 3;
  localparam int unsigned FIRST_LEAF = ((4**(TL-1)) - 1) / 3;
  localparam int unsigned H = N / 2;

  initial assert (4**TL == N && N >= 4) else $error("qts: N must be a power of 4");

  // ---------------- two-level input buffer ----------------
  item_t ib [N];
  logic [$clog2(N+1)-1:0] ib_cnt;
  item_t leaf_cell [N];
  logic [N-1:0] leaf_avail;
  logic [N-1:0] leaf_pop;
  logic transfer;

  function automatic logic gt(item_t a, item_t b);
    return {!a.valid, a.word[COST_W-1:0]} > {!b.valid, b.word[COST_W-1:0]};
  endfunction

  assign in_ready = (ib_cnt != ($clog2(N+1))'(N));
  assign transfer = (ib_cnt == ($clog2(N+1))'(N)) && (leaf_avail == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib_cnt <= '0;
      leaf_avail <= '0;
      swap_event <= 1'b0;
      for (int i = 0; i < N; i++) begin
        ib[i] <= '0;
        leaf_cell[i] <= '0;
      end
    end else if (clear) begin
      ib_cnt <= '0;
      leaf_avail <= '0;
      swap_event <= 1'b0;
    end else begin
      leaf_avail <= leaf_avail & ~leaf_pop;
      swap_event <= 1'b0;
      if (in_valid && in_ready) begin
        ib[ib_cnt[$clog2(N)-1:0]] <= in_item;
        ib_cnt <= ib_cnt + 1'b1;
      end else if (transfer) begin
        ib_cnt <= '0;
        leaf_avail <= '1;
        for (int c = 0; c < H; c++) begin
          // column c: row 1 = ib[c], row 2 = ib[c+H]
          logic sw;
          sw = gt(ib[c], ib[c+H]);
          if (sw) swap_event <= 1'b1;
          leaf_cell[4*(c/2) + 2*(c%2)]     <= sw ? ib[c+H] : ib[c];
          leaf_cell[4*(c/2) + 2*(c%2) + 1] <= sw ? ib[c] : ib[c+H];
        end
      end
    end
  end

  // ---------------- tree of PEs with PIPEs ----------------
  logic  pipe_avail [TP];
  item_t pipe_item  [TP];
  logic  pipe_pop   [TP];
  logic  pipe_full  [TP];
  logic  pe_push    [TP];
  item_t pe_item    [TP];

  // level of PE k in the heap numbering, root = 0
  function automatic int unsigned level_of(int unsigned k);
    int unsigned l, first;
    l = 0;
    first = 0;
    while (k >= first + 4**l) begin
      first += 4**l;
      l++;
    end
    return l;
  endfunction

  // Forward signal per level
  logic [TP-1:0] pe_fwd;
  for (genvar j = 0; j < TL; j++) begin : g_lev
    localparam int unsigned LO = ((4**j) - 1) / 3;
    localparam int unsigned HI = ((4**(j+1)) - 1) / 3 - 1;
    assign level_fwd[j] = &pe_fwd[HI:LO];
  end

  for (genvar k = 0; k < TP; k++) begin : g_pe
    localparam int unsigned LEV = level_of(k);
    localparam int unsigned CHILD_LEN = N / (4**(LEV+1));
    localparam int unsigned DEPTH = N / (4**LEV) - 1;
    logic [3:0] ch_avail, ch_pop;
    item_t ch_item [4];
    logic s1, s2, s3, en, fwd;

    if (k >= FIRST_LEAF) begin : g_leaf
      for (genvar c = 0; c < 4; c++) begin : g_c
        assign ch_avail[c] = leaf_avail[4*(k-FIRST_LEAF)+c];
        assign ch_item[c]  = leaf_cell[4*(k-FIRST_LEAF)+c];
        assign leaf_pop[4*(k-FIRST_LEAF)+c] = ch_pop[c];
      end
    end else begin : g_inner
      for (genvar c = 0; c < 4; c++) begin : g_c
        assign ch_avail[c] = pipe_avail[4*k+1+c];
        assign ch_item[c]  = pipe_item[4*k+1+c];
        assign pipe_pop[4*k+1+c] = ch_pop[c];
      end
    end

    qts_pe #(.CHILD_LEN(CHILD_LEN)) u_pe (
      .clk, .rst_n, .clear,
      .ch_avail, .ch_item, .ch_pop,
      .out_full(pipe_full[k]), .out_push(pe_push[k]), .out_item(pe_item[k]),
      .s1, .s2, .s3, .en, .fwd);
    assign pe_fwd[k] = fwd;

    pipe_fifo #(.DEPTH(DEPTH)) u_pipe (
      .clk, .rst_n, .clear,
      .push(pe_push[k]), .in_item(pe_item[k]), .full(pipe_full[k]),
      .pop(pipe_pop[k]), .out_avail(pipe_avail[k]), .out_item(pipe_item[k]));
  end

  // ---------------- root output ----------------
  logic [$clog2(N)-1:0] out_cnt;
  assign out_valid   = pipe_avail[0];
  assign out_item    = pipe_item[0];
  assign pipe_pop[0] = out_ready;
  assign out_last    = (out_cnt == ($clog2(N))'(N-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_cnt <= '0;
    else if (clear) out_cnt <= '0;
    else if (out_valid && out_ready) out_cnt <= out_cnt + 1'b1;
  end
endmodule
