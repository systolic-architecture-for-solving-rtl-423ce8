// pipe_fifo: the FIFO PIPE at the output of a quad-tree sorter PE.
//
// A first-in first-out queue of DEPTH sorter items. A push and a pop may
// happen in the same cycle, also when the queue is full. The head is
// visible on out_item whenever out_avail is high.
// The document sizes the PIPE of tree level j (root = 0) as N/4^j - 1 cells;
// the parent passes that depth in. The handshake is this design's own.
module pipe_fifo
  import gpf_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  push,
  input  item_t in_item,
  output logic  full,
  input  logic  pop,
  output logic  out_avail,
  output item_t out_item
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  item_t mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic do_push, do_pop;

  assign out_avail = (cnt != 0);
  assign out_item  = mem[rd];
  assign do_pop    = pop && out_avail;
  assign do_push   = push && (!full || do_pop);
  assign full      = (cnt == ($clog2(DEPTH+1))'(DEPTH));

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      rd <= '0; wr <= '0; cnt <= '0;
    end else begin
      if (do_push) begin
        mem[wr] <= in_item;
        wr <= inc(wr);
      end
      if (do_pop) rd <= inc(rd);
      if (do_push && !do_pop) cnt <= cnt + 1'b1;
      else if (do_pop && !do_push) cnt <= cnt - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("pipe_fifo: push into a full PIPE");
endmodule
