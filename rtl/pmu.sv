// pmu: Product Management Unit, with its micro-controller (CU), its
// Cartesian product generator (CPG) and its local memory.
//
// The PMU multiplies a product of terms, each term a sum of products, down to
// one simplified sum of products. Terms arrive on the input stream as
// products followed by an empty (all-zero) product that ends the term; in_last
// comes with the separator of the final term. The CU keeps a queue of terms in
// local memory as linked lists and works as follows:
//   1. the first INIT_TERMS-1 terms go to local memory, the next one into the
//      CPG register array AR;
//   2. the products of the term at the head of the queue are taken one at a
//      time into register R (their nodes freed), and the CPG sends R AND AR[j]
//      for every j to the SAPA;
//   3. as soon as the CPG has sent the last product of a round, AR is
//      emptied and the next round is prepared: while input remains, the next
//      input term is loaded into AR; once the input is used up, the head list
//      of the queue is moved from memory into AR instead. A round starts when
//      AR is loaded and a finished list heads the queue, so the PMU builds the
//      next SPF while the SAPA is still working on earlier ones;
//   4. each simplified, sorted SPF that the SAPA returns is stored as a new
//      list at the tail of the queue, whatever state the CU is in (a node
//      freed by the round in progress is reused in the same cycle);
//   5. once the input is used up, nothing is in the SAPA and one list is
//      left, that list is sent on the output stream, closed by an empty
//      product with out_last, and the PMU reports done.
// A term, or a SAPA result, with no products means the whole formula has no
// solution: the PMU stops and raises unsat until clear. load_me is high while
// the PMU waits for a term from the host or a child. Products beyond the
// memory or AR capacity are dropped and flagged.
// The queue order (first terms to memory, the next to AR, results appended as
// new lists, head term fed to R) and the overlap of a round with the SAPA work
// on the previous one follow the document; the stream format,
// the end-of-input handling by moving lists into AR, and the flags are this
// design's own.
module pmu
  import gpf_pkg::*;
#(
  parameter int unsigned AR_N       = 16,
  parameter int unsigned MEM_DEPTH  = 64,
  parameter int unsigned INIT_TERMS = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  // terms from the host or the child BPPs
  input  logic     in_valid,
  output logic     in_ready,
  input  product_t in_word,
  input  logic     in_last,
  output logic     load_me,
  // Cartesian products to the SAPA
  output logic     sp_valid,
  input  logic     sp_ready,
  output product_t sp_word,
  output logic     sp_last,
  // simplified SPF back from the SAPA
  input  logic     fs_valid,
  output logic     fs_ready,
  input  item_t    fs_item,
  input  logic     fs_last,
  // result towards the parent BPP or the host
  output logic     out_valid,
  input  logic     out_ready,
  output product_t out_word,
  output logic     out_last,
  // status
  output logic     done,
  output logic     unsat,
  output logic     mem_overflow,
  output logic     ar_overflow,
  output logic     ar_from_mem
);
  localparam int unsigned PW   = $clog2(MEM_DEPTH+1);
  localparam int unsigned MAXL = INIT_TERMS;
  localparam int unsigned LW   = (MAXL > 1) ? $clog2(MAXL) : 1;
  localparam int unsigned QW   = $clog2(MAXL+1);

  typedef enum logic [3:0] {
    RECV_MEM, RECV_AR, DECIDE, AR_FROM_MEM, MULT, NEXT,
    OUT_LIST, OUT_SEP, DONE, UNSAT
  } state_e;
  state_e state;

  // list descriptors, a circular queue of MAXL slots
  logic [PW-1:0] l_head [MAXL];
  logic [PW-1:0] l_tail [MAXL];
  logic [PW-1:0] l_cnt  [MAXL];
  logic [LW-1:0] qh;
  logic [QW-1:0] qn;
  logic [QW-1:0] inflight;   // SPFs sent to the SAPA and not yet returned
  logic          input_done;

  function automatic logic [LW-1:0] slot(logic [LW-1:0] base, logic [QW-1:0] off);
    return LW'((32'(base) + 32'(off)) % MAXL);
  endfunction

  logic [LW-1:0] open_l;
  assign open_l = slot(qh, qn);

  // local memory
  logic          m_alloc, m_link, m_alloc_ok, m_release;
  product_t      m_alloc_word, m_rd_word;
  logic [PW-1:0] m_link_tail, m_alloc_ptr, m_rd_next, m_free_count;

  pmu_local_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n, .clear,
    .alloc(m_alloc), .alloc_word(m_alloc_word), .link(m_link),
    .link_tail(m_link_tail), .alloc_ptr(m_alloc_ptr), .alloc_ok(m_alloc_ok),
    .release_node(m_release), .rel_ptr(l_head[qh]), .rd_ptr(l_head[qh]),
    .rd_word(m_rd_word), .rd_next(m_rd_next), .free_count(m_free_count));

  // CPG
  logic     c_ar_push, c_ar_clear, c_ar_ovf, c_r_valid, c_r_ready, c_r_last;
  product_t c_ar_word;
  logic [$clog2(AR_N+1)-1:0] c_ar_count;

  cpg #(.AR_N(AR_N)) u_cpg (
    .clk, .rst_n, .clear,
    .ar_push(c_ar_push), .ar_word(c_ar_word), .ar_clear(c_ar_clear),
    .ar_count(c_ar_count), .ar_overflow(c_ar_ovf),
    .r_valid(c_r_valid), .r_ready(c_r_ready), .r_word(m_rd_word),
    .r_last(c_r_last),
    .out_valid(sp_valid), .out_ready(sp_ready), .out_word(sp_word),
    .out_last(sp_last));

  logic in_fire, fs_fire, out_fire, head_last, in_sep, append;
  logic sp_done, fs_done, res_empty, pop_list, close_in, close_res;

  always_comb begin
    in_ready  = (state == RECV_MEM) || (state == RECV_AR);
    load_me   = in_ready;
    fs_ready  = (state != UNSAT) && (state != DONE);
    in_fire   = in_valid && in_ready;
    fs_fire   = fs_valid && fs_ready;
    in_sep    = (in_word == EMPTY_PRODUCT);
    head_last = (l_cnt[qh] == 1);

    out_valid = (state == OUT_LIST) || (state == OUT_SEP);
    out_word  = (state == OUT_LIST) ? m_rd_word : EMPTY_PRODUCT;
    out_last  = (state == OUT_SEP);
    out_fire  = out_valid && out_ready;

    c_r_valid = (state == MULT) && (qn != 0);
    c_r_last  = head_last;
    c_ar_push = 1'b0;
    c_ar_word = in_word;
    if (state == RECV_AR && in_fire && !in_sep) c_ar_push = 1'b1;
    if (state == AR_FROM_MEM) begin
      c_ar_push = 1'b1;
      c_ar_word = m_rd_word;
    end
    // AR is emptied once the CPG has finished with it
    c_ar_clear = (state == NEXT) && !sp_valid;
    sp_done    = sp_valid && sp_ready && sp_last;
    fs_done    = fs_fire && fs_last;
    res_empty  = (l_cnt[open_l] == 0) && !(fs_item.valid && m_alloc_ok);

    // products that join the open list in memory
    append = (state == RECV_MEM && in_fire && !in_sep) ||
             (fs_fire && fs_item.valid);
    m_alloc      = append;
    m_alloc_word = (state == RECV_MEM) ? in_word : fs_item.word;
    m_link       = (l_cnt[open_l] != 0);
    m_link_tail  = l_tail[open_l];

    m_release = (state == AR_FROM_MEM) ||
                (c_r_valid && c_r_ready) ||
                (state == OUT_LIST && out_fire);
    pop_list  = m_release && head_last;
    // a list is closed by an input separator or by the end of a SAPA result
    close_in  = (state == RECV_MEM) && in_fire && in_sep &&
                (l_cnt[open_l] != 0);
    close_res = fs_done && !res_empty;

    done  = (state == DONE);
    unsat = (state == UNSAT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RECV_MEM;
      qh <= '0;
      qn <= '0;
      inflight <= '0;
      input_done <= 1'b0;
      mem_overflow <= 1'b0;
      ar_overflow <= 1'b0;
      ar_from_mem <= 1'b0;
      for (int i = 0; i < MAXL; i++) begin
        l_head[i] <= '0; l_tail[i] <= '0; l_cnt[i] <= '0;
      end
    end else if (clear) begin
      state <= RECV_MEM;
      qh <= '0;
      qn <= '0;
      inflight <= '0;
      input_done <= 1'b0;
      mem_overflow <= 1'b0;
      ar_overflow <= 1'b0;
      ar_from_mem <= 1'b0;
      for (int i = 0; i < MAXL; i++) l_cnt[i] <= '0;
    end else begin
      ar_from_mem <= 1'b0;
      if (c_ar_ovf) ar_overflow <= 1'b1;
      if (append && !m_alloc_ok) mem_overflow <= 1'b1;
      // grow the open list
      if (append && m_alloc_ok) begin
        if (l_cnt[open_l] == 0) l_head[open_l] <= m_alloc_ptr;
        l_tail[open_l] <= m_alloc_ptr;
        l_cnt[open_l]  <= l_cnt[open_l] + 1'b1;
      end
      // shrink the head list
      if (m_release) begin
        l_head[qh] <= m_rd_next;
        l_cnt[qh]  <= l_cnt[qh] - 1'b1;
      end
      if (pop_list) qh <= slot(qh, QW'(1));
      qn <= qn + QW'(close_in || close_res) - QW'(pop_list);
      if (close_in || close_res) l_cnt[slot(qh, qn + 1'b1)] <= '0;
      inflight <= inflight + QW'(sp_done) - QW'(fs_done);

      unique case (state)
        RECV_MEM: if (in_fire) begin
          if (in_last) input_done <= 1'b1;
          if (in_sep) begin
            if (!close_in) state <= UNSAT;
            else if (in_last) state <= DECIDE;
            else if (32'(qn) + 1 >= INIT_TERMS - 1) state <= RECV_AR;
          end
        end
        RECV_AR: if (in_fire && in_sep) begin
          if (in_last) input_done <= 1'b1;
          if (c_ar_count == 0) state <= UNSAT;
          else state <= MULT;
        end
        DECIDE: begin
          if (qn >= 2) begin
            state <= AR_FROM_MEM;
            ar_from_mem <= 1'b1;
          end else if (inflight == 0) begin
            state <= (qn == 1) ? OUT_LIST : UNSAT;
          end
        end
        AR_FROM_MEM: if (head_last) state <= MULT;
        MULT: if (c_r_valid && c_r_ready && head_last) state <= NEXT;
        NEXT: if (!sp_valid) state <= input_done ? DECIDE : RECV_AR;
        OUT_LIST: if (out_fire && head_last) state <= OUT_SEP;
        OUT_SEP: if (out_fire) state <= DONE;
        DONE: ;
        UNSAT: ;
        default: state <= UNSAT;
      endcase
      // an empty result ends everything
      if (fs_done && res_empty) state <= UNSAT;
    end
  end

  // every round takes a list before its result adds one, so finished lists
  // plus SPFs in flight never exceed the lists kept at the start; this is what
  // lets MAXL slots hold the whole queue
  assert property (@(posedge clk) disable iff (!rst_n)
                   32'(qn) + 32'(inflight) <= INIT_TERMS - 1)
    else $error("pmu: list queue larger than expected");

  logic [PW-1:0] unused_free;
  assign unused_free = m_free_count;
endmodule
