// au: Product Absorption Unit.
//
// Two arrays of N product registers, AR1 and AR2, start as empty products
// (all zero). Each accepted product enters AR1[0] while AR1 shifts one place
// to the right; in the same cycle every position i compares the shifted AR1[i]
// with AR2[i] in its PDD:
//   AR2[i] dominates AR1[i] -> AR2[i] takes AR1[i], AR1[i] becomes empty
//   AR1[i] dominates AR2[i] -> AR1[i] becomes empty (product absorbed)
//   otherwise               -> nothing
// An empty AR2 slot dominates everything, so a product that survives is kept
// in the first free slot it meets; identical products absorb each other.
// After the product flagged in_last, N-1 further shifts of empty products
// flush AR1, then AR2 is offered in parallel on out_words (out_valid) and
// cleared when out_ready takes it. A product that leaves the right end of AR1
// uncaptured (more than N distinct products) is dropped and counted by an
// overflow pulse; the absorbed pulse reports that a product was absorbed.
// Interface: valid/ready stream in, one product per cycle; parallel batch out.
// Timing: a batch of K products is offered K+N-1 cycles after its first
// product is accepted if products arrive back to back.
// The array organisation and the step rules follow the document. The flush,
// the handshakes and the overflow pulse are this design's own.
module au
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
  output product_t out_words [N],
  output logic     overflow,
  output logic     absorbed
);
  typedef enum logic [1:0] {RUN, FLUSH, HOLD} state_e;
  state_e state;
  logic [$clog2(N+1)-1:0] flush_cnt;

  product_t ar1 [N];
  product_t ar2 [N];
  product_t sh  [N];
  product_t ar1_n [N];
  product_t ar2_n [N];
  logic [N-1:0] d21, d12;
  logic step;
  logic [N-1:0] absorb_hit;

  assign in_ready  = (state == RUN);
  assign out_valid = (state == HOLD);
  assign step = (state == RUN && in_valid) || (state == FLUSH);

  always_comb begin
    for (int i = 0; i < N; i++)
      sh[i] = (i == 0) ? ((state == RUN) ? in_word : EMPTY_PRODUCT) : ar1[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_pdd
    pdd u_pdd (.ar1(sh[i]), .ar2(ar2[i]),
               .ar2_dominates_ar1(d21[i]), .ar1_dominates_ar2(d12[i]));
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ar1_n[i] = sh[i];
      ar2_n[i] = ar2[i];
      absorb_hit[i] = 1'b0;
      if (d21[i]) begin
        ar2_n[i] = sh[i];
        ar1_n[i] = EMPTY_PRODUCT;
      end else if (d12[i]) begin
        ar1_n[i] = EMPTY_PRODUCT;
        absorb_hit[i] = (sh[i] != EMPTY_PRODUCT);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= RUN;
      flush_cnt <= '0;
      overflow  <= 1'b0;
      absorbed  <= 1'b0;
      for (int i = 0; i < N; i++) begin
        ar1[i] <= EMPTY_PRODUCT;
        ar2[i] <= EMPTY_PRODUCT;
      end
    end else if (clear) begin
      state     <= RUN;
      flush_cnt <= '0;
      overflow  <= 1'b0;
      absorbed  <= 1'b0;
      for (int i = 0; i < N; i++) begin
        ar1[i] <= EMPTY_PRODUCT;
        ar2[i] <= EMPTY_PRODUCT;
      end
    end else begin
      overflow <= step && (ar1[N-1] != EMPTY_PRODUCT);
      absorbed <= step && |absorb_hit;
      if (step) begin
        ar1 <= ar1_n;
        ar2 <= ar2_n;
      end
      unique case (state)
        RUN: if (in_valid && in_last) begin
          flush_cnt <= ($clog2(N+1))'(N-1);
          state     <= (N > 1) ? FLUSH : HOLD;
        end
        FLUSH: begin
          flush_cnt <= flush_cnt - 1'b1;
          if (flush_cnt == 1) state <= HOLD;
        end
        HOLD: if (out_ready) begin
          state <= RUN;
          for (int i = 0; i < N; i++) ar2[i] <= EMPTY_PRODUCT;
        end
        default: state <= RUN;
      endcase
    end
  end

  always_comb out_words = ar2;
endmodule
