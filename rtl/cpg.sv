// cpg: Cartesian Product Generator.
//
// Holds one term, a list of up to AR_N products, in the register array AR,
// and one product in register R. For every R it accepts, it sends R AND AR[j]
// for j = 0 .. count-1 to the SAPA, one product per cycle; the bitwise AND of
// two words is the Boolean product of the two products. out_last is raised
// with the last product made from an R accepted with r_last, which closes
// the SPF for the SAPA. ar_push appends a product to AR; ar_clear empties it.
// Timing: an R with an AR of K products takes K cycles, back to back when the
// SAPA is ready, and the next R is accepted in the cycle the last product
// leaves.
// R, AR and the AND follow the document; the handshakes are this design's.
module cpg
  import gpf_pkg::*;
#(
  parameter int unsigned AR_N = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     ar_push,
  input  product_t ar_word,
  input  logic     ar_clear,
  output logic [$clog2(AR_N+1)-1:0] ar_count,
  output logic     ar_overflow,
  input  logic     r_valid,
  output logic     r_ready,
  input  product_t r_word,
  input  logic     r_last,
  output logic     out_valid,
  input  logic     out_ready,
  output product_t out_word,
  output logic     out_last
);
  localparam int unsigned CW = $clog2(AR_N+1);
  localparam int unsigned AW = (AR_N > 1) ? $clog2(AR_N) : 1;
  product_t ar [AR_N];
  product_t r;
  logic     r_full, r_is_last;
  logic [CW-1:0] j;
  logic     out_last_of_r;

  assign r_ready   = !r_full || (out_valid && out_ready && out_last_of_r);
  assign out_valid = r_full;
  assign out_word  = r & ar[j[AW-1:0]];
  assign out_last_of_r = (j == ar_count - 1'b1);
  assign out_last  = r_is_last && out_last_of_r;
  assign ar_overflow = ar_push && (ar_count == CW'(AR_N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_count <= '0;
      r_full <= 1'b0;
      r_is_last <= 1'b0;
      r <= '0;
      j <= '0;
      for (int i = 0; i < AR_N; i++) ar[i] <= '0;
    end else if (clear) begin
      ar_count <= '0;
      r_full <= 1'b0;
      j <= '0;
    end else begin
      if (ar_clear) ar_count <= '0;
      else if (ar_push && !ar_overflow) begin
        ar[ar_count[AW-1:0]] <= ar_word;
        ar_count <= ar_count + 1'b1;
      end
      if (out_valid && out_ready) begin
        if (out_last_of_r) begin
          r_full <= 1'b0;
          j <= '0;
        end else j <= j + 1'b1;
      end
      if (r_valid && r_ready) begin
        r <= r_word;
        r_is_last <= r_last;
        r_full <= (ar_count != 0);
        j <= '0;
      end
    end
  end
endmodule
