// ar2_buffer: duplicate of the AR2 shift-register array.
//
// Takes the whole AR2 array of the absorption unit in one cycle, frees the
// absorption unit for the next sum of products, and shifts the N products out
// one per cycle towards the cost evaluation and empty product detection
// units. out_last marks the N-th product of a batch.
// Interface: parallel load with load_valid/load_ready; valid/ready stream out.
// Timing: a batch leaves in N cycles when out_ready stays high.
// The buffer and its role follow the document; its handshakes are this
// design's own.
module ar2_buffer
  import gpf_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clear,
  input  logic     load_valid,
  output logic     load_ready,
  input  product_t load_words [N],
  output logic     out_valid,
  input  logic     out_ready,
  output product_t out_word,
  output logic     out_last
);
  product_t buf_q [N];
  logic [$clog2(N+1)-1:0] left;

  assign load_ready = (left == 0);
  assign out_valid  = (left != 0);
  assign out_word   = buf_q[0];
  assign out_last   = (left == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      for (int i = 0; i < N; i++) buf_q[i] <= EMPTY_PRODUCT;
    end else if (clear) begin
      left <= '0;
    end else if (load_valid && load_ready) begin
      buf_q <= load_words;
      left  <= ($clog2(N+1))'(N);
    end else if (out_valid && out_ready) begin
      for (int i = 0; i < N-1; i++) buf_q[i] <= buf_q[i+1];
      buf_q[N-1] <= EMPTY_PRODUCT;
      left <= left - 1'b1;
    end
  end
endmodule
