// tb_ar2_buffer: loads random batches in parallel and checks that they come
// out in slot order, N beats per batch with out_last on the N-th, under
// random back-pressure, and that a new batch is refused until the old one has
// left.
module tb_ar2_buffer;
  import gpf_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, clear = 0, load_valid = 0, load_ready, out_valid, out_ready = 0, out_last;
  product_t load_words [N];
  product_t out_word;
  product_t exp_q [$];
  int checks = 0, failures = 0, cyc = 0, beats = 0, refused = 0;

  ar2_buffer #(.N(N)) dut (.clk, .rst_n, .clear, .load_valid, .load_ready, .load_words,
                           .out_valid, .out_ready, .out_word, .out_last);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (cyc > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_word !== exp_q[0] || out_last !== (beats % N == N-1)) begin
        failures++;
        $display("FAIL beat %0d: %h", beats, out_word);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      beats++;
    end
    if (rst_n && load_valid) begin
      if (load_ready) for (int i = 0; i < N; i++) exp_q.push_back(load_words[i]);
      else refused++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
      load_valid = ($urandom_range(0, 4) == 0);
      for (int k = 0; k < N; k++) load_words[k] = {32'($urandom), 32'($urandom), 32'(i), 32'(k)};
    end
    @(negedge clk);
    load_valid = 0;
    out_ready = 1;
    repeat (2*N) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || refused == 0) begin
      failures++;
      $display("FAIL left=%0d refused=%0d", exp_q.size(), refused);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
