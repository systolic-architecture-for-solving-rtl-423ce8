// tb_stream_join: two random streams of framed packets with random gaps and
// back-pressure; checks that the output carries one packet of a, then one of
// b, and so on, word for word, with the last flag only at the end of b.
module tb_stream_join;
  import gpf_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic a_valid = 0, a_ready, a_last = 0, b_valid = 0, b_ready, b_last = 0;
  logic y_valid, y_ready = 1, y_last;
  product_t a_word, b_word, y_word;
  product_t exp_q [$];
  logic exp_last [$];
  int checks = 0, failures = 0, cyc = 0;

  stream_join dut (.clk, .rst_n, .clear, .a_valid, .a_ready, .a_word, .a_last,
                   .b_valid, .b_ready, .b_word, .b_last, .y_valid, .y_ready, .y_word, .y_last);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (rst_n && y_valid && y_ready) begin
      checks++;
      if (exp_q.size() == 0 || y_word !== exp_q[0] || y_last !== exp_last[0]) begin
        failures++;
        $display("FAIL word %h last %b", y_word, y_last);
      end
      if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(exp_last.pop_front()); end
    end
  end
  always @(negedge clk) y_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      automatic int na = $urandom_range(1, 5), nb = $urandom_range(1, 5);
      product_t pa [$];
      product_t pb [$];
      pa.delete(); pb.delete();
      for (int i = 0; i < na; i++) pa.push_back({96'(p), 32'(i)});
      for (int i = 0; i < nb; i++) pb.push_back({96'(p), 32'(100 + i)});
      foreach (pa[i]) begin exp_q.push_back(pa[i]); exp_last.push_back(1'b0); end
      foreach (pb[i]) begin exp_q.push_back(pb[i]); exp_last.push_back(i == nb-1); end
      fork
        foreach (pa[i]) begin
          @(negedge clk);
          a_valid = 1; a_word = pa[i]; a_last = (i == na-1);
          #1;
          while (!a_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          a_valid = 0;
        end
        foreach (pb[i]) begin
          @(negedge clk);
          b_valid = 1; b_word = pb[i]; b_last = (i == nb-1);
          #1;
          while (!b_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          b_valid = 0;
        end
      join
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
