// tb_cpg: loads a random term into AR, sends several R products, and checks
// that for each R the generator emits R AND AR[j] for every j in order, one
// per cycle when not stalled, with out_last only after the last R; also
// checks the AR overflow flag and that ar_clear empties AR.
module tb_cpg;
  import gpf_pkg::*;
  localparam int unsigned AR_N = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic ar_push = 0, ar_clear = 0, ar_overflow, r_valid = 0, r_ready, r_last = 0;
  logic out_valid, out_ready = 1, out_last;
  product_t ar_word, r_word, out_word;
  logic [$clog2(AR_N+1)-1:0] ar_count;
  product_t exp_q [$];
  logic exp_last [$];
  int checks = 0, failures = 0, cyc = 0, n_ovf = 0, busy_cycles = 0, outs = 0;

  cpg #(.AR_N(AR_N)) dut (.clk, .rst_n, .clear, .ar_push, .ar_word, .ar_clear, .ar_count,
                          .ar_overflow, .r_valid, .r_ready, .r_word, .r_last,
                          .out_valid, .out_ready, .out_word, .out_last);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (ar_overflow) n_ovf++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_word !== exp_q[0] || out_last !== exp_last[0]) begin
        failures++;
        $display("FAIL out %h", out_word);
      end
      if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(exp_last.pop_front()); end
      outs++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      automatic product_t ar [$];
      automatic int k = $urandom_range(1, AR_N + ((t % 10 == 0) ? 2 : 0));
      automatic int nr = $urandom_range(1, 5);
      automatic int t0;
      @(negedge clk);
      ar_clear = 1;
      @(negedge clk);
      ar_clear = 0;
      checks++;
      if (ar_count != 0) begin failures++; $display("FAIL ar_clear"); end
      for (int j = 0; j < k; j++) begin
        ar_push = 1;
        ar_word = {$urandom, $urandom, $urandom, $urandom};
        if (j < AR_N) ar.push_back(ar_word);
        @(negedge clk);
      end
      ar_push = 0;
      out_ready = (t < 50) ? 1'b1 : 1'b0;
      t0 = cyc;
      for (int i = 0; i < nr; i++) begin
        r_valid = 1;
        r_word = {$urandom, $urandom, $urandom, $urandom};
        r_last = (i == nr-1);
        foreach (ar[j]) begin
          exp_q.push_back(r_word & ar[j]);
          exp_last.push_back(r_last && j == ar.size()-1);
        end
        #1;
        while (!r_ready) begin
          @(negedge clk);
          if (t >= 50) out_ready = ($urandom_range(0, 1) != 0);
          #1;
        end
        @(negedge clk);
        if (t >= 50) out_ready = ($urandom_range(0, 1) != 0);
      end
      r_valid = 0;
      while (exp_q.size() != 0) begin
        @(negedge clk);
        out_ready = 1;
      end
      if (t < 50) begin
        // unstalled: nr*|AR| products in that many cycles (+1 to accept the first R)
        checks++;
        if (cyc - t0 > nr * ar.size() + 2) begin
          failures++;
          $display("FAIL rate: %0d cycles for %0d products", cyc - t0, nr * ar.size());
        end
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL AR overflow never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
