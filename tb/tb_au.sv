// tb_au: drives sums of products into the absorption unit and checks each
// AR2 batch (a) slot by slot against a sequential model of the absorption
// procedure, (b) that every product offered implies some product kept (no
// product of the function is lost without overflow), (c) that every kept
// product was offered, and (d) the batch latency K+N-1 for K back-to-back
// products. Products use few variables so that absorption happens often.
module tb_au;
  import gpf_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, overflow, absorbed;
  product_t in_word;
  product_t out_words [N];
  int checks = 0, failures = 0, cyc = 0, n_ovf = 0, n_absorb = 0;

  au #(.N(N)) dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_word, .in_last,
                   .out_valid, .out_ready, .out_words, .overflow, .absorbed);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (overflow) n_ovf++;
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic covers_in(product_t x, product_t y); // x implies y
    return ((x & ~y) & LIT_MASK) == '0;
  endfunction

  function automatic product_t rnd_product(int nv);
    product_t p = {{61{2'b11}}, 6'd0};
    for (int v = 0; v < nv; v++) begin
      int r;
      r = $urandom_range(0, 2);
      p[127-2*v -: 2] = (r == 0) ? 2'b10 : (r == 1) ? 2'b01 : 2'b11;
    end
    p[5:0] = 6'($urandom);
    return p;
  endfunction

  task automatic run_batch(int k, int nv);
    product_t ins [$];
    product_t m [N];
    logic dropped = 0;
    int t0, t1;
    for (int i = 0; i < N; i++) m[i] = '0;
    for (int i = 0; i < k; i++) ins.push_back(rnd_product(nv));
    // sequential model of the procedure
    foreach (ins[j]) begin
      logic placed = 0;
      for (int i = 0; i < N && !placed; i++) begin
        if (covers_in(m[i], ins[j])) begin m[i] = ins[j]; placed = 1; end
        else if (covers_in(ins[j], m[i])) begin placed = 1; n_absorb++; end
      end
      if (!placed) dropped = 1;
    end
    @(negedge clk);
    t0 = cyc;
    for (int j = 0; j < k; j++) begin
      in_valid = 1; in_word = ins[j]; in_last = (j == k-1);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    while (!out_valid) @(negedge clk);
    t1 = cyc;
    checks++;
    if (t1 - t0 != k + N - 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", t1 - t0, k + N - 1);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out_words[i] !== m[i]) begin
        failures++;
        $display("FAIL slot %0d: %h expected %h", i, out_words[i], m[i]);
      end
    end
    if (!dropped) begin
      foreach (ins[j]) begin
        logic ok = 0;
        for (int i = 0; i < N; i++) if (out_words[i] != '0 && covers_in(ins[j], out_words[i])) ok = 1;
        checks++;
        if (!ok) begin failures++; $display("FAIL product %h lost", ins[j]); end
      end
    end
    for (int i = 0; i < N; i++) begin
      logic found = (out_words[i] == '0);
      foreach (ins[j]) if (ins[j] == out_words[i]) found = 1;
      checks++;
      if (!found) begin failures++; $display("FAIL slot %0d holds a product never offered", i); end
    end
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) run_batch($urandom_range(1, 3*N), (b % 4) + 2);
    checks++;
    if (n_absorb == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL absorb=%0d overflow=%0d never happened", n_absorb, n_ovf);
    end
    $display("absorbed=%0d overflow=%0d", n_absorb, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
