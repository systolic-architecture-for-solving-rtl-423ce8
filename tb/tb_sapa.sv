// tb_sapa: sends sums of products (few variables, some contradictory
// products, some repeats) through the SAPA and checks each returned batch:
// N beats with out_last on the N-th, real products first and sorted by cost,
// each cost equal to the product's literal count, no product with a 00
// field, and the set of real products equal to what a sequential model of
// the absorption procedure keeps. Several SPFs are sent back to back so that
// absorption of one overlaps sorting of the previous. Counts how often
// absorption, contradiction removal, overflow and compare-swap happened.
module tb_sapa;
  import gpf_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, out_last;
  logic overflow, absorbed, empty_seen, swap_event;
  product_t in_word;
  item_t out_item;
  product_t exp_sets [$][$];
  item_t got [$];
  int checks = 0, failures = 0, cyc = 0, batches = 0, sent = 0;
  int n_ovf = 0, n_empty = 0, n_swap = 0, n_absorb = 0;

  sapa #(.N(N)) dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_word, .in_last,
                     .out_valid, .out_ready, .out_item, .out_last,
                     .overflow, .absorbed, .empty_seen, .swap_event);
  always #5 clk = ~clk;

  function automatic logic covers_in(product_t x, product_t y);
    return ((x & ~y) & LIT_MASK) == '0;
  endfunction

  function automatic int lits(product_t p);
    int n = 0;
    for (int v = 0; v < NVARS; v++) if (p[127-2*v] != p[126-2*v]) n++;
    return n;
  endfunction

  function automatic logic has_00(product_t p);
    for (int v = 0; v < NVARS; v++) if (p[127-2*v -: 2] == 2'b00) return 1'b1;
    return 1'b0;
  endfunction

  function automatic product_t rnd_product(int nv);
    product_t p = {{61{2'b11}}, 6'd0};
    for (int v = 0; v < nv; v++) begin
      int r;
      r = $urandom_range(0, 6);
      p[127-2*v -: 2] = (r < 2) ? 2'b10 : (r < 4) ? 2'b01 : (r < 6) ? 2'b11 : 2'b00;
    end
    p[5:0] = 6'($urandom);
    return p;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (cyc > 300000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (overflow) n_ovf++;
    if (empty_seen) n_empty++;
    if (swap_event) n_swap++;
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_item);
      checks++;
      if (out_last !== (got.size() == N)) begin failures++; $display("FAIL out_last"); end
      if (got.size() == N) check_batch();
    end
  end

  always @(negedge clk) out_ready <= (batches > 20) ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic check_batch();
    product_t e [$];
    product_t g [$];
    logic seen_pad = 0;
    e = exp_sets.pop_front();
    for (int i = 0; i < N; i++) begin
      item_t it = got.pop_front();
      if (!it.valid) seen_pad = 1;
      else begin
        checks++;
        if (seen_pad || has_00(it.word) || int'(it.word[5:0]) != lits(it.word) ||
            (g.size() != 0 && it.word[5:0] < g[g.size()-1][5:0])) begin
          failures++;
          $display("FAIL batch %0d beat %0d: %h", batches, i, it.word);
        end
        g.push_back(it.word & LIT_MASK);
      end
    end
    e.sort();
    g.sort();
    checks++;
    if (e != g) begin
      failures++;
      $display("FAIL batch %0d: %0d products, model keeps %0d", batches, g.size(), e.size());
    end
    batches++;
  endtask

  task automatic send_spf(int k, int nv);
    product_t m [N];
    product_t e [$];
    for (int i = 0; i < N; i++) m[i] = '0;
    for (int j = 0; j < k; j++) begin
      product_t p = rnd_product(nv);
      logic placed = 0;
      for (int i = 0; i < N && !placed; i++) begin
        if (covers_in(m[i], p)) begin m[i] = p; placed = 1; end
        else if (covers_in(p, m[i])) begin placed = 1; n_absorb++; end
      end
      in_word = p;
      in_last = (j == k-1);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    for (int i = 0; i < N; i++) if (!has_00(m[i])) e.push_back(m[i] & LIT_MASK);
    exp_sets.push_back(e);
    sent++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 150; s++) send_spf($urandom_range(1, 2*N), (s % 5) + 2);
    while (batches < sent) @(negedge clk);
    checks++;
    $display("absorbed=%0d contradictions=%0d overflow=%0d swaps=%0d", n_absorb, n_empty, n_ovf, n_swap);
    if (n_absorb == 0 || n_empty == 0 || n_ovf == 0 || n_swap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
