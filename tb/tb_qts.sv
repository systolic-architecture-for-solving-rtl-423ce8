// tb_qts: sends batches of N items (random costs, some padding) into the
// quad-tree sorter with random gaps and output stalls, and checks that every
// batch comes out as N items, sorted by cost with padding last, holding
// exactly the items that went in, with out_last on the N-th. For one batch
// sent alone into an idle sorter with no stalls, it checks that the time from
// the last item entering to the last item leaving is at most the document's
// step count TE = N + TL - 1 + sum_{i=1..TL} (N/4^i + 1). It also requires
// that the input buffer's compare-swap acted at least once, and that the
// Forward signal of each tree level is 1 while the sorter is idle and drops
// to 0 while that level works.
module tb_qts;
  import gpf_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned TL = 2;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last, swap_event;
  item_t in_item, out_item;
  item_t sent [$];
  item_t got [$];
  int checks = 0, failures = 0, cyc = 0, batches = 0, swaps = 0;
  int t_in_last = 0, t_out_last = 0;
  logic random_stall = 0;
  logic [TL-1:0] level_fwd;
  int fwd_low [TL];

  qts #(.N(N)) dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_item,
                    .out_valid, .out_ready, .out_item, .out_last, .swap_event,
                    .level_fwd);
  always #5 clk = ~clk;

  function automatic int key(item_t it);
    return it.valid ? int'(it.word[5:0]) : 64;
  endfunction

  function automatic int te();
    int s = N + TL - 1;
    for (int i = 1; i <= TL; i++) s += N / (4**i) + 1;
    return s;
  endfunction

  task automatic check_batch();
    item_t a [$];
    item_t b [$];
    for (int i = 0; i < N; i++) begin
      a.push_back(sent.pop_front());
      b.push_back(got.pop_front());
    end
    for (int i = 1; i < N; i++) begin
      checks++;
      if (key(b[i]) < key(b[i-1])) begin
        failures++;
        $display("FAIL batch %0d not sorted at %0d", batches, i);
      end
    end
    // same real items; padding is compared by its valid flag only
    a = a.find() with (item.valid);
    b = b.find() with (item.valid);
    a.sort() with (item.word);
    b.sort() with (item.word);
    checks++;
    if (a != b) begin
      failures++;
      $display("FAIL batch %0d items differ (%0d vs %0d real)", batches, a.size(), b.size());
    end
    batches++;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (swap_event) swaps++;
    for (int j = 0; j < TL; j++) if (rst_n && !level_fwd[j]) fwd_low[j]++;
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_item);
      checks++;
      if (out_last !== (got.size() == N)) begin failures++; $display("FAIL out_last"); end
      if (out_last) t_out_last = cyc;
      if (got.size() == N) check_batch();
    end
    if (rst_n && in_valid && in_ready) begin
      sent.push_back(in_item);
      if (sent.size() % N == 0) t_in_last = cyc;
    end
  end

  always @(negedge clk) out_ready <= random_stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send_batch(logic gaps);
    for (int i = 0; i < N; i++) begin
      in_item.valid = ($urandom_range(0, 4) != 0);
      in_item.word = {32'(batches), 32'(i), 58'($urandom), 6'($urandom_range(0, 12))};
      in_valid = !gaps || ($urandom_range(0, 3) != 0);
      while (!in_valid) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
      end
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (level_fwd !== '1) begin failures++; $display("FAIL Forward low while idle"); end
    // one batch into an idle sorter: latency against TE
    send_batch(0);
    while (batches < 1) @(negedge clk);
    checks++;
    $display("sort steps: %0d, TE = %0d", t_out_last - t_in_last, te());
    if (t_out_last - t_in_last > te()) begin
      failures++;
      $display("FAIL sort took %0d steps, TE is %0d", t_out_last - t_in_last, te());
    end
    // back-to-back batches, then random gaps and output stalls
    for (int b = 0; b < 40; b++) send_batch(0);
    random_stall = 1;
    for (int b = 0; b < 100; b++) send_batch(1);
    while (batches < 141) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (level_fwd !== '1) begin failures++; $display("FAIL Forward low after the last batch"); end
    for (int j = 0; j < TL; j++) begin
      checks++;
      if (fwd_low[j] == 0) begin failures++; $display("FAIL level %0d never active", j); end
    end
    checks++;
    if (swaps == 0) begin failures++; $display("FAIL compare-swap never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
