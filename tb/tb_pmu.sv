// tb_pmu: runs whole problems through one PMU. The SAPA is replaced by a
// reference that removes contradictory, repeated and absorbed products
// completely and returns the rest sorted by literal count, N beats per SPF.
// For each problem (a product of random terms over a few variables) it checks
// that the PMU's result, as a Boolean function, equals the product of the
// terms over every assignment of the variables; that the first round pairs
// the first term (in R) with term INIT_TERMS (in AR) in R-major order; that an
// unsatisfiable problem raises unsat; and it counts rounds that took AR from
// local memory and rounds fed from the input, and checks that the PMU builds
// new SPFs while the SAPA is still returning earlier ones.
module tb_pmu;
  import gpf_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned NV = 5;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, in_last = 0, load_me;
  product_t in_word, sp_word, out_word;
  logic sp_valid, sp_ready = 1, sp_last, fs_valid = 0, fs_ready, fs_last = 0;
  item_t fs_item;
  logic out_valid, out_ready = 1, out_last, done, unsat, mem_ovf, ar_ovf, ar_from_mem;
  int checks = 0, failures = 0, cyc = 0, n_overlap = 0, n_from_mem = 0, n_unsat = 0, n_sat = 0;
  product_t spf [$];
  product_t ret [$];
  product_t result [$];
  product_t first_round [$];
  int round = 0;

  pmu #(.AR_N(N), .MEM_DEPTH(64), .INIT_TERMS(4)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_ready, .in_word, .in_last, .load_me,
    .sp_valid, .sp_ready, .sp_word, .sp_last, .fs_valid, .fs_ready, .fs_item, .fs_last,
    .out_valid, .out_ready, .out_word, .out_last, .done, .unsat,
    .mem_overflow(mem_ovf), .ar_overflow(ar_ovf), .ar_from_mem);
  always #5 clk = ~clk;

  function automatic logic is_contra(product_t p);
    for (int v = 0; v < NVARS; v++) if (p[127-2*v -: 2] == 2'b00) return 1'b1;
    return 1'b0;
  endfunction
  function automatic int lits(product_t p);
    int n = 0;
    for (int v = 0; v < NVARS; v++) if (p[127-2*v] != p[126-2*v]) n++;
    return n;
  endfunction
  function automatic logic sub(product_t x, product_t y);
    return ((x & ~y) & LIT_MASK) == '0;
  endfunction
  function automatic logic covers(product_t p, int m);
    for (int v = 0; v < NV; v++) begin
      logic [1:0] f = p[127-2*v -: 2];
      if (!(m[v] ? f[1] : f[0])) return 1'b0;
    end
    return !is_contra(p);
  endfunction

  // reference simplification of one SPF
  task automatic simplify(ref product_t s [$], output product_t r [$]);
    product_t k [$];
    foreach (s[i]) if (!is_contra(s[i])) k.push_back({s[i][127:6], 6'(lits(s[i]))});
    foreach (k[i]) begin
      logic drop = 0;
      foreach (k[j]) if (j != i && sub(k[i], k[j]) && (!sub(k[j], k[i]) || j < i)) drop = 1;
      if (!drop) r.push_back(k[i]);
    end
    r.sort() with (item[5:0]);
  endtask

  always @(posedge clk) begin
    cyc++;
    if (cyc > 400000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (ar_from_mem) n_from_mem++;
    if (clear) spf.delete();
    else if (rst_n && sp_valid && sp_ready) begin
      // a new SPF is built while the SAPA still returns an earlier one
      if (ret.size() != 0) n_overlap++;
      spf.push_back(sp_word);
      if (round == 0) first_round.push_back(sp_word);
      if (sp_last) begin
        product_t r [$];
        simplify(spf, r);
        spf.delete();
        for (int i = 0; i < N; i++) ret.push_back(i < r.size() ? r[i] : '0);
        if (r.size() > N) begin failures++; $display("FAIL test sizes too big for N"); end
        round++;
      end
    end
    if (rst_n && out_valid && out_ready && !out_last) result.push_back(out_word);
  end

  // return the SAPA beats
  int beat = 0;
  always @(posedge clk) begin
    if (clear) begin
      // a cleared SAPA forgets all its work
      ret.delete();
      beat = 0;
    end else if (rst_n && fs_valid && fs_ready) begin
      void'(ret.pop_front());
      beat = (beat + 1) % N;
    end
  end
  always @(negedge clk) begin
    fs_valid = (ret.size() != 0);
    fs_item.valid = (ret.size() != 0) && (ret[0] != '0);
    fs_item.word = (ret.size() != 0) ? ret[0] : '0;
    fs_last = (beat == N-1);
  end

  task automatic send(product_t w, logic last);
    in_valid = 1; in_word = w; in_last = last;
    #1;
    while (!in_ready && !unsat) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0; in_last = 0;
  endtask

  function automatic product_t rnd_product();
    product_t p = {{61{2'b11}}, 6'd0};
    int nl = $urandom_range(1, 2);
    for (int l = 0; l < nl; l++) p[127-2*$urandom_range(0, NV-1) -: 2] = ($urandom_range(0, 2) == 0) ? 2'b01 : 2'b10;
    return p;
  endfunction

  task automatic run_problem(int nt, logic force_unsat);
    product_t terms [$][$];
    product_t t [$];
    logic sat_any = 0;
    for (int i = 0; i < nt; i++) begin
      t.delete();
      for (int j = 0; j < $urandom_range(1, 3); j++) t.push_back(rnd_product());
      terms.push_back(t);
    end
    if (force_unsat) begin
      // ab . (a' + b')
      terms[0] = '{{2'b10, 2'b10, {59{2'b11}}, 6'd0}};
      terms[nt-1] = '{{2'b01, 2'b11, {59{2'b11}}, 6'd0}, {2'b11, 2'b01, {59{2'b11}}, 6'd0}};
    end
    round = 0;
    first_round.delete();
    result.delete();
    foreach (terms[i]) begin
      foreach (terms[i][j]) send(terms[i][j], 1'b0);
      send('0, i == nt-1);
    end
    while (!done && !unsat) @(negedge clk);
    repeat (2) @(negedge clk);
    // Boolean check over all assignments
    for (int m = 0; m < 2**NV; m++) begin
      logic f = 1, g = 0;
      foreach (terms[i]) begin
        logic s = 0;
        foreach (terms[i][j]) if (covers(terms[i][j], m)) s = 1;
        f &= s;
      end
      foreach (result[j]) if (covers(result[j], m)) g = 1;
      if (f) sat_any = 1;
      checks++;
      if (done && f !== g) begin failures++; $display("FAIL nt=%0d minterm %0d: f=%b result=%b", nt, m, f, g); end
    end
    checks++;
    if (unsat === sat_any) begin failures++; $display("FAIL unsat=%b but satisfiable=%b", unsat, sat_any); end
    if (unsat) n_unsat++; else n_sat++;
    // first round: term 1 in R against term 4 in AR
    if (nt >= 4 && !unsat) begin
      int n = 0;
      foreach (terms[0][i]) foreach (terms[3][j]) begin
        checks++;
        if (n >= first_round.size() || first_round[n] !== (terms[0][i] & terms[3][j])) begin
          failures++;
          $display("FAIL first round product %0d", n);
        end
        n++;
      end
      checks++;
      if (n != first_round.size()) begin failures++; $display("FAIL first round size"); end
    end
    // results must come out cheapest first
    for (int j = 1; j < result.size(); j++) begin
      checks++;
      if (result[j][5:0] < result[j-1][5:0]) begin failures++; $display("FAIL result order"); end
    end
    clear = 1;
    @(negedge clk);
    clear = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 60; p++) run_problem($urandom_range(1, 8), p % 10 == 9);
    checks++;
    $display("sat=%0d unsat=%0d ar_from_mem=%0d overlap=%0d", n_sat, n_unsat, n_from_mem, n_overlap);
    if (n_unsat == 0 || n_sat == 0 || n_from_mem == 0 || n_overlap == 0) begin failures++; $display("FAIL a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
