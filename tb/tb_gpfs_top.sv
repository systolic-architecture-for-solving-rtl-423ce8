// tb_gpfs_top: end-to-end test of the GPF solver at its default sizes. The
// testbench plays the host: it splits each formula (a product of terms over
// NV variables) into two halves, loads one into each leaf BPP when it raises
// load_me, collects the root's result under random back-pressure and clears
// the tree after each problem. It checks that every result product satisfies
// the formula; that the result equals the formula over all 2^NV assignments
// whenever no absorption unit dropped a product; that no_solution is raised
// exactly for unsatisfiable formulas; and that the result comes cheapest
// first. It starts with three small fixed problems over a..e: be . bcd, whose
// result must be exactly bcde with cost 4, and ab . a'b and ab . (a'+b'), which
// have no solution. Then follow random formulas, forced contradictions
// (ab . (a'+b') inside larger formulas) and unate covering formulas whose sums
// grow past the absorption array.
// Each mechanism of the design is counted and must occur at least once:
// absorption, contradiction removal, absorption overflow, compare-swap in the
// sorter input buffer, AR refilled from local memory, no-solution detection,
// load_me and result back-pressure.
module tb_gpfs_top;
  import gpf_pkg::*;
  localparam int unsigned NV = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [1:0] host_valid = '0, host_ready, host_last = '0, load_me;
  product_t host_word [2];
  logic result_valid, result_ready = 1, result_last, done, no_solution;
  product_t result_word;
  logic [2:0] mem_overflow, ar_overflow, absorb_overflow, absorbed, ar_from_mem, empty_seen, swap_event;
  int checks = 0, failures = 0, cyc = 0;
  int n_ovf = 0, n_empty = 0, n_swap = 0, n_from_mem = 0, n_unsat = 0, n_sat = 0;
  int n_load_me = 0, n_backpressure = 0, n_absorbed = 0, n_problems = 0;
  logic ovf_seen = 0;
  product_t result [$];

  gpfs_top dut (.clk, .rst_n, .clear, .host_valid, .host_ready, .host_word, .host_last,
                .load_me, .result_valid, .result_ready, .result_word, .result_last,
                .done, .no_solution, .mem_overflow, .ar_overflow, .absorb_overflow, .absorbed,
                .ar_from_mem, .empty_seen, .swap_event);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (cyc > 2000000) begin
      failures++;
      $display("watchdog: done=%b no_solution=%b", done, no_solution);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (rst_n) begin
      if (|absorb_overflow) begin ovf_seen <= 1; n_ovf++; end
      if (|empty_seen) n_empty++;
      if (|swap_event) n_swap++;
      if (|ar_from_mem) n_from_mem++;
      if (|load_me) n_load_me++;
      if (result_valid && !result_ready) n_backpressure++;
      if (|absorbed) n_absorbed++;
      if (result_valid && result_ready && !result_last) result.push_back(result_word);
    end
  end
  always @(negedge clk) result_ready <= ($urandom_range(0, 3) != 0);

  function automatic logic is_contra(product_t p);
    for (int v = 0; v < NVARS; v++) if (p[127-2*v -: 2] == 2'b00) return 1'b1;
    return 1'b0;
  endfunction
  function automatic logic covers(product_t p, int m);
    for (int v = 0; v < NV; v++) begin
      logic [1:0] f = p[127-2*v -: 2];
      if (!(m[v] ? f[1] : f[0])) return 1'b0;
    end
    return !is_contra(p);
  endfunction
  function automatic int lits(product_t p);
    int n = 0;
    for (int v = 0; v < NVARS; v++) if (p[127-2*v] != p[126-2*v]) n++;
    return n;
  endfunction

  function automatic product_t lit(int v, logic pos);
    product_t p = {{61{2'b11}}, 6'd0};
    p[127-2*v -: 2] = pos ? 2'b10 : 2'b01;
    return p;
  endfunction

  // stream terms into leaf i, one word per accepted beat
  task automatic feed(int i, ref product_t terms [$][$]);
    foreach (terms[t]) begin
      for (int j = 0; j <= terms[t].size(); j++) begin
        @(negedge clk);
        host_valid[i] = 1;
        host_word[i] = (j < terms[t].size()) ? terms[t][j] : '0;
        host_last[i] = (j == terms[t].size()) && (t == terms.size()-1);
        #1;
        while (!host_ready[i] && !no_solution) begin @(negedge clk); #1; end
        @(negedge clk);
        host_valid[i] = 0;
        host_last[i] = 0;
        if (no_solution) return;
      end
    end
  endtask

  task automatic run_problem(int kind);
    product_t terms [$][$];
    product_t t [$];
    product_t left [$][$];
    product_t right [$][$];
    logic sat_any = 0;
    int nt;
    if (kind >= 3) begin
      // fixed problems, one term to each leaf; variables a..e are 0..4
      nt = 2;
      if (kind == 3) begin
        terms.push_back('{lit(1, 1) & lit(4, 1)});
        terms.push_back('{lit(1, 1) & lit(2, 1) & lit(3, 1)});
      end else begin
        terms.push_back('{lit(0, 1) & lit(1, 1)});
        if (kind == 4) terms.push_back('{lit(0, 0) & lit(1, 1)});
        else terms.push_back('{lit(0, 0), lit(1, 0)});
      end
    end else if (kind == 2) begin
      // unate covering formula: each term a sum of single positive literals
      nt = 6;
      for (int i = 0; i < nt; i++) begin
        t.delete();
        for (int j = 0; j < 3; j++) t.push_back(lit((3*i + j) % NV, 1'b1));
        terms.push_back(t);
      end
    end else begin
      nt = $urandom_range(2, 10);
      for (int i = 0; i < nt; i++) begin
        t.delete();
        for (int j = 0; j < $urandom_range(1, 3); j++) begin
          product_t p = lit($urandom_range(0, NV-1), $urandom_range(0, 3) != 0);
          if ($urandom_range(0, 1) != 0) p &= lit($urandom_range(0, NV-1), $urandom_range(0, 3) != 0);
          t.push_back(p);
        end
        terms.push_back(t);
      end
      if (kind == 1) begin
        terms[0] = '{lit(0, 1) & lit(1, 1)};
        terms[nt-1] = '{lit(0, 0), lit(1, 0)};
      end
    end
    foreach (terms[i]) if (i < (nt + 1) / 2) left.push_back(terms[i]); else right.push_back(terms[i]);
    result.delete();
    ovf_seen = 0;
    fork
      feed(0, left);
      feed(1, right);
    join
    while (!done && !no_solution) @(negedge clk);
    repeat (3) @(negedge clk);
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
      if (done && g && !f) begin failures++; $display("FAIL result covers non-solution %0d", m); end
      if (done && !ovf_seen && f !== g) begin failures++; $display("FAIL minterm %0d f=%b g=%b", m, f, g); end
    end
    checks++;
    if (!ovf_seen && no_solution === sat_any) begin
      failures++;
      $display("FAIL no_solution=%b satisfiable=%b", no_solution, sat_any);
    end
    foreach (result[j]) begin
      checks++;
      if (int'(result[j][5:0]) != lits(result[j]) || (j > 0 && result[j][5:0] < result[j-1][5:0])) begin
        failures++;
        $display("FAIL result cost/order at %0d", j);
      end
    end
    if (kind == 3) begin
      product_t bcde = lit(1, 1) & lit(2, 1) & lit(3, 1) & lit(4, 1);
      checks++;
      if (!done || result.size() != 1 || result[0][127:6] !== bcde[127:6] || result[0][5:0] != 6'd4) begin
        failures++;
        $display("FAIL be . bcd did not give bcde with cost 4");
      end
    end
    if (kind == 4 || kind == 5) begin
      checks++;
      if (!no_solution) begin failures++; $display("FAIL fixed problem %0d not reported unsolvable", kind); end
    end
    if (no_solution) n_unsat++; else n_sat++;
    n_problems++;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
  endtask

  initial begin
    host_word[0] = '0;
    host_word[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 3; k <= 5; k++) run_problem(k);
    for (int p = 0; p < 40; p++) run_problem((p % 8 == 3) ? 1 : (p % 8 == 6) ? 2 : 0);
    $display("problems=%0d sat=%0d unsat=%0d absorbed=%0d contradictions=%0d overflow=%0d swaps=%0d ar_from_mem=%0d load_me=%0d backpressure=%0d",
             n_problems, n_sat, n_unsat, n_absorbed, n_empty, n_ovf, n_swap, n_from_mem, n_load_me, n_backpressure);
    if (n_absorbed == 0) begin failures++; $display("FAIL absorption never happened"); end
    if (n_empty == 0) begin failures++; $display("FAIL contradiction removal never happened"); end
    if (n_ovf == 0) begin failures++; $display("FAIL absorption overflow never happened"); end
    if (n_swap == 0) begin failures++; $display("FAIL compare-swap never happened"); end
    if (n_from_mem == 0) begin failures++; $display("FAIL AR never refilled from memory"); end
    if (n_unsat == 0) begin failures++; $display("FAIL no_solution never raised"); end
    if (n_sat == 0) begin failures++; $display("FAIL no problem solved"); end
    if (n_load_me == 0) begin failures++; $display("FAIL load_me never raised"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL result back-pressure never happened"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
