// tb_bpp: runs whole problems through one BPP, the PMU with its SAPA.
// Each problem is a product of random terms over a few variables. The test
// checks that every product of the result satisfies the formula and, when
// the absorption unit dropped nothing, that the result equals the formula
// over every assignment of the variables; that an unsatisfiable problem raises unsat; that results come cheapest first. It
// counts rounds that took AR from local memory, contradictions removed and
// absorption overflows.
module tb_bpp;
  import gpf_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned NV = 5;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready, in_last = 0, load_me;
  product_t in_word, out_word;
  logic out_valid, out_ready = 1, out_last, done, unsat, mem_ovf, ar_ovf, ar_from_mem;
  int checks = 0, failures = 0, cyc = 0, n_from_mem = 0, n_unsat = 0, n_sat = 0;
  product_t result [$];

  logic absorb_ovf, absorbed, empty_seen, swap_event, ovf_seen = 0;
  int n_ovf = 0, n_empty = 0;
  bpp #(.N(N), .AR_N(N), .MEM_DEPTH(64), .INIT_TERMS(4)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_ready, .in_word, .in_last, .load_me,
    .out_valid, .out_ready, .out_word, .out_last, .done, .unsat,
    .mem_overflow(mem_ovf), .ar_overflow(ar_ovf), .absorb_overflow(absorb_ovf), .absorbed,
    .ar_from_mem, .empty_seen, .swap_event);
  always @(posedge clk) begin
    if (absorb_ovf) begin ovf_seen <= 1; n_ovf++; end
    if (empty_seen) n_empty++;
  end
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

  always @(posedge clk) begin
    cyc++;
    if (cyc > 400000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (ar_from_mem) n_from_mem++;
    if (rst_n && out_valid && out_ready && !out_last) result.push_back(out_word);
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
      if (done && g && !f) begin failures++; $display("FAIL result covers a non-solution"); end
      if (done && !ovf_seen && f !== g) begin failures++; $display("FAIL nt=%0d minterm %0d: f=%b result=%b", nt, m, f, g); end
    end
    checks++;
    if (!ovf_seen && unsat === sat_any) begin failures++; $display("FAIL unsat=%b but satisfiable=%b", unsat, sat_any); end
    if (unsat) n_unsat++; else n_sat++;
    // results must come out cheapest first
    for (int j = 1; j < result.size(); j++) begin
      checks++;
      if (result[j][5:0] < result[j-1][5:0]) begin failures++; $display("FAIL result order"); end
    end
    clear = 1;
    @(negedge clk);
    clear = 0;
    ovf_seen = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 60; p++) run_problem($urandom_range(1, 8), p % 10 == 9);
    checks++;
    $display("sat=%0d unsat=%0d ar_from_mem=%0d overflow=%0d contradictions=%0d", n_sat, n_unsat, n_from_mem, n_ovf, n_empty);
    if (n_unsat == 0 || n_sat == 0 || n_from_mem == 0 || n_empty == 0) begin failures++; $display("FAIL a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
