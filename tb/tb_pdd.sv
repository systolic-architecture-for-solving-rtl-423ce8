// tb_pdd: checks the product domination detector against a per-field model:
// X dominates Y when, in every variable field, the literal values X allows are
// a subset of those Y allows. Random words plus hand-made cases.
module tb_pdd;
  import gpf_pkg::*;
  product_t a1, a2;
  logic d21, d12;
  int checks = 0, failures = 0;

  pdd dut (.ar1(a1), .ar2(a2), .ar2_dominates_ar1(d21), .ar1_dominates_ar2(d12));

  function automatic logic subset(product_t x, product_t y);
    for (int v = 0; v < NVARS; v++) begin
      logic [1:0] fx, fy;
      fx = x[127-2*v -: 2];
      fy = y[127-2*v -: 2];
      if ((fx[1] && !fy[1]) || (fx[0] && !fy[0])) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic product_t rnd_product();
    product_t p;
    for (int v = 0; v < NVARS; v++) begin
      int r;
      r = $urandom_range(0, 9);
      p[127-2*v -: 2] = (r < 6) ? 2'b11 : (r < 8) ? 2'b10 : (r < 9) ? 2'b01 : 2'b00;
    end
    p[5:0] = 6'($urandom);
    return p;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (d21 !== subset(a2, a1) || d12 !== subset(a1, a2)) begin
      failures++;
      $display("FAIL a1=%h a2=%h d21=%b d12=%b", a1, a2, d21, d12);
    end
  endtask

  initial begin
    // a*b against a: ab dominates a
    a1 = {2'b10, 2'b10, {59{2'b11}}, 6'd2};
    a2 = {2'b10, 2'b11, {59{2'b11}}, 6'd1};
    check();
    if (!(d12 && !d21)) begin failures++; $display("FAIL ab vs a"); end
    // empty product in AR2 dominates anything
    a2 = '0; check();
    if (!d21) begin failures++; $display("FAIL empty AR2"); end
    // identical products dominate each other, cost bits ignored
    a1 = {{61{2'b11}}, 6'd5}; a2 = {{61{2'b11}}, 6'd9}; check();
    if (!(d21 && d12)) begin failures++; $display("FAIL equal"); end
    for (int i = 0; i < 2000; i++) begin
      a1 = rnd_product();
      a2 = (i % 3 == 0) ? (a1 & rnd_product()) : rnd_product();
      if (i % 5 == 0) a2 = a1 | rnd_product();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
