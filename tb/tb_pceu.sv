// tb_pceu: checks the literal count written into the cost field against a
// field-by-field count, for random products, and that literal bits pass.
module tb_pceu;
  import gpf_pkg::*;
  product_t in_w, out_w;
  cost_t cost;
  int checks = 0, failures = 0;

  pceu dut (.in_word(in_w), .out_word(out_w), .cost);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int n;
      n = 0;
      for (int v = 0; v < NVARS; v++) begin
        int r;
        r = (i < 2) ? (i == 0 ? 0 : 1) : $urandom_range(0, 3);
        case (r)
          0: in_w[127-2*v -: 2] = 2'b11;
          1: begin in_w[127-2*v -: 2] = 2'b10; n++; end
          2: begin in_w[127-2*v -: 2] = 2'b01; n++; end
          default: in_w[127-2*v -: 2] = ($urandom_range(0, 7) == 0) ? 2'b00 : 2'b11;
        endcase
      end
      in_w[5:0] = 6'($urandom);
      #1;
      checks++;
      if (cost != cost_t'(n) || out_w[5:0] != cost_t'(n) || out_w[127:6] != in_w[127:6]) begin
        failures++;
        $display("FAIL %h: cost=%0d expected %0d", in_w, cost, n);
      end
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
