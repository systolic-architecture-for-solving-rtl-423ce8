// tb_epdu: checks that products with any 00 field, and only those, are
// marked empty and dropped (valid cleared); the word passes unchanged.
module tb_epdu;
  import gpf_pkg::*;
  product_t in_w;
  logic in_v, is_empty;
  item_t out_i;
  int checks = 0, failures = 0;

  epdu dut (.in_valid(in_v), .in_word(in_w), .out_item(out_i), .is_empty);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic exp_empty;
      in_w = {{61{2'b11}}, 6'($urandom)};
      exp_empty = 1'b0;
      for (int v = 0; v < NVARS; v++) begin
        int r;
        r = $urandom_range(0, 3);
        if (r == 1) in_w[127-2*v -: 2] = 2'b10;
        if (r == 2) in_w[127-2*v -: 2] = 2'b01;
      end
      if (i % 2 == 0) begin
        in_w[127-2*$urandom_range(0, 60) -: 2] = 2'b00;
        exp_empty = 1'b1;
      end
      if (i == 1) begin in_w = '0; exp_empty = 1'b1; end
      if (i == 3) begin in_w = {{61{2'b11}}, 6'd0}; end
      in_v = (i % 7 != 0);
      #1;
      checks++;
      if (is_empty != exp_empty || out_i.valid != (in_v && !exp_empty) || out_i.word != in_w) begin
        failures++;
        $display("FAIL %h empty=%b valid=%b", in_w, is_empty, out_i.valid);
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
