// tb_pipe_fifo: random pushes and pops against a queue model, including
// push and pop in the same cycle while full; checks order, avail and full.
module tb_pipe_fifo;
  import gpf_pkg::*;
  localparam int unsigned DEPTH = 3;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, full, avail;
  item_t in_i, out_i;
  item_t q[$];
  int checks = 0, failures = 0, cyc = 0, both_full = 0;

  pipe_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .push, .in_item(in_i), .full,
                                  .pop, .out_avail(avail), .out_item(out_i));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (avail != (q.size() != 0) || full != (q.size() == DEPTH) ||
          (q.size() != 0 && out_i != q[0])) begin
        failures++;
        $display("FAIL cycle %0d size=%0d avail=%b full=%b", i, q.size(), avail, full);
      end
      pop  = ($urandom_range(0, 2) != 0);
      push = ($urandom_range(0, 2) != 0) && (!full || (pop && avail));
      in_i = {1'b1, 96'($urandom) , 32'(i)};
      if (push && full && pop) both_full++;
      @(posedge clk);
      #1;
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push) q.push_back(in_i);
    end
    checks++;
    if (both_full == 0) begin failures++; $display("FAIL: never pushed and popped while full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
