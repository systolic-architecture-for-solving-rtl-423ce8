// tb_qts_pe: feeds one PE from four child queues, each a sorted list of
// CHILD_LEN items per batch, with random gaps and random output stalls, and
// checks that each batch leaves as the stable merge of the four lists (equal
// costs: left child first, padding items last), that children are never
// popped when empty, and the status signal S1 against the costs it compares.
module tb_qts_pe;
  import gpf_pkg::*;
  localparam int unsigned CL = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [3:0] ch_avail, ch_pop;
  item_t ch_item [4];
  logic out_full = 0, out_push, s1, s2, s3, en, fwd;
  item_t out_item;
  item_t src [4][$];
  item_t exp_q [$];
  logic [3:0] gate;
  int taken [4] = '{0, 0, 0, 0};
  int checks = 0, failures = 0, cyc = 0, outs = 0, stalls = 0;

  qts_pe #(.CHILD_LEN(CL)) dut (.clk, .rst_n, .clear, .ch_avail, .ch_item, .ch_pop,
                                .out_full, .out_push, .out_item, .s1, .s2, .s3, .en, .fwd);
  always #5 clk = ~clk;

  function automatic int key(item_t it);
    return it.valid ? int'(it.word[5:0]) : 64 + int'(it.word[5:0]);
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      ch_avail[c] = (src[c].size() != 0) && gate[c];
      ch_item[c]  = (src[c].size() != 0) ? src[c][0] : '0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (rst_n) begin
      if (out_full && out_push) begin failures++; $display("FAIL push while full"); end
      if (out_full) stalls++;
      if (ch_avail[0] && ch_avail[1] && taken[0] < CL && taken[1] < CL) begin
        checks++;
        if (s1 !== (key(ch_item[0]) > key(ch_item[1]))) begin failures++; $display("FAIL S1"); end
      end
      for (int c = 0; c < 4; c++)
        if (ch_pop[c]) begin
          if (!ch_avail[c]) begin failures++; $display("FAIL pop of empty child %0d", c); end
          else void'(src[c].pop_front());
          taken[c]++;
        end
      if (taken[0] + taken[1] + taken[2] + taken[3] == 4*CL) taken = '{0, 0, 0, 0};
      if (out_push) begin
        checks++;
        if (exp_q.size() == 0 || out_item !== exp_q[0]) begin
          failures++;
          $display("FAIL out %0d: cost %0d valid %b exp %0d %b got %h exp %h", outs, out_item.word[5:0], out_item.valid, exp_q[0].word[5:0], exp_q[0].valid, out_item.word[127:64], exp_q[0].word[127:64]);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        outs++;
      end
    end
  end

  initial begin
    int nb = 300;
    gate = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < nb; b++) begin
      automatic item_t lists [4][$];
      automatic int idx [4];
      for (int c = 0; c < 4; c++) begin
        automatic int cost = $urandom_range(0, 4);
        automatic int nvalid = (b % 3 == 0) ? $urandom_range(0, CL) : CL;
        for (int i = 0; i < CL; i++) begin
          item_t it;
          it.valid = (i < nvalid);
          cost += $urandom_range(0, 2);
          it.word = {32'(b), 32'(c), 32'(i), 26'($urandom), 6'(cost)};
          lists[c].push_back(it);
        end
        // padding items come last inside a child list as well
        foreach (lists[c][i]) src[c].push_back(lists[c][i]);
        idx[c] = 0;
      end
      // reference merge: smallest key, leftmost child on ties
      for (int n = 0; n < 4*CL; n++) begin
        automatic int best = -1;
        for (int c = 0; c < 4; c++)
          if (idx[c] < CL && (best < 0 || key(lists[c][idx[c]]) < key(lists[best][idx[best]]))) best = c;
        exp_q.push_back(lists[best][idx[best]]);
        idx[best]++;
      end
    end
    fork
      begin
        while (outs < nb*4*CL) begin
          @(negedge clk);
          out_full = ($urandom_range(0, 3) == 0);
          gate = 4'($urandom) | 4'($urandom);
        end
      end
    join
    checks++;
    if (exp_q.size() != 0 || stalls == 0) begin failures++; $display("FAIL end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
