// tb_pmu_local_mem: builds random linked lists by allocation, walks and frees
// them through the read port, and checks stored products, the chaining of
// nodes, the free count, that a freed node is handed out again, that a node
// freed and allocated in the same cycle goes straight to the new list (also
// when the memory is full), and that allocation is refused when every node is
// in use.
module tb_pmu_local_mem;
  import gpf_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned PW = $clog2(DEPTH+1);
  logic clk = 0, rst_n = 0, clear = 0;
  logic alloc = 0, link = 0, alloc_ok, release_node = 0;
  product_t alloc_word, rd_word;
  logic [PW-1:0] link_tail = '0, alloc_ptr, rel_ptr = '0, rd_ptr = '0, rd_next, free_count;
  int checks = 0, failures = 0, cyc = 0, full_seen = 0, swap_full = 0;

  pmu_local_mem #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .alloc, .alloc_word, .link,
    .link_tail, .alloc_ptr, .alloc_ok, .release_node, .rel_ptr, .rd_ptr, .rd_word,
    .rd_next, .free_count);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  typedef struct { logic [PW-1:0] head, tail; product_t words [$]; } list_t;

  initial begin
    list_t lists [$];
    int in_use = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0 && lists.size() != 0) begin
        // free a list while building a new one in the same cycles
        automatic int n = $urandom_range(0, lists.size()-1);
        automatic list_t l = lists[n];
        automatic list_t m;
        automatic logic [PW-1:0] p = l.head;
        lists.delete(n);
        foreach (l.words[j]) begin
          rd_ptr = p;
          rel_ptr = p;
          release_node = 1;
          alloc = 1;
          alloc_word = {$urandom, $urandom, $urandom, $urandom};
          link = (j != 0);
          link_tail = m.tail;
          #1;
          checks++;
          if (rd_word !== l.words[j] || alloc_ptr != p || !alloc_ok) begin
            failures++;
            $display("FAIL node %0d reuse", p);
          end
          if (in_use == DEPTH) swap_full++;
          if (j == 0) m.head = alloc_ptr;
          m.tail = alloc_ptr;
          m.words.push_back(alloc_word);
          p = rd_next;
          @(negedge clk);
          release_node = 0;
          alloc = 0;
          rd_ptr = '0;
          #1;
          checks++;
          if (free_count != PW'(DEPTH - in_use)) begin failures++; $display("FAIL free count after reuse"); end
        end
        lists.push_back(m);
      end else if ($urandom_range(0, 1) == 0 || lists.size() == 0) begin
        // build a list of k nodes
        automatic list_t l;
        automatic int k = $urandom_range(1, 6);
        for (int j = 0; j < k; j++) begin
          #1;
          checks++;
          if (alloc_ok !== (in_use < DEPTH) || free_count != PW'(DEPTH - in_use)) begin
            failures++;
            $display("FAIL alloc_ok=%b free=%0d in_use=%0d", alloc_ok, free_count, in_use);
          end
          if (!alloc_ok) begin full_seen++; break; end
          alloc = 1;
          alloc_word = {$urandom, $urandom, $urandom, $urandom};
          link = (j != 0);
          link_tail = l.tail;
          if (j == 0) l.head = alloc_ptr;
          l.tail = alloc_ptr;
          l.words.push_back(alloc_word);
          @(negedge clk);
          alloc = 0;
          in_use++;
        end
        if (l.words.size() != 0) lists.push_back(l);
      end else begin
        // walk and free a random list
        automatic int n = $urandom_range(0, lists.size()-1);
        automatic list_t l = lists[n];
        automatic logic [PW-1:0] p = l.head;
        automatic logic [PW-1:0] nx;
        lists.delete(n);
        foreach (l.words[j]) begin
          rd_ptr = p;
          rel_ptr = p;
          #1;
          checks++;
          if (rd_word !== l.words[j]) begin failures++; $display("FAIL node %0d data", p); end
          nx = rd_next;
          release_node = 1;
          @(negedge clk);
          release_node = 0;
          #1;
          checks++;
          if (alloc_ptr != p) begin failures++; $display("FAIL freed node not reused first"); end
          p = nx;
          in_use--;
          rd_ptr = '0;
        end
      end
    end
    checks++;
    if (full_seen == 0 || swap_full == 0) begin failures++; $display("FAIL memory never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
