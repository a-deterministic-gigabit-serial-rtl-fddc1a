// tb_ul_fifo_scanner: three FIFOs with limits 3, 1, 2.
// Part 1: FIFOs preloaded with 5, 3 and 4 words and the sink always ready;
// the output must be the hand-worked order 0 0 0 1 2 2 0 0 1 2 2 1, one word
// per clock except one idle clock when FIFO 0 runs dry. Part 2: random arrivals and a random sink; every
// word must leave once, in order within its FIFO, and a FIFO that used its
// limit while another FIFO waits must yield.
module tb_ul_fifo_scanner;
  import ul_pkg::*;
  localparam int N = 3;
  localparam int unsigned LIM [N] = '{3, 1, 2};
  logic clk = 0, rst_n = 0;
  logic [N-1:0] fifo_empty, fifo_pop;
  ul_word_t fifo_dout [N];
  logic out_valid, out_ready, limit_hit;
  ul_word_t out_word;
  logic [1:0] cur;
  int checks = 0, failures = 0;
  ul_word_t q [N][$];
  int exp_src [$];
  int run_src = -1, cur_src = -1, run_len = 0, hits = 0;

  ul_fifo_scanner #(.N(N), .LIMIT(LIM)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < N; i++) begin
      fifo_empty[i] = (q[i].size() == 0);
      fifo_dout[i]  = (q[i].size() > 0) ? q[i][0] : '0;
    end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: look at the stable outputs before the edge, check the word
  // taken, then update the FIFO models just after the edge.
  int seen [N];
  int pushed [N];
  task automatic cycle(input bit next_ready, input bit arrive);
    bit take, others_waiting;
    int s;
    #1;
    take = out_valid && out_ready;
    if (limit_hit) hits++;
    if (!out_valid) run_len = 0;  // an empty FIFO ends the visit
    s = int'(out_word.pid);
    if (take) begin
      chk(s < N && out_word.data == 16'(seen[s]), "order within FIFO");
      chk(fifo_pop[s], "pop matches word");
      others_waiting = 0;
      for (int i = 0; i < N; i++) if (i != s && q[i].size() > 0) others_waiting = 1;
      // a FIFO that used its limit while others waited must yield
      if (run_src >= 0) chk(s != run_src, "limit");
      if (s == cur_src) run_len++; else begin cur_src = s; run_len = 1; end
      chk(limit_hit == (run_len == int'(LIM[s])), "limit_hit flag");
      if (limit_hit) run_len = 0;
      run_src = (limit_hit && others_waiting) ? s : -1;
      if (exp_src.size() > 0) chk(s == exp_src.pop_front(), "hand-worked order");
    end
    @(posedge clk);
    #1;
    if (take) begin seen[s]++; void'(q[s].pop_front()); end
    out_ready = next_ready;
    if (arrive)
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 9) < 2) begin
          q[i].push_back('{pid: 16'(i), data: 16'(pushed[i])});
          pushed[i]++;
        end
    @(negedge clk);
  endtask

  initial begin
    out_ready = 0;
    for (int i = 0; i < N; i++) begin seen[i] = 0; pushed[i] = 0; end
    repeat (3) @(posedge clk);
    for (int k = 0; k < 5; k++) begin q[0].push_back('{pid: 0, data: 16'(pushed[0])}); pushed[0]++; end
    for (int k = 0; k < 3; k++) begin q[1].push_back('{pid: 1, data: 16'(pushed[1])}); pushed[1]++; end
    for (int k = 0; k < 4; k++) begin q[2].push_back('{pid: 2, data: 16'(pushed[2])}); pushed[2]++; end
    exp_src = '{0, 0, 0, 1, 2, 2, 0, 0, 1, 2, 2, 1};
    rst_n = 1;
    @(negedge clk);
    out_ready = 1;
    // 12 words; one idle clock when FIFO 0 runs empty inside its visit
    for (int c = 0; c < 13; c++) cycle(1'b1, 1'b0);
    chk(exp_src.size() == 0 && q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0,
        "12 words in 13 clocks");
    // part 2
    for (int n = 0; n < 4000; n++) cycle($urandom_range(0, 3) != 0, n < 3000);
    for (int i = 0; i < N; i++) chk(seen[i] == pushed[i], "all words delivered");
    chk(hits > 10, "limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
