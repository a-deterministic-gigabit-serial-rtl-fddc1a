// tb_xmc_uplink: random processor writes of 32-bit values and random phase
// reports into a daughter-card uplink whose Aurora side stalls at random.
// Checks that each value leaves as two words, high half first with their
// PIDs, that every word leaves once and in order per FIFO, that the
// high-priority FIFO never gives more than 4 words in a row while a report
// waits, and that cpu_ready drops when the FIFO is nearly full.
module tb_xmc_uplink;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0, cpu_wr, cpu_ready, rep_valid, rep_ready, au_valid, au_ready;
  logic [15:0] cpu_pid_hi, cpu_pid_lo;
  logic [31:0] cpu_value;
  ul_word_t rep_word, au_word;
  int checks = 0, failures = 0;
  ul_word_t exp_hi [$], exp_lo [$];
  int lo_time [$];
  int t4 = 0;

  xmc_uplink dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run_hi, words, not_ready, rep_seq;
    run_hi = 0; words = 0; not_ready = 0; rep_seq = 0;
    cpu_wr = 0; cpu_pid_hi = 0; cpu_pid_lo = 0; cpu_value = 0; rep_valid = 0; rep_word = '0;
    au_ready = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      bit busy;
      busy = (n % 1000) < 500;
      // drive
      cpu_wr = (n < 5500) && ($urandom_range(0, 9) < (busy ? 8 : 2));
      cpu_value = $urandom;
      cpu_pid_hi = 16'($urandom_range(16'h100, 16'h1FF)); cpu_pid_lo = cpu_pid_hi + 16'h100;
      if (!rep_valid || rep_ready) begin
        rep_valid = (n < 5500) && ($urandom_range(0, 9) < 2);
        rep_word = '{PID_PHI, 16'(rep_seq)};
      end
      au_ready = ($urandom_range(0, 9) < (busy ? 3 : 9));
      #1;
      if (!cpu_ready) not_ready++;
      // observe the transfer of this clock; an empty output ends a visit
      if (!au_valid) run_hi = 0;
      if (au_valid && au_ready) begin
        words++;
        if (au_word.pid == PID_PHI) begin
          chk(exp_lo.size() > 0 && au_word == exp_lo[0], "report word order");
          if (exp_lo.size() > 0) begin void'(exp_lo.pop_front()); void'(lo_time.pop_front()); end
          run_hi = 0;
        end else begin
          chk(exp_hi.size() > 0 && au_word == exp_hi[0], "cpu word order");
          if (exp_hi.size() > 0) void'(exp_hi.pop_front());
          // after 4 in a row the scanner must turn to a report that was
          // already queued when the 4th word left
          if (run_hi > 0 && run_hi % 4 == 0 && exp_lo.size() > 0)
            chk(lo_time[0] >= t4, "high FIFO limit of 4");
          run_hi++;
          if (run_hi % 4 == 0) t4 = n;
        end
      end
      if (cpu_wr && cpu_ready) begin
        exp_hi.push_back('{cpu_pid_hi, cpu_value[31:16]});
        exp_hi.push_back('{cpu_pid_lo, cpu_value[15:0]});
      end
      if (rep_valid && rep_ready) begin exp_lo.push_back(rep_word); lo_time.push_back(n); rep_seq++; end
      @(negedge clk);
      cpu_wr = 0;
    end
    chk(exp_hi.size() == 0 && exp_lo.size() == 0, "all words delivered");
    chk(not_ready > 0, "cpu_ready back-pressure seen");
    chk(words > 1000, "words moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
