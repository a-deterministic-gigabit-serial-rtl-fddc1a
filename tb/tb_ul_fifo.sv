// tb_ul_fifo: random pushes and pops on a 5-deep FIFO, compared with a queue.
// Checks data order, empty/full/count each clock, that a push into a full
// FIFO is dropped, and that a word is visible on dout the clock after its push.
module tb_ul_fifo;
  import ul_pkg::*;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, push, pop, empty, full;
  ul_word_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  ul_word_t q[$];
  int fulls = 0, drops = 0;

  ul_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      chk(int'(count) == q.size(), "count");
      if (q.size() > 0) chk(dout == q[0], "dout");
      // phases: fill-heavy, then drain-heavy
      push = ($urandom_range(0, 99) < ((n / 300) % 2 ? 30 : 75));
      pop  = ($urandom_range(0, 99) < ((n / 300) % 2 ? 75 : 30)) && !empty;
      din  = '{pid: 16'($urandom), data: 16'(n)};
      @(posedge clk);
      #1;
      begin
        bit was_full;
        was_full = (q.size() == DEPTH);
        if (pop) void'(q.pop_front());
        if (push) begin
          if (!was_full) q.push_back(din);
          else drops++;
        end
      end
      if (q.size() == DEPTH) fulls++;
    end
    chk(fulls > 0 && drops > 0, "full reached and push-on-full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
