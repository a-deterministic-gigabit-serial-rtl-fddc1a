// tb_rfc_uplink: three daughter links plus the carrier report feed a carrier
// uplink. Checks that words leave only in the 1-in-4 slot clocks counted from
// reset, never more than one per slot, each once and in order per source,
// and that a flooding link is held off (au_ready low) instead of losing words.
module tb_rfc_uplink;
  import ul_pkg::*;
  localparam int NX = 3;
  logic clk = 0, rst_n = 0, rep_valid, rep_ready;
  logic au_valid [NX], au_ready [NX];
  ul_word_t au_word [NX], rep_word;
  ul_sym_t tx;
  int checks = 0, failures = 0;
  int sent [NX+1], got [NX+1];
  bit xfer [NX+1] = '{default: 0};

  rfc_uplink #(.N_XMC(NX)) dut (.*);
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
    int held = 0, words = 0;
    for (int i = 0; i <= NX; i++) begin sent[i] = 0; got[i] = 0; end
    for (int i = 0; i < NX; i++) begin au_valid[i] = 0; au_word[i] = '0; end
    rep_valid = 0; rep_word = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      // tx is registered: a word chosen in slot clock k shows in clock k+1
      if (tx.valid) begin
        int s;
        chk(n % 4 == 1, "word only in a slot");
        s = int'(tx.word.pid);
        chk(s <= NX && tx.word.data == 16'(got[s]), "order per source");
        got[s]++;
        words++;
      end
      for (int i = 0; i < NX; i++) begin
        if (xfer[i]) sent[i]++;
        if (au_valid[i] && !xfer[i]) held++;
        if (!au_valid[i] || au_ready[i]) begin
          au_valid[i] = (n < 7000) && ($urandom_range(0, 99) < (i == 0 ? 40 : 4));
          au_word[i] = '{16'(i), 16'(sent[i])};
        end
      end
      if (xfer[NX]) sent[NX]++;
      if (!rep_valid || rep_ready) begin
        rep_valid = (n < 7000) && ($urandom_range(0, 99) < 3);
        rep_word = '{16'(NX), 16'(sent[NX])};
      end
      // transfers happen at the coming edge with the ready seen now
      #1;
      for (int i = 0; i < NX; i++) xfer[i] = au_valid[i] && au_ready[i];
      xfer[NX] = rep_valid && rep_ready;
      @(negedge clk);
    end
    for (int i = 0; i <= NX; i++) chk(got[i] == sent[i], "all words delivered");
    chk(held > 0, "flow control held a link");
    chk(words > 1000, "words moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
