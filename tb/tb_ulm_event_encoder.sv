// tb_ulm_event_encoder: enables a random half of the 256 timing-link codes,
// strobes every code in random order, and checks that exactly the enabled
// ones come out, one clock later, as PID 0 words with code {8'h01, code}.
module tb_ulm_event_encoder;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0, tl_strobe, mask_wr, mask_val, ev_valid;
  logic [7:0] tl_code, mask_addr;
  ul_word_t ev_word;
  int checks = 0, failures = 0;
  bit en [256];

  ulm_event_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev_seen;
    ev_seen = 0;
    tl_strobe = 0; tl_code = 0; mask_wr = 0; mask_addr = 0; mask_val = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      en[i] = ($urandom_range(0, 1) == 1);
      mask_wr = 1; mask_addr = 8'(i); mask_val = en[i];
      @(negedge clk);
    end
    mask_wr = 0;
    for (int k = 0; k < 600; k++) begin
      bit strobe;
      logic [7:0] code;
      strobe = ($urandom_range(0, 2) != 0);
      code = 8'($urandom);
      tl_strobe = strobe; tl_code = code;
      @(negedge clk);
      tl_strobe = 0;
      chk(ev_valid == (strobe && en[code]), "selected events only");
      if (ev_valid) begin
        chk(ev_word.pid == PID_EVENT && ev_word.data == {8'h01, code}, "event word");
        ev_seen++;
      end
    end
    chk(ev_seen > 50, "events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
