// tb_ulm_update_gen: at the default 1000-clock period and 4-clock slots,
// checks over five periods that a slot strobe comes every 4 clocks (250 per
// period), that slot 0 of each period holds the Update event and slots 1..3
// the time stamp of that period, equal to the clocks counted here since reset,
// and that no other slot is reserved.
module tb_ulm_update_gen;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0, slot, res_valid;
  logic [15:0] slot_idx;
  ul_word_t res_word;
  logic [47:0] timestamp;
  int checks = 0, failures = 0;

  ulm_update_gen dut (.*);
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
    longint unsigned n;
    int slots_in_period, updates;
    logic [47:0] ts_ref;
    slots_in_period = 0; updates = 0; ts_ref = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (n = 0; n < 5000; n++) begin
      // n = clocks since reset release, sampled mid-cycle
      chk(slot == (n % 4 == 0), "slot strobe every 4 clocks");
      if (n % 1000 == 0) begin
        if (n > 0) chk(slots_in_period == 250, "250 slots per period");
        slots_in_period = 0;
        ts_ref = 48'(n);
        chk(res_valid && res_word.pid == PID_EVENT && res_word.data == EVT_UPDATE, "update word");
        updates++;
      end
      if (slot) slots_in_period++;
      if (n % 1000 == 4)  chk(res_valid && res_word == '{PID_TS2, ts_ref[47:32]}, "ts word 2");
      if (n % 1000 == 8)  chk(res_valid && res_word == '{PID_TS1, ts_ref[31:16]}, "ts word 1");
      if (n % 1000 == 12) chk(res_valid && res_word == '{PID_TS0, ts_ref[15:0]} && timestamp == ts_ref, "ts word 0");
      if (n % 1000 > 12 || (n % 4 != 0)) chk(!res_valid, "no other reserved slot");
      @(negedge clk);
    end
    chk(updates == 5, "five updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
