// tb_ulm_core: the master with three uplinks over eight update periods.
// Timing-link events (some enabled), manual words and uplink words arrive at
// random; the broadcast stream is checked: the Update event exactly every
// 1000 clocks in slot 0 and the time stamp words in slots 1..3 with the clock
// count of that update; words only in slot clocks, so at most 250 per period;
// manual words and enabled events broadcast once and in order; disabled events
// never sent; uplink words in order, and every one either broadcast or
// counted in drop_cnt when a flood fills its FIFO. Then master_mode is
// dropped for three periods: no Update or time stamp may leave, and data
// words must use slots 0..3 as well.
module tb_ulm_core;
  import ul_pkg::*;
  localparam int NU = 3;
  logic clk = 0, rst_n = 0, master_mode, host_wr, host_full, tl_strobe, mask_wr, mask_val;
  ul_word_t host_word;
  logic [7:0] tl_code, mask_addr;
  ul_sym_t uplink_rx [NU];
  ul_sym_t tx;
  logic [47:0] timestamp;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0;
  ul_word_t q_ev [$], q_host [$];
  int last_up [NU] = '{default: -1};
  int sent_up = 0, got_up = 0, cons_reserved = 0;

  ulm_core #(.N_UPLINK(NU)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int updates, words, per_period, max_period, seq;
    logic [47:0] ts_ref;
    updates = 0; words = 0; per_period = 0; max_period = 0; seq = 0; ts_ref = 0;
    host_wr = 0; host_word = '0; tl_strobe = 0; tl_code = 0; mask_wr = 0; mask_addr = 0; mask_val = 0;
    for (int i = 0; i < NU; i++) uplink_rx[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // n counts clocks from reset release, as in ulm_update_gen
    master_mode = 1;
    for (int n = 0; n < 11000; n++) begin
      bit mst;
      mst = (n - 1) < 8000;  // mode seen by the slot of the word now on tx
      // ---- check the broadcast word of this clock (registered: slot of n-1)
      if (tx.valid) begin
        chk((n - 1) % 4 == 0, "word only in a slot");
        per_period++;
        if (!mst) begin
          chk(!(tx.word.pid == PID_EVENT && tx.word.data == EVT_UPDATE), "no update as consolidator");
          if ((n - 1) % 1000 < 16) cons_reserved++;
        end
        if (mst && (n - 1) % 1000 == 0) begin
          chk(tx.word == '{PID_EVENT, EVT_UPDATE}, "update in slot 0");
          ts_ref = 48'(n - 1);
          updates++;
        end else if (mst && (n - 1) % 1000 == 4)  chk(tx.word == '{PID_TS2, ts_ref[47:32]}, "ts2");
        else if (mst && (n - 1) % 1000 == 8)      chk(tx.word == '{PID_TS1, ts_ref[31:16]}, "ts1");
        else if (mst && (n - 1) % 1000 == 12)     chk(tx.word == '{PID_TS0, ts_ref[15:0]}, "ts0");
        else begin
          words++;
          if (tx.word.pid == PID_EVENT) begin
            chk(q_ev.size() > 0 && tx.word == q_ev[0], "event order");
            void'(q_ev.pop_front());
          end else if (tx.word.pid[15:8] == 8'h02) begin
            chk(q_host.size() > 0 && tx.word == q_host[0], "host order");
            void'(q_host.pop_front());
          end else begin
            int u;
            u = int'(tx.word.pid) - 32'h100;
            chk(u >= 0 && u < NU && int'(tx.word.data) > last_up[u], "uplink order");
            if (u >= 0 && u < NU) begin last_up[u] = int'(tx.word.data); got_up++; end
          end
        end
      end else if (n > 0 && mst) chk((n - 1) % 1000 >= 16 || (n - 1) % 4 != 0, "reserved slot used");
      if ((n - 1) % 1000 == 999) begin
        if (per_period > max_period) max_period = per_period;
        per_period = 0;
      end
      // ---- drive this clock
      host_wr = 0; tl_strobe = 0; mask_wr = 0;
      master_mode = (n < 8000);
      if (n >= 8000 && n < 10500 && !host_full) begin
        host_wr = 1; host_word = '{16'h0200, 16'(seq++)};
        q_host.push_back(host_word);
      end
      if (n < 64) begin
        mask_wr = 1; mask_addr = 8'(n); mask_val = n[0];  // odd codes enabled
      end else if (n < 7000) begin
        if ($urandom_range(0, 99) < 3) begin
          tl_strobe = 1; tl_code = 8'($urandom_range(0, 63));
          if (tl_code[0]) q_ev.push_back('{PID_EVENT, {8'h01, tl_code}});
        end
        if ($urandom_range(0, 99) < 3 && !host_full) begin
          host_wr = 1; host_word = '{16'h0200, 16'(seq++)};
          q_host.push_back(host_word);
        end
      end
      for (int i = 0; i < NU; i++) begin
        bit flood;
        flood = (n >= 3000 && n < 3400 && i == 0);
        uplink_rx[i] = '0;
        if (n >= 64 && n < 7000 && ((n % 4 == 2 && $urandom_range(0, 99) < 10) || flood)) begin
          uplink_rx[i] = '{1'b1, '{16'(16'h0100 + i), 16'(seq++)}};
          sent_up++;
        end
      end
      @(negedge clk);
    end
    chk(updates == 8, "eight updates");
    chk(cons_reserved > 0, "consolidator fills slots 0..3 with data");
    chk(max_period <= 250, "at most 250 words per period");
    chk(q_ev.size() == 0 && q_host.size() == 0, "events and manual words sent");
    chk(drop_cnt > 0, "flooded uplink dropped words");
    chk(got_up + int'(drop_cnt) == sent_up, "uplink words sent or counted as dropped");
    $display("updates %0d words %0d drops %0d", updates, words, drop_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
