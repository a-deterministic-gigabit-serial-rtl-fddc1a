// tb_ulr_decoder: sends random periods of an Update event, three time stamp
// words, data words and other events, with idle symbols between, and checks
// every output one clock after its word.
module tb_ulr_decoder;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0;
  ul_sym_t rx;
  logic update, evt_valid, data_valid, ts_valid;
  logic [15:0] evt_code;
  ul_word_t data_word;
  logic [47:0] timestamp;
  int checks = 0, failures = 0;

  ulr_decoder dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input ul_word_t w, input bit exp_ts, input logic [47:0] ts);
    rx = '{valid: 1'b1, word: w};
    @(negedge clk);
    rx = '0;
    chk(evt_valid == (w.pid == PID_EVENT), "event flag");
    chk(update == (w.pid == PID_EVENT && w.data == EVT_UPDATE), "update pulse");
    chk(data_valid == (w.pid != PID_EVENT), "data flag");
    if (evt_valid) chk(evt_code == w.data, "event code");
    if (data_valid) chk(data_word == w, "data word");
    chk(ts_valid == exp_ts, "ts_valid");
    if (exp_ts) chk(timestamp == ts, "time stamp");
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      chk(!update && !evt_valid && !data_valid && !ts_valid, "idle gives nothing");
    end
  endtask

  initial begin
    int updates;
    updates = 0;
    rx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      logic [47:0] ts;
      ts = {16'($urandom), 32'($urandom)};
      send('{PID_EVENT, EVT_UPDATE}, 0, 0); updates++;
      send('{PID_TS2, ts[47:32]}, 0, 0);
      send('{PID_TS1, ts[31:16]}, 0, 0);
      send('{PID_TS0, ts[15:0]}, 1, ts);
      repeat ($urandom_range(1, 8)) begin
        if ($urandom_range(0, 3) == 0) send('{PID_EVENT, 16'($urandom_range(2, 65535))}, 0, 0);
        else send('{16'($urandom_range(16, 65535)), 16'($urandom)}, 0, 0);
      end
    end
    chk(updates == 40, "updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
