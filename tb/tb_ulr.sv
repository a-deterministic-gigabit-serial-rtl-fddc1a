// tb_ulr: receiver plus transceiver model. A word stream with an Update
// event every 100 clocks is sent from reset on. Checks that nothing is
// decoded before the link is aligned, that afterwards every update is decoded
// exactly at the fixed latency of the target barrel shifter position
// (model latency 6 clocks plus the decoder register), and that the time stamp
// words are rebuilt.
module tb_ulr;
  import ul_pkg::*;
  logic clk = 0, rst_n = 0, resetdone, aligned;
  drp_req_t drp_req;
  drp_rsp_t drp_rsp;
  logic [7:0] attempts;
  logic update, evt_valid, data_valid, ts_valid;
  logic [15:0] evt_code;
  ul_word_t data_word;
  logic [47:0] timestamp;
  logic [4:0] model_bs;
  ul_sym_t tx, rx;
  int relocks;
  int checks = 0, failures = 0;
  int cyc = 0;

  ulr #(.HOLD_CLKS(8), .SETTLE_CLKS(8)) dut (.*);
  gtx_rx_model model (
    .clk, .rst_n, .seed(16'h1234), .tx_in(tx), .rx_out(rx), .resetdone, .drp_req, .drp_rsp,
    .bs_pos(model_bs), .relocks);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter: update at cyc%100==0, time stamp words at 4, 8, 12
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    unique case (cyc % 100)
      0:  tx <= '{1'b1, '{PID_EVENT, EVT_UPDATE}};
      4:  tx <= '{1'b1, '{PID_TS2, 16'h0000}};
      8:  tx <= '{1'b1, '{PID_TS1, 16'(cyc / 65536)}};
      12: tx <= '{1'b1, '{PID_TS0, 16'(cyc - 12)}};
      default: tx <= '0;
    endcase
  end

  initial begin
    int upd = 0, ts_ok = 0, early = 0;
    tx = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      if (!aligned && (update || evt_valid || data_valid)) early++;
      if (aligned && update) begin
        // word sent at posedge when cyc%100==0 -> tx holds it during cyc%100==1;
        // model adds 6 clocks, decoder 1
        chk((cyc - 1) % 100 == 7, "deterministic update latency");
        upd++;
      end
      if (ts_valid) begin
        // the words carry the cycle number of their period's update
        chk(timestamp == 48'(((cyc - 10) / 100) * 100), "time stamp rebuilt");
        ts_ok++;
      end
    end
    chk(early == 0, "nothing decoded before alignment");
    chk(relocks > 0, "relock happened");
    chk(upd > 300, "updates decoded");
    chk(ts_ok > 300, "time stamps decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
