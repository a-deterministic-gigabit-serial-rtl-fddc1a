// tb_ul_system: the whole Update Link at full size, 16 RF Controllers with six
// daughter cards each (112 receivers), with behavioural models of everything
// between the FPGAs: one transceiver model per receiver (random barrel
// shifter positions), the crosspoint broadcast as a plain fan-out, the
// carriers' return links as a 5-clock delay and the Aurora links.
//
// Sequence and checks:
//   1. every receiver aligns its link, many only after relocking the PLL;
//   2. every receiver sees every Update pulse in the same clock, 7 clocks
//      after the master sends it, and rebuilds the master's time stamp;
//   3. an enabled timing-link event is rebroadcast, a disabled one is not;
//   4. a manual word from the master's host reaches every receiver;
//   5. a daughter card's processor writes a revolution frequency; it climbs
//      daughter -> carrier -> master, is broadcast, and every synthesizer
//      loads it at the same update, so all 112 phases stay equal;
//   6. a manual phase-latch event makes all synthesizers latch the same phase;
//      the reference synthesizer (carrier 1, site 2) sends it up, and every
//      receiver gets the two report words with that value;
//   7. a burst of processor writes on all 96 daughter cards loads the tree:
//      Aurora hold-off, carrier and master poll limits and master FIFO
//      overflow must each happen; every word is either broadcast (counted at
//      receiver 0) or counted as dropped by the master.
//   8. the document's workload: a new revolution frequency every 10 us
//      period for six periods, each in force everywhere after the next update;
//   9. the master is switched to consolidator mode for three periods: no
//      Update leaves, data still does.
// Each mechanism is counted, and one that never happened is a failure.
module tb_ul_system;
  import ul_pkg::*;
  localparam int NR = 16, NX = 6;

  logic clk = 0, rst_n = 0;
  logic ulm_master_mode;
  logic host_wr, host_full, tl_strobe, mask_wr, mask_val;
  ul_word_t host_word;
  logic [7:0] tl_code, mask_addr;
  ul_sym_t ulm_tx, ulm_uplink_rx [NR];
  logic [47:0] ulm_timestamp;
  logic [15:0] ulm_drop_cnt;
  ul_sym_t rfc_rx [NR];
  logic rfc_resetdone [NR];
  drp_req_t rfc_drp_req [NR];
  drp_rsp_t rfc_drp_rsp [NR];
  logic rfc_is_ref [NR];
  ep_status_t rfc_status [NR];
  ul_sym_t rfc_uplink_tx [NR];
  logic rfc_au_valid [NR][NX], rfc_au_ready [NR][NX];
  ul_word_t rfc_au_word [NR][NX];
  ul_sym_t xmc_rx [NR][NX];
  logic xmc_resetdone [NR][NX];
  drp_req_t xmc_drp_req [NR][NX];
  drp_rsp_t xmc_drp_rsp [NR][NX];
  logic xmc_is_ref [NR][NX];
  ep_status_t xmc_status [NR][NX];
  logic xmc_cpu_wr [NR][NX], xmc_cpu_ready [NR][NX];
  logic [15:0] xmc_cpu_pid_hi [NR][NX], xmc_cpu_pid_lo [NR][NX];
  logic [31:0] xmc_cpu_value [NR][NX];
  logic xmc_au_valid [NR][NX], xmc_au_ready [NR][NX];
  ul_word_t xmc_au_word [NR][NX];

  int checks = 0, failures = 0;
  bit monitor_on = 0;
  int rfc_lim [NR];
  int relocks_r [NR];
  int relocks_x [NR][NX];
  logic [4:0] bs_r [NR];
  logic [4:0] bs_x [NR][NX];

  ul_system dut (.*);
  always #5 clk = ~clk;

  // ---- models between the FPGAs
  for (genvar r = 0; r < NR; r++) begin : g_r
    ul_sym_t dly [5];
    gtx_rx_model m (
      .clk, .rst_n, .seed(16'(r * 131 + 7)), .tx_in(ulm_tx), .rx_out(rfc_rx[r]),
      .resetdone(rfc_resetdone[r]), .drp_req(rfc_drp_req[r]), .drp_rsp(rfc_drp_rsp[r]),
      .bs_pos(bs_r[r]), .relocks(relocks_r[r]));
    always_ff @(posedge clk) begin
      dly[0] <= rfc_uplink_tx[r];
      for (int i = 1; i < 5; i++) dly[i] <= dly[i-1];
    end
    assign ulm_uplink_rx[r] = rst_n ? dly[4] : '0;
    initial rfc_lim[r] = 0;
    always @(negedge clk) if (monitor_on && dut.g_rfc[r].u_up.u_scan.limit_hit) rfc_lim[r]++;
    for (genvar x = 0; x < NX; x++) begin : g_x
      gtx_rx_model m (
        .clk, .rst_n, .seed(16'(r * 977 + x * 61 + 3)), .tx_in(ulm_tx), .rx_out(xmc_rx[r][x]),
        .resetdone(xmc_resetdone[r][x]), .drp_req(xmc_drp_req[r][x]),
        .drp_rsp(xmc_drp_rsp[r][x]), .bs_pos(bs_x[r][x]), .relocks(relocks_x[r][x]));
      aurora_model au (
        .clk, .rst_n, .tx_valid(xmc_au_valid[r][x]), .tx_word(xmc_au_word[r][x]),
        .tx_ready(xmc_au_ready[r][x]), .rx_valid(rfc_au_valid[r][x]),
        .rx_word(rfc_au_word[r][x]), .rx_ready(rfc_au_ready[r][x]));
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors
  int cyc = 0;
  int last_tx_update = -1;
  int n_update = 0, n_ts = 0, n_evt_tl = 0, n_evt_off = 0, n_host = 0, n_freq = 0;
  int n_latch = 0, n_report = 0, n_load_words = 0, n_au_hold = 0, n_rfc_limit = 0;
  int n_ulm_limit = 0, n_host_cons = 0, n_update_cons = 0, n_rate = 0;
  logic [31:0] report_value = 0;
  bit got_phi = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ulm_tx.valid && ulm_tx.word == '{PID_EVENT, EVT_UPDATE}) last_tx_update <= cyc;
  end

  function automatic bit all_aligned();
    for (int r = 0; r < NR; r++) begin
      if (!rfc_status[r].aligned) return 0;
      for (int x = 0; x < NX; x++) if (!xmc_status[r][x].aligned) return 0;
    end
    return 1;
  endfunction

  // sampled every negedge once aligned
  always @(negedge clk) if (monitor_on) begin
    ep_status_t s0;
    bit same_upd, same_phase, same_latched;
    s0 = rfc_status[0];
    same_upd = 1; same_phase = 1; same_latched = 1;
    for (int r = 0; r < NR; r++) begin
      if (rfc_status[r].update != s0.update) same_upd = 0;
      if (rfc_status[r].phase != s0.phase) same_phase = 0;
      if (rfc_status[r].latched != s0.latched) same_latched = 0;
      for (int x = 0; x < NX; x++) begin
        if (xmc_status[r][x].update != s0.update) same_upd = 0;
        if (xmc_status[r][x].phase != s0.phase) same_phase = 0;
        if (xmc_status[r][x].latched != s0.latched) same_latched = 0;
        if (xmc_au_valid[r][x] && !xmc_au_ready[r][x]) n_au_hold++;
      end
    end
    if (dut.u_ulm.u_scan.limit_hit) n_ulm_limit++;
    chk(same_upd, "all receivers update in the same clock");
    chk(same_phase, "all synthesizer phases equal");
    chk(same_latched, "all latched phases equal");
    if (s0.update) begin
      n_update++;
      // sent in the clock after the registered tx changed: model 6 + decoder 1
      chk(cyc - last_tx_update == 7, "update latency 7 clocks");
    end
    if (s0.ts_valid) begin
      n_ts++;
      chk(s0.timestamp == ulm_timestamp, "time stamp rebuilt");
    end
    if (s0.evt_valid && s0.evt_code == 16'h0105) n_evt_tl++;
    if (s0.evt_valid && s0.evt_code == 16'h0106) n_evt_off++;
    if (s0.evt_valid && s0.evt_code == EVT_LATCH) n_latch++;
    if (s0.data_valid && s0.data_word.pid == 16'h0300) n_host++;
    if (s0.data_valid && s0.data_word.pid == 16'h0301) n_host_cons++;
    if (s0.update && !ulm_master_mode) n_update_cons++;
    if (s0.data_valid && s0.data_word.pid == PID_PHI) begin
      chk(s0.data_word.data == report_value[31:16], "report high half");
      got_phi = 1;
    end
    if (s0.data_valid && s0.data_word.pid == PID_PLO) begin
      chk(got_phi && s0.data_word.data == report_value[15:0], "report low half");
      n_report++;
    end
    if (s0.data_valid && s0.data_word.pid[15:12] == 4'hA) n_load_words++;
  end

  task automatic host_send(input ul_word_t w);
    @(negedge clk);
    host_wr = 1; host_word = w;
    @(negedge clk);
    host_wr = 0;
  endtask

  initial begin
    int n, relocks_total, load_sent;
    logic [31:0] f;
    ulm_master_mode = 1;
    host_wr = 0; host_word = '0; tl_strobe = 0; tl_code = 0; mask_wr = 0; mask_addr = 0; mask_val = 0;
    for (int r = 0; r < NR; r++) begin
      rfc_is_ref[r] = (r == 1);
      for (int x = 0; x < NX; x++) begin
        xmc_is_ref[r][x] = 0;
        xmc_cpu_wr[r][x] = 0; xmc_cpu_pid_hi[r][x] = 0; xmc_cpu_pid_lo[r][x] = 0;
        xmc_cpu_value[r][x] = 0;
      end
    end
    rfc_is_ref[1] = 0;
    xmc_is_ref[1][2] = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. alignment
    n = 0;
    while (!all_aligned() && n < 400000) begin @(negedge clk); n++; end
    chk(all_aligned(), "all 112 receivers aligned");
    relocks_total = 0;
    for (int r = 0; r < NR; r++) begin
      chk(bs_r[r] == 0, "carrier barrel shifter at target");
      relocks_total += relocks_r[r];
      for (int x = 0; x < NX; x++) begin
        chk(bs_x[r][x] == 0, "daughter barrel shifter at target");
        relocks_total += relocks_x[r][x];
      end
    end
    $display("aligned after %0d clocks, %0d relocks in all", n, relocks_total);
    chk(relocks_total > 0, "mechanism: PLL relock");
    // align the monitor to a period boundary so no update is half seen
    while (!(ulm_tx.valid && ulm_tx.word.pid == PID_TS0)) @(negedge clk);
    monitor_on = 1;

    // 3. timing-link events: 0x05 enabled, 0x06 not
    @(negedge clk);
    mask_wr = 1; mask_addr = 8'h05; mask_val = 1;
    @(negedge clk);
    mask_wr = 0;
    tl_strobe = 1; tl_code = 8'h05;
    @(negedge clk);
    tl_code = 8'h06;
    @(negedge clk);
    tl_strobe = 0;

    // 4. manual word
    host_send('{16'h0300, 16'hBEEF});

    // 5. revolution frequency from daughter (0,0)
    f = 32'h0123_4567;
    @(negedge clk);
    xmc_cpu_wr[0][0] = 1; xmc_cpu_pid_hi[0][0] = PID_FHI; xmc_cpu_pid_lo[0][0] = PID_FLO;
    xmc_cpu_value[0][0] = f;
    @(negedge clk);
    xmc_cpu_wr[0][0] = 0;
    repeat (2500) @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      chk(rfc_status[r].freq == f, "carrier DDS frequency loaded");
      for (int x = 0; x < NX; x++) chk(xmc_status[r][x].freq == f, "daughter DDS frequency loaded");
    end
    n_freq = (rfc_status[0].freq == f) ? 1 : 0;

    // 6. phase latch by a manual event; reference is daughter (1,2)
    host_send('{PID_EVENT, EVT_LATCH});
    repeat (20) @(negedge clk);
    report_value = xmc_status[1][2].latched;
    repeat (2500) @(negedge clk);

    // 7. load: every daughter writes 6 values (12 words) at once
    load_sent = 0;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++)
        for (int x = 0; x < NX; x++) begin
          xmc_cpu_wr[r][x] = xmc_cpu_ready[r][x];
          xmc_cpu_pid_hi[r][x] = 16'hA000 | 16'(r * 16 + x);
          xmc_cpu_pid_lo[r][x] = 16'hA800 | 16'(r * 16 + x);
          xmc_cpu_value[r][x] = $urandom;
          if (xmc_cpu_ready[r][x]) load_sent += 2;
        end
      @(negedge clk);
      for (int r = 0; r < NR; r++) for (int x = 0; x < NX; x++) xmc_cpu_wr[r][x] = 0;
    end
    repeat (30000) @(negedge clk);

    // 8. workload: a new revolution frequency every update period (100 kHz);
    //    each must be in force in every synthesizer after the next update
    for (int k = 0; k < 6; k++) begin
      logic [31:0] fk;
      fk = $urandom;
      while (!rfc_status[0].update) @(negedge clk);
      repeat (100) @(negedge clk);
      xmc_cpu_wr[0][0] = 1; xmc_cpu_pid_hi[0][0] = PID_FHI; xmc_cpu_pid_lo[0][0] = PID_FLO;
      xmc_cpu_value[0][0] = fk;
      @(negedge clk);
      xmc_cpu_wr[0][0] = 0;
      while (!rfc_status[0].update) @(negedge clk);
      @(negedge clk);
      begin
        bit all_ok;
        all_ok = 1;
        for (int r = 0; r < NR; r++) begin
          if (rfc_status[r].freq != fk) all_ok = 0;
          for (int x = 0; x < NX; x++) if (xmc_status[r][x].freq != fk) all_ok = 0;
        end
        chk(all_ok, "frequency of this period in force everywhere");
        if (all_ok) n_rate++;
      end
    end

    // 9. the master chassis switched to consolidator mode for three periods
    @(negedge clk);
    ulm_master_mode = 0;
    host_send('{16'h0301, 16'h1234});
    repeat (3000) @(negedge clk);
    ulm_master_mode = 1;
    repeat (1100) @(negedge clk);
    monitor_on = 0;
    for (int r = 0; r < NR; r++) n_rfc_limit += rfc_lim[r];

    $display("updates %0d ts %0d tl %0d/%0d host %0d latch %0d report %0d load %0d/%0d drops %0d",
             n_update, n_ts, n_evt_tl, n_evt_off, n_host, n_latch, n_report, n_load_words,
             load_sent, ulm_drop_cnt);
    $display("aurora hold-off %0d, carrier limit %0d, master limit %0d",
             n_au_hold, n_rfc_limit, n_ulm_limit);
    chk(n_update > 30, "mechanism: update pulses");
    chk(n_rate == 6, "workload: six frequency updates at 100 kHz");
    chk(n_update_cons == 0, "no update from a consolidator");
    chk(n_host_cons == 1, "mechanism: consolidator mode carries data");
    chk(n_ts == n_update || n_ts == n_update + 1, "mechanism: time stamps");
    chk(n_evt_tl == 1, "mechanism: timing-link event rebroadcast");
    chk(n_evt_off == 0, "disabled event not rebroadcast");
    chk(n_host == 1, "mechanism: manual word");
    chk(n_freq == 1, "mechanism: frequency applied on update");
    chk(n_latch == 1, "mechanism: phase latch event");
    chk(n_report == 1, "mechanism: reference phase report");
    chk(n_au_hold > 0, "mechanism: Aurora hold-off");
    chk(n_rfc_limit > 0, "mechanism: carrier poll limit");
    chk(n_ulm_limit > 0, "mechanism: master poll limit");
    chk(ulm_drop_cnt > 0, "mechanism: master uplink FIFO overflow");
    chk(n_load_words + int'(ulm_drop_cnt) == load_sent, "load words broadcast or dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
