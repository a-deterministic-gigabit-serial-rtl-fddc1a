// ulm_core: firmware of the Update Link Master.
//
// The master owns the one transmitter whose output the crosspoint switches
// broadcast to every receiver. Each word slot (one per SLOT_CLKS clocks, 250
// per 10 us update period) carries one word, chosen here:
//   1. slots 0..3 of each period: the Update event and the three time stamp
//      words from ulm_update_gen (always, so the update is deterministic);
//   2. otherwise the next word of the priority scanner, which polls in order
//      the rebroadcast timing-event FIFO, the manual (host processor) FIFO and
//      one FIFO per uplink from the RF Controllers;
//   3. an idle symbol when all FIFOs are empty.
// With master_mode low the chassis is a consolidator, as the document allows
// for systems with more than 16 RF Controllers: it sends no Update event and
// no time stamp, and all 250 slots carry FIFO words, so its output can feed
// one uplink of the real master. The mode is an input, sampled every slot.
// drop_cnt counts the uplink words lost because their FIFO was full.
// The three sources, and the FIFOs and scanner, follow the document; the poll
// order, limits, depths and the drop-and-count of uplink words that find their
// FIFO full are this design's choices.
//
// Interface: host_wr/host_word write a word (ignored when host_full);
// tl_* and mask_* go to ulm_event_encoder; uplink_rx[i] are the words received
// from uplink i; tx is the broadcast stream, a valid symbol on slot clocks.
// Timing: tx is registered; the Update event leaves one clock after slot 0.
module ulm_core #(
  parameter int unsigned N_UPLINK     = 16,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned EVENT_LIMIT  = 4,
  parameter int unsigned HOST_LIMIT   = 4,
  parameter int unsigned UPLINK_LIMIT = 4,
  parameter int unsigned PERIOD_CLKS  = ul_pkg::PERIOD_CLKS,
  parameter int unsigned SLOT_CLKS    = ul_pkg::SLOT_CLKS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             master_mode,
  input  logic             host_wr,
  input  ul_pkg::ul_word_t host_word,
  output logic             host_full,
  input  logic             tl_strobe,
  input  logic [7:0]       tl_code,
  input  logic             mask_wr,
  input  logic [7:0]       mask_addr,
  input  logic             mask_val,
  input  ul_pkg::ul_sym_t  uplink_rx [N_UPLINK],
  output ul_pkg::ul_sym_t  tx,
  output logic [47:0]      timestamp,
  output logic [15:0]      drop_cnt
);
  import ul_pkg::*;

  localparam int unsigned NF = N_UPLINK + 2;  // event, host, uplinks

  function automatic int unsigned limit_of(input int unsigned i);
    return (i == 0) ? EVENT_LIMIT : (i == 1) ? HOST_LIMIT : UPLINK_LIMIT;
  endfunction
  typedef int unsigned lim_t [NF];
  function automatic lim_t limits();
    lim_t l;
    for (int unsigned i = 0; i < NF; i++) l[i] = limit_of(i);
    return l;
  endfunction
  localparam lim_t LIMITS = limits();

  logic             slot, res_valid, res_slot;
  logic [15:0]      slot_idx;  // unused: res_valid already marks slots 0..3
  ul_word_t         res_word;
  logic             ev_valid;
  ul_word_t         ev_word;

  logic [NF-1:0]    f_push, f_pop, f_empty, f_full;
  ul_word_t         f_din  [NF];
  ul_word_t         f_dout [NF];

  logic             sc_valid, sc_ready, sc_limit;
  ul_word_t         sc_word;
  logic [$clog2(NF)-1:0] sc_cur;

  ulm_update_gen #(.PERIOD_CLKS(PERIOD_CLKS), .SLOT_CLKS(SLOT_CLKS)) u_upd (
    .clk, .rst_n, .slot, .slot_idx, .res_valid(res_slot), .res_word, .timestamp);

  assign res_valid = res_slot && master_mode;

  ulm_event_encoder u_enc (
    .clk, .rst_n, .tl_strobe, .tl_code, .mask_wr, .mask_addr, .mask_val, .ev_valid, .ev_word);

  always_comb begin
    f_push[0] = ev_valid;
    f_din[0]  = ev_word;
    f_push[1] = host_wr;
    f_din[1]  = host_word;
    for (int unsigned i = 0; i < N_UPLINK; i++) begin
      f_push[i+2] = uplink_rx[i].valid;
      f_din[i+2]  = uplink_rx[i].word;
    end
  end
  assign host_full = f_full[1];

  for (genvar i = 0; i < NF; i++) begin : g_fifo
    ul_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(f_push[i]), .din(f_din[i]), .pop(f_pop[i]), .dout(f_dout[i]),
      .empty(f_empty[i]), .full(f_full[i]), .count());
  end

  ul_fifo_scanner #(.N(NF), .LIMIT(LIMITS)) u_scan (
    .clk, .rst_n, .fifo_empty(f_empty), .fifo_dout(f_dout), .fifo_pop(f_pop),
    .out_valid(sc_valid), .out_word(sc_word), .out_ready(sc_ready), .cur(sc_cur),
    .limit_hit(sc_limit));

  // The scanner may use a slot only when it is not reserved.
  assign sc_ready = slot && !res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx       <= '0;
      drop_cnt <= '0;
    end else begin
      if (res_valid)                tx <= '{valid: 1'b1, word: res_word};
      else if (sc_ready && sc_valid) tx <= '{valid: 1'b1, word: sc_word};
      else                          tx <= '{valid: 1'b0, word: '0};
      drop_cnt <= drop_cnt + 16'($countones(f_push[NF-1:2] & f_full[NF-1:2]));
    end
  end
endmodule
