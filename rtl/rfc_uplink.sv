// rfc_uplink: uplink of an RF Controller carrier toward the Update Link Master.
//
// The carrier FPGA has one FIFO for each daughter site, filled from that
// site's Aurora link, and a state machine that scans them and sends the words
// to the master on the transmitter of the same transceiver that receives the
// Update Link. A further FIFO (index N_XMC, polled last) takes the phase report
// of the carrier's own reference synthesizer; that FIFO, the depth, the poll
// order (site 0 first) and the limits are this design's choices. Like the
// broadcast, the uplink runs at 1 Gbps: one word per SLOT_CLKS clocks. The
// uplink need not be deterministic, so its slots are counted from reset.
//
// Interface: au_valid/au_word/au_ready[i] is the receive user side of the
// Aurora link of site i; a FIFO that is full holds off its link (au_ready
// low). rep_* takes the carrier report stream. tx is a valid symbol in slot
// clocks that carry a word, registered.
module rfc_uplink #(
  parameter int unsigned N_XMC     = 6,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned LIMIT     = 2,
  parameter int unsigned SLOT_CLKS = ul_pkg::SLOT_CLKS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             au_valid [N_XMC],
  input  ul_pkg::ul_word_t au_word  [N_XMC],
  output logic             au_ready [N_XMC],
  input  logic             rep_valid,
  input  ul_pkg::ul_word_t rep_word,
  output logic             rep_ready,
  output ul_pkg::ul_sym_t  tx
);
  import ul_pkg::*;

  localparam int unsigned NF = N_XMC + 1;
  localparam int unsigned LIMITS [NF] = '{default: LIMIT};

  logic [NF-1:0] f_push, f_pop, f_empty, f_full;
  ul_word_t      f_din  [NF];
  ul_word_t      f_dout [NF];
  logic          sc_valid, sc_ready;
  ul_word_t      sc_word;
  logic [$clog2(SLOT_CLKS+1)-1:0] slot_cnt;
  logic          slot;

  always_comb begin
    for (int unsigned i = 0; i < N_XMC; i++) begin
      au_ready[i] = !f_full[i];
      f_push[i]   = au_valid[i] && !f_full[i];
      f_din[i]    = au_word[i];
    end
    f_push[N_XMC] = rep_valid && !f_full[N_XMC];
    f_din[N_XMC]  = rep_word;
  end
  assign rep_ready = !f_full[N_XMC];

  for (genvar i = 0; i < NF; i++) begin : g_fifo
    ul_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .push(f_push[i]), .din(f_din[i]), .pop(f_pop[i]), .dout(f_dout[i]),
      .empty(f_empty[i]), .full(f_full[i]), .count());
  end

  ul_fifo_scanner #(.N(NF), .LIMIT(LIMITS)) u_scan (
    .clk, .rst_n, .fifo_empty(f_empty), .fifo_dout(f_dout), .fifo_pop(f_pop),
    .out_valid(sc_valid), .out_word(sc_word), .out_ready(sc_ready), .cur(), .limit_hit());

  assign slot     = (slot_cnt == 0);
  assign sc_ready = slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cnt <= '0;
      tx       <= '0;
    end else begin
      slot_cnt <= (32'(slot_cnt) == SLOT_CLKS - 1) ? '0 : slot_cnt + 1'b1;
      tx       <= '{valid: slot && sc_valid, word: sc_valid ? sc_word : '0};
    end
  end
endmodule
