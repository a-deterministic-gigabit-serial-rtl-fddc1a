// ul_endpoint: what every target FPGA (RF Controller carrier or XMC daughter)
// runs on the Update Link: an Update Link Receiver (ulr) feeding a
// synthesizer (ul_dds). The receiver's decoded update pulse, events and data
// words drive the synthesizer; everything is gathered in one status struct.
// The synthesizer's phase report, sent only when is_ref is high, leaves on
// rep_valid/rep_word/rep_ready toward the board's uplink.
module ul_endpoint #(
  parameter int unsigned HOLD_CLKS   = 64,
  parameter int unsigned SETTLE_CLKS = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ul_pkg::ul_sym_t    rx,
  input  logic               resetdone,
  output ul_pkg::drp_req_t   drp_req,
  input  ul_pkg::drp_rsp_t   drp_rsp,
  input  logic               is_ref,
  output ul_pkg::ep_status_t status,
  output logic               rep_valid,
  output ul_pkg::ul_word_t   rep_word,
  input  logic               rep_ready
);
  ulr #(.HOLD_CLKS(HOLD_CLKS), .SETTLE_CLKS(SETTLE_CLKS)) u_ulr (
    .clk, .rst_n, .rx, .resetdone, .drp_req, .drp_rsp,
    .aligned(status.aligned), .attempts(status.attempts), .update(status.update),
    .evt_valid(status.evt_valid), .evt_code(status.evt_code),
    .data_valid(status.data_valid), .data_word(status.data_word),
    .ts_valid(status.ts_valid), .timestamp(status.timestamp));

  ul_dds u_dds (
    .clk, .rst_n, .update(status.update), .evt_valid(status.evt_valid),
    .evt_code(status.evt_code), .data_valid(status.data_valid), .data_word(status.data_word),
    .is_ref, .phase(status.phase), .freq(status.freq), .latched(status.latched),
    .rep_valid, .rep_word, .rep_ready);
endmodule
