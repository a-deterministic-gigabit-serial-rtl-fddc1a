// ulr: Update Link Receiver, the block every target FPGA carries to use the
// link.
//
// It joins the link initialisation controller (gtx_init_ctrl), which drives the
// GTX receiver's DRP until the barrel shifter is at the position that gives
// the fixed latency, and the word decoder (ulr_decoder). Received symbols reach
// the decoder only while the link is aligned, so no update pulse is ever given
// at a latency other than the deterministic one. The gating is this design's
// choice.
//
// Interface: rx is the word stream of the GTX receiver, resetdone its
// initialisation status, drp_req/drp_rsp its DRP; the outputs are those of
// ulr_decoder plus aligned and the number of relock attempts.
module ulr #(
  parameter int unsigned HOLD_CLKS   = 64,
  parameter int unsigned SETTLE_CLKS = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ul_pkg::ul_sym_t  rx,
  input  logic             resetdone,
  output ul_pkg::drp_req_t drp_req,
  input  ul_pkg::drp_rsp_t drp_rsp,
  output logic             aligned,
  output logic [7:0]       attempts,
  output logic             update,
  output logic             evt_valid,
  output logic [15:0]      evt_code,
  output logic             data_valid,
  output ul_pkg::ul_word_t data_word,
  output logic             ts_valid,
  output logic [47:0]      timestamp
);
  import ul_pkg::*;

  ul_sym_t rx_gated;

  gtx_init_ctrl #(.HOLD_CLKS(HOLD_CLKS), .SETTLE_CLKS(SETTLE_CLKS)) u_init (
    .clk, .rst_n, .resetdone, .drp_req, .drp_rsp, .aligned, .attempts, .bs_pos());

  always_comb begin
    rx_gated       = rx;
    rx_gated.valid = rx.valid && aligned;
  end

  ulr_decoder u_dec (
    .clk, .rst_n, .rx(rx_gated), .update, .evt_valid, .evt_code, .data_valid, .data_word,
    .ts_valid, .timestamp);
endmodule
