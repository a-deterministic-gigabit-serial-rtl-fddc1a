// ul_system: the Update Link of the LLRF system, all firmware in one place.
//
// One Update Link Master (ulm_core) sends a single word stream that the
// crosspoint switches copy to every receiver. Each of N_RFC RF Controllers
// has a carrier FPGA and N_XMC daughter-card FPGAs, and each of these runs an
// endpoint (Update Link Receiver plus synthesizer). Data flows back up a tree:
// daughter FIFOs -> Aurora link -> carrier FIFOs -> carrier transceiver ->
// master FIFOs -> broadcast. N_RFC = 16 is the number of RF Controllers whose
// return path fits the master's 16 transceivers, N_XMC = 6 the daughter sites
// of a carrier, both from the document.
//
// The serial hardware between the FPGAs is outside this module and its signals
// are ports: the broadcasting transmitter and crosspoint (ulm_tx in,
// rfc_rx / xmc_rx out), each receiver's transceiver status and DRP
// (*_resetdone, *_drp_req, *_drp_rsp), the carriers' return transceivers
// (rfc_uplink_tx -> ulm_uplink_rx) and the Aurora links (xmc_au_* ->
// rfc_au_*). Processor writes of daughter cards enter at xmc_cpu_*, manual
// master words at host_*, control-system timing events at tl_*;
// ulm_master_mode low turns the master chassis into a consolidator. is_ref
// inputs pick the reference synthesizers. Status of every endpoint is brought
// out in rfc_status / xmc_status.
module ul_system #(
  parameter int unsigned N_RFC = 16,
  parameter int unsigned N_XMC = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  // master
  input  logic               ulm_master_mode,
  input  logic               host_wr,
  input  ul_pkg::ul_word_t   host_word,
  output logic               host_full,
  input  logic               tl_strobe,
  input  logic [7:0]         tl_code,
  input  logic               mask_wr,
  input  logic [7:0]         mask_addr,
  input  logic               mask_val,
  output ul_pkg::ul_sym_t    ulm_tx,
  input  ul_pkg::ul_sym_t    ulm_uplink_rx [N_RFC],
  output logic [47:0]        ulm_timestamp,
  output logic [15:0]        ulm_drop_cnt,
  // RF Controller carriers
  input  ul_pkg::ul_sym_t    rfc_rx        [N_RFC],
  input  logic               rfc_resetdone [N_RFC],
  output ul_pkg::drp_req_t   rfc_drp_req   [N_RFC],
  input  ul_pkg::drp_rsp_t   rfc_drp_rsp   [N_RFC],
  input  logic               rfc_is_ref    [N_RFC],
  output ul_pkg::ep_status_t rfc_status    [N_RFC],
  output ul_pkg::ul_sym_t    rfc_uplink_tx [N_RFC],
  input  logic               rfc_au_valid  [N_RFC][N_XMC],
  input  ul_pkg::ul_word_t   rfc_au_word   [N_RFC][N_XMC],
  output logic               rfc_au_ready  [N_RFC][N_XMC],
  // XMC daughter cards
  input  ul_pkg::ul_sym_t    xmc_rx        [N_RFC][N_XMC],
  input  logic               xmc_resetdone [N_RFC][N_XMC],
  output ul_pkg::drp_req_t   xmc_drp_req   [N_RFC][N_XMC],
  input  ul_pkg::drp_rsp_t   xmc_drp_rsp   [N_RFC][N_XMC],
  input  logic               xmc_is_ref    [N_RFC][N_XMC],
  output ul_pkg::ep_status_t xmc_status    [N_RFC][N_XMC],
  input  logic               xmc_cpu_wr    [N_RFC][N_XMC],
  input  logic [15:0]        xmc_cpu_pid_hi[N_RFC][N_XMC],
  input  logic [15:0]        xmc_cpu_pid_lo[N_RFC][N_XMC],
  input  logic [31:0]        xmc_cpu_value [N_RFC][N_XMC],
  output logic               xmc_cpu_ready [N_RFC][N_XMC],
  output logic               xmc_au_valid  [N_RFC][N_XMC],
  output ul_pkg::ul_word_t   xmc_au_word   [N_RFC][N_XMC],
  input  logic               xmc_au_ready  [N_RFC][N_XMC]
);
  import ul_pkg::*;

  ulm_core #(.N_UPLINK(N_RFC)) u_ulm (
    .clk, .rst_n, .master_mode(ulm_master_mode), .host_wr, .host_word, .host_full,
    .tl_strobe, .tl_code,
    .mask_wr, .mask_addr, .mask_val, .uplink_rx(ulm_uplink_rx), .tx(ulm_tx),
    .timestamp(ulm_timestamp), .drop_cnt(ulm_drop_cnt));

  for (genvar r = 0; r < N_RFC; r++) begin : g_rfc
    logic     rep_valid, rep_ready;
    ul_word_t rep_word;

    ul_endpoint u_ep (
      .clk, .rst_n, .rx(rfc_rx[r]), .resetdone(rfc_resetdone[r]),
      .drp_req(rfc_drp_req[r]), .drp_rsp(rfc_drp_rsp[r]), .is_ref(rfc_is_ref[r]),
      .status(rfc_status[r]), .rep_valid, .rep_word, .rep_ready);

    rfc_uplink #(.N_XMC(N_XMC)) u_up (
      .clk, .rst_n, .au_valid(rfc_au_valid[r]), .au_word(rfc_au_word[r]),
      .au_ready(rfc_au_ready[r]), .rep_valid, .rep_word, .rep_ready,
      .tx(rfc_uplink_tx[r]));

    for (genvar x = 0; x < N_XMC; x++) begin : g_xmc
      logic     x_rep_valid, x_rep_ready;
      ul_word_t x_rep_word;

      ul_endpoint u_ep (
        .clk, .rst_n, .rx(xmc_rx[r][x]), .resetdone(xmc_resetdone[r][x]),
        .drp_req(xmc_drp_req[r][x]), .drp_rsp(xmc_drp_rsp[r][x]),
        .is_ref(xmc_is_ref[r][x]), .status(xmc_status[r][x]),
        .rep_valid(x_rep_valid), .rep_word(x_rep_word), .rep_ready(x_rep_ready));

      xmc_uplink u_up (
        .clk, .rst_n, .cpu_wr(xmc_cpu_wr[r][x]), .cpu_pid_hi(xmc_cpu_pid_hi[r][x]),
        .cpu_pid_lo(xmc_cpu_pid_lo[r][x]), .cpu_value(xmc_cpu_value[r][x]),
        .cpu_ready(xmc_cpu_ready[r][x]), .rep_valid(x_rep_valid), .rep_word(x_rep_word),
        .rep_ready(x_rep_ready), .au_valid(xmc_au_valid[r][x]), .au_word(xmc_au_word[r][x]),
        .au_ready(xmc_au_ready[r][x]));
    end
  end
endmodule
