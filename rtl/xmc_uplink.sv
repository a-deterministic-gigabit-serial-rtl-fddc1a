// xmc_uplink: uplink of an XMC daughter card toward its carrier.
//
// Each daughter card keeps FIFOs of words waiting to be broadcast and a state
// machine that scans them and sends the words to the carrier over an Aurora
// link. Here there are two FIFOs, polled in this order:
//   0  high priority: 32-bit values written by the card's processor (such as
//      the revolution frequency), split into two words, high half first, each
//      with its own PID, as in the document's example;
//   1  the phase report of the card's reference synthesizer (ul_dds).
// The number of FIFOs, their depth and the poll limits are this design's
// choices. The Aurora core itself is outside; au_valid/au_word/au_ready is the
// valid-ready user side of its transmitter.
//
// Interface: cpu_wr writes cpu_value when cpu_ready; rep_* takes the report
// stream. Timing: a processor write takes two clocks to enter its FIFO
// (cpu_ready is low in the second); a word can leave the clock after it
// entered.
module xmc_uplink #(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned LIMIT_HI = 4,
  parameter int unsigned LIMIT_LO = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cpu_wr,
  input  logic [15:0]      cpu_pid_hi,
  input  logic [15:0]      cpu_pid_lo,
  input  logic [31:0]      cpu_value,
  output logic             cpu_ready,
  input  logic             rep_valid,
  input  ul_pkg::ul_word_t rep_word,
  output logic             rep_ready,
  output logic             au_valid,
  output ul_pkg::ul_word_t au_word,
  input  logic             au_ready
);
  import ul_pkg::*;

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic          lo_pending;
  ul_word_t      lo_word;
  logic [1:0]    f_push, f_pop, f_empty, f_full;
  ul_word_t      f_din  [2];
  ul_word_t      f_dout [2];
  logic [CW-1:0] hi_count;

  assign cpu_ready = !lo_pending && (32'(hi_count) + 2 <= DEPTH);
  assign rep_ready = !f_full[1];

  always_comb begin
    f_push[0] = lo_pending || (cpu_wr && cpu_ready);
    f_din[0]  = lo_pending ? lo_word : '{pid: cpu_pid_hi, data: cpu_value[31:16]};
    f_push[1] = rep_valid && !f_full[1];
    f_din[1]  = rep_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_pending <= 1'b0;
      lo_word    <= '0;
    end else if (lo_pending) begin
      lo_pending <= 1'b0;
    end else if (cpu_wr && cpu_ready) begin
      lo_pending <= 1'b1;
      lo_word    <= '{pid: cpu_pid_lo, data: cpu_value[15:0]};
    end
  end

  ul_fifo #(.DEPTH(DEPTH)) u_hi (
    .clk, .rst_n, .push(f_push[0]), .din(f_din[0]), .pop(f_pop[0]), .dout(f_dout[0]),
    .empty(f_empty[0]), .full(f_full[0]), .count(hi_count));
  ul_fifo #(.DEPTH(DEPTH)) u_lo (
    .clk, .rst_n, .push(f_push[1]), .din(f_din[1]), .pop(f_pop[1]), .dout(f_dout[1]),
    .empty(f_empty[1]), .full(f_full[1]), .count());

  ul_fifo_scanner #(.N(2), .LIMIT('{LIMIT_HI, LIMIT_LO})) u_scan (
    .clk, .rst_n, .fifo_empty(f_empty), .fifo_dout(f_dout), .fifo_pop(f_pop),
    .out_valid(au_valid), .out_word(au_word), .out_ready(au_ready), .cur(), .limit_hit());
endmodule
