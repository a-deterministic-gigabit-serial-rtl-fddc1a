// aurora_model: behavioural model of one Aurora link from a daughter card to
// its carrier, seen from the two user interfaces. Not synthesizable logic: a
// simulation stand-in for the vendor core.
//
// Words accepted on the transmit side (tx_valid && tx_ready) come out on the
// receive side LAT clocks later, in order, when rx_ready allows. The link
// accepts a word in 5 of every 8 clocks, the rate of 32-bit words at a 2.5
// Gbps line rate with 8B/10B against the 100 MHz clock, and holds at most
// eight words in flight; tx_ready is low otherwise.
module aurora_model #(
  parameter int unsigned LAT = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_valid,
  input  ul_pkg::ul_word_t tx_word,
  output logic             tx_ready,
  output logic             rx_valid,
  output ul_pkg::ul_word_t rx_word,
  input  logic             rx_ready
);
  import ul_pkg::*;

  ul_word_t    buf_w [8];
  int unsigned buf_t [8];
  int unsigned rd, wr, cnt, now, phase8;

  assign tx_ready = (cnt < 8) && (phase8 < 5);
  assign rx_valid = (cnt > 0) && (now - buf_t[rd] >= LAT);
  assign rx_word  = buf_w[rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= 0; wr <= 0; cnt <= 0; now <= 0; phase8 <= 0;
      for (int i = 0; i < 8; i++) begin buf_w[i] <= '0; buf_t[i] <= 0; end
    end else begin
      now    <= now + 1;
      phase8 <= (phase8 + 1) % 8;
      if (tx_valid && tx_ready) begin
        buf_w[wr] <= tx_word;
        buf_t[wr] <= now;
        wr <= (wr + 1) % 8;
      end
      if (rx_valid && rx_ready) rd <= (rd + 1) % 8;
      cnt <= cnt + ((tx_valid && tx_ready) ? 1 : 0) - ((rx_valid && rx_ready) ? 1 : 0);
    end
  end
endmodule
