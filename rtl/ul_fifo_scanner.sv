// ul_fifo_scanner: the polling state machine that empties a set of FIFOs into
// one word stream.
//
// At every level of the uplink tree (daughter card, carrier, master) the
// document has a state machine that looks at the FIFOs in a fixed order and
// pulls at most a fixed number of words from one FIFO before moving to the
// next, which sets the priority of delivery. The order and limits are not
// given, so here the order is index order 0..N-1, circular, and the limit of
// FIFO i is LIMIT[i]. Empty FIFOs are skipped: when the FIFO being served is
// empty or has used its limit, the scanner jumps in one clock to the next
// non-empty FIFO after it.
//
// Interface: fifo_empty/fifo_dout are the heads of first-word-fall-through
// FIFOs, fifo_pop removes a head. out_valid/out_word/out_ready is a
// valid-ready stream; a word moves when both are high, and that pops its
// FIFO in the same clock. cur tells which FIFO is being served and
// limit_hit pulses when a FIFO is left because it used its whole limit.
module ul_fifo_scanner #(
  parameter int unsigned N            = 2,
  parameter int unsigned LIMIT [N]    = '{default: 4},
  localparam int unsigned IW          = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          fifo_empty,
  input  ul_pkg::ul_word_t      fifo_dout [N],
  output logic [N-1:0]          fifo_pop,
  output logic                  out_valid,
  output ul_pkg::ul_word_t      out_word,
  input  logic                  out_ready,
  output logic [IW-1:0]         cur,
  output logic                  limit_hit
);
  logic [7:0]    burst;     // words taken from FIFO cur in this visit
  logic [IW-1:0] next_sel;  // first non-empty FIFO after cur, circularly
  logic          take;
  logic          last_of_burst;

  always_comb begin
    next_sel = cur;
    for (int k = N - 1; k >= 1; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((32'(cur) + k) % N);
      if (!fifo_empty[idx]) next_sel = idx;
    end
  end

  assign out_valid     = !fifo_empty[cur];
  assign out_word      = fifo_dout[cur];
  assign take          = out_valid && out_ready;
  assign last_of_burst = (32'(burst) + 1 >= LIMIT[cur]);
  assign limit_hit     = take && last_of_burst;

  always_comb begin
    fifo_pop = '0;
    fifo_pop[cur] = take;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur   <= '0;
      burst <= '0;
    end else if (take) begin
      if (last_of_burst) begin
        cur   <= next_sel;
        burst <= '0;
      end else begin
        burst <= burst + 1'b1;
      end
    end else if (!out_valid) begin
      cur   <= next_sel;
      burst <= '0;
    end
  end

  a_pop_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fifo_pop));
endmodule
