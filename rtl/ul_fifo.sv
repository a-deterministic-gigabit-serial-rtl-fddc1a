// ul_fifo: synchronous first-word-fall-through FIFO for Update Link words.
//
// The document places FIFOs at every level of the uplink tree: several on each
// daughter card, one per daughter site on the carrier, one per uplink at the
// master. Because every chassis runs from the same 100 MHz clock, all of them
// are single-clock here. The depth is this design's choice (the document does
// not give one).
//
// Interface: push/din write when not full; dout shows the oldest word while
// empty is low and pop removes it. count is the fill level. Pushing a full
// FIFO or popping an empty one is ignored and flagged by an assertion.
// Timing: a pushed word appears on dout the clock after the push.
module ul_fifo #(
  parameter type         T     = ul_pkg::ul_word_t,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                           mem [DEPTH];
  logic [AW-1:0]              rd_ptr, wr_ptr;
  logic                       do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= nxt(wr_ptr);
      if (do_pop)  rd_ptr <= nxt(rd_ptr);
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  // A full FIFO is normal under back-pressure; pops must be guarded by the user.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("ul_fifo: pop while empty");
endmodule
