// ulm_update_gen: update period timer and time stamp source of the Update
// Link Master.
//
// The master broadcasts an Update event every 10 us, and the three words after
// it carry a 48-bit time stamp. The link carries one 32-bit word per 40 line
// bits (8B/10B), so at 1 Gbps and a 100 MHz clock there is a word slot every
// SLOT_CLKS = 4 clocks and 250 slots per update period (the document's
// figure). This module counts clocks, marks the slot strobes, and fills the
// reserved slots 0..3 of each period: slot 0 the Update event (PID 0, code
// EVT_UPDATE), slots 1..3 the time stamp, most significant word first. All
// other slots are free for the scheduler. The time stamp is the count of 100
// MHz clocks at the start of the period; its meaning, the word order, the
// event code and the PIDs are this design's choices.
//
// Timing: slot is high on the first clock of each slot; res_valid/res_word are
// valid in that same clock. timestamp changes at slot 0.
module ulm_update_gen #(
  parameter int unsigned PERIOD_CLKS = ul_pkg::PERIOD_CLKS,
  parameter int unsigned SLOT_CLKS   = ul_pkg::SLOT_CLKS
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             slot,
  output logic [15:0]      slot_idx,
  output logic             res_valid,
  output ul_pkg::ul_word_t res_word,
  output logic [47:0]      timestamp
);
  import ul_pkg::*;

  logic [15:0] clk_in_period;
  logic [47:0] clk_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_in_period <= '0;
      clk_count     <= '0;
      timestamp     <= '0;
    end else begin
      clk_count     <= clk_count + 1'b1;
      clk_in_period <= (clk_in_period == 16'(PERIOD_CLKS - 1)) ? '0 : clk_in_period + 1'b1;
      if (clk_in_period == '0) timestamp <= clk_count;
    end
  end

  assign slot     = (clk_in_period % 16'(SLOT_CLKS)) == '0;
  assign slot_idx = clk_in_period / 16'(SLOT_CLKS);

  // Slots 1..3 read the time stamp register loaded at slot 0.
  always_comb begin
    res_valid = slot && (slot_idx < 16'd4);
    unique case (slot_idx)
      16'd0:   res_word = '{pid: PID_EVENT, data: EVT_UPDATE};
      16'd1:   res_word = '{pid: PID_TS2, data: timestamp[47:32]};
      16'd2:   res_word = '{pid: PID_TS1, data: timestamp[31:16]};
      16'd3:   res_word = '{pid: PID_TS0, data: timestamp[15:0]};
      default: res_word = '0;
    endcase
  end
endmodule
