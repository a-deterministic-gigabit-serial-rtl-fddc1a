// ul_dds: link side of a direct digital synthesizer.
//
// In the document's main example, the 32-bit revolution frequency is sent as
// two 16-bit data words, each with its own PID, and every synthesizer applies
// the new value at the next Update pulse. As all synthesizers run from the
// common 100 MHz clock and receive the update at the same clock, they stay
// locked in phase. In the second example an event makes all synthesizers latch
// their phase accumulator, and the reference synthesizer sends its latched
// phase up the link so the others can compare.
//
// This module keeps the two received halves in a shadow register, loads the
// frequency register from it on update, and adds the frequency to a 32-bit
// phase accumulator every clock (the phase-to-amplitude part of a DDS is
// outside the link and not built). On the latch event it copies the phase;
// when is_ref is high it then offers the latched phase as two words, high half
// first, on rep_valid/rep_word/rep_ready. Accumulator width, PIDs, event code
// and word order are this design's choices.
//
// Timing: the new frequency is used from the clock after update; latched is
// the phase in the clock the event pulse is seen.
module ul_dds (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             update,
  input  logic             evt_valid,
  input  logic [15:0]      evt_code,
  input  logic             data_valid,
  input  ul_pkg::ul_word_t data_word,
  input  logic             is_ref,
  output logic [31:0]      phase,
  output logic [31:0]      freq,
  output logic [31:0]      latched,
  output logic             rep_valid,
  output ul_pkg::ul_word_t rep_word,
  input  logic             rep_ready
);
  import ul_pkg::*;

  logic [31:0] shadow;
  logic [1:0]  rep_left;  // report words still to send

  assign rep_valid = (rep_left != 0);
  assign rep_word  = (rep_left == 2) ? '{pid: PID_PHI, data: latched[31:16]}
                                     : '{pid: PID_PLO, data: latched[15:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow   <= '0;
      freq     <= '0;
      phase    <= '0;
      latched  <= '0;
      rep_left <= '0;
    end else begin
      if (data_valid && data_word.pid == PID_FHI) shadow[31:16] <= data_word.data;
      if (data_valid && data_word.pid == PID_FLO) shadow[15:0]  <= data_word.data;
      if (update) freq <= shadow;
      phase <= phase + freq;
      if (evt_valid && evt_code == EVT_LATCH) begin
        latched  <= phase;
        rep_left <= is_ref ? 2'd2 : 2'd0;
      end else if (rep_valid && rep_ready) begin
        rep_left <= rep_left - 1'b1;
      end
    end
  end
endmodule
