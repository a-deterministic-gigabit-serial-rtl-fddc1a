// ulr_decoder: word decoder of the Update Link Receiver.
//
// Every received word is either a timing event (PID 0, payload = event code)
// or a data word identified by its PID, as the document defines. Events are
// given out with evt_valid/evt_code, and the Update event also raises the
// one-clock update pulse that every receiver sees at the same clock. Data words
// are given out with data_valid/data_word. The three time stamp words that
// follow each update are collected and the 48-bit time stamp is given out when
// its last word arrives (ts_valid). The update code, time stamp PIDs and word
// order are those chosen in ul_pkg.
//
// Timing: all outputs are registered, one clock after the valid input symbol;
// the pulses last one clock.
module ulr_decoder (
  input  logic             clk,
  input  logic             rst_n,
  input  ul_pkg::ul_sym_t  rx,
  output logic             update,
  output logic             evt_valid,
  output logic [15:0]      evt_code,
  output logic             data_valid,
  output ul_pkg::ul_word_t data_word,
  output logic             ts_valid,
  output logic [47:0]      timestamp
);
  import ul_pkg::*;

  logic [15:0] ts_hi, ts_mid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      update     <= 1'b0;
      evt_valid  <= 1'b0;
      evt_code   <= '0;
      data_valid <= 1'b0;
      data_word  <= '0;
      ts_valid   <= 1'b0;
      timestamp  <= '0;
      ts_hi      <= '0;
      ts_mid     <= '0;
    end else begin
      update     <= 1'b0;
      evt_valid  <= 1'b0;
      data_valid <= 1'b0;
      ts_valid   <= 1'b0;
      if (rx.valid) begin
        if (rx.word.pid == PID_EVENT) begin
          evt_valid <= 1'b1;
          evt_code  <= rx.word.data;
          update    <= (rx.word.data == EVT_UPDATE);
        end else begin
          data_valid <= 1'b1;
          data_word  <= rx.word;
          unique case (rx.word.pid)
            PID_TS2: ts_hi  <= rx.word.data;
            PID_TS1: ts_mid <= rx.word.data;
            PID_TS0: begin
              timestamp <= {ts_hi, ts_mid, rx.word.data};
              ts_valid  <= 1'b1;
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
