// ulm_event_encoder: rebroadcast of control-system timing events on the
// Update Link.
//
// The master receives the standard timing links of the accelerator control
// system, and any of their events can be encoded and sent again on the Update
// Link. The format of those timing links is not given by the document; here a
// receiver delivers an 8-bit event code with a one-clock strobe. A 256-entry
// enable mask, written by the host, selects which codes are rebroadcast. A
// selected event becomes a timing-event word: PID 0 with the 16-bit event code
// {TL_PREFIX, code}. Mask and prefix are this design's choice.
//
// Timing: ev_valid/ev_word are registered, one clock after tl_strobe. The mask
// resets to all disabled.
module ulm_event_encoder #(
  parameter logic [7:0] TL_PREFIX = 8'h01
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tl_strobe,
  input  logic [7:0]       tl_code,
  input  logic             mask_wr,
  input  logic [7:0]       mask_addr,
  input  logic             mask_val,
  output logic             ev_valid,
  output ul_pkg::ul_word_t ev_word
);
  import ul_pkg::*;

  logic [255:0] enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable   <= '0;
      ev_valid <= 1'b0;
      ev_word  <= '0;
    end else begin
      if (mask_wr) enable[mask_addr] <= mask_val;
      ev_valid <= tl_strobe && enable[tl_code];
      ev_word  <= '{pid: PID_EVENT, data: {TL_PREFIX, tl_code}};
    end
  end
endmodule
