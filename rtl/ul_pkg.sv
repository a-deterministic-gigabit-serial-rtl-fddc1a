// ul_pkg: types and constants shared by the Update Link modules.
//
// Every Update Link transmission is a 32-bit word: a 16-bit packet identifier
// (PID) in the upper half and a 16-bit payload in the lower half. PID 0 marks
// a timing event, whose payload is the event code. On the wire a word is sent
// with a valid flag (ul_sym_t); an invalid symbol stands for the idle
// characters a transceiver sends when there is no data.
//
// The word format, PID 0 for events, the 10 us update period, the 100 MHz
// common clock and the 1 Gbps line rate follow the document. The specific
// event codes and PIDs below are this design's choice: the document does not
// list them.
package ul_pkg;

  typedef struct packed {
    logic [15:0] pid;
    logic [15:0] data;
  } ul_word_t;

  typedef struct packed {
    logic     valid;
    ul_word_t word;
  } ul_sym_t;

  // Dynamic Reconfiguration Port of a transceiver tile (Virtex-5 GTX style).
  typedef struct packed {
    logic        den;
    logic        dwe;
    logic [6:0]  daddr;
    logic [15:0] di;
  } drp_req_t;

  typedef struct packed {
    logic [15:0] dout;
    logic        drdy;
  } drp_rsp_t;

  // What an endpoint (receiver plus synthesizer) shows to its board.
  typedef struct packed {
    logic        aligned;
    logic [7:0]  attempts;
    logic        update;
    logic        evt_valid;
    logic [15:0] evt_code;
    logic        data_valid;
    ul_word_t    data_word;
    logic        ts_valid;
    logic [47:0] timestamp;
    logic [31:0] phase;
    logic [31:0] freq;
    logic [31:0] latched;
  } ep_status_t;

  localparam int unsigned CLK_HZ      = 100_000_000;  // common master clock
  localparam int unsigned PERIOD_CLKS = 1000;         // 10 us update period
  localparam int unsigned SLOT_CLKS   = 4;            // 40 line bits at 1 Gbps per 32-bit word
  localparam int unsigned SLOTS_PER_PERIOD = PERIOD_CLKS / SLOT_CLKS;  // 250

  localparam logic [15:0] PID_EVENT  = 16'h0000;
  localparam logic [15:0] EVT_UPDATE = 16'h0001;
  localparam logic [15:0] EVT_LATCH  = 16'h0002;  // synthesizers latch their phase
  // Time stamp: three words after each update, most significant first.
  localparam logic [15:0] PID_TS2    = 16'h0001;  // bits 47:32
  localparam logic [15:0] PID_TS1    = 16'h0002;  // bits 31:16
  localparam logic [15:0] PID_TS0    = 16'h0003;  // bits 15:0
  // Revolution frequency and reference phase, each split in two words.
  localparam logic [15:0] PID_FHI    = 16'h0010;
  localparam logic [15:0] PID_FLO    = 16'h0011;
  localparam logic [15:0] PID_PHI    = 16'h0020;
  localparam logic [15:0] PID_PLO    = 16'h0021;

endpackage
