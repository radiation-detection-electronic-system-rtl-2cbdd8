// daq_pkg: types and constants shared by the FADC acquisition chain.
//
// The FADC board delivers one 32-bit word per 125 MHz data clock. Each word
// holds two consecutive 250 MS/s samples of each of the two analog channels,
// in the transmission order A1, B1, A2, B2 (A1 in the top byte, i.e. first in
// time at the most significant end; the byte placement is this design's
// choice, the order is the board's).
//
// The host programs the interface board through byte-wide registers written
// over RS-232. The register map and the framing of an event sent back to the
// host are this design's own choices; the quantities they hold (trigger
// level, delay, time bin, number of events) are those the acquisition
// program exposes.
package daq_pkg;

  localparam int unsigned SAMPLE_W = 8;   // FADC resolution

  typedef logic [SAMPLE_W-1:0] sample_t;

  // One data block from the FADC board, first sample of the block in the
  // most significant byte.
  typedef struct packed {
    sample_t a1;
    sample_t b1;
    sample_t a2;
    sample_t b2;
  } fadc_word_t;

  // Channel selection for trigger and recording.
  typedef enum logic {
    CH_A = 1'b0,
    CH_B = 1'b1
  } channel_e;

  // Host-visible registers. Each host instruction is two bytes: a register
  // address followed by the value.
  typedef enum logic [7:0] {
    REG_THRESHOLD = 8'h01,  // trigger level, 0..255
    REG_DELAY     = 8'h02,  // pre-trigger delay in 8 ns data words
    REG_TIMEBIN   = 8'h03,  // keep one sample out of this many (0 acts as 1)
    REG_CHANNEL   = 8'h04,  // bit 0: channel used for trigger and recording
    REG_NEV_LO    = 8'h05,  // number of events to record, low byte
    REG_NEV_HI    = 8'h06,  // number of events to record, high byte
    REG_CONTROL   = 8'h07   // bit 0: 1 starts a run, 0 stops it
  } reg_addr_e;

  // Settings as the processing units see them.
  typedef struct packed {
    sample_t       threshold;
    logic [7:0]    delay;
    logic [7:0]    timebin;
    channel_e      channel;
    logic [15:0]   n_events;  // 0 means record until stopped
  } daq_cfg_t;

  // First byte of every event sent to the host.
  localparam logic [7:0] EVENT_MARKER = 8'hA5;

  // Pick the two samples of one channel out of a data block, in time order.
  function automatic logic [2*SAMPLE_W-1:0] channel_pair(fadc_word_t w, channel_e ch);
    return (ch == CH_B) ? {w.b1, w.b2} : {w.a1, w.a2};
  endfunction

endpackage
