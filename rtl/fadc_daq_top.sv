// fadc_daq_top: two-board radiation-pulse acquisition system.
//
// A detector pulse, digitised at 250 MS/s with 8 bits on each of two
// channels, is packed by the FADC board into 32-bit blocks sent with a
// 125 MHz clock (fadc_packer). The interface board (interface_board)
// triggers on the pulse, records a fixed-size, time-renormalised window of
// its shape starting before the trigger, and sends it to a host PC over
// RS-232 at 115200 baud; the host sets all parameters over the same link.
//
// The flash ADC chips themselves and the RS-232 level shifters are analog
// parts: their logic-level signals (adc_a, adc_b, rs232_rxd, rs232_txd) are
// the ports of this module. dclk, the FADC board's forwarded data clock,
// is brought out for observation.
//
// Taken from the original system: the two boards, their clocks, the RS-232
// link and its rate. This design's own choices: the status outputs (trig,
// busy, running, events_sent) and everything listed as such in the
// sub-modules.
module fadc_daq_top
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 125_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned DELAY_DEPTH = 256,
  parameter int unsigned EVENT_WORDS = 128
) (
  input  logic        clk_adc,     // 250 MHz conversion clock
  input  logic        rst,         // asynchronous, active high
  input  sample_t     adc_a,       // channel A sample
  input  sample_t     adc_b,       // channel B sample
  input  logic        rs232_rxd,
  output logic        rs232_txd,
  output logic        dclk,        // 125 MHz data clock between the boards
  output logic        trig,
  output logic        busy,
  output logic        running,
  output logic [15:0] events_sent
);

  fadc_word_t data;

  fadc_packer u_fadc (
    .clk_adc, .rst, .adc_a, .adc_b, .dclk, .data
  );

  interface_board #(
    .CLK_HZ(CLK_HZ), .BAUD(BAUD),
    .DELAY_DEPTH(DELAY_DEPTH), .EVENT_WORDS(EVENT_WORDS)
  ) u_ifb (
    .dclk, .rst, .data, .rxd(rs232_rxd), .txd(rs232_txd),
    .trig, .busy, .running, .events_sent
  );

endmodule
