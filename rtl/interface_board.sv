// interface_board: logic of the interface board's FPGA.
//
// Runs on the 125 MHz data clock that comes with the FADC blocks. The
// incoming stream goes two ways: undelayed to the trigger unit, and through
// the delay line to the execute unit. A trigger (rising crossing of the user
// level on the selected channel) starts the execute unit, which records
// 4*EVENT_WORDS samples of the delayed stream, one every `timebin` samples.
// The bus controller then sends the event to the host over RS-232 and
// re-arms the execute unit. The bus controller also holds all settings,
// written by the host.
//
// Alignment: the trigger unit and the delay line both have one register
// stage, so in the cycle trig is high the delay line presents the block
// received `delay` blocks before the triggering one. The recorded window
// therefore starts 2*delay samples before the crossing sample.
//
// Interface: dclk/rst, one FADC block per dclk, the two serial lines, and
// status outputs: trig (every trigger, accepted or not), busy (an event is
// being recorded or waits to be sent), running, events_sent.
//
// Taken from the original system: the four processes trigger, delay, execute and bus
// controller and how they cooperate. This design's choices: the exact
// alignment, and that triggers are ignored while an event is in flight.
module interface_board
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 125_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned DELAY_DEPTH = 256,
  parameter int unsigned EVENT_WORDS = 128
) (
  input  logic        dclk,
  input  logic        rst,
  input  fadc_word_t  data,
  input  logic        rxd,
  output logic        txd,
  output logic        trig,
  output logic        busy,
  output logic        running,
  output logic [15:0] events_sent
);

  localparam int unsigned IW = $clog2(4 * EVENT_WORDS);
  localparam int unsigned DW = $clog2(DELAY_DEPTH);

  daq_cfg_t   cfg;
  logic       trig_pos;
  fadc_word_t delayed;
  logic       evt_full, capturing, release_evt;
  logic [IW-1:0] rd_addr;
  sample_t    rd_data;

  trigger_unit u_trigger (
    .clk(dclk), .rst, .data,
    .threshold(cfg.threshold), .channel(cfg.channel),
    .trig, .trig_pos
  );

  delay_line #(.DEPTH(DELAY_DEPTH)) u_delay (
    .clk(dclk), .rst, .din(data), .delay(DW'(cfg.delay)), .dout(delayed)
  );

  execute_unit #(.EVENT_WORDS(EVENT_WORDS)) u_execute (
    .clk(dclk), .rst, .data(delayed), .trig, .trig_pos,
    .arm(running), .channel(cfg.channel), .timebin(cfg.timebin),
    .rd_addr, .rd_data, .full(evt_full), .capturing, .release_evt
  );

  bus_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .EVENT_WORDS(EVENT_WORDS)) u_bus (
    .clk(dclk), .rst, .rxd, .txd, .cfg, .running, .events_sent,
    .evt_full, .rd_addr, .rd_data, .release_evt
  );

  assign busy = capturing || evt_full;

endmodule
