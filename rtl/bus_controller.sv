// bus_controller: host link of the interface board.
//
// Two jobs. (1) Instructions from the host PC arrive over RS-232 and are
// turned into register values that steer the other units: trigger level,
// delay, time bin, channel, number of events and run/stop. (2) Each event
// recorded by the execute unit is sent to the host as RS-232 bytes.
//
// Host instructions: two bytes, a register address (daq_pkg::reg_addr_e)
// followed by the value. Writing 1 to REG_CONTROL clears the event counter
// and starts a run; writing 0 stops it. A run also ends by itself after
// n_events events have been sent (n_events = 0: never).
//
// Event framing: the byte EVENT_MARKER, then the 4*EVENT_WORDS stored
// samples in time order, one byte each. The sender reads the execute unit's
// buffer one byte ahead of the transmitter (rd_addr, then rd_data one cycle
// later) and, after the last byte has been handed to the transmitter, pulses
// release_evt so the execute unit can record the next event. At 115200 baud
// an event of 513 bytes takes 5130 bit times, about 44.5 ms.
//
// Taken from the original system: receive instructions, store them in registers read by the
// other components, and put the data into RS-232 form. This design's
// choices: the instruction format, register map, reset values, event
// framing and the end-of-run rule.
module bus_controller
  import daq_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 125_000_000,
  parameter int unsigned BAUD        = 115_200,
  parameter int unsigned EVENT_WORDS = 128
) (
  input  logic        clk,
  input  logic        rst,
  // RS-232 (logic levels)
  input  logic        rxd,
  output logic        txd,
  // settings for the processing units
  output daq_cfg_t    cfg,
  output logic        running,      // triggers may start events
  output logic [15:0] events_sent,  // events sent in this run
  // execute unit buffer
  input  logic        evt_full,
  output logic [$clog2(4*EVENT_WORDS)-1:0] rd_addr,
  input  sample_t     rd_data,
  output logic        release_evt
);

  localparam int unsigned NSAMP = 4 * EVENT_WORDS;
  localparam int unsigned IW    = $clog2(NSAMP);

  // ---------------- instruction receiver ----------------
  logic [7:0] rx_data;
  logic       rx_valid, rx_err;
  logic       have_addr;
  logic [7:0] addr_q;
  logic       run_cmd, stop_cmd, run_done;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rxd, .rx_data, .rx_valid, .rx_err
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      have_addr     <= 1'b0;
      addr_q        <= '0;
      cfg.threshold <= 8'd128;
      cfg.delay     <= 8'd16;
      cfg.timebin   <= 8'd1;
      cfg.channel   <= CH_A;
      cfg.n_events  <= 16'd1;
      run_cmd       <= 1'b0;
      stop_cmd      <= 1'b0;
    end else begin
      run_cmd  <= 1'b0;
      stop_cmd <= 1'b0;
      if (rx_err) begin
        have_addr <= 1'b0;  // resynchronise on a broken byte
      end else if (rx_valid) begin
        if (!have_addr) begin
          addr_q    <= rx_data;
          have_addr <= 1'b1;
        end else begin
          have_addr <= 1'b0;
          case (addr_q)
            REG_THRESHOLD: cfg.threshold      <= rx_data;
            REG_DELAY:     cfg.delay          <= rx_data;
            REG_TIMEBIN:   cfg.timebin        <= rx_data;
            REG_CHANNEL:   cfg.channel        <= channel_e'(rx_data[0]);
            REG_NEV_LO:    cfg.n_events[7:0]  <= rx_data;
            REG_NEV_HI:    cfg.n_events[15:8] <= rx_data;
            REG_CONTROL: begin
              run_cmd  <= rx_data[0];
              stop_cmd <= !rx_data[0];
            end
            default: ;  // unknown register: ignored
          endcase
        end
      end
    end
  end

  // ---------------- event sender ----------------
  typedef enum logic [2:0] {T_IDLE, T_MARK, T_FETCH, T_SEND, T_REL} tstate_e;
  tstate_e    tstate;
  logic [7:0] tx_data;
  logic       tx_valid, tx_ready;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .tx_data, .tx_valid, .tx_ready, .txd
  );

  always_comb begin
    tx_valid = (tstate == T_MARK) || (tstate == T_SEND);
    tx_data  = (tstate == T_MARK) ? EVENT_MARKER : rd_data;
  end

  assign release_evt = (tstate == T_REL);
  assign run_done    = (tstate == T_REL) && (cfg.n_events != 16'd0)
                       && (events_sent + 16'd1 >= cfg.n_events);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tstate      <= T_IDLE;
      rd_addr     <= '0;
      running     <= 1'b0;
      events_sent <= '0;
    end else begin
      if (run_cmd) begin
        running     <= 1'b1;
        events_sent <= '0;
      end else if (stop_cmd || run_done) begin
        running <= 1'b0;
      end
      unique case (tstate)
        T_IDLE:  if (evt_full) tstate <= T_MARK;
        T_MARK:  if (tx_ready) begin
          rd_addr <= '0;
          tstate  <= T_FETCH;
        end
        T_FETCH: tstate <= T_SEND;
        T_SEND:  if (tx_ready) begin
          if (rd_addr == IW'(NSAMP - 1)) tstate <= T_REL;
          else begin
            rd_addr <= rd_addr + 1'b1;
            tstate  <= T_FETCH;
          end
        end
        T_REL: begin
          tstate <= T_IDLE;
          if (!run_cmd) events_sent <= events_sent + 16'd1;
        end
        default: tstate <= T_IDLE;
      endcase
    end
  end

  // Handshake with the execute unit: an event is released only while one
  // is stored, and the buffer is read only while it holds an event.
  a_release_full: assert property (@(posedge clk) disable iff (rst)
                                   release_evt |-> evt_full);
  a_read_full:    assert property (@(posedge clk) disable iff (rst)
                                   (tstate == T_SEND) |-> evt_full);

endmodule
