// tb_bus_controller: checks the host instruction decoding, the register
// values, the run control and the event framing of the bus controller.
//
// Run at a reduced size: 1 MHz clock and 100 kbaud (10 cycles per bit), and
// 4-word (16-sample) events. The testbench is the host on the serial lines
// and a model of the execute unit's buffer (registered read, sample k of
// event e = 13k + 7e mod 256). Checks: reset values; every register written
// through the serial link; an unknown address ignored; resynchronisation
// after a framing error; an event sent as marker + samples in order with
// bytes exactly 10 bit times apart; one release pulse per event; the run
// ending after n_events; and the stop instruction.
`timescale 1ns/1ps
module tb_bus_controller;
  import daq_pkg::*;

  localparam int unsigned CLK_HZ      = 1_000_000;
  localparam int unsigned BAUD        = 100_000;
  localparam int          DIV         = 10;
  localparam int unsigned EVENT_WORDS = 4;
  localparam int          NSAMP       = 4 * EVENT_WORDS;

  logic        clk = 1'b0, rst = 1'b0, rxd = 1'b1, txd;
  daq_cfg_t    cfg;
  logic        running, evt_full = 1'b0, release_evt;
  logic [15:0] events_sent;
  logic [3:0]  rd_addr;
  sample_t     rd_data;
  int          checks = 0, failures = 0;
  int          ev = 0, n_release = 0;
  longint      cyc = 0;

  bus_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .EVENT_WORDS(EVENT_WORDS)) dut (
    .clk, .rst, .rxd, .txd, .cfg, .running, .events_sent,
    .evt_full, .rd_addr, .rd_data, .release_evt
  );

  always #500 clk = ~clk;
  always @(posedge clk) begin
    cyc     <= cyc + 1;
    rd_data <= sample_t'((13 * int'(rd_addr) + 7 * ev) % 256);
    if (release_evt) n_release++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(logic [7:0] b, logic stop = 1'b1);
    @(negedge clk) rxd = 1'b0;
    repeat (DIV) @(negedge clk);
    for (int k = 0; k < 8; k++) begin rxd = b[k]; repeat (DIV) @(negedge clk); end
    rxd = stop;
    repeat (DIV) @(negedge clk);
    rxd = 1'b1;
    repeat (DIV) @(negedge clk);
  endtask

  task automatic write_reg(logic [7:0] a, logic [7:0] v);
    send_byte(a);
    send_byte(v);
    repeat (5) @(negedge clk);
  endtask

  // Receive one event from the serial line and compare it.
  task automatic get_event();
    logic [7:0] b;
    longint t0, t_prev;
    int r0;
    r0 = n_release;
    for (int i = 0; i <= NSAMP; i++) begin
      @(negedge txd);
      @(posedge clk);
      t0 = cyc;
      if (i > 0) check(t0 - t_prev == 10 * DIV, "bytes back to back");
      t_prev = t0;
      repeat (DIV / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin repeat (DIV) @(posedge clk); b[k] = txd; end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      if (i == 0) check(b == EVENT_MARKER, "event marker");
      else check(b == sample_t'((13 * (i - 1) + 7 * ev) % 256), $sformatf("event %0d byte %0d", ev, i));
    end
    repeat (3) @(posedge clk);
    check(n_release == r0 + 1, "one release per event");
  endtask

  task automatic give_event();
    @(negedge clk) evt_full = 1'b1;
    fork
      begin
        while (!release_evt) @(posedge clk);
        @(negedge clk) evt_full = 1'b0;
      end
      get_event();
    join
    ev++;
  endtask

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(cfg.threshold == 8'd128 && cfg.delay == 8'd16 && cfg.timebin == 8'd1 &&
          cfg.channel == CH_A && cfg.n_events == 16'd1 && !running, "reset values");
    check(txd == 1'b1, "line idle");

    write_reg(REG_THRESHOLD, 8'd77);  check(cfg.threshold == 8'd77, "threshold");
    write_reg(REG_DELAY, 8'd201);     check(cfg.delay == 8'd201, "delay");
    write_reg(REG_TIMEBIN, 8'd9);     check(cfg.timebin == 8'd9, "time bin");
    write_reg(REG_CHANNEL, 8'd1);     check(cfg.channel == CH_B, "channel");
    write_reg(REG_NEV_HI, 8'd1);
    write_reg(REG_NEV_LO, 8'd2);      check(cfg.n_events == 16'h0102, "n_events");
    write_reg(8'h3C, 8'd5);
    check(cfg.threshold == 8'd77 && cfg.delay == 8'd201 && cfg.timebin == 8'd9,
          "unknown address ignored");
    // Address byte, then a broken byte: the pair is dropped, the next one works.
    send_byte(REG_THRESHOLD);
    send_byte(8'd1, 1'b0);
    repeat (5) @(negedge clk);
    write_reg(REG_THRESHOLD, 8'd90);
    check(cfg.threshold == 8'd90, "resynchronised after a framing error");

    // Run of two events.
    write_reg(REG_NEV_HI, 8'd0);
    write_reg(REG_NEV_LO, 8'd2);
    write_reg(REG_CONTROL, 8'd1);
    check(running && events_sent == 16'd0, "run started");
    give_event();
    check(running && events_sent == 16'd1, "one event sent, run goes on");
    give_event();
    check(!running && events_sent == 16'd2, "run ended after n_events");

    // Continuous run and stop instruction.
    write_reg(REG_NEV_LO, 8'd0);
    write_reg(REG_CONTROL, 8'd1);
    check(running && events_sent == 16'd0, "second run started");
    give_event();
    check(running && events_sent == 16'd1, "continuous run goes on");
    write_reg(REG_CONTROL, 8'd0);
    check(!running, "stop instruction");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
