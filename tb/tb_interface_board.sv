// tb_interface_board: checks trigger, delay, execute and bus controller
// working together on the interface board.
//
// Reduced size: 1 MHz data clock with 100 kbaud (10 cycles per bit), a
// 32-block delay line and 8-word (32-sample) events. Blocks are driven
// directly, two samples per channel per clock, from a signal function of
// the sample index (baseline 10 plus scheduled triangular pulses). The
// testbench writes the registers over the serial input as the host would
// and decodes the events on the serial output. Each event must be the
// signal at crossing - 2*delay + k*timebin; the busy and trig outputs are
// checked as well.
`timescale 1ns/1ps
module tb_interface_board;
  import daq_pkg::*;

  localparam int unsigned CLK_HZ = 1_000_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int          DIV    = 10;
  localparam int          NSAMP  = 32;

  logic        dclk = 1'b0, rst = 1'b0, rxd = 1'b1, txd, trig, busy, running;
  fadc_word_t  data = '0;
  logic [15:0] events_sent;
  int          checks = 0, failures = 0, trig_count = 0;

  interface_board #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .DELAY_DEPTH(32), .EVENT_WORDS(8)) dut (
    .dclk, .rst, .data, .rxd, .txd, .trig, .busy, .running, .events_sent
  );

  always #500 dclk = ~dclk;

  longint p_start [4];
  bit     p_ch    [4];
  int     n_p = 0;
  longint blk = 0;

  function automatic sample_t sig(bit ch, longint s);
    int v = 10;
    for (int p = 0; p < n_p; p++) begin
      longint d = s - p_start[p];
      if (p_ch[p] == ch && d >= 0 && d < 20) v += 8 * int'(d);
      else if (p_ch[p] == ch && d >= 20 && d < 60) v += 4 * int'(60 - d);
    end
    return sample_t'(v > 255 ? 255 : v);
  endfunction

  always @(negedge dclk) begin
    data = '{a1: sig(1'b0, 2 * blk), b1: sig(1'b1, 2 * blk),
             a2: sig(1'b0, 2 * blk + 1), b2: sig(1'b1, 2 * blk + 1)};
    blk  = blk + 1;
  end

  always @(posedge dclk) if (trig) trig_count++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(logic [7:0] b);
    @(negedge dclk) rxd = 1'b0;
    repeat (DIV) @(negedge dclk);
    for (int k = 0; k < 8; k++) begin rxd = b[k]; repeat (DIV) @(negedge dclk); end
    rxd = 1'b1;
    repeat (2 * DIV) @(negedge dclk);
  endtask

  task automatic write_reg(reg_addr_e a, logic [7:0] v);
    send_byte(a);
    send_byte(v);
  endtask

  task automatic event_test(bit ch, int thr, int dly, int bin, string name);
    longint c;
    logic [7:0] b;
    int tc;
    tc = trig_count;
    p_start[n_p] = 2 * blk + 40 + n_p;  // vary the crossing position
    p_ch[n_p] = ch;
    n_p++;
    c = -1;
    for (longint s = p_start[n_p-1]; s < p_start[n_p-1] + 30; s++)
      if (c < 0 && sig(ch, s) > thr && sig(ch, s - 1) <= thr) c = s;
    for (int i = 0; i <= NSAMP; i++) begin
      @(negedge txd);
      repeat (DIV / 2) @(posedge dclk);
      for (int k = 0; k < 8; k++) begin repeat (DIV) @(posedge dclk); b[k] = txd; end
      repeat (DIV) @(posedge dclk);
      if (i == 0) begin
        check(b == EVENT_MARKER, {name, ": marker"});
        check(trig_count == tc + 1, {name, ": one trigger"});
      end else begin
        check(b == sig(ch, c - 2 * dly + longint'(i - 1) * bin),
              $sformatf("%s: sample %0d got %0d expected %0d", name, i - 1, b,
                        sig(ch, c - 2 * dly + longint'(i - 1) * bin)));
      end
      if (i == 1) check(busy, {name, ": busy while sending"});
    end
    repeat (5) @(posedge dclk);
    check(!busy, {name, ": idle after sending"});
  endtask

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(posedge dclk);
    @(negedge dclk) rst = 1'b0;
    repeat (40) @(negedge dclk);
    write_reg(REG_THRESHOLD, 8'd50);
    write_reg(REG_DELAY,     8'd5);
    write_reg(REG_TIMEBIN,   8'd1);
    write_reg(REG_NEV_LO,    8'd0);
    write_reg(REG_CONTROL,   8'd1);
    check(running, "running");
    event_test(1'b0, 50, 5, 1, "A delay 5 bin 1");
    write_reg(REG_CHANNEL,   8'd1);
    write_reg(REG_DELAY,     8'd20);
    write_reg(REG_TIMEBIN,   8'd3);
    write_reg(REG_THRESHOLD, 8'd100);
    event_test(1'b1, 100, 20, 3, "B delay 20 bin 3");
    write_reg(REG_DELAY,     8'd0);
    write_reg(REG_TIMEBIN,   8'd2);
    event_test(1'b1, 100, 0, 2, "B delay 0 bin 2");
    check(events_sent == 16'd3, "three events counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
