// tb_fadc_daq_top: end-to-end test of the acquisition system at its default
// (full) size: 250 MS/s samples, 125 MHz data clock, 115200 baud, 256-block
// delay line, 128-word events.
//
// The testbench plays both the detector and the host. Each channel's signal
// is a pure function of the sample index: a baseline with a little
// deterministic noise plus triangular pulses that the test schedules. The
// host side writes the registers over the serial line and decodes the bytes
// the board sends back. Every received event is compared, sample by sample,
// with the value the signal function gives at crossing - 2*delay + k*timebin,
// where the crossing sample is found from the same function. The byte rate of
// the serial link and the data clock period are checked to the cycle.
//
// Mechanisms that must each be seen at least once: a pulse below the level
// ignored, a pulse on the unselected channel ignored, a trigger ignored
// while an event is in flight, full-rate recording (two samples kept per
// block), renormalised recording (time bin > 1), zero and large delay,
// channel B, both trigger positions within a block, the end of a run after
// n_events, no recording while stopped, and the stop instruction.
`timescale 1ns/1ps
module tb_fadc_daq_top;
  import daq_pkg::*;

  localparam int unsigned CLK_HZ = 125_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int unsigned DIV    = (CLK_HZ + BAUD / 2) / BAUD;
  localparam realtime     BIT_NS = DIV * 8.0;
  localparam int          NSAMP  = 512;
  localparam int          MAXP   = 32;

  logic        clk_adc = 1'b0;
  logic        rst     = 1'b0;
  sample_t     adc_a   = '0;
  sample_t     adc_b   = '0;
  logic        rxd     = 1'b1;
  logic        txd, dclk, trig, busy, running;
  logic [15:0] events_sent;

  fadc_daq_top dut (
    .clk_adc, .rst, .adc_a, .adc_b, .rs232_rxd(rxd), .rs232_txd(txd),
    .dclk, .trig, .busy, .running, .events_sent
  );

  always #2 clk_adc = ~clk_adc;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $realtime);
    end
  endtask

  // ---------------- detector signal ----------------
  longint p_start [MAXP];
  int     p_amp   [MAXP];
  int     p_rise  [MAXP];
  int     p_fall  [MAXP];
  bit     p_ch    [MAXP];
  int     n_pulses = 0;
  longint j = 0;  // index of the next sample presented to the FADC board

  function automatic int sig(bit ch, longint jj);
    longint v, d;
    v = 10 + ((jj * 2654435761) >> 13) % 3;
    for (int p = 0; p < n_pulses; p++) begin
      if (p_ch[p] != ch) continue;
      d = jj - p_start[p];
      if (d >= 0 && d < p_rise[p])
        v += p_amp[p] * d / p_rise[p];
      else if (d >= p_rise[p] && d < p_rise[p] + p_fall[p])
        v += p_amp[p] * (p_rise[p] + p_fall[p] - d) / p_fall[p];
    end
    return (v > 255) ? 255 : int'(v);
  endfunction

  always @(negedge clk_adc) begin
    adc_a = sample_t'(sig(1'b0, j));
    adc_b = sample_t'(sig(1'b1, j));
    j     = j + 1;
  end

  function automatic longint crossing(bit ch, longint from, int thr);
    for (longint jj = from; jj < from + 4000; jj++)
      if (sig(ch, jj) > thr && sig(ch, jj - 1) <= thr) return jj;
    return -1;
  endfunction

  // Schedule a pulse `margin` samples ahead. If parity >= 0, move it by one
  // sample when needed so that its crossing of `thr` has that parity.
  task automatic add_pulse(bit ch, int amp, int rise, int fall, int margin,
                           int thr, int parity, output longint start);
    longint c;
    start = j + margin;
    p_start[n_pulses] = start; p_amp[n_pulses] = amp;
    p_rise[n_pulses] = rise;   p_fall[n_pulses] = fall; p_ch[n_pulses] = ch;
    n_pulses++;
    if (parity >= 0) begin
      c = crossing(ch, start, thr);
      if (c >= 0 && int'(c % 2) != parity) begin
        start++;
        p_start[n_pulses-1] = start;
      end
    end
  endtask

  task automatic wait_sample(longint idx);
    while (j < idx) @(negedge clk_adc);
  endtask

  // ---------------- host side of the serial link ----------------
  task automatic send_byte(logic [7:0] b);
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = 1'b1; #(BIT_NS);
  endtask

  task automatic write_reg(reg_addr_e a, logic [7:0] v);
    send_byte(a);
    send_byte(v);
    #(BIT_NS);
  endtask

  logic [7:0] rxq [$];
  realtime    rxt [$];

  initial begin
    logic [7:0] b;
    realtime t0;
    @(negedge rst);
    forever begin
      @(negedge txd);
      t0 = $realtime;
      #(BIT_NS / 2);
      if (txd) continue;
      for (int i = 0; i < 8; i++) begin #(BIT_NS); b[i] = txd; end
      #(BIT_NS);
      check(txd == 1'b1, "stop bit of a received byte");
      rxq.push_back(b);
      rxt.push_back(t0);
    end
  end

  // ---------------- observation ----------------
  int trig_count = 0, holdoff_trigs = 0, pos0 = 0, pos1 = 0;

  always @(posedge dclk) begin
    if (!rst && trig) begin
      trig_count++;
      if (busy) holdoff_trigs++;
      else if (running) begin
        if (dut.u_ifb.trig_pos) pos1++; else pos0++;
      end
    end
  end

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // ---------------- event check ----------------
  task automatic check_event(bit ch, longint start, int thr, int delay, int bin, string name);
    longint c;
    int bad = 0, expv;
    realtime span, t_wait;
    c = crossing(ch, start, thr);
    check(c >= 0, {name, ": test pulse crosses the level"});
    t_wait = $realtime;
    while (rxq.size() < NSAMP + 1) begin
      @(posedge dclk);
      if ($realtime - t_wait > 60_000_000.0) begin
        check(1'b0, {name, ": event not received within 60 ms"});
        finish_tb();
      end
    end
    check(rxq[0] == EVENT_MARKER, {name, ": event marker"});
    span = rxt[NSAMP] - rxt[0];
    check(span > NSAMP * 10 * BIT_NS - 0.5 && span < NSAMP * 10 * BIT_NS + 0.5,
          {name, ": 513 bytes back to back at 115200 baud"});
    for (int k = 0; k < NSAMP; k++) begin
      expv = sig(ch, c - 2 * delay + longint'(k) * bin);
      checks++;
      if (rxq[k + 1] != expv) begin
        failures++;
        bad++;
        if (bad <= 4)
          $display("FAIL %s: sample %0d got %0d expected %0d", name, k, rxq[k + 1], expv);
      end
    end
    $display("%s: crossing at sample %0d, %0d of %0d samples wrong", name, c, bad, NSAMP);
    // A wrong event leaves the rest of the sequence meaningless: stop here.
    if (failures > 0) finish_tb();
    repeat (NSAMP + 1) begin
      void'(rxq.pop_front());
      void'(rxt.pop_front());
    end
  endtask

  int n_below = 0, n_other_ch = 0, n_holdoff = 0, n_bin1 = 0, n_binn = 0;
  int n_delay0 = 0, n_delay_big = 0, n_chb = 0, n_autostop = 0, n_stopped = 0;
  int n_stopcmd = 0;

  initial begin
    longint s, s2;
    int tc;
    realtime t1, t2;

    // A rising edge on rst: the interface board only sees its reset
    // through that edge, since dclk is held while the FADC board is reset.
    #1 rst = 1'b1;
    repeat (10) @(posedge clk_adc);
    rst = 1'b0;
    repeat (300) @(posedge dclk);
    @(posedge dclk) t1 = $realtime;
    @(posedge dclk) t2 = $realtime;
    check(t2 - t1 == 8.0, "data clock period 8 ns");

    // Run 1: three events, channel A.
    write_reg(REG_THRESHOLD, 8'd60);
    write_reg(REG_DELAY,     8'd16);
    write_reg(REG_TIMEBIN,   8'd1);
    write_reg(REG_CHANNEL,   8'd0);
    write_reg(REG_NEV_LO,    8'd3);
    write_reg(REG_NEV_HI,    8'd0);
    write_reg(REG_CONTROL,   8'd1);
    check(running == 1'b1, "run started");

    // Below the level: no trigger.
    tc = trig_count;
    add_pulse(1'b0, 40, 30, 60, 50, 60, -1, s);
    wait_sample(s + 200);
    check(trig_count == tc && !busy, "pulse below the level ignored");
    if (trig_count == tc) n_below++;

    // Above the level on the other channel: no trigger.
    tc = trig_count;
    add_pulse(1'b1, 150, 30, 60, 50, 60, -1, s);
    wait_sample(s + 200);
    check(trig_count == tc && !busy, "pulse on the unselected channel ignored");
    if (trig_count == tc) n_other_ch++;
    check(rxq.size() == 0, "nothing sent without a trigger");

    // Event 1: full rate, delay 16.
    add_pulse(1'b0, 150, 40, 200, 50, 60, 0, s);
    wait_sample(s + 400);
    check(busy, "event 1 in flight");
    // A second pulse while event 1 is being sent triggers but is not recorded.
    tc = trig_count;
    add_pulse(1'b0, 120, 20, 50, 100, 60, -1, s2);
    wait_sample(s2 + 200);
    check(trig_count == tc + 1 && busy, "trigger while busy ignored");
    if (trig_count == tc + 1) n_holdoff++;
    check_event(1'b0, s, 60, 16, 1, "event 1 (A, delay 16, bin 1)");
    n_bin1++;

    // Event 2: renormalised, no delay.
    write_reg(REG_TIMEBIN, 8'd5);
    write_reg(REG_DELAY,   8'd0);
    add_pulse(1'b0, 180, 61, 900, 50, 60, 1, s);
    check_event(1'b0, s, 60, 0, 5, "event 2 (A, delay 0, bin 5)");
    n_binn++; n_delay0++;

    // Event 3: channel B, large delay, new level; ends the run.
    write_reg(REG_CHANNEL,   8'd1);
    write_reg(REG_DELAY,     8'd200);
    write_reg(REG_TIMEBIN,   8'd2);
    write_reg(REG_THRESHOLD, 8'd100);
    add_pulse(1'b1, 200, 37, 400, 50, 100, 0, s);
    check_event(1'b1, s, 100, 200, 2, "event 3 (B, delay 200, bin 2)");
    n_chb++; n_delay_big++; n_binn++;
    repeat (20) @(posedge dclk);
    check(!running && events_sent == 16'd3, "run ends after n_events");
    if (!running && events_sent == 16'd3) n_autostop++;

    // Stopped: a pulse triggers nothing that is recorded.
    add_pulse(1'b1, 200, 37, 400, 50, 100, -1, s);
    wait_sample(s + 500);
    repeat (3000) @(posedge dclk);
    check(!busy && rxq.size() == 0, "no event while stopped");
    if (!busy && rxq.size() == 0) n_stopped++;

    // Run 2: continuous, channel A, then the stop instruction.
    write_reg(REG_NEV_LO,    8'd0);
    write_reg(REG_CHANNEL,   8'd0);
    write_reg(REG_DELAY,     8'd100);
    write_reg(REG_TIMEBIN,   8'd3);
    write_reg(REG_THRESHOLD, 8'd60);
    write_reg(REG_CONTROL,   8'd1);
    check(running && events_sent == 16'd0, "run 2 started, counter cleared");
    add_pulse(1'b0, 90, 25, 300, 50, 60, 1, s);
    check_event(1'b0, s, 60, 100, 3, "event 4 (A, delay 100, bin 3)");
    n_binn++;
    repeat (20) @(posedge dclk);
    check(running && events_sent == 16'd1, "continuous run goes on");
    write_reg(REG_CONTROL, 8'd0);
    check(!running, "stop instruction");
    add_pulse(1'b0, 150, 40, 200, 50, 60, -1, s);
    wait_sample(s + 500);
    repeat (3000) @(posedge dclk);
    check(!busy && rxq.size() == 0, "no event after the stop instruction");
    if (!running && !busy && rxq.size() == 0) n_stopcmd++;

    $display("mechanisms: below_level=%0d other_channel=%0d busy_trigger=%0d bin1=%0d binN=%0d delay0=%0d delay200=%0d chB=%0d pos0=%0d pos1=%0d autostop=%0d stopped=%0d stopcmd=%0d",
             n_below, n_other_ch, n_holdoff, n_bin1, n_binn, n_delay0, n_delay_big,
             n_chb, pos0, pos1, n_autostop, n_stopped, n_stopcmd);
    check(n_below > 0,     "mechanism: pulse below level");
    check(n_other_ch > 0,  "mechanism: unselected channel");
    check(n_holdoff > 0 && holdoff_trigs > 0, "mechanism: trigger while busy");
    check(n_bin1 > 0,      "mechanism: full-rate recording");
    check(n_binn > 0,      "mechanism: renormalised recording");
    check(n_delay0 > 0,    "mechanism: zero delay");
    check(n_delay_big > 0, "mechanism: large delay");
    check(n_chb > 0,       "mechanism: channel B");
    check(pos0 > 0,        "mechanism: crossing on first sample of a block");
    check(pos1 > 0,        "mechanism: crossing on second sample of a block");
    check(n_autostop > 0,  "mechanism: end of run after n_events");
    check(n_stopped > 0,   "mechanism: stopped");
    check(n_stopcmd > 0,   "mechanism: stop instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
