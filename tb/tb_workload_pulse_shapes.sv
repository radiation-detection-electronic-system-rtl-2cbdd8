// tb_workload_pulse_shapes: the measurement situations the system was built
// for, run on the full-size design (all defaults).
//
// Part 1, "same trigger point": a run of five unipolar detector-like pulses
// of different heights and widths (fast rise, slow tail, baseline about 6
// counts) recorded with level 40, delay 32 and full time resolution. In
// every event the first sample above the level must sit at position
// 2*delay = 64 with its predecessor at or below the level, so all events
// line up on the trigger point; each event must equal the input signal
// sample for sample.
//
// Part 2, "long pulse": a bipolar pulse of 10 us (2500 samples) on a
// baseline of 120 counts, positive lobe to about 185 and negative lobe to
// about 70, recorded with time bin 5 (window 10.24 us) and delay 100. The
// event must start and end on the baseline and contain both lobes.
`timescale 1ns/1ps
module tb_workload_pulse_shapes;
  import daq_pkg::*;

  localparam int unsigned DIV    = (125_000_000 + 115_200 / 2) / 115_200;
  localparam realtime     BIT_NS = DIV * 8.0;
  localparam int          NSAMP  = 512;

  logic        clk_adc = 1'b0, rst = 1'b0, rxd = 1'b1;
  sample_t     adc_a = '0, adc_b = '0;
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
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Signal on channel A: baseline plus the current pulse. kind 0: unipolar
  // (linear rise over `rise`, linear fall over `fall`); kind 1: bipolar
  // (positive lobe over the first 40%, negative lobe over the rest).
  int     base = 6, kind = 0, amp = 0, rise = 1, fall = 1, neg = 0;
  longint p0 = -1_000_000;
  longint j = 0;

  function automatic int sig(longint jj);
    longint d = jj - p0;
    int v = base + int'((jj * 40503) >> 7 & 1);
    if (kind == 0) begin
      if (d >= 0 && d < rise) v += amp * int'(d) / rise;
      else if (d >= rise && d < rise + fall) v += amp * (rise + fall - int'(d)) / fall;
    end else begin
      // lobes as triangles: up over rise, down over rise, then the
      // negative lobe over fall down and fall back up
      if (d >= 0 && d < rise) v += amp * int'(d) / rise;
      else if (d >= rise && d < 2 * rise) v += amp * (2 * rise - int'(d)) / rise;
      else if (d >= 2 * rise && d < 2 * rise + fall) v -= neg * (int'(d) - 2 * rise) / fall;
      else if (d >= 2 * rise + fall && d < 2 * rise + 2 * fall) v -= neg * (2 * rise + 2 * fall - int'(d)) / fall;
    end
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  always @(negedge clk_adc) begin
    adc_a = sample_t'(sig(j));
    j     = j + 1;
  end

  task automatic send_byte(logic [7:0] b);
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = 1'b1; #(2 * BIT_NS);
  endtask

  task automatic write_reg(reg_addr_e a, logic [7:0] v);
    send_byte(a);
    send_byte(v);
  endtask

  logic [7:0] rxq [$];

  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(negedge txd);
      #(BIT_NS / 2);
      if (txd) continue;
      for (int i = 0; i < 8; i++) begin #(BIT_NS); b[i] = txd; end
      #(BIT_NS);
      rxq.push_back(b);
    end
  end

  task automatic get_event(output logic [7:0] ev [NSAMP]);
    realtime t0 = $realtime;
    while (rxq.size() < NSAMP + 1) begin
      #1000;
      if ($realtime - t0 > 60_000_000.0) begin
        check(1'b0, "event not received within 60 ms");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    check(rxq.pop_front() == EVENT_MARKER, "event marker");
    for (int k = 0; k < NSAMP; k++) ev[k] = rxq.pop_front();
  endtask

  initial begin
    logic [7:0] ev [NSAMP];
    longint c;
    int amps [5] = '{60, 90, 120, 150, 175};
    int bad;
    #1 rst = 1'b1;
    repeat (10) @(posedge clk_adc);
    rst = 1'b0;
    repeat (400) @(posedge dclk);

    // Part 1.
    write_reg(REG_THRESHOLD, 8'd40);
    write_reg(REG_DELAY,     8'd32);
    write_reg(REG_TIMEBIN,   8'd1);
    write_reg(REG_NEV_LO,    8'd5);
    write_reg(REG_CONTROL,   8'd1);
    foreach (amps[i]) begin
      kind = 0; amp = amps[i]; rise = 20 + 5 * i; fall = 150 + 20 * i;
      p0 = j + 100;
      c = -1;
      for (longint s = p0; s < p0 + rise + 1 && c < 0; s++)
        if (sig(s) > 40 && sig(s - 1) <= 40) c = s;
      get_event(ev);
      check(ev[64] > 40 && ev[63] <= 40, $sformatf("pulse %0d (height %0d): trigger point at sample 64", i, amps[i]));
      bad = 0;
      for (int k = 0; k < NSAMP; k++) if (ev[k] != sig(c - 64 + k)) bad++;
      check(bad == 0, $sformatf("pulse %0d: %0d samples differ from the input", i, bad));
      $display("pulse %0d: height %0d, peak recorded %0d, trigger point at sample 64", i, amps[i], ev[64 + rise]);
    end
    repeat (20) @(posedge dclk);
    check(!running && events_sent == 16'd5, "run of 5 events completed");

    // Part 2.
    base = 120; kind = 1; amp = 65; neg = 50; rise = 500; fall = 750;  // 2*500 + 2*750 = 2500 samples
    repeat (20000) @(posedge dclk);  // let the delay line fill with the new baseline
    write_reg(REG_THRESHOLD, 8'd140);
    write_reg(REG_DELAY,     8'd100);
    write_reg(REG_TIMEBIN,   8'd5);
    write_reg(REG_NEV_LO,    8'd1);
    write_reg(REG_CONTROL,   8'd1);
    p0 = j + 100;
    c = -1;
    for (longint s = p0; s < p0 + rise && c < 0; s++)
      if (sig(s) > 140 && sig(s - 1) <= 140) c = s;
    get_event(ev);
    begin
      int mx = 0, mn = 255, imx = 0, imn = 0;
      for (int k = 0; k < NSAMP; k++) begin
        if (ev[k] > mx) begin mx = ev[k]; imx = k; end
        if (ev[k] < mn) begin mn = ev[k]; imn = k; end
      end
      $display("long pulse: first %0d last %0d max %0d at %0d min %0d at %0d", ev[0], ev[NSAMP-1], mx, imx, mn, imn);
      check(ev[0] >= 119 && ev[0] <= 121, "long pulse: window starts on the baseline");
      check(ev[NSAMP-1] >= 119 && ev[NSAMP-1] <= 121, "long pulse: window ends back on the baseline");
      check(mx >= 183 && imx < imn, "long pulse: positive lobe recorded first");
      check(mn <= 72, "long pulse: negative lobe recorded");
      bad = 0;
      for (int k = 0; k < NSAMP; k++) if (ev[k] != sig(c - 200 + 5 * k)) bad++;
      check(bad == 0, $sformatf("long pulse: %0d samples differ from the input", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
