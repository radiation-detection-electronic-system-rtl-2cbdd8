// tb_execute_unit: checks event recording and time renormalisation.
//
// The delayed stream is a counting pattern: sample s of channel A is
// s mod 251, of channel B (3s+5) mod 256, two samples per block. For several
// (channel, time bin, trigger position) cases a trigger is given and the
// buffer is then read back byte by byte; sample k must equal the pattern at
// s0 + k*timebin, s0 being the trigger sample. Also checked: the number of
// cycles from trigger to `full` (exactly the blocks needed to span the
// window), triggers ignored while not armed, while recording and while
// full, and re-arming by release_evt.
`timescale 1ns/1ps
module tb_execute_unit;
  import daq_pkg::*;

  localparam int unsigned EVENT_WORDS = 128;
  localparam int          NSAMP = 4 * EVENT_WORDS;

  logic       clk = 1'b0, rst = 1'b0;
  fadc_word_t data;
  logic       trig = 1'b0, trig_pos = 1'b0, arm = 1'b0, release_evt = 1'b0;
  channel_e   channel = CH_A;
  logic [7:0] timebin = 8'd1;
  logic [8:0] rd_addr = '0;
  sample_t    rd_data;
  logic       full, capturing;
  int         checks = 0, failures = 0;
  int         blk = 0;  // index of the block on `data`

  execute_unit #(.EVENT_WORDS(EVENT_WORDS)) dut (
    .clk, .rst, .data, .trig, .trig_pos, .arm, .channel, .timebin,
    .rd_addr, .rd_data, .full, .capturing, .release_evt
  );

  always #4 clk = ~clk;

  function automatic sample_t pat(channel_e ch, int s);
    return (ch == CH_B) ? sample_t'((3 * s + 5) % 256) : sample_t'(s % 251);
  endfunction

  always_comb
    data = '{a1: pat(CH_A, 2 * blk), b1: pat(CH_B, 2 * blk),
             a2: pat(CH_A, 2 * blk + 1), b2: pat(CH_B, 2 * blk + 1)};

  always @(posedge clk) blk <= blk + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_case(channel_e ch, int bin, bit pos);
    int s0, cyc, expect_cyc, bad;
    @(negedge clk);
    channel  = ch;
    timebin  = 8'(bin);
    arm      = 1'b1;
    trig     = 1'b1;
    trig_pos = pos;
    s0       = 2 * blk + int'(pos);
    cyc      = 0;
    @(posedge clk);
    cyc++;
    @(negedge clk);
    trig = 1'b0;
    // A trigger in the middle of the recording must not restart it.
    while (!full) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
      trig = (cyc == 10);
    end
    trig = 1'b0;
    expect_cyc = (int'(pos) + 1 + (NSAMP - 1) * ((bin == 0) ? 1 : bin) + 1) / 2;
    check(cyc == expect_cyc, $sformatf("bin %0d pos %0d: %0d blocks to fill, expected %0d", bin, pos, cyc, expect_cyc));
    // A trigger while full is ignored.
    trig = 1'b1;
    @(negedge clk);
    trig = 1'b0;
    check(full, "still full after a trigger");
    bad = 0;
    for (int k = 0; k < NSAMP; k++) begin
      rd_addr = 9'(k);
      @(negedge clk);
      checks++;
      if (rd_data != pat(ch, s0 + k * ((bin == 0) ? 1 : bin))) begin
        failures++;
        bad++;
        if (bad < 4) $display("FAIL bin %0d pos %0d ch %0d sample %0d: got %0d expected %0d",
                              bin, pos, ch, k, rd_data, pat(ch, s0 + k * bin));
      end
    end
    release_evt = 1'b1;
    @(negedge clk);
    release_evt = 1'b0;
    check(!full && !capturing, "idle after release");
  endtask

  initial begin
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Not armed: a trigger does nothing.
    trig = 1'b1;
    @(negedge clk);
    trig = 1'b0;
    repeat (3) @(negedge clk);
    check(!capturing && !full, "trigger ignored when not armed");
    run_case(CH_A, 1, 1'b0);
    run_case(CH_A, 1, 1'b1);
    run_case(CH_B, 2, 1'b1);
    run_case(CH_B, 3, 1'b0);
    run_case(CH_A, 7, 1'b1);
    run_case(CH_A, 0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
