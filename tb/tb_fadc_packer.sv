// tb_fadc_packer: checks the FADC board's block packing.
//
// Drives known sample sequences (channel A = 3*i+1, channel B = 255-i) at
// 250 MHz and samples the output on every rising edge of the forwarded
// data clock. Checks: dclk runs at half the conversion clock (8 ns period
// with a 4 ns conversion clock), every block holds two consecutive samples
// of each channel in the order A1 B1 A2 B2, and consecutive blocks advance
// by exactly two samples (no sample lost or repeated).
`timescale 1ns/1ps
module tb_fadc_packer;
  import daq_pkg::*;

  logic       clk_adc = 1'b0, rst = 1'b0;
  sample_t    adc_a = '0, adc_b = '0;
  logic       dclk;
  fadc_word_t data;
  int         checks = 0, failures = 0;
  int         i = 0;

  fadc_packer dut (.clk_adc, .rst, .adc_a, .adc_b, .dclk, .data);

  always #2 clk_adc = ~clk_adc;

  always @(negedge clk_adc) begin
    adc_a = sample_t'(3 * i + 1);
    adc_b = sample_t'(255 - i);
    i++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int      first, n;
    realtime t_prev;
    #1 rst = 1'b1;
    repeat (4) @(posedge clk_adc);
    rst = 1'b0;
    repeat (3) @(posedge dclk);
    t_prev = $realtime;
    first  = -1;
    for (n = 0; n < 200; n++) begin
      int k;
      @(posedge dclk);
      check($realtime - t_prev == 8.0, "dclk period 8 ns");
      t_prev = $realtime;
      // Recover the sample index of A1 from channel B (255-i, mod 256).
      k = (255 - int'(data.b1)) & 8'hFF;
      check(data.a1 == sample_t'(3 * k + 1), "A1 and B1 from the same sample");
      check(data.a2 == sample_t'(3 * (k + 1) + 1), "A2 follows A1");
      check(data.b2 == sample_t'(255 - (k + 1)), "B2 follows B1");
      if (first >= 0)
        check(((k - first) & 8'hFF) == ((2 * n) & 8'hFF), "blocks advance by two samples");
      else first = k;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
