// tb_trigger_unit: checks the level trigger against a reference model.
//
// A random stream of blocks (values drawn so that the signal wanders around
// the level) is fed to the unit. The reference walks the selected channel's
// samples in time order and marks every sample above the level whose
// predecessor was not; the unit must pulse trig one cycle after each such
// block, with trig_pos naming the crossing sample, and never otherwise.
// Covers both channels, several levels, and both crossing positions.
`timescale 1ns/1ps
module tb_trigger_unit;
  import daq_pkg::*;

  logic       clk = 1'b0, rst = 1'b0;
  fadc_word_t data = '0;
  sample_t    threshold = 8'd100;
  channel_e   channel = CH_A;
  logic       trig, trig_pos;
  int         checks = 0, failures = 0;
  int         n_pos0 = 0, n_pos1 = 0;

  trigger_unit dut (.clk, .rst, .data, .threshold, .channel, .trig, .trig_pos);

  always #4 clk = ~clk;

  function automatic sample_t rnd_sample(sample_t thr);
    int v = int'(thr) + int'($urandom_range(0, 40)) - 20;
    return sample_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  initial begin
    logic    ref_prev_above, exp_trig, exp_pos;
    sample_t s0, s1;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    ref_prev_above = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n % 1000 == 0) begin
        channel   = channel_e'(n / 1000 % 2);
        threshold = sample_t'(60 + 50 * (n / 1000));
        // Start each section from a sample clearly above the level so the
        // reference and the unit agree on the history.
      end
      data = '{a1: rnd_sample(threshold), b1: rnd_sample(threshold),
               a2: rnd_sample(threshold), b2: rnd_sample(threshold)};
      {s0, s1} = (channel == CH_B) ? {data.b1, data.b2} : {data.a1, data.a2};
      exp_trig = 1'b0;
      exp_pos  = 1'b0;
      if (s0 > threshold && !ref_prev_above) begin exp_trig = 1'b1; exp_pos = 1'b0; end
      else if (s1 > threshold && !(s0 > threshold)) begin exp_trig = 1'b1; exp_pos = 1'b1; end
      ref_prev_above = s1 > threshold;
      @(posedge clk);
      #1;
      checks++;
      if (trig !== exp_trig || (exp_trig && trig_pos !== exp_pos)) begin
        failures++;
        if (failures < 6) $display("FAIL block %0d: trig %0b/%0b pos %0b/%0b", n, trig, exp_trig, trig_pos, exp_pos);
      end
      if (exp_trig && exp_pos) n_pos1++;
      if (exp_trig && !exp_pos) n_pos0++;
    end
    checks++;
    if (n_pos0 == 0 || n_pos1 == 0) begin failures++; $display("FAIL coverage of trigger positions"); end
    $display("triggers at position 0: %0d, position 1: %0d", n_pos0, n_pos1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
