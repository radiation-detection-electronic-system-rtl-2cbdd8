// trigger_unit: level trigger on the selected channel.
//
// The two samples of the selected channel in each data block are compared
// with the user's level. A trigger is a rising crossing: a sample above the
// level whose predecessor (the previous sample in time, possibly the last
// one of the previous block) was at or below it. So a pulse gives one
// trigger on its leading edge however long it stays above the level, and a
// pulse that never gets above the level gives none.
//
// Interface: one data block per clk. trig is a one-cycle pulse, registered,
// so it is high in the cycle after the block that held the crossing;
// trig_pos tells which sample of that block crossed (0 = the earlier one).
// If both samples of a block cross (impossible for a single crossing) the
// earlier one wins.
//
// Taken from the original system: compare data with the user level, send one logic signal
// when the pulse goes higher than the level. This design's choices: "higher"
// is strictly greater, the edge detection, the sub-block position output,
// and starting in the "above" state after reset so that no trigger fires
// until the signal has been at or below the level once.
module trigger_unit
  import daq_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  fadc_word_t data,       // block from the FADC board
  input  sample_t    threshold,  // trigger level
  input  channel_e   channel,    // channel to watch
  output logic       trig,       // one-cycle trigger pulse
  output logic       trig_pos    // sample of the block that crossed
);

  sample_t s0, s1;
  logic    above0, above1, prev_above;
  logic    cross0, cross1;

  always_comb begin
    {s0, s1} = channel_pair(data, channel);
    above0   = s0 > threshold;
    above1   = s1 > threshold;
    cross0   = above0 && !prev_above;
    cross1   = above1 && !above0;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev_above <= 1'b1;
      trig       <= 1'b0;
      trig_pos   <= 1'b0;
    end else begin
      prev_above <= above1;
      trig       <= cross0 || cross1;
      trig_pos   <= !cross0;
    end
  end

endmodule
