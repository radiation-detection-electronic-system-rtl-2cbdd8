// fadc_packer: the FADC board's data rearrangement.
//
// The board converts two analog channels at 250 MS/s (one 8-bit sample every
// 4 ns per channel) and hands the data to the interface board as one 32-bit
// block every 8 ns, together with a 125 MHz clock. A block carries two
// consecutive samples of each channel in the order A1, B1, A2, B2.
//
// How it works: a phase bit toggles on every 250 MHz edge. On phase 0 the
// samples A1/B1 are held; on phase 1 they are combined with A2/B2 into the
// output block. The forwarded data clock dclk is the inverse of the phase bit,
// so dclk rises on the 250 MHz edges where the block does NOT change: the
// block is stable for one full 4 ns period on each side of a dclk rising
// edge, and a receiver clocked by dclk sees each block exactly once.
//
// Interface: clk_adc/rst in, adc_a/adc_b one sample per clk_adc; dclk and
// data out. Latency from the A2/B2 sample to the block: one clk_adc edge; the
// block is sampled by the next rising dclk edge.
//
// Taken from the original system: 250 MHz conversion, two channels, 32-bit blocks at
// 125 MHz, the order A1 B1 A2 B2. This design's choices: the byte placement
// (A1 most significant), the clock forwarding by a register, and reset.
module fadc_packer
  import daq_pkg::*;
(
  input  logic       clk_adc,  // 250 MHz conversion clock
  input  logic       rst,      // asynchronous, active high
  input  sample_t    adc_a,    // channel A sample of this clk_adc period
  input  sample_t    adc_b,    // channel B sample of this clk_adc period
  output logic       dclk,     // 125 MHz data clock to the interface board
  output fadc_word_t data      // data block, changes when dclk falls
);

  logic    phase;
  sample_t a1_q, b1_q;

  always_ff @(posedge clk_adc or posedge rst) begin
    if (rst) begin
      phase <= 1'b0;
      dclk  <= 1'b0;
      a1_q  <= '0;
      b1_q  <= '0;
      data  <= '0;
    end else begin
      phase <= ~phase;
      dclk  <= ~phase;
      if (!phase) begin
        a1_q <= adc_a;
        b1_q <= adc_b;
      end else begin
        data <= '{a1: a1_q, b1: b1_q, a2: adc_a, b2: adc_b};
      end
    end
  end

endmodule
