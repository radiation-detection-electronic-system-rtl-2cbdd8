// delay_line: programmable delay of the data stream.
//
// The trigger acts on the undelayed stream, while the execute unit records
// the delayed one. Delaying the data by D blocks means the recording starts
// D blocks (2*D samples per channel) before the block that fired the
// trigger, so the leading part of the pulse is kept.
//
// How it works: a circular buffer of DEPTH blocks is written every cycle; the
// output register reads the entry written `delay` cycles earlier. A delay of
// 0 bypasses the buffer. Every path goes through the output register, so
// dout in cycle t equals din in cycle t-1-delay.
//
// Interface: one block per clk in and out, delay is taken modulo DEPTH and
// may change at any time (the output then jumps to the new tap).
//
// Taken from the original system: the block's only function, to delay the data before the
// execute unit so the full pulse shape is recorded. This design's choices:
// the buffer depth, the unit of the delay (one 8 ns block) and the fixed
// extra cycle.
module delay_line
  import daq_pkg::*;
#(
  parameter int unsigned DEPTH = 256  // blocks; a power of two
) (
  input  logic                     clk,
  input  logic                     rst,
  input  fadc_word_t               din,
  input  logic [$clog2(DEPTH)-1:0] delay,
  output fadc_word_t               dout
);

  localparam int unsigned AW = $clog2(DEPTH);

  fadc_word_t    mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] rd_ptr;

  assign rd_ptr = wr_ptr - delay;

  always_ff @(posedge clk) begin
    mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr <= '0;
      dout   <= '0;
    end else begin
      wr_ptr <= wr_ptr + 1'b1;
      dout   <= (delay == '0) ? din : mem[rd_ptr];
    end
  end

endmodule
