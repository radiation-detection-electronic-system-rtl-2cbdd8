// uart_tx: RS-232 transmitter, 8 data bits, no parity, one stop bit (8N1).
//
// A byte offered with tx_valid while tx_ready is high is taken in that cycle
// and sent LSB first as: start bit (0), 8 data bits, stop bit (1). Every bit
// lasts DIV = round(CLK_HZ/BAUD) clock cycles, so one byte occupies the line
// for 10*DIV cycles; tx_ready is high again in the last cycle of the stop
// bit, so a waiting byte starts right after it. The line idles high.
//
// Taken from the original system: RS-232 at 115200 bps from the interface board. This
// design's choices: the 8N1 frame and the valid/ready handshake.
module uart_tx #(
  parameter int unsigned CLK_HZ = 125_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       txd
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV);

  logic [CW-1:0] baud_cnt;
  logic [3:0]    bit_cnt;   // bits left in the frame, 0 = idle
  logic [8:0]    shreg;     // data and stop bits still to be sent, LSB first

  // The last bit period may overlap the acceptance of the next byte, so
  // back-to-back bytes follow each other every 10*DIV cycles exactly.
  assign tx_ready = (bit_cnt == 4'd0) || (bit_cnt == 4'd1 && baud_cnt == '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      baud_cnt <= '0;
      bit_cnt  <= '0;
      shreg    <= '1;
      txd      <= 1'b1;
    end else if (tx_valid && tx_ready) begin
      shreg    <= {1'b1, tx_data};
      txd      <= 1'b0;
      bit_cnt  <= 4'd10;
      baud_cnt <= CW'(DIV - 1);
    end else if (bit_cnt == 4'd0) begin
      txd <= 1'b1;
    end else if (baud_cnt != '0) begin
      baud_cnt <= baud_cnt - 1'b1;
    end else begin
      // End of a bit period: move to the next bit of the frame (the stop
      // bit is followed by the idle level, also 1).
      shreg    <= {1'b1, shreg[8:1]};
      bit_cnt  <= bit_cnt - 1'b1;
      baud_cnt <= CW'(DIV - 1);
      txd      <= shreg[0];
    end
  end

endmodule
