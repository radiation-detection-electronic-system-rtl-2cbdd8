// uart_rx: RS-232 receiver, 8 data bits, no parity, one stop bit (8N1).
//
// The serial input is synchronised by two registers. A falling edge on the
// idle line starts a frame; the start bit is checked again at its middle
// (DIV/2 cycles later, so a glitch is ignored) and each following bit is
// sampled in its middle, DIV = round(CLK_HZ/BAUD) cycles apart. After the
// stop bit is sampled, rx_valid pulses for one cycle with the byte, or
// rx_err pulses instead if the stop bit was 0 (framing error).
//
// Taken from the original system: host instructions arrive over RS-232 at 115200 bps. This
// design's choices: the 8N1 frame and the mid-bit sampling.
module uart_rx #(
  parameter int unsigned CLK_HZ = 125_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_err
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e       state;
  logic [1:0]    sync;
  logic [CW-1:0] baud_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync     <= 2'b11;
      state    <= R_IDLE;
      baud_cnt <= '0;
      bit_idx  <= '0;
      shreg    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
    end else begin
      sync     <= {sync[0], rxd};
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      unique case (state)
        R_IDLE: if (!sync[1]) begin
          state    <= R_START;
          baud_cnt <= CW'(DIV / 2 - 1);
        end
        R_START: if (baud_cnt != '0) baud_cnt <= baud_cnt - 1'b1;
        else if (sync[1]) state <= R_IDLE;  // glitch, not a start bit
        else begin
          state    <= R_DATA;
          bit_idx  <= '0;
          baud_cnt <= CW'(DIV - 1);
        end
        R_DATA: if (baud_cnt != '0) baud_cnt <= baud_cnt - 1'b1;
        else begin
          shreg    <= {sync[1], shreg[7:1]};
          baud_cnt <= CW'(DIV - 1);
          if (bit_idx == 3'd7) state <= R_STOP;
          bit_idx  <= bit_idx + 1'b1;
        end
        R_STOP: if (baud_cnt != '0) baud_cnt <= baud_cnt - 1'b1;
        else begin
          state    <= R_IDLE;
          rx_data  <= shreg;
          rx_valid <= sync[1];
          rx_err   <= !sync[1];
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
