// tb_uart_rx: checks the RS-232 receiver at 115200 baud from 125 MHz.
//
// Sends random bytes as 8N1 frames, some with the bit period 2% short or
// long, and checks each is delivered once with rx_valid. Also checks that a
// frame with a 0 stop bit gives rx_err and no rx_valid, and that a low
// glitch shorter than half a bit is not taken for a start bit.
`timescale 1ns/1ps
module tb_uart_rx;

  localparam int unsigned CLK_HZ = 125_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int          DIV    = (CLK_HZ + BAUD / 2) / BAUD;

  logic       clk = 1'b0, rst = 1'b0, rxd = 1'b1;
  logic [7:0] rx_data;
  logic       rx_valid, rx_err;
  int         checks = 0, failures = 0;
  int         n_valid = 0, n_err = 0;
  logic [7:0] last_byte;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .rxd, .rx_data, .rx_valid, .rx_err);

  always #4 clk = ~clk;

  always @(posedge clk) begin
    if (rx_valid) begin n_valid++; last_byte = rx_data; end
    if (rx_err) n_err++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic frame(logic [7:0] b, logic stop, int bit_cycles);
    @(negedge clk) rxd = 1'b0;
    repeat (bit_cycles) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      rxd = b[k];
      repeat (bit_cycles) @(negedge clk);
    end
    rxd = stop;
    repeat (bit_cycles) @(negedge clk);
    rxd = 1'b1;
    repeat (bit_cycles) @(negedge clk);
  endtask

  initial begin
    int v0, e0;
    logic [7:0] b;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      int per;
      b   = 8'($urandom);
      per = (i % 3 == 0) ? DIV : (i % 3 == 1) ? DIV * 98 / 100 : DIV * 102 / 100;
      v0  = n_valid;
      frame(b, 1'b1, per);
      check(n_valid == v0 + 1 && last_byte == b, $sformatf("byte %02x at %0d cycles/bit", b, per));
    end
    // Framing error.
    v0 = n_valid; e0 = n_err;
    frame(8'h5A, 1'b0, DIV);
    check(n_valid == v0 && n_err == e0 + 1, "0 stop bit reported as framing error");
    // Glitch.
    v0 = n_valid; e0 = n_err;
    @(negedge clk) rxd = 1'b0;
    repeat (DIV / 4) @(negedge clk);
    rxd = 1'b1;
    repeat (12 * DIV) @(negedge clk);
    check(n_valid == v0 && n_err == e0, "short glitch ignored");
    // Still receiving after that.
    frame(8'hC3, 1'b1, DIV);
    check(n_valid == v0 + 1 && last_byte == 8'hC3, "byte after the glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
