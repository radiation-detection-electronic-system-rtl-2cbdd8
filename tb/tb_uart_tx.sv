// tb_uart_tx: checks the RS-232 transmitter at 115200 baud from 125 MHz.
//
// Offers 12 random bytes back to back through the valid/ready handshake and
// decodes the line by sampling in the middle of each bit, counted in clock
// cycles. Checks the start bit, the eight data bits LSB first, the stop bit,
// and that consecutive frames start exactly 10*DIV cycles apart (DIV = 1085
// cycles per bit), i.e. the link runs at the full byte rate.
`timescale 1ns/1ps
module tb_uart_tx;

  localparam int unsigned CLK_HZ = 125_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int          DIV    = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int          NB     = 12;

  logic       clk = 1'b0, rst = 1'b0;
  logic [7:0] tx_data = '0;
  logic       tx_valid = 1'b0, tx_ready, txd;
  int         checks = 0, failures = 0;
  logic [7:0] sent [NB];
  longint     cyc = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .tx_data, .tx_valid, .tx_ready, .txd);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Producer: hand over the bytes as fast as the transmitter takes them.
  initial begin
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < NB; i++) begin
      sent[i]  = 8'($urandom);
      tx_data  = sent[i];
      tx_valid = 1'b1;
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      @(negedge clk);
      tx_valid = 1'b0;
    end
  end

  // Line decoder.
  initial begin
    longint start_cyc, prev_start;
    logic [7:0] b;
    prev_start = -1;
    @(negedge rst);
    check(txd == 1'b1, "line idles high");
    for (int i = 0; i < NB; i++) begin
      @(negedge txd);
      @(posedge clk);
      start_cyc = cyc;
      repeat (DIV / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      check(b == sent[i], $sformatf("byte %0d: got %02x sent %02x", i, b, sent[i]));
      if (prev_start >= 0)
        check(start_cyc - prev_start == 10 * DIV,
              $sformatf("frame spacing %0d cycles, expected %0d", start_cyc - prev_start, 10 * DIV));
      prev_start = start_cyc;
    end
    repeat (DIV) @(posedge clk);
    check(txd == 1'b1 && tx_ready, "idle after the last byte");
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
