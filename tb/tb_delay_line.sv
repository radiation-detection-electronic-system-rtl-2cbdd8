// tb_delay_line: checks the programmable delay.
//
// Feeds a counting stream (block n carries n) and checks that the output in
// every cycle is the input of 1+delay cycles before, for delays 0, 1, 7,
// 100 and DEPTH-1, including the switch from one delay to another (checked
// once the new tap has valid history).
`timescale 1ns/1ps
module tb_delay_line;
  import daq_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic       clk = 1'b0, rst = 1'b0;
  fadc_word_t din = '0, dout;
  logic [7:0] delay = '0;
  int         checks = 0, failures = 0;
  int         cyc = 0;

  delay_line #(.DEPTH(DEPTH)) dut (.clk, .rst, .din, .delay, .dout);

  always #4 clk = ~clk;

  initial begin
    int delays [5] = '{0, 1, 7, 100, DEPTH - 1};
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    foreach (delays[d]) begin
      delay = 8'(delays[d]);
      for (int n = 0; n < 2 * DEPTH + 20; n++) begin
        din = fadc_word_t'(cyc);
        @(posedge clk);
        #1;
        // After DEPTH cycles with the new delay the history is valid.
        if (n > DEPTH + 2) begin
          checks++;
          if (dout !== fadc_word_t'(cyc - delays[d])) begin
            failures++;
            if (failures < 6) $display("FAIL delay %0d: got %0d expected %0d", delays[d], dout, cyc - delays[d]);
          end
        end
        cyc++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
