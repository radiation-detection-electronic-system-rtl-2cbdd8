// execute_unit: event recording with time renormalisation.
//
// A pulse can last microseconds, thousands of 4 ns samples, yet every event
// is stored in a fixed buffer of EVENT_WORDS 32-bit words, i.e.
// 4*EVENT_WORDS 8-bit samples of the selected channel. To fit a long pulse
// the unit keeps only one sample out of every `timebin` samples of the
// (delayed) stream, so the recorded window is 4*EVENT_WORDS*timebin*4 ns.
//
// How it works: in IDLE, a trigger while `arm` is high starts the recording
// in the same cycle, on the delayed block present in that cycle. The first
// sample kept is the one at the trigger's position in the block (trig_pos),
// so the window starts exactly 2*delay samples before the crossing sample.
// Each block brings two samples of the channel; a modulo-`timebin` counter
// decides, sample by sample, which are kept, so zero, one or two samples are
// written per cycle. Kept sample n goes to bank n[0] at address n>>1; the
// two banks let two consecutive samples be written in one cycle. When
// 4*EVENT_WORDS samples are stored the unit is FULL and ignores triggers
// until `release`.
//
// Interface: data/trig/trig_pos once per clk; `full` high while an event
// waits; rd_addr selects a byte (sample index) and rd_data returns it one
// cycle later. `capturing` is high while the window is being recorded.
//
// Taken from the original system: 128 32-bit words per pulse, keeping one datum after a
// user-set number of clocks. This design's choices: the unit of the time bin
// (one 4 ns sample; 0 acts as 1), the sample-exact start, the bank
// organisation of the buffer and the FULL/release handshake.
module execute_unit
  import daq_pkg::*;
#(
  parameter int unsigned EVENT_WORDS = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  fadc_word_t   data,       // delayed block
  input  logic         trig,
  input  logic         trig_pos,
  input  logic         arm,        // triggers are accepted only when high
  input  channel_e     channel,
  input  logic [7:0]   timebin,    // keep 1 sample out of timebin
  input  logic [$clog2(4*EVENT_WORDS)-1:0] rd_addr,
  output sample_t      rd_data,
  output logic         full,       // an event is stored and waits for readout
  output logic         capturing,
  input  logic         release_evt // readout done, arm again
);

  localparam int unsigned NSAMP = 4 * EVENT_WORDS;
  localparam int unsigned IW    = $clog2(NSAMP);
  localparam int unsigned BANK  = NSAMP / 2;
  localparam logic [IW:0]  NSAMP_V = (IW+1)'(NSAMP);

  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_FULL} state_e;
  state_e state;

  sample_t     bank0 [BANK];  // even sample indices
  sample_t     bank1 [BANK];  // odd sample indices
  logic [7:0]  cnt;           // position in the current time bin
  logic [IW:0] n;             // samples stored so far

  sample_t     s0, s1;
  logic        start, active, v0;
  logic [7:0]  bin_m1, cnt_in, cnt_mid, cnt_out;
  logic        take0, take1, wr0_ok, wr1_ok;
  logic [IW:0] n_in, idx0, idx1, n_out;
  logic        we_e, we_o;
  logic [IW-2:0] wa_e, wa_o;
  sample_t     wd_e, wd_o;

  function automatic logic [7:0] bin_next(logic [7:0] c, logic [7:0] last);
    return (c >= last) ? 8'd0 : c + 8'd1;
  endfunction

  always_comb begin
    {s0, s1} = channel_pair(data, channel);
    bin_m1   = (timebin == 8'd0) ? 8'd0 : timebin - 8'd1;
    start    = (state == S_IDLE) && arm && trig;
    active   = start || (state == S_CAPTURE);
    v0       = active && !(start && trig_pos);
    cnt_in   = start ? 8'd0 : cnt;
    n_in     = start ? '0 : n;

    take0    = v0 && (cnt_in == 8'd0);
    cnt_mid  = v0 ? bin_next(cnt_in, bin_m1) : cnt_in;
    take1    = active && (cnt_mid == 8'd0);
    cnt_out  = active ? bin_next(cnt_mid, bin_m1) : cnt_mid;

    idx0     = n_in;
    idx1     = n_in + {{IW{1'b0}}, take0};
    wr0_ok   = take0 && (idx0 < NSAMP_V);
    wr1_ok   = take1 && (idx1 < NSAMP_V);
    n_out    = idx1 + {{IW{1'b0}}, wr1_ok};

    // Bank write ports: at most one sample per bank per cycle.
    we_e = 1'b0; wa_e = '0; wd_e = s1;
    we_o = 1'b0; wa_o = '0; wd_o = s1;
    if (wr0_ok && !idx0[0]) begin we_e = 1'b1; wa_e = idx0[IW-1:1]; wd_e = s0; end
    if (wr0_ok &&  idx0[0]) begin we_o = 1'b1; wa_o = idx0[IW-1:1]; wd_o = s0; end
    if (wr1_ok && !idx1[0]) begin we_e = 1'b1; wa_e = idx1[IW-1:1]; wd_e = s1; end
    if (wr1_ok &&  idx1[0]) begin we_o = 1'b1; wa_o = idx1[IW-1:1]; wd_o = s1; end
  end

  always_ff @(posedge clk) begin
    if (we_e) bank0[wa_e] <= wd_e;
    if (we_o) bank1[wa_o] <= wd_o;
    rd_data <= rd_addr[0] ? bank1[rd_addr[IW-1:1]] : bank0[rd_addr[IW-1:1]];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      n     <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_CAPTURE: begin
          if (active) begin
            cnt   <= cnt_out;
            n     <= n_out;
            state <= (n_out >= NSAMP_V) ? S_FULL : S_CAPTURE;
          end
        end
        S_FULL: if (release_evt) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign full      = (state == S_FULL);
  assign capturing = (state == S_CAPTURE);

  // Never more than the event's samples, and the two samples of a cycle
  // always go to different banks.
  a_count: assert property (@(posedge clk) disable iff (rst) n <= NSAMP_V);
  a_banks: assert property (@(posedge clk) disable iff (rst)
                            (wr0_ok && wr1_ok) |-> (idx0[0] != idx1[0]));

endmodule
