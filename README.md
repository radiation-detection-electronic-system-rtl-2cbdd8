# Pulse-shape acquisition for radiation detectors: 250 MS/s FADC + FPGA trigger board

Most nuclear counting electronics keep only the height of each detector
pulse. This system keeps its **shape**: a detector (for example an HPGe
crystal behind an amplifier) feeds a flash ADC running at 250 MS/s, and an
FPGA watches the digitised stream, triggers on each pulse, records a
fixed-size window of it that starts *before* the trigger, and sends the
window to a PC over RS-232. From the stored shape the host can compute
area, peak, timing or anything else offline.

The RTL here covers the digital part of a two-board system:

```
 analog A, B ──► ADC chips ──► fadc_packer ──► 32-bit block every 8 ns, with dclk
                 (not RTL)     (FADC board)          │
                                          ┌──────────┴───────────┐
                                          ▼                      ▼
                                    trigger_unit            delay_line
                                          │ trig                 │ delayed blocks
                                          └──────► execute_unit ◄┘
                                                   512-sample buffer
                                                        │ bytes
                                                   bus_controller ◄──► RS-232 ◄──► PC
                                                   (settings registers for all units)
```

`fadc_daq_top` joins the two boards; `interface_board` is the interface
FPGA on its own (trigger, delay, execute, bus controller).

## The data block between the boards

Each channel is sampled every 4 ns with 8 bits. The FADC board combines two
consecutive samples of both channels into one 32-bit block and sends one
block every 8 ns together with a 125 MHz clock (`dclk`):

| bits  | 31:24 | 23:16 | 15:8 | 7:0 |
|-------|-------|-------|------|-----|
| field | A1    | B1    | A2   | B2  |

A1/B1 are the earlier samples, A2/B2 the ones 4 ns later (`daq_pkg::fadc_word_t`).
The order A1, B1, A2, B2 is the original board's; placing the first sample
in the top byte is this design's choice.

`fadc_packer` holds A1/B1 on one 250 MHz edge and builds the block on the
next. `dclk` is a register output that rises on the 250 MHz edges where the
block does *not* change, so the block is stable for 4 ns on either side of
every `dclk` rising edge. The whole interface board runs on `dclk`: there
is no clock-domain crossing inside it.

## Trigger, delay and where the recorded window starts

This is the part that needs the most care.

* **Trigger** (`trigger_unit`) looks at the two samples of the selected
  channel in each block, in time order, and fires on a *rising crossing*:
  a sample strictly above the level whose predecessor (possibly the last
  sample of the previous block) was at or below it. A pulse therefore
  gives exactly one trigger however long it stays above the level, and a
  pulse that never exceeds the level gives none. The output `trig` is
  registered (one cycle after the block), and `trig_pos` says which of the
  two samples crossed.
* **Delay** (`delay_line`) is a 256-block circular buffer. Its output in
  cycle *t* is the block that entered in cycle *t − 1 − delay*; delay 0
  bypasses the buffer but keeps the register.
* **Execute** (`execute_unit`) starts recording in the very cycle `trig`
  is high, on the delayed block present in that cycle, starting from the
  sample at `trig_pos`.

Because the trigger and the delay line each add exactly one register, the
delayed block seen with `trig` is the block that arrived `delay` blocks
before the triggering one. So with crossing sample index *c*, recorded
sample *k* is

```
    sample[c − 2·delay + k·timebin],   k = 0 … 511
```

i.e. the window starts exactly `2·delay` samples (`delay` × 8 ns) before
the crossing and every event is aligned on its trigger point to the
sample. The testbenches check this formula bit-exactly.

Triggers are ignored while an event is being recorded or is waiting to be
sent; the execute unit re-arms when the bus controller has handed the last
byte to the transmitter.

## Time renormalisation (the time bin)

A shaped pulse can last 10 µs or more, 2500+ samples, but every event is
stored in 128 words of 32 bits = **512 samples**. The execute unit keeps
one sample out of every `timebin` samples (a modulo counter that runs on
individual samples, so at `timebin` = 1 it keeps both samples of a block,
at 2 one of them, and so on). The recorded window is therefore

```
    512 × timebin × 4 ns      (2.05 µs at timebin 1, 10.24 µs at 5, 522 µs at 255)
```

`timebin` 0 acts as 1. The buffer is two 256×8 banks holding the even and
odd sample numbers, so two consecutive samples can be written in one
cycle; its capacity equals 128 × 32 bits. It is read one byte per address
with one cycle of latency.

## Host link

RS-232, 8 data bits, no parity, one stop bit, 115200 baud (1085 clocks of
125 MHz per bit). The original system ran at this rate; the frame format
and everything below are this design's choices.

**Instructions** are two bytes: register address, then value.

| addr | register | meaning | reset |
|------|----------|---------|-------|
| 0x01 | THRESHOLD | trigger level, 0–255 (strictly above fires) | 128 |
| 0x02 | DELAY | pre-trigger delay in 8 ns blocks, 0–255 | 16 |
| 0x03 | TIMEBIN | keep one sample in TIMEBIN (0 = 1) | 1 |
| 0x04 | CHANNEL | bit 0: 0 = A, 1 = B (trigger and recording) | A |
| 0x05 / 0x06 | NEV_LO / NEV_HI | events per run, 0 = until stopped | 1 |
| 0x07 | CONTROL | bit 0: 1 = start a run (clears the count), 0 = stop | stopped |

Unknown addresses are ignored. A byte with a framing error drops a
half-received instruction, so the pair alignment recovers. There is no
register read-back.

**Events** are sent as one marker byte `0xA5` followed by the 512 samples
in time order, back to back: 513 × 10 bits / 115200 = **44.5 ms per
event**, about 22 events/s. This serial link, not the trigger or the
recording (which takes at most 512 × 255 × 4 ns ≈ 0.5 ms), limits the
event rate. Change the settings only between events: they act
immediately, also on an event being recorded.

## Clocks and reset

* `clk_adc` 250 MHz feeds only `fadc_packer`; everything else runs on
  `dclk` (125 MHz).
* `rst` is asynchronous and active high everywhere. `dclk` stops while the
  packer is in reset, so the interface board is reset by the edge of `rst`
  alone; in simulation drive `rst` from 0 to 1 (do not start it at 1).
* The delay buffer and the event buffer are not reset; the first 256
  blocks after reset are not valid history.

## Parameters

| parameter | default | where | note |
|-----------|---------|-------|------|
| `CLK_HZ` | 125 000 000 | top, interface, bus, UARTs | data clock |
| `BAUD` | 115 200 | same | serial rate |
| `DELAY_DEPTH` | 256 | top, interface, delay | power of two; the DELAY register is 8 bits |
| `EVENT_WORDS` | 128 | top, interface, execute, bus | 32-bit words per event; samples = 4 × this |

## What is the original system and what is not

Taken from the original system: 8-bit samples at 250 MS/s on two
channels; 32-bit blocks A1 B1 A2 B2 at 125 MHz; the four processing steps
(trigger against a user level, delay so the leading edge is kept, fixed
128-word events thinned by a user-set interval, a bus controller that turns
host instructions into registers and sends data in RS-232 form); 115200
baud; the settings a user has (level 0–255, delay, time bin, number of
events).

This design's own choices: the trigger as a strict rising crossing with
sub-block position; the delay unit (8 ns blocks) and depth; the time bin in
4 ns samples; the sample-exact window start; the banked buffer; triggers
ignored while busy; the instruction format, register map, reset values,
event marker and end-of-run rule; the 8N1 frame; the byte order within a
block; the status outputs `trig`, `busy`, `running`, `events_sent`.

Known differences and limits:

* Only positive-going pulses trigger. Negative detector pulses must be
  inverted in the analog chain (the original measurements did so through
  the amplifier).
* One channel is recorded per event; the other is dropped.
* The original FPGA code was VHDL and configured over JTAG; nothing of the
  configuration path is modelled.

Not in the RTL: the flash ADC chips and the 50 Ω analog inputs (their
sample outputs are `adc_a`/`adc_b`), the RS-232 level shifters (the ports
are logic-level), the host PC program, the JTAG port and two unused
FireWire ports.

## Files

`rtl/`: `daq_pkg` (block type, register map, settings struct),
`fadc_packer`, `trigger_unit`, `delay_line`, `execute_unit`, `uart_rx`,
`uart_tx`, `bus_controller`, `interface_board`, `fadc_daq_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, each
ending with a line `TB_RESULT checks=N failures=M`.

* `tb_fadc_daq_top` runs the whole system at full size (all defaults):
  it is the detector (a sample-index function: baseline with a little
  noise plus scheduled triangular pulses) and the host (writes registers,
  decodes events). It records four events with different channel, delay
  (0, 16, 100, 200) and time bin (1, 2, 3, 5), compares every sample with
  the formula above, checks the byte spacing is exactly 10 bit times and
  the data clock period is 8 ns, and checks that pulses below the level,
  pulses on the other channel, triggers while busy and pulses after the
  run has ended or been stopped produce no event. About 180 ms of
  simulated time, 30 s of run time.
* `tb_workload_pulse_shapes`, also at full size, reproduces the two
  measurement situations the system is meant for: five detector-like
  pulses of heights 60 to 175 counts that must all line up on the same
  trigger point (sample 64 at delay 32), and a 10 µs bipolar pulse on a
  120-count baseline recorded whole with time bin 5 (10.24 µs window).
  About 40 s of run time.
* `tb_interface_board` and `tb_bus_controller` use a 1 MHz clock at
  100 kbaud and small events to run fast; the others run at the defaults
  or small sizes of their own module.

`execute_unit` and `bus_controller` carry concurrent assertions on the
buffer and the readout handshake (an event is released only while one is
stored; the two samples written in one cycle go to different banks);
build with `--assert` to check them.

Run one with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/daq_pkg.sv \
    tb/tb_fadc_daq_top.sv --top-module tb_fadc_daq_top
./obj_dir/Vtb_fadc_daq_top
```
