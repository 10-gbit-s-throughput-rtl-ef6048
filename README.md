# STM-64 alignment and resorting core: 10 Gbit/s on a 16-bit, 622 MHz datapath

An STM-64 signal in the Synchronous Digital Hierarchy (SDH) carries about
10 Gbit/s: 9953.28 Mbit/s, which is 64 STM-1 signals interleaved byte by byte.
A regenerator has to process all of this traffic. This core does it in plain
synchronous logic by taking **two bytes per clock at 622.08 MHz**. The input is
16 parallel lines from a 1:16 demultiplexer. The core has three jobs:

1. **Byte alignment.** The demultiplexer does not know where bytes begin, so a
   byte can start at any of the 16 bit positions of an input word. The core
   finds the right bit offset and shifts the stream to it.
2. **Frame alignment.** It finds the SDH frame boundary, locks onto it and
   watches it frame by frame.
3. **Byte to bit-stream resorting.** It spreads each group of 16 bytes over
   16 serial output lines. Each line then carries an "STM-4-like" signal of
   622 Mbit/s: four of the 64 interleaved STM-1s, with no proper STM-4
   overhead.

The design follows a cell-column architecture. The datapath is exactly 16
cells high, one cell per data line. Each function is a few columns of
flip-flops. Every flip-flop has only a very small piece of logic in front of
it: a 2:1 mux, a 4-bit compare or a 2-input AND. Data flows strictly left to
right. Functions that work in parallel sit side by side as interleaved
columns. The RTL keeps this style in the datapath blocks: each one is a short
pipeline with a register after each shallow logic level.

## Signal flow

```
            +----------------+   aligned[15:0]   +---------------+   ser_out[15:0]
 din[15:0] -+-> byte_shifter -+------------------>| byte_resorter |-----------------> 16 x 622 Mbit/s
            |  (5 clk)        ^          +------->|  (8 clk)      |-----------------> ser_sync
            |                 | offset   | sync   +---------------+
            +-> frame_pattern_detector --+--> frame_aligner --> frame_pulse, in_frame,
                (5 clk, 16 offsets)  hit[15:0]                  align_offset, align_state
```

`byte_shifter` and `frame_pattern_detector` both read the raw input and have
the same latency of 5 clocks. Suppose the detector reports the pattern at
offset k in some clock. Then in that same clock, a shifter running at offset
k outputs the word that holds the first two A2 bytes. Because the latencies
match, `frame_aligner` needs no compensation delays. Its `frame_pulse` lines
up with the `aligned` word stream, and it drives the resorter's group start
directly.

| Path | Latency |
|---|---|
| `din` word → `aligned` word that it completes | 5 clocks (input window register + 4 shift stages) |
| `din` word → `hit` for that word | 5 clocks (window, nibble compare, 3 AND levels) |
| first `aligned` word of a 16-byte group → MSBs of the group on `ser_out` | 8 clocks |
| → LSBs | 15 clocks |
| first framing pattern seen → `in_frame` | one frame (77760 clocks) plus one clock |

Throughput is one 16-bit word per clock in every block, with no stall or
back-pressure anywhere. The design has one clock and an asynchronous
active-low reset.

## Bit order and byte alignment (`byte_shifter`)

The serial stream enters MSB first: `din[15]` is the earliest bit of a word.
Let `{prev, cur}` be two consecutive input words. The aligned word for offset
k is then `{prev, cur}[31-k -: 16]`, so offset k means "bytes start k bits
into the word". After alignment the earlier byte is in `aligned[15:8]`.

The shifter is a logarithmic barrel shifter. Stage s shifts the 32-bit window
left by 2^s bits when offset bit s is set. A register follows each of the four
stages. The offset travels down the pipeline with its own data, so a change of
offset never splits a word between two offsets.

## Frame alignment (`frame_pattern_detector`, `frame_aligner`)

An STM-64 frame is 9 × 270 × 64 = 155520 bytes (125 µs), i.e. 77760 words.
It starts with 192 A1 bytes (0xF6) followed by 192 A2 bytes (0x28). The
detector looks for the 32-bit boundary `F6 F6 28 28` at all 16 offsets at
once, using a window of three input words. It compares nibble by nibble, then
combines the results in three registered levels of 2-input ANDs. `hit[k]`
means: with offset k, the current aligned word is the first A2A2 word. The
detector finds the boundary, not merely some A1/A2 bytes, so the frame phase
comes out exact to the word.

`frame_aligner` is a three-state controller:

| State | Behaviour |
|---|---|
| `FA_HUNT` | Waits for any hit. Locks the lowest offset that hit and starts the frame counter. Goes to PRESYNC. |
| `FA_PRESYNC` | Ignores hits until the counter says one frame has passed. The pattern must then be at the locked offset (→ SYNC). Otherwise the candidate was false (→ HUNT). |
| `FA_SYNC` | `in_frame` = 1. Checks the locked offset once per frame. A good frame clears the miss count. `LOSS_FRAMES` (4) consecutive misses → HUNT. |

`frame_pulse` is high at every expected boundary position while locked
(PRESYNC or SYNC), whether or not the pattern was actually there. This keeps
the resorter's byte groups fixed to the frame grid through a damaged frame.
Once locked, hits at other offsets or positions are ignored. An assertion
checks that the offset only changes while hunting. A second assertion checks
that SYNC is entered only on a confirmed mark.

## Byte to bit-stream resorting (`byte_resorter`)

Eight clocks bring a group of 16 bytes, numbered 0..15 in time order. Byte j
goes to `ser_out[j]`, MSB first, one bit per clock. A collect register fills
with the group while 16 shift registers send out the previous one. On the last
word of a group, all 16 bytes are loaded at once; the last two come straight
from the input. The grid of groups restarts on every `sync`, which is
`frame_pulse`. 192 A1 bytes make 96 words, and the frame is a multiple of 8
words, so the groups start on a frame start too. If a `sync` arrives in the
middle of a group, that partial group is dropped.

Suppose the 64 STM-1s are interleaved in plain numerical order (byte i of a
row belongs to STM-1 number i mod 64). Then line j carries STM-1s j, j+16,
j+32 and j+48. `ser_sync` marks the MSB of the group that starts with the
first A2 bytes. That is the frame reference for each serial line.

## Top level `stm64_testchip`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 622 MHz clock, asynchronous active-low reset |
| `din` | in | 16 | unaligned stream, bit 15 earliest |
| `ser_out` | out | 16 | the 16 STM-4-like serial signals |
| `ser_sync` | out | 1 | first bit of the group that holds the first A2 bytes |
| `aligned` | out | 16 | byte-aligned word stream |
| `frame_pulse` | out | 1 | `aligned` holds the first A2A2 word |
| `in_frame` | out | 1 | frame alignment held |
| `align_offset` | out | 4 | locked bit offset |
| `align_state` | out | 2 | `fa_state_e`: HUNT / PRESYNC / SYNC |

The chip's real function is the 16-in, 16-out serial path. `aligned`,
`frame_pulse`, `align_offset` and `align_state` are extra observation ports
for integration and test.

Parameters (package `stm64_pkg` holds the shared constants):

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 16 | data lines; two bytes per clock at 622 MHz |
| `FRAME_WORDS` | 77760 | words per frame (STM-64) |
| `LOSS_FRAMES` (`frame_aligner`) | 4 | consecutive missed frames before loss of frame |
| `A1`, `A2` (`frame_pattern_detector`) | 0xF6, 0x28 | framing bytes |

The blocks are written for any `W` that is a power of two and at least 16.
A wider datapath is the natural route to higher rates, for example 64 lines
for 40 Gbit/s. The RTL also passes lint at `W = 32` and `W = 64`, but only
`W = 16` has been simulated.

After coarse synthesis the top has about 410 word-level cells and 783
flip-flop bits. This is the same order as the roughly 1000 gates, mostly
flip-flops with built-in logic, of the original 0.8 µm chip.

## What comes from where

Taken from the original design:
- the 16-line datapath at 622 MHz;
- the three functions and their order;
- the 16 STM-4-like outputs;
- the rule of very shallow logic per flip-flop, with parallel functions side
  by side.

This implementation's own choices:
- the framing values and frame size, taken from the SDH standard (G.707);
- the hunt/presync/sync rule with one confirming frame and four frames to
  loss, which is common SDH practice (G.783);
- MSB-first bit order;
- the byte-to-line mapping;
- the log-shifter and staged comparator structures;
- reset behaviour;
- the observation ports.

Where it departs from, or does not cover, the original:
- **Logic depth in the controller.** The datapath blocks keep one shallow
  level per register. `frame_aligner` does not: it has a 17-bit frame counter
  with wrap compare and a 16-input priority pick of the offset. These are
  written as ordinary synchronous logic. A full-speed cell-level version would
  need a pipelined or LFSR-style counter and a registered priority encoder.
- **Circuit level.** The original builds every cell as a positive-edge,
  true-single-phase-clocked (TSPC) flip-flop, with the logic in its precharged
  stage and a separately sized output driver. Here those cells are ordinary
  `always_ff` registers. The clock buffer tree, the power grid with decoupling
  capacitors, and the input buffer chains and open-drain outputs have no logic
  equivalent and are not included.
- **Regenerator functions not in this core.** Parity (BIP) calculation,
  scrambling, regenerator-section overhead add/drop and the maintenance logic
  belong to a complete regenerator and are not part of this core. The
  high-speed mux/demux around it is not part of it either.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_byte_shifter` | Random words and random offset changes. Every output is compared with the window taken from the recorded input (also checks the latency). All 16 offsets are exercised. |
| `tb_frame_pattern_detector` | Random stream with planted patterns and one-bit near misses at random bit positions. The full hit vector is compared every clock with a direct 48-bit window compare. Every offset must see a true hit. |
| `tb_frame_aligner` | Scripted hit vectors, 40-word frames. Covers lowest-offset pick, confirmation, spurious hits, 3 misses plus recovery, loss on the 4th miss, an unconfirmed candidate and relock. `frame_pulse` is checked every clock. |
| `tb_byte_resorter` | Random words with group syncs, occasional missing syncs and two moves of the group grid. Every serial bit and `ser_sync` is checked against the input bytes. |
| `tb_stm64_testchip` | End to end at full size (77760-word frames, about 1.1 M clocks, a few seconds). See below. |
| `tb_stm64_testchip_offsets` | End to end with 128-word frames. The input slips through all 16 bit offsets. At each one the core must lose frame and re-acquire at the new offset, and it is then checked clock by clock for at least one frame. |

`tb_stm64_testchip` generates frames, sends them with a bit offset and drives
the core through five events:
- rejection of a false pattern planted in the payload;
- acquisition;
- a single damaged frame, which must not cause loss of frame;
- an input bit slip plus four damaged frames, which must cause loss of frame;
- re-acquisition at the new offset.

While the core is in frame, every clock checks the offset, the aligned word,
`frame_pulse`, all 16 serial lines and `ser_sync`. Each of the five events is
counted, and the test fails if any of them did not happen.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/stm64_pkg.sv \
          tb/tb_stm64_testchip.sv --top-module tb_stm64_testchip -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. For a block
testbench, replace the testbench file and the top module name. The
block testbenches set small parameters of their own; the end-to-end one uses
the defaults.
