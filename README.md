# Digital logic of two InP HBT optical receivers

An optical receiver turns light on a fiber back into parallel data words. Photodiode,
transimpedance amplifier and limiting (or automatic-gain-control) amplifier produce a clean
serial bit stream. A clock and data recovery (CDR) loop then finds the bit clock in that
stream, and a demultiplexer slows the bits down into words. This repository holds
synthesizable SystemVerilog for the digital parts of two such receivers, which were
integrated monolithically with their analog front ends in an InP heterojunction bipolar
transistor process:

* **A 2.5-Gb/s receiver** (`rx25_core`). A bang-bang phase detector and a decision
  flip-flop form the digital half of the CDR. A 1:8 tree demultiplexer feeds eight data
  outputs and one clock output.
* **A 7.5-Gb/s multirate receiver** (`rx75_core`). It is built for a spacecraft fiber data
  bus that carries 8B/10B-coded ATM cells. It adds three things: a clock prescaler for four
  bit rates, a 1:10 demultiplexer with a movable word boundary, and word-synchronization
  logic. That logic finds the frame sync word and moves the word boundary one bit at a time
  until the sync word lines up.

`optical_receiver_top` puts both side by side. They were separate chips and share nothing.

The analog circuits have no RTL: photodiode, amplifiers, loop filter, VCO, clock buffer,
output drivers and line terminations. Where they meet the logic, their signals are ports.
`vco_clk` comes in from the VCO. The phase detector outputs `pd_ff0` and `pd_ff1` go out to
the loop filter. `data_in` is the limiting amplifier's output.

## Frame acquisition in the 7.5-Gb/s receiver

This is the part to understand first. Everything else is ordinary.

### The frame

The data bus is divided into time slots. Each slot is 3 bytes of frame overhead followed
by a 53-byte ATM cell (5 header bytes, 48 payload bytes), so a slot is 56 bytes. 32 slots
form a master frame of 1792 bytes. After 8B/10B coding every byte is a 10-bit word, so a
frame is 17 920 bits, about 2.4 µs at 7.5 Gb/s. The first overhead byte of a frame is the
frame sync word. It is the 8B/10B control character K28.5 or K28.7, and either can come in
either running-disparity form:

| character | RD- (abcdei fghj) | RD+ | hex, bit `a` = bit 9 |
|---|---|---|---|
| K28.5 | 001111 1010 | 110000 0101 | 0FA / 305 |
| K28.7 | 001111 1000 | 110000 0111 | 0F8 / 307 |

The two forms are bitwise complements, so `sync_compare` matches four 10-bit patterns.
These codes come from the 8B/10B code itself (`rx_pkg`).

### The loop that finds the word boundary

```
 rec_data ─► demux_1to10 ──word_data──► sync_compare ──sync──┐ (resets all three counters)
                 ▲  word_valid ───────────────► word_counter ─carry─► slot_counter ─carry─► frame_counter
                 │ word_load                       (56 or 53)            (32)          (framect+1 frames)
            bit_counter ◄──────────────────────────── bit_slip ◄───────────────────────────────┘
```

1. `bit_counter` divides the recovered bit clock by 10. Once per word it raises
   `word_load` for one bit clock, and `demux_1to10` copies its 10-bit shift register to
   the output.
2. Each new word goes through `sync_compare`. On a match, `sync` resets the word, slot and
   frame counters, and the sync word becomes word 0 of slot 0.
3. Without a sync word the counters keep running. `word_counter` carries every 56 words
   (53 if `word_len_sel` = 0). `slot_counter` carries every 32 slots, which means a whole
   frame has passed with no sync word.
4. `frame_counter` counts those empty frames. At the frame end that finds its count equal
   to `framect`, it raises `bit_slip`. This happens after `framect`+1 empty frames, so
   1 to 16 frames can be set.
5. `bit_slip` makes the current word 11 bit clocks long instead of 10. Every later word
   boundary therefore moves one bit later in the stream, and the search starts again.

When frames are aligned, the sync word arrives at the moment the slot and frame counters
would carry. `sync` has priority and suppresses the carry, so the frame counter never
advances. One frame that loses its sync word is tolerated when `framect` ≥ 1. With
`framect` = 0 that frame causes a slip. Ten slips then bring the boundary back round to
the same position, and the receiver locks again.

Worst-case acquisition is 10 × (`framect`+1) frames: 24 µs at `framect` = 0 and 382 µs at
`framect` = 15, at 7.5 Gb/s with 56-word slots.

Timing: `word_data` changes, and `word_valid` is high for one bit clock, on the clock edge
after the load. `word_data` holds the ten bits that entered two clocks before that edge:
one clock in the decision flip-flop and one in the shift register. `sync` and `bit_slip`
are combinational and are high only in `word_valid` cycles. Assertions in `rx75_core`
enforce this.

### Word clocks

The original chip has two word clocks. One is a "narrow" clock: one bit-clock pulse per
word, which loads the demultiplexer's output register. The other is a 50%-duty word clock
sent off chip. In this RTL the narrow clock is the enable `word_load` in the bit-clock
domain, so all of `rx75_core` after the prescaler runs on the single clock `rec_clk`.
`word_clk` is still produced. It is high for the first five bit clocks of a word and low
for the rest, which is six in a slipped word.

## Clock recovery and rates

* `bb_phase_detector`: two flip-flops clocked by the data. `ff0` samples the recovered clock
  at each rising data edge, `ff1` at each falling edge. The decision flip-flop samples on
  the rising clock edge, so in lock the data edges sit at the falling clock edge. A sampled
  1 means the clock is late, a 0 that it is early. The loop filter sums the two outputs.
  There is no frequency detector. An external coarse tuning voltage brings the VCO within
  pull-in range.
* `decision_circuit`: one flip-flop that retimes the data on the rising recovered-clock
  edge.
* `prescaler` (7.5-Gb/s receiver only): sits between the VCO and the recovered-clock net,
  inside the loop. `rate_sel` = 0, 1, 2, 3 divides by 1, 2, 4, 8, for 7.5, 3.75, 1.875 and
  0.94 Gb/s. The original quotes these rates as 7.5, 3.6, 1.8 and 0.9 Gb/s. It is a ripple
  chain of three toggle flip-flops and a clock multiplexer. `rate_sel` is a static
  setting: changing it while the clock runs can produce a runt pulse.

## The 1:8 tree demultiplexer (2.5-Gb/s receiver)

`demux_1to8_tree` is built from seven `demux_1to2` cells in three levels. Each cell holds
one bit and then outputs it together with the next, so its outputs change at half its input
rate. Level 1 runs every bit clock, level 2 every second one and level 3 every fourth.
This rate halving is why the tree uses little power. Here each level's slower clock is an
enable from a shared 3-bit counter. The counter's top bit is the output clock `clk_out`,
the bit clock divided by 8.

`dout[i]` is the i-th bit of each group of eight. Groups are counted from reset, and the
receiver does no byte alignment. A group appears two clocks after its last bit reaches the
tree, with `data_valid` high for one clock. Through `rx25_core` that is three clocks after
`data_in`.

## Modules

| file | what it is |
|---|---|
| `rtl/rx_pkg.sv` | sync codes and frame sizes |
| `rtl/optical_receiver_top.sv` | both receivers side by side; ports prefixed `rx75_` / `rx25_` |
| `rtl/rx75_core.sv` | 7.5-Gb/s receiver logic |
| `rtl/prescaler.sv`, `rtl/bb_phase_detector.sv`, `rtl/decision_circuit.sv` | CDR logic |
| `rtl/bit_counter.sv`, `rtl/demux_1to10.sv` | word framing |
| `rtl/sync_compare.sv`, `rtl/word_counter.sv`, `rtl/slot_counter.sv`, `rtl/frame_counter.sv` | word synchronization |
| `rtl/toggle_counter.sv`, `rtl/toggle_ff.sv` | counter built from toggle flip-flops, used by the three counters |
| `rtl/rx25_core.sv`, `rtl/demux_1to8_tree.sv`, `rtl/demux_1to2.sv` | 2.5-Gb/s receiver logic |

Main ports of `rx75_core`:

| port | dir | width | meaning |
|---|---|---|---|
| `vco_clk` | in | 1 | VCO clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `rate_sel` | in | 2 | prescaler ratio 2^`rate_sel` |
| `data_in` | in | 1 | serial data from the limiting amplifier |
| `word_len_sel` | in | 1 | 1: 56-word slots, 0: 53-word slots |
| `framect` | in | 4 | empty frames before a slip, minus one |
| `pd_ff0`, `pd_ff1` | out | 1 | phase detector outputs, to the loop filter |
| `rec_clk`, `rec_data` | out | 1 | recovered clock and bit |
| `word_data` | out | 10 | word, bit 9 received first |
| `word_valid`, `word_clk`, `sync`, `bit_slip` | out | 1 | see above |

Parameters default to the frame sizes above: `WORD_BITS` 10, `WORDS_LONG` 56,
`WORDS_SHORT` 53 and `SLOTS` 32. The counter widths (6, 5, 4 bits) are fixed, so the
lengths cannot exceed 64, 32 and 16.

## Where this RTL departs from the original circuit, or fills gaps

* The word, slot and frame counters keep their count in toggle flip-flops, as in the
  original (`toggle_ff`, `toggle_counter`). Their decoding is written as comparators rather
  than the original's gate networks, and the frame counter's output latches are left out.
  The bit counter's four-flip-flop network is replaced by a plain binary count.
* The narrow word clock and the tree's half-rate clocks are enables rather than separate
  clocks.
* These points are not specified by the original and were chosen here:
  * the polarity of `word_len_sel`;
  * the encoding of `rate_sel`;
  * reading the frame-count input as "slip after `framect`+1 frames";
  * the carry timing, where the carry comes with the first word of the next slot, so that
    a sync word on time suppresses it;
  * applying a slip to the word in progress;
  * the word-clock phase;
  * the pin order of both demultiplexers;
  * the asynchronous reset.
* The original's control inputs are CMOS levels with inverted supply polarity, and its
  outputs are CML drivers. Those are electrical properties and are not modelled.

## Simulation

Every testbench is self-checking and ends with one line,
`TB_RESULT checks=N failures=M`. Run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rx_pkg.sv tb/tb_optical_receiver_top.sv --top-module tb_optical_receiver_top
./obj_dir/Vtb_optical_receiver_top
```

* `tb_<module>` for each module checks it against values the testbench works out by itself.
  Examples: all 1024 words for `sync_compare`; every `framect` value for `frame_counter`;
  slip lengths for `bit_counter`.
* `tb_rx75_core` and `tb_optical_receiver_top` use `rx75_stim`. It sends full-size frames
  with random non-sync words, each run starting at a different bit offset against the
  receiver's word boundary. It runs four scenarios, one per rate, with both slot lengths
  and `framect` 0, 1 and 2. Two scenarios remove one sync word after lock. With
  `framect` 0, exactly ten slips must follow before relock. With `framect` 1, no slip
  may follow. The checks cover:
  * every word's content;
  * sync only on real sync words;
  * word boundaries once locked;
  * the exact bit-clock distance between slips, (`framect`+1)·32·words·10 + 1;
  * the recovered clock period;
  * the phase detector outputs.

  It also counts each mechanism (sync, slip, 11-bit word, loss and relock, tolerated
  missing sync, both phase detector signs, each rate) and fails if one never occurs.
  `tb_optical_receiver_top` runs this together with `rx25_stim` at default parameters, in
  a few seconds.
* `tb_cdr_lock` closes both CDR loops with behavioural models of the loop filter
  (`tb/loop_filter_model.sv`, proportional plus integral) and the VCO
  (`tb/vco_model.sv`). It sends a 2^7-1 pseudorandom sequence at 2.1 Gb/s and at
  7.6 Gb/s, with 1 time unit standing for 1 ps. With the loop open, the clock drifts and
  bits are slipped. With the loop closed and the VCO coarsely tuned within 0.5%, it checks
  over 6000 and 21 714 bits: no slip, no wrong decision, and every sampling edge in the
  middle 60% of its bit. The model gains are free choices and do not reproduce the real
  filter's 0.5-MHz pole and 15-MHz zero.

## How far to trust it

The block structure, the frame sizes, the sync patterns, the 10/11-count bit slip, the
1..16 frame limit, the four prescaler ratios and the tree structure follow the published
description of the chips. Internal encodings and timing relations are this design's own,
listed above. The original circuits were full-custom current-mode logic running at up to
7.5 GHz. This RTL reproduces their logic function, not their speed. Bit rates, jitter and
error rates are properties of the analog circuits and the process.
