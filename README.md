# Clock-switched packetizer and 4:1 time-domain multiplexer (64 x 10 Mb/s to 16 x 50 Mb/s)

This is synthesizable SystemVerilog for the two chips of a 64 x 64 video switch
built by hierarchical multiplexing:

* **pm_chip**, the packetizer/multiplexer. It takes 64 continuous 10 Mb/s bit
  streams and cuts each one into 44-bit packets. It puts a programmable 10-bit
  header in front of each packet and a spacer bit behind it. It then
  multiplexes four channels packet by packet onto each of 16 outputs at
  50 Mb/s, for 800 Mb/s in total.
* **dp_chip**, the depacketizer/demultiplexer. It takes the packets back after
  an external 16 x 16 packet switch. It uses the two low address bits of each
  packet to pick one of four adjacent outputs, strips the header, and restores
  64 continuous 10 Mb/s streams.

The switch routes on the four high bits of the 6-bit destination address. The
depacketizer uses the two low bits. Together they give full 64 x 64
connectivity. The switch itself is not part of this RTL. Its connections are
ports of the top module `video_switch`, and the end-to-end testbench models it.

The main idea is in the multiplexer. A simple packet multiplexer would fill a
44-bit input register per channel and parallel-load it into a 44-bit output
register. That costs an extra register per block, 44 4:1 multiplexers and a
wide parallel load. Instead, each channel's own buffer is shifted slowly while
it fills and quickly while it empties. So everything stays bit-serial, and the
only extra storage is one 9-bit register per channel.

## Frame arithmetic

Everything follows from a few numbers:

| quantity | value |
|---|---|
| input rate, output rate | 10 Mb/s, 50 Mb/s (clock ratio 5) |
| packet on the output | 10 header + 44 data + 1 spacer = 55 bits = 1.1 us |
| frame (4 packets per output) | 220 cycles of 50 MHz = 4.4 us = 44 input bits per channel |
| data transmit window | 45 cycles (44 data + spacer) = 900 ns = 9 input bits |

44 is the smallest payload for which four channels, with their headers and
spacers, fit into 50 Mb/s. Each channel delivers exactly 44 bits per frame,
and each frame sends exactly 44 bits of it. So no buffer ever fills up or runs
dry. All window boundaries fall on 10 MHz period boundaries, which is needed
for glitch-free clock switching (see below).

## The clock-switched channel buffer (`cs_buffer`)

Each channel has a 35-bit tail shift register and two 9-bit head registers, A
and B. One head is chained in front of the tail to form a 44-bit serial FIFO.
While that 44-bit packet is being sent, 9 more input bits arrive, and the other
head register catches them. The buffer cycles through four states:

| state | chained head + tail | other head | length |
|---|---|---|---|
| RX_A | A + tail shift at 10 MHz; the input enters A | B holds | 35 input bits |
| TX_A | A + tail shift at 50 MHz; the tail end is the output | B shifts the input in at 10 MHz | 45 cycles |
| RX_B | B + tail at 10 MHz (B already holds 9 bits) | A holds | 35 input bits |
| TX_B | B + tail at 50 MHz | A takes the input | 45 cycles |

At the end of RX_A, A + tail holds 44 bits in arrival order. Nine of them came
during the previous TX_B and 35 during RX_A. The oldest bit sits at the tail's
output end. In TX_A the first 44 shifts send them oldest first. The 45th cycle
is the spacer time: the output multiplexer sends 0 then, and the bits that
entered the emptying head are zeros. The state is simply `{bank, tx}`. `bank`
toggles at the last cycle of each transmit window.

In the original full-custom design these registers get switched 10/50 MHz
two-phase clocks. Here every register runs on the single 50 MHz clock, and a
switched clock becomes a clock enable:

* `tick10`, one cycle in five, stands for 10 MHz.
* "always" stands for 50 MHz.

This is functionally the same and synthesizes with ordinary flip-flops.

## Multiplexer datapath and control

`tdm_datapath` is one of the 16 identical blocks. It holds four `cs_buffer`s
and four `header_rotator`s. A 4:1 data select and a 4:1 header select feed a
header-or-data-or-spacer select, whose output is registered. Headers are kept
in 10-bit rotators. A rotator turns once per packet at 50 MHz while its header
is being sent, so it ends up where it started.

`pm_control` is shared by all 16 blocks, which run in lock step. After reset it
waits for the first 10 MHz phase-1 edge, given to the chip as `strobe10`. From
then on it counts by itself:

* `pos` counts 0..54 inside a slot, and `slot` counts 0..3.
* Channel `slot` sends its header at pos 0-9 and its data at pos 10-53.
* The spacer goes out at pos 54.
* Its buffer is in a transmit state for pos 10-54.
* `tick10` is high at pos 4, 9, ..., 54.

An assertion checks that later `strobe10` pulses stay in step.

**Header layout.** The header is sent first bit first:
`1 0 0 | c | a5 a4 a3 a2 a1 a0`.

* The first three bits are hard-wired control bits. The leading 1 follows the
  0 spacer, so it marks a packet start.
* `c` is the one programmable control bit.
* `a5..a0` is the destination address, most significant bit first.

**Programming port (`hdr_prog`).** The port is 14 lines:

* `prog_addr[5:0]`: channel number. Channel n is block n/4, slot n%4.
* `prog_data[6:0]`: `{c, a5..a0}`.
* `prog_strobe`: writes on its rising edge.

A write aimed at a header that is being sent is held until that header has been
sent, at most 10 cycles. This keeps the rotator aligned.

## Clock-switching cell (`clk_switch`)

This is the latch chain that makes switching between the 10 and 50 MHz clocks
glitch-free in a two-phase clocking scheme. It has three latches:

1. The first is open on 50 MHz phase 1 and takes the clock select.
2. The second is open on phase 2. Its output drives the phase-1 clock
   multiplexer.
3. The third is open on phase 1 again. Its output drives the phase-2 clock
   multiplexer.

So a gating signal only changes while the 50 MHz version of the phase it gates
is low, and phase 1 always switches before phase 2. The controller must also
change the select only when the 10 MHz version of each phase is low. The
multiplexer's schedule does this, because windows start and end on 10 MHz
period boundaries. If both rules hold, no pulse is cut short and the two
switched phases never overlap.

The synthesizable buffers use enables instead, so this cell drives nothing
inside the chip. It is instantiated once in `pm_chip`, with its own `cs_*`
ports, for use in a two-phase implementation.

## Depacketizer (`dp_chip`, `dp_datapath`, `dp_buffer`, `dp_control`)

The inputs are assumed to be slot-aligned, with a start-of-packet marker
`sop_in`. This is what the multiplexer produces, passed through a switch with a
fixed delay.

* `dp_control` locks to the first marker and counts the same 55-cycle slot.
* `dp_datapath` shifts in each header. On the last header bit it decodes the
  two low address bits. It accepts the packet only if the fixed bits read
  `1 0 0`, so idle (all-zero) inputs are ignored.
* `dp_buffer` is the mirror image of `cs_buffer`. It has a 35-bit body and two
  9-bit heads, and the head is the output end. A packet loads at 50 MHz into
  the body and the head not being sent. Meanwhile the other head sends the last
  9 bits of the previous packet at 10 MHz. Then the bank toggles and body +
  head drain at 10 MHz.

The output is continuous as long as each output gets exactly one packet per
frame, in a fixed slot. A permutation through a fixed-delay switch guarantees
that. A missing packet gives zeros. A second packet in one frame replaces the
one being sent.

## Top-level interface (`video_switch`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 50 MHz clock, synchronous active-high reset (both chips) |
| `strobe10` | in | 1 | one cycle at each 10 MHz phase-1 rising edge; the first one after reset starts the multiplexer |
| `pm_din` | in | 64 | inputs, sampled on the cycles where `strobe10` is high (every fifth cycle) |
| `prog_addr`, `prog_data`, `prog_strobe` | in | 6, 7, 1 | header programming |
| `pm_dout`, `pm_sop` | out | 16, 1 | packet streams to the switch; `pm_sop` marks the first header bit |
| `dp_din`, `dp_sop` | in | 16, 1 | packet streams from the switch |
| `dp_dout`, `dp_tick10` | out | 64, 1 | continuous outputs; they advance after cycles with `dp_tick10` high |
| `cs_*` | in/out | 1 | clock-switching cell |

`pm_chip` and `dp_chip` can also be used on their own. Their ports are the
corresponding subsets.

Timing at the default size:

* The first header bit is selected in the cycle after the start edge. It
  appears on `pm_dout` one cycle later, because the outputs are registered.
* The end-to-end delay from an input bit to its output depends on the
  channel's slot and on the switch delay. In the end-to-end test, with a
  17-cycle switch delay, it is about 280 cycles (roughly 5.6 us). It is
  constant for each output.

## What follows the source design and what does not

These parts follow the source design:

* the 9/35 buffer split and the four-state buffer cycle;
* 10-bit rotating header storage and the multiplexer arrangement;
* 16 blocks of 4 channels with one central controller;
* the 14-line programming port;
* waiting for the 10 MHz phase-1 edge after reset;
* the three-latch clock-switching cell;
* the depacketizer's function.

These are choices made here:

* clock enables instead of switched clocks (the largest departure);
* a spacer after the data, with value 0;
* the header bit order, and which three control bits are fixed and to what;
* the channel numbering and the order of channels in a frame;
* strobe edge detection, and holding writes to a busy header;
* a registered output and the `sop` marker;
* latch polarity and select encoding in `clk_switch` (`sel = 1` is 10 MHz);
* the whole internal design of the depacketizer (only its function and "same
  buffer technique" were given), and its assumption of slot-aligned inputs.

These are not covered:

* the 16 x 16 packet switch;
* two-phase clock generation;
* pads;
* the ATM variant (384-bit payloads, 40-bit headers). The constants in
  `pm_pkg` would have to change, and the 4:1 frame arithmetic with them.

## Files

The RTL is in `rtl/`, one unit per file:

* `pm_pkg.sv` holds the constants, the control structs and the state enum.
* Multiplexer: `cs_buffer.sv`, `header_rotator.sv`, `tdm_datapath.sv`,
  `pm_control.sv`, `hdr_prog.sv`, `clk_switch.sv`, `pm_chip.sv`.
* Depacketizer: `dp_buffer.sv`, `dp_datapath.sv`, `dp_control.sv`,
  `dp_chip.sv`.
* Top: `video_switch.sv`.

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each one checks
against its own reference model and prints `TB_RESULT checks=N failures=M`.

* `video_switch_tb` runs the whole system at its default size. It drives 64
  inputs through a behavioural packet-switch model, then checks that every
  output reproduces its source input bit for bit, with a constant delay.
* `pm_chip_tb` predicts every output bit of the multiplexer.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pm_pkg.sv tb/video_switch_tb.sv --top-module video_switch_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Each one builds and runs
in well under a minute. All registers are reset, so nothing depends on initial values,
except the latches of `clk_switch`, which settle once the clocks run. The
assertions in the RTL check the handshake rules between the blocks:

* `tx_last` only inside a transmit window;
* no header write while the header is rotating;
* data selected only from a transmitting buffer;
* 10 MHz edges in step with the count.
