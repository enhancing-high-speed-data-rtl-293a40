# FPGA master for an FX3 USB 3.0 Slave FIFO link

A USB 3.0 link is too fast and too complex to build from FPGA fabric alone, so
this design leaves the USB protocol to a Cypress FX3 (CYUSB3014) controller. The
FX3 contains the USB 3.0 PHY, the serial interface engine, an ARM9 CPU and DMA
buffers. Its GPIF II port is configured as a 32-bit *synchronous Slave FIFO*:
the FX3 is a passive store of data buffers, and the FPGA is the bus master that
reads words out of it (host to FPGA) and writes words into it (FPGA to host).

This RTL is the FPGA side of that link. It has two parts:

* `fx3_rw` is the bus master. It is a three-state machine (IDLE, READ, WRITE)
  that watches two FX3 flags and turns the shared 32-bit bus around between the
  two directions.
* `fpga_fifo` is a 32 x 1024-word (4 KB) single-clock FIFO. It holds the words
  that cross the bus.

In the top level, `usb3_fx3_top`, both ends of the FIFO belong to `fx3_rw`. Words
read from the FX3 go into the FIFO, and words from the FIFO are written back to
the FX3. As delivered, the design is therefore a loop-back: the host gets back
what it sent. User logic that consumes or produces data would sit on one end of
the FIFO (see *Changing the design*).

```
                 usb3_fx3_top
   +-------------------------------------------------+
   |                      fifo_data_in               |
   |   +----------+  -------------------->  +-----+  |
   |   |          |    fifo_wr_en           |     |  |
   |   |  fx3_rw  |                         |fpga_|  |
   |   |   (u1)   |  <--------------------  |fifo |  |
   |   |          |    fifo_data_out        |(4KB)|  |
   |   |          |    fifo_rd_en / empty   |     |  |
   |   +----------+    full                 +-----+  |
   |     |  ^  |                                     |
   |  o/oe  i  strobes, flags                        |
   |     v  |  v                                     |
   |   [tri-state pad]                               |
   +-----|-------------------------------------------+
         | fx3_data[31:0], SLOE/SLRD/SLWR/PKTEND, FLAGA/FLAGD
         v
      CYUSB3014 (FX3) Slave FIFO port  --- USB 3.0 ---  host PC
```

## The Slave FIFO pins

| pin (FPGA side) | dir at FPGA | meaning |
|---|---|---|
| `fx3_clk` | in | common clock of the bus and of all FPGA logic (50 MHz in the reference set-up) |
| `fx3_data[31:0]` | inout | data bus. The FX3 drives it while `sloe_n` is low; the FPGA drives it in WRITE |
| `fx3_flagd_n` | in | low: the FX3 holds data for the FPGA (**readable**) |
| `fx3_flaga_n` | in | low: the FX3 can take data from the FPGA (**writable**) |
| `sloe_n` | out | FX3 output enable, low for the whole READ state |
| `slrd_n` | out | read strobe. Each clock edge with it low moves one word from the FX3 |
| `slwr_n` | out | write strobe. Each clock edge with it low moves one word into the FX3 |
| `pktend` | out | short-packet commit. Held high (never used) |

All pins are active low except the data bus. `pktend` is constant, as in the
reference design, where it is tied to logic 1. The FX3 therefore commits only
full packets.

## The read/write switching state machine (`fx3_rw`)

This is the heart of the design. The state changes on the rising edge of
`fx3_clk`:

| from | to | condition |
|---|---|---|
| IDLE | READ | `fx3_flagd_n == 0` and FIFO not full |
| IDLE | WRITE | `fx3_flaga_n == 0` and FIFO not empty (only if READ is not taken) |
| READ | IDLE | `fx3_flagd_n == 1` **or FIFO full** |
| WRITE | IDLE | `fx3_flaga_n == 1` **or FIFO empty** |

The flag conditions and the `empty == 0` guard on entering WRITE are the
original design's. The conditions in bold, and the check for a full FIFO before
entering READ, were added here. The original state diagram has no notion of a
full FIFO. In a loop-back, READ would then continue into a full FIFO: words
would be lost, or the machine would sit in READ for ever while the FX3 kept
offering data. With the added exits, a full FIFO ends the READ burst, and the
next IDLE cycle picks WRITE to drain it. Likewise, an empty FIFO ends a WRITE
burst.

Within a state, the strobes are decoded from the state and the live flags. This
lets a word move on every clock that the flags allow:

```
READ : sloe_n = 0
       slrd_n = 0, fifo_wr_en = 1   when fx3_flagd_n == 0 and !full
       fifo_data_in = fx3_data      (pushed at the same edge the FX3 advances)
WRITE: FPGA drives fx3_data = FIFO head word
       slwr_n = 0, fifo_rd_en = 1   when fx3_flaga_n == 0 and !empty
       (the FX3 stores the word at the same edge the FIFO pops it)
IDLE : nothing driven, no strobe   (one cycle of bus turn-around)
```

An example. The FX3 has three words and room for more, and the FIFO starts
empty:

```
cycle         0     1     2     3     4     5     6     7     8     9    10
state       IDLE  READ  READ  READ  READ  IDLE  WRITE WRITE WRITE WRITE IDLE
fx3_flagd_n   0     0     0     0     1     1     1     1     1     1     1
sloe_n        1     0     0     0     0     1     1     1     1     1     1
slrd_n        1     0     0     0     1     1     1     1     1     1     1
slwr_n        1     1     1     1     1     1     0     0     0     1     1
FIFO level    0     0     1     2     3     3     3     2     1     0     0
```

Each column is one clock cycle; the level shown is the level during the cycle. READ is left at the end of the first cycle in which `fx3_flagd_n` is high. WRITE is entered from IDLE
because the FIFO is no longer empty, and it is left once the FIFO empties. When
both directions are possible in IDLE, READ goes first. This choice is not in the
original design.

The peak transfer rate is one 32-bit word per clock: 1.6 Gb/s at 50 MHz,
shared between the two directions. Each change of direction costs one IDLE
cycle. This is below the 5 Gb/s signalling rate of USB 3.0. A faster clock, up
to the FX3's 100 MHz GPIF limit, raises the rate proportionally; the RTL has no
clock-specific logic.

Four assertions in `fx3_rw` state the bus rules: never read and write in the
same cycle; never drive the bus while the FX3 output enable is on; never push a
full FIFO; never pop an empty one.

### Timing assumptions about the FX3

The strobes act in the same cycle as the flags, and read data is taken in the
cycle in which `slrd_n` is low. This is an idealised Slave FIFO with no flag
latency and no read latency. A real FX3 presents read data about two cycles
after SLRD, and updates its flags a few cycles after the last word of a
buffer. On hardware, `fx3_rw` would need a small pipeline on the read path, and
either watermark flags or a word counter to stop in time. The original design
description gives no such latencies, so none are built in. The behavioural FX3
model in `tb/` follows the same idealised rules.

## The FPGA FIFO (`fpga_fifo`)

The FIFO is single-clock and 32 bits wide by 1024 words (4 KB). It has no width
or clock conversion. It uses a memory array and two pointers. Each pointer is one
bit wider than the address, so equal addresses with different top bits mean
full. Its behaviour:

* It is first-word fall-through: `dout` always shows the oldest word, and
  `readp` consumes it at the next edge. This is what lets `fx3_rw` put a word on
  the bus and pop it in the same cycle.
* A push while full, or a pop while empty, is ignored.
* `rstp` is a synchronous reset, active high; the top drives it from `!rst_n`.
* `count` gives the level. Non-power-of-two depths work.

The port names (`din`, `dout`, `readp`, `writep`, `emptyp`, `fullp`, `rstp`)
follow the FIFO core of the original design, which was a vendor FIFO generator.
This is a plain RTL replacement with the same function. The original schematic
labels the FIFO data ports 16 bits wide, while its text and the bus master's
ports are 32 bits; 32 is used here.

## Files

| file | contents |
|---|---|
| `rtl/usb3_fx3_pkg.sv` | bus width (32), FIFO depth (1024), state type `fx3_state_e` |
| `rtl/fpga_fifo.sv` | the FIFO |
| `rtl/fx3_rw.sv` | the Slave FIFO bus master |
| `rtl/usb3_fx3_top.sv` | top level: the FIFO, the bus master and the three-state pad |
| `tb/fx3_slave_model.sv` | behavioural model of the FX3 Slave FIFO port (testbench only) |
| `tb/tb_fpga_fifo.sv` | FIFO test against a queue reference: default size and depth 5, fill, overflow, drain, random traffic, reset; checks a 1024-clock fill |
| `tb/tb_fx3_rw.sv` | bus master test against a reference of the state table: each transition in turn, then 20 000 random cycles; checks one read per clock |
| `tb/tb_usb3_fx3_top.sv` | end-to-end loop-back at the default size through the FX3 model: 6000 counting words, FIFO filled to full in 1024 clocks, random flag stalls; counts every state-machine exit cause and fails if one never occurs |

| `tb/tb_counter_sequence.sv` | pin-level sequence on the top at default size: a free-running counter feeds the bus for a read phase, then the flags swap; checks consecutive words in, the same words back out in order, and the return to IDLE |

Every testbench ends with `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5 (two-state; the testbenches reset everything they read):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/usb3_fx3_pkg.sv rtl/fpga_fifo.sv rtl/fx3_rw.sv rtl/usb3_fx3_top.sv \
    tb/fx3_slave_model.sv tb/tb_usb3_fx3_top.sv --top-module tb_usb3_fx3_top
./obj_dir/Vtb_usb3_fx3_top
```

For the block tests, replace the last testbench and top module with
`tb_fx3_rw` or `tb_fpga_fifo`. Each runs in seconds. Lint with
`verilator --lint-only -Wall -Irtl rtl/usb3_fx3_pkg.sv rtl/<module>.sv`.

After synthesis, the top is about 55 word-level cells and 24 flip-flops, plus
a 32 Kbit memory (the FIFO array). The FIFO is written so that a synthesis tool
can map it to block RAM.

Lint notes:

* `pktend` is a constant output on purpose.
* In `fx3_rw`, `fx3_data_o` and `fifo_data_in` are plain wires through the
  block (FIFO head to bus, bus to FIFO input). The block only gates the
  enables.

## What is outside the RTL

* The FX3 itself is a bought-in chip. Only its Slave FIFO behaviour is modelled,
  for simulation.
* The FX3 firmware configures GPIF II as the 32-bit Slave FIFO and sets up its
  DMA buffers. The original design uses DMA bursts of 16, and buffers of "16kb",
  stated as six buffers in one place and four in another. None of this is FPGA
  logic. Whether one such buffer fits the 4 KB FIFO whole depends on whether
  "kb" means kilobits (512 words: fits) or kilobytes (4096 words: streams through
  with stalls).
* The host software is outside the RTL.
* The original design mentions that commands from the host are parsed and kept
  in RAM, but it gives no command format. No parser is built. Received words
  stay in the FIFO.
* The clock line to the FX3 is also outside: `fx3_clk` is an input here, shared
  by the FPGA and the FX3.

## Changing the design

* `DATA_W` (the bus width) is a parameter of `usb3_fx3_top` and `fx3_rw`.
  `DEPTH` (the FIFO depth) is a parameter of the top. The package holds the
  defaults.
* To attach user logic instead of looping data back, use two FIFOs: one written
  by `fx3_rw` in READ and read by the user, and one written by the user and read
  by `fx3_rw` in WRITE. Connect `full` to the first FIFO and `empty` to the
  second. The state machine needs no change.
* To adapt the design to a real FX3's read latency, delay `fifo_wr_en` and
  `fifo_data_in` by the latency, and stop strobing that many words before
  the FIFO is full. Use `count` for this.
