# CARLOSrx readout firmware

CARLOSrx is a 9U VME board that collects the data of the ALICE Inner Tracking
System's silicon drift detectors (SDD). It serves twelve front-end boards
(CARLOS) over optical links. From each trigger it builds one event, puts an
ALICE Common Data Header (CDH) in front, and sends the event to the DAQ over
the DDL (Detector Data Link). Along the way it follows the three-level ALICE
trigger sequence, drives the busy line to the Local Trigger Unit (LTU), and
offers an RS232 port for debugging.

The board carries three FPGAs and four large external FIFOs:

```
  link 0..5  --> input FPGA 0 --+-- ext FIFO 0 (links 0-2) --+
                                +-- ext FIFO 1 (links 3-5) --+
  link 6..11 --> input FPGA 1 --+-- ext FIFO 2 (links 6-8) --+--> main FPGA --> DDL (SIU)
                                +-- ext FIFO 3 (links 9-11)--+      ^  |  ^
                                                                   TTC |  RS232
                                                                      busy -> LTU
```

This repository holds the SystemVerilog for the logic of all three FPGAs.
`carlosrx_top` wires them together the way the board does. The external
chips are outside this design and their pins are ports of the top:
- the external FIFOs
- the de-serializers
- the optical transceivers
- the TTC receiver (TTCrq)
- the DDL source card (SIU)

## Input FPGAs: from a 16-bit link to tagged fragments

Each input FPGA (`input_fpga`) takes six links. Every link has its own channel,
built from four parts:

1. **`async_fifo`**, a 16-deep dual-clock FIFO.
   - A link delivers 16-bit words on the recovered clock of its
     de-serializer. This FIFO hands them to the 40.08 MHz system clock.
   - It uses Gray-coded pointers with two-flop synchronisers.
   - Each word carries one extra bit marking the last word of an event.
   - The recovered clock runs at the LHC frequency, so the FIFO only has to
     absorb phase.
   - A word offered while the FIFO is full is dropped, and a sticky overflow
     bit is set. It appears in the status word and in the CDH.
2. **`data_packer`** joins two 16-bit words into one 32-bit word.
   - The first word goes in bits [15:0], the second in [31:16].
   - An odd last word is padded with zeros.
   - The packer counts the 32-bit words of the event. At the event's end it
     queues `{truncated, length}` in a small length queue and pulses `eoe`
     (end of event).
3. **A 4K × 32 buffer** (`sync_fifo`, first-word-fall-through). It holds the
   complete event while the scheduler is busy with the other links.
4. **The length queue**: 16 entries of `{truncated, length}`.

Two **`scheduler`s** per FPGA each serve three channels and feed one external
FIFO.

### Event framing and ordering

Both the schedulers and the event builder follow one rule, and most of the
design rests on it.

**The round robin passes its turn one whole event at a time.** A scheduler
stays on a channel until it has copied one complete event, and the copy goes
like this:
- It pops the event's length from the channel's length queue.
- It writes a **fragment header** to the external FIFO.
- It copies exactly `length` words from the buffer, one per clock, pausing
  only while the FIFO's full flag is up.

Then it moves to the next enabled channel, and it waits on a channel that has
no complete event yet. So each external FIFO holds, for trigger *n*, the
fragments of its three channels in channel order, then the fragments of
trigger *n+1*. The event builder can therefore read the four FIFOs in a fixed
order, never reorder anything, and still check each fragment as it arrives.

The fragment header (`frag_header` in `carlosrx_pkg`):

| bits    | field                                              |
|---------|----------------------------------------------------|
| [31:28] | marker `0xA`                                       |
| [27]    | truncated: the event overflowed the 4K buffer      |
| [26:24] | 0                                                  |
| [23:20] | link number 0..11                                  |
| [19:16] | event count of this link, mod 16                   |
| [15:0]  | number of 32-bit data words that follow            |

A scheduler copies only complete events. An event larger than the 4K buffer
would therefore block its channel forever. To prevent this, the packer drops
words once the buffer is full, counts only the words it kept, and sets the
truncated bit. The data behind the header then always matches its length
field.

## Main FPGA

`main_fpga` holds the trigger interface, a 16-entry queue of trigger
descriptors, the event builder, busy control, link enables, a local trigger
sequencer and the RS232 port.

### Trigger interface and erroneous sequences

`trigger_if` follows the strobes from the TTC receiver:
- L0
- L1, which must arrive between `L1_MIN`=200 and `L1_MAX`=230 clocks after L0
- the L1 trigger message (10 bits), within `L1M_TIMEOUT`=100 clocks of L1
- L2a (with the 50 trigger-class bits and 36 region-of-interest bits) or
  L2r, within `L2_TIMEOUT`=4500 clocks of the L1 message

A 12-bit bunch counter (3564 bunches per orbit) is cleared by the orbit
strobe, which also advances a 24-bit orbit counter. Both counters are latched
at L0 as the event ID. Valid strobes go to the front end of every enabled
link one clock later.

An L2a queues a descriptor for a data event. No L1 by `L1_MAX` is an ordinary
L1 reject: the sequence closes and no event is produced.

Each broken sequence queues a **dummy event**, which is a CDH with the dummy
and error bits set and no data. After L0, the front end is sent an L2r so
that it drops the event. The four errors are:

| error   | raised when                                                        |
|---------|--------------------------------------------------------------------|
| L0error | an L0 arrives while a sequence is open                             |
| L1err   | an L1 arrives before `L1_MIN`, or with no L0 pending               |
| L1merr  | no L1 message by `L1M_TIMEOUT` after L1, or one nobody expected    |
| L2err   | no L2a/L2r by `L2_TIMEOUT` after the L1 message, or one unexpected |

The error names come from the readout. The windows and exact conditions are
this design's own choice, and all of them are parameters.

### Event builder and the Common Data Header

`daq_if` takes one descriptor at a time and sends eight CDH words. For a data
event it then sends the fragment of every enabled link in order 0..11. Link
*c* is read from external FIFO *c*/3, starting with its header. The builder
checks each header's marker and link number; a mismatch sets a sticky
`frag_err`. It then passes on exactly the number of words the header gives.

Disabled links are found with a priority encoder, so skipping them costs no
clock. The output is one register with valid/ready. At full rate, header and
data go out at one word per clock, which is 160.3 MB/s at 40.08 MHz.

CDH layout (`cdh_word` in `carlosrx_pkg`):

| word | contents                                                                 |
|------|--------------------------------------------------------------------------|
| 0    | block length, sent as `0xFFFFFFFF` (not known when the header leaves)   |
| 1    | [31:24] format version (`CDH_VERSION`=2), [23:14] L1 message, [11:0] bunch crossing |
| 2    | [23:0] orbit number                                                      |
| 3    | [31:24] block attributes (0), [23:0] participating sub-detectors (`SUBDET_MASK`) |
| 4    | [27:12] status and error bits, [11:0] mini-event ID (local bunch counter) |
| 5    | trigger classes [31:0]                                                   |
| 6    | [31:28] ROI [3:0], [17:0] trigger classes [49:32]                        |
| 7    | ROI [35:4]                                                               |

Status bits, counted within the word:

| bit | meaning                                                |
|-----|--------------------------------------------------------|
| 12  | L0error                                                |
| 13  | L1err                                                  |
| 14  | L1merr                                                 |
| 15  | L2err                                                  |
| 16  | dummy event                                            |
| 17  | an input FIFO has overflowed since reset               |

All unlisted bits are zero.

### Busy and back-pressure

`busy_ctrl` raises busy to the LTU in these cases:
- **Trigger sequence open**, from L0 until the sequence ends.
- **Waiting for the front end**: after an L2a, until every enabled link has
  delivered the end of that event (`eoe`). At that point the front end can
  take a new trigger.
- **Back-pressure**: set when any external FIFO raises its programmable
  almost-full flag. It is released only when all four FIFOs are below their
  half-full flag.
- **Internal queue nearly full**: the descriptor queue or any enabled 4K
  buffer is almost full (3/4).

Back-pressure acts only through busy. It stops new triggers, and so stops new
data. It does **not** pause the schedulers. The event builder reads the FIFOs
in a fixed order and may be waiting for the rest of a fragment that a paused
scheduler still holds. If a busy downstream link made the schedulers feeding
another FIFO pause, neither side could progress. The external FIFOs' full
flags alone protect the writes.

### Link enables

`xcvr_ctrl` holds the 12-bit enable mask, which is all ones after reset. A
disabled link has its transceiver's transmit-disable pin set. Its channel
takes no part in scheduling or event building, and it gets no triggers.

A new mask is held as pending and applied only while the readout is quiet:
- no trigger sequence is open
- no event is in the builder
- both input FPGAs are idle
- the descriptor queue and every external FIFO are empty

This way the schedulers and the builder always agree on which fragments make
up an event.

### RS232 port and local trigger

The RS232 port is a UART (8N1, 115200 baud: `CLKS_PER_BIT`=348 at 40.08 MHz)
with a one-byte command decoder in `rs232_if`:

| byte        | action                                                                 |
|-------------|------------------------------------------------------------------------|
| `R`         | soft reset, four clocks, of the readout, the input FPGAs and the external FIFOs |
| `T`         | local trigger: `sw_trig_gen` plays L0, L1 (+210 clocks), L1 message, L2a (+16) |
| `S`         | send the 64-bit status word, 8 bytes, MSB first                        |
| `E` *h* *l* | new enable mask `{h[3:0], l}`                                          |
| `P`         | toggle spy mode (see below)                                            |

In spy mode, the next word the builder sends is captured whenever the
transmitter is free and no status reply is being sent. It goes out as 4
bytes, so the port samples the DDL stream without slowing it.

The local trigger's strobes are ORed with the TTC ones, so the trigger
interface checks them like any other.

Status word:

| bits    | meaning                                   |
|---------|-------------------------------------------|
| [63:52] | link enables                              |
| [51:40] | input FIFO overflow                       |
| [39:28] | 4K buffer almost full                     |
| [27:24] | external FIFO empty                       |
| [23:20] | external FIFO half full                   |
| [19:16] | external FIFO almost full                 |
| [15]    | busy                                      |
| [14]    | back-pressure                             |
| [13]    | fragment error                            |
| [12]    | descriptor queue empty                    |
| [11:0]  | events sent, mod 4096                     |

## Clocks, reset and sizes

The whole design runs on the 40.08 MHz system clock, except the write side of
the twelve input FIFOs. `rst_n` is asynchronous and active low. The soft
reset does not reset the RS232 port itself, so it stays usable across a reset.

One link carries 16 bits × 40 MHz = 80 MB/s. The DDL side carries 32 bits ×
40.08 MHz = 160.3 MB/s, which matches the 160 MB/s the board sustained in its
acceptance tests. With twelve links feeding it, the DDL is the bottleneck
whenever triggers come fast. Simulated with triggers offered as fast as busy
allows, it stays 99.8 % occupied (159.9 MB/s).

Event size limits per link:

| per-link event            | what happens                                                        |
|---------------------------|---------------------------------------------------------------------|
| up to 1024 words          | never truncated, however closely triggers follow                    |
| up to 4096 words          | not truncated if the buffer has drained before the next event comes |
| over 4096 words           | truncated and flagged                                               |

Words here are 32-bit words, i.e. two link words each. The first row follows
from busy rising once a buffer is 3/4 full: 4096 − 3072 = 1024. For the
second row, the buffer must still have room for the whole event when the
next one arrives.

The test setup's trigger generator is outside this design, and so are its
settings ("ERROR signal rate" and "BC downscaling factor"). The link and FIFO
counts (12 and 4) are fixed by the board and kept as constants in
`carlosrx_pkg`.

Top-level parameters and their defaults:

| parameter                      | default  |
|--------------------------------|----------|
| `CH_DEPTH`                     | 4096     |
| `L1_MIN`, `L1_MAX`             | 200, 230 |
| `L1M_TIMEOUT`                  | 100      |
| `L2_TIMEOUT`                   | 4500     |
| `CLKS_PER_BIT`                 | 348      |

## What follows the original board, and what is this design's own

Taken from the board's description:
- The partitioning into three FPGAs.
- Six links per input FPGA and two schedulers per input FPGA, each writing
  32-bit words to one of four external FIFOs.
- A dual-clock FIFO, a 16-to-32-bit packer and a 4K × 32 buffer per link.
- Round-robin buffer management.
- An event builder that reads all four FIFOs and sends to the DDL.
- The eight-word CDH field layout.
- Busy from L0 until the front end is ready.
- Back-pressure set on "getting full" and cleared at half full.
- The four named trigger errors producing dummy events with error bits.
- Link enable and disable.
- An RS232 port for reset, start trigger, buffer and FIFO monitoring, and
  spying on the DDL data.

This design's own choices:
- The per-event turn of the round robin, and the fragment header format.
- The end-of-event flag on the link words, the packing order and padding,
  and truncation.
- The trigger windows and the exact error conditions.
- The CDH's block length, version and sub-detector values, and the encoding
  of the status bits.
- The CDH's block-attribute field is placed at [31:24]. The original table
  lists it as [23:31], which overlaps the sub-detector field [23:0].
- Busy on internal almost-full, and back-pressure that does not pause the
  schedulers.
- The deferred mask update.
- The RS232 byte codes, baud rate, status layout and spy format.
- The local trigger sequence.
- All FIFO depths other than the 4K buffer.
- The DDL side is modelled as a plain 32-bit valid/ready stream with
  start-of-event and end-of-event marks.

### Not included

The following have no RTL here:
- **External chips**: the IDT FIFOs, the de-serializers, the transceivers,
  the TTCrq and the SIU. `tb/idt_fifo_model.sv` is a behavioural FIFO with
  empty, half-full, almost-full and full flags, used by the testbenches.
- **The DDL protocol**, including the SIU's path for sending configuration
  back to the board.
- **The serial control link** towards the CARLOS boards. The triggers for the
  front ends are plain per-link strobes (`fee_l0/l1/l2a/l2r`).
- **The VME-to-JTAG firmware loader** on the board's Spartan II.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_carlosrx_top` runs the whole board at its default sizes, in a few
seconds. It surrounds the design with models:
- twelve front-end emulators on their own link clocks
- four external FIFO models (1024 words, almost full at 128 free)
- a TTC source with orbit strobes
- an LTU that honours busy
- an RS232 terminal
- a DAQ sink that rebuilds and checks every event

It goes through these cases:
- accepted events
- L2 reject and L1 reject
- all four erroneous sequences
- a stalled DDL that fills the external FIFOs and raises back-pressure
- a truncated oversize event
- links disabled by an RS232 command
- a local trigger
- a status readout

It counts each one and fails if any never happened.

`tb_carlosrx_rate` is the throughput test, also at default sizes. It takes
about a minute. Its external FIFO models are 16K words deep, the size of
common parts of that family. It has two phases:
- **Saturation**: 48 events with random triggers offered whenever busy is
  low. It checks every word, checks that the DDL carries at least 0.97 words
  per clock, and checks that the spy words returned over RS232 were really
  sent.
- **95 Hz**: three events at that fixed trigger rate. It checks how long busy
  lasts, and that the readout runs at one word per clock.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/carlosrx_pkg.sv tb/tb_carlosrx_top.sv --top-module tb_carlosrx_top -o sim
obj_dir/sim
```

Replace `tb_carlosrx_top` with any other testbench, for example
`tb_scheduler`, `tb_daq_if`, `tb_trigger_if` or `tb_input_fpga`. The
testbenches for the FIFO-heavy blocks override sizes to stay short. For
instance, `tb_input_fpga` uses 64-word buffers and `tb_rs232_if` a fast
baud rate.

Assertions cover several protocol rules:
- no read from an empty buffer in the scheduler
- the output register of the event builder holds while stalled
- the descriptor queue never overflows

`--assert` turns them on.
