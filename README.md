# BusDoctor: FlexRay bus monitor, diagnoser and replayer

A BusDoctor is a tester node that sits on a FlexRay bus next to the nodes under
test. It does three jobs:

- It **watches** the traffic and raises one of sixteen **diagnosis flags** for
  every fault it sees. A standard FlexRay controller has only four status
  flags for the same faults.
- It **records** the traffic as a log of packets. Each packet is an
  identifier, a length, a timestamp and the content. Frames are logged as
  decoded bytes and the raw line as samples taken every 40 ns.
- It **replays** a log into the bus, each packet at its timestamp.

The log format is the same in hardware and in simulation. A situation caught
on a real cluster can therefore be replayed into an HDL simulation for
diagnosis, and traffic that was built or altered in software can be sent to
real hardware. This repository holds synthesizable SystemVerilog for the FPGA
logic of one BusDoctor channel. It also holds self-checking testbenches,
including one that runs a 15-experiment fault-injection campaign end to end.

This RTL was written from the published description of the BusDoctor test
environment ("An Efficient Test and Diagnosis Environment for Communication
Controllers"). That description gives the architecture: a receive path,
frame-level and bit-level by-paths for recording and injection, a DPRAM shared
with an ARM processor through a dedicated arbiter, and a host configuration
and data interface. It also gives the packet contents, the 40 ns 32-bit
timestamp, the names of the sixteen flags and how they group into the four
standard flags. It does not give the internal logic. Everything below that
level is this design's own choice, and the section
[Where this design makes its own choices](#where-this-design-makes-its-own-choices)
lists those choices.

## Structure

```
            rxd ──► bd_bit_strobe ──► bd_frame_decoder ──► bd_error_check ──► bd_flag_map ──► flag_pins, vss_pins
                        │  (voted line)     │ bytes, header        ▲                │ sticky flags, counters
                        │                   │                      │                ▼
                        │                   │               bd_schedule        bd_host_if ◄──► host bus
                        ▼                   ▼                                       │ (registers)
   bd_timestamp ──► bd_bit_recorder   frame packets                                 │
    (40 ns)              │                  │                                       │ DPRAM port B
                         ▼                  ▼                                       ▼
                   bd_pkt_writer      bd_pkt_writer      bd_replay ──► txd, txen   bd_dpram
                         │                  │               ▲                       ▲ port A
                         └──────────────────┴───────────────┴──► bd_arbiter ───────┘
```

| module | role |
|---|---|
| `busdoctor_top` | one BusDoctor channel, wires everything below |
| `bd_pkg` | flag positions, flag groups, packet identifiers, FlexRay header type, CRC steps |
| `bd_timestamp` | 32-bit timestamp, 40 ns per step, from any clock by a phase accumulator |
| `bd_bit_strobe` | 2-flop synchroniser, 5-sample majority vote, one strobe per bit, resynchronised on falling edges |
| `bd_frame_decoder` | FlexRay line decoding, header and frame CRC, syntax flags |
| `bd_schedule` | cycle timer: segment, slot number, cycle counter, boundary pulses |
| `bd_error_check` | timing and content checks against the schedule; builds the 16-flag vector |
| `bd_flag_map` | 16 flags → 4 standard flags, sticky registers, event counters, pin pulses |
| `bd_pkt_writer` | wraps a byte stream into a packet in a DPRAM ring region |
| `bd_bit_recorder` | turns 40 ns samples of the line into bit-level packets |
| `bd_replay` | plays packets back onto `txd` at their timestamps |
| `bd_arbiter` | round-robin sharing of DPRAM port A by the two writers and the replay unit |
| `bd_dpram` | dual-port RAM, 4096 × 32 bit by default |
| `bd_host_if` | register map and DPRAM window for the processor |

The top assumes an 80 MHz clock. That is the FlexRay sample clock: 8 samples
per bit at 10 Mbit/s.

## Diagnosis: the sixteen flags

This is the core of the design and the part most worth understanding before
changing anything. A flag is a one-clock pulse in a 16-bit vector. The vector
has the bit order of `bd_pkg::flag_e`, which is also the register bit order.
Flags come from two places. The **decoder** follows the line coding. The
**checker** compares each frame, and the state of the line, with the
communication cycle that `bd_schedule` tracks.

The line coding, as the decoder expects it:
1. The channel is idle: 11 recessive (high) bits in a row.
2. A transmission start sequence (TSS): a run of low bits.
3. A frame start sequence (FSS): one high bit.
4. Each byte: a byte start sequence (BSS), which is high then low, then 8
   data bits, most significant bit first.
5. After the last byte, a frame end sequence (FES): low then high.

The header is five bytes. It holds the payload length in 16-bit words, so the
decoder knows where the three frame-CRC bytes end. Both CRCs are checked the
same way. The received check bits are shifted through the same register as
the data, and the remainder must be zero:
- header CRC-11: polynomial 0x385, initial value 0x01A, over the sync bit,
  the startup bit, the frame ID and the length;
- frame CRC-24: polynomial 0x5D6DCB, over header and payload. The initial
  value is 0xFEDCBA on channel A and 0xABCDEF on channel B.

| flag | raised by | condition in this design | standard flag |
|---|---|---|---|
| CODERR | decoder | BSS not high-then-low | SyntaxError |
| TSSVIOL | decoder | low run before the FSS shorter than 3 or longer than 15 bits (but under 30) | SyntaxError |
| HCRCERR | decoder | header CRC remainder not zero | SyntaxError |
| FCRCERR | decoder | frame CRC remainder not zero | SyntaxError |
| FESERR | decoder | FES not low-then-high | SyntaxError |
| SYMB | decoder | low for 30 bits or more (a symbol) | none |
| VCE | checker | frame ended correctly with no content error | ValidFrame |
| BVIOL | checker | line not idle when a static slot boundary, the start of the dynamic segment or the end of the dynamic segment passes | BViolation |
| SWVIOL | checker | line not idle at the end of the symbol window | BViolation |
| NITVIOL | checker | a transmission starts during the network idle time | BViolation |
| SOVERR | checker | a second frame starts within the same slot | BViolation |
| NERR | checker | null frame (null-frame indicator 0) in the dynamic segment | ContentError |
| SSERR | checker | sync or startup bit set in the dynamic segment | ContentError |
| FIDERR | checker | frame ID differs from the slot the frame started in | ContentError |
| CCERR | checker | cycle count in the header differs from the local cycle counter | ContentError |
| SPLERR | checker | static-segment frame whose length is not the configured static payload length | ContentError |

The flag names, their meaning and the standard-flag column come from the
published description. The exact conditions in the third column are this
design's reading of the FlexRay protocol. After any syntax error the decoder
drops the frame and waits for the channel to be idle again. Checks that need
the schedule run only while the schedule is enabled.

**The schedule.** A cycle is a static segment, a dynamic segment, a symbol
window and the network idle time (NIT):
- The static segment is `n_static` slots of `static_slot_mt` macroticks each.
- The dynamic segment is `n_minislots` minislots of `minislot_mt` macroticks
  each.
- The symbol window lasts `symwin_mt` macroticks.
- The NIT is whatever is left of `cycle_mt`.

A macrotick is `MT_CLKS` clocks, 1 µs by default. Slot numbers count from 1.
In the dynamic segment the slot number advances at a minislot boundary only
while the line is idle, so a frame stretches its slot. The timer starts when
the host enables it and then runs free. It does **not** synchronise to the
cluster's clock, so the host must enable it at a known cycle start, and drift
is not corrected. That is the main limit on using the timing flags against a
real cluster.

**Outputs.** `bd_flag_map` ORs the flags into the four standard flags. It
keeps sticky copies, which the host clears by writing ones. It counts each
flag in a 16-bit counter that stops at its maximum. It also drives all
sixteen flags and the four standard flags onto pins, one clock per event.

## The packet log in DPRAM

Every packet, recorded or to be replayed, has the same layout in memory:

```
word 0   [31:24] identifier   [23:16] 0   [15:0] length in bytes
word 1   timestamp of the packet start (40 ns units)
word 2.. content, four bytes per word, first byte in bits 7:0
```

| identifier | meaning |
|---|---|
| 0x01 / 0x02 | frame level, channel A / B: content is the frame's bytes, header, payload and CRC, as decoded |
| 0x11 / 0x12 | bit level, channel A / B: content is the line sampled every 40 ns, first sample in bit 0 |

Bit 4 of the identifier selects the bit level.

The DPRAM is split into three ring regions. The offsets are in words, and
`DPRAM_DEPTH` is D:

| region | base | size | writer | reader |
|---|---|---|---|---|
| frame packets | 0 | D/4 | `bd_pkt_writer` (frame) | host |
| bit packets | D/4 | D/2 | `bd_pkt_writer` (bit) | host |
| replay packets | 3D/4 | D/4 | host | `bd_replay` |

**Writing without tearing.** The length of a frame is only known at its end.
The writer therefore works in this order:
1. It reserves two words for the head.
2. It streams the content words as they fill.
3. At the end it writes the last partial word, the head word and the
   timestamp word.
4. Only when the timestamp word has actually reached the DPRAM does it
   advance the write pointer that the host sees.

The host can thus read every packet up to `FRAME_WR` / `BIT_WR` safely. It
frees space by writing its read pointer. One word of each ring always stays
empty, so that a full ring can be told from an empty one. A packet that runs
out of space is dropped whole, the write pointer rolls back, and the region's
overflow bit is set.

**Frame level.** The packet starts at the frame start sequence. It carries
the timestamp latched at the first low bit of the TSS. It ends when the
decoder finishes the frame. That is also the case after a syntax error, and
then the packet holds the bytes received so far. A low run that never becomes
a frame (TSSVIOL, SYMB) produces no frame packet.

**Bit level.** The line is sampled at every 40 ns timestamp step, which is
2.5 samples per FlexRay bit. A packet starts at the first low sample on an
idle line. It ends on a byte boundary once 32 high samples in a row have been
taken, or at 65535 bytes.

## Replay

The host writes packets into the replay region, sets `RPL_END` just behind
the last one, and pulses the start bit in `CTRL`. For each packet,
`bd_replay` works as follows:
1. It reads the head and the timestamp.
2. It prefetches the first content word.
3. It waits until the running timestamp reaches the packet's. A packet that
   is already late goes out at once.
4. It drives the packet onto `txd`, with `txen` high, in one of two ways:
   - **Bit level:** one content bit per 40 ns step. This reproduces the
     recorded waveform to within one step.
   - **Frame level:** the content bytes are coded at one bit per 8 clocks:
     TSS of 5 low bits, FSS, BSS before each byte, FES. The CRCs are part of
     the recorded bytes and are sent as they are, so a log altered to carry a
     wrong CRC is replayed faithfully.

**Timestamps.** They are absolute by default: a packet goes out when the
running timestamp reaches the value in the packet. With CTRL bit 10 set when
replay starts, the unit first waits for the next cycle start of the local
schedule. It then counts packet timestamps from the timestamp of that moment.
A frame logged with timestamp 75 then goes out 3 µs into the cycle, early
in static slot 1. This is how injected frames are placed into the
time-triggered part of the cycle. The schedule pulses a cycle start only where one cycle ends and the next begins,
not when it is first enabled. So aligned replay started together with the
schedule begins in cycle 1. Because the schedule is not synchronised to the
cluster, the alignment is only as good as the moment the schedule was
enabled.

The unit holds one word in reserve, so a single DPRAM read per 32 output bits
keeps the stream gap-free. The `underrun` status bit would show if that ever
failed.

## Host interface

The host sees one word-addressed space with one clock of read latency
(`rvalid`). With `addr[15]` set, `addr[14:0]` is a DPRAM word. Otherwise
`addr[7:0]` selects a register:

| addr | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | RW | [0] frame monitor, [1] bit monitor, [2] schedule on, [10] cycle-aligned replay; write-only pulses: [3] replay start, [4] replay stop, [5] clear timestamp, [6] clear counters, [7] clear overflow; read only: [8] replay busy, [9] replay underrun |
| 0x01 | FLAGS | R / W1C | [15:0] sticky flags, [19:16] sticky standard flags (ValidFrame, SyntaxError, ContentError, BViolation) |
| 0x02 | TS | R | timestamp |
| 0x03 / 0x04 | FRAME_WR / FRAME_RD | R / RW | frame ring pointers |
| 0x05 / 0x06 | BIT_WR / BIT_RD | R / RW | bit ring pointers |
| 0x07 / 0x08 | RPL_END / RPL_PTR | RW / R | replay end, current replay packet |
| 0x09 | OVF | R | [0] frame ring, [1] bit ring overflow |
| 0x0A–0x10 | schedule | RW | static slot length, number of static slots, minislot length, number of minislots, symbol window, cycle length (macroticks), static payload length (words) |
| 0x11 | POS | R | {segment, cycle, slot} |
| 0x12–0x14 | packet counts | R | frame packets, bit packets, replayed packets |
| 0x20–0x2F | counters | R | event count of flag 0..15 |

After reset the schedule is 30 static slots of 50 µs, 200 minislots of 5 µs
and a 50 µs symbol window, in a 3000 µs cycle. The 3 ms cycle matches the
published campaign, where 3000 to 5000 cycles took 9 to 15 s. The other
reset values are placeholders. Write the cluster's real configuration before
enabling the schedule.

## Timing summary

| what | value |
|---|---|
| clock | 80 MHz assumed (`bd_timestamp` `CLK_RATE`) |
| bit time | 8 clocks (`bd_bit_strobe`, `bd_replay` `BIT_CLKS`) |
| receive latency, line to bit strobe | about 10 clocks (synchroniser, vote, strobe point) |
| timestamp step | 40 ns, 3 or 4 clocks apart, exact on average |
| flag pulse | one clock after the decoder or schedule event; pins one clock later |
| DPRAM port A | one grant per clock, round-robin between 3 requesters, read data one clock after grant |
| writer | needs 3 clocks after a packet end before the next start |

## Simulation

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/tb_fr_coder.sv` is a reference frame builder. It computes the CRCs by
polynomial division over a bit list, not with the design's serial registers,
and it codes frames with optional faults. The testbenches call it through
an instance.

With plain Verilator, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bd_pkg.sv tb/tb_busdoctor_top.sv --top-module tb_busdoctor_top -Mdir obj_top
./obj_top/Vtb_busdoctor_top
```

Replace the testbench name to run any other one. `bd_pkg.sv` has to be named
on the command line because Verilator does not search for packages.

`tb_busdoctor_top` runs the whole design with all parameters at their
defaults. A run takes about ten seconds. It does the following:
- It programs a small schedule: 3 static slots of 40 µs, 20 minislots of
  10 µs, a 20 µs symbol window and a 400 µs cycle.
- It drives 17 cycles of traffic. Cycle 0 is clean. Cycles 1 to 15 carry one
  deviation each: broken BSS, short TSS, corrupted header, corrupted payload,
  broken FES, frame late across a slot end, frame early across a slot start,
  activity across the end of the symbol window, frame in the NIT, two frames
  in a slot, null frame and sync bit in the dynamic segment, wrong frame ID,
  wrong cycle count and wrong static length. Cycle 16 carries a symbol.
- After each cycle it checks that the sticky flags hold the expected flag and
  standard flag, and nothing else outside the allowed set.
- It reads the frame and bit logs back through the DPRAM window and checks
  content and timestamps.
- It loops `txd` back onto the line and replays the first frame at frame
  level and its bit-level recording at bit level. It checks that both are
  received and logged again with the original bytes.
- It replays a slot-1 frame in cycle-aligned mode with timestamp 75. The frame
  must arrive 75 to 80 steps after the next cycle start and raise only VCE.
- It fills the bit ring until it overflows.
- It checks that every flag, every packet kind, both replay levels, the
  overflow and arbiter contention occurred at least once.

`tb_busdoctor_campaign` runs the fault-injection campaign itself at reduced
length, also at the default parameters. The 15 experiments run back to back,
each injecting its deviation in 2 to 28 cycles. That is the number of
deviations of the original campaign divided by 39, one deviation per cycle.
After each experiment it checks three things:
- the experiment's flag counter equals the number of deviations injected;
- the matching standard-flag pin pulsed at least as often;
- no unrelated flag was counted.

The original experiments ran 3000 to 5000 cycles of 3 ms. That is about
10^9 clocks per experiment, too long to simulate, which is why the run is
shorter. The design's counters hold 65535 events and the timestamp wraps
after 171 s, so a full-length experiment fits in the hardware.

## Where this design makes its own choices

The published description names these parts but does not specify them, so
each is an assumption that can be changed:

- **Flag trigger conditions** (table above), the TSS limits (3 to 15 bits),
  the symbol threshold (30 bits) and the 11-bit idle rule. They follow FlexRay
  practice.
- **No clock synchronisation.** The schedule runs free from the moment it is
  enabled. Startup, sync-frame tracking and rate or offset correction are
  left out. The description does not cover them.
- **Bit timing.** Five-sample vote, strobe at sample 5, resynchronisation on
  every falling edge.
- **Packet word layout**, the identifier codes, the 16-bit length field for
  both levels, and the three-region DPRAM split. The published log format
  gives frame lengths of 0–2^8 bytes. A FlexRay frame can reach 262 bytes, so
  16 bits are used for both levels.
- **Bit-level start and end rule** (first low sample; 32 high samples) and
  sampling at the 40 ns timestamp rate.
- **Arbitration policy**, round-robin. The published arbiter's policy is not
  given.
- **DPRAM size**, 4096 × 32 bit. On a same-address write collision, the host
  port wins.
- **Replay details.** TSS length 5 bits. Late packets go out at once.
  Aligned mode counts from the local cycle start. Frame
  content is sent as recorded, CRCs included.
- **Register map**, reset values and the host bus itself (word addressed,
  `addr[15]` selects the DPRAM). The original's processor bus is not
  modelled. Any bus bridge to a real processor has to be added.
- **One channel per instance.** Use two instances, `CHANNEL_B` = 0 and 1,
  for a two-channel node. Each instance has its own DPRAM and registers. A
  log that mixes both channels is made by merging the two packet streams by
  timestamp in software.

Not part of this RTL:
- the processor and its software;
- the Ethernet link and flash storage;
- the FlexRay bus driver (physical layer);
- the nodes under test;
- the PC tools that generate, alter and convert logs.

The testbenches model the processor as bus read and write tasks, and the bus
as a wired AND of a traffic generator and `txd`.

## Resource notes

The DPRAM is written as an array with two synchronous ports and should infer
a true dual-port block RAM. The rest of the logic is about 2000 flip-flops,
most of them in the sixteen flag counters and the register file.
