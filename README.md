# Ground support equipment for the Astro-E hard X-ray detector

This is the logic of a test stand for a space X-ray instrument. Its analog
electronics (the "AE") has nine boards: four well processing units (WPU),
four transient processing units (TPU) and one analog control unit (ACU).
Each AE board talks over two slow serial links: one carries 16-bit commands
to the board, the other carries data packets from it. In flight a digital
electronics unit sits on the far end of those links. On the ground this
design takes its place.

The design is nine identical VME I/O boards on one VME bus, one per AE board.
Each board has a 20 MHz FPGA and a 1 Mbyte SRAM. The host computer writes a
command into a board register, and the board shifts the command out on the
serial command link. The AE sends packets whenever it likes. The board
deserialises them and stores them in its SRAM with an index, so the host can
fetch whole packets at its own pace. The SRAM is split into two halves. The
board fills one half while the host reads the other, so reading never stalls
acquisition.

Beside the nine boards, the top level also holds a small piece of
detector-side logic, the pile-up (double-trigger) flag of each of the 16
phoswich counters. The test stand was used to check that flag.

```
                 VME bus (A[31:2], D[31:0], DS*, WRITE*, DTACK*)
   ----+-----------+-----------+---------- ... ---------+-------
       |           |           |                        |
  +----+-----------+----+  board 1 ... 7           +----+----+
  | gse_board (board 0) |                          | board 8 |  ACU: has Act
  |                     |                          +---------+
  | vme_addr_ctrl --- vme_data_ctrl                |
  |     |                 |  cmd, go               |
  |     | SRAM read       v                        |
  |     |            ae_cmd_ctrl ---> Data, Enable, Clock, (Act) --> AE board
  |     v                                          |
  | mem_ctrl <--- ae_ptr_ctrl <--- ae_data_ctrl <--- Data, Enable, Clock
  |     |                                          |
  +-----+--------------------------------------------+
        |
      SRAM 256K x 32 (external)

  pileup_detector x 16   (10 MHz, independent of the boards)
```

## The command link

`ae_cmd_ctrl` sends one 16-bit command at a time.

- The serial Clock runs all the time, with a period of 152 board cycles
  (7.6 us at 20 MHz).
- A write to the CMD register starts the controller (`go`). It waits for the
  next falling edge of Clock (Synch), then raises Enable.
- Bit 15 goes first. Data changes on the falling edge of Clock, so the
  receiver can sample on the rising edge.
- Enable stays high for exactly 16 Clock periods and falls with the last
  falling edge.
- In Judge, the controller checks whether the host marked the command as a
  hardware command (bit 16 of CMD). If so, and if the board is built with
  `HAS_ACT = 1`, Act follows:
  - Act rises `ATT_WAIT_CYCLES` (about 121.9 us) after Enable falls;
  - Act stays high for `ATT_HIGH_CYCLES` (30 ms).
- Only the ACU board has Act. On the other boards Judge always returns to
  Idle.

The state sequence is Idle → Synch → (Clk Low ↔ Clk High) × 16 → Done →
Judge → [Att wait → Att High → Att done] → Idle. `busy` is high outside Idle,
and a CMD write while busy is dropped. The host should poll STATUS[31] before
writing the next command.

## The data link and the packet format

The AE frames a packet with Enable and clocks it out MSB first on its own
Clock. A packet is 1 to 8192 bits long; 1 kbyte packets keep Enable high for
tens of milliseconds. The first bit tells the packet kind: 0 for
observational data, 1 for monitor data.

`ae_data_ctrl` passes the three lines through two-flop synchronisers. It
samples Data on each rising edge of the synchronised Clock, so the AE Clock
must stay below about a quarter of the 20 MHz board clock. The data tests
run at up to 2.5 MHz. The states are:

- **First**: the first bit after Enable rises is stored as the packet ID and
  also enters the data.
- **Clk High / Clk Low**: each further bit is shifted in.
- **Word Last**: after 32 bits, or when Enable falls, the word is handed on
  (`word_done`). A short final word is left-aligned, so the first bit of the
  packet is always bit 31 of its first word. The unused low bits are zero.
- **Pkt Last**: one cycle after the last word, `pkt_done` carries the bit
  count and the ID bit.

## How a packet is stored: the double buffer

This is the part most worth understanding before using the board. The SRAM
is 256K words of 32 bits. The address is `{buffer, block, word[15:0]}`:

| addr[17] | addr[16] | contents                                   |
|----------|----------|--------------------------------------------|
| 0        | 0        | buffer A, index block (64K words)          |
| 0        | 1        | buffer A, data block (64K words)           |
| 1        | 0        | buffer B, index block                      |
| 1        | 1        | buffer B, data block                       |

`ae_ptr_ctrl` keeps two pointers into the buffer being written: the **word
pointer** into the data block, and the **packet pointer** into the index
block.

- Each received word is written at the word pointer, which then advances
  (Data Write, Word Ptr ++). Packets are packed back to back in the data
  block, with no gaps.
- When packet n ends, two index words are written:
  - word 2n gets the **size word**: bit 31 is the packet ID and bits 15:0 the
    bit count;
  - word 2n+1 gets the **packet pointer**: the data-block word where the
    packet starts.

  The states are Bit cnt Write, Pkt Ptr ++, Word ptr Write, Pkt Ptr ++.

To read packet n, the host reads index words 2n and 2n+1. It then reads
ceil(bits/32) words of the data block, starting at the pointer. The packet
count is in STATUS[15:0] for the buffer being written, or in CLOSED[15:0]
once the buffer is closed.

**Overflow.** Pointers never wrap. When the data block is full, further
words are dropped and the word pointer stays put. A packet that lost words,
or that arrives when the index block is full, gets no index entry. The board
then sets STATUS[28] (overflow). Data already stored is never overwritten, and
every indexed packet is complete. The flag clears on a swap or a CTRL[1]
write.

**Swap.** The host writes CTRL[0] to ask for the other buffer. The swap waits
for a packet boundary (no packet being received, nothing waiting to be
written), and STATUS[26] shows that it is pending. When it happens:

- the board records which buffer it closed (STATUS[25]) and how many packets
  and words it holds (CLOSED);
- the write buffer flips (STATUS[29]);
- both pointers and the overflow flag are reset.

The host then reads the closed buffer over VME while the other one fills.

A word and a packet end can arrive back to back: the last word of a packet
comes one cycle before `pkt_done`. Each therefore waits in its own one-entry
holding register, and a waiting word is written before a waiting packet end.
Two words from the link are at least 32 data Clock periods apart. This
is far more than the few cycles a store takes, so the holding registers never
overflow (an assertion checks this).

## The memory sequencer

`mem_ctrl` runs the asynchronous SRAM with four states: Idle → Mem Setup →
Mem Active → Mem Ack → Idle. `m_sel` is high while a request is being served.

- Address, chip enable and write data are set up in Mem Setup.
- WE (for writes) or OE (for reads) is low during Mem Active.
- Read data is captured at the end of Mem Active.
- Mem Ack holds until the requester drops its request. Address, chip enable
  and data stay driven through Mem Ack, so a write has a hold time after WE
  rises.

There are two request ports: the acquisition path (port 0, always first) and
VME reads (port 1). Requests follow a simple rule, checked by an assertion:
raise `req` with its fields, hold it unchanged until `ack`, then drop it. With
the defaults (`SETUP_CYCLES = 1`, `ACTIVE_CYCLES = 2`) an access takes five
cycles, or 250 ns, from request to release.

## VME access

A board answers when A[31:28] = 1 and A[27:24] equals its board number
(0–3 WPU, 4–7 TPU, 8 ACU). `vme_addr_ctrl` samples the data strobe on every
clock edge. It acknowledges with DTACK and holds DTACK until the strobe is
released.

| Address bits       | Meaning                                                |
|--------------------|--------------------------------------------------------|
| A[20] = 1          | SRAM window: A[19:2] is the SRAM word address (reads)  |
| A[20] = 0, A[4:2]  | register index                                         |

Writes to the SRAM window are acknowledged and ignored. An SRAM read competes
with acquisition for the memory, and DTACK comes when the read is done.

Registers (`vme_data_ctrl`):

| Index | Name   | Access | Contents |
|-------|--------|--------|----------|
| 0     | CMD    | W      | [15:0] command, [16] hardware command (Act follows). Starts the command link if it is idle. |
|       |        | R      | the last command written |
| 1     | STATUS | R      | [31] command busy, [30] Act, [29] write buffer (0 = A), [28] overflow, [27] packet being received, [26] swap pending, [25] last closed buffer, [15:0] packets in the write buffer |
| 2     | CTRL   | W      | [0] swap buffers, [1] clear overflow |
| 3     | CLOSED | R      | [31:16] words, [15:0] packets in the last closed buffer |
| 4     | WORDS  | R      | [15:0] words in the write buffer |

A typical read-out: write CTRL = 1, poll STATUS until bit 26 is clear, read
CLOSED and STATUS[25], then read the index and data of the closed buffer
through the SRAM window.

In the top level the boards' read data are ORed together, since a board
drives zeros unless it owns the cycle. Their DTACKs are combined with an AND.

## The pile-up flag

In the detector, a second photon that arrives while the first one's pulse
height is being held spoils the measurement. `pileup_detector` marks such
events.

- A rising anode trigger opens a peak-hold gate of `GATE_CYCLES` cycles
  (9.4 us at 10 MHz).
- Another trigger while the gate is open sets `dbl_flag`.
- At the end of the gate, `latch` pulses and `dbl_latched` gives the flag for
  the event just closed.

The trigger is synchronised with two flip-flops and edge-detected, so a
trigger pulse must last at least one 10 MHz period.

## Throughput

One event costs the board about 3.3 us of dead time. That is the time from
an accepted trigger to `pkt_stored`, for a 2-bit packet on a 1 MHz Clock: the
2 us Enable, the input synchronisation, and three SRAM writes (one data word
and two index words). `tb_rate_bench` drives the board the way a pulse
generator and a latch-gate veto would:

| Input               | Events stored |
|---------------------|---------------|
| periodic, 10–140 kHz | 100 %        |
| periodic, 500 kHz    | 50 %         |
| random, 30 kHz       | 90 %         |
| random, 100 kHz      | 75 %         |
| random, 250 kHz      | 56 %         |

These figures match a dead time of one veto width. The original equipment
needed about 7 us per event, so it lost no event up to 140 kHz. This design
has margin at that rate. In normal use the AE sends at most about 1 kHz per
board, limited by its 7.6 us serial Clock.

## Parameters

| Module          | Parameter          | Default | Meaning |
|-----------------|--------------------|---------|---------|
| ae_cmd_ctrl     | HALF_PERIOD        | 76      | board cycles per half Clock period (7.6 us period) |
|                 | ATT_WAIT_CYCLES    | 2438    | Enable low to Act high (121.9 us) |
|                 | ATT_HIGH_CYCLES    | 600000  | Act width (30 ms) |
|                 | HAS_ACT            | 1       | 0 on all boards but the ACU |
| ae_ptr_ctrl     | DATA_WORDS         | 65536   | data block size, words |
|                 | INDEX_WORDS        | 65536   | index block size, words (two per packet) |
| mem_ctrl        | SETUP_CYCLES       | 1       | Mem Setup length |
|                 | ACTIVE_CYCLES      | 2       | Mem Active length (WE/OE low) |
| vme_addr_ctrl   | BASE_HI            | 1       | A[31:28] of the board space |
| pileup_detector | GATE_CYCLES        | 94      | peak-hold gate (9.4 us at 10 MHz) |
| hxd_gse_system  | NUM_WPU, NUM_TPU   | 4, 4    | board counts (the ACU board is always last) |
|                 | NUM_PHOSWICH       | 16      | pile-up detectors |

`gse_board` and `hxd_gse_system` pass the timing and size parameters down.
Smaller blocks and a faster Clock are useful in simulation.

## Where this departs from the original equipment

- **Memory timing.** The original took about 1 us before a memory access and
  4 us to write. Here an access takes 250 ns, which gives the 3.3 us dead
  time above.
- **Hardware commands.** The original's Judge state recognises a hardware
  command for the ACU from the command itself, in a way that is not
  published. Here the host says so with CMD bit 16.
- **Serial Clock.** The original's Clock period is 7.63 us. With a 20 MHz
  clock and an even divider, this design uses 7.6 us, so Enable lasts
  121.6 us instead of 121.92 us.
- **VME interface.** A 22V10 PLD sat between the VME bus and the original
  FPGA, and its logic is not published. Here the board takes plain address,
  strobe, write and DTACK signals, with the address map above.
- **Register map.** The register map, the size-word layout and the swap
  request are this design's own.
- **Memory sharing.** VME reads go through the memory sequencer instead of
  driving the SRAM directly, and acquisition has priority.
- **Pile-up logic.** The original pile-up circuit clocks its flip-flops with
  the trigger and times the gate with a one-shot. This version is
  synchronous to 10 MHz, with a counter for the gate. The reset period of the
  peak-hold circuit after the gate is not modelled.
- **Memory width.** The SRAM is modelled as 32 bits wide, one packed word per
  address.

Not included: the AE boards themselves (ADCs, FIFOs, histogramming), the
flight digital electronics with its DMA, the host computers, the analog pulse
shape discriminator, and FPGA configuration. The benches contain simple
models of the SRAM, of the AE serial ports and of a VME master.

## Files

`rtl/`:

| File | Contents |
|------|----------|
| `gse_pkg.sv` | shared types: SRAM address and word, memory request/response structs, register indices, board status |
| `ae_cmd_ctrl.sv` | command link |
| `ae_data_ctrl.sv` | data link receiver |
| `ae_ptr_ctrl.sv` | packet storage, index and double buffer |
| `mem_ctrl.sv` | SRAM sequencer |
| `vme_addr_ctrl.sv` | VME decode and DTACK |
| `vme_data_ctrl.sv` | VME registers and read multiplexer |
| `gse_board.sv` | one board |
| `pileup_detector.sv` | DBL flag of one counter |
| `hxd_gse_system.sv` | top level: nine boards and 16 pile-up detectors |

`tb/`:

- The models `sram_model.sv`, `ae_tx_model.sv` (AE data sender),
  `ae_cmd_rx_model.sv` (AE command receiver) and `vme_master_model.sv`.
- One self-checking bench per module, `tb_<module>.sv`.
- `tb_hxd_gse_full.sv`, the whole system at default sizes. It sends commands
  and a 30 ms Act, receives packets on all boards, fills a whole data block
  and a whole index block to overflow, reads everything back over VME, and
  tests all 16 pile-up detectors.
- `tb_rate_bench.sv`, the throughput test above.
- `tb_loopback.sv`, two boards back to back. The command output of one board
  drives the data input of the other, so each command comes back as a
  16-bit packet in the second board's memory. It also measures the Clock
  period and the Enable width directly.

Every bench prints `TB_RESULT checks=<n> failures=<m>` at the end.
`tb_hxd_gse_system` runs the system at reduced sizes and counts each
mechanism it exercises: commands, Act, partial words, both packet kinds,
swaps, deferred swaps, both overflows, VME read contention and pile-up. It
fails if any of them never happened.

## Simulating

With Verilator 5 (timing support needed), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb \
    rtl/gse_pkg.sv tb/tb_gse_board.sv --top-module tb_gse_board -o sim
./obj_dir/sim
```

Replace `tb_gse_board` with any bench name. The block benches and
`tb_rate_bench` finish in seconds, and `tb_hxd_gse_full` in about two
minutes. The design is two-state clean: every register that is read has a
reset.

Some lint warnings are expected:

- unused address bits (A[23:21]) and unused CMD data bits;
- the unused `m_sel` output of the memory sequencer;
- reset used both asynchronously and in assertion `disable iff` clauses.
