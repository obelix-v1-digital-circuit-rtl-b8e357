# OBELIX V1 digital periphery in SystemVerilog

OBELIX is a monolithic pixel sensor for a triggered detector. The matrix
measures 464 rows by 896 columns of 33 µm pixels. Each hit carries a
leading-edge (Le) and a trailing-edge (Te) timestamp. The detector's trigger
decision arrives a fixed latency after the particle, so the chip must keep
every hit until its trigger time comes. Then it must either send the hit or
forget it. This RTL is the digital periphery that does this:

- it recovers clocks and commands from one 160 Mb/s serial input;
- it holds the matrix's hits in a trigger memory of 112 trigger groups;
- it picks out the hits whose timestamp matches a trigger;
- it sends them, together with register readback, over one 320 Mb/s
  8b/10b-encoded serial output.

The pixel matrix, the analog drivers, the LDOs and the pads are not part of
this RTL. The 448 double-column hit interfaces are ports of the top,
`obelix_top`.

```
 rx_dat ─► SCU ──16-bit words──► CRU ──trigger + ID──► TRU ──35-bit hits──► TXU ─► tx_out
 160 Mb/s  sync, clocks    (20 MHz)  decoder, registers   112 trigger groups   FIFO, 8b/10b, 320 Mb/s
                                         └─────────── 24-bit readback ────────────┘
 dc_valid/dc_hit[448] ──────────────────────────────► TRU
```

## Clocks

Everything runs from the 160 MHz input clock, `clk160`. The divider makes
two more clocks from it:

- `clk20` (÷8, 50 % duty). This is the BCID clock and the clock of the
  control and trigger units.
- `clk32` (÷5, high for 2 of 5 cycles). This clock frames the output
  symbols.

The serializer uses both edges of `clk160`. Each domain gets its own reset
through a two-flop synchronizer, so `rstb` is asserted asynchronously and
released synchronously.

The ÷8 counter is cleared whenever a Sync word is detected on the command
line. After lock, the 20 MHz edges therefore keep a fixed phase to the
16-bit command frames. One frame is 16 bits at 160 Mb/s, or exactly two
`clk20` cycles.

## Command link and lock (SCU: `scu`, `scu_sync`, `clk_divider`)

The command line is shifted into a 16-bit register, MSB first, one bit per
`clk160` cycle. A phase counter modulo 16 records where each Sync (`0x817E`)
ends.

- **Lock.** Five Syncs at the same phase lock the link. A Sync at another
  phase restarts the count.
- **Loss of lock.** Once locked, a Sync at another phase drops the lock. So
  do 64 frames in a row without a Sync.
- **Handover to `clk20`.** At each frame boundary the word is captured. Its
  valid flag is held for exactly 8 fast cycles, so `clk20` (derived from the
  same clock) samples each word exactly once, with no handshake.
- **Status.** `sync_locked_out` is the lock state synchronized into the
  20 MHz domain.

## Commands, triggers and registers (CRU: `cru`, `cmd_decoder`, `trigger_arbiter`, `gcr`)

The command set is that of the RD53B readout chip. Its main symbols are:

| Kind | Value |
|------|-------|
| Sync | `0x817E` |
| PLL-lock | `0xAAAA` |
| Noop | `0x6969` |
| WrReg | `0x66` |
| RdReg | `0x65` |
| Clear | `0x5A` |
| GlobalPulse | `0x5C` |
| Cal | `0x63` |

There are also 15 trigger symbols and 32 data symbols, each carrying 5 bits.

Most commands carry a chip-ID symbol. Its bit 4 means broadcast, and bits
3:0 are compared with the `chip_id` pins.

| Command | Payload |
|---|---|
| WrReg | 6 data symbols: `{0, addr[8:0], data[15:0], 0000}` |
| RdReg | 2 data symbols: `{0, addr[8:0]}` |
| Cal | 4 data symbols, passed on as `cal_data[19:0]` with a `cal` pulse |
| Clear, GlobalPulse | none; they give one-cycle pulses |

A trigger frame is a trigger symbol followed by a 5-bit tag. Trigger frames
may arrive in the middle of another command's payload.

An invalid symbol raises `sym_err` and returns the decoder to idle.

**Trigger slots.** A frame lasts two BCID cycles, so its 4-bit trigger
pattern maps onto two slots:

- slot 0 = `pat[3] | pat[2]`, issued one cycle after the frame;
- slot 1 = `pat[1] | pat[0]`, issued one cycle later.

The trigger ID sent with each one-bit trigger is `{tag, slot}` (6 bits).
Frames come at most every two cycles, so the two slots of consecutive
frames never collide. An assertion and the `collision` output guard this
rule.

**Registers.** There are 16 registers of 16 bits; addresses are 9 bits wide.

| Register | Contents | Reset |
|---|---|---|
| 0 | trigger latency in BCID ticks | 100 |
| 1 | bit 0 trigger enable, bit 1 hit enable | 3 |
| 2–15 | general purpose | 0 |

Writes to addresses of 16 and above are ignored, and reads of them return 0.
RdReg produces a 24-bit readback word `{addr[7:0], data[15:0]}` one cycle
later, for the transmission unit.

## Trigger memory (TRU: `tru`, `trg`, `eoc`, `data_merge`, `s1_fifo`, `s2_storage`, `priority_chain`, `bcid_counter`)

This is the heart of the chip and the part that needs the most care.

**Timestamps.** A 9-bit BCID counter runs at 20 MHz and is also brought out
to the matrix. Alongside it runs `bcid_dly = bcid - latency`, the BCID whose
hits the current trigger would select.

A pixel stores a 7-bit Le. The end of column (`eoc`) extends it to 9 bits
using the current BCID. The upper bits come from the BCID, minus one wrap
when the pixel's Le is ahead of the BCID's low bits. This is exact as long as
a hit reaches the end of column less than 128 ticks after its leading edge.

**Storage path of one trigger group (`trg`).** A group serves four double
columns, eight pixel columns in all. Hits pass through these stages:

1. **S0.** Each `eoc` has a 2-entry buffer with a valid/ready handshake to
   its double column. While hit enable is off, hits are taken and thrown
   away.
2. **Merge.** A round-robin arbiter (`data_merge`) merges the four streams,
   one hit per cycle. It records which double column each hit came from,
   for the address fields described below.
3. **S1** (`s1_fifo`, 32 deep). A plain FIFO. Its output has overload
   protection: a head hit whose trigger time has already passed (when
   `le - bcid_dly` is zero or negative, modulo 512) is discarded, and
   `s1_expired` pulses.
4. **S2** (`s2_storage`, 8 slots). S2 holds hits until their time comes. In
   the cycle where `bcid_dly == le`:
   - if a trigger is present, the slot is tagged with the trigger ID and
     kept;
   - otherwise the slot is freed.

   Tagged slots wait until their ID is requested.

The stages back up in order. S2 full stalls S1, S1 full stalls the merge,
and a full S0 drops `dc_ready` toward the matrix. A hit can therefore only
be lost by expiring in S1. That happens when it waited so long behind others
that its trigger time passed.

**Readout order (`tru`).**

1. Every trigger pushes its ID into an 8-deep request queue.
2. The head ID is broadcast to all 112 groups as the requested ID.
3. Every group holding a hit tagged with that ID raises a request.
4. A token-passing priority chain (`priority_chain`) grants the lowest
   requesting group.
5. The granted hit moves to the output register.

When no group holds the head ID any more, it is popped and the next trigger's
hits follow. Hits therefore leave trigger by trigger, in trigger order.

A trigger that finds the queue full is flagged on `rq_overflow`. Its hits
stay tagged until a Clear.

**Pixel word (35 bits).** Fields from the most significant bit:

| Field | Bits | Contents |
|---|---|---|
| pixel in DC | 10 | `{row[8:0], column in the double column}` |
| DC in block | 3 | `{group index bit 0, DC index in the group}` |
| block | 6 | group index / 2 |
| Le | 9 | extended leading edge |
| Te | 7 | trailing edge |

A block is eight double columns, i.e. two neighbouring trigger groups. The
448 double columns therefore form 56 blocks, and every pixel has its own
address. The 464 rows need only 9 bits, which leaves room in the 10-bit
field for the column bit.

## Output link (TXU: `txu`, `async_fifo`, `frame_gen`, `enc8b10b`, `serializer`)

**Entry into the FIFO (`clk20`).** Readback words and pixel words enter a
16-deep dual-clock FIFO with Gray-coded pointers.

- Readback has priority: `pix_ready` is low while a readback word is being
  written or the FIFO is full.
- A readback word that meets a full FIFO is lost and flagged on `cmd_drop`.
- A pixel word is stored as five bytes `{select, 7 data bits}`. The select
  bit is set on the first byte of each hit.

**Framing (`clk32`).** The framer reads the FIFO and sends one byte per
cycle, each as a 10-bit 8b/10b symbol:

```
readback:  IDLE  SOF_C(K28.2) addr data[15:8] data[7:0] EOF_C(K28.3)  IDLE
hits:      IDLE  SOF_H(K28.6) 5 bytes [5 bytes ...] EOF_H(K28.4)       IDLE
```

The line between packages carries IDLE (K28.1). Hits already waiting in the
FIFO are chained into the same package. Running disparity is kept across all
symbols. Symbol bit 0 (bit `a` of the code) is sent first.

**Serializer.** A mod-5 counter loads each symbol into two 5-bit shift
registers, one for the even bits and one for the odd bits:

- the even register shifts on the rising edge of `clk160`;
- the odd register shifts on the falling edge;
- `tx_out` shows the even register while the clock is high and the odd
  register while it is low.

This gives 10 bits per 5 cycles, or 320 Mb/s. The output mux is clocked by
the clock itself. In silicon that mux and the relation between the load
counter and the `clk32` phase need attention (see below).

Link capacity: 32 Mbyte/s of symbols, or at most 6.4 M hits/s before
package overhead.

## Sizes at the chip's stated hit rate

At the stated limit of 120 MHz/cm² the 4.53 cm² matrix makes 543 M hits/s.
Each group of 8 columns gets 4.85 M of them, or 0.24 per 50 ns tick. The
trigger latency is 100 ticks, so a group holds on average 24 hits waiting
for their trigger time. S1 (32) plus S2 (8) gives 40 entries per group,
about three standard deviations above the mean. The merge and S1 accept one
hit per tick, four times the average rate.

Each trigger selects one tick, about 27 hits at that rate. So the output link
carries at most about 230 k triggers/s. No trigger rate is specified for the
chip.

## How far this follows the chip description

Taken from the description:

- the four units and their clock rates (160, 32 and 20 MHz);
- the Sync word and the lock rules (5 Syncs, loss after 64 frames);
- 112 trigger groups of four end-of-column blocks with S0/S1/S2;
- round-robin merge, discard-on-expiry in S1, tagging at the end of the
  latency in S2;
- the token-based priority chain;
- the 9-bit Le and 7-bit Te BCID, and the 35-bit pixel word (field
  widths as given) with 5 select bits;
- the 24-bit readback word (8-bit address + 16-bit data);
- the FIFO between 20 and 32 MHz, the package formats with K28.1 IDLE;
- the double-edge 10:1 serializer.

This design's own choices:

- the RD53B symbol values, except Sync;
- the WrReg/RdReg payload layout, and the trigger-slot mapping and 6-bit
  trigger ID;
- the register map and its defaults (latency 100, both enables on);
- the 7-bit pixel Le;
- all buffer depths: S0 2, S1 32, S2 8, request queue 8, TX FIFO 16;
- the valid/ready handshakes;
- the request queue itself (the description only shows a "trigger ID
  request" signal);
- the SOF/EOF K-codes, and 8b/10b itself (inferred from 10-bit symbols and
  K28.1);
- readback priority in the FIFO;
- the Clear behaviour (it empties the trigger memory and the request queue,
  but not the BCID counter).

Known differences and open points:

- **Address fields.** The description gives the field widths (10-bit
  "row", 3-bit "DC inside block", 6-bit block) but not how blocks map onto
  trigger groups. The mapping above (two groups per block, column bit in
  the row field) is this design's reading. It is the one that makes 112
  groups fit in 6 bits.
- **Trigger ID.** The trigger ID is not in the pixel word. A receiver
  assigns hits to triggers by order, since packages follow trigger order and
  the start of the next trigger's hits is not marked.
- **Lock-loss rule.** Lock loss is described both as 64 commands and as 64
  bytes without a Sync. This design counts 64 frames of 16 bits.
- **Serializer timing.** The serializer's mod-5 load counter runs freely
  from reset. Because the symbol changes every 5 cycles, each symbol is
  taken exactly once whatever the phase. A silicon implementation should
  still tie the load phase to `clk32`, so the capture edge stays away from
  the symbol change.
- **No lane alignment.** There is no lane-alignment or deskew logic. The
  receiver finds symbol boundaries from the K28 commas.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Shared pieces are in these files:

- `tb/tb_ref_pkg.sv`:
  - reference encoders for the command symbols;
  - an 8b/10b encoder written from the code's sub-block tables, with a
    decoder built from it;
  - a stream monitor that checks disparity and package structure and
    rebuilds readback and hit words.
- `tb/tb_macros.svh`: the check and finish macros.

With Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/obelix_pkg.sv tb/tb_ref_pkg.sv tb/tb_tru.sv \
  --top-module tb_tru -o sim && ./obj_dir/sim
```

**End-to-end tests.** `tb_obelix_top` drives the chip only through its pins,
with 8 trigger groups. It takes the chip through:

- lock;
- register writes, including one addressed to another chip, and readback;
- random hits and triggers;
- an overload of one group (double-column stall, S1 expiry);
- a cluster on every column read out by one trigger (TX FIFO stall, chained
  package) with a burst of empty triggers behind it (request-queue
  overflow);
- hit and trigger disable;
- Clear, GlobalPulse, Cal and a bad symbol;
- loss of lock and relock.

It decodes the serial output and checks every hit and readback word against
a model, in trigger order. It counts each of these mechanisms and fails if
any of them never happened.

`tb_obelix_top_full` runs the same test on the chip at its default size
(112 groups, 448 double columns, no parameter overrides). Verilator needs
several minutes to build it; the simulation itself takes about a second.

Testbenches start their asynchronous resets high and pull them low after
1 ns. A 2-state simulator needs that edge to apply them.
