# Physical Node: a 64-neuron Sigma-Pi processor in SystemVerilog

This is the RTL of one *Physical Node* (PN). It is a single chip of a
neurocomputer that emulates 64 artificial neurons, called *Connection Nodes* (CNs).
Each CN computes a weighted sum of *products of pairs of inputs*, not a plain
weighted sum:

    OUT = f( sum over k of  w_k * in_k1 * in_k2 )

- Each product `in_k1 * in_k2` of two 8-bit input values is a *2-codon*.
- Each weight `w_k` is 16 bits.
- The sum is kept at full precision in 41 bits.
- The firing function `f` keeps the upper eight bits of the sum (bits 40..33), giving an 8-bit OUT.

The chip is event driven. Nothing is computed until an input value changes. When
one changes, the chip works out which of its CNs use that input, recomputes
exactly those CNs, and sends each new OUT to the rest of the machine. A CN whose
OUT did not change sends nothing. This keeps the traffic between chips low.

Almost all state lives in one external byte-wide DRAM:

- the latest value of every input;
- the table of which CNs use each input;
- the product pairs;
- the weights.

The chip itself is a set of small state machines around a memory controller. The
design is therefore bound by memory bandwidth. One 2-codon costs ten DRAM bytes,
so at one byte per clock a 2-codon costs ten cycles.

## Where inputs come from: the Broadcast Hierarchy

PNs talk over a *Broadcast Hierarchy* (BH). A BH level is a shared network: every
PN on it hears every packet. A packet is `{8-bit value, originator address}`.

| level | reach | address bits | packet bits | IDB numbers |
|---|---|---|---|---|
| internal | the PN's own 64 CNs | 6 | 14 | 1 .. 64 |
| BH 1 | 4 PNs = 256 CNs | 8 | 16 | 65 .. 320 |
| BH 2 | 32 PNs = 2048 CNs | 11 | 19 | 321 .. 2368 |
| BH 3 | 128 PNs = 8192 CNs | 13 | 21 | 2369 .. 10560 |

A PN therefore stores 10,560 possible inputs. The converter gives every input a
number, its *IDB address*: level address + level offset (0, 64, 320, 2368) + 1.
Number 0 is kept free to mean "no input".

Every CN output is broadcast on all four levels. Its address on a level is a
per-level base register plus the CN number (0..63). The base registers are
loaded at initialisation, so a PN needs no fixed identity.

The internal level is a real serial link, looped back on chip. A PN's own
outputs therefore come back to it as inputs. They use the same deserialiser, FIFO
and converter hardware as an external level. Its network grant is always given.

**Serial protocol (this design's own).** While `frame` is high, one bit arrives
per clock, most significant bit first. The data byte comes first, then the
address. A transmitter raises `tx_req` and waits for `tx_gnt`. It keeps `tx_req`
up for the whole packet, with `tx_frame` high during the W data bits. A receive
frame that ends before W bits is discarded and reported on `frame_err`.

## The external memory image

Everything the CNs need sits in one 4 Mbit (512 KB) byte-wide DRAM, arranged as
below. Requesters never form byte addresses. They pass the memory controller a
*region code*, a *logical index* and a byte count. The controller shifts the index
by the element size and adds the region base.

| code | region | base | bytes per element | index | contents |
|---|---|---|---|---|---|
| 0 | IDB, Input Data Buffer | 0x00000 | 1 | IDB address 1..10560 | latest value of each input |
| 1 | ICF, Input CN Flags | 0x04000 | 8 | IDB address | 64 bits, one per CN; byte j holds CNs 8j..8j+7, bit i of it CN 8j+i |
| 2 | PT, 2-codon Products Table | 0x20000 | 4 | pointer 1..8191 | IDB address of input 1, then input 2 (16 bits each, little-endian) |
| 3 | UT, 2-codons Used Tables | 0x28000 | 2 | CN*512 + k | 13-bit pointer into PT (little-endian); 0 ends the list |
| 4 | WT, Weight Tables | 0x38000 | 2 | CN*512 + k | 16-bit weight of the k-th 2-codon of the CN (little-endian) |

The data structures work as follows:

- **Used Table.** A CN's Used Table lists up to 512 pointers into the shared
  Products Table. Entry `k` pairs with weight `k`.
- **Products Table.** An entry names the two inputs whose values are multiplied.
- **Pass-through entries.** If one of the two IDB addresses is 0, the other input
  passes through unchanged. This covers a CN that needs `w * in` on a single input.
- **Both addresses zero.** Such an entry gives a zero product.
- **ICFs.** The ICFs are the reverse index: for each input, which CNs must be
  recomputed when it changes.

The host loads everything except the IDB values before START. The PN itself
only ever writes IDB bytes.

Used space is 259 KB of the 512 KB. The packed bit-level sizes add up to about
1.9 Mbit. The byte-aligned layout trades that density for simple addressing.

## How a changed input flows through the chip

```
 serial in ──► deserialiser ──► 4-deep FIFO ──► address conversion ─┐   (x4 levels)
                                                                    ▼
                                         Input control: write IDB byte, read 8-byte ICF
                                                                    │ CN Update Required (64 pulses)
                                                                    ▼
   Update products: Used Table ─► PT entry ─► two IDB bytes ─► 8x8 multiply ─► 2-codon
                                                                    │ 2-codon Available, CN Active
                                                                    ▼
   Update sum: weight k ─► 16x16 multiply ─► 41-bit accumulate ─► firing function (bits 40..33)
                                                                    │ OUT Available / OUT Accepted
                                                                    ▼
   Output control: compare with Last OUT table ─► Broadcast Required
                                                                    ▼
   base + CN number ─► 4-deep FIFO ─► network controller ─► serial out   (x4 levels)
```

All DRAM traffic goes through one **memory controller** (`emc`). It has three
requesters, in fixed priority:

1. input control;
2. update sum;
3. update products.

Arbitration happens only between block transfers. A block is 1..8 bytes, and a
write is one byte. The first byte moves in the grant cycle, then one byte per
clock. While `hold` is high the controller makes no access at all, even in the
middle of a block.

The input logic comes first so that new inputs are taken in at once, even while a
CN is being computed. The sum logic comes before the products logic: a weight is
then always fetched before the products logic can deliver the next 2-codon.

### Input control

The input control serves the four level FIFOs round-robin, one input at a time.
For each input it costs nine DRAM bytes:

- it writes the value into the IDB;
- it reads the 8-byte ICF;
- one cycle after the last ICF byte it pulses `upd_pulse[c]` for every set bit.

### Update products, and what a restart means

The products logic keeps a 64-bit *pending* set of CNs to recompute, fed by the
update pulses. When the sum logic is idle, it takes the lowest pending CN:

1. It raises that CN's `cn_active` bit.
2. It loads the CN's Used Table into a 512 x 13 on-chip buffer, one 2-byte read
   per entry, until a zero pointer or entry 511.
3. For each buffered pointer it reads the 4-byte PT entry and then the one or two
   IDB bytes.
4. It multiplies the two bytes and strobes `codon_avail` with the 16-bit product.
5. When the list is done it drops `cn_active` and returns for the next pending CN.

A CN with an empty table still raises and drops `cn_active`, so it fires a zero
sum.

A new input can change a CN while that CN is being computed. That is, an
update pulse arrives for the active CN. The partial result is then stale, and the
CN restarts:

- The 2-codon in flight is finished but not delivered.
- `restart` pulses.
- Computation starts again at entry 0 from the on-chip Used Table buffer, which
  costs no reload.
- The sum logic sees the same pulse while the CN is active and clears its partial
  sum. So the final OUT always reflects the newest inputs.

A pulse for any other CN only sets its pending bit. The active CN is not
disturbed.

### Update sum and the OUT handshake

The sum logic follows whichever CN is active. For every 2-codon it fetches
weight `k` (2 bytes). A pipeline register multiplies 16x16, and a second stage
adds into the 41-bit accumulator. When `cn_active` falls and the pipeline has
drained, it enters its fire state:

1. It loads the sum into the firing function.
2. It raises `out_avail[cn]`.
3. It lowers `out_avail[cn]` once `out_accepted[cn]` comes back.

It does not fire a new sum while an earlier OUT is still waiting to be accepted.
The firing function register therefore holds OUT steady until the output logic
has taken it.

The products logic starts a new CN only while the sum logic is idle
(`sum_idle`). Otherwise 2-codons of one CN could reach the sum logic while it is
still firing the previous one.

### Output control

The output logic takes a waiting OUT (lowest CN first) and latches the value. In
the next cycle it compares the value with the CN's entry in the 64-byte Table of
Last OUT Values:

- **Equal:** nothing is sent, and `unchanged` pulses.
- **Different:** once all four output FIFOs have room, it raises Broadcast
  Required and updates the table. Each level's translator then pushes
  `{OUT, base + CN}`.

A full output FIFO stalls the output logic, so no output is ever lost. In
contrast, a full *input* FIFO drops the new packet and counts the drop. The
architecture accepts occasional input loss.

## Control: START, HALT, HOLD and PIO

| signal | effect |
|---|---|
| `start` / `halt` | set / clear the run flag (HALT wins). While halted, arriving packets wait in the input FIFOs and nothing new is started or sent. Work already under way finishes. |
| `hold` | the PN makes no DRAM access, so a host can use the DRAM; everything else keeps running and waits for memory |
| `busy` | something is still queued, being computed or being sent (this design's addition, so a host can see when the PN has settled) |

The PIO port reaches the internal registers. It has a 10-bit address, a
direction line, a four-phase `req`/`ack` handshake and 16-bit data buses. While
the PN runs, every access except the status read is held off (no `ack`) until
HALT.

| address | register |
|---|---|
| 0x000 – 0x03F | Table of Last OUT Values, CN 0..63 (read/write) |
| 0x040 – 0x043 | base address of the internal level and BH levels 1..3 (read/write) |
| 0x044 | status `{busy, run}` (read, also while running) |
| 0x045 – 0x048 | input FIFO drop counters, per level (read) |
| other | read as 0 |

Presetting the Last OUT table at initialisation decides which first results get
broadcast. This is useful when a single new input is all that a fresh run will
see.

## Timing

The timing model of the original architecture, at 10 MHz, is

    R = 900 ns * I + 1000 ns * N * L + 700 ns * N

where:

- `I` is the number of inputs that change;
- `N` is the number of CNs they affect;
- `L` is the mean Used Table length of those CNs;
- `R` runs to the start of the last output transmission.

This design spends exactly the 9 bytes per input and 10 bytes per 2-codon that
the model counts. Per CN it spends 16 cycles where the model has 7. The extra
cycles come from:

- the 2-byte read that finds the Used Table's end marker;
- the hand-offs between the products, sum and output state machines;
- the fire state and the output compare.

Each CN's own broadcast also returns over the internal level as a new input (9
more DRAM bytes). Measured at the default sizes, with inputs queued before START:

| load | I | N | L | model | this design |
|---|---|---|---|---|---|
| minimum | 1 | 1 | 1 | 2.6 µs | 3.5 µs |
| light | 5 | 5 | 20 | 108.0 µs | 112.4 µs |
| light | 5 | 10 | 20 | 211.5 µs | 220.4 µs |
| medium | 12 | 32 | 256 | 8225 µs | 8254 µs |

The difference is 0.9 µs per CN, which only matters for very short tables. Some
things add to this:

- A restart adds the fetches repeated so far.
- Serial packets take one clock per bit on the wire.
- The input logic can take an input every 9–10 cycles, but three BH levels
  together can deliver one every 6–7 cycles. Sustained input at full rate on
  all levels will therefore overflow the input FIFOs.

Nothing in the timing model depends on DRAM page modes: the port does one byte
per clock with a same-cycle read.

Synthesis of the whole PN gives about:

- 1,900 cells;
- 8,900 flip-flop bits, of which 6,656 are the Used Table buffer;
- 408 bits of read-only memory: the region base and shift table of the memory controller. The FIFOs and the Last OUT table are flip-flops.

The 41-bit adder, the 16x16 multiplier and the 8x8 multiplier are the only wide
arithmetic.

## Where this design departs from, or fills in, the architecture

- **Serial link, arbitration and pins.** The architecture fixes only that each
  level is serial. The framing, the bit order and the request/grant pair are this
  design's own.
- **DRAM port.** It is a flat 19-bit byte address with a same-cycle read. It has
  no multiplexed row/column address, no RAS/CAS and no refresh. Refresh belongs to
  the board's I/O controller. To drive a real DRAM, put a controller behind
  `mem_*` and stretch the grant/valid timing. The requesters already wait for
  `mgnt`/`mrvalid`.
- **Used Table loading.** The architecture reads the whole Used Table into the
  on-chip buffer in one transfer. Here it is read one entry at a time, up to the
  end marker, so short tables cost only what they use. The buffer is still
  reused on a restart.
- **Region layout.** The region layout, little-endian fields and byte-aligned
  elements are this design's own. The packed bit sizes would fit in 2 Mbit; this
  layout needs 259 KB.
- **IDB numbering.** The IDB numbering starts at 1 on every level (offset + 1),
  and 0 means "no input". The Products Table therefore has 8,191 usable entries,
  not 8,192.
- **Arithmetic.** All arithmetic is unsigned.
- **Sum-logic restart.** The sum logic clears its partial sum on a restart. The
  architecture describes the discard only for the products side.
- **Update pulses and the sum/output logic.** In the architecture, the sum and
  output logic watch the CN Update Required pulses and wait for the matching CN
  Active or OUT Available bit. Here they simply serve whichever CN Active or
  OUT Available bit is raised. Only one CN is active at a time, so the outcome is
  the same.
- **New CN only when the sum logic is idle.** The products logic waits for the
  sum logic to be idle before it starts a new CN.
- **Full output FIFO.** The broadcast waits. The architecture does not say what
  happens then.
- **Not built:**
  - the comparison "within a threshold" (exact equality only);
  - the per-CN Broadcast Control Field (every OUT goes to all levels);
  - a PIO view of the FIFO registers.
- **Outside the chip:** the BH networks, the board's I/O controller and
  microprocessor, and the DRAM chip. A behavioural DRAM model for simulation is
  in `tb/dram_model.sv`.

## Verification

Every module has its own self-checking testbench. Each one:

- compares against values worked out independently (queue models, reference
  arithmetic, a model of the DRAM contents);
- has a watchdog;
- prints `TB_RESULT checks=<n> failures=<m>`.

Each testbench was also run against a copy of its module with one deliberate
bug, and fails on it.

| testbench | what it exercises |
|---|---|
| `tb_bh_deserializer` | random 21-bit packets, MSB first, back to back; a cut-off frame |
| `tb_packet_fifo` | random push/pop against a queue; flags; drop on overflow |
| `tb_in_addr_conv` | all four levels, edge addresses, input 10560 |
| `tb_emc` | three random requesters, 1–8 byte blocks, writes, priority, HOLD mid-block |
| `tb_input_control` | IDB writes, ICF-to-pulse mapping, round-robin, run gating, with HOLD |
| `tb_update_products` | full-size tables (empty, 512 entries), pass-through entries, restarts, one active CN, sum_idle gating |
| `tb_update_sum` | 41-bit sums including the worst case, clearing on restart, OUT handshake under slow acceptance |
| `tb_firing_function` | bit selection and hold |
| `tb_output_control` | change/no-change decisions, full-FIFO stall, PIO access to the table |
| `tb_out_addr_translate` | base + CN with wrap-around |
| `tb_network_controller` | grant wait, framing, MSB-first, run gating |
| `tb_pio_regs` | handshake, all registers, hold-off while running |
| `tb_pn_top` | the whole PN at default sizes: a two-layer network (layer 2 fed by the internal loopback) checked against a reference model after every batch, plus HOLD, input overflow, a restart, output back-pressure, suppressed broadcasts, pass-through entries, HALT/START and PIO; counts each of these and fails if one never happens |
| `tb_pn_timing` | response time and DRAM byte counts of the workloads in the table above |

To run one with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_pn_top -y rtl -y tb +libext+.sv -Irtl rtl/pn_pkg.sv tb/tb_pn_top.sv
./obj_dir/Vtb_pn_top
```

`tb_pn_top` covers about 7 ms of simulated time and runs in a few seconds.
`tb_update_products` is the longest unit test.

Every module also passes Verilator's lint and a Yosys synthesis. The warnings
left are these:

- unused package constants;
- unused high bits of shared buses;
- the asynchronous reset seen through assertions' `disable iff`.

## Changing it

- **Sizes.** Sizes are in `rtl/pn_pkg.sv`. The level widths, offsets and
  region map are tied to 64 CNs per PN and to the three-level hierarchy. Change
  them together.
- **Firing function.** The firing function is the single function `fire()` in
  the package. A sigmoid lookup would replace it there and in `firing_function.sv`.
- **Memory layout.** `RGN_BASE`/`RGN_SHIFT` define the memory layout. Only the
  controller uses them.
