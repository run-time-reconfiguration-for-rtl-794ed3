# HyperTransport cave with run-time reconfigurable modules

An FPGA attached directly to an AMD processor's HyperTransport (HT) bus can
only be used as a reconfigurable accelerator if the host link survives the
reconfiguration. If the whole FPGA is reloaded, the link drops, and the
operating system cannot cope, since hot plug is not supported. The answer
is partial reconfiguration. A static part of the FPGA holds the HT
endpoint (the *cave*) and some infrastructure. One or more reconfigurable
regions hold *run-time reconfigurable modules* (RTRMs), which the host
swaps while the link keeps running.

This repository holds SystemVerilog RTL for that static infrastructure and
for the two example RTRMs of the original work:

* a **pattern matcher** that checks 290 32-bit patterns against a byte
  stream, at every byte offset, one 32-bit word per clock;
* a **Mersenne twister** (MT19937) that gives one 32-bit random number per
  clock and hands a new one to every host read.

The design follows a published description of the system (HT cave,
Virtex-4 FX60 HTX card, host software built on the ACCFS accelerator file
system). That description names the blocks and what they do, and
describes the pattern matcher in some detail. Everything else is this
design's own choice: packet format, handshake timing, address map,
register layouts and the twister's internals. These choices are marked as
such below and in each file's header comment.

## Structure

```
             host -> cave                        +-----------------+
 HT cave  --P/N/R--> ht_packet_engine --req--> internal_routing_unit --+--> reconfig_unit --> ICAP pins
 core     <--P/N/R--                 <-resp--                          |
 (ports)                             <-module req/resp--               +--> rtrm_controller[0] <-> pattern_matcher  (slot 0)
                                                                       +--> rtrm_controller[1] <-> mt32             (slot 1)
```

| file | role |
|---|---|
| `rtl/rtr_pkg.sv` | shared types: HT packet, internal request, ICAP bus; reconfig register offsets |
| `rtl/ht_rtr_cave_top.sv` | top: wires everything; HT channels, ICAP pins and interrupts are ports |
| `rtl/ht_packet_engine.sv` | HT packets to and from internal requests; source-tag queue for host reads |
| `rtl/internal_routing_unit.sv` | address decode to the targets, in-order responses, module-request arbitration, RTRM-to-RTRM routing |
| `rtl/rtrm_controller.sv` | one per slot: physical to virtual address, RTRM entity, decoupling |
| `rtl/reconfig_unit.sv` | bitstream FIFO into the ICAP, slot reset and decouple, version register |
| `rtl/pattern_matcher.sv`, `rtl/pm_unit.sv` | pattern matcher RTRM and its per-pattern unit |
| `rtl/mt32.sv` | Mersenne twister RTRM |
| `rtl/dp_ram.sv` | dual-port block RAM used by the matcher |

The host-specific part is the packet engine, plus the HT link core, which
is not included. Everything from the routing unit on does not depend on
HT. To move to another bus such as PCI Express, replace the packet engine.

Not included: the HT link and physical layer (the cave core), the ICAP
primitive, and the hard macros and clock primitives that a partial
reconfiguration flow places at the region boundary. None of these has a
logic function of its own in this design. The cave core's packet channels
and the ICAP's pins are ports of the top.

## The RTRM entity: the one interface that never changes

The reconfigurable region is a black box whose port list is fixed, so
every module ever loaded must use the same entity. Both RTRMs here use it
unchanged:

| group | signals | meaning |
|---|---|---|
| clock, reset | `c2m_clk`, `c2m_res_n` | reset is held by the cave while the region is rewritten |
| controller requests | `crq_c2m_addr[31:0]`, `crq_c2m_data[31:0]`, `crq_c2m_wr_rd`, `crq_c2m_rq_valid`, `crq_m2c_stop` | host load/store into the module, in the module's own 32-bit virtual address space |
| their responses | `crq_m2c_data[31:0]`, `crq_m2c_rp_valid`, `crq_c2m_stop` | read data back to the host |
| module requests | `mrq_m2c_addr`, `mrq_m2c_data`, `mrq_m2c_wr_rd`, `mrq_m2c_rq_valid`, `mrq_c2m_stop` | the module reads or writes host memory |
| their responses | `mrq_c2m_data`, `mrq_c2m_rp_valid`, `mrq_m2c_stop` | host read data back to the module |
| interrupt | `m2c_intr` | |

`c2m` means controller to module and `m2c` module to controller. Every
transfer uses **valid/stop**: the sender raises valid and keeps its data
stable, and the word moves in the first cycle where the receiver's stop is
low. The stop signals are combinational, in the style of a ready signal
inverted. Writes get no response. Each read gets exactly one response, in
request order. The same handshake is used on every internal link and on
the HT packet channels of the top.

Each module has its own 32-bit virtual address space. The RTRM controller
of a slot subtracts the slot's base from the physical HT address. No
module therefore needs fixed global addresses, and the same bitstream
works in any slot.

## Reconfiguring a slot without losing the link

The reconfig unit sits behind the first address window. The host driver
works through its registers (byte offsets):

| offset | register | |
|---|---|---|
| 0x00 | CTRL | bit 0 reconfig, bits [7:4] slot |
| 0x04 | STATUS | bit 0 idle (FIFO empty and ICAP not busy), bit 1 FIFO full |
| 0x08 | DATA | next bitstream word (write) |
| 0x0C | VERSION | {cave version, board version}, checked by the driver against the bitstream header |
| 0x10 | COUNT | words written into the ICAP; a write clears it |

Reconfiguring a slot takes four steps:

1. Set CTRL.reconfig with the slot number. This holds that RTRM in reset
   and decouples it. Its controller then ignores the module's outputs,
   drops writes to the slot and answers reads itself with `0xFFFFFFFF`.
   The host can never hang on a half-written region.
2. Write the partial bitstream word by word to DATA. A 16-word FIFO
   absorbs bursts. While it is full, the write is held by the stop
   handshake and nothing is lost.
3. Poll STATUS until it reads idle. The unit writes one word per clock
   into the ICAP (32 bits, up to 100 MHz on Virtex-4) whenever BUSY is
   low.
4. Clear CTRL.reconfig. The new module leaves reset.

The rest of the cave, and the other slot, keep working throughout.

In real hardware a slot's contents change when the bitstream lands. In
RTL a slot is bound to one module, so the top has **two slots**: slot 0
holds the pattern matcher and slot 1 the twister. Reconfiguring a slot
shows up here as the reset and decoupling sequence above. The original
system loaded both modules, one after the other, into a single region
that the matcher nearly fills. The two-slot top lets both be simulated
side by side.

## Host address map

With the default `BAR_BASE = 0x00_8000_0000`:

| physical HT address | target |
|---|---|
| `BAR_BASE + 0x0000_0000` | reconfig unit registers |
| `BAR_BASE + 0x0800_0000` | slot 0, 128 MiB (the RTRM decodes the lower 27 bits) |
| `BAR_BASE + 0x1000_0000` | slot 1, 128 MiB |
| anything else | no target: writes dropped, reads return all ones |

Reads may be in flight for one source and one target at a time, up to
15 of them. A read from another source or for another target waits until
they are answered. This keeps responses in
order without a reorder buffer. Host read tags are queued in the packet
engine, up to 8 reads in flight. Posted writes overtake waiting reads.

Module requests carry their virtual address as the physical address
(`MRQ_BASE = 0`). Slot 0 has priority over slot 1. A module request whose
address falls in a slot window goes to that slot (RTRM-to-RTRM traffic).
It shares the way to the targets with host requests, and the host wins
when both are ready. Any other module request goes to the host. A slot
never has reads in flight to the host and to another slot at once, so its
responses stay in order. Neither example RTRM issues module requests.
Both paths exist and are tested at unit level only.

## Pattern matcher

Registers and memories (RTRM virtual byte addresses):

| address | content |
|---|---|
| `0x000_0000` | control: bit 0 start (self-clearing), bits [31:16] database length L in words |
| `0x000_0004` | status: bit 0 finished, bit 1 busy |
| `0x100_0000` | database, `DB_WORDS` words, the byte stream with its first byte in bits [7:0] |
| `0x200_0000` | patterns, `NUM_PATTERNS` words |
| `0x300_0000` | results, `NUM_PATTERNS` words: hits of pattern p |

After a start write, the controlling FSM goes through three phases:

1. It copies the patterns into `NUM_PATTERNS` matcher units, one per
   clock.
2. It streams the database, one word per clock. A 56-bit window holds the
   current word and the low three bytes of the next one. Each unit has
   four 32-bit comparators on window bits `[31:0]`, `[39:8]`, `[47:16]`
   and `[55:24]`, which cover every byte alignment. Each unit adds its
   hits (0 to 4) to its counter. At the last word only the unshifted
   comparator is enabled, so a match never runs past the end of the data.
3. It writes the counters to the results memory, sets *finished* and
   pulses `m2c_intr`.

A run over L words takes `2*NUM_PATTERNS + L + 4` clocks, and the scan
itself `L + 3`. With 290 units, that is 1160 32-bit comparisons per clock,
or 116 billion per second at 100 MHz. The memories are dual-ported, so
the host can read and write them while the FSM runs, which the design
does not protect against.

Original: the FSM, four comparators per pattern, the 56-bit window moved
by 32 bits per clock, one control and one status register, dual-port RAMs
for database, patterns and results, the lower-27-bit map and the 290
units. Own choices: the result format (hit counts), the database depth
(8192 words), the register bits, the region encoding and the interrupt.

## Mersenne twister

The twister implements MT19937. Its 624-word state is a circular buffer.
One twist step per clock reads words `i`, `i+1` and `i+397` (mod 624),
rewrites word `i` and advances `i`. Because the update is in place, the
twist is spread over 624 steps and the output is exactly the reference
sequence. The first number for seed 5489 is 3499211612. Each new word is
tempered on its way out. A read at any address returns the next number
one clock later. Back-to-back reads get one number per clock. A write at
any address reseeds the generator with the written value. The reference
seeding recurrence then runs on chip for 623 clocks, during which
`crq_m2c_stop` holds requests off. After reset the seed is 5489. The
internals and the seeding interface are this design's own.

## How far to trust it

* Every block has a self-checking testbench against values computed
  independently in the testbench: software MT19937, byte-by-byte hit
  counts, shadow register copies and order-sensitive ICAP checksums.
  Rates are checked in clock cycles.
* `tb_ht_rtr_cave_top` runs the whole cave at the default sizes (290
  units, full 8192-word database) through these steps:
  1. It reads the version register and reconfigures slot 0.
  2. It runs a full match and checks all 290 results and the run time.
  3. It reconfigures slot 1 and checks 1000 twister numbers, with reads in
     flight, stalls and writes mixed in.
  4. It reads an unmapped address.

  It also counts and requires each mechanism at least once: decoupled
  answers, ICAP BUSY stalls, a full bitstream FIFO, posted writes passing
  reads, the target-change hold, unmapped reads, the interrupt and
  response stalls. It takes a few seconds.
* Simplifications: an HT packet here is one 32-bit word with a 40-bit
  address and a 5-bit tag. The design has no byte masks, multi-word
  packets, non-posted writes, error responses or HT interrupts (RTRM
  interrupts are top-level ports). Responses from the host to module
  reads are assumed to arrive in order.
* RTRM-to-RTRM traffic is routed, but no example RTRM issues module
  requests, so the end-to-end test cannot reach it. The unit test covers
  it. An RTRM that reads its own window while holding back its control
  requests would deadlock. Module requests cannot reach the reconfig unit.
* Decoupling a slot while one of its reads is still outstanding loses
  that response. The driver must let reads drain first.
* The ICAP model honours BUSY the way this reconfig unit uses it: a word
  is strobed the clock after BUSY was seen low. Check this against the
  primitive's data sheet before use on silicon.
* One clock domain throughout. A real HT core may deliver packets on a
  different clock than the one used here, and then needs clock-crossing
  FIFOs.

## Simulating

All files are plain SystemVerilog-2017 with one module per file. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rtr_pkg.sv tb/tb_ht_rtr_cave_top.sv --top-module tb_ht_rtr_cave_top -o sim
./obj_dir/sim
```

Replace the testbench name to run a unit test: `tb_pattern_matcher`,
`tb_mt32`, `tb_reconfig_unit`, `tb_rtrm_controller`,
`tb_internal_routing_unit` or `tb_ht_packet_engine`. Each one prints
`TB_RESULT checks=N failures=M` and stops, with a watchdog that counts a
failure if it hangs. `tb/icap_model.sv` is a behavioural stand-in for the
ICAP.

Parameters worth changing: `NUM_PATTERNS` and `DB_WORDS` on the top or the
matcher, `BAR_BASE` on the top, `FIFO_DEPTH` and the version numbers on
the reconfig unit, and `TAG_DEPTH` on the packet engine. The slot windows
are 2^27 bytes (`SLOT_SHIFT`), matching the 27 address bits an RTRM
decodes.
