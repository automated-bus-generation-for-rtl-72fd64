# Generated bus systems for a four-processor SoC

How a multiprocessor system-on-chip performs depends a great deal on how
its processors reach memory and each other. The bus-generation method
(BusSyn) builds that bus from a small library of modules instead of designing
it by hand. The modules are processor and memory interfaces, bus segments,
bus bridges, arbiters, SRAMs and bidirectional FIFOs. Each processor gets the
same node of modules, a *Bus Access Node* (BAN). The BANs are then wired
together into one of several topologies.

This RTL implements the five bus systems the method presents for four
PowerPC-class processors and 32 MB of memory:

| system  | idea | how processors share data |
|---------|------|---------------------------|
| BFBA    | Bi-FIFO ring | each BAN has private memory; FIFOs link neighbours A→B→C→D→A |
| GBAVI   | segmented global bus | bus bridges split the global bus into one segment per BAN; a BAN writes or reads the next BAN's memory through two bridges |
| GBAVIII | global memory | each BAN has local program/data memory, plus one global bus with a global arbiter and a shared global memory |
| Hybrid  | BFBA + GBAVIII | Bi-FIFO ring *and* shared global memory |
| SplitBA | two subsystems | two pairs of processors, each pair on its own bus with its own memory, joined by a bus bridge |

`bussyn_top` instantiates all five side by side. They are alternatives that
one generator can produce, not parts of one chip. Each system has its own
four processor ports. The processors are not part of this RTL: their
transfers enter at the processor port of each CPU interface.

## One transfer protocol everywhere

Every bus in the design uses the same request/response pair, defined in
`bussyn_pkg`:

* `bus_req_t`: `req`, `we`, 32-bit byte `addr`, 64-bit `wdata`, 8 byte enables `be`.
* `bus_rsp_t`: `ack`, `retry`, 64-bit `rdata`.

A master raises `req` and holds all fields until the slave answers. The
answer is either a one-cycle `ack`, with read data valid in the same cycle,
or a one-cycle `retry`. A retry ends the tenure without doing the transfer,
and the master must issue the transfer again. The next transfer may start in
the cycle after the answer. The CPU bus checks with an assertion that a
pending request stays stable.

Because everything speaks this protocol, the modules stack freely. A
bridge is a slave on one bus and a master on another. The memory interface
of a GBAVI node can sit behind a two-master arbiter. The global bus can
carry the SplitBA bridge as a second slave.

Processor port (`pe_req_t` / `pe_rsp_t`): a one-cycle `ts` (transfer start)
with `rd`, `addr`, `wdata`, `be` starts a single-beat transfer. The CPU
interface answers with a one-cycle `ta` (transfer acknowledge) carrying
`rdata`. The processor must wait for `ta` before its next `ts`, but may
issue the next `ts` in the `ta` cycle. The names come from the PowerPC 60x
bus. Bursts and split address/data tenures are not modelled.

### Address map (every processor)

| address | target |
|---------|--------|
| `0x0xxx_xxxx` | local SRAM of the BAN; word address = `addr[AW+2:3]` |
| `0x1xxx_xxxx` | REGISTERS (offset `addr[5:3]`) |
| `0x2xxx_xxxx` | Bi-FIFO (offset `addr[4:3]`) |
| `0x4xxx_xxxx`–`0x7xxx_xxxx` | global window: the global memory (GBAVIII, Hybrid, SplitBA) or the next BAN's SRAM (GBAVI) |
| `0x8xxx_xxxx` and up | the other subsystem's memory (SplitBA) |

The CPU bus answers an address with no slave behind it with `ack` and zero
data one cycle later. A stray access therefore cannot hang a processor.

## Inside a BAN

`ban` always contains:

* `cbi_mpc755`, the CPU interface;
* `cpu_bus`, the address decoder and response multiplexer;
* `mbi_sram`, the memory interface;
* `sram`, the processor's memory.

Parameters add the rest:

* `HAS_REGS`: `registers`, four mailbox words shared with the two neighbours and a control byte.
* `HAS_FIFO`: `bififo`, the Bi-FIFO towards the next BAN.
* `GLOBAL_MODE = 1`: a `gbi_gb3` onto the global bus.
* `GLOBAL_MODE = 2`: the global window is brought out for a bridge.
* `HAS_RMT`: a second, arbitrated master port into the memory interface.

`ban_g` is the global-memory node (BAN G). It holds the global bus
(`global_bus` with `global_arbiter`), a memory interface and the global SRAM.

The memory interface maps byte address bits `[22:3]` onto the 20-bit word
address of an 8 MB × 64-bit SRAM. Four such SRAMs make up the 32 MB of
BFBA and GBAVI. GBAVIII and Hybrid use four 4 MB local memories and a 16 MB
global memory. SplitBA uses two 16 MB memories. How memory is split between
local and global is this design's choice; only the 32 MB total is given.

### REGISTERS

| offset | register | access |
|--------|----------|--------|
| 0 | `TO_NEXT` | read/write; the next BAN reads it as `FROM_PREV` |
| 1 | `TO_PREV` | read/write; the previous BAN reads it as `FROM_NEXT` |
| 2 | `FROM_PREV` | read-only |
| 3 | `FROM_NEXT` | read-only |
| 4 | `CTRL` | read/write; low byte drives `ctrl` |

In GBAVI, `CTRL` bits 0 and 1 enable the BAN's two bus bridges. Pipelined
software uses `TO_NEXT`/`FROM_PREV` as a "block ready" flag.

### Bi-FIFO

Each `bififo` holds both queues between its BAN (k) and the next (k+1):

* `dnq` carries words from k to k+1;
* `upq` carries words from k+1 back to k.

BAN k+1 reaches that pair over a link from its own Bi-FIFO's *up* side to
BAN k's *dn* side. The original wire list uses one bidirectional 64-bit data
wire between `fifo_dq_dn` and `fifo_dq_up`. Here it is split into one wire
per direction, plus push/pop/full/empty.

CPU-bus view:

* offset 0x00: write sends to the next BAN, read receives from it.
* offset 0x08: the same towards the previous BAN.
* offset 0x10: status, with both queue counts and the previous pair's flags.

A write into a full queue, or a read from an empty one, **stalls the bus**
until the neighbour acts. The queues are 16 words deep (`FIFO_DEPTH`), a
generator option whose value the method leaves open.

## Deadlock, and why GBAVI runs one way and SplitBA retries

These are the hardest parts of the design. Every bus is circuit-switched: a
master keeps its bus until its transfer ends. If a transfer needs a second
bus, it holds the first while it waits for the second. A chain of such holds
that closes on itself is a deadlock.

**GBAVI.** The eight bridges form a ring: BB_1/3/5/7 join each CPU bus to its
segment, and BB_2/4/6/8 join each segment to the next. If transfers could go
either way round the ring, or enter another BAN by taking over its CPU bus,
then four processors that all reached out at once would wait on each other
forever. This implementation does two things:

* Transfers run one way only: a BAN reaches the *next* BAN's memory
  (`0x4000_0000 + x` is word `x` of the next BAN's SRAM).
* The incoming transfer goes straight to that BAN's memory interface. It
  passes a per-transfer round-robin arbiter (`HAS_RMT`) there, instead of
  going through that BAN's CPU bus.

Each path then holds only resources that finish in bounded time. Both
bridges must be enabled through `CTRL`. While a bridge is disabled the
transfer simply waits, because the two buses are disconnected. Moving data
from A to D therefore passes through B and C in turn, which is how
pipelined software uses this system.

**SplitBA.** A processor of subsystem 1 reading subsystem 2 holds bus 1 and
asks for bus 2 through the bridge. If a processor of subsystem 2 does the
opposite at the same time, each holds the bus the other needs. The bridge is
built from two one-way `bus_bridge` instances, and a rule breaks the cycle:

* A transfer arriving while the opposite direction is busy is answered with
  `retry`.
* If both arrive in the same cycle, the 1→2 direction wins.

The retried master drops its request, the global arbiter moves on, and the
bridge's own master gets the bus it needs. The CPU interface and the bridge
re-issue retried transfers by themselves.

## Timing

All figures are clock cycles. "ts→ta" counts from the `ts` cycle to the `ta`
cycle at the processor, with no contention:

| access | ts→ta |
|--------|-------|
| local SRAM, REGISTERS, Bi-FIFO that need not wait | 3 |
| local SRAM in GBAVI (behind the two-master arbiter) | 4 |
| global memory through GBI_GB3 (GBAVIII, Hybrid) | 6 |
| own subsystem memory (SplitBA; CPU interface directly on the bus) | 4 |
| other subsystem through the bridge (SplitBA) | 7 |
| next BAN's memory through two bridges (GBAVI) | 8 |

A read on the global bus takes **3 cycles** from request to data:

1. arbitration (registered grant);
2. SRAM access;
3. data with `ack`.

That is the read arbitration time the method credits to its global buses.
The global arbiter leaves the bus idle for one cycle after each transfer. A
bus bridge costs one registered cycle in each direction. The GBI is such a
bridge, always enabled.

## What follows the method and what is chosen here

Taken from the method:

* the five topologies and their module sets per BAN;
* four processors and 32 MB of memory;
* the 64-bit data path;
* the mapping of byte-address bits 22..3 onto a 20-bit SRAM address;
* the bus bridge as an enable-controlled connection between two buses;
* the REGISTERS and Bi-FIFO rings;
* the global arbiter and global memory node;
* the 3-cycle global read.

Chosen here, because the method describes the modules only by name or
purpose:

* the request/ack/retry protocol and the address map;
* all latencies except the global read;
* round-robin arbitration;
* the contents of REGISTERS and their control byte;
* blocking Bi-FIFO semantics and a depth of 16;
* the local/global memory split;
* the one-way GBAVI ring and the SplitBA retry rule;
* registered bridges;
* synchronous active-low reset (`rst_n`), which clears all control state but
  not memory contents.

Not built:

* the processors themselves;
* the two baselines the method compares against: a plain single global bus,
  and a CoreConnect PLB system;
* the generator software that writes the Verilog.

BFBA, GBAVI, GBAVIII and Hybrid take the number of BANs as `N_BAN`.
SplitBA takes the number of processors per subsystem as `N_PE_SUB`. The
defaults build four processors. Larger systems of 8, 16 or 24 processors
come from the same RTL with only these parameters changed.

## Files

* `rtl/bussyn_pkg.sv`: types, address decode.
* Leaf modules: `sram`, `mbi_sram`, `cbi_mpc755`, `cpu_bus`, `registers`, `sync_fifo`, `bififo`, `global_arbiter`, `global_bus`, `bus_bridge`, `gbi_gb3`.
* Nodes: `ban`, `ban_g`.
* Systems: `bfba_system`, `gbavi_system`, `gbaviii_system`, `hybrid_system`, `splitba_system`.
* Top: `bussyn_top`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`.
* `tb/tb_table4_scaling.sv`: the larger systems (see below).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl rtl/bussyn_pkg.sv \
        tb/tb_bussyn_top.sv --top-module tb_bussyn_top
    ./obj_dir/Vtb_bussyn_top

Any other testbench runs the same way with its own name. The package must
come first; `-y rtl` finds the modules by file name.

`tb_bussyn_top` runs the top at its default sizes, with all 32 MB per
system. Each system moves one packet of 2560 64-bit samples, in the style
that suits it:

* BFBA: a four-stage pipeline through the Bi-FIFOs.
* GBAVI: blocks handed on through the bridges, with REGISTERS handshakes.
* GBAVIII and Hybrid: a functional-parallel split of the packet over the
  global memory.
* SplitBA: the same split in both subsystems, then cross reads through the
  bridge.

The packet size is that of the OFDM transmitter workload: 2048 data plus 512
guard samples. Every sample is checked. The testbench also counts and
requires each mechanism at least once: Bi-FIFO stalls, bridge transfers,
shared memory access, global-bus contention, the 3-cycle read, bridge retries
and REGISTERS handshakes. It runs in under a second.

`tb_table4_scaling` builds all five systems with 8 processors, using small
memories. Raising its `NSIZE` adds 16 and 24 processors. The 24-processor
systems pass the same checks, but each extra size adds several minutes to
the C++ build. It checks:

* the Bi-FIFO rings, including the wrap from the last BAN to the first;
* the GBAVI bridge ring and its 8-cycle transfers;
* concurrent global-memory traffic and the round-robin wait bound of
  3·N + 3 cycles;
* SplitBA cross-subsystem reads under retry.

The C++ build takes a few minutes because of the number of instances. The
simulation itself takes well under a second.

## Limits

* Single-beat transfers only: no cache-line bursts.
* The processor-side protocol is a simplification of the PowerPC 60x bus.
* GBAVI transfers go only to the next BAN.
* Memories are not initialised.
* No performance figures of the original systems (throughput, gate counts)
  are reproduced here. They depend on the processors, software and cell
  library used there.
