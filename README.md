# Dual-ring interconnect for a heterogeneous MPSoC

This is a small multiprocessor interconnect with throughput guarantees. It is
meant to sit between processor tiles and stream-processing accelerators.
Instead of a mesh network-on-chip, the tiles sit on two slotted,
unidirectional rings:

* the **data ring** carries write packets (a network address plus a 32-bit
  word) from NI *i* to NI *i+1*;
* the **credit ring** carries one-word-of-space credits the other way, from
  NI *i* to NI *i-1*. A credit for data that went *H* hops forward also
  travels *H* hops back.

Nothing in either ring can refuse a packet. Every tile must take a packet
addressed to it in the cycle it arrives ("guaranteed acceptance"). So the
rings have no back-pressure and no buffers apart from one register per hop.
Flow control happens at the edges, in one of two ways:

* **Software FIFOs** between processors (a C-HEAP-style protocol in software)
  use only the data ring. They write into the receiving tile's dual-ported
  local memory. The hardware only has to deliver writes in order, and it
  does: there is one route between any two NIs.
* **Hardware FIFOs** to, from and between accelerators use a *shell* in the
  NI. A producer may send a word only while it holds a credit. Each word the
  consumer takes sends one credit back over the credit ring. Streams are set
  up with static addresses, so the shell needs no address counters.

The design is based on Dekens, Wilmanns, Smit and Bekooij, *"Low-Cost
Guaranteed-Throughput Dual-Ring Communication Infrastructure for
Heterogeneous MPSoCs"*. That paper describes a 16-processor MicroBlaze
system on a Virtex-6 with one AM-demodulator accelerator, used for a PAL
video decoder. The processors are not part of this RTL. The top level,
`dual_ring_mpsoc`, brings out each processor's interface as ports.

## Slots and the two allocation rules

Each NI sends one *slot* per cycle to its neighbour: a valid bit, a
destination NI and a payload. Slots and NIs are numbered alike. After reset,
slot *s* sits at NI *s*, and every slot moves one NI per cycle. So all slots
line up with their owners together, once every *N* cycles. Each router
therefore needs only a free-running modulo-*N* counter (`cnt`) to know which
slot is passing. When `cnt == 0` the slot is the router's own. Otherwise
the slot reaches its owner after `N - cnt` more hops. This is the same on
both rings, whatever their direction.

* **Rule 1:** in its own slot an NI may always inject, without looking at it.
* **Rule 2:** an empty slot may be used if the packet reaches its
  destination no later than the slot reaches its owner
  (`hops(dest) <= N - cnt`). A slot emptied by ejection at this NI counts
  as empty.

Rule 1 gives each NI 1/*N* of the ring bandwidth whatever the others do.
Rule 2 makes the ring work-conserving without ever taking an owner's slot
away. The router has a check for the invariant (an owned slot always
arrives empty or addressed to its owner). It also flags every injection as
`inj_own` (rule 1) or `inj_borrow` (rule 2).

Timing: one cycle per hop. A word written into an NI buffer of depth
`GAMMA` waits at most `GAMMA*N - 1` cycles for injection while the buffer
is full. A packet therefore reaches its destination within
`GAMMA*N - 1 + H` cycles of the stall starting. With `GAMMA = 1` it is at
most `N + H` clock edges from the processor's write to the memory write.
The test benches check that bound.

## Network interface and shell

`network_interface` joins three parts. They are described here because the
shell is the least obvious piece.

```
 processor write port ──► ni_shell ──► data_ring_ni (buffer GAMMA + ring_router) ──► data ring
 memory write port   ◄──     │    ◄── ejected data packets
 stream inputs/outputs ◄─►   │
                             ├──► credit_ring_ni (pending counters + ring_router) ──► credit ring
                             ◄── ejected credits
```

### Local address map

A network address is a 5-bit NI number and a 16-bit word address inside the
tile (`ring_pkg::net_addr_t`). This map is this design's own choice:

| local address | meaning |
|---|---|
| `0xxx xxxx xxxx xxxx` | word in the tile's local memory (software FIFO buffers) |
| `1000 .... .... 00pp` | `SH_STREAM_IN`: data word for shell input *p* |
| `1001 .... .... 00pp` | `SH_CRET_ADDR`: credit return address of input *p*; data = `{node[4:0], port[1:0]}` |
| `1010 .... .... 00pp` | `SH_FWD_ADDR`: forward address of output *p*; data = `net_addr_t` (21 bits). Also reloads the output's credit counter with `CREDITS` |
| `1011 .... .... rrrr` | `SH_ACC_CFG`: accelerator register *r* |
| `1100 .... .... 00pp` | `SH_STREAM_OUT`: a processor's word for its own shell output *p* |

`ring_pkg::shell_addr(fn, idx)` builds these addresses.

### How a stream is set up and runs

Example: processor 0 feeds the accelerator (NI 16), which feeds processor 1.

1. Processor 1 writes `{16, 0}` to its own `SH_CRET_ADDR 0`: credits for
   words it pops go to output 0 of NI 16.
2. Processor 0 writes over the ring to NI 16: `SH_CRET_ADDR 0 = {0, 0}`,
   `SH_FWD_ADDR 0 = {1, SH_STREAM_IN 0}`, and the accelerator's registers.
3. Processor 0 writes `{16, SH_STREAM_IN 0}` to its own `SH_FWD_ADDR 0`.
4. Processor 0 now writes samples to its own `SH_STREAM_OUT 0`. Each word
   waits in the output's one-word register until the output has a credit.
   It then enters the NI buffer addressed to NI 16's input 0, and the credit
   counter drops by one. While the register is full, the processor's write
   stalls.
5. At NI 16 the word lands in the input buffer (depth `ALPHA`). The
   demodulator pops it, and the pop queues a credit for `{0, 0}` on the
   credit ring. Its result goes out of output 0 in the same way, to
   processor 1's stream FIFO. Processor 1 reads that FIFO like a streaming
   link (`fsl_exists`, `fsl_data`, `fsl_read`).

Because words and credits travel in order on their rings, configuration
written by the producer always arrives before its first data word.

Sharing rules inside the shell (this design's choices):

* A forwarding output and the processor's software writes share the NI
  buffer's write port. The output wins and the processor stalls one cycle.
* A data-ring ejection and a local write to the tile's own shell or memory
  can collide. The ejection wins, because guaranteed acceptance requires
  it.
* Each input has a pending-credit counter instead of a queue. The
  credit-ring NI serves the inputs round-robin.

## The accelerator

The paper names the accelerator only as an AM demodulator for the
luminance signal, with a gain that can be set over the ring. `am_demod` is
the simplest envelope detector that does this job, and its algorithm is
this design's own. It rectifies a signed 16-bit sample, filters it with
`y += (|x| - y) >> SHIFT` and outputs `(y * GAIN) >> 8`. Register 0 holds
`GAIN` (8.8 fixed point, reset 1.0) and register 1 holds `SHIFT` (reset 2).
It takes one sample per cycle with one cycle of latency.

## Throughput model and what was measured

For a one-word-container stream with `alpha` credits over *H* hops on an
*N*-NI ring, the paper's data-flow analysis gives a worst-case period of

`lambda = max(N, (2*(GAMMA*N - 1 + H) + rho_P + rho_C) / alpha)` cycles per word.

For N = 16, H = 15, GAMMA = 1 and rho = 1 this is 62, 31, 20.7, 16 and 16
cycles for alpha = 1..5. Larger containers of S words scale linearly.
`tb_table1_throughput` runs this case with every other processor loading
the data ring. The measured periods were 48.0, 24.0, 16.0, 16.0 and 16.0
cycles per word, all within the bound. It also runs the video decoder's
demodulator path mapped onto neighbouring tiles (processor 15 → accelerator
→ processor 0, unloaded 17-NI ring, one credit). That path takes 6.0 cycles
per sample, fast enough for 11 MS/s at 100 MHz. With a single credit, the
rate falls quickly with distance: the worst case above grows by 2 cycles per
hop. This is why the paper keeps accelerator streams between nearby tiles.

## Files

| file | contents |
|---|---|
| `rtl/ring_pkg.sv` | widths, slot and address types, shell function codes |
| `rtl/ring_router.sv` | one ring hop with rules 1 and 2; used by both rings |
| `rtl/sync_fifo.sv` | NI buffer, shell input buffers, processor stream FIFO |
| `rtl/data_ring_ni.sv`, `rtl/credit_ring_ni.sv` | the two ring halves of an NI |
| `rtl/ni_shell.sv` | credit-based flow control, address decode, configuration |
| `rtl/network_interface.sv` | complete NI |
| `rtl/local_mem_dp.sv` | dual-ported local memory of a processor tile |
| `rtl/am_demod.sv` | the accelerator |
| `rtl/processor_tile.sv`, `rtl/accelerator_tile.sv` | the two tile types |
| `rtl/dual_ring_mpsoc.sv` | top: 16 processor tiles and the accelerator tile |
| `tb/tb_<module>.sv` | self-checking test bench for each module |
| `tb/tb_table1_throughput.sv`, `tb/stream_harness.sv` | throughput experiments |

Top-level parameters: `N_PROC` (16), `GAMMA` (NI buffer depth of processor
tiles, 1), `ALPHA` (input buffer depth and credits per stream, 1) and
`MEM_WORDS` (local memory words per processor, 2048). Accelerator tiles
always have a one-word NI buffer. The package allows rings of up to 32 NIs
and 4 stream ports per shell.

## Simulating

Every test bench prints `TB_RESULT checks=<n> failures=<m>` and stops
itself. A watchdog stops it if it hangs. For example, the full system at
its default size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/ring_pkg.sv tb/tb_dual_ring_mpsoc.sv --top-module tb_dual_ring_mpsoc
./obj_dir/Vtb_dual_ring_mpsoc
```

`tb_dual_ring_mpsoc` plays all 16 processors at once:

* a configured stream runs through the accelerator and is checked word by
  word against a model;
* 14 processors write software-FIFO words to random tiles, and each write
  is checked against the latency bound and then read back from memory;
* it counts own-slot and borrowed-slot injections on both rings, stalls on
  a full NI buffer, waits for credits and stream-FIFO back-pressure, and
  requires each of them to happen.

It finishes in well under a minute.

## Departures and open points

* **Ring size.** The paper's analysis uses N = 16, while its system has 16
  processors plus an accelerator. The top therefore has 17 NIs, and the
  accelerator sits between processor 15 and processor 0 (its position is
  not given).
* **Credits per stream.** The implementation described in the paper uses a
  single credit per stream, so `ALPHA = 1` by default. The analysis assumes
  at least two for pipelining, and `ALPHA` is a parameter for that.
* **Slot numbers.** Slot numbers are worked out from a counter in each
  router that starts at reset, not carried in the slot. All routers must
  leave reset in the same cycle.
* **Design choices not given in the paper.** The widths, the local address
  map, the way shells are configured, the initial credit load on writing a
  forward address, and the shell's arbitration rules are all this design's
  own.
* **The accelerator** is a stand-in with the right interface and a plausible
  function. It is not the original demodulator.
* **Not included.** The processors, their caches, timer and local memory bus
  are not included, and neither is the software FIFO protocol (software).
  The local memory port and network write port are where a processor would
  connect.
* **Reset.** Reset is synchronous and active low. Memory contents are not
  reset.
