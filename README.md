# Low-power arbiters and a two-core producer/consumer system

This repository holds synthesizable SystemVerilog for two pieces of on-chip
communication hardware. The designs follow the MSc thesis *Low Power Evaluation
for Arbitration and MPSoC* (2010). That work compared arbiters and a
FIFO-coupled two-processor system for power. The RTL here is a new
implementation. Where the thesis is silent, the choices made are listed below.

1. **A family of arbiters** that share one resource among N contenders:
   - round-robin (RR), plain or clock-gated;
   - time-division multiplexing (TDM), built with either a binary counter or a ring counter;
   - two-step TDM+RR, plain or clock-gated;
   - TDM+subset(RR), which gives TDM slots to frames of contenders and runs RR inside each frame.

   All of them share the same request/grant ports and timing, so any one can replace
   another. TDM+RR adds one output that marks grants made by its RR step.
   Their differences lie in how much state changes each cycle, which is what decides
   their dynamic power.
2. **A producer/consumer system.** Two processor cores, each with a 16k x 16
   program memory and a 16k x 16 data memory, pass data through a 32 x 16
   hardware FIFO. The FIFO is memory-mapped into both cores' IO space, and every
   component sits behind its own clock-gate cell. The processor cores are
   generated vendor IP and are not included. Their ports are brought out, and
   the testbenches drive them from a behavioural model of the polling programs.

`lpe_top` puts both side by side. They share only clock and reset.

## Arbiter interface and timing

Every arbiter has `clk`, `rst_n` (asynchronous, active low), `req[N-1:0]` and
`gnt[N-1:0]`.

- A contender raises `req[i]` and holds it until it is served.
- The arbiter decides in the cycle it sees the requests. It registers a one-hot
  grant, so `gnt[i]` is high during the **next** cycle.
- A contender that sees its grant may keep `req[i]` high in that same cycle,
  which counts as a new request. It drops `req[i]` only if it has nothing more
  to ask.
- At full load (every contender always requesting) the arbiter therefore grants
  in every cycle.

```
cycle     t        t+1       t+2
req[3]  __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____     (held until granted, then released)
gnt[3]  ___________/‾‾‾‾‾\____     (grant for the cycle-t decision)
```

After reset, contender 0 has the highest priority, or owns the first TDM slot.

## Round-robin: one-hot priority and a replicated carry chain

The RR arbiter (`rr_arbiter`) keeps a one-hot priority vector `prio_q`. The set
bit marks the contender with the highest priority. The other contenders follow
in increasing index order, wrapping around.

The grant logic (`rr_carry_chain`) is a ripple chain. The priority token enters
at the priority holder. At each contender:

- if it requests and holds the token or an incoming carry, it is granted;
- if it does not request, the carry moves on to the next index.

A ring of such stages would be a combinational loop. The chain is therefore
unrolled twice. The first copy of N stages takes the token. The second copy
only receives the carry that wrapped past contender N-1. Contender i is granted
if its stage in either copy grants. The worst-case path is 2N-1 stages.

After a grant to contender j, `prio_q` moves to j+1, so the winner gets the
lowest priority next time. Without a grant, `prio_q` keeps its value. This is
what makes clock gating worthwhile:

- with `CLOCK_GATING=1`, the priority register is clocked through a `clock_gate`
  cell that is enabled only in cycles that grant;
- with `CLOCK_GATING=0`, it is an ordinary enabled register.

Both behave identically cycle for cycle.

### Carry distance and power

Call the **carry distance** the number of stages the token travels before it
finds a requester. Distance 1 means the priority holder itself was granted.

- At full load, the contender after the last winner is always requesting, so
  every arbitration has distance 1.
- As the load falls, the chain ripples further. At the same time there are
  fewer arbitrations.

The switching power of the chain is roughly the product of these two trends.
It therefore rises and then falls as the load drops, with its maximum at a
middle load. `tb_rr_carry_workload` measures this for N = 12. Each run lasts
2000 cycles. "Max wait" is the longest a contender idles between being served
and asking again.

| max wait (cycles) | arbitrations | at distance 1 | weighted carry length |
|---|---|---|---|
| 0  | 1999 | 1999 | 1999 |
| 10 | 1999 | 1993 | 2007 |
| 15 | 1986 | 1267 | 3354 |
| 25 | 1641 | 446  | 6098 |
| 30 | 1432 | 327  | 5884 |
| 45 | 1008 | 140  | 5018 |

The weighted carry length is the sum of the carry distances. In this run it
peaks between 25 and 35 cycles. The reference measurements for the thesis
design show the same shape:

- almost all arbitrations are at distance 1 up to 10 cycles;
- about 1530 arbitrations at 25 cycles;
- about 920 arbitrations at 45 cycles.

Here the carries start to lengthen one cycle of wait later, at 12 cycles
rather than 11. The likely reason is a small difference in how the random
wait is drawn.

The same testbench runs arbiters of 2, 4, 6, 8 and 10 contenders alongside
and prints their mean carry distance. At the lowest load it is 1.3 for two
contenders and 5.0 for twelve. The chain's ripple therefore grows with the
arbiter size, and so does the peak in its switching.

## TDM: counter or ring

`tdm_arbiter` gives the slot to one contender per cycle and moves it on **every
cycle**, whether or not the owner requested. Only the owner can win, so a slot
whose owner is idle is wasted. The slot pointer comes in two forms, chosen with
`IMPL`:

- `TDM_COUNTER`: a binary counter modulo N plus a decoder. This is cheap when N
  is a power of two; otherwise the wrap logic and the decoder cost more.
- `TDM_RING`: a one-hot rotating shift register. Its bits are the slot signals
  directly, so it needs no decoder.

The pointer changes every cycle, so gating its clock gains nothing. No gated
variant exists.

## TDM+RR: two steps

`tdm_rr_arbiter` does two steps each cycle:

1. **TDM step.** A ring counter names the slot owner. If the owner requests, it
   is granted.
2. **RR step.** If the owner does not request, the slot is not wasted. It goes
   round-robin to the other requesters, using the same one-hot priority and
   carry chain as `rr_arbiter`.

The RR priority moves only on RR-step grants. At high load the TDM step serves
almost every cycle, so the RR state rarely changes. The clock-gated variant
(`CLOCK_GATING=1`) switches that register's clock off in exactly those cycles.
`gnt_by_rr` is registered with the grant and marks grants made by the RR step.

`tb_clock_gating_activity` counts the cycles in which each gated priority
register is clocked, for 12 contenders:

| max wait (cycles) | RR | TDM+RR |
|---|---|---|
| 0  | 100.0% | 0.0%  |
| 5  | 100.0% | 0.0%  |
| 25 | 84.5%  | 63.8% |
| 45 | 51.9%  | 45.0% |

Gating the RR arbiter pays off only at light load. Gating TDM+RR pays off
most at heavy load, where the TDM step serves every slot owner.

## TDM+subset(RR): frames

`tdm_subset_rr_arbiter` splits the contenders into frames of `FRAME_SIZE`
consecutive indices, giving ceil(N/FRAME_SIZE) frames.

- A ring counter gives the slot to one frame per cycle.
- Inside that frame, the requesters are served round-robin. Each frame has its
  own one-hot priority field, and only the active frame's field is scanned.
- If `FRAME_SIZE` does not divide N, the last frame is short. Its missing
  positions never request.

`FRAME_SIZE=1` is plain TDM and `FRAME_SIZE=N` is plain RR. Values in between
trade better average latency for more logic switching per cycle.

`tb_tdm_subset_rr_sweep` runs every frame size for 6, 8, 10 and 12
contenders. At full load every frame size grants in every cycle. At low load (45-cycle
waits, 12 contenders, 600 cycles), plain TDM grants 245 times, plain RR 290
times, and the mixed frame sizes 270 to 303 times.

At high load (5-cycle waits), frame sizes just under N grant less: 450 of 600
for N = 12 with frames of 11. The one-member last frame gets a slot as often as
a full frame does, and its single contender is often idle at that moment.

## The producer/consumer system

```
            wake[0]                               wake[1]
              |                                     |
   +----------v---------+                +----------v---------+
   | producer core (*)  |                | consumer core (*)  |
   +--+-----+-------+---+                +---+-------+-----+--+
      |     |       | IO                  IO |       |     |
   pmem   dmem      +------> fifo_mmio <-----+     dmem   pmem
   16kx16 16kx16            (32 x 16 FIFO)         16kx16 16kx16

   (*) not included: its ports are ports of mpsoc_system / lpe_top
   every box except the cores has its own clock_gate cell; so does each core
```

### FIFO register

`fifo_mmio` wraps `sync_fifo` and is memory-mapped into the IO space of both
cores:

| IO address | producer | consumer |
|---|---|---|
| `0x00` `IO_FIFO_DATA` | write = push | read = pop, returns the oldest word |
| `0x01` `IO_FIFO_STATUS` | read flags | read flags |

- The status word has `empty` in bit 0, `half_full` in bit 1 and `full` in bit 2.
- IO read data is combinational.
- A push when full or a pop when empty is ignored.

### Polling protocol and the half-full flag

Each core runs a loop:

1. Wait for a time-out of `PERIOD` cycles.
2. Read the status once.
3. If the condition holds, move 16 words.

The conditions are:

- **producer:** `empty | half_full`, then it copies 16 samples from its data
  memory into the FIFO;
- **consumer:** `half_full | full`, then it copies 16 words from the FIFO into
  its data memory.

Both data-memory areas are 8192-word circular buffers.

`half_full` means **exactly** 16 of the 32 entries are used. Because both sides
move 16 words at a time, the occupancy at a poll is 0, 16 or 32. Under that
reading, the producer's condition guarantees room for a burst and the
consumer's condition guarantees a full burst of data. A "16 or more" reading
would let the producer overrun a full FIFO.

### Clock gating, wake and halt

`mpsoc_system` contains seven `clock_gate` cells, all fed from the free-running
`clk`:

| cell | enabled when |
|---|---|
| core clock (x2) | the core is not halted, or its `wake` line is high |
| program memory (x2) | the core accesses that memory in the cycle |
| data memory (x2) | the core accesses that memory in the cycle |
| FIFO | either core accesses the FIFO register in the cycle |

The cores start halted and unclocked. `wake` is also the core's interrupt line,
so holding it for a cycle clocks the core long enough to start its program.
When a core executes a halt, its `core_halted` flag stops its clock again, and
the flag is passed out as `halted`. The thesis's top entity also has halt inputs.
They go straight to the cores, which are not included, so this design has no
halt port.

The memories are a plain synchronous array (`sram_sp`). Reads have one cycle of
latency and the contents are not reset. They stand in for compiled SRAM macros
of the same size.

## Files

| file | contents |
|---|---|
| `rtl/arb_pkg.sv` | TDM implementation enum, arbiter configuration index |
| `rtl/mpsoc_pkg.sv` | sizes, IO map, status bits, `io_req_t`, `mem_req_t` |
| `rtl/rr_carry_chain.sv` | replicated round-robin carry chain (combinational) |
| `rtl/clock_gate.sv` | latch-based clock-gate cell |
| `rtl/rr_arbiter.sv` | round-robin arbiter, `N`, `CLOCK_GATING` |
| `rtl/tdm_arbiter.sv` | TDM arbiter, `N`, `IMPL` |
| `rtl/tdm_rr_arbiter.sv` | TDM+RR arbiter, `N`, `CLOCK_GATING` |
| `rtl/tdm_subset_rr_arbiter.sv` | TDM+subset(RR), `N`, `FRAME_SIZE`, `CLOCK_GATING` |
| `rtl/sync_fifo.sv` | 32 x 16 FIFO with empty / half-full / full |
| `rtl/fifo_mmio.sv` | memory-mapped FIFO register for two cores |
| `rtl/sram_sp.sv` | 16k x 16 single-port memory |
| `rtl/mpsoc_system.sv` | producer/consumer system without the cores |
| `rtl/lpe_top.sv` | top: seven arbiter lanes plus the system |
| `tb/arb_contenders.sv` | random request generator (load model) |
| `tb/polling_core_model.sv` | behavioural producer/consumer core |
| `tb/arb_size_harness.sv`, `tb/subset_rr_harness.sv`, `tb/rr_carry_harness.sv`, `tb/mpsoc_harness.sv` | per-configuration test harnesses |
| `tb/tb_*.sv` | self-checking testbenches |

The parameter defaults are:

- `N` / `N_CONTENDERS` = 12, the largest size the thesis evaluated (it swept
  2 to 12);
- `FRAME_SIZE` = 3, this design's own pick;
- FIFO 32 x 16 and memories 16384 x 16, as in the modelled system.

## Simulating

Verilator 5 with `--timing` is needed, because the testbenches use delays.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lpe_top \
  -y rtl -y tb -Irtl -Itb rtl/arb_pkg.sv rtl/mpsoc_pkg.sv tb/tb_lpe_top.sv
./obj_dir/Vtb_lpe_top
```

`tb_lpe_top` runs the top at its default sizes for about 600,000 cycles,
which takes about a second. Replace `tb_lpe_top` with any other testbench name. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog counts a failure if
the simulation hangs.

Because the testbenches use two-state simulation, they assert `rst_n` with an
edge after time 0. Every register reached only through a gated clock depends
on that asynchronous reset.

| testbench | what it shows |
|---|---|
| `tb_rr_arbiter` | plain and gated RR against an index-based reference, all four loads; no wait above N cycles; a grant every cycle at full load; the gated clock ticks once per grant |
| `tb_tdm_arbiter` | counter and ring versions against a slot reference; wasted slots occur |
| `tb_tdm_rr_arbiter` | both steps against a reference, including `gnt_by_rr`; the gated RR clock ticks once per RR grant |
| `tb_tdm_subset_rr_arbiter` | N=12/F=3, N=10/F=4 (short frame, gated), N=6/F=1 (= TDM), N=6/F=6 (= RR) against a reference |
| `tb_rr_carry_workload` | carry-distance histogram across loads for 12 contenders (table above), mean carry distance for 2 to 12 |
| `tb_arbiter_size_sweep` | RR, TDM and TDM+RR in both forms at 2, 4, 6, 8, 10, 12 contenders against a reference; a grant every cycle at full load; worst-case latency exactly N cycles; RR serves more than TDM at mid load |
| `tb_tdm_subset_rr_sweep` | sizes 6, 8, 10, 12 with every frame size, against the reference, grant counts per load |
| `tb_clock_gating_activity` | share of cycles in which the gated RR and TDM+RR priority registers are clocked, per load (table above) |
| `tb_clock_gate` | whole pulses only; enable changes while the clock is high have no effect |
| `tb_sync_fifo`, `tb_fifo_mmio` | queue model, all flags, overflow and underflow attempts, ignored accesses |
| `tb_sram_sp` | full 16k write and read-back, random mix, one-cycle latency |
| `tb_mpsoc_system` | the system at time-outs of 1024, 2048, 3096 and 4092 cycles: data order, FIFO occupancy, poll spacing PERIOD+1 (or +32 after a burst), no core clock before wake or after halt, fewer polls per cycle at longer periods |
| `tb_lpe_top` | whole top at default parameters: seven arbiter lanes cross-checked in pairs, and the system moving 8448 samples with buffer wrap-around. It requires FIFO empty, half full and full, bursts, wasted TDM slots, RR-step grants and a stopped gated clock to each occur at least once |

## Departures, choices and limits

- **Processor cores.** The cores are not included. `polling_core_model`
  reproduces their port behaviour: one instruction fetch per running cycle, the
  time-out, the status poll and the word moves. It executes no instructions.
- **TDM slot advance.** The thesis gives a TDM algorithm that advances the slot
  only on a grant. Its text says the slot is wasted and moves on regardless.
  This design follows the text: the slot advances every cycle.
- **Frames in TDM+subset(RR).** How contenders are assigned to frames, whether
  priority is kept per frame, and the default frame size are this design's
  choices.
- **RR state in TDM+RR.** The RR priority moves only on RR-step grants. This is
  a reading of the thesis's explanation of why clock gating helps at high load.
- **Clock gating.** The thesis let the synthesis tool insert clock gating. Here
  it is an explicit `clock_gate` instance, selected by `CLOCK_GATING`. The
  enables of the seven clock-gate cells in the system are this design's own.
- **FIFO details.** Storage is flip-flops with binary pointers. Earlier work
  cited by the thesis found latches cheaper in power for small FIFOs. The IO
  address map, the status layout and combinational IO reads are this design's
  own.
- **Duty-cycle period.** Both 3094 and 3096 appear in the thesis; 3096 is used.
- **Not built.** The fixed-priority and least-recently-used arbiters are
  described in the thesis but left out of its evaluation, and are not built.
  Clock trees, standard-cell mapping and power figures come from physical
  design and are outside RTL.

## Lint notes

- `clock_gate` holds a latch on purpose. It is the glitch-free gating structure.
- Verilator reports `rst_n` as used both synchronously and asynchronously. The
  synchronous use is the `disable iff` of the assertions.
- A few unused-signal warnings remain and are harmless:
  - the last carry out of the chain;
  - the consumer's write data at the FIFO register;
  - the FIFO count inside `fifo_mmio`.
