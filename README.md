# Emulating non-volatile L1 data caches on an FPGA

New memory technologies such as spin-transfer-torque RAM (STT-RAM) and
racetrack memory (RTM) promise denser, lower-power caches than SRAM, but their
timing is irregular: STT-RAM writes are much slower than reads, and a racetrack
must first shift the wanted bit under an access port, so an access costs a
number of cycles that depends on where the previous access left the track.
Cycle-level software simulators of a whole processor running real programs
against such caches are slow. This RTL takes the other route: an ordinary
SRAM-based direct-mapped data cache on an FPGA is made to *behave* like an
SRAM, STT-RAM or racetrack cache by stretching every data-array access to the
latency the chosen technology would have, and by stalling the processor
pipeline for exactly that long. A program then runs at FPGA speed while its
cycle count is that of a machine with the emulated cache.

The repository contains the cache, its refill path, and the memory system
around it (crossbar, main-memory latency buffers, block-RAM instruction and
data memories with a host port). The RISC-V pipeline, the instruction cache and
the host processor that loads programs are not included; the top level exposes
their connections as ports, and the testbenches drive them with models.

## The latency model

All timing lives in one block, `latency_emu`, which sits beside the data array
(`cache_data_array`). Every array access, whether a pipeline load or store or
a line-refill write, first asks it for a latency `L`; the array performs the
access in the last of those `L` cycles and reports ready one cycle later.

| `TECH`        | latency of an access                                   |
|---------------|--------------------------------------------------------|
| `TECH_SRAM`   | `ACCESS_LATENCY` (default 2)                           |
| `TECH_STTRAM` | `READ_LATENCY` (2) for reads, `WRITE_LATENCY` (6) for writes |
| `TECH_RTM`    | `RTM_PORT_LATENCY + ceil(shifts / SHIFT_PER_CYCLE)`    |

### How racetrack shifts are counted

This is the part that needs the most care. The model treats each cache line
as a bundle of tracks that always shift together: with the 64-byte line,
bit *b* of word *w* lives in domain *w* of track *b*, so a 16-domain track
(`TRACK_LENGTH = 16`) holds exactly one bit of each of the 16 words. Accessing
word *w* means bringing domain *w* under an access port.

- `ACCESS_PORTS` ports are spread evenly, so each serves a segment of
  `SEG = TRACK_LENGTH / ACCESS_PORTS` domains, and word *w* is reached at
  position `w mod SEG` of its segment.
- Each line has a small register that holds the segment position it was left
  at by its last access (reset to 0). These registers are what makes racetrack
  emulation cost flip-flops that grow with the cache size.
- The shift count is the distance `d = |pos_new − pos_old|`. On a ring-shaped
  track (`RING = 1`) the bundle can rotate either way, so the count is
  `min(d, SEG − d)`.
- The worst case is therefore `L_max = TRACK_LENGTH / (ACCESS_PORTS · k)` with
  `k = 2` for a ring and 1 for a straight track, and the shift counter is
  `clog2(L_max + 1)` bits wide.
- `SHIFT_PER_CYCLE` models a track clocked faster than the logic: four shifts
  per cycle divide the shift time by four (rounded up).
- A shift-free access still costs `RTM_PORT_LATENCY` (1) cycle.

For the default straight 16-domain track with one port, a load of word 15
right after word 0 of the same line costs 1 + 15 = 16 cycles; with four ports
on a ring (`SEG = 4`, at most 2 shifts) it costs at most 3.

The position register is per line, not per cache: lines are separate bundles
of tracks and do not disturb each other. Refill writes walk words 0..15 in
order, so after a refill a line's tracks are left at the last word's
position and the replayed load pays for shifting back.

## Cache operation and the pipeline halt

`dcache` is a direct-mapped, 16 KiB cache with 64-byte lines. `addr_crop`
splits the address into tag, index and word. The tag array is a synchronous
RAM with reset-cleared valid bits.

**Load hit.** Tag read in the request cycle, compared in the next, array read
issued in the cycle after. The pipeline's Execute and Writeback stages see
`halt_ex_o`/`halt_wb_o` high for `2 + L` cycles; data is on `cpu_rdata_o` in
the cycle the halt drops.

**Load miss.** The cache sends an AXI4 INCR read burst for the whole line.
Memory answers much faster than a slow array can absorb, so the burst is
collected in `data_bus_buffer` first (it stops accepting beats only if a
previous line is still waiting). When the last beat is in, `cache_loader`
writes the 16 words into the array one after another; each write takes the
technology's write latency (and, for racetrack, its shifts). The loader then
reports completion, the tag is written, and the load is replayed as a hit. The
halt stays up the whole time; `halt_manager` tracks the access and refill
phases and drops the halt in the cycle the access completes.

**Stores.** Write-through without write-allocate. A store sends a single-beat
AXI4 write to memory; if it hits, it also writes the array (paying the write
latency) in parallel, and the halt is held until both the array write and the
memory's write response are done. A store miss leaves the cache untouched.

Pipeline contract: `cpu_req_i` high while a load or store is in Execute, and
the request fields held stable while the halt is up.

## Memory system

`nvmisc_top` connects the cache and an instruction-bus port through a 2x2
crossbar (`axi_xbar`) to two block-RAM memories (`axi_bram`): instruction
memory (64 KiB) below `0x8000_0000`, data memory (512 KiB) from
`0x8000_0000`, selected by address bit 31. The crossbar locks a slave per
burst and arbitrates round-robin. Between crossbar and each memory sits an
`axi_latency_buffer` that holds every read and write address for
`MEM_LATENCY` (16) cycles, so that the block RAMs look like slow DRAM. Each
memory has a second, plain word port for a host processor, which loads
programs and data while the core is held in reset, and polls a completion
word in data memory to time a run.

The bus is a reduced AXI4 carried in two structs (`axi_req_t`, `axi_rsp_t` in
`nvmisc_pkg`): no IDs, INCR bursts only, always-OKAY responses, one
outstanding transaction per master and direction.

## Configurations

Five cache types are set through parameters of `nvmisc_top` (or `dcache`):

| name  | parameters |
|-------|------------|
| SRAM  | `TECH=TECH_SRAM`, `ACCESS_LATENCY=2` |
| STT   | `TECH=TECH_STTRAM`, `READ_LATENCY=2`, `WRITE_LATENCY=6` |
| RTM_1 | `TECH=TECH_RTM`, `TRACK_LENGTH=16`, one port, straight, 1 shift/cycle (default) |
| RTM_2 | as RTM_1 with `ACCESS_PORTS=4`, `RING=1` |
| RTM_3 | as RTM_1 with `SHIFT_PER_CYCLE=4` |

`CACHE_BYTES` (16, 32, 64 or 128 KiB and other powers of two) and
`LINE_BYTES` scale the cache; `IMEM_BYTES`, `DMEM_BYTES` and `MEM_LATENCY`
scale the memory system.

## Where this design makes its own choices

These are not fixed by the emulation idea, and are the first places to look
when matching another platform's numbers:

- STT-RAM latencies 2/6 are placeholders for a medium-retention cell; set them
  from your device data.
- `RTM_PORT_LATENCY = 1`: a racetrack access with no shift is taken to be
  faster than the two-cycle SRAM.
- The domain mapping (word offset = domain), the even port spacing and the
  per-line position register.
- 64-byte lines, write-through/no-allocate, replay of a missed load (so a
  miss also pays one read latency), one cycle of tag lookup.
- Memory latency 16 cycles, a one-deep address holding stage per channel,
  the address map and the crossbar's arbitration.
- The simplified bus structs described above.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
compares against values computed in the testbench and prints
`TB_RESULT checks=… failures=…`. Among them: `tb_latency_emu` checks the
latency of random access sequences against an independent model for all five
configurations, including `L_max`; `tb_dcache` checks data, hit halt length
`2 + L`, and refills against an AXI memory model.

- `tb_nvmisc_top` runs the whole platform at its default parameters: the host
  loads a program image and 28,672 random integers, releases reset, a
  pipeline model runs a bit count over the array through the cache while an
  instruction-fetch model streams lines from instruction memory, and the host
  polls for completion and checks all results. About 321,000 cycles
  (26,880 hits, 1,933 misses); it counts hits, refills, stores, shifting and
  shift-free accesses, crossbar contention, memory latency and host polls, and
  fails if any of them never happened.
- `tb_workloads` runs a 3x3 convolution (34x34 input), a bubble sort (128
  integers) and a bit count (4,096 integers) on all five configurations side
  by side with a 1 KiB cache, checks every result, and checks that STT-RAM is
  slower than SRAM and RTM_2/RTM_3 no slower than RTM_1. Cycle counts:

  | config | convolution | bubble sort | bit count |
  |--------|------------:|------------:|----------:|
  | SRAM   | 72,608 | 250,005 | 37,674 |
  | STT    | 77,344 | 250,517 | 54,058 |
  | RTM_1  | 75,905 | 249,220 | 44,602 |
  | RTM_2  | 72,207 | 242,004 | 37,658 |
  | RTM_3  | 73,000 | 243,532 | 39,146 |

  Full-size sort and convolution fit in the 512 KiB data memory but were
  simulated only at these reduced sizes.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_nvmisc_top \
    rtl/nvmisc_pkg.sv rtl/*.sv tb/tb_nvmisc_top.sv
./obj_dir/Vtb_nvmisc_top
```

For a block testbench, replace the top module and testbench file; testbenches
that use a helper also need it on the command line (`tb/le_runner.sv` for
`tb_latency_emu`, `tb/axi_slave_model.sv` for `tb_dcache` and `tb_axi_xbar`,
`tb/wl_runner.sv` for `tb_workloads`). Each simulation takes a few seconds at
most.

## Files

`rtl/nvmisc_pkg.sv` (types, bus structs), `nvmisc_top`, `dcache`,
`addr_crop`, `tag_array`, `cache_data_array`, `latency_emu`, `halt_manager`,
`data_bus_buffer`, `cache_loader`, `axi_xbar`, `axi_latency_buffer`,
`axi_bram`. Each file begins with a description of its interface and timing.
