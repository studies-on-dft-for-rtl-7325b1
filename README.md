# Test infrastructure for a core-based SoC: mixed scan / non-scan core wrappers on a shared TAM, and memory BIST shared between memories

A system-on-chip built from many reused cores and hundreds of small memories is
expensive to test in two ways: test application time, because all cores must
share a limited number of test pins, and area, because every memory would
otherwise carry its own BIST logic. This RTL implements the on-chip side of two
answers to that:

* **Per-core DFT choice on one TAM.** Each logic core is tested either through
  full scan or through a non-scan DFT (NS-DFT) that applies at-speed patterns in
  parallel to all core pins. NS-DFT cores sit in a wrapper that *compresses the
  bit width*: an XOR network expands a few test lanes to all core inputs, and an
  XOR tree compacts all core outputs onto the lanes. That way a core with
  hundreds of pins can be tested through 16-64 lanes, and several cores can be
  tested at once on a 64-lane test access mechanism (TAM). Which DFT each core
  uses, how many lanes it gets and when it is tested are decided at design time;
  this RTL is built for one such decision (a 64-lane SoC of nine cores, one of
  them scan, eight NS-DFT).
* **Memory BIST shared by groups.** Memories that have the same depth can share
  one address and data generator (*parallel connection*, tested together).
  Memories that have the same width can be chained behind one address generator
  with extra select bits, one data generator and one response analyzer
  (*serial connection*, tested one after another as one deep memory). Serial
  sharing saves more area and peak power, parallel sharing saves time. The ten
  embedded memories here are tested by four serially shared wrappers and one
  controller.

The area and scheduling optimizations that choose the DFTs, the lane
assignment and the memory groups are design-time software and are not part of
the RTL; their results appear as constants in `rtl/dft_pkg.sv`.

## Block structure

```
soc_dft_top
├── tam_router              64 test pins  <->  per-core lanes
├── ns_dft_wrapper  x8      one per NS-DFT core
│   ├── xor_decoder         TW lanes -> max(PI,PO) bits
│   └── xor_encoder         max(PI,PO) bits -> TW lanes
├── (scan core: no wrapper, lanes go straight to its scan ports)
├── mbist_controller        runs the BIST groups session by session
└── per BIST group (x4)
    ├── mbist_wrapper       shared address/data generator, response analyzer, bypass flops
    ├── sync2 x3            only for the 266 MHz group
    └── sram_sp  x K        the memories of the group
```

The cores themselves are not included: their pins (`core_in`, `core_out`,
`scan_ctrl`, `scan_si`, `scan_so`) are ports of `soc_dft_top`, packed core after
core in the order of the core table.

## Memory BIST sharing

### One wrapper, two ways of sharing it

`mbist_wrapper` drives up to K memories. The generators are shared; what differs
is how their outputs reach the memories (`CONN`):

| | parallel (`CONN_PARALLEL`) | serial (`CONN_SERIAL`) |
|---|---|---|
| members must have the same | depth and clock | width and clock |
| address generator | `AW` bits, same address to all | covers `sum(DEPTH)` words; its upper part picks the memory (with equal power-of-two depths: `clog2(K)` extra bits) |
| data generator | one, `DW` = widest member | one, `DW` bits |
| response analyzer | one comparator and fail flag per memory, masked to its width (`BIT_W`) | one comparator; the fail flag of the memory that was read is set |
| memories active per cycle | all K | one |
| test length per background | `8 * depth` cycles | `8 * sum(DEPTH)` cycles |
| peak power | sum of the members | largest member |

The test is March Y, an 8N algorithm: `{⇕(w0); ⇑(r0,w1,r1); ⇓(r1,w0,r0); ⇕(r0)}`,
one memory operation per clock, so the length above is exact; one more cycle
compares the last read. `NUM_BG` backgrounds (solid, checkerboard, inverted
checkerboard, in this order) are run back to back; the default is one, and a
"1" is always the inverse of the background word. After the test each memory
holds the last background.

Outside the test the functional ports `f_*` reach the memories unchanged. With
`scan_mode` high, functional read data is taken from per-memory bypass flops
that capture `wdata ^ addr ^ we` of each access, so the logic around a memory
can be scan tested without the memory.

### Handshake and clock domains

The controller and the wrappers use a four-phase level handshake: the
controller raises `start` and holds it, the wrapper raises `done` (with `fail`
and `fail_mem` stable), the controller drops `start`, the wrapper drops `done`.
The wrapper's `done` rises `8*N*NUM_BG + 2` edges after it first sees `start`.

Memories 3 and 4 run at 266 MHz, the others and the controller at 133 MHz. The
266 MHz group is reached through synchronizers: `start` through two flops of
`clk_fast`; `fail` through two and `done` through three flops of `clk`, so that
`fail` has settled when `done` arrives. The release half of the handshake with
this group takes about three `clk` cycles longer than with a 133 MHz group.

`mbist_controller` takes a start pulse and runs the groups in sessions
(`SESS[g]`): all groups of a session start together, the next session starts
after every group of the current one has finished and released. `fail_grp`
accumulates over the sessions; `done`, `pass` and `fail_grp` are held until the
next start pulse.

### The ten memories and their grouping

| No. | bits | words | MHz | BIST group |
|---|---|---|---|---|
| 1, 2 | 16 | 128 | 133 | A (serial, 2 x 128 = 256 words) |
| 3, 4 | 16 | 128 | 266 | B (serial, 256 words, `clk_fast`) |
| 5-8 | 16 | 256 | 133 | C (serial, 4 x 256 = 1024 words) |
| 9, 10 | 32 | 512 | 133 | D (serial, 2 x 512 = 1024 words) |

Two memories may share a wrapper only if they have the same clock and lie
closer than a distance D; serial sharing further needs equal width, parallel
sharing equal depth. With the memories placed 10 units apart on a line and
D = 40, only neighbours up to three places apart qualify, which leaves the four
groups above (memory 1 and memory 5 are exactly 40 apart). Every group
could also be connected in parallel; serial is chosen because it saves more
area and power, and the time allows it. Group C or D takes 8192 cycles at
133 MHz, 61.6 µs, against a 300 µs budget; group B takes 7.7 µs. The peak power
of the four serial groups is that of memories 1, 3, 5 and 9 together (900 on a
scale where memory 1 is 100) against a limit of 5000, so all four run in one
session. A full memory test from the start pulse to `mbist_done` takes 8202
`clk` cycles.

## NS-DFT core wrapper

`ns_dft_wrapper` has five modes (`dft_pkg::wmode_e`):

| mode | core inputs | functional outputs | test outputs |
|---|---|---|---|
| `WM_NORMAL` | functional inputs | core outputs | 0 |
| `WM_TEST` | decoded test inputs | 0 | encoded core outputs |
| `WM_ISOLATE` | 0 | 0 | 0 |
| `WM_IN_IC` (input interconnect test) | 0 | 0 | encoded functional inputs |
| `WM_OUT_IC` (output interconnect test) | 0 | decoded test inputs | 0 |

A single decoder and a single encoder, both `max(NPI, NPO)` bits wide, serve
both the core test and the interconnect tests. All paths are combinational;
clocks and asynchronous signals of the core do not pass through the wrapper.
Test outputs are 0 unless the wrapper is in `WM_TEST` or `WM_IN_IC`, which is
what lets the TAM OR the outputs of several wrappers together.

**Decoder** (`xor_decoder`): decoded bit `i` is lane `i mod TW`; from bit `TW`
on it is XORed with a second lane, `((i mod TW) + 1 + ((i/TW - 1) mod (TW-1))) mod TW`,
which is never the first. **Encoder** (`xor_encoder`): lane `j` is the XOR of
all bits `i` with `i mod TW = j`. Both are identities when the core has no more
pins than lanes. The compression does not change the number of test cycles,
only which patterns can be applied: ATPG patterns for a wrapped core have to be
expressed through this particular decoder and read back through this encoder.
The XOR structures are the specified kind of compressor, but the lane
assignment is this design's own. A different network only means replacing these
two modules.

## TAM lanes and the test schedule

The 64 test pins are split among the cores by `tam_router` with fixed lanes.
Cores tested at the same time use disjoint lanes; a core that is not active
(`WM_TEST`/`WM_IN_IC`, or `WM_TEST` for the scan core) cannot drive a lane.
The assignment follows the schedule the RTL was built for (times in µs at the
scan-clock and test-clock rates of the cores):

| core | DFT | lanes | tested |
|---|---|---|---|
| 7 Mpeg | scan, 59 chains + 4 control lanes | 0-62 | 0-237 |
| 9 IdctC | NS-DFT, 96 in / 224 out | 0-31 | 237-465 |
| 6 Risc | NS-DFT, 32 in / 98 out | 32-63 | 237-288 |
| 8 DctF | NS-DFT, 129 in / 260 out | 0-63 | 465-480 |
| 1 Gcd | NS-DFT, 32 in / 16 out | 0-15 | 480-484 |
| 2 Iir | NS-DFT, 20 in / 16 out | 16-31 | 480-486 |
| 5 Paulin | NS-DFT, 32 in / 32 out | 32-63 | 480-493 |
| 3 Jwf | NS-DFT, 80 in / 80 out | 0-63 | 493-496 |
| 4 Lwf | NS-DFT, 32 in / 32 out | 0-31 | 496-499 |

For the scan core, lanes 0-3 carry its scan clock, reset, test mode and scan
enable (`scan_ctrl`), lanes 4-62 its chain inputs (`scan_si`), and its chain
outputs (`scan_so`) return on output lanes 4-62. Sequencing the sessions (when
each wrapper changes mode) is up to the tester driving `wmode`; the RTL holds no
timer for it.

## Configuration

Everything specific to this SoC is in `rtl/dft_pkg.sv`: the core table
(`CORE_PI`, `CORE_PO`, `CORE_DFT`, `CORE_TW`, `CORE_LANE`), the memory table
(`MEM_DW`, `MEM_WORDS`, `MEM_MHZ`) and the grouping (`GRP_FIRST`, `GRP_K`,
`GRP_SESS`). Another schedule or another set of memories means new tables.
`soc_dft_top` assumes that the memories of a group are consecutive in the
table, that every group is serial, that there is one session, and that the
only scan core is core index 6; changing those needs small edits in the top.
The building blocks themselves are fully parameterized: `mbist_wrapper`
(`CONN`, `K`, `AW`, `DW`, `NUM_BG`, `BIT_W`, `DEPTH`), `mbist_controller` (`NG`,
`NSESS`, `SESS`), `ns_dft_wrapper` (`NPI`, `NPO`, `TW`), `tam_router` (`W`,
`NC`, `TWC`, `LANE`), `sram_sp` (`WORDS`, `DW`).

## What is specified and what is chosen here

Taken from the method this RTL implements: the five wrapper modes and their
data paths, XOR-network input decompression and XOR-tree output compaction,
the four extra control lanes of a scan core, the per-core DFT choice and TAM
widths, the parallel and serial sharing rules (same depth / same width, same
clock, within a distance), extra select bits for serial sharing, an 8N test
with length `8 * words` per background, and the memory table.

Chosen here, because it is left open: March Y as the 8N test; the background
patterns; the XOR lane assignment; holding isolated pins at 0; the BIST
handshake, sessions and controller; the lane offsets (derived from the
schedule's start and end times); the memory groups (derived from the sharing
rules, with all ten memories read as lying on one line 10 units apart); the
synchronizers for the 266 MHz group; the bypass capture function; the SRAM
timing (synchronous, one-cycle read latency); asynchronous active-low reset.

Not built: the cores and their scan chains (only their pins are ports), the
memory macros as such (`sram_sp` is a generic array), and the design-time
tools (DFT selection, memory grouping, test scheduling).

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dft_pkg.sv \
          tb/tb_soc_dft_top.sv --top-module tb_soc_dft_top -o sim
./obj_dir/sim
```

The same works for `tb_mbist_wrapper`, `tb_mbist_controller`, `tb_sram_sp`,
`tb_ns_dft_wrapper` and `tb_tam_router`. `tb_soc_dft_top` runs the top at its
default size in about two seconds: functional memory access and bypass, three
full memory BIST runs (good memories, two forced stuck read bits in two
groups, good again) with the exact cycle count checked, every test session of
the schedule with the decoded core inputs, isolation and merged test outputs
compared with an independent reference, and interconnect and normal mode on
every wrapped core. It counts each mechanism (every wrapper mode, concurrent
cores on the TAM, the scan core, BIST pass, BIST fault detection, the clock
crossing, the bypass) and fails if one never happened. Faults are injected with
`force` on SRAM read-data bits.

The unit testbenches cover what the top does not reach: the textbook serial
example of four 8-bit memories of 32 words tested as one 128-word memory,
parallel connection with memories of different widths, serial connection of memories of
different depths (16, 8 and 12 words), two and three backgrounds, access counts per memory
(5 reads and 3 writes per word and background), one memory active at a time in
a serial group, a stuck bit above the width of a narrow memory not counting
as a failure, and a controller with two sessions.
