# Multi-segment one-hot sequential addressing (MSML-OHA)

Many DSP blocks address memory strictly in sequence: FIFO read and write
pointers, ring buffers, coefficient pointers. The usual circuit for this is a
binary counter followed by a decoder that turns the count into one select line
per word. In that circuit every clock toggles several counter bits, and the
changes ripple through a decoder whose size grows quickly with depth.

A chain of flip-flops holding a single `1` (a one-hot ring) gives the same
select lines with no decoder at all, and only two flip-flops change per step.
But every flip-flop in the ring is clocked on every cycle. Beyond a few words,
the clock power of a long ring costs more than the decoder it replaces.

This design splits the long ring into a few short rings (segments) and combines
their outputs with AND gates:

* The first segment steps on every clock.
* Each later segment steps only when all the segments before it wrap around.
* A select line is active when every segment points at its part of the
  address.

The rings behave like the digits of a counter in a mixed radix. The AND gates
act as a decoder that is already one-hot at its inputs. With segments of
N1, N2 and N3 flip-flops you get N1·N2·N3 select lines from N1+N2+N3
flip-flops. Most clocks switch only the first, short ring.

The RTL implements the three arrangements of the published MSML-OHA
architecture (Tan and Arslan, "Low power multi-segment sequential one hot
addressing architecture"):

| Arrangement | Module | Default | Selects | Flip-flops | Gate levels after the rings |
|---|---|---|---|---|---|
| double-segment, double-level (DSDL) | `dsdl_oha` | 4 × 4 | 16 | 8 | 1 (2-input AND) |
| triple-segment, double-level (TSDL) | `tsdl_oha` | 4 × 4 × 4 | 64 | 12 | 1 (3-input AND) |
| triple-segment, triple-level (TSTL) | `tstl_oha` | 4 × 4 × 4 | 64 | 12 | 2 (2-input AND) |

The top `msml_oha_top` holds all three side by side. Each one has its own
clock, reset and outputs.

## What the outputs do

After reset, `sel[0]` is active. Each rising clock edge moves the single
active select up by one. After the last select it wraps to `sel[0]`. Seen from
outside, an addresser of depth D is a counter modulo D followed by a one-hot
decoder. There is no enable, no load and no down-count: the architecture is
for purely sequential access. To stop at a position, stop the clock. A
clock-gating cell does this.

For three segments, with `fsel`, `ssel` and `thdsel` the first, second and
third segment's one-hot outputs:

```
sel[t*N1*N2 + s*N1 + f] = thdsel[t] & ssel[s] & fsel[f]
```

After k clocks from reset, `fsel = 1 << (k mod N1)`,
`ssel = 1 << ((k / N1) mod N2)` and `thdsel = 1 << ((k / (N1*N2)) mod N3)`.
`sel = 1 << (k mod N1*N2*N3)`. The two-segment addresser is the same without
the third term.

## The segment: `oha_segment`

The segment is a ring of N flip-flops. Reset is asynchronous and active low.
It sets flip-flop 0 and clears the others. When `adv` is high, each rising
`aclk` edge shifts the active bit from `q[i]` to `q[i+1]`, and from
`q[N-1]` back to `q[0]`. A 4-flip-flop segment therefore cycles through
0001, 0010, 0100, 1000, 0001, ...

`adv` is the one place where this RTL differs in form from the published
circuit. There, a later segment has its own gated clock. The clock pulses only
when the earlier segment's last output is active. Here every segment runs on
the same `aclk`, and the same condition drives `adv`, a synchronous enable.
The select sequence is identical cycle for cycle. A synthesis flow with
automatic clock-gating insertion turns the enabled flip-flops back into a
gated-clock segment, which is where the power saving comes from. For a
stand-alone ring, tie `adv` high.

An immediate assertion inside the flip-flop process checks at every clock edge
out of reset that exactly one output is active.

## How the segments step together

| Segment | Steps on a clock edge when |
|---|---|
| first (`fsel`, N1) | always |
| second (`ssel`, N2) | `fsel[N1-1]` is active, i.e. once every N1 clocks |
| third (`thdsel`, N3) | `fsel[N1-1]` and `ssel[N2-1]` are both active, i.e. once every N1·N2 clocks |

The third segment's condition is this design's reading. The published
drawings show only the second segment's last select at the third segment's
clock gate. Read literally, the third ring would then step on every one of the
N1 clocks during which `ssel[N2-1]` is active. The described behaviour is a
depth of N1·N2·N3, with a rollover that ripples from the first segment through
to the third. That requires both last selects, so both are used here.

## Combining the segments: double level against triple level

**DSDL** (`dsdl_oha`) uses N2 copies of `and_gate_array`, each N1 wide.
Array `s` takes all of `fsel` on its data inputs and `ssel[s]` as its enable.
It drives `sel[s*N1 +: N1]`.

**TSDL** (`tsdl_oha`) uses N2·N3 copies of `and3_gate_array`, each N1 wide.
The array for (t, s) is enabled by `ssel[s]` and `thdsel[t]` and drives
`sel[(t*N2+s)*N1 +: N1]`. There is one gate level, but every `fsel` line fans
out to N2·N3 gates.

**TSTL** (`tstl_oha`) uses two levels of `and_gate_array`:

```
fsel ──► level 1: N2 arrays, N1 wide, enabled by ssel[s]   ──► intsel[N1*N2]
intsel ─► level 2: N3 arrays, N1*N2 wide, enabled by thdsel[t] ─► sel[N1*N2*N3]
```

`fsel` fans out to only N2 gates, and only the one level-1 array whose enable
is active switches on most clocks. The intermediate selects `intsel` are
brought out as a port. They are a two-segment addresser of depth N1·N2 in
their own right.

Both triple-segment versions give the same `sel` on every clock. They differ
only in gate count, fan-out and delay, and therefore in switched capacitance.

## Timing

* The segment outputs come straight from flip-flops, one clock-to-Q after
  `aclk` rises.
* `sel` settles one AND delay after the flip-flops in DSDL and TSDL (a
  3-input AND in TSDL), and two AND delays after them in TSTL.
* The enable path into the second and third segments is one or two gates
  deep: `fsel[N1-1]`, and `fsel[N1-1] & ssel[N2-1]`. It has a full clock
  period to settle.
* In the published gated-clock form, the rollover shows up as extra delay
  on the later segments' clocks instead.
* There are no multicycle paths and no latches.

## Choosing a configuration

The published evaluation synthesised each arrangement in a 0.18 µm process and
ran it for 1028 clock events. It compared power with a binary counter plus
decoder of the same depth. The trends it reported are a guide to picking
N1..N3; this RTL does not measure power.

* A single ring wins only at depth 4. At depth 16 it uses about half as much
  power again as the counter and decoder.
* Short segments work best, because clocked flip-flops dominate the power.
  Every DSDL configuration with a segment of 16 or 32 flip-flops used more
  power than the counter and decoder.
* The order of the segments matters. At depth 32, 8×4 beats 4×8.
* DSDL helps at depths 8 to 64 (4×2, 4×4, 8×4, 8×8).
* TSDL helps at 16 and 32. At 64 and above, the fan-out of the first ring
  into the 3-input gates costs more than it saves.
* TSTL helps from depth 16 to 256. The best result is about 25 % below the
  counter and decoder, for 4×4×4 at depth 64. At 256 the best are 4×8×8,
  8×4×8 and 8×8×4, about 10 % below.
* The price is area: roughly 25 % to 45 % more than the counter and decoder.

Every parameter is a segment length. Any N ≥ 2 elaborates: a smaller value
stops elaboration with an error.

## Modules

All files in `rtl/` are plain synthesizable SystemVerilog, one unit per file.

| File | Contents |
|---|---|
| `msml_oha_pkg.sv` | `SEG_N_DEFAULT` (4) and `SEG_N_MIN` (2) |
| `oha_segment.sv` | one-hot ring; `aclk`, `rst_n`, `adv` → `q[N]` |
| `and_gate_array.sv` | `out_sig = in_sig & {N{enb_in}}` |
| `and3_gate_array.sv` | `out_sig = in_sig & {N{enb_a & enb_b}}` |
| `dsdl_oha.sv` | parameters N1, N2; `aclk`, `rst_n` → `fsel`, `ssel`, `sel[N1*N2]` |
| `tsdl_oha.sv` | parameters N1, N2, N3; → `fsel`, `ssel`, `thdsel`, `sel[N1*N2*N3]` |
| `tstl_oha.sv` | parameters N1, N2, N3; → also `intsel[N1*N2]` |
| `msml_oha_top.sv` | the three side by side; ports prefixed `dsdl_`, `tsdl_`, `tstl_` |

To drive a memory, connect `sel` straight to the word-line or row-enable
inputs. Keep one addresser for reading and one for writing if the memory is a
FIFO. Empty/full tracking is not part of this design.

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each one has a watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/msml_oha_pkg.sv -y rtl -y tb tb/tb_msml_oha_top.sv \
    --top-module tb_msml_oha_top -Mdir obj_top
./obj_top/Vtb_msml_oha_top
```

| Testbench | What it checks |
|---|---|
| `tb_oha_segment` | 4-bit ring with a random `adv`, 8-bit ring through the 8-step sequence, asynchronous reset between edges |
| `tb_and_gate_array`, `tb_and3_gate_array` | every input combination |
| `tb_dsdl_oha` | 4×4, 4×2 and 8×4 against the formulas above; the second segment steps exactly once per N1 clocks; reset in mid-count |
| `tb_tsdl_oha`, `tb_tstl_oha` | 4×4×4 and 4×2×2, all segment outputs and `intsel`; the third segment steps exactly once per N1·N2 clocks |
| `tb_msml_oha_top` | the top at its default sizes, three unrelated clocks and resets. Checks every output on every clock, over more than three full address cycles and a reset in mid-count. Counts rollovers, steps, wraps and resets and fails if any never happened. |
| `tb_msml_workloads` | all 38 configurations of the published evaluation (single ring 4/8/16, DSDL 4×2 to 4×32, TSDL and TSTL 4×2×2 to 16×4×4), each for 1028 clocks. Checks the select sequence and the number of wraps. Uses the helper `msml_cfg_runner`. |

Verilator has only two logic states. The testbenches therefore hold reset from
time 0 and do not depend on X propagation.
