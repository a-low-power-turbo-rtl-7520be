# Unified turbo / Viterbi channel decoder for cdma2000 (3GPP2)

This RTL decodes both kinds of forward-error-correction code that a
cdma2000 terminal receives:

- **Turbo codes.** Blocks of up to 20730 bits, rate 1/5, decoded in six iterations.
- **Convolutional codes.** Constraint length 9 (256 states), rates 1/2, 1/3, 1/4 and 1/6.

Both are trellis codes, so one datapath can serve both. In turbo mode a
single windowed Max-Log-MAP SISO decoder runs three recursions side by side:
forward (α), dummy backward (β1) and true backward (β2). Each recursion has
its own group of eight add-compare-select (ACS) units.

In Viterbi mode, the Viterbi decoder borrows the sixteen units of the α and
β1 groups. They update the 256 path metrics in 16 cycles per trellis step.
The two large single-port SRAMs (20730 words each) hold the systematic and
extrinsic values in turbo mode. In Viterbi mode they become the survivor
memory.

The design aims at low power and small area. Three ideas carry that aim:

1. **A small input cache.** It lets the three recursions read the received
   symbols while the external codeword memory is read only once per step.
2. **An in-place interleaver.** The extrinsic memory never needs to be
   reordered, so one memory serves as both interleaver and de-interleaver.
3. **Single-port memories at twice the datapath clock.** They stand in for
   multi-port memories.

```
                external codeword memory (rs, parities)
                               │
        ┌──────── cache ctrl ─▶│ input cache (3·Lsb words, 1 write + 3 reads / cycle)
        │                      ├──────────────┬───────────────┐
        │                   TMU-β2         TMU-β1          TMU-α        TMU-VD ◀─ Viterbi symbols
        │                      │              │               │            │
        │                   ACS-β2         ACS-β1 ◀──mux──▶ ACS-α ◀───mux──┘
        │                      │ ◀── β1 result │               │      ▲
        │                      ▼               ▼               ▼      │
        │                   LLR unit ◀───── SRAM-α ◀────────────┘   VD PMU (256 PMs)
        │                      │                                     │
  interleaver AG ×2         TD LIFO      SRAM0: systematic │ survivors (decisions 7..0)
        │                      │         SRAM1: extrinsic  │ survivors (decisions 15..8)
        └─ addresses ─▶ SRAM0/SRAM1                      SMU controller ─▶ VD LIFO
```

## Clocking

There is one clock, `clk`, the memory clock (100 MHz nominal). The turbo
datapath advances on every second edge. The enable `mphase` is generated
inside `turbo_decoder`, which gives a 50 MHz datapath.

- Schedule and address registers change on edges where `mphase` = 0.
- The ACS registers change on edges where `mphase` = 1.
- Each datapath cycle therefore contains two memory cycles. That is how a
  single-port SRAM gives one read and one write, and a dual-port cache gives
  four accesses.

The Viterbi decoder runs at the full memory clock. Its 19-cycle step is
counted in memory clocks.

The published chip uses two real clock domains. This RTL uses one clock with
an enable, which behaves the same for every register and keeps the design
free of clock-domain crossings.

## Turbo mode

### Windowed SISO schedule (`td_siso`)

The block is cut into windows of `LSB` = 20 steps. There are
NSB = ⌈N/LSB⌉ = 1037 windows for N = 20730. Each window takes one slot of
LSB datapath cycles. In slot *t*:

| Unit | Works on | Direction | Starts from | Result goes to |
|---|---|---|---|---|
| input cache | window *t* | forward | — | written, one step per cycle |
| ACS-β1 | window *t*−1 | backward | all-zero metrics | its register, at the slot end |
| ACS-α | window *t*−2 | forward | last α of window *t*−3 | SRAM-α, one entry per step |
| ACS-β2 | window *t*−3 | backward | β1's result from the previous slot | LLR unit |

The LLR unit combines three things:

- β2's metrics,
- the α of the same step, read back from SRAM-α,
- the branch metrics of that step.

β1 finished window *t*−2 one slot earlier and ACS-β2 started from that
result. Because β1 ran through a whole window first, β2 starts from reliable
metrics without a full backward pass.

**Timing.** A half-iteration takes NSB + 3 slots: three slots fill and drain
the pipeline. Windows past the end of the block, and steps past N in the last
window, are pad steps. Their branch metrics are forced to 0, so they do not
bias any path.

**SRAM-α.** It holds only LSB words. α is written forward and read backward,
so the address order flips each window. Each address is read just before it
is overwritten.

**Metrics.**

- All metrics are 8 bits in 6.2 format.
- After every step, each group subtracts state 0's metric and saturates.
- The branch metric of a branch with input *u* and parities *y0*, *y1* is
  *u*·(rs/2 + Lin) + *y0*·p0/2 + *y1*·p1/2. The halving aligns the 3.3
  channel format with the 6.2 metric format.
- LLR = max over *u*=1 branches − max over *u*=0 branches of α+γ+β.
- The extrinsic output is LLR − rs/2 − Lin, saturated to 6 bits (4.2).

| Quantity | Width | Format |
|---|---|---|
| channel symbols | 6 | 3.3 |
| a-priori / extrinsic | 6 | 4.2 |
| α, β, γ | 8 | 6.2 |
| Viterbi soft input | 4 | — |
| Viterbi path metric | 10 | — |

### Input cache (`input_cache`)

Three recursions read three different windows each cycle, and one new step
arrives each cycle. That makes four accesses per datapath cycle. A plain
solution needs four banks of LSB words. Here one dual-port memory of 3·LSB
words, running at twice the datapath rate, provides all four. This works
because of how the windows are placed:

- Window *s* sits in bank *s* mod 3.
- Its addresses run in reverse order when ⌊*s*/3⌋ is odd.

In slot *t*, window *t* lands in the bank that held window *t*−3, which β2 is
reading backwards in the same slot. With the alternating orientation, the
word being written is exactly the word β2 reads in that cycle. Port A reads
it on the first memory cycle and overwrites it on the second. Port B serves
α on one memory cycle and β1 on the other. So the fourth bank is not needed.

Each cache word holds, in 39 bits:

- a pad flag,
- the 15-bit memory address of the step,
- rs, Lin and the two parities.

Carrying the address with the data is what lets the interleaver work in
place.

### Interleaver in place (`turbo_decoder`, `il_dual_ag`, `il_agen`)

Decoder 1 visits step *k* at address *a* = *k*. Decoder 2 visits step *k* at
address *a* = π(*k*). Each step reads the systematic value and the a-priori
value at *a*. The SISO later writes the new extrinsic value back to the same
*a*, carried through the cache and the pipeline. Both half-iterations
therefore read and write the extrinsic SRAM in its natural order. No
de-interleaving pass and no second memory are needed.

Each datapath cycle, the extrinsic SRAM takes one read and one write, on its
two memory cycles. The systematic SRAM is filled from the external codeword
memory during the first half-iteration and is read from then on.

**Address generator.** π is the cdma2000 turbo interleaver (`il_agen`):

1. Take a counter of n+5 bits (n = 10 for N = 20730).
2. The 5 low bits, bit-reversed, select a row.
3. The high bits go through a per-row linear congruential step, which uses
   a 32-entry table.
4. The resulting address is invalid when it is ≥ N.

**Dual AG.** About 1/3 of counter values are invalid at N = 20730. A single
generator would stall the SISO on each one. `il_dual_ag` evaluates counter
values *c* and *c*+1 in parallel:

- If *c* is valid, its address is used and the counter steps by 1.
- Otherwise the address of *c*+1 is used and the counter steps by 2.

For the standard's block sizes, two invalid values never occur in a row, and
an assertion checks this. The decoder never stalls. A full block uses the
second generator 12037 times per interleaved half-iteration.

**Output.** In the last half-iteration (decoder 2), the hard decisions and
LLRs come out backwards within each window. The TD LIFO (`lifo_rev`) turns
each window around. Every result carries its bit index π(*k*). The results
are therefore **not** delivered in natural bit order: a consumer stores each
bit at `td_out_idx`.

## Viterbi mode

### Borrowed ACS units and the PMU (`viterbi_decoder`, `vd_pmu`, `td_siso`)

The trellis has 256 states. One step takes 16 ACS cycles, and each cycle
handles 16 target states, 16·*g* … 16·*g*+15. Target state *s'* has
predecessors {*s'*[6:0], 0} and {*s'*[6:0], 1}. The encoder register for that
branch is {*s'*, *b*}, and the decoded input bit is *s'*[7].

Each cycle proceeds as follows:

1. `vd_tmu` forms the 2×16 correlation branch metrics: +r for a code bit
   of 1, −r for a code bit of 0.
2. `vd_pmu` reads the 32 predecessor metrics.
3. The borrowed units return the 16 sums and 16 decisions. These are the
   eight units of ACS-α and the eight of ACS-β1, reached through `td_siso`'s
   `vd_*` ports and an operand multiplexer in each `td_acs_group`.

The turbo metric registers are not touched while the units are lent. Their
ACS units are 10 bits wide so that they can take the Viterbi path metrics.

The PMU stores two copies of the 256 path metrics, old and new, swapped every
step. This is needed because each old metric feeds two different groups.
Each new metric has the previous step's maximum subtracted and saturates at
−512. The best path therefore stays near 0 in 10 bits.

### 19-cycle step and three-pointer traceback (`vd_smu`)

| Cycles | What happens |
|---|---|
| 0–15 | Write the 16 decisions of cycle *g* to the survivor memory. The 16-bit word is split over the two shared SRAMs. |
| 16 | Traceback read |
| 17 | Traceback read |
| 18 | Decode read, yielding one decoded bit |

At 100 MHz this gives 100/19 = 5.26 Mb/s.

**Memory organisation.** The survivor memory is arranged as NBANK = 8 banks
of B = T/2 = 32 steps, with T = 64. A word address is {step, *s*[7:4]} and
the bit within the word is *s*[3:0].

**Traceback jobs.** Each time a bank is filled, a traceback job starts from
state 0 at the newest step. It runs back through 2B steps, at two reads per
trellis step. When it has covered T = 2B steps, its pointer is handed to the
decode pointer. The decode pointer then walks the next B steps at one read
per trellis step, and each read yields one decoded bit.

The bits come out newest-first within each bank. The VD LIFO (`lifo_rev`,
depth B) restores input order.

**Frames.** A frame starts with `vd_init`, which puts the encoder in state 0.
It is flushed by feeding further steps, for example the encoder's 8 zero tail
bits followed by zero symbols, until the last bits have come out. The output
latency is a few banks.

### Memory sharing in the top (`tdvd_top`)

- `mode` = 0 selects turbo. The Viterbi decoder is held in reset, and SRAM0
  and SRAM1 belong to the turbo decoder (systematic and extrinsic).
- `mode` = 1 selects Viterbi. The turbo decoder is held in reset, except
  that its α and β1 ACS units are lent. Both SRAMs take the survivor
  decisions: bits 7..0 go to SRAM0 and bits 15..8 to SRAM1.

The survivor memory uses 8·32·16 = 4096 of the 20730 words.

## Interfaces of `tdvd_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | memory clock, synchronous active-high reset |
| `mode` | in | 0 turbo, 1 Viterbi |
| `td_start` / `td_busy` / `td_done` | in/out/out | decode one turbo block; `td_done` pulses at the end |
| `cw_addr`, `cw_sel`, `cw_data[3]` | out/out/in | external codeword memory. `cw_sel` = 0 returns {rs, y0, y1} of encoder 1 at `cw_addr`; `cw_sel` = 1 returns {–, y0′, y1′} of encoder 2. Data must be valid within two clocks; combinational is fine. 6-bit symbols, positive means bit 1. |
| `td_out_valid`, `td_out_idx`, `td_out_bit`, `td_out_llr` | out | one decoded bit with its index and 8-bit LLR |
| `td_ag_skip` | out | pulse: the second address generator supplied the address |
| `vd_init`, `vd_rate` | in | start a Viterbi frame and select its rate |
| `vd_in_valid` / `vd_in_ready`, `vd_in_sym[6]` | in/out/in | one trellis step of 4-bit soft symbols (positive = 1; unused entries ignored) |
| `vd_out_valid`, `vd_out_bit` | out | decoded bits in order |

Parameters: `N` (20730), `LSB` (20), `ITER` (6), `NB` (interleaver n, 10),
`DEPTH` (SRAM words, 20730), `T` (traceback length, 64).

## Performance

- **Turbo.** A 20730-bit block with six iterations takes 249644 datapath
  cycles, which is 4.99 ms at 50 MHz, or 4.15 Mb/s. The quoted figure for
  the chip is 4.52 Mb/s; one source gives 4.25 Mb/s. 4.52 Mb/s would need
  fewer datapath cycles (229314) than there are trellis steps in six
  iterations (248760). That is not possible for one SISO processing one step
  per 50 MHz cycle, and this schedule is within 0.35 % of that bound. The
  4.52 Mb/s figure presumably assumes a different clocking; it is not
  reached here.
- **Viterbi.** 19 clocks per bit, 5.26 Mb/s at 100 MHz, as specified.

## How far to trust it, and where it departs

Things this RTL had to choose because the architecture description leaves
them open:

- **Code definitions.** The generator polynomials and the interleaver table
  are the cdma2000 ones as recalled here and have not been checked against
  the standard text. The rate-1/6 convolutional polynomials are the least
  certain. Interleaver sizes with n < 10 use the low bits of the n = 10 table
  and are not standard.
- **Trellis termination.** The turbo trellis end is left open: there is no
  tail-bit processing, and pad steps carry zero metrics. The Viterbi decoder
  expects the caller to flush a frame with zero steps.
- **Numerics.** Normalisation differs between the modes:
  - turbo: subtract state 0's metric;
  - Viterbi: subtract the previous maximum.

  Extrinsic scaling is none, and the LLR output has 8 bits.
- **Memories.**
  - The SRAMs are 8 bits wide, so that two of them hold a 16-bit decision
    word; the turbo data needs only 6 of the bits.
  - The cache bank mapping and the SRAM-α orientation scheme are this
    design's.
  - All memories are modelled as arrays.
  - The PMU is built from flip-flops.
- **Traceback.** T = 64, NBANK = 8 (5 would suffice), and every traceback
  starts from state 0 rather than from the best state.
- **Clocking.** One clock with a datapath enable, instead of two clock
  domains.
- **Output.** Turbo output is by index, not in order. The output
  multiplexer between the two decoders is replaced by separate output
  ports.
- **Not modelled.** The external codeword memory is not part of the RTL;
  testbenches model it with arrays.

**What has been checked.** Every block has its own self-checking testbench
against an independent reference model. The top-level testbench runs the
whole design at its default sizes:

- a full 20730-bit turbo block with about 2500 raw channel errors decodes
  with zero errors;
- the mode switches, and Viterbi frames at all four rates decode with zero
  errors;
- a second turbo block decodes after switching back;
- the 19-cycle Viterbi step is measured;
- the cycles in which the turbo ACS units work for the Viterbi decoder are
  counted and must be non-zero.

BER curves and power have not been evaluated.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -I. -Irtl rtl/tdvd_pkg.sv tb/tdvd_tb_pkg.sv \
    tb/tb_tdvd_top.sv -y rtl -y tb --top-module tb_tdvd_top
./obj_dir/Vtb_tdvd_top
```

(`-Wno-fatal` keeps the integer-width warnings of the testbench code from stopping
the build.) Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog if something hangs. The full-size top-level run takes
about 20 s.

Any other testbench is built the same way, with its own file and top module:

| Testbench | Block |
|---|---|
| `tb_acs_unit` | `acs_unit` |
| `tb_td_tmu` | `td_tmu` |
| `tb_td_acs_group` | `td_acs_group` |
| `tb_llr_unit` | `llr_unit` |
| `tb_input_cache` | `input_cache` |
| `tb_sram_sp` | `sram_sp` |
| `tb_lifo_rev` | `lifo_rev` |
| `tb_il_agen` | `il_agen` |
| `tb_il_dual_ag` | `il_dual_ag` |
| `tb_td_siso` | `td_siso` |
| `tb_turbo_decoder` | `turbo_decoder` |
| `tb_vd_tmu` | `vd_tmu` |
| `tb_vd_pmu` | `vd_pmu` |
| `tb_vd_smu` | `vd_smu` |
| `tb_viterbi_decoder` | `viterbi_decoder` |

Shared testbench helpers live in two files:

- `tb/tb_common.svh`: check counters and the watchdog.
- `tb/tdvd_tb_pkg.sv`: encoders, noisy channels, a reference interleaver and
  a random generator.

## Files

| File | Content |
|---|---|
| `rtl/tdvd_pkg.sv` | widths, types, trellis and code functions |
| `rtl/tdvd_top.sv` | top: both decoders, shared SRAMs, mode select |
| `rtl/turbo_decoder.sv` | iteration control, memory traffic, TD LIFO |
| `rtl/td_siso.sv` | windowed SISO: cache control, TMUs, ACS groups, SRAM-α, LLR |
| `rtl/input_cache.sv` | 3·LSB-word cache with four accesses per datapath cycle |
| `rtl/td_tmu.sv` | turbo branch metrics |
| `rtl/td_acs_group.sv` | 8 ACS units + normalisation, lendable to the Viterbi decoder |
| `rtl/llr_unit.sv` | LLR, hard decision, extrinsic value |
| `rtl/il_agen.sv` | cdma2000 interleaver address |
| `rtl/il_dual_ag.sv` | two address generators, invalid-address bridging |
| `rtl/viterbi_decoder.sv` | Viterbi step sequencing, VD LIFO |
| `rtl/vd_tmu.sv` | Viterbi branch metrics for 4 rates |
| `rtl/vd_pmu.sv` | 256 path metrics with normalisation |
| `rtl/vd_smu.sv` | survivor memory control, three-pointer traceback |
| `rtl/acs_unit.sv` | add-compare-select |
| `rtl/sram_sp.sv` | single-port SRAM model |
| `rtl/lifo_rev.sv` | order reversal buffer |
