# A low-power hearing-aid ASIP in SystemVerilog

A behind-the-ear hearing aid has to run a whole chain of adaptive signal
processing on a battery that holds a few hundred milliwatt-hours. That chain
covers feedback cancellation for two microphones, a two-microphone
beamformer, a frequency-warped filterbank with 17 bands, noise reduction
and wide dynamic range compression. A general-purpose RISC core running
this chain burns tens of milliwatts. This design runs it on a small
application-specific processor instead: a 16-bit, 3-issue VLIW machine. It
gets its efficiency from five things:

* **custom function units** for the inner operations of the algorithms (a
  warped all-pass section, a saturating fixed-point multiply, the a-priori
  SNR of the noise reduction, bit-range extraction, sign-bit counting), and
  a modulo adder for circular buffers;
* **two data memories**, each with its own load/store unit, so that a filter
  reads its samples and its weights in the same cycle;
* a **32-entry loop cache** that serves loop bodies after their first pass,
  so the wide program memory sits idle during most of the run;
* a **160-bit instruction** whose immediates overlay the register select
  bits;
* a clock low enough (about 11 MHz for 16 samples per 10 952-cycle block at
  16 kHz) that the supply can be lowered.

The RTL here is the processor: core, memories, loop cache and function
units. The hearing-aid algorithms are software for it. The testbenches
assemble small programs for six of their kernels and run them.

## The machine at a glance

| Item | Value | Origin |
|---|---|---|
| Data width | 16 bit | design |
| Issue slots | 3 | design (the 3-slot variant was chosen over 2 and 4) |
| Instruction word | 160 bit = 3 x 48-bit slot words + 16-bit control word | width from the design, layout own |
| Register files | 2 x 16 x 16 bit (r0-r15, r16-r31) | design |
| Intermediate registers | 4 x 40 bit accumulators (acc0-acc3) | width from the design, count own |
| Data memories | main and local, 1024 x 16 each | two memories from the design, depth own |
| Program memory | 256 x 160 | depth own |
| Loop cache | 32 x 160, single-ported | design |
| Pipeline | none: one bundle per cycle | own |

The package `rtl/hasip_pkg.sv` holds all these constants, the opcode
enumeration and the instruction structs.

## Execution model

Every cycle, one bundle is fetched and executed completely. The
instruction comes from program memory, or from the loop cache. The register
files, accumulators and data memories are read combinationally. Every result
is written at the next clock edge. So:

* a program's cycle count equals the number of bundles it executes;
* all slots of a bundle read the register state from *before* the bundle,
  so `r1 <- f(r1)` in slot 0 and `g(r1)` in slot 2 of the same bundle see
  the old r1 (the warped-filter schedule below relies on this);
* a load returns its data in the same cycle (the memories are modelled with
  combinational reads);
* two writes to one register in one bundle are a program error. An
  assertion in `hasip_top` flags them; in hardware the higher slot wins.

Slot 0 is wired to the main data memory and slot 1 to the local data
memory. Slot 2 has no load/store unit; an assertion flags a load or store
there. Every slot has every other unit.

The design does not fix a pipeline. At 11-20 MHz a real
implementation would pipeline fetch, and would use synchronous SRAM for
the memories. This model leaves both out, so that the cycle counts of
programs stay easy to reason about.

## The instruction word

```
instr_t (160 bit) = { slot[2] (48), slot[1] (48), slot[0] (48), ctrl (16) }

slot_t  (48 bit)  = { op[5:0], d1[4:0], d2[4:0], s1[4:0], s2[4:0], imm[21:0] }
                                                          imm[21:17] = s3
ctrl_t  (16 bit)  = { cop[2:0], r[4:0], tgt[7:0] }
```

The third source register field `s3` *is* the top of the immediate. An
operation that reads three registers (MODADD, PSNR) has only `imm[16:0]`
left for constants, and one that needs a wide immediate has no third
source. This is how immediate bits overlay register select bits.

### Slot operations

| op | effect | notes |
|---|---|---|
| NOP | - | |
| ADD, SUB, AND, OR, XOR | d1 = s1 op s2 | |
| ADDI | d1 = s1 + imm[15:0] | subtract with imm = 2^16 - k |
| LDI | d1 = imm[15:0] | |
| SLL, SRA | d1 = s1 <<, >>> imm[3:0] | |
| SLT | d1 = (s1 < s2), signed | |
| MODADD | d1 = (s1 + s2) mod s3 | exact for s1 < s3, s2 <= s3 |
| MODADDI | d1 = (s1 + imm[5:0]) mod imm[21:6] | circular index step |
| LD | d1 = mem[s1 + imm[15:0]] | slot 0: main, slot 1: local memory |
| ST | mem[s1 + imm[15:0]] = s2 | same |
| MULA | acc[d1] = s1 * s2 | 40-bit, sign-extended |
| MACA | acc[d1] += s1 * s2 | |
| SFPMUL | d1 = sat16((s1 * s2) >>> imm[4:0]) | |
| WARP | d1 = s2 + lambda*s1 ; d2 = s1 - lambda*d1 | lambda = imm[15:0], Q1.15 |
| PSNR | d1 = a-priori SNR(s1, s2, s3), shift imm[4:0] | |
| BSLICE | d1 = bit range of acc[s1][31:0] | fields in imm, see below |
| NORM | d1 = redundant sign bits of s1 | |

Accumulator numbers are the low two bits of the named field (`d1` for
MULA/MACA, `s1` for BSLICE).

### Control word

| cop | effect |
|---|---|
| NOP | next bundle |
| JMP tgt | pc = tgt |
| BNZ r, tgt / BZ r, tgt | branch on R[r] != 0 / == 0 |
| LOOP r, len | execute the next `len` bundles R[r] times, without loop overhead |
| HALT | stop, raise `done` |

The control word reads R[r] before the bundle's own writes, like the
slots do. The slots of a LOOP or branch bundle execute normally.

## Hardware loops and the loop cache

The loop cache is a 32-entry single-ported store between program memory
and the core. The LOOP instruction drives it, so the compiler decides what
goes in it; the hardware does no guessing. At `LOOP r, len` at address A,
the body is A+1 .. A+len:

1. If `len` or R[r] is zero, the body is skipped.
2. If `len <= 32`, the loop is cacheable. The cache holds a tag, made of the
   body's start address and its length, and a valid flag.
   * If the tag matches and the cache is valid, every pass, the first one
     included, reads from the cache.
   * Otherwise the new tag is loaded. During pass 1 each bundle read from
     program memory is also written into entry `pc - (A+1)`. At the end of
     pass 1 the cache becomes valid, and passes 2..N read from it.
3. A longer body runs from program memory on every pass.

During a cache read, program memory's read enable is low (`pm_fetch` = 0).
This is what saves power: the 160-bit program memory dominates the power of
the core. The tag match on re-entry matters for an inner loop inside a
software outer loop (a branch back to the LOOP bundle). Only the first
entry pays for the fill.

Restrictions: loops do not nest, and a loop body carries no control words.
An assertion in `fetch_unit` checks the second rule; a control word inside a
body is ignored. `start` clears the cache, so a newly loaded program cannot
hit stale entries.

## The custom function units

All of them are combinational, single-cycle units with up to three inputs
and two outputs.

**warp_unit: all-pass section of the warped FIR.** The warped filterbank
replaces each unit delay of an FIR filter with the all-pass
A(z) = (z^-1 - lambda) / (1 - lambda z^-1). The unit computes one section in
direct form II with a single state word:

```
w(n) = x(n)   + lambda * w(n-1)      (out_state, written to d1)
y(n) = w(n-1) - lambda * w(n)        (out_y,     written to d2)
```

Products are Q1.15 with truncation (arithmetic shift by 15), and sums wrap
in 16 bits. Software scales the input so that the state, which grows up to
1/(1-lambda), stays in range. Chaining 16 sections, each `y` feeding the
next `x`, gives the 17 taps p0..p16 of the warped delay line.

**sfpmul_unit: fixed-point multiply with shift.** The 32-bit product is
shifted right arithmetically and saturated to 16 bits. With shift 15 this is
a saturating Q1.15 multiply; (-1)*(-1) gives 0x7FFF.

**psnr_unit: a-priori SNR.** A decision-directed estimate:

```
xi = sat16( ((k1*a >>> 15) * (k1*b >>> 15) + k2 * max(c, floor)) >>> shift )
```

The constants are k1 = sqrt(0.98), k2 = 0.02 (Q1.15) and floor = 0. The
operands are a = previous gain G, b = G times the previous a-posteriori SNR,
and c = current a-posteriori SNR minus 1. This gives
xi = 0.98 G^2 gamma_prev + 0.02 max(gamma - 1, 0). With a in Q1.15, b and c
in Q4.11 and shift 15, xi comes out in Q4.11.

**bitslice_unit: bit range extraction.**
`out = ((x >> rs) & (2^rw - 1)) + ((x & (2^lw - 1)) << ls)`, on the low 32
bits of an accumulator. The immediate holds rs in [4:0], rw in [9:5], ls in
[14:10] and lw in [19:15]. Taking bits 30..15 of a Q30 sum is rs = 15,
rw = 16, lw = 0.

**norm_unit: redundant sign bits.** Shift right until the value is 0 or -1,
count the shifts, and subtract the count from 15. The result is 0 for 0x4000
and 0x8000, 14 for 1, and 15 for 0 and -1. The unit is the unrolled form of
that loop.

**modadd_unit: modulo add.** One add and one conditional subtract. It
removes the "which buffer?" branch and the shifting of delay lines from
adaptive filters.

## Example: the warped FIR kernel

The testbench's first program filters 16 samples through 16 all-pass
sections with 17 gains. The samples are in main memory, the gains in local
memory, and the section states in r16..r31. One sample takes 20 bundles,
and the whole body is cached:

```
B0      slot0: LD r1 <- x[n]           slot1: LD r2 <- g[0]
Bk      slot0: WARP r(15+k), r1 <- (r(15+k), r1)     k = 1..16
        slot1: LD r2 <- g[k]
        slot2: MACA acc0 += r1 * r2     (MULA for k = 1)
B17     slot0: n++                      slot2: MACA acc0 += r1 * r2
B18     slot0: BSLICE r5 <- acc0[30:15]
B19     slot0: ST y[n] <- r5
```

In bundle k, slot 2 uses r1 = p(k-1) and r2 = g(k-1). These are the values
from before slot 0 and slot 1 overwrite them in the same bundle. Each
bundle does one all-pass section, one tap, and one load.

## Files

| File | Contents |
|---|---|
| `rtl/hasip_pkg.sv` | constants, opcodes, instruction and request structs |
| `rtl/hasip_top.sv` | the processor: memories, fetch, register files, accumulators, 3 slots, host port |
| `rtl/fetch_unit.sv` | PC, branches, hardware loop, loop cache control |
| `rtl/loop_cache.sv` | 32 x 160 store with tag and valid |
| `rtl/issue_slot.sv` | one slot: ALU, multiplier, custom units, optional load/store unit |
| `rtl/warp_unit.sv`, `sfpmul_unit.sv`, `psnr_unit.sv`, `bitslice_unit.sv`, `norm_unit.sv`, `modadd_unit.sv` | function units |
| `rtl/register_file.sv`, `acc_file.sv`, `data_mem.sv`, `prog_mem.sv` | storage |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_hasip_lms.sv` | LMS feedback canceller running on the processor |
| `tb/tb_hasip_bmf.sv` | two-microphone adaptive beamformer running on the processor |
| `tb/tb_hasip_fft.sv` | 16-point FFT running on the processor |
| `tb/hasip_asm_pkg.sv` | instruction-building helpers for the processor testbenches |

### Host interface of `hasip_top`

While `busy` is low, the host can do three things:

* write program words through `pm_we`/`pm_waddr`/`pm_wdata`;
* read and write either data memory through `host_dm_*`, where `host_dm_sel`
  0 selects main memory and 1 selects local memory;
* pulse `start`.

Execution begins at address 0 and runs until HALT raises `done`. `cycles`
counts the cycles of the run. `pm_fetch`, `lc_hit` and `lc_fill` show in
every cycle where the bundle came from. This port is where the A/D and D/A
converters and a boot path would attach in a chip.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/hasip_pkg.sv \
          tb/hasip_asm_pkg.sv tb/tb_hasip_top.sv --top-module tb_hasip_top
./obj_dir/Vtb_hasip_top
```

Replace `hasip_top` with another module name to run its unit test.
`tb_hasip_top` uses the processor at its default size and takes well under
a second. It runs three programs:

* **A**, the warped FIR above. It checks the output bit-exactly against an
  integer model, and within 40 LSB against a floating-point warped FIR.
* **B**, the circular delay line of an adaptive filter: two MODADDI indices
  over 24 and 8 entries, 128 passes.
* **C**, the per-band step of noise reduction and compression for 17 bands:
  PSNR, NORM and a saturating SFPMUL. It runs inside a BNZ outer loop that
  re-enters the cached loop, and is followed by an uncached 34-bundle loop.

`tb/tb_hasip_lms.sv` runs an adaptive feedback canceller as a program: an
8-tap LMS filter over 480 samples, 59 cycles per sample. The loudspeaker
signal first passes the canceller's fixed front end: a bulk delay of 2
samples, a DC zero (1 - z^-1) and a frozen pole at 0.5. The adaptive FIR
works on a MODADDI-indexed circular delay line of that filtered signal. Its
output is the feedback estimate, which is subtracted from the microphone
signal. In the test scene the real feedback path is the same front end
followed by a random 8-tap FIR, so the weights can match it. The filter
and weight-update loops take turns in the loop cache, so each one refills
on every sample. The test compares every error sample and the final
weights bit-exactly against a model, and checks the cycle count and the
cache fill/hit counts. It also checks that the error power drops by more
than 13 dB; it typically drops by 20 to 30 dB. It
shares the small assembler in `tb/hasip_asm_pkg.sv` with `tb_hasip_top`,
so compile that package ahead of the testbench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/hasip_pkg.sv \
          tb/hasip_asm_pkg.sv tb/tb_hasip_lms.sv --top-module tb_hasip_lms
```

`tb/tb_hasip_bmf.sv` runs a generalized sidelobe canceller on the same
loop structure, 58 cycles per sample over 480 samples. Both microphone
samples pass an equal steering delay and are loaded in one bundle, one
from each memory. Their half-sum is the fixed beam and their difference is
the blocking path, which holds no sound from the front. An 8-tap LMS filter
on the blocking path removes what is left of a side noise source from the
beam. In the test scene a tone arrives from the front and the noise
arrives at the second microphone one sample late and at half the level.
The test compares every output sample and the final taps against a model,
checks the cycle and cache counts, and requires that the noise left in the
output drops by more than 13 dB; it drops by about 30 dB.

`tb/tb_hasip_fft.sv` generates and runs a 16-point radix-2 DIF FFT. This
is the transform that noise reduction and compression share. The real parts
live in one memory and the imaginary parts in the other, so each complex
access is a single bundle. The output is left in bit-reversed order, and
the butterflies with twiddle 1 or -j use no multiply; that covers all of
the last two stages. The whole transform is 192 bundles and takes 192
cycles. It matches an integer model exactly, and a floating-point DFT
within 12 LSB.

The test checks the exact cycle count of each run, and the number of
loop-cache fills and hits. It also requires that each mechanism occurred at
least once: cache fill, hit, hit on re-entry, uncached loop, two memory
accesses in one bundle, modulo wrap, saturation, taken branch, and restart.

To write your own programs, use `tb/hasip_asm_pkg.sv`. `S(...)` builds a
slot word, `C(...)` a control word and `bundle(...)` a whole instruction.
Write the instructions into program memory through the host port, as the
testbenches do.

## How far to trust it, and where it departs

Taken from the design: data width, issue width, instruction width, register
file sizes, 40-bit intermediate registers, two data memories with their own
load/store units, the 32-entry compiler-driven single-ported loop cache, and
the dataflow of each custom unit.

This implementation's own choices:

* the whole instruction set and encoding, and the control-flow instructions;
* the lack of a pipeline, and the combinational memory reads;
* the memory depths and the number of accumulators;
* one kind of intermediate register: the design has both 32-bit and
  40-bit ones, here only 40-bit accumulators exist, and a 32-bit value is
  the low part of one (BSLICE reads those 32 bits);
* putting every custom unit in every slot (which slot had which unit is not
  known);
* the loop cache's tag for re-entry;
* fixed-point formats, rounding (truncation) and saturation.

The custom-unit dataflow graphs do not label the select conditions of their
multiplexers. The unit descriptions above give this implementation's reading
of them: saturation in SFPMUL and PSNR, max() in PSNR, and the loop exit in
NORM. The all-pass reading of WARP is the one that makes its graph a
first-order all-pass.

Not included:

* the hearing-aid software itself, beyond the six test kernels. That
  covers windowing, the larger FFT sizes, the FFT-based noise
  estimation, WDRC gain tables and overlap-add.
* the A/D and D/A converters.
* the processor variants with 2 or 4 slots and other instruction widths.
* any power or area model.

Whether the full application fits the 256-word program memory and the two
1024-word data memories is not known. Its size is not available, and the
depths are constants in `hasip_pkg` that can be raised.
