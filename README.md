# Fault detection for an NTT accelerator by recomputing with negated operands

Lattice-based post-quantum schemes such as Kyber and NewHope spend most of
their time multiplying polynomials, and they do it with the number-theoretic
transform (NTT). When the NTT runs on a hardware accelerator next to a
processor, a fault in the accelerator's arithmetic, whether a defect or a
deliberate fault injection, silently corrupts the result and can leak key
material. This RTL protects the arithmetic of such an accelerator with
*time redundancy on encoded operands*: every operation is done twice, once
on the operands as they are (the **Norm** pass) and once on encoded operands
(the **RENO** pass, "recomputing with negated operands"), the second result is
decoded, and a comparator raises an error if the two disagree.

The encoding is modular negation. Because every unit is linear mod q,

    -( (-x) * y )   = x * y         (mod q)    multiplier
    r1 - (-r2)      = r1 + r2       (mod q)    subtractor becomes an adder
    r1 + (-r2)      = r1 - r2       (mod q)    adder becomes a subtractor

so the recomputed result must equal the first one. A stuck-at or transient
fault, however, acts on `x` in one pass and on `q - x` in the other, two bit
patterns that have little in common, so the two results almost never agree.
The extra hardware is small: a negation unit and a 2:1 multiplexer on each
side of the protected unit, and a comparator.

The design follows the scheme published in the article *Error Detection
Architectures for Hardware/Software Co-Design Approaches of Number-Theoretic
Transform*, with its NewHope parameter set (n = 512, q = 12289, k = 3) as the
default. Everything that article leaves open has been filled in here; the
section "Where this RTL goes beyond the scheme" lists those choices.

## The protected segment

The accelerator takes four coefficients per clock in registers A, B, C and D
and multiplies them with operands from two RAMs. Three constructions protect
three places of that datapath; `ntt_ed_top` puts all three in one pipeline:

```
 in_word {D,C,B,A}, s ──► coeff_regs ──► A B C D, s
 ram*_raddr ──────────► RAM1, RAM2 (coeff_ram, 512 x 16, software-filled)

 stage 1 (norm_reno_ctrl #1)
   reno_d   :  m2   = MontRed( D           x RAM1 )   ── err_d
   reno_ba  :  out2 = MontRed( (s ? A : B) x RAM2 )   ── err_ba
                 │ checked m2                │ C, delayed to meet m2
                 ▼                           ▼
 stage 2 (norm_reno_ctrl #2)
   recomp_cd:  Reg1 = m2, Reg2 = C
               out3 = Reg1 - Reg2, out4 = Reg1 + Reg2 (mod q) ── err_cd

 err_flag = sticky OR of err_d, err_ba, err_cd (cleared by err_clear)
```

### Line D: RENO around the multiplier (`reno_d`)

```
 D ──┬───────────── 0 ┐                      ┌──────────── 0 ┐
     └─ mod-q neg ─ 1 ┴─► x ─► MontRed ──────┴─ mod-q neg ─ 1 ┴─► res ─► reno_cmp ─► m2, err
                          ▲ RAM1
```

Norm pass: `m2 = MontRed(D * RAM1)`. RENO pass: the multiplier sees `q - D`,
and its reduced product is negated again, so `m2' = m2` when nothing is
wrong. Both multiplexers follow the Norm/RENO select.

### Lines B and A: the same around the RAM2 multiplier (`reno_ba`)

A mode multiplexer in front selects B when `s = 0` (polynomial
multiplication mode) and A when `s = 1` (NTT mode). The selected operand then
goes through exactly the line-D structure, with RAM2. One construction thus
covers both lines and both modes. `s` is registered together with the
operands, so the mode cannot change between the two passes.

### Lines C and D: negated and swapped operands (`recomp_cd`)

This is the least obvious of the three. Reg1 holds the end of line D, Reg2
the end of line C. In the Norm pass the subtractor gives `out3 = Reg1 - Reg2`
and the adder `out4 = Reg1 + Reg2`. In the RENO pass Reg2 is negated before
*both* units, so the subtractor now computes `Reg1 + Reg2` and the adder
`Reg1 - Reg2`: each unit does the other's job. Two output multiplexers swap
the results back, and the comparator checks the pair `{out3, out4}` against
the Norm pair. No decoding negation is needed: the swap is the decoding. A
fault in the subtractor shows up in `out4'` instead of `out3`, and a fault on
the Reg2 line meets `Reg2` in one pass and `q - Reg2` in the other.

### The comparator (`reno_cmp`)

Each construction ends in one comparator. It stores the Norm result and, one
cycle after the RENO result arrives, pulses `chk_valid` with the stored Norm
result and `err`. A RENO result without a preceding Norm result is also
reported as an error (and trips an assertion in simulation). The comparator is
assumed fault-free: a hardened comparator is a precondition of the coverage
figures below.

## Arithmetic

* **Field width.** A coefficient travels in a field of
  `ceil(log2(k*q)) = ceil(log2 36867) = 16` bits; four fields make the 64-bit
  operand word, D in the top field, A in the bottom one. Values are kept fully
  reduced, in `[0, q)`.
* **Montgomery multiplication** (`mont_mul`). `p = a*b*2^-16 mod q`, with the
  textbook reduction `m = (T mod 2^16) * q' mod 2^16`, `t = (T + m*q) / 2^16`
  and one final conditional subtraction of q. `q' = -q^-1 mod 2^16` is computed
  at elaboration by a constant function (Newton iteration), so any odd q
  works. The final subtraction is not optional here: the comparators compare
  bit patterns, and `t` and `t + q` would be the same number mod q but
  different words. Whether the RAM contents are kept in Montgomery form is up
  to the software; every product carries the factor 2^-16.
* **Negation** (`mod_neg`). `q - x`, and 0 for `x = 0`.
* **Add/subtract.** Modular, with one conditional correction each (functions
  in `ntt_ed_pkg`).

## Timing

Each operand word is processed twice, so the protected segment accepts one
word every two cycles, twice the n cycles an unprotected unit needs for n
operands. `norm_reno_ctrl` produces the schedule: accept, Norm cycle, RENO
cycle; the next word can be accepted in the RENO cycle, so a stream runs with
no idle cycle.

| event, counted from the cycle a word is accepted | SUBPIPE = 0 | SUBPIPE = 1 |
|---|---|---|
| Norm pass of stage 1 | +1 | +1 |
| RENO pass of stage 1 | +2 | +2 |
| `mul_valid` with `m2`, `out2`, `err_d`, `err_ba` | +4 | +5 |
| `bf_valid` with `out3`, `out4`, `err_cd` | +8 | +10 |

Stage 2 runs on word i while stage 1 already works on word i+1. An assertion
checks that stage 2 is always ready when stage 1 delivers.

**Handshake.** `in_word`, `s`, `ram1_raddr` and `ram2_raddr` are taken in a
cycle where `in_valid && in_ready`; `in_ready` is low only in Norm cycles. The
RAM entries are read in the accepting cycle and held for both passes. The RAM
write ports are independent of the stream.

**Subpipelining.** The recomputation halves throughput at a given clock.
`SUBPIPE = 1` adds a register between the multiplier and the Montgomery
reduction (and after the adder/subtractor in `recomp_cd`), splitting the
longest paths roughly in half so the clock can be raised to win the
throughput back, at the cost of one cycle of latency per stage and some
flip-flops.

## How well it detects faults

`tb/fault_coverage_tb.sv` repeats the fault campaign the scheme was evaluated
with: 36 867 stuck-at faults per construction, 110 601 in all, a third each
single-bit, two-bit and multiple-bit (3 to 16 bits), stuck-at 0 or 1,
permanent (both passes) or transient (one pass). They are forced onto the
operand line that feeds each construction's arithmetic unit. A typical run
prints:

| construction | activated faults | detected | of activated |
|---|---|---|---|
| RENO on D | 29 777 | 29 579 | 99.3 % |
| RENO on B and A | 29 698 | 29 482 | 99.3 % |
| recomputing on C and D | 29 766 | 29 571 | 99.3 % |

The published figures are 99.51 %, 99.67 % and 99.41 %; the sites and the
denominator used there are not known, so the numbers are close rather than
comparable. "Activated" means the fault changed the line in at least one pass;
a stuck-at bit that already has its stuck value in both `x` and `q - x` does
nothing and cannot be seen. Three properties are checked on every fault:
nothing is flagged for a fault that was not activated, every transient fault
that corrupts a result is flagged, and at least 99 % of activated faults are
flagged. The rest, under 1 %, are permanent faults that happen to map `x` and
`q - x` onto values that are still negatives of each other mod q, so both
passes agree on the same wrong result.

## Where this RTL goes beyond the scheme

The scheme describes the three constructions as additions to an existing NTT
unit and gives their data paths; the following is this design's own:

* **One combined datapath.** The three constructions are evaluated separately
  in the original work. Here they share the operand registers; Reg1 is fed with
  the checked `m2` of line D and Reg2 with C, delayed to meet it. What
  really lies between the operand registers and Reg1/Reg2 in the original unit
  is not known.
* The valid/ready handshake, the pipeline stage boundaries, the registers in
  the comparators and all latencies.
* RAM organisation: 512 x 16 bits each, one write and one read port, registered
  read with enable, no reset.
* Montgomery radix 2^16 and full reduction; operands assumed reduced.
* `err_flag` is sticky and cleared by `err_clear`; all registers use an
  asynchronous active-low reset (`rst_n`).
* The Norm pass comes before the RENO pass.
* One comparator compares both outputs of `recomp_cd` together.

## What is not here

Only the protected segment is built. The rest of the accelerator it belongs
to is not: the address generation and stage control, the multiplexers that
let A to D bypass to the output when log2(n) is odd, the serial-in
parallel-out output unit, and the processor on the software side. The top's
operand stream, RAM read addresses and RAM write ports are where they would
connect. The unprotected "original" datapaths the scheme was compared with
are not included either.

## Files

| file | contents |
|---|---|
| `rtl/ntt_ed_pkg.sv` | parameters (q, n, k, field width), `ed_cycle_e`, modular helpers |
| `rtl/ntt_ed_top.sv` | the combined, protected segment |
| `rtl/reno_d.sv` | RENO on line D |
| `rtl/reno_ba.sv` | mode multiplexer + RENO on lines B/A |
| `rtl/recomp_cd.sv` | negated-and-swapped recomputation on Reg1/Reg2 |
| `rtl/reno_cmp.sv` | Norm/RENO comparator |
| `rtl/norm_reno_ctrl.sv` | accept / Norm / RENO sequencer |
| `rtl/mont_mul.sv` | Montgomery multiplier, optional subpipeline register |
| `rtl/mod_neg.sv` | modular negation |
| `rtl/coeff_regs.sv` | operand registers A-D and mode bit |
| `rtl/coeff_ram.sv` | RAM1 / RAM2 |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/ntt_ed_top_tb.sv` | end-to-end run at the default size |
| `tb/ntt_ed_top_subpipe_tb.sv` | the same with `SUBPIPE = 1` |
| `tb/fault_coverage_tb.sv` | the stuck-at fault campaign |
| `tb/ntt_ref_pkg.sv` | reference arithmetic for the testbenches |

After synthesis the whole top is about 150 word-level cells, 337 flip-flop
bits and 2 x 8 Kbit of RAM.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ntt_ed_pkg.sv tb/ntt_ref_pkg.sv tb/ntt_ed_top_tb.sv --top-module ntt_ed_top_tb
./obj_dir/Vntt_ed_top_tb
```

Replace `ntt_ed_top_tb` with any other testbench name. The end-to-end
testbench fills both RAMs, streams one multiplication pass and one NTT pass
of 128 words each (back to back and with gaps), checks every output against
a reference model and every latency, then forces a stuck-at fault onto each
construction in turn and checks that exactly the matching error output fires
and that `err_flag` can be cleared. It prints how often each mechanism
(both modes, Norm and RENO cycles, back-to-back acceptance, stalls, both stages
busy, each error) occurred and fails if one never did. The testbenches that
inject faults use `force` on internal signal names (`mul_op` in `reno_d`,
`op2` in `recomp_cd`); keep those names if you change the modules.

## Changing it

* Other moduli: set `Q` (odd; the negation and the checks assume a prime),
  `K` and `N` on `ntt_ed_top`; `W` follows as `ceil(log2(K*Q))`. The
  Montgomery radix follows `W`, which must keep `2^W > q`.
* `SUBPIPE` switches the subpipeline registers on; the top's line-C delay
  follows automatically.
* To protect another linear unit, put `mod_neg` plus a multiplexer in front
  and, where the unit's result is negated by the encoding, behind it, and
  feed the result to a `reno_cmp`.
