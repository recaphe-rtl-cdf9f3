# RECAPHE: one polynomial core for post-quantum signatures/KEMs and homomorphic encryption

Lattice cryptography comes in two very different sizes:

- **Post-quantum schemes** (Kyber, Dilithium) work on 256-coefficient polynomials with 12- or 23-bit moduli.
- **Homomorphic encryption** (CKKS/BFV in RNS form) works on polynomials of 2^12 to 2^16 coefficients with moduli of roughly 32 to 60 bits.

Both spend their time in the same operations: modular multiplication, number-theoretic transforms (NTT/INTT) and coefficient-wise add, subtract and multiply.

This RTL builds one core that serves both sizes. Two pieces of hardware are shared and reconfigured at run time:

1. A **dual-scheme modular multiplier**. It is a 54-bit Barrett multiplier for HE. Its partial products can instead be regrouped into two independent 27-bit multipliers for PQC, so no DSP slice sits idle when the moduli are small.
2. A **hybrid butterfly module** of eight butterflies. For long HE polynomials it runs as an 8-lane memory-based engine that ping-pongs between two RAM sets. For 256-point PQC transforms it is rewired into an 8-stage multi-path delay commutator (MDC) pipeline. That pipeline runs NTT in one direction and INTT in the other.

The top level, `recaphe_top`, holds three hybrid butterfly modules and two coefficient-wise arithmetic modules. Each module is configured on its own, so the core can run, for example, three PQC transforms side by side, or one 2^16-point HE transform next to PQC work.

All of it is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. Self-checking testbenches are in `tb/`.

## Number formats and configuration

Data words are **54 bits**. A word is read one of two ways:

| configuration | word meaning | modulus fields in `modcfg_t` |
|---|---|---|
| `CFG_HE` | one residue < q, q up to 54 bits | `q` = q, `m` = floor(2^k / q) |
| `CFG_PQC` | two 27-bit lanes `{x1, x0}`, each < its own q | `q = {q1, q0}` (27 bits each), `m = {m1, m0}` (28 bits each) |

`k = 2*ceil(log2 q)` is derived in hardware from `q`. The Barrett constant `m` is supplied by the user.

`recaphe_pkg::pqc_cfg(s0, s1)` builds a PQC configuration for any mix of Kyber (q = 3329, m = 5039) and Dilithium (q = 8380417, m = 8396807).

A configuration must be held stable while operands of that configuration are in flight.

## The dual-scheme multiplier (`modmul_dual`)

The operands are cut into 27-bit pieces of `a` and 18-bit pieces of `b`, giving six 27x18 products: the natural DSP-cascade decomposition of a 54x54 product:

```
m0 = a[26:0]*b[17:0]    m1 = a[26:0]*b[35:18]    m2 = a[26:0]*b[53:36]
m3 = a[53:27]*b[17:0]   m4 = a[53:27]*b[35:18]   m5 = a[53:27]*b[53:36]
```

- **HE:** the six products are shifted and summed into a 108-bit `z`. One Barrett step follows: `t = (z*m) >> k`, `y = z - t*q`, then one conditional subtraction of q.
- **PQC:** the same six multipliers compute `a0*b0` and `a1*b1` for the two 27-bit lanes. `b[35:18]` straddles both lanes, so the `b` input of m1 is masked to `b[26:18]` and that of m4 to `b[35:27]`; m2 and m3 get zero.
  - lane 0 = m0 + (m1 << 18)
  - lane 1 = (m4 >> 9) + (m5 << 9)

  Each lane is then reduced with its own q, m and k, and the two results are packed back into one word.

The multiplier is fully pipelined with a latency of 4 cycles:

1. partial products
2. z and k
3. t
4. y and the final correction

With `k = 2*ceil(log2 q)` and reduced inputs, the Barrett estimate is at most one short, so one correction is enough. The testbench drives extreme operands to check this.

## The unified butterfly (`bfly_unified`)

One datapath covers both transforms:

- **NTT**, Cooley-Tukey: `A = a + w*b`, `B = a - w*b`
- **INTT**, Gentleman-Sande: `A = (a + b)/2`, `B = (a - b)*w/2`, where w is the inverse twiddle.

The 1/2 is a modular halving: `x/2 = x even ? x>>1 : (x+q)>>1`. Halving at every INTT stage means no separate 1/N scaling pass is needed.

- **Special stage:** when `special` is set, the pair passes through with the same latency and no arithmetic.
- **PQC:** every add, subtract, halve and multiply works per 27-bit lane.
- **Latency:** 7 cycles: pre-add/sub, the 4-cycle multiplier, post-add/sub, halving.

## MDC mode: a 256-point streaming transform

In MDC mode the eight butterflies form a chain: `Bfly7 - DSD64 - Bfly6 - DSD32 - ... - DSD1 - Bfly0`.

A delay-switch-delay commutator (`dsd`, delay D) delays its lower input by D cycles and its upper output by D cycles. In the second half of every 2D-cycle block it crosses the two paths. The regrouping it performs is its own inverse, so the same commutators serve both directions:

- An **NTT** enters at butterfly 7 (span 128) and leaves at butterfly 0 (span 1).
- An **INTT** enters at butterfly 0 and leaves at butterfly 7.

The NTT input port is therefore the INTT output port. The two directions cannot run at the same time: the last burst must leave the pipeline before the direction changes. Bursts in the same direction may follow each other with no gap. The NTT output stream is already in the order the INTT input expects, so an NTT result can be fed straight back for an INTT without reordering.

One transform is a burst of 128 consecutive valid cycles:

| | cycle c carries |
|---|---|
| NTT input | `(x[c], x[c+128])`, natural order |
| NTT output | `(X[2c], X[2c+1])`: the array an in-place Cooley-Tukey negacyclic NTT leaves, i.e. bit-reversed evaluation order |
| INTT input / output | the same two formats, swapped |

Each butterfly has its own constant twiddle table (`mdc_tw_rom`), computed at elaboration. Entries are `zeta_k = 17^brv7(k)` for Kyber and `1753^brv8(k)` for Dilithium, together with their inverses. An address generator counts the butterfly's inputs and uses `count >> p` for butterfly p. No twiddles need loading for PQC.

Both 27-bit lanes run a polynomial each, so one burst transforms two polynomials. They must use the same scheme, because the lanes share the twiddle.

**Kyber's special stage.** q = 3329 has 256th but not 512th roots of unity, so Kyber's NTT has only seven layers. The missing one is the span-1 layer. Here that layer is butterfly 0: the last stage for NTT and the first for INTT. In Kyber mode, butterfly 0 passes its pair through unchanged. Kyber therefore uses the same eight-stage pipeline, latency and stream format as Dilithium, and the control never has to tap the chain at a different stage.

**Timing.** From the first input to the first output of one burst takes 8 x 7 + 127 = 183 cycles, and the last output leaves 127 cycles later. Three modules started together finish three transforms (six polynomials with two lanes) in 311 cycles, about 1.04 us at 300 MHz.

## Memory-based mode: long HE transforms

A polynomial of N = 2^logn coefficients (logn 5 to 16, a run-time input) lives in one of two **coefficient sets** (`coef_bank`) as N/8 rows of 8 words.

Each of the logn **stages** streams every row pair of one set through the eight butterflies into the other set (ping-pong). The result ends in set `logn % 2`.

The schedule is **constant-geometry**, so every stage has the same access pattern:

- NTT stage j (0 to logn-1): butterfly i reads `x[i]` and `x[i+N/2]` and writes `x'[2i]` and `x'[2i+1]`, with twiddle `zeta_(2^j + (i mod 2^j))`.
- INTT: the exact reverse, from stage logn-1 down to 0.

Starting from natural order, the NTT produces the same bit-reversed array as the MDC mode, and the INTT returns it to natural order scaled by 1/N.

**Banking.**

- Per cycle, a stage reads two rows, one from each half, and writes two rows, one even and one odd.
- Each set is therefore split into four RAMs by (half, row parity), so that read and write never collide. Assertions flag any bank conflict.
- Each RAM has one write and one read port and holds 2048 x 432 bits.
- One set holds a full 2^16 x 54-bit polynomial (3.54 Mbit).

**Twiddles.** These sit in a loadable memory (`tw_mem`), with one table per direction and eight twiddles per row (`zeta_(8R+l)` in lane l of row R).

- Stages j >= 3 need one row per cycle, row `2^(j-3) + (r mod 2^(j-3))`.
- Stages 0 to 2 use row 0 and pick lane `2^j + (k mod 2^j)` for lane k.
- The host loads the table once per modulus, through `tw_wr_*`.

**Timing.** After the last row of a stage, the controller waits for the pipeline to drain before the next stage reads. A stage takes N/16 + 9 cycles, and a transform `logn*(N/16 + 9) + 1` cycles from `start` to `done`. For N = 2^16 that is 65 681 cycles, or 218.9 us at 300 MHz.

**Host access.** While `busy` is low, `host_wr_*` and `host_rd_*` write or read whole rows of either set; read data comes back one cycle later. `start` launches a transform in direction `dir`, and `done` pulses at its end.

## Coefficient-wise modules (`coef_unit`)

Each module applies ADD, SUB or MUL to 16 words per cycle: 16 HE coefficients, or 32 PQC coefficients as two lanes per word. It uses one `modmul_dual` per word. Add and subtract results are delayed to the multiplier's 4 cycles, so every operation has the same latency and the op may change every cycle.

## Top level (`recaphe_top`)

| parameter | default | meaning |
|---|---|---|
| `NBF` | 3 | hybrid butterfly modules |
| `NCU` | 2 | coefficient-wise modules |
| `CU_LANES` | 16 | words per cycle per coefficient-wise module |
| `LOGN_MAX` | 16 | largest HE transform, 2^16 |

Every port of `hybrid_bfly` and `coef_unit` is brought out as an unpacked array indexed by module number: `bf_*`, `mdc_*`, `host_*`, `tw_*` and `cu_*`. The core does not decide how polynomials move between modules, or between the core and bulk storage such as the RNS limbs of a ciphertext; the surrounding system does.

`rst_n` is asynchronous and active low. It resets control state and valid pipelines, not the data.

## How far the design follows its source, and where it departs

Taken from the published architecture:

- the 54-bit multiplier built from six 27x18 products;
- two-lane PQC use of the multiplier, with the Barrett algorithm as given;
- eight butterflies shared between a ping-pong memory mode and a 256-point bidirectional MDC mode;
- DSD delays 1, 2, 4, and so on;
- separate twiddle stores for the two modes, with constant tables for PQC;
- the Kyber special stage;
- three butterfly modules and two coefficient-wise modules.

Choices of this RTL, not given by the source:

- pipeline depths and the reset style;
- how the multiplier's PQC split is wired;
- the butterfly equations, stream orders and the end at which each direction enters;
- the commutator phase;
- the constant-geometry memory schedule, its banking and twiddle layout;
- the 16-lane width of the coefficient-wise modules, estimated from DSP counts.

Known differences:

- **Special stage:** the source describes the special stage as a swap of the two inputs. In the stream order used here, the pair already leaves in the order Kyber needs, so the stage is a plain pass-through.
- **Butterfly count in the drawing:** the source's drawing of the hybrid module shows four butterflies and three commutators. This RTL follows the text: eight butterflies and seven commutators for 256 points.
- **Module count:** one passage of the source speaks of two butterfly modules, another of three. Three are built.
- **Moduli above 54 bits:** HE moduli of 55 to 60 bits are not supported; the datapath is 54 bits.
- **Stage overhead:** the 2^16 transform takes 65 681 cycles, against about 65 730 (219.10 us at 300 MHz) reported for the original design. Three parallel PQC transforms take 311 cycles, against 1.15 us (345 cycles).
- **Not built:** the interconnect and bulk (URAM) storage between modules. The buffering needed to feed an MDC result back in is left to the surrounding system.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. Each has a watchdog. Reference values come from direct modular arithmetic in `tb/tb_math_pkg.sv`, never from the RTL.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/recaphe_pkg.sv tb/tb_math_pkg.sv rtl/*.sv tb/tb_recaphe_top.sv \
    --top-module tb_recaphe_top
./obj_dir/Vtb_recaphe_top
```

Swap the testbench file and top module name to run another one. Testbenches that do not use the math package can leave it out.

| testbench | what it checks |
|---|---|
| `tb_modmul_dual` | random and extreme operands, HE (54-bit prime) and PQC (Kyber/Dilithium lanes mixed), 4-cycle latency |
| `tb_bfly_unified` | NTT, INTT and special-stage butterflies in both configurations, 7-cycle latency |
| `tb_dsd` | commutator reordering against a model, and that two passes restore the input |
| `tb_mdc_tw_rom` | every table entry against `root^brv(k) mod q` |
| `tb_tw_mem`, `tb_coef_bank` | read and write per direction and set, and conflict-free banking |
| `tb_hybrid_bfly` | memory mode for N = 32, 64, 256 (NTT, INTT, round trip, cycle count); MDC mode for Kyber and Dilithium against a direct NTT, round trip, 183-cycle latency |
| `tb_coef_unit` | ADD, SUB and MUL, both configurations, op changes every cycle |
| `tb_recaphe_top` | end to end at reduced size: a polynomial product through memory-mode NTT, coefficient-wise multiply and INTT; three MDC transforms in parallel; a mode switch; add and subtract. It counts each mechanism (memory NTT and INTT, MDC NTT and INTT, Kyber special stage, two-lane PQC, three-way parallel, mode switch, each coefficient-wise op) and fails any that never happened |
| `tb_he_lengths` | one hybrid module at default size over the HE lengths N = 2^12 to 2^15, alternating a 54-bit and a 40-bit prime: full NTT output against a software NTT, INTT round trip, cycle count per transform |
| `tb_recaphe_full` | the top at its default parameters: a 2^16-point 54-bit NTT (checked in full against a software NTT) and INTT round trip, 65 681 cycles each, while the other two modules run Kyber and Dilithium in MDC mode |

The full-size testbench takes about half a minute to build and run.
