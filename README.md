# HASPRNG: pipelined hardware for the SPRNG random number generators

Monte Carlo codes on supercomputers draw from many parallel, independent
random number streams, and the SPRNG generator families are a common source
of them. This RTL implements five of those families as FPGA datapaths that
produce the same numbers as the software recurrences for the same
parameters and seeds, but at one number per clock (or one per two clocks).
Around them sits a verification platform: the generator under test fills a
128 KB dual-port RAM, is stopped while a host processor compares the buffer
bit for bit with its software reference, and is then resumed. The stream
carries on where it stopped.

| Generator | Recurrence | Rate | Module |
|---|---|---|---|
| 48-bit LCG | Z(n) = a·Z(n-1) + p mod 2^48 | 1 / clock | `lcg` (W=48) |
| 64-bit LCG | Z(n) = a·Z(n-1) + p mod 2^64 | 1 / clock | `lcg` (W=64) |
| CMRG | Z(n) = X(n) + Y(n)·2^32 mod 2^64 | 1 / 2 clocks | `cmrg` |
| Multiplicative LFG | Z(n) = Z(n-k)·Z(n-l) mod 2^64 | 1 / clock | `mlfg` |
| PMLCG | Z(n) = a·Z(n-1)·2^32 mod (2^61-1) | 1 / 2 clocks | `pmlcg` |

The sixth SPRNG family, the modified (additive) lagged Fibonacci generator,
is not included. Its recurrence and its separate even-lag and odd-lag
datapaths were not available in enough detail to build it.

## The central problem: a recurrence inside a pipelined loop

Each of these generators is a recurrence: the next number needs the previous
one. A wide multiplier in that feedback loop either sets a slow clock or is
pipelined, and a pipelined multiplier of depth D returns its product D clocks
after the operand went in. The generators deal with this latency in three
different ways.

### LCGs: eight-step look-ahead (`lcg`, `pipe_mult`)

The multiplier has 7 pipeline stages and the addend register adds one more
stage, so a value needs 8 clocks to go round the loop. Unrolling the
recurrence eight times gives

    Z(n) = a'·Z(n-8) + p'   (mod 2^W)
    a'   = a^8
    p'   = p·(a^7 + a^6 + ... + a + 1)

so each number depends only on the number eight positions earlier. Eight
independent values circulate in the loop at once. Each one re-enters the
multiplier in the clock after it leaves the adder, and the generator emits
one number per clock. The host computes a' and p' when it seeds a stream
and supplies them on `a8_i`/`p8_i`.

`pipe_mult` cuts the multiplier operand into 7 digits (7 bits for W=48, 10
bits for W=64). Stage i adds `a · digit_i · 2^(i·digit width)` to a running
sum and passes a, b and the sum on. Only the low W bits are kept, because
the result is taken mod 2^W anyway.

**Seeding.** The loop must hold eight consecutive states. The host loads
Z(k-7) … Z(k), oldest first, with `ld_valid_i`. A loaded value goes straight
into the multiplier, so the first number presented after the eighth load is
Z(k+1). The testbenches load Z(0) … Z(7) and expect Z(8), Z(9), …

### CMRG: two halves combined (`cmrg`)

The X half is a 64-bit `lcg`. The Y half evaluates

    Y(n) = 107374182·Y(n-1) + 104480·Y(n-5)   (mod 2^31-1)

It uses a register for Y(n-1), a four-deep register FIFO for Y(n-2) … Y(n-5),
two constant multipliers and a reduction network. Its loop takes two clocks:

* in phase 0 both products are registered;
* in phase 1 they are summed and reduced mod 2^31-1, Y(n) is written into
  the Y(n-1) register, the FIFO shifts, and
  Z(n) = X(n) + Y(n)·2^32 mod 2^64 is presented.

The LCG half advances only in phase 1. The result is one number every other
clock. Reduction uses 2^31 ≡ 1: the bits above 31 are folded onto the low
31 bits twice, then 2^31-1 is subtracted once if needed. Seeding: eight LCG
states with `ld_sel_i = 0`, and five lag states Y(k-4) … Y(k) with
`ld_sel_i = 1`. Both halves must use the same index k.

### PMLCG: four partial products and a Mersenne fold (`pmlcg`)

The 61 × 61-bit product a·Z(n-1) is split into four partial products of the
operand halves (low 32 bits, high 29 bits), one multiplier each. These are
registered in phase 0. In phase 1 they are added into a 122-bit product,
which is reduced mod 2^61-1 by the same folding trick (2^61 ≡ 1). The result
is then multiplied by 2^32, which mod 2^61-1 is a 61-bit rotation, and
written back. Two clocks per number. The factor 2^32 is the parameter
`SHIFT`. Set it to 0 to get the plain recurrence Z(n) = a·Z(n-1) mod
(2^61-1). Seeding is a single load of Z(k), with 1 ≤ Z(k) < 2^61-1.

### Multiplicative LFG: lag store in two RAMs (`mlfg`, `dpram`)

The last l results live in two identical dual-port RAMs, used as rings of l
words in which Z(n) is stored at address n mod l. One RAM is read at the
long lag n-l. That is the slot Z(n) will overwrite. The other RAM is read at
the short lag n-k. The two words feed the multiplier, and the product is
written back into both RAMs. The pipeline has three steps: issue the reads,
register the product, then present Z(n) and write it back. A value becomes
readable three steps after its reads were issued, so the short lag must be
at least 3. This is checked by an assertion. The default lags are
(l, k) = (17, 5). Seeding writes Z(0) … Z(l-1), which must be odd numbers;
output starts with Z(l) two clocks after the first enabled clock.

## Handshake common to all generators

Every generator has the same control interface:

* `en_i`: advance. While the generator is primed (`ready_o`), the whole
  loop steps on every clock with `en_i` high and holds when it is low.
* `rn_o`, `rn_valid_o`: the number is taken in every clock with
  `rn_valid_o` high. `rn_valid_o` is combinational from `en_i`, so a
  controller that drops `en_i` stops the stream in the same clock.
* A load always takes precedence over `en_i` and restarts priming.

## Verification platform (`hasprng_top`, `cont1`, `cont2`)

```
 host (seeding, reference, XOR check)
   |  ld_*, cfg_i           start/abort/check_done     rd_* (read port)
   v                              |                       ^
 generator bank --rn--> cont1 --write--> dpram 32K x 32 --+
   ^  (gen_sel_i)          | full
   +---- gen_en ------- cont2 ---> buf_ready_o
```

* **cont1**, the local controller, writes each number taken from the
  generator under test into the capture RAM at the next address. After
  32,768 words it raises `full`, which is a plain decode of its counter.
* **cont2**, the master controller, has three states: IDLE, RUN and PAUSE.
  It drops the generator enable in the same clock that `full` rises, so no
  number is lost or written twice. It then moves to PAUSE, and
  `buf_ready_o` tells the host to read. When the host pulses
  `check_done_i`, cont2 clears cont1's counter, counts one iteration
  (`iter_o`) and enables the generator again. `start_i` begins a run from
  IDLE. `abort_i` ends a run, for example after a mismatch.
* The capture word is the most significant 32 bits of each number: bits
  47:16 for the 48-bit LCG, 63:32 for the 64-bit generators and 60:29 for
  the PMLCG. 32K words of 32 bits make the 128 KB buffer.
* The host read port (`rd_en_i`, `rd_addr_i`, `rd_data_o`) has one clock of
  latency.
* `gen_sel_i` picks the generator under test. Change it only in IDLE.

Timing of one fill: after `start_i` (or `check_done_i`) the generator runs
from the next clock. `buf_ready_o` rises 32,768 × (clocks per number) + 2
clocks later, plus 2 more clocks on the MLFG's first fill for its pipeline.

## Where this RTL departs from, or adds to, the original design

* **Not built:** the modified lagged Fibonacci generator (even-lag and
  odd-lag variants), and the embedded PowerPC with the SPRNG software
  reference and the XOR comparison. The processor's signals are top-level
  ports, and the top testbench plays its role.
* **Own choices:** everything about interfaces is this design's own. That
  covers the load protocols, the `en_i`/`rn_valid_o` handshake, the
  start/abort/check-done controls, and the choice of which 32 bits are
  captured. The same goes for the internal split of the pipelined
  multipliers, the two-phase schedules of the CMRG and PMLCG, the MLFG
  pipeline depth and lags, and the RAM port arrangement.
* **PMLCG equation:** it is implemented with the factor 2^32 as specified,
  Z(n) = a·Z(n-1)·2^32 mod (2^61-1). If your reference uses the plain
  prime-modulus recurrence, set `SHIFT` to 0.
* **Bit-exactness with the SPRNG library** has not been checked. The
  generators are checked against the recurrences above, not against
  SPRNG's seeding code or its integer/float output conversions.
* **Clock rate and area** (about 100 MHz for the LCGs and CMRG and 68–78 MHz
  for the MLFG and PMLCG on a Virtex-II Pro) were not measured. Only the
  numbers-per-clock rates are checked, in simulation.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `hasprng_top` | `CAP_DEPTH` | 32768 | capture RAM words (32 bits each) |
| | `MLFG_LAG_L`, `MLFG_LAG_K` | 17, 5 | MLFG lags (need 3 ≤ k < l) |
| | `PMLCG_SHIFT` | 32 | power of two in the PMLCG recurrence |
| `lcg` | `W`, `STAGES` | 48, 7 | word width; multiplier stages (look-ahead = STAGES+1) |
| `pipe_mult` | `W`, `STAGES` | 64, 7 | width; stages |
| `mlfg` | `W`, `LAG_L`, `LAG_K` | 64, 17, 5 | width and lags |
| `dpram` | `DW`, `DEPTH` | 32, 32768 | word width, words |
| `cont1` | `DW`, `DEPTH` | 32, 32768 | word width, buffer words |
| `cont2` | `ITW` | 32 | iteration counter width |

If `STAGES` is changed in `lcg`, the host must supply a^(STAGES+1) and
p·(a^STAGES + … + 1) instead of a^8 and p·(a^7 + … + 1).

Shared types and helpers are in `rtl/hasprng_pkg.sv`: the generator enum
`gen_sel_e`, the configuration record `gen_cfg_t`, the CMRG constants, and
the reduction functions `mod_m31`, `mod_m61` and `rotl_m61`.

## Testbenches and how to run them

Each testbench checks its block against an independent reference model,
counts checks, and ends with a line `TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `lcg_tb` | W=48 and W=64. The host derives a^8 and p′ from a and p; numbers are checked against the one-step recurrence. Checks the full rate, random stalls and reseeding. |
| `cmrg_tb` | Checks against the X/Y recurrences computed with `%`. Checks the rate of one number per two clocks, and stalls. |
| `pmlcg_tb` | Checks against 128-bit `%` arithmetic. Checks the rate, stalls, and operands next to the modulus. |
| `mlfg_tb` | Lags (17,5) and (7,3), the latter being the smallest allowed short lag. Checks the rate and stalls. |
| `dpram_tb` | Random reads and writes against a shadow array, including same-address collisions. |
| `cont1_tb`, `cont2_tb` | Controller sequences: fill, full, hold, clear; start, pause, resume, abort. |
| `hasprng_regress_tb` | Regression at full size. Each generator runs three seeds of 16 fills each, 1.57 M numbers per generator. Checks random host delays while paused, an abort in mid-fill, and that a deliberately slipped reference is reported. Runs in about 15 s. |
| `hasprng_top_tb` | End to end at full size. All five generators, two 32K fills each; every word is XOR-checked against software models, and fill times are checked. Every fill, resume, abort and generator switch is counted. Runs in about a second. |

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hasprng_pkg.sv \
          tb/hasprng_host_pkg.sv tb/hasprng_top_tb.sv \
          --top-module hasprng_top_tb -o sim
./obj_dir/sim
```

Replace `hasprng_top_tb` with any other testbench name. Verilator finds the
modules through `-Irtl`. The packages must be listed first. The block
testbenches need only `rtl/hasprng_pkg.sv`. The two platform testbenches also
need `tb/hasprng_host_pkg.sv`, which holds the host model: seeding, the
look-ahead constants, and the step-by-step reference recurrences.
