# Selectively hardened FP32 and Posit(32,2) arithmetic units

A permanent stuck-at fault inside an arithmetic core does not hurt every result in the
same way. A fault in the significand (mantissa/fraction) logic usually shifts a result by
less than 1.0. A fault in the logic that computes the exponent (IEEE-754) or the regime and
exponent (posit) can move a result by dozens of binary orders of magnitude. In a CNN or any
other error-tolerant workload, the first kind is absorbed and the second kind is what
corrupts the output.

This RTL puts the hardening only where those large errors start:

* the exponent adders and exponent multiplexers of an IEEE-754 single-precision multiplier
  and adder;
* the decoders, scale adders and encoder of a Posit(32,2) adder and multiplier.

The significand datapaths are left as plain logic. The protection is offered in three
forms:

* **Self-Check and Repair (S-CR):** adders check themselves and a cold spare replaces a
  faulty one.
* **Dual Modular Redundancy (DMR):** the protected adders are duplicated and compared.
* **Triple Modular Redundancy (TMR):** the protected adders are triplicated and voted.

The scheme follows the selective-hardening approach published by Rodriguez Condia,
Guerrero-Balaguera, Limas Sierra and Sonza Reorda ("Investigating and Mitigating Critical
Faults in Floating-Point and Posit Arithmetic Hardware", IEEE TETC, 2025). The circuits here
are an independent implementation. The section "Where this RTL is its own" lists every
choice the publication leaves open.

## The twelve units

`fpp_top` holds twelve independent units: four arithmetic cores, each in three hardened
forms. They share only `clk` and `rst_n`.

| core | S-CR | DMR | TMR |
|---|---|---|---|
| FP32 multiply | `fm_` `fp32_mul_scr` | `fd_` `fp32_mul_dmr` | `ft_` `fp32_mul_tmr` |
| FP32 add | `fa_` `fp32_add_scr` | `ad_` `fp32_add_dmr` | `at_` `fp32_add_tmr` |
| Posit(32,2) add | `pa_` `posit_add_scr` | `pd_` `posit_add_dmr` | `pt_` `posit_add_tmr` |
| Posit(32,2) multiply | `pm_` `posit_mul_scr` | `md_` `posit_mul_dmr` | `mt_` `posit_mul_tmr` |

What each form protects:

* **FP cores:** the exponent adders, plus the pack multiplexers that pick the final exponent
  and special cases.
  * S-CR: checked adders with a spare; the pack stage is triplicated.
  * DMR: adders duplicated.
  * TMR: adders and pack stage triplicated.
* **Posit cores:** the decoders' leading-zero counters, the scale adders and the encoder.
  * S-CR: redundant-multiplexer CLZs, checked scale adders with a spare, triplicated
    encoder.
  * DMR: scale adders and encoder duplicated.
  * TMR: CLZ multiplexers, scale adders and encoder triplicated.

All twelve units use the same interface:

* `in_valid`/`in_ready`: the unit accepts operands `a` and `b` when both are high.
* `out_valid`: a one-cycle strobe that comes with the result `y`.
* `detect`: high in every cycle in which a check fails.
* `fi`: fault injection (see below).
* `status` (S-CR units only): how the unit has been repaired.

## Self-Check and Repair

This is the most involved part of the design. It lives in `scr_adder_bank`, which is shared
by all four S-CR units.

### Checked adder slots

The adders to protect are grouped into *slots*: three in most units, two in the Posit
multiplier. Each slot has four parts:

* **`cla_adder`**: a carry-lookahead adder. It is a parallel-prefix tree that brings out
  every internal carry `C1`.
* **`carry_predictor` (R)**: a plain ripple chain, `C2[i+1] = a&b | C2[i]&(a|b)`. It shares
  no gates with the CLA, so one fault cannot corrupt both carry vectors in the same way.
  It also predicts the parity of the sum, `^a ^ ^b ^ ^C2`.
* **`two_rail_checker` (DRC)**: pairs each carry `C1[i]` with the inverse of `C2[i]`. A
  tree of two-rail cells merges the pairs:

  ```
  z0 = a0&b0 | a1&b1
  z1 = a0&b1 | a1&b0
  ```

  The output pair stays complementary only if every carry agrees. A fault inside the
  checker also produces a non-code output.
* **Parity compare**: the parity of the sum is compared with R's prediction. This catches
  a fault in the sum XORs, which the carry check cannot see.

A slot reports an error when either the DRC output or the parity compare is wrong.

### Cold spare and controller

One spare CLA serves all three slots. It sits behind an input multiplexer and an output
multiplexer. While unused, its inputs are held at zero, so it does not toggle.

The controller (CNT) watches the slot errors in every cycle in which the core raises `chk`,
that is, in every cycle that holds a live operation:

```
 cycle     RUN (chk)          ACT                     CORR
 no fault  ok=1, result taken
 fault     det=1, ok=0  --->  hold=1; diagnose,  ---> ok=1, result taken
                              switch spare in         from the repaired bank
```

So a detected fault costs exactly two extra cycles: one to detect it and activate the
spare, and one to re-execute. Fault-free operation adds no cycle. The core keeps its
operand registers stable while `hold` is high; an assertion checks this.

### Diagnosis rule

A slot error can come from its CLA or from its predictor R. The controller tells them apart
by re-executing:

1. **First failure in slot k:** the spare takes over slot k.
2. **Slot k fails again with the spare in place:** the only part common to both runs is
   R_k. R_k is marked faulty (`status.pred_fault`) and its checks are ignored from then on.
   The result, computed by a good adder, is delivered.
3. **Another slot fails once the spare is taken:** this cannot be repaired.
   `status.alarm` is raised and the result is delivered as computed.

The spare-selection register is triplicated and voted, and it is rewritten from the vote
every cycle. This gives the repair multiplexers' select lines the TMR protection the scheme
calls for.

## FP32 multiplier (`fp32_mul_dp`, `fp32_mul_pack`)

The multiplier works in four steps:

* **Sign and exponent:** XOR of the signs, and an exponent chain on three adders.
* **Significand:** a 24x24 product.
* **Normalization:** a one-bit shift.
* **Rounding:** round to nearest, ties to even.

The exponent adders are ports of the datapath, so each wrapper supplies them in its own
form (checked, duplicated or triplicated):

| slot | operation |
|---|---|
| 0 | `ea + eb` |
| 1 | `+ (-127)`, the bias constant |
| 2 | `+ inc`, where `inc` = normalization shift + rounding carry (0..2) |

All three are 10-bit signed adders, so overflow (exponent ≥ 255) and underflow (≤ 0) stay
visible to `fp32_mul_pack`. `fp32_mul_pack` is the last multiplexing stage. It selects, in
order:

1. NaN (`0x7FC00000`);
2. infinity;
3. zero;
4. overflow to infinity;
5. underflow to zero;
6. the normal result.

The hardened units triplicate it.

Subnormals are not supported:

* Subnormal inputs are read as zero.
* Results below the smallest normal are flushed to zero. The test uses the exponent after
  rounding.

## FP32 adder (`fp32_add_dp`)

The adder uses three exponent slots:

| slot | operation | purpose |
|---|---|---|
| 0 | `d = ea − eb` | picks the larger operand and the alignment shift |
| 1 | `e_big − z` | exponent after normalizing by `z` leading zeros |
| 2 | `+ 1 + rovf` | `rovf` is the carry out of the rounding increment |

The significand path works in 64 bits:

1. **Align:** shift the smaller significand right, with the shifted-out bits OR-ed into the
   least significant bit.
2. **Add or subtract.** A negative difference is negated and the sign flipped.
3. **Normalize:** a leading-zero count and a left shift.
4. **Round:** to nearest, ties to even.

When `d < 0` the alignment uses the same `~d` + 1 trick as the Posit adder (below).

The result goes through the same `fp32_mul_pack` stage as the multiplier, so NaN, infinity,
overflow and flush-to-zero behave alike in both FP units. Two cases differ from a general
add:

* `inf − inf` gives NaN.
* An exact zero sum is +0, unless both operands are −0.

The leading-zero counter feeds the exponent but is a plain cascade here. Only the Posit
units use redundant multiplexers in their counters.

## Posit(32,2) adder (`posit_decode`, `posit_add_dp`, `posit_encode`)

### Decoding

A posit has a run-length *regime* field, two exponent bits and a fraction. `posit_decode`:

1. makes the operand positive;
2. inverts the body if the regime is a run of ones;
3. counts the run with `clz_hm`;
4. shifts the run and its terminating bit away.

The result is `scale = 4k + e` (k = run−1 for ones, −run for zeros) and `frac = 1.f`.

`clz_hm` is a log-depth cascade. Each stage tests whether the upper part of the word is
zero, and a multiplexer then shifts the word. The shift past the regime is a five-stage
logarithmic shifter controlled by the count.

In the hardened Posit units (`HARDEN = 1`), every multiplexer of both the counter and the
shifter is an `hmux`: three multiplexers and a majority voter.

### Scale path

The scale path uses three adder slots, like the FP exponent:

| slot | operation | purpose |
|---|---|---|
| 0 | `d = sa − sb` | picks the larger operand and the alignment shift |
| 1 | `s_big + 1` | scale of bit 63 of the raw sum |
| 2 | `(s_big + 1) − z` | scale after normalizing by `z` leading zeros |

The shift for `d < 0` uses `~d` plus one fixed extra position. This avoids a negation adder.

### Fraction path

The fraction path is 64 bits wide and is not hardened:

1. **Align:** shift the smaller operand right, with the shifted-out bits OR-ed into the
   least significant bit.
2. **Add or subtract.**
3. **Normalize:** a plain 64-bit CLZ and a left shift.

### Encoding and special cases

`posit_encode` builds the regime: k+1 ones and a zero, or −k zeros and a one. It shifts the
exponent and fraction in behind the regime and cuts the string to 31 bits. Rounding is to
nearest, ties to even, **on the bit string**. This differs from value-nearest rounding only
where the regime leaves no room for both exponent bits (|scale| > ~108). Results saturate at
maxpos and minpos; posits never round to zero or NaR.

Special cases:

* A zero operand passes the other operand through.
* NaR in either operand gives NaR.
* Exact cancellation gives zero.

## Posit(32,2) multiplier (`posit_mul_dp`)

The multiplier reuses the decoder and encoder of the adder:

1. Both operands are decoded.
2. The two 30-bit fractions `1.f` are multiplied exactly into 60 bits. The product of two
   values in [1, 2) lies in [1, 4), so bit 59 says whether one normalization step is
   needed.
3. The scale path has two slots: `sa + sb`, then `+ p[59]`, with the normalization bit as
   the carry-in.
4. `posit_encode` rounds the normalized product and saturates it.

A zero operand gives zero, and NaR in either operand gives NaR. The hardening is the one of
the adder: redundant CLZ multiplexers in both decoders, S-CR on the scale slots and a
triplicated encoder.

## DMR and TMR variants

* **DMR (`*_dmr`):** each protected adder exists twice. The Posit units also duplicate the
  encoder. XOR arrays compare the copies.
  * On the first mismatch the unit switches for good to the redundant copy and
    re-executes once, which costs one extra cycle.
  * Later mismatches are only reported on `detect`. `switched` shows the state.
  * Like any duplex, the unit cannot tell which copy is right. If the redundant copy is
    the faulty one, results after the switch are wrong.
* **TMR (`*_tmr`):** each protected structure exists three times, with bitwise voters.
  Masking is purely combinational and never changes the timing. `detect` reports that a
  voter saw disagreement.

## Timing

Each unit has one operation in flight. `in_ready` is low from acceptance until
`out_valid`. The table counts the clock edges after the accepting edge at which
`out_valid` rises:

| unit | no fault | first detected fault |
|---|---|---|
| `fp32_mul_scr`, `fp32_add_scr`, `posit_add_scr`, `posit_mul_scr` | 1 | 3 |
| all `*_dmr` | 1 | 2 |
| all `*_tmr` | 1 | 1 |

Every datapath is one combinational cycle between the operand and result registers. A
target clock rate would need pipelining, which is not done here.

## Fault injection

The `fi` port (`fpp_pkg::fi_t`) forces one carry net (`idx` 1..10) to `val` when `en` is
set. `slot` picks the adder slot, and `tgt` picks which adder of that slot gets the
fault:

| `tgt` | S-CR units | DMR | TMR |
|---|---|---|---|
| `FT_CLA` | working CLA | working copy | copy 0 |
| `FT_SPARE` | spare CLA | redundant copy | copy 1 |
| `FT_PRED` | carry predictor | — | copy 2 |

Tie `fi` to `fpp_pkg::FI_NONE` in use. The port exists to demonstrate the protection. It
is not part of the hardening scheme.

## Where this RTL is its own

The publication gives the structure of the mechanisms, not every detail. These choices are
this implementation's own:

* **Interfaces:** the valid/ready handshake, non-pipelined issue, asynchronous active-low
  reset, and the 10-bit exponent/scale path.
* **Slot mapping:** which adder does what. For the FP multiplier: `ea+eb`, bias, increment.
  For the FP adder: `ea−eb`, `−z`, `+1+rovf`. For the Posit adder: `sa−sb`, `+1`, `−z`. For
  the Posit multiplier: `sa+sb`, `+p[59]`.
* **Datapaths of the cores:** the publication gives no inside view of its cores. The
  significand and fraction paths here are the simplest correct ones.
* **CLA and checker:** the prefix structure of the CLA, the parity prediction formula, and
  the use of the standard two-rail checker cell.
* **Diagnosis:** telling CLA faults from predictor faults by re-execution. The publication
  says the checker's encoding classifies them but gives no encoding.
* **Redundant multiplexer:** `hmux` is a triplicate-and-vote cell.
* **Posit encoder:** hardened by triplication.
* **DMR:** the re-execution cycle and the permanent switch.
* **FP numerics:** subnormal flushing, a single NaN code, round to nearest even.
* **Multiplier:** the significand multiplier is a plain `*`; the publication's cores use
  Booth multipliers.

Not provided:

* The hardened FP multiply-add and Posit multiply-add that the scheme is also applied to.
* The quire-based Posit multiply-add.
* Gate-level fault campaigns. The publication measures the hardening with exhaustive
  stuck-at simulation of synthesized netlists; here only one injectable carry fault per
  unit is modelled.

## Simulating

Everything is plain SystemVerilog-2017. Each testbench prints
`TB_RESULT checks=N failures=M` and calls `$finish`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/fpp_pkg.sv tb/tb_ref_pkg.sv tb/tb_fpp_top.sv --top-module tb_fpp_top
./obj_dir/Vtb_fpp_top
```

Replace `tb_fpp_top` with any other `tb/tb_*.sv` to test one block.

`tb/tb_ref_pkg.sv` holds the reference models:

* **FP32:** the exact product in double precision, rounded to single through the bit
  pattern.
* **Posit:** a bit-serial decoder to `real`, and a binary search over the ordered posit
  codes for nearest rounding.

The posit reference rounds by value. The posit tests therefore compare only results with
|value| between 2^−100 and 2^100. A directed case covers bit-string rounding beyond that
range. The FP adder reference adds in double precision. That sum is exact whenever the
exponents differ by less than 29, and otherwise lies far from any rounding tie.

Testbench coverage:

* **Block tests:** each block has its own test. The arithmetic datapaths are checked on
  random and range-limited operands (±1, ±10, ±100, the operand ranges of
  CNN matrix multiplication), with special cases, ties and cancellations.
* **Hardened-unit tests:** these inject faults and check that every result stays exact.
  They also check that repair costs exactly the cycles in the timing table.
* **`tb_fpp_top`:** runs all twelve units at once through three phases: fault-free, one
  fault per unit, then predictor faults and an unrepairable second fault. It counts each
  mechanism (spare repair, predictor diagnosis, alarm, DMR switch, TMR masking) and fails
  if any of them never happens.

## Files

| file | content |
|---|---|
| `rtl/fpp_pkg.sv` | formats, `fi_t`, status and stage structs |
| `rtl/cla_adder.sv`, `rtl/carry_predictor.sv`, `rtl/two_rail_checker.sv` | checked adder parts |
| `rtl/scr_adder_bank.sv` | S-CR bank: slots, spare, controller |
| `rtl/tmr_voter.sv`, `rtl/hmux.sv` | voter, redundant multiplexer |
| `rtl/fp32_mul_dp.sv`, `rtl/fp32_mul_pack.sv` | FP32 multiplier datapath and pack stage |
| `rtl/fp32_mul_scr.sv`, `rtl/fp32_mul_dmr.sv`, `rtl/fp32_mul_tmr.sv` | hardened FP32 multipliers |
| `rtl/fp32_add_dp.sv` | FP32 adder datapath |
| `rtl/fp32_add_scr.sv`, `rtl/fp32_add_dmr.sv`, `rtl/fp32_add_tmr.sv` | hardened FP32 adders |
| `rtl/clz_hm.sv`, `rtl/posit_decode.sv`, `rtl/posit_encode.sv`, `rtl/posit_add_dp.sv` | Posit(32,2) adder parts |
| `rtl/posit_add_scr.sv`, `rtl/posit_add_dmr.sv`, `rtl/posit_add_tmr.sv` | hardened Posit(32,2) adders |
| `rtl/posit_mul_dp.sv` | Posit(32,2) multiplier datapath |
| `rtl/posit_mul_scr.sv`, `rtl/posit_mul_dmr.sv`, `rtl/posit_mul_tmr.sv` | hardened Posit(32,2) multipliers |
| `rtl/fpp_top.sv` | the twelve units side by side |
| `tb/` | one self-checking testbench per block, `tb_ref_pkg.sv` reference models |

Lint notes:

* Verilator reports "circular logic" (UNOPTFLAT) on the exponent/scale chains. Each slot's
  sum feeds the next slot's operand through the same packed array, so the loop is only at
  the granularity of the array. There is no real combinational loop.
* `carry_predictor` computes its ripple chain in one loop, which Verilator flags as
  ALWCOMBORDER. This is intended.
