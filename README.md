# Modular squaring with interleaved reduction: A² mod P, one or two multiplier bits per clock

Public-key schemes spend most of their time in modular exponentiation, and
exponentiation is mostly modular squaring. The straightforward way to square
is to build the 2N-bit product A·A and reduce it afterwards. This
design never forms the double-width product. It scans the multiplier A
from its most significant bit, Horner-style, and reduces after every bit. The
running value therefore stays below 3P, and two trial subtractions bring it back
below P:

```
R := 0
for i = N-1 downto 0:
    S := 2·R + a_i·A          -- "partial sum", always < 3P when A < P
    R := S mod P              -- S, S-P or S-2P
result: R = A² mod P
```

Worked example, 43² mod 54 (A = 101011₂):

| step | a_i | S = 2R + a_i·A | R = S mod 54 |
|------|-----|----------------|--------------|
| 0    | 1   | 0 + 43 = 43    | 43           |
| 1    | 0   | 86             | 32           |
| 2    | 1   | 64 + 43 = 107  | 53           |
| 3    | 0   | 106            | 52           |
| 4    | 1   | 104 + 43 = 147 | 147 − 108 = 39 |
| 5    | 1   | 78 + 43 = 121  | 121 − 108 = 13 |

1849 mod 54 = 13. The hardware is an N-bit adder, a small reduction unit and a
few registers, whatever N is. The clock period is set by one N+2-bit add plus the
reduction, and the cycle count grows linearly with N.

## Two devices

`modsq_top` holds two independent devices. They share clock and reset and
nothing else:

| device | file | bits per clock | steps | start → done | reduction units |
|---|---|---|---|---|---|
| one-bit  | `modsq_1bit.sv` | 1 | N | N + 1 clocks | one shaper, variant 1 by default (`PRF_VARIANT`) |
| two-bit  | `modsq_2bit.sv` | 2 | ⌈N/2⌉ | ⌈N/2⌉ + 1 clocks | two variant-2 shapers in cascade |

Both have the same datapath registers:

* **RgA1** holds A and feeds the adder (`load_reg`).
* **RgA2** is a second copy of A, shifted left one place (or two) per clock. Its
  top bit(s) are the current multiplier digit(s), a_{N-1} first (`shift_reg_left`).
* **RgP** holds the modulus (`load_reg`).
* **RgR** holds the running residue, cleared at start. At the end it holds the result (`load_reg`).
* **Add1** forms S = 2R + a_i·A (`partial_sum_adder`). The doubling is wiring,
  and a_i gates A through an AND row. S is N+2 bits wide.
* **PRF**, the *partial residue shaper*, reduces S < 3P to S mod P (`prf_v1` or
  `prf_v2`).
* **BSIN**, the synchronization block, counts the steps down and signals the end of the
  operation (`bsin`).

The two-bit device runs Add1 → PRF1 → Add2 → PRF2 combinationally in one
clock, using digits (a_i, a_{i−1}), and writes only PRF2's result into RgR. This
halves the number of clocks but roughly doubles the combinational path. For odd
N, RgA2 is one bit wider and A enters it with a leading zero. The first digit pair
then starts with a 0, which leaves R at 0. For 59² mod 65 at N = 8 the digit pairs are 00, 11,
10, 11, and RgR takes the values 0, 47, 46, 36 (the first shaper's output is
0, 59, 23, 21).

## The partial residue shaper

This unit is what makes per-step reduction cheap. There are two implementations
with the same ports (`s`, `p` → `r`, `sub_mult`).

**Variant 1 (`prf_v1`): two subtractors in parallel.**
Add3 computes S + ¬(2P) + 1 = S − 2P and Add2 computes S + ¬P + 1 = S − P,
both in N+3 bits including the carry. Each carry out says "no borrow":

| condition | Add3 carry C3 | Add2 carry C2 | open gate row | output |
|---|---|---|---|---|
| S ≥ 2P     | 1 | 1 | AND8 (C3)            | S − 2P |
| P ≤ S < 2P | 0 | 1 | AND9 (¬C3 ∧ C2)      | S − P  |
| S < P      | 0 | 0 | AND10 (¬C2)          | S      |

Exactly one row is open, so an OR merges them. The sign signals
Sign3 = ¬C3 and Sign2 = ¬C2 do the blocking.

**Variant 2 (`prf_v2`): one adder, two comparators.**
An N-bit adder costs roughly three times as much as an N-bit comparator, so one
subtractor is replaced by two comparators. COMP-1 tests S ≥ 2P and COMP-2 tests S < P. The right-hand input
of the single adder is ¬(2P) when COMP-1 fires. It is ¬P when neither fires
(gate AND9). The carry input is +1. When S < P, an AND row passes S straight through
and an OR merges it with the adder path.

In both variants `sub_mult` reports which multiple of P was removed (0, 1, 2). It is
for observation only and feeds nothing.

The shaper is correct only for S < 3P. That holds when A < P, because then
2R + A < 3P. **The devices require 0 ≤ A < P**, and a concurrent assertion
(`a_below_p`) checks it when the operands are loaded. Reduce A first if it can be
larger.

## Control and timing (BSIN)

`bsin` is a two-state machine (IDLE, RUN) with a down counter, Count.

* In IDLE, a `start` pulse asserts `load` in the same cycle. The operands go into
  RgA1, RgA2 and RgP, RgR is cleared, and Count takes the shift code
  (N−1 for the one-bit device, ⌈N/2⌉−1 for the two-bit one).
* In RUN every clock is a step. RgR takes the shaper output, RgA2 shifts and
  Count decrements. The step made with Count = 0 is the last.
* The next cycle `done` (End of operation) is high for one clock and the block
  is back in IDLE. `r_out` holds the result until the next start.
* A `start` during RUN is ignored.

```
clk    _|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_
start  _/‾‾‾\___________ ... __________
busy   _____/‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾\_____
r_out  --0--|R0 |R1 |R2  ... |R_{N-1}=A² mod P
done   ______________________/‾‾‾\____
```

The original device generates its step strobes with delay lines inside the
synchronization block. Here the clock does that job: each step is one clock
cycle, and the registers use enables rather than gated clocks.

### Interface (both devices)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (all registers to 0) |
| `start` | in | 1 | one-cycle pulse while `busy` is low; samples `a_in`, `p_in` |
| `a_in`, `p_in` | in | N | A and P, A < P, P ≥ 1 |
| `busy` | out | 1 | steps in progress |
| `done` | out | 1 | one-cycle End of operation pulse |
| `r_out` | out | N | RgR: partial residues during the run, A² mod P after `done` |

`modsq_top` exposes the same signals twice, suffixed `1` (one-bit device) and
`2` (two-bit device): `start1, a1, p1, busy1, done1, r1` and
`start2, a2, p2, busy2, done2, r2`.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `modsq_top`, `modsq_1bit`, `modsq_2bit` | `N` | 8 | operand width. 8 is the smallest byte width that holds both worked examples (P = 65 needs 7 bits). For cryptographic sizes set N to 1024 or more; the structure does not change. |
| `modsq_1bit` | `PRF_VARIANT` | 1 | 1 = two-subtractor shaper, 2 = comparator shaper |
| `bsin` | `CW` | 3 | counter width; the devices size it from N |
| `shift_reg_left` | `W`, `SHIFT` | 8, 1 | register width, places per shift |
| `load_reg`, `partial_sum_adder`, `prf_v1`, `prf_v2` | `W` / `N` | 8 | widths |

Most testbenches compute their reference in 32-bit integers, which limits them to
N ≤ 15. `tb_modsq_wide` uses 256-bit vectors and runs both devices at N = 128,
and the two-bit device also at N = 127.

## Where this design makes its own choices

The dataflow follows the published device: the registers, Add1, both shaper
structures, the two-bit cascade and the down-counting control. The
following are choices of this implementation:

* the default width N = 8 (no device width is specified) and the requirement A < P, made explicit;
* the synchronous start/busy/done handshake, the one-cycle `done` pulse, ignoring
  `start` while busy, and the asynchronous active-low reset;
* a single clock in place of the delay-line strobe chain, and enables in place of
  clock gating on RgA2;
* zero padding of A for odd N in the two-bit device;
* the pairing in `modsq_top`: variant 1 in the one-bit device and variant 2 in the two-bit one;
* for S exactly 2P the variant-1 shaper takes the S − 2P path, giving 0. The
  carry rule does this by itself, and it is the correct residue.

Not modelled: the board-level harness of the FPGA prototype (switches, displays),
which is not described.

## Files

`rtl/`
* `modsq_top.sv`: both devices side by side
* `modsq_1bit.sv`, `modsq_2bit.sv`: the devices
* `prf_v1.sv`, `prf_v2.sv`: partial residue shapers
* `partial_sum_adder.sv`: S = 2R + a_i·A
* `bsin.sv`: control and step counter
* `shift_reg_left.sv`: RgA2
* `load_reg.sv`: RgA1, RgP, RgR

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_prf_v1`, `tb_prf_v2`: exhaustive over every 6-bit P and every S < 3P, plus
  random 8-bit cases.
* `tb_modsq_1bit`: the 43² mod 54 trace above, clock by clock, on 6-bit and 8-bit
  devices and with both shaper variants. Random A < P with latency checks.
* `tb_modsq_2bit`: the 59² mod 65 trace (both shaper outputs per clock), random
  cases at N = 8 and at odd N = 7.
* `tb_modsq_top`: all defaults. Both worked examples on both devices, then 400 and
  700 random squarings running concurrently on the two devices, with stray starts.
  It counts each shaper outcome (S, S−P, S−2P) in all three shapers, the
  End-of-operation pulses, the ignored starts and the overlapping runs, and fails if
  any of them never occurred.
* `tb_modsq_wide`: 60 random squarings with 128-bit operands on both devices, and on
  a 127-bit two-bit device. It checks the results against 256-bit arithmetic and
  checks the latencies.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_modsq_top.sv --top-module tb_modsq_top
./obj_dir/Vtb_modsq_top
```

Replace `tb_modsq_top` with any other testbench name. Every testbench runs in
well under a second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/modsq_top.sv`. The remaining warnings are
unused observation signals (`sub_mult`, RgA2 contents) and the two always-zero
top bits of the shaper's internal OR, which are dropped on purpose.
