# Radix-4 DIT butterfly in the complex binary number system, with distributed-arithmetic multipliers

A radix-4 FFT butterfly normally needs three complex multipliers. Each of those
is four real multipliers and two real adders. This design needs no multiplier
at all, for two reasons:

* **Each complex number is one binary word.** Words are written in the complex
  binary number system (CBNS), whose radix is β = −1+j. A string of 0/1 digits
  then stands for a complex number directly. No separate real and imaginary
  datapaths are needed.
* **Multiplication is shift-and-add.** Each product by a twiddle factor is
  formed by a distributed-arithmetic (DA) unit. It takes one digit of the data
  word per clock cycle. It gates the twiddle with that digit, and adds the
  result to a shifted accumulator with a CBNS adder.

The butterfly has four DA units and eight CBNS adders/subtractors, and each DA
unit holds one more adder. Binary converters at the edges take ordinary
two's-complement complex numbers in and give them back out.

## Numbers in radix (−1+j)

Digit k of a word is worth β^k:

| k   | 0 | 1    | 2   | 3    | 4  | 5    | 6  | 7     | 8  |
|-----|---|------|-----|------|----|------|----|-------|----|
| β^k | 1 | −1+j | −2j | 2+2j | −4 | 4−4j | 8j | −8−8j | 16 |

Some useful values: `11` = j, `1100` = 2, `11101` = −1, and `1_1101_0000` = 4.

β^N is 2^(N/2) times a unit (for example β^8 = 16 and β^16 = 256). So keeping
only N digits means reducing the real and the imaginary part modulo 2^(N/2).
An N-digit CBNS word therefore carries exactly the information of an
(N/2)-bit real part plus an (N/2)-bit imaginary part:

* The 8-digit build works on 4+4-bit complex numbers.
* The 16-digit build works on 8+8-bit complex numbers.

Additions and subtractions are exact modulo 2^(N/2) in each part, just as a
two's-complement adder wraps. Fixed-point values convert the same way. A
binary value with F fraction bits per part becomes a CBNS value with 2F
fraction digits when F is a multiple of 4. For example, 0.70703125·(1+j) =
(181+181j)/256 is `1110.1110011001101110`.

## CBNS adder and subtractor (`cbns_adder`, `cbns_subtractor`)

In this radix 1 + 1 = `1100`. The sum digit is 0, and carries go **two and
three** places up, with none to the next place. Larger column totals need
longer carry patterns. For example, 4 = `1_1101_0000` sends carries four, six,
seven and eight places up; these are the "extended carries".

Both units are ripple structures:

1. Start at the least significant column and work upward.
2. Each column keeps a small signed count: its two operand digits (the
   subtrahend digit counts as −1) plus every carry bit already sent to it.
3. The output digit is the count's low bit.
4. The count's own CBNS form, minus that low digit, is the carry pattern. Each
   carry is a single bit sent to a higher column.

A constant table, computed at elaboration, gives the pattern for each count.
The table is decoded with comparators, so no memory is inferred.

At N = 8 the columns come out as follows:

* Columns 0 and 1 add two digits (half adders).
* Column 2 adds three (a full adder).
* Column 3 adds four (a four-input adder).

In the subtractor, a column that must take 1 from 0 has count −1. Since
0 − 1 = `11101`, it produces digit 1 and carries two, three and four places
up, and those carries are then added in by the adder rule. Column counts stay
within [−1, 7] for word lengths up to 64 digits (found by enumerating which
carry wires can be active), and the count register is 5 bits wide.
Carries past digit N−1 are dropped, which gives the modular behaviour above.

## The DA-CBNS multiplier (`da_cbns`, `piso`, `nonlut_rom`)

```
 x ──► PISO ──digit──► non-LUT ROM (v AND digit) ──► CBNS adder ──► acc (D flip-flops) ──► y
                                                        ▲                   │
                                                        └── acc >> 1 ◄──────┘ (logical shift)
```

* `piso` loads x and shifts it out least significant digit first.
* `nonlut_rom` is the coefficient "ROM". With one constant coefficient, the
  table has only two entries, 0 and v, so it is just N AND gates.
* The accumulator is fed back **logically** right-shifted. A leading 1 in
  radix −1+j is not a sign, so an arithmetic shift would be wrong.

A load cycle captures x and clears the accumulator. N accumulation cycles
follow. Then `done` rises and the accumulator holds its value until the next
load.

**What the unit actually computes.** This point matters most when using the
design. The accumulator is N digits wide, and each shift drops the digit that
falls off the bottom. After N cycles:

    y = x · v / β^(N−1)      (digits below the radix point truncated at each step)

There are two equivalent ways to read this as fixed point. One operand must
be a CBNS fraction whose top digit is worth 1, so that the word `1000…0` is
exactly 1, and the result then has the other operand's scaling. Conventional
DA treats its serial input the same way, as a fraction with its sign bit worth
−1.

The butterfly feeds data words as x and twiddles as v, so it is natural to
read **the twiddle as the fraction**. A twiddle W is then supplied as the word
for W·β^(N−1), and B·Wb comes out in the data's own scaling. The digits of
B·W below the data's least significant digit are truncated.

Only twiddles whose expansion has no digit above β^0 can be held this way. At
N = 8, 1 is exact and e^(−jπ/8) is within 0.07, but −j and −1 are 0.28 and
0.20 from the nearest word. At N = 16 those errors are 0.20 and 0.14. The
published coefficient store has this limit. Because the CBNS digits carry no
sign, there is no subtract step for a sign digit, unlike conventional DA.

## The butterfly (`r4_dacbns_butterfly`)

The outputs are

    A' = (A + C·Wc) +  (B·Wb + D·Wd)
    B' = (A − C·Wc) − j(B·Wb − D·Wd)
    C' = (A + C·Wc) −  (B·Wb + D·Wd)
    D' = (A − C·Wc) + j(B·Wb − D·Wd)

The four bracketed partial sums are each computed once:

```
B,Wb ─► DA ─ B·Wb ─┬─► add ─ B·Wb+D·Wd ─────────────┬─► add ─► A'
D,Wd ─► DA ─ D·Wd ─┴─► sub ─ B·Wb−D·Wd ─► DA(j) ─┐  └─► sub ─► C' (with A+C·Wc)
C,Wc ─► DA ─ C·Wc ─┬─► add ─ A+C·Wc                │
A ─────────────────┴─► sub ─ A−C·Wc ───────────────┴──► sub ─► B', add ─► D'
```

**The j factor** uses a fourth DA unit. Its serial operand is the constant
`J_WORD`, which defaults to `…011` (the CBNS integer j). Its coefficient is
B·Wb − D·Wd. Given what a DA unit computes (above), this branch contributes
j·(B·Wb − D·Wd)/β^(N−1), not j·(B·Wb − D·Wd). The twiddle products are
correct when the twiddles are given in the fraction form described above, so
A' and C' are true butterfly outputs. **B' and D' are the published circuit's
outputs, not those of a textbook radix-4 butterfly.** `J_WORD` is a
parameter, but no N-digit word equals j in the DA unit's fraction format
(j = `11` needs the digit worth β^1). Exact j multiplication would need a
different DA alignment or a wider constant.

**Sequencing.**

1. A load cycle registers A and the three twiddles and starts the three
   twiddle DA units. Their PISOs capture B, C and D.
2. After N cycles their products hold. The j unit needs B·Wb − D·Wd as its
   coefficient, so it is started on the next edge and runs N more cycles.
3. `done` is then high, 2N+1 clock edges after the load edge: 17 cycles at
   N = 8 and 33 at N = 16.

The outputs are combinational from the held accumulators. They stay valid
while `done` is high, until the next load. A load at any time restarts the
operation.

An assertion checks that the three twiddle units have all finished whenever
the j unit is running.

## Converters and the top (`bin2cbns`, `cbns2bin`, `r4_dacbns_top`)

`r4_dacbns_top` is the complete datapath:

1. Seven `bin2cbns` converters handle A–D and Wb, Wc, Wd.
2. The butterfly runs.
3. Four `cbns2bin` converters produce A'–D'.

All binary ports are arrays of (N/2)-bit two's-complement parts: `x_re/x_im[0..3]`
are A–D, `w_re/w_im[0..2]` are Wb–Wd, and `y_re/y_im[0..3]` are A'–D'.

The twiddle ports take the binary form of W·β^(N−1), as explained under the
multiplier. A twiddle of 1 is therefore (−8, −8) at N = 8 and (−128, −128) at
N = 16. With all three twiddles at 1, the design computes a 4-point DFT in
A' = A+B+C+D and C' = A−B+C−D, exactly and wrapped to N/2 bits. B' and D'
carry the scaled j term described above.

* `bin2cbns` divides by β digit by digit, unrolled into N small-adder stages.
  The next digit is the parity of re+im. Subtract it, then
  (r + j·i)/(−1+j) = ((i−r) + j(−r−i))/2.
* `cbns2bin` sums the digits with the constant weights β^k. These are 0 or
  ±2^m in each part, computed at elaboration.

The butterfly keeps CBNS ports (eleven N-bit words plus clk, rst, load and
done). Use it directly where CBNS constants are supplied from outside.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N` | 8 | every module (`cbns_pkg::CBNS_N`) | CBNS digits per word; must be even. 16 is the other configuration in use |
| `J_WORD` | `N'(2'b11)` | `r4_dacbns_butterfly` | serial operand of the j multiplier |

## Departures from the published design, and choices made here

Taken from the published design:

* the radix-(−1+j) add and subtract rules and the extended carries;
* the DA unit's structure: PISO, gate-based coefficient store, CBNS adder,
  register, logical right shift, N cycles;
* the butterfly's partial-sum sharing and wiring;
* the j constant, kept even though it makes B' and D' differ from a textbook
  butterfly (see the butterfly section);
* the convert / compute / convert-back flow.

This design's own choices:

* Control of the DA units: clearing the accumulator on load, the cycle
  counter, holding the result, `done`, and starting the j multiplier after the
  twiddle multipliers.
* Input registers for A and the twiddles.
* Result truncation to N digits, with wraparound modulo 2^(N/2).
* The converter circuits and their binary formats.
* Converting the twiddles in hardware, and the twiddle format W·β^(N−1)
  that follows from the DA scaling.
* The added `done` output.

Not provided: a full FFT, meaning stage sequencing, sample memory and twiddle
tables for 16 points and up. This RTL is one butterfly. The conventional
radix-4 butterfly used as a comparison baseline is also not included.

## Verification

Each module has a self-checking testbench in `tb/`. References are computed
on plain Gaussian integers in `tb/cbns_ref_pkg.sv`, not on digits:

* **Adder and subtractor:** all 65,536 operand pairs at N = 8, plus 20,000
  random pairs at N = 16.
* **Converters:** every value at N = 8 and N = 16. The
  0.70703125·(1+j) example above is also checked.
* **DA unit:** random operands at both sizes, unit operands (y = v or y = x exactly),
  latency, hold and restart.
* **Butterfly:** random operations at both sizes. Unit data operands give
  closed forms A' = A+Wb+Wc+Wd and C' = A+Wc−Wb−Wd.
* **Top:** 3,000 end-to-end random operations at the default size, plus 500
  4-point DFTs with unit twiddles. The testbench also counts how often
  extended carries, 0−1 borrows, output wraparound, the j step and a restart
  occur, and fails if any of them never occurs (`tb_r4_dacbns_top`).
* **16-digit configuration:** the same end-to-end test with N = 16
  (`tb_r4_dacbns_workloads`).

Each testbench has also been run against a deliberately broken copy of its
module and reports failures.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and calls
`$finish`. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cbns_pkg.sv tb/cbns_ref_pkg.sv rtl/*.sv tb/tb_r4_dacbns_top.sv \
    --top-module tb_r4_dacbns_top
./obj_dir/Vtb_r4_dacbns_top
```

To test a single block, replace the last source file and the top module with
the block's testbench: `tb_cbns_adder`, `tb_cbns_subtractor`, `tb_piso`,
`tb_nonlut_rom`, `tb_da_cbns`, `tb_bin2cbns`, `tb_cbns2bin` or
`tb_r4_dacbns_butterfly`, or `tb_r4_dacbns_workloads` for the 16-digit
build. Each runs in well under a second.
