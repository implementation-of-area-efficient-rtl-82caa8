# Area-efficient FIR filter: Vedic multipliers and carry save adders

An FIR filter spends nearly all of its area in its multipliers and in the
adder that sums their products. This design builds both from small, regular
pieces to keep that area low:

* every tap multiplies with an **8x8 Vedic multiplier**: the
  Urdhva Tiryakbhyam ("vertically and crosswise") scheme, applied
  recursively, forms all sub-products in parallel and then adds them;
* every addition is a **carry save adder**: rows of full adders keep sum
  and carry bits apart, and a single carry-propagate adder joins them at the
  very end.

Beside the filter sits a **radix-4 modified Booth multiplier**, the other
8x8 multiplier architecture considered for the taps. It recodes the
multiplier into half as many digits, which tends to make it faster and less
power-hungry than the Vedic multiplier at the cost of more cells. Published
layout results for the two multipliers in a standard-cell flow (8x8 each)
were:

| 8x8 multiplier      | cell area | leakage (nW) | dynamic (nW) | total (nW) |
|---------------------|-----------|--------------|--------------|------------|
| radix-4 Booth       | 6912      | 210.760      | 136531.5     | 136742.348 |
| Vedic               | 6044      | 280.756      | 357930.524   | 358211.280 |

These numbers come from that flow and were not reproduced with this RTL.

## Hierarchy

```
fir_top
├── fir_filter            clocked FIR, TAPS taps
│   ├── vedic_8  x TAPS   8x8 unsigned multiplier
│   │   ├── vedic_4 x 4   4x4 unsigned multiplier
│   │   │   ├── vedic_2 x 4
│   │   │   └── csa (3 operands, 6 bits)
│   │   └── csa (3 operands, 12 bits)
│   └── csa (TAPS operands, OUT_W bits)
└── radix4                8x8 signed radix-4 Booth multiplier
    ├── booth_encode  x 4
    ├── booth_decoder x 4
    └── csa (4 operands, 16 bits)
```

`mult_pkg` holds the shared operand width and the Booth digit type. `fa`, the
one-bit full adder, is the cell from which every `csa` is made.

## The Vedic multiplier

`vedic_2` multiplies two 2-bit numbers. The vertical products `a0·b0` and
`a1·b1` give the outer columns, the two crosswise products `a1·b0` and `a0·b1`
the middle one; two half adders resolve the columns, and `y[3]` is the final
carry.

Larger multipliers split each operand into a high and a low half and form the
four half-size products in parallel:

```
q0 = aL·bL   q1 = aH·bL   q2 = aL·bH   q3 = aH·bH          (each 2h bits)
y[h-1:0]   = q0[h-1:0]
y[2n-1:h]  = q1 + q2 + {q3, q0[2h-1:h]}                    (one 3-operand csa)
```

with `h = n/2`. `vedic_4` does this with four `vedic_2` (h = 2) and `vedic_8`
with four `vedic_4` (h = 4). The low half of `q0` is already final and
bypasses the adder; the only carry propagation in each level is the final
adder of its `csa`. The multipliers are unsigned and purely combinational.

## The carry save adder

`csa #(NOPS, W)` adds `NOPS` operands of `W` bits modulo 2^W:

1. the first two operands are taken as a sum vector and a carry vector;
2. each further operand is folded in by a row of `W` full adders (a 3:2
   compressor): inputs are the running sum, the running carry shifted one
   place left (unshifted in the first row, where it is still an operand) and
   the new operand; no carry travels along the row;
3. a ripple-carry adder of full adders adds the last sum vector and the last
   carry vector shifted left.

`NOPS = 2` reduces it to a ripple-carry adder. The rows form a linear chain
rather than a Wallace tree; for the sizes here (3, 4 and 8 operands) the
difference is at most a few full-adder delays. Callers extend their operands
to `W` bits themselves (zero extension in the Vedic multipliers and the
filter, sign extension in the Booth multiplier).

## The radix-4 Booth multiplier

`radix4 #(N)` multiplies two N-bit two's complement numbers into a 2N-bit
product. The multiplier `x` is read in N/2 overlapping 3-bit groups
`{x[2i+1], x[2i], x[2i-1]}`, with `x[-1] = 0`. `booth_encode` recodes a group:

| group | digit | group | digit |
|-------|-------|-------|-------|
| 000   | 0     | 100   | −2    |
| 001   | +1    | 101   | −1    |
| 010   | +1    | 110   | −1    |
| 011   | +2    | 111   | 0     |

The digit travels as `booth_digit_t {neg, two, one}`. `booth_decoder` turns
it and the multiplicand `y` into the partial product `digit·y` as an (N+2)-bit
two's complement number: it selects 0, `y` or `y<<1` and, for a negative
digit, inverts and increments. Partial product *i* is sign-extended to 2N bits,
shifted left by 2*i*, and the four partial products (for N = 8) are summed by
one `csa`. `x` is the operand that is recoded, `y` the one that is multiplied.

## The FIR filter

`fir_filter` computes `y[n] = Σ h[k]·x[n−k]`, k = 0 … TAPS−1, in direct form:
a shift register of the last TAPS samples, one `vedic_8` per tap, and one
TAPS-operand `csa` for the sum. Samples and coefficients are unsigned 8-bit
numbers, the operand format of the Vedic multiplier; the output has
`OUT_W = 16 + clog2(TAPS)` bits (19 for 8 taps), enough for the largest
possible sum, so it never overflows.

Interface and timing:

| port        | dir | width    | meaning |
|-------------|-----|----------|---------|
| `clk`       | in  | 1        | clock, rising edge |
| `rst_n`     | in  | 1        | asynchronous, active low; clears the sample history and the outputs |
| `in_valid`  | in  | 1        | take `x_in` on this edge; low = stall, the delay line holds |
| `x_in`      | in  | 8        | sample |
| `coef`      | in  | TAPS × 8 | `coef[k]` = h[k]; hold constant while a result is in flight |
| `y_out`     | out | OUT_W    | registered result, held until the next one |
| `out_valid` | out | 1        | one-cycle pulse with each new `y_out` |

A sample presented with `in_valid` in cycle *t* is taken at the end of that
cycle; the sum over the updated delay line is registered at the next edge, so
`out_valid` and its `y_out` appear in cycle *t+2*. One sample per clock is
accepted, with no limit on back-to-back samples. The whole multiply-and-sum
path (a Vedic multiplier plus the TAPS-operand adder) lies between two
register stages, which limits the clock rate for large TAPS; there is no
internal pipelining.

`fir_top` puts the filter and the Booth multiplier side by side; they share
no signals. Its ports are those of the filter plus `bm_x`, `bm_y` (8-bit
signed) and `bm_p` (16-bit signed product).

## Parameters

| module       | parameter | default | meaning |
|--------------|-----------|---------|---------|
| `fir_top`, `fir_filter` | `TAPS`  | 8  | number of filter taps (≥ 2) |
| `fir_top`, `fir_filter` | `OUT_W` | 16 + clog2(TAPS) | output width |
| `fir_top`    | `BM_N`    | 8       | Booth multiplier operand width |
| `radix4`, `booth_decoder` | `N` | 8 | operand width (even, ≥ 4, for `radix4`) |
| `csa`        | `NOPS`, `W` | 3, 16 | operand count and width |

The Vedic multipliers are fixed at 2x2, 4x4 and 8x8, so filter data and
coefficients are always 8 bits wide.

## Where this design makes its own choices

The multiplier and adder structures above follow their published
description. These points were not specified there and were chosen here:

* **Filter:** the tap count (8), coefficients loaded through a port, unsigned
  data, direct form, the `in_valid`/`out_valid` handshake, one output
  register, the exact-width output and the asynchronous reset.
* **Booth product width:** the reference netlist of the Booth multiplier has
  a 15-bit product; this one is 16 bits, because (−128)·(−128) = 16384 does
  not fit in 15 signed bits. The low 15 bits are the same.
* **Booth internals:** the `{neg, two, one}` digit encoding and negation
  inside the decoder (instead of a "+1" correction bit handed to the adder).
* **Carry save adder:** a linear chain of 3:2 rows and a ripple-carry final
  adder; the exact full-adder arrangement of the reference netlists is not
  reproduced.
* **Not built:** radix-2 and radix-8 Booth recoding (only radix-4 is
  implemented), and the hybrid Booth/Vedic filter proposed as the next step,
  whose structure was never specified.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The main ones:

* `vedic_8_tb` – the five operand pairs of the reference waveform
  (40h·40h = 1000h, 01h·60h = 0060h, 21h·70h = 0E70h, 01h·50h = 0050h,
  11h·40h = 0440h), then all 65536 pairs;
* `radix4_tb` – all 65536 signed 8-bit pairs and all pairs of a 6-bit
  instance;
* `fir_filter_tb` – impulse, random data with random stalls, a reset in
  mid-stream and a full-scale run against an integer model, with the latency
  checked on every result;
* `fir_top_tb` – the whole top at its default parameters: the same filter
  test plus random and corner-case Booth products in the same cycles. It
  counts samples, stalls, resets, impulse read-backs, full-scale sums and the
  use of each Booth digit −2 … +2, and fails if any of them never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module fir_top_tb rtl/mult_pkg.sv tb/fir_top_tb.sv
./obj_dir/Vfir_top_tb
```

Replace `fir_top_tb` by any other testbench name. `mult_pkg.sv` must come
first on the command line because most modules import it.
