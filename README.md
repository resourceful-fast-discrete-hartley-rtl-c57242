# 8-point Discrete Hartley Transform in one combinational datapath

The Discrete Hartley Transform (DHT) maps a real sequence to a real spectrum:

    Y(k) = sum_{n=0}^{N-1} x(n) * cas(2*pi*n*k/N),   cas(t) = cos(t) + sin(t)

When the input is real it carries the same information as the Discrete
Fourier Transform (`Re F(k) = (Y(k)+Y(N-k))/2`, `Im F(k) = (Y(N-k)-Y(k))/2`),
but it needs no complex arithmetic. It is also its own inverse up to a factor
`1/N`, so a single datapath computes both directions.

This RTL computes the transform for **N = 8** on **9-bit signed samples**,
giving **17-bit signed results**. The whole transform is combinational: no
clock and no registers. It is built from add/subtract butterflies and exactly
**two constant multipliers**, both by `c = sqrt(2)`.

## The algorithm: one even/odd fold, then closed forms

For N = 8 the kernel `cas(2*pi*m/8)` takes only the values 1, sqrt(2), 1, 0,
-1, -sqrt(2), -1, 0 for m = 0..7. Because `cas(t + pi) = -cas(t)`, the
sequence is first folded in half:

    s(n) = x(n) + x(n+4)        d(n) = x(n) - x(n+4)        n = 0..3

The even-indexed outputs depend only on `s`. They are the 4-point DHT of `s`,
and every kernel value there is 0 or ±1:

    Y(0) = (s0 + s2) + (s1 + s3)        Y(4) = (s0 + s2) - (s1 + s3)
    Y(2) = (s0 - s2) + (s1 - s3)        Y(6) = (s0 - s2) - (s1 - s3)

The odd-indexed outputs depend only on `d`. In these outputs the irrational
factor multiplies just `d1` and `d3`:

    Y(1) = (d0 + d2) + c*d1             Y(5) = (d0 + d2) - c*d1
    Y(3) = (d0 - d2) + c*d3             Y(7) = (d0 - d2) - c*d3

So the two products `c*d1` and `c*d3` are each used twice, once with each
sign. This sharing is why two multipliers are enough.

Arithmetic cost as built:

| stage                          | butterflies | add/sub | multipliers |
|--------------------------------|-------------|---------|-------------|
| fold (`dht8`)                  | 4           | 8       | –           |
| even half (`dht4_even`)        | 4           | 8       | –           |
| odd half (`dht_odd`)           | 3           | 6       | 2 × sqrt(2) |
| inverse scaling (`dht8`)       | –           | 8       | –           |

Sharing every common term, the equations above need 22 additions. Some
published counts for this algorithm give 16 adders with the same two
multipliers. This RTL follows the equations, so it has 22. The 8 scaling
adders are used only by the inverse mode, which is this design's own
addition (see below).

## Fixed-point arithmetic and the sqrt(2) multiplier

All values are two's complement. Each butterfly widens its result by one bit,
so nothing in the datapath can overflow:

| signal             | width | range used                          |
|--------------------|-------|-------------------------------------|
| x(n)               | 9     | -256 … 255                          |
| s(n), d(n)         | 10    |                                     |
| even results       | 12    | abs(Y) ≤ 2048                       |
| c·d1, c·d3         | 11    | abs ≤ 724                           |
| odd results        | 12    | abs(Y) < 1750                       |
| y[k] (port)        | 17    | sign extension of the 12-bit result |

`sqrt2_mult` stores c as `round(sqrt(2)·2^C_FRAC)`. With the default
`C_FRAC = 8` that is 362/256 = 1.4140625. The constant is computed during
elaboration by an integer square root in `dht_pkg::sqrt2_fixed`, so there is
no table and no real arithmetic. The product is rounded to the nearest
integer, with halves rounded up. Including the error of the constant, each
product is within 0.58 of the exact value.

Results are therefore:

* even outputs: exact integers;
* odd outputs: within 0.58 of the exact transform, because each contains one
  rounded product.

Raising `C_FRAC` shrinks the constant's share of the error toward the 0.5 that
rounding alone causes. It makes the multipliers wider but changes no port.

## Forward and inverse mode

`inverse = 0` gives `y[k] = Y(k)`.

`inverse = 1` gives `y[k] = round(Y(k)/8)`, computed as `(Y + 4) >>> 3`, so
halves round toward +infinity. By the self-inverse property this is the
inverse DHT of `x`, read as a spectrum. Its error is below 0.58 of one unit.

The mode pin and its rounding are this design's own additions. Usually a
transform pair states only that the two directions differ by a 1/N factor.
The inputs stay 9 bits wide, so inverse mode accepts only spectra that fit in
9 bits. Inverting the full 12-bit output of a forward transform needs
`IN_W = 12`, `OUT_W ≥ 15`.

## Module hierarchy

```
dht8                    top: fold, even/odd halves, output scaling
├── dht_butterfly ×4    x(n) ± x(n+4)
├── dht4_even           Y(0), Y(2), Y(4), Y(6)
│   └── dht_butterfly ×4
└── dht_odd             Y(1), Y(3), Y(5), Y(7)
    ├── dht_butterfly ×3
    └── sqrt2_mult ×2
dht_pkg                 shared sizes, sqrt(2) constant function
```

### Ports of `dht8`

| port      | dir | type                      | meaning                           |
|-----------|-----|---------------------------|-----------------------------------|
| `x`       | in  | `logic signed [8:0] x[8]` | samples x(0)..x(7)                |
| `inverse` | in  | `logic`                   | 0 forward, 1 inverse (×1/8)       |
| `y`       | out | `logic signed [16:0] y[8]`| Y(0)..Y(7) in natural order       |

Parameters (defaults in `dht_pkg`):

| parameter | default | meaning                                           |
|-----------|---------|---------------------------------------------------|
| `IN_W`    | 9       | sample width                                      |
| `OUT_W`   | 17      | result width; must be at least `IN_W + 3`         |
| `C_FRAC`  | 8       | fraction bits of the sqrt(2) constant, 1..28      |

The transform length is fixed at 8. The structure above is specific to N = 8,
and the package constant `N_POINTS` only documents that length.

### Timing

There are no clocks or registers. The outputs settle one propagation delay
after the inputs change. The longest path runs through a constant multiplier,
its rounding adder, two butterflies and, in inverse mode, the scaling adder.
To run at high clock rates inside a synchronous system, register the inputs
and outputs around `dht8`. If that is not enough, pipeline it at the
boundaries between the fold, the even/odd halves and the scaling stage.

## Where this design departs from common descriptions of the algorithm

* **Adder count**: 22 transform adders, as the equations need, instead of a
  quoted 16.
* **Constant format and rounding** of sqrt(2): 8 fraction bits and
  round-to-nearest. These are this design's choices.
* **Inverse-mode pin** with rounding division by 8: this design's addition.
* **Number format**: two's complement. Inputs and outputs are integers with no
  fraction bits.
* **Length**: only N = 8. The radix-2/4/8 decomposition for larger powers of
  two is not implemented.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench          | what it checks                                                                 |
|--------------------|--------------------------------------------------------------------------------|
| `tb_dht_butterfly` | corner and random operands against 32-bit integer sum/difference               |
| `tb_sqrt2_mult`    | all 1024 values of a 10-bit operand: error < 0.6, nearest integer when unambiguous |
| `tb_dht4_even`     | corner/random sums against the floating-point 4-point Hartley sum (exact)      |
| `tb_dht_odd`       | corner/random differences against the floating-point odd-output sums (±0.6)    |
| `tb_dht8`          | end to end at the default sizes, both modes; see below                          |

`tb_dht8` computes the reference directly from the definition with
`$cos`/`$sin`, without using the butterfly structure. Its test vectors are:

* a constant input of 135, which must give Y(0) = 1080 and zero elsewhere;
* unit impulses at every position;
* full-scale positive, negative and alternating inputs;
* 3000 random vectors, each in a randomly chosen mode;
* a flat spectrum whose inverse must be an exact impulse.

It also counts how often each of these occurred and fails if any count is
zero:

* forward mode and inverse mode;
* a non-zero product from each multiplier;
* products that rounded up and products that rounded down;
* a full-scale Y(0);
* an inverse result that needed rounding.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dht_pkg.sv tb/tb_dht8.sv --top-module tb_dht8 -Mdir obj_tb_dht8
./obj_tb_dht8/Vtb_dht8
```

Replace `tb_dht8` with any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/dht_pkg.sv rtl/dht8.sv`.
