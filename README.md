# RNS FIR filter with moduli {2^n+1, 2^n, 2^n-1}

A finite impulse response filter, y(k) = sum_i b_i x(k-i), spends its time in
wide multiply-accumulate arithmetic: every product and every partial sum has
to carry across the full word. This design takes the carries out. It
computes the filter in a residue number system (RNS): each sample is replaced
by its remainders modulo three small, pairwise coprime moduli, the filter runs
independently and in parallel on each remainder stream, and only the final
output is turned back into an ordinary binary number.

With the moduli 2^n+1, 2^n and 2^n-1, every step is cheap:

- modulo 2^n is ordinary n-bit arithmetic with the carry thrown away;
- modulo 2^n-1 is n-bit arithmetic with an end-around correction;
- modulo 2^n+1 needs one extra bit and a correction adder.

The three residues identify any integer in 0..M-1 uniquely, where
M = (2^n+1)·2^n·(2^n-1) = 2^3n - 2^n is the *dynamic range*. With the default
n = 8, M = 16,776,960, so the filter computes exact 24-bit results with 8-
and 9-bit arithmetic.

```
            +---------------+    +-------------------------+    +---------------+
 x (16b) -->| binary_to_rns |-r1->| rns_fir_channel 2^n+1   |-->|               |
            |  (comb.)      |-r2->| rns_fir_channel 2^n     |-->| rns_to_binary |--> reg --> y (24b)
            |               |-r3->| rns_fir_channel 2^n-1   |-->|  (comb.)      |
            +---------------+    +-------------------------+    +---------------+
```

## Files

| file | what it is |
|---|---|
| `rtl/rns_pkg.sv` | `modulus_e` (which modulus a channel uses) and elaboration-time helpers |
| `rtl/mod_add_m1.sv` | modulo 2^n-1 adder |
| `rtl/mod_add_p1.sv` | modulo 2^n+1 adder |
| `rtl/mod_mul_m1.sv`, `rtl/mod_mul_p1.sv` | modulo 2^n-1 and 2^n+1 multipliers |
| `rtl/binary_to_rns.sv` | forward converter, 3n-bit binary to three residues |
| `rtl/rns_fir_channel.sv` | one residue FIR sub-filter, selected by `KIND` |
| `rtl/rns_to_binary.sv` | reverse converter, three residues to 3n-bit binary |
| `rtl/rns_fir_top.sv` | the complete filter |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_rns_fir_workloads.sv` | the 4-tap and an 8-tap filter side by side |

## Modulo adders

These are the building block everything else uses, and the place where the
"carry-free" arithmetic actually gets its corrections.

**Modulo 2^n-1** (`mod_add_m1`). Two n-bit adders work in parallel, one on
x+y and one on x+y+1. If x+y+1 carries out of n bits, then x+y ≥ 2^n-1 and
the low n bits of x+y+1 are exactly x+y-(2^n-1); otherwise x+y is already
reduced. The carry of the x+y+1 adder steers a 2:1 multiplexer. In modulo
2^n-1 the all-ones word is a second spelling of zero; the adder accepts it on
its inputs and produces a reduced result unless both inputs are all-ones.
This lets a negation be a plain bit inversion (~a = 2^n-1-a).

**Modulo 2^n+1** (`mod_add_p1`). Residues are n+1 bits wide (0..2^n). A first
(n+1)-bit adder forms S = x+y with carry c0 (S ≥ 2^(n+1)). A second (n+1)-bit
adder adds the constant 2^n-1, which is the two's complement of 2^n+1 in n+1
bits, so it computes S-(2^n+1); its carry c1 says S ≥ 2^n+1. If either carry is
set the corrected value is taken. The critical path is two (n+1)-bit adders and
one multiplexer. The c0 case occurs only for x = y = 2^n, but without it that
one sum comes out wrong.

## Modulo multipliers

Both multipliers form the full product and fold it with one modulo adder,
using the value of 2^n in each modulus:

- `mod_mul_m1`: P = H·2^n + L and 2^n ≡ 1, so P mod 2^n-1 = H + L (mod 2^n-1).
- `mod_mul_p1`: 2^n ≡ -1, so P mod 2^n+1 = L - H (mod 2^n+1); H is negated
  (2^n+1-H, or 0) and added to L.

In the filter one operand is always a constant coefficient residue, so a
synthesis tool reduces these multipliers to shift-and-add networks.

## Forward conversion

`binary_to_rns` cuts the 3n-bit input into blocks X = B1·2^2n + B2·2^n + B3
(B1 most significant). Since 2^n is 0, +1 and -1 in the three moduli:

- R2 = X mod 2^n = B3, a wire;
- R3 = X mod 2^n-1 = B3 + B2 + B1, two modulo 2^n-1 adders in series;
- R1 = X mod 2^n+1 = B3 - B2 + B1, two modulo 2^n+1 adders in series, with
  B2 negated in front of the first.

R3 is folded from all-ones to zero at the end, so every residue leaving the
converter is fully reduced. The converter is combinational.

## Residue channels

`rns_fir_channel` is an ordinary direct-form FIR filter on one residue
stream: a delay line of `TAPS` residues, a modulo multiplier per tap by the
coefficient's residue, and a linear chain of modulo adders. The coefficient
residues are computed at elaboration from the binary coefficients `COEF`, so
the three channels take the same parameter. `KIND` chooses the modulus and
with it the residue width (`RW` = n+1 for 2^n+1, n otherwise). The top
instantiates the channel three times; nothing passes between the channels.

## Reverse conversion

`rns_to_binary` rebuilds X from (r1, r2, r3) in mixed-radix form without any
multiplier or table. Write X = r2 + 2^n·Z. Then Z < (2^n+1)(2^n-1), and its
residues follow from the inputs using inverses that are free in hardware:

```
z1 = Z mod 2^n+1 = (r2 - r1) mod 2^n+1            inverse of 2^n   mod 2^n+1 is -1
z3 = Z mod 2^n-1 = (r3 - r2) mod 2^n-1            inverse of 2^n   mod 2^n-1 is  1
W  = (z3 - z1) · 2^(n-1) mod 2^n-1                inverse of 2^n+1 mod 2^n-1 is 2^(n-1)
Z  = z1 + (2^n+1)·W = z1 + (W << n) + W
X  = {Z, r2}
```

Multiplying by 2^(n-1) modulo 2^n-1 is a one-bit right rotation. Reducing z1
(0..2^n) modulo 2^n-1 is one more modulo adder on its low bits and its top bit.
In total: four modulo adders, a rotation, and one 2n-bit three-input adder.

## Interface and timing of the top

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock |
| `rst_n` | 1 | asynchronous, active-low reset; clears the filter history |
| `in_valid` | 1 | `x` holds a new sample this cycle |
| `x` | `XW` = 2n | unsigned input sample |
| `out_valid` | 1 | `y` holds a new output |
| `y` | 3n | unsigned output, exact |

A sample accepted on a rising edge produces its output, with `out_valid`
high for one cycle, three rising edges later: edge 1 shifts it into the
channels' delay lines, edge 2 registers the channel sums, edge 3 registers
the reverse converter's result. The filter takes one sample per clock. When
`in_valid` is low the delay lines hold, so gaps in the input stream do not
disturb the filter state.

## Parameters and range limits

| parameter | default | notes |
|---|---|---|
| `N` | 8 | the n of the moduli set |
| `TAPS` | 4 | filter length |
| `XW` | 2·N | input width, at most 3·N |
| `COEF` | 9, 23, 23, 9 | packed, b_0 in the lowest N bits; symmetric low-pass, DC gain 64 |

The design works on unsigned samples and non-negative coefficients. The
result is exact only while every output is below M. The top computes the
worst case (2^XW - 1)·sum(b_i) at elaboration and reports an error if it
could reach M. With the defaults it is 4,194,240 against M = 16,776,960.
Signed samples or negative coefficients would need an offset or a signed
interpretation of the upper half of the range; neither is implemented.

## What is specified and what is chosen here

Taken from the original description: the moduli set {2^n+1, 2^n, 2^n-1}; the
structure of forward converter, three parallel modulo FIR sub-filters and
reverse converter; the block forward converter with two modulo adders per odd
modulus and R2 taken directly from the low block; the two-adder-plus-multiplexer
modulo 2^n-1 adder; the modulo 2^n+1 adder built from two (n+1)-bit adders,
the constant 2^n-1 and a multiplexer steered by the two carries; and a 4-tap
low-pass filter.

Chosen here, because the description leaves it open:

- n = 8, 16-bit unsigned input, and the coefficient values;
- the negation of B2 in the forward converter, which the weight -1 of 2^n
  requires;
- the multiplier structure (full product, then fold);
- the reverse converter. It was described only as based on the New Chinese
  Remainder Theorem. The mixed-radix form above gives the same result;
- the delay-line/adder-chain arrangement of a channel, the valid handshake,
  the register stages, the latency and the reset.

The original description also mentions an 8-tap low-pass filter in one place.
The default is 4 taps. `TAPS` = 8 works unchanged as long as the range limit
holds, and `tb_rns_fir_workloads` runs such an 8-tap filter.

## Verification

Each module has a self-checking testbench. It compares the module against
integer arithmetic (`%` and plain convolution) that is computed independently
in the testbench. Each testbench prints `TB_RESULT checks=… failures=…` and
has a watchdog.

- Modulo adders and multipliers: all operand pairs at n = 8.
- `binary_to_rns`: all block corners and 200,000 random words at n = 8, plus
  every input at n = 4.
- `rns_to_binary`: both ends of the range, 300,000 random values and
  all-ones zero residues at n = 8, plus the whole range at n = 4.
- `rns_fir_channel`: all three moduli with two coefficient sets, random gaps,
  a mid-stream reset, and the two-edge latency.
- `rns_fir_top`: runs at the default parameters. It plays an impulse, a
  full-scale impulse, a step, an alternating signal and long random streams
  with gaps and a reset. It checks every output value and the three-edge
  latency. It also counts the events the data path depends on and fails if
  one never happens: wrap-around in the 2^n+1 and 2^n-1 channels, inputs with
  a non-zero middle block, outputs of 2n bits or more, and input gaps.
- `rns_fir_workloads`: the 4-tap and an 8-tap filter on one shared stream.

Running a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    --top-module tb_rns_fir_top rtl/rns_pkg.sv tb/tb_rns_fir_top.sv
./obj_dir/Vtb_rns_fir_top
```

Replace the testbench name to run the others. All of them finish in well
under a second.
