# Parallel counters, compressors and superimposed coders for fast triggers

A trigger for a particle detector has to decide within tens of nanoseconds
how many of hundreds or thousands of channels fired, or what the sum of many
digitised amplitudes is. A lookup memory indexed by all channels would need
2^n words, and a two-level gate network grows just as fast. This RTL collects
the combinational circuits that avoid both:

* **parallel counters**: networks of full adders that count the ones among
  n inputs;
* **parallel compressors**: many-operand adders that count every bit
  column and repeat the count until two words are left;
* an **iterative ones-gathering array** that counts a few hits in a large
  plane;
* **iteration codes**: row and column checks (OR and parity) that count hits
  in a pixel matrix with only four small counters;
* **superimposed (Boolean-sum) codes**: these compress n channels into a few
  OR-ed syndrome lines, which are then examined by weight.

None of these circuits has a clock. Every block is purely combinational logic
from inputs to outputs, as in the ECL hardware the design was first described
for. The circuits are independent. The top-level module places one of each
side by side, each with its own ports.

## The (3,2)-cell and (n,k)-counters

A full adder counts the ones among its three inputs. The sum bit has weight 1
and the carry bit weight 2, so it is the (3,2)-counter (`full_adder`).
Everything else is built from it. An (n,k)-counter (`par_counter`, parameter
`N`, output width `K = $clog2(N+1)`) counts n inputs.

The canonical sizes are n = 2^k - 1: (3,2), (7,3), (15,4), (31,5), (63,6),
(127,7). For these sizes the network uses exactly n - k full adders:

```
level 1 : 2^(k-1) single inputs
level j : 2^(k-j) nodes; node i = (j-1)-bit ripple adder of two level-(j-1)
          counts, with one fresh input as its carry-in  -> j-bit count
level k : one node = the result
```

For (7,3) this gives two full adders on inputs 1-6. A third adder takes their
two sum bits and input 7 and gives weight 2^0. A fourth takes the two carries
and the carry of the third, and gives weights 2^1 and 2^2. That is four
adders, which is 7 - 3. Sizes that are not of the form 2^k - 1 are padded with
zero inputs. Synthesis then removes the adders that only see constants.

The original (31,5) network wires its adders column by column, a "carry
shower" with delay-equalising elements. This implementation keeps that
network's adder count and its result, but not its wiring or its delays.

The per-adder delays of the ECL parts (4.5 ns to the sum, 2.2 ns to the carry)
and the delay equalisers are not modelled. In RTL every block is simply
combinational.

## Adding many words: the parallel compressor

`par_compressor #(M, W)` adds M words of W bits. The output has
`W + $clog2(M)` bits. Each stage works as follows:

1. Every bit column c is counted by an (M,K)-counter.
2. Bit j of that count has weight 2^(c+j). The K count bits of all columns
   therefore form K new words, with word j shifted left by j.
3. The K words go through the next stage.

The stages repeat until two words remain. A ripple-carry adder then adds
those two words. The default (15,15) runs (15,4) → (4,3) → (3,2) → adder.
A (7,7) compressor runs (7,3) → (3,2) → adder.

The testbench uses the worked example of fifteen 15-bit numbers. Its
first-stage column counts are 11, 8, 9, 9, 6, ... (weight 2^0 first), and its
sum is 244103. A second example, 105+58+113+5+125+42+109 = 557, is checked on a
(7,7) instance.

Intermediate words are carried at the full output width. The columns a stage
cannot reach are constant zero and disappear in synthesis.

## Counting a few hits: the sequential-parallel compressor

When only a handful of hits (t ≤ 4) is expected among many channels,
`seqpar_counter` splits the plane into groups of 7. The defaults are 9 groups,
63 channels.

* **`ones_array`**: a staircase of cells, each an OR gate (output to the right)
  and an AND gate (output downwards). Row r starts at column r with a zero
  from the left. The first one a row meets travels to the row's right end.
  Every later one is pushed down to the next row. The right-end output of row
  r is therefore "at least r+1 inputs are one", a thermometer code. Only 4
  rows are built.
* A (4,3)-counter turns the thermometer code into a group count.
* A parallel compressor adds the 9 group counts.
* The encoder E (`unitary_encoder`) drives the decision lines =1, =2, =3
  and =4.

A group with more than 4 hits counts as 4. This is intended, because the lower
rows of the array are left out, but it means `sum` is a true multiplicity only
while no group holds more than four hits.

## Pixel detectors: odd and even lines (the iteration code)

`pixel_counter` handles a 31 × 31 = 961-pixel matrix. Think of the hits as the
error pattern of an all-zero code word that has a parity check and an OR check
on every row and column. For each row and each column it forms:

* `ODD`: the parity of the line (`parity_checker`, a two-level XOR tree);
* `EVEN`: the line is not empty and its parity is even. An OR gate is needed
  because an empty line also has even parity.

Four (31,5)-counters count the odd rows, even rows, odd columns and even
columns. Each count also goes through an encoder E with lines =1 … =6.

**The multiplicity rule is this design's own.** The original only says that
the encoder outputs are combined by AND gates, and shows hit pictures for
t = 1 … 6. A line with an odd count holds at least one hit, and a line with a
non-zero even count at least two. The rule is:

```
t_est = max(x_odd + 2*x_even, y_odd + 2*y_even)
```

It reproduces the pictures for t = 1 … 3 and the legible ones for t = 4. It
gives the exact number of hits whenever no row or column holds more than two
hits. Otherwise it is only a lower bound: three hits in one row and one
column, for example, are not all counted. The four raw counts are brought out
so that a different decision table can be put after them.

`parity_checker` defaults to the 144-input arrangement: twelve 12-input parity
circuits followed by a 12-input one. Inside the pixel counter it is used with
31 inputs, as groups of 12 + 12 + 7.

## Superimposed codes

In a superimposed code each channel drives several mixers, and each mixer
ORs what it receives. The mixers were originally photomultipliers or optical
fibres. Here they are OR gates.

### H_{28,8}: one channel per pair of mixers (`superimposed_coder`, `superimposed_decoder`)

There are N = 8 mixers and n = N(N-1)/2 = 28 channels. Each channel goes to
exactly two mixers, and every pair of mixers is used by one channel. A single
hit therefore gives a syndrome of weight 2, and that syndrome names the
channel.

Channels are numbered by mixer pair (a, b), for a = 8 down to 2 and
b = 1 … a-1. So channels 1-7 go to mixer 8 and to mixers 1-7, channels 8-13
go to mixer 7 and to mixers 1-6, and channel 28 goes to mixers 2 and 1. With
this order, neighbouring channels share a mixer, and a cluster of 2 or 3
adjacent hits gives weight 3 or 4.

The decoder counts the weight with an (8,4)-counter and raises `single`,
`double_cl` or `triple_cl`. For a single hit it returns the channel number.

One exception comes from the matrix itself: the triple cluster on channels
26-28 uses only mixers 1-3. It has weight 3 and is reported as a double
cluster.

### H_{64,8}: cluster size (`cluster_counter`)

The 64 channels go to 8 OR gates, with channel i on gate ((i-1) mod 8) + 1. A
single cluster of b ≤ 8 adjacent hits lights exactly b gates. Two PROMs,
addressed by the 8 gate outputs and sharing `enable`, turn the weight into the
lines b = 1 … 4 (PROM 1) and b = 5 … 8 (PROM 2).

The PROM image is generated at elaboration from "weight w means b = w". It is
held as a 256-word table, so synthesis reports it as a memory. `enable` is
active high, and a disabled PROM drives zeros. Both of these are this
design's choices.

### OR-Gray iteration code (`or_gray_syndrome`)

For a 15 × 15 matrix, each row is coded with H_{15,4}. Column n of that matrix
is the 4-bit Gray code of n, n xor (n >> 1), with the least significant bit in
matrix row 1. This takes 4 eight-input ORs per row. Each column is coded by a
single 15-input OR. The block produces the 60 + 15 syndrome bits. Turning them
into a multiplicity is not described in the source and is not built.

## The quasi-digital counter (behavioural model)

`quasi_digital_counter` is an analog circuit, and only a model is given. Seven
inputs drive equal resistors into one summing node. A divider with Rx/2 end
resistors sets comparator thresholds between the integer levels, and logic
turns the comparator thermometer into a 3-bit count.

The model uses a real-valued node, thresholds at m + 0.5 units and two delays:

* `TS_NS`, the network delay, is 1 ns. This value is the model's own.
* `TL_NS`, for the comparators and logic, is 5 ns, from the original.

The model is not synthesizable. Because it is part of the top, synthesis of
the top with yosys stops at its `real` variables. Verilator lint and slang
elaboration accept it.

## Top level

`parallel_counters_top` has no parameters and no clock. Its port groups are:

| prefix | circuit | in → out |
|---|---|---|
| `cnt_` | (31,5)-counter | 31 → 5 |
| `qd_` | quasi-digital (7,3)-counter | 7 → 3 |
| `cmp_` | (15,15)-compressor | 15×15 → 19 |
| `sp_` | sequential-parallel compressor | 63 → sum (7), =1…=4 |
| `pix_` | 961-pixel counter | 31×31 → four 5-bit counts, four =1…=6 codes, `t_est` (7) |
| `par_` | parity checker | 144 → 1 |
| `sc_` | H_{28,8} coder and analysis | 28 → syndrome, weight, flags, channel |
| `cl_` | cluster counter | 64 + enable → b = 1…8 |
| `og_` | OR-Gray syndrome | 15×15 → 15×4 + 15 |

Two-dimensional inputs are packed arrays `[row][column]`.

## Where this design departs from its source

* The (n,k)-counter is a tree with the same adder count as the original
  networks, not a copy of the column-wise (31,5) wiring.
* Gate delays and the ECL delay-equalising elements are not modelled.
* The sequential-parallel compressor uses 9 groups of 7. The group count is
  not given in the source. A group saturates at 4 hits.
* The multiplicity rule of the pixel counter is this design's own (see above).
* The H_{28,8} coder has 8 mixers. One passage of the source says N = 7, but
  28 channels with two mixers each need C(8,2) = 28, and the drawn mixer
  lists use 8.
* These parts are not built:
  * the syndrome shaper that compresses 63 channels to 18 bits for t = 3,
    because its code is not given;
  * the H_{30,11} two-hit coder, because its matrix is only drawn as a mask;
  * the multiplicity decoder of the OR-Gray code;
  * the optical mixers themselves.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -y rtl tb/tb_par_compressor.sv --top-module tb_par_compressor
./obj_dir/Vtb_par_compressor
```

`tb/tb_parallel_counters_top.sv` drives the whole top at its default sizes. It
runs every circuit against a reference model and counts how often each
mechanism occurred, and fails if one never did. The mechanisms are: a full
count, group saturation, odd and even lines, a lower-bound multiplicity,
single, double and triple clusters, each cluster size, and a disabled PROM.
It builds in about 20 s and runs in well under a second.

The block testbenches also cover the other sizes named in the source:

* the (3,2) … (127,7) counters;
* the (7,7), (15,7), (31,7), (63,7) and (127,7) compressors.

To change a size, set the block's parameters (`N`, `M`/`W`, `GROUPS`, `R`/`C`,
…). Output widths follow from them.
