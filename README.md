# 128-bit carry select adders with a binary-to-excess-1 converter

A carry select adder (CSLA) splits a wide addition into groups. Each group
works out its result for both possible carries from below ahead of time.
When the real carry arrives, a multiplexer picks one of the two results.
Only the multiplexers lie on the carry path between groups, so the adder is
much faster than one long ripple chain.

The classic CSLA pays for this with area: every group has two ripple carry
adders (RCAs), one with carry-in 0 and one with carry-in 1. The adders here
keep only the carry-in-0 RCA. The carry-in-1 result is exactly the
carry-in-0 result plus one. A **binary to excess-1 converter (BEC)** produces
it, and a BEC is an add-one circuit with far fewer gates than a second RCA.

Two 128-bit adders are provided. Both are built from the same group:

| adder | module | groups |
|---|---|---|
| modified linear CSLA | `mod_linear_csla` | 32 equal groups of 4 bits |
| modified square-root CSLA | `mod_sqrt_csla` | 13 groups, 2 to 16 bits wide, widening towards the MSB |

`csla128_top` holds both adders side by side, each with its own ports.

## The BEC group (`bec_csla_group`)

This is the one idea to understand. A W-bit group has three parts:

```
 a[W-1:0] b[W-1:0]
     |       |
   +-----------+  cin = 0
   |  rca (W)  |<------
   +-----------+
     | r0 = {c0, s0}  (W+1 bits)
     +----------------------+
     |                      |
 +-----------+              |
 | bec (W+1) |  r1 = r0 + 1 |
 +-----------+              |
     | r1                   | r0
 +------------------------------+
 |   csel_mux (W+1), sel = cin  |<---- carry from the group below
 +------------------------------+
     | {cout, sum}
```

- **`rca`**: a chain of W `full_adder` cells with the carry input tied to 0.
  It gives the (W+1)-bit word `r0 = a + b` (W sum bits plus the carry).
- **`bec`**: the (W+1)-bit add-one circuit, `r1 = r0 + 1`. It takes the RCA's
  carry as its top bit. That is why a 4-bit group has a 5-bit BEC and a
  multiplexer that picks 5 bits out of 10. Because `a + b <= 2^(W+1) - 2`,
  the increment never overflows. The gate form is
  `y[0] = ~x[0]` and `y[i] = x[i] ^ (x[0] & ... & x[i-1])`, with the AND terms
  built as a chain. That is one AND and one XOR per bit, against two XORs,
  two ANDs and an OR per bit for a full adder.
- **`csel_mux`**: a (W+1)-bit 2:1 multiplexer. The carry from the group below
  selects `r1` when it is 1 and `r0` when it is 0. The selected top bit is
  this group's carry out, which selects the next group.

The RCA and BEC of every group settle in parallel, as soon as the operands
are stable. After that, the carry only has to pass through one multiplexer
per group.

## Group layouts

### Linear (`mod_linear_csla`)

There are `WIDTH / GROUP_W` identical groups (32 × 4 bits by default). Group
g covers bits `4g+3 : 4g`. The adder's `cin` selects the lowest group, and
the carry out of the top group is `cout`. The carry path is the settling
time of one 4-bit RCA plus a 5-bit BEC, followed by 32 multiplexer stages.
`WIDTH` must be a multiple of `GROUP_W`; elaboration stops with an error
otherwise.

### Square-root (`mod_sqrt_csla`)

Upper groups start later in the carry chain. They therefore have time to
ripple through more bits before their select carry arrives, so each group is
one bit wider than the one below. This cuts the number of multiplexer stages
from 32 to 13. The groups at the default `WIDTH = 128`, `MAX_GROUP_W = 16`:

| group | bits | width | BEC / mux width |
|---|---|---|---|
| 12 | 127:112 | 16 | 17 |
| 11 | 111:97 | 15 | 16 |
| 10 | 96:83 | 14 | 15 |
| 9 | 82:70 | 13 | 14 |
| 8 | 69:58 | 12 | 13 |
| 7 | 57:47 | 11 | 12 |
| 6 | 46:37 | 10 | 11 |
| 5 | 36:28 | 9 | 10 |
| 4 | 27:20 | 8 | 9 |
| 3 | 19:13 | 7 | 8 |
| 2 | 12:7 | 6 | 7 |
| 1 | 6:2 | 5 | 6 |
| 0 | 1:0 | 2 | 3 |

The widths 16 down to 5 cover 126 bits. 128 is not a sum of consecutive
widths ending at 16, so the two bits left over form a 2-bit bottom group.
The layout is computed at elaboration time by the functions in `csla_pkg`:

- `sqrt_num_groups`
- `sqrt_group_width`
- `sqrt_group_lsb`

Counting down from the top, group k is `max(MAX_GROUP_W - k, 1)` bits wide,
clipped to the bits still left. Other sizes get a layout built by the same
rule: for example, `WIDTH = 40`, `MAX_GROUP_W = 9` gives groups of
9, 8, 7, 6, 5, 4 and 1 bits.

## Interface and timing

Every adder module has the same ports. All of them are purely combinational,
with no clock and no registers.

| port | dir | width | |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry input |
| `sum` | out | WIDTH | low WIDTH bits of `a + b + cin` |
| `cout` | out | 1 | carry out |

`csla128_top` has two copies of these ports: `lin_*` for the linear adder and
`sqrt_*` for the square-root adder. Its parameters are:

- `WIDTH` (128)
- `LIN_GROUP_WIDTH` (4)
- `SQRT_MAX_GROUP_WIDTH` (16)

Register the inputs and outputs outside these modules if a pipelined adder
is needed.

## What follows the published design, and what is chosen here

These points follow the published design:

- the 128-bit width;
- 4-bit groups for the linear adder;
- 16-bit (127:112) and 15-bit (111:97) top groups for the square-root adder,
  continuing with 96:83 and 82:70;
- one RCA with carry-in 0, one BEC and one multiplexer per group;
- the BEC and multiplexer widths (W+1, i.e. 5-bit BEC and 10-to-5 multiplexer
  for a 4-bit group, 17 bits for a 16-bit group);
- the carry chain between the multiplexers.

These are choices made here:

- **Square-root groups below 82:70.** Only the top groups are specified.
  Below them, the widths keep shrinking by one bit per group, and the two
  remaining bits form the bottom group.
- **The lowest group.** In both adders, the lowest group is a full BEC group
  whose multiplexer is driven by `cin`, rather than a plain RCA fed with
  `cin`.
- **Gate-level insides.** The full adder and the BEC use the textbook gate
  equations shown above.
- **No registers.** The adders are purely combinational. The published FPGA
  utilization figures mention flip-flops, but no register stage is described
  anywhere.

These variants are not included:

- **Regular CSLAs.** The linear and square-root versions with two RCAs per
  group are the baselines these adders are measured against.
- **Two further 128-bit variants.** One uses common Boolean logic and one
  uses D-latches. Their structure is known only from block diagrams.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench compares
the outputs with an independent behavioural result and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `rca_tb` | 4- and 8-bit RCAs exhaustively, a 16-bit RCA randomly |
| `bec_tb` | 2- and 5-bit BECs exhaustively; a 17-bit BEC with every run-of-ones pattern and random inputs |
| `csel_mux_tb` | 5- and 17-bit multiplexers, random data, both selects |
| `bec_csla_group_tb` | 4- and 2-bit groups exhaustively, a 16-bit group with boundary and random operands |
| `mod_linear_csla_tb` | 5000 vectors at 128 bits against a 129-bit reference sum |
| `mod_sqrt_csla_tb` | the group boundaries in the table above; 5000 vectors at 128 bits and at 40 bits |
| `csla128_top_tb` | both adders at default parameters, 4000 vectors each |

The vector streams start with boundary cases:

- all zeros and all ones;
- `a = ~b` with `cin = 1`, so the carry ripples the full 128 bits;
- a carry entering at bit 0 and stopping at each of the 128 bit positions in
  turn.

The `tb/csla_vectors.svh` include file generates these, followed by random
operands.

`csla128_top_tb` also counts how the design's mechanisms are exercised. It
fails if any of these never happens:

- every group of both adders selects its carry-0 word;
- every group of both adders selects its excess-1 word;
- the carry input is 1;
- the carry out is 1;
- a carry ripples through all 128 bits.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv \
    tb/csla128_top_tb.sv --top-module csla128_top_tb -o sim
./obj_dir/sim
```

Use the same command for any other testbench, with its file and module name.
Each testbench runs in well under a second. The testbenches use only two
signal states, and every input is driven before it is read.
