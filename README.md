# Matrix-Diagonal binary multiplier

A combinational N x N unsigned multiplier built only from AND gates and half
adders. It follows the "vertically and crosswise" (Urdhva Tiryakbhyam) scheme
of Vedic arithmetic: every partial-product bit is formed at once, the bits of
equal weight are summed together, and the carries of each sum are handed on
to the next weight. There is no clock, no state and no control: the product
appears one settling time after the operands change. The default size is
4 x 4 bits (8-bit product); the parameter `N` sets any other width.

## The matrix and its diagonals

Write the multiplicand `x_in` along the columns and the multiplier `y_in`
along the rows of an N x N matrix. Node (i, j) is one AND gate,
`y_in[i] & x_in[j]`, and carries weight 2^(i+j). All nodes on one diagonal
i + j = k therefore contribute to the same product bit k. For N = 4 the
diagonals hold 1, 2, 3, 4, 3, 2 and 1 nodes (k = 0 .. 6).

`pp_matrix` is this AND array.

## Diagonal stages and stacked carries

This is the part of the design that needs the most care.

Each product bit k has one `diagonal_stage`. Its inputs are:

1. the AND outputs of diagonal k, and
2. every carry that stage k-1 produced ("stacked" into stage k).

The stage adds these inputs with a chain of half adders and nothing else.
The first input bit is the starting running sum. Half adder m adds input
bit m to the running sum. It produces a new running sum and a carry. The
running sum after the last half adder is product bit k. The carry of every
half adder has weight 2^(k+1). Each one goes, as its own wire, into stage
k+1. There it is one more input bit, next to that diagonal's AND outputs.

Each half adder keeps the total unchanged, since a + b = s + 2c. So a stage
with m input bits always satisfies this rule:

    ones(inputs) = sum + 2 * ones(carries)

A stage with m inputs has m-1 half adders and sends m-1 carries onward.
The carry count therefore grows along the product. For N = 4:

| stage k           | 0 | 1 | 2 | 3 | 4 | 5  | 6  | 7 |
|-------------------|---|---|---|---|---|----|----|---|
| AND outputs       | 1 | 2 | 3 | 4 | 3 | 2  | 1  | 0 |
| stacked carries   | 0 | 0 | 1 | 3 | 6 | 8  | 9  | 9 |
| half adders       | 0 | 1 | 3 | 6 | 8 | 9  | 9  | 8 |

That is 44 half adders and 16 AND nodes in all. Stage 2N-1 has no AND node;
its bit is built from stacked carries alone. The carries it would pass on
have weight 2^(2N). They are always zero, because an N x N product fits in
2N bits. They are not brought out, and an assertion in `md_multiplier`
flags any that is set in simulation.

The package `md_pkg` works these counts out for any N when the design is
elaborated. Its functions are `pp_count`, `cin_count`, `stage_inputs`,
`max_carries` and `ha_count`. The top uses them to size and wire its
generate loop.

## Interface and timing

`md_multiplier #(parameter int unsigned N = 4)`

| port    | dir | width | meaning                      |
|---------|-----|-------|------------------------------|
| `x_in`  | in  | N     | multiplicand, unsigned       |
| `y_in`  | in  | N     | multiplier, unsigned         |
| `y_out` | out | 2N    | product `x_in * y_in`        |

The design is purely combinational. There is no clock, reset, enable or
handshake. To use it at a clock rate, register the inputs and outputs
outside it. The longest path runs through the half-adder chains of the
upper stages, so it grows with N. No timing figure is modelled in the RTL.

## Files

| file                      | content                                          |
|---------------------------|--------------------------------------------------|
| `rtl/md_pkg.sv`           | elaboration-time counting functions              |
| `rtl/half_adder.sv`       | the summing node: `s = a ^ b`, `c = a & b`       |
| `rtl/pp_matrix.sv`        | N x N AND-node matrix                            |
| `rtl/diagonal_stage.sv`   | half-adder chain for one product bit             |
| `rtl/md_multiplier.sv`    | top: matrix plus 2N diagonal stages              |

## How far it is verified

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_half_adder` tries all four input pairs.
- `tb_pp_matrix` tries all 256 operand pairs at N = 4. It checks every node
  and the weighted sum of all nodes.
- `tb_diagonal_stage` tries every input pattern of a 10-input stage, plus
  the 2-input and 1-input cases. It checks the rule above, the parity of
  the sum bit, and each carry of the chain.
- `tb_md_multiplier` is the end-to-end test at the default N = 4, with no
  parameter override. It runs the worked example 1010 x 1101 = 10000010
  (10 x 13 = 130), then all 256 operand pairs. It also counts the operand
  pairs that put a carry into a following stage (96) and those whose top
  product bit comes only from stacked carries (33).
- `tb_md_multiplier_sizes` runs all operand pairs at N = 2, 3, 5, 6 and 8.

The whole design is checked exhaustively at every size from 2 to 8 except
7. Only unsigned operands are supported.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        rtl/md_pkg.sv rtl/half_adder.sv rtl/pp_matrix.sv \
        rtl/diagonal_stage.sv rtl/md_multiplier.sv tb/tb_md_multiplier.sv \
        --top-module tb_md_multiplier
    ./obj_dir/Vtb_md_multiplier

Use the same command with another `tb/` file and its module name for the
other benches. Lint reports one unused signal: the carry vector of stage 0.
That stage has a single input and no half adder, so its carry is a constant
zero that nothing reads.

## Changing the design

- **Width:** set `N`. All counts follow from `md_pkg`. The number of half
  adders grows roughly with the cube of N (44 at N = 4, 440 at N = 8). The longest
  half-adder chain also grows with N.
- **Order within a stage:** `md_multiplier` feeds each stage its AND outputs
  first (rows in increasing order), then the stacked carries. Any order
  gives the same product. The order changes only which paths are long.

## Departures and choices

These points are choices made for this RTL. The method does not settle them.

- The chain order inside a stage is a choice of this design.
- Each carry is passed on as its own wire, with no pre-combining. This
  keeps to half adders only, but costs more half adders than a
  full-adder tree would.
- The operands are unsigned. No signed mode is provided.
- The row and column assignment of the matrix is a choice of this design.
  The product does not depend on it.
- Speed and area claims (a 4 x 4 delay of about 35 ns and 47 LUTs on a
  Spartan-II FPGA) are properties of an FPGA implementation. They were not
  reproduced. This AND/half-adder structure synthesises to 52 two-input
  ANDs and 44 XORs at N = 4.
- Array and Booth multipliers, which the method is usually compared against,
  are not included.
