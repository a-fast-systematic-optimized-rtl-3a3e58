# Shared-comparator self-message-excluded check node unit for min-sum LDPC decoding

In a min-sum LDPC decoder every check node receives N messages and must send
back N messages. The message for input *r* carries the product of the signs
of all *other* inputs and the smallest magnitude among all *other* inputs:

    out[r].sign = XOR of in[k].sign, k != r
    out[r].mag  = min of |in[k]|,     k != r

There are two classic ways to build this in hardware.

* **Two-minimum CNU.** Find the smallest and second-smallest magnitude and
  the index of the smallest. Then use a multiplexer to give the second
  minimum to the input that holds the minimum. This takes few comparators.
  It is slow, because the second minimum needs an extra comparator level
  plus index decoding.
* **Self-message-excluded (SME) CNU.** Compute every `out[r]` directly as
  the minimum of N-1 values. Every output is ready after ceil(log2(N-1))
  comparator levels, which is the fastest possible. Built naively, it needs
  N separate trees, or N·(N-2) comparators.

This RTL builds the SME form at full speed, with far fewer comparators. Many
rows need the minimum of the same subsets. Each such subset is computed once
and shared, and no row's path gets longer than ceil(log2(N-1)) levels. For
the 7-input default this takes **18 comparators in 3 levels instead of 35**.
There is no second-minimum search, no index encoder or decoder, and no
output multiplexer.

## Files

| file | what it is |
|---|---|
| `rtl/vhc_pkg.sv` | default sizes, and the constant functions that build the sharing network at elaboration time |
| `rtl/vhc_min_cell.sv` | one Min cell: a magnitude comparator and a 2-to-1 multiplexer |
| `rtl/vhc_min_network.sv` | the shared network of Min cells: N magnitudes in, N self-excluded minima out |
| `rtl/cnu_sign_unit.sv` | the self-excluded sign product (XOR) |
| `rtl/vhc_sme_cnu.sv` | top level: the complete check node unit with an output register |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_vhc_table2.sv` (sizes 6 to 14) |

## Message format and interface of the top level

`vhc_sme_cnu #(N_IN = 7, W = 5)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low. Clears `out_valid` and `out_msg`. |
| `in_valid` | in | 1 | `in_msg` holds a new set of variable-to-check messages |
| `in_msg[N_IN]` | in | W+1 each | sign-magnitude: bit W is the sign (1 = negative), bits W-1:0 the magnitude |
| `out_valid` | out | 1 | `in_valid` delayed by one cycle |
| `out_msg[N_IN]` | out | W+1 each | check-to-variable messages, same format |

Timing: the network and the sign unit are combinational. The only register
is at the output. A message set presented with `in_valid` high at a rising
edge appears on `out_msg` right after that edge, so latency is one cycle and
throughput is one set per cycle. When `in_valid` is low the output register
holds its value.

Magnitudes are compared as unsigned numbers. A zero magnitude with sign 1
("negative zero") is passed through as it is.

## How the sharing network is built

Picture the problem as a matrix. Row *r* lists every input except *r*, so
the diagonal is empty and any two rows differ in only two places. A subset
that appears in many rows is worth computing once: a "vertical" set shared
down the column. Whatever is left in a row is covered by "horizontal" sets
inside that row. When a row splits into two halves of a power-of-two size,
the halves wrap cyclically around the end of the row.

`vhc_pkg::vhc_build()` turns this into a concrete list of Min cells. For a
(sub)problem of *n* elements, each row excluding one element:

1. The depth budget is `d = ceil(log2(n-1))`. A set minimised one level
   below the row output may hold at most `H = 2^(d-1)` elements.
2. If `n-1 < 2H`, split the elements into consecutive groups of at least
   `n-H` elements each. Use as many groups as possible and keep their sizes
   as equal as possible.
   * A row in group *G* needs:
     * the complement of *G*, at most H elements, which every row of *G*
       shares;
     * *G* without itself, which is the same problem with fewer elements,
       solved recursively.
   * The row output is Min(complement, recursive result).
3. If `n-1 = 2H` (N = 5, 9, 17, ...), no grouping works. The row takes the H
   elements that follow it cyclically and the H after those. These are two
   power-of-two sets, minimised separately and then combined.
4. Each set is minimised by a balanced tree over its element list. Every
   intermediate set is keyed by its bitmask, so a set that already exists at
   the same or a smaller depth is reused, not built again.

It runs once per network and returns the whole list as one packed
constant (`vhc_net_t`). Nodes `0..N-1` of the result are the inputs. Node
`k >= N` is `Min(node A, node B)` with `A, B < k`. `vhc_min_network` turns this list
into `vhc_min_cell` instances in a generate loop and wires each output to
its row's node. The two figures of the generated network are available as
localparams `NUM_CMP` and `DEPTH`. Elaboration-time assertions check that
the depth is exactly ceil(log2(N-1)) and that no more cells are used than in
the unshared design.

The 7-input network (inputs numbered 1 to 7) splits the inputs into the
groups {1,2,3,4} and {5,6,7}:

| level | sets computed (each is one Min cell) |
|---|---|
| 1 | {1,2} {3,4} {5,6} {6,7} {5,7} |
| 2 | {1,2,3,4} {5,6,7} {2,3,4} {1,3,4} {1,2,4} {1,2,3} |
| 3 | row 1..4 = {5,6,7} with the 3-set of the row; rows 5, 6, 7 = {1,2,3,4} with {6,7}, {5,7}, {5,6} |

That is 5 + 6 + 7 = 18 cells. The published seven-input example also has 18
cells in 3 levels, but it shares different sets: all seven cyclic pairs,
then the four sets {1,2,3,4}, {3,4,5,6}, {4,5,6,7} and {7,1,2,3}. Both
networks compute the same function. Only the wiring differs.

### Cell counts at other sizes

`tb_vhc_table2` builds and checks the network for every size of the
published comparison table:

| N | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|---|---|---|---|---|---|---|---|---|---|
| unshared N·(N-2) | 24 | 35 | 48 | 63 | 80 | 99 | 120 | 143 | 168 |
| published shared design | 12 | 18 | 22 | 28 | 25 | 41 | 36 | 49 | 38 |
| this generator | 12 | 18 | 22 | 27 | 26 | 32 | 36 | 45 | 52 |
| levels | 3 | 3 | 3 | 3 | 4 | 4 | 4 | 4 | 4 |

* Equal to the published count: N = 6, 7, 8 and 12.
* Lower: N = 9, 11 and 13.
* Higher: N = 10 (by one cell) and N = 14 (by 14 cells).

The grouping rule is a simple systematic reading of the set-sharing method,
not a search for the optimum. If you need a smaller network at 14 inputs,
improve the grouping rule. At every size the depth is the minimum
ceil(log2(N-1)).

## Sign path

`cnu_sign_unit` XORs all N sign bits once. It then XORs each output with its
own sign bit, which removes that sign from the product. This costs N XOR
gates plus one N-input XOR tree, and that tree is shallower than the
comparison network.

## What follows the published method and what is this design's own

Follows the method:
* the SME formulation and the min-sum rule;
* sign-magnitude messages of w+1 bits, with only the w magnitude bits
  compared;
* the Min cell as one comparator plus one 2-to-1 multiplexer;
* the minimum depth of ceil(log2(N-1)) Min levels;
* sharing of power-of-two, vertically shared and cyclic sets, with 18 cells
  at N = 7.

This design's own choices:
* **the exact grouping rule**, which gives different intermediate sets and,
  at some sizes, different cell counts (see above);
* **w = 5**: the method leaves the magnitude width open;
* **the output register and the valid/reset protocol**: the method describes
  only the combinational unit;
* **on a tie the Min cell passes its first operand**. Either operand gives
  the same value.

The comparator-based sharing could also serve a variable node unit, with
adders in place of Min cells. That use is not built here.

## Changing the size

* `N_IN` may be any value from 3 to 32 (`vhc_pkg::MAX_N`). The network is
  regenerated automatically.
* `W` sets the magnitude width.
* For N above 32, raise `MAX_N`. Also raise `MAX_NODES` if needed, which
  must exceed N plus the number of cells.

The generator runs once at elaboration. Even at N = 32 it takes seconds.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
It also has a watchdog that ends the run with a failure if it hangs. With
Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/vhc_pkg.sv rtl/*.sv \
        tb/tb_vhc_sme_cnu.sv --top-module tb_vhc_sme_cnu -Mdir obj
    ./obj/Vtb_vhc_sme_cnu

Replace the testbench name to run another one.

| testbench | what it checks |
|---|---|
| `tb_vhc_min_cell` | all 1024 operand pairs at W = 5 |
| `tb_cnu_sign_unit` | all 128 sign patterns at N = 7, against a loop over the other inputs |
| `tb_vhc_min_network` | N = 7: the 18-cell / 3-level figures, then directed cases (all equal, unique minimum at each position, every tied pair, lone zero and lone maximum) and 3000 random sets |
| `tb_vhc_sme_cnu` | the top at its default parameters: 20000 cycles of random traffic with gaps in `in_valid` and a reset in mid-traffic, checked cycle by cycle against a reference model (see below) |
| `tb_vhc_table2` | N = 6 to 14: values, depth, a saving over the unshared design, and the published counts where they agree |

`tb_vhc_sme_cnu` also checks that each of these situations occurred at least
once:
* a unique minimum, whose holder must receive the second minimum;
* a tied minimum;
* a negative output;
* a held output during an idle cycle;
* the reset.

In `tb_vhc_sme_cnu`, half of the magnitudes are drawn from 0 to 7, so that
ties are frequent.
