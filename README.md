# Linear-array carry-save compressor trees for FPGA carry chains

Adding many operands at once (partial products of a multiplier, filter taps,
accumulations) is usually done in two steps. A *compressor tree* of
carry-save adders (3:2 counters) reduces the operands to two words, a sum word
and a carry word, with no carry propagation. One carry-propagate adder (CPA)
then adds those two. On an ASIC the tree is a Wallace or Dadda tree. On an FPGA
that structure maps badly. Each full adder goes through general LUT logic and
routing, while the fast dedicated carry chain, about ten times quicker per bit
than a LUT plus routing, sits unused. Plain CPA trees therefore often beat
carry-save trees on FPGAs.

This RTL implements a different arrangement, the **linear array**. It keeps
the 3:2 adders, but chains them so that the carry output of every adder drives
the carry input of the next one. Traced bit by bit, the whole tree then falls
apart into ordinary ripple-carry adders that run diagonally through the array.
Synthesis maps these onto the dedicated carry chain. The result has about the
area of a CPA tree and the shallow regular-input depth of a carry-save tree.
Because it is written with ordinary `+` operators, it needs no device
primitives.

Three variants are provided, plus the final adder:

| variant | module | default | for |
|---|---|---|---|
| linear array of 3:2 adders | `csa_linear_array_cpa` (adder form), `csa_linear_array` (full-adder form) | 9 operands, 16 bits | FPGAs with binary carry chains |
| linear array of 5:3 compressors | `csa_linear_array_tern` (ternary-adder form), `csa_linear_array_53` (compressor form) | 11 operands, 16 bits | FPGAs with ternary adders |
| pipelined tree of small linear arrays | `pipelined_csa_tree` | 18 operands, 2 stages of 6:2 blocks | high clock rates |
| final carry-propagate adder | `cpa` | 16 bits | carry-save to binary |

`mlcsa_top` puts the three trees side by side, each with its own operand port
and its own final adder.

## Number format and widths

All words are N bits wide, inputs and outputs alike. The trees compute
modulo 2^N. Operands must be sign or zero extended beforehand far enough that
the true sum fits in N bits. Carry words leave every tree **already aligned**:
bit 0 of `carry_w` is always 0, and `sum_w + carry_w` (mod 2^N) is the sum of
the operands. The single-row cells `csa_3to2` and `csa_5to3` return their
carry words unshifted (bit j has weight 2^(j+1)). The shift by one is done
where rows are chained.

## The 3:2 linear array

`csa_linear_array` is the reference description, built from NOP-2 rows of
full adders (`csa_3to2`, pins A, B, Ci, S, Co):

* Row 0 takes operand 0 on its carry input Ci and operands 1 and 2 on A and B.
* Every later row k takes the carry word of row k-1, shifted left by one, on Ci.
* The A and B inputs of the rows read a first-in first-out list. The list
  holds operands 1 .. NOP-1 first, then the partial sum words in the order
  the rows produce them. Older partial sums are therefore added first.
* The last row's sum word is `sum_w`, and its shifted carry word is `carry_w`.

Each row removes one word, so NOP operands need NOP-2 rows. For 9 operands
the rows are:

```
row:  0        1        2        3        4        5        6
A,B:  I1,I2    I3,I4    I5,I6    I7,I8    S0,S1    S2,S3    S4,S5
Ci:   I0       C0<<1    C1<<1    C2<<1    C3<<1    C4<<1    C5<<1
                                                           -> Sf=S6, Cf=C6<<1
```

Counted in rows, this is a chain of depth NOP-2, which looks worse than a
tree. The point is that the Ci-to-Co path of a row is a carry-chain hop, not
a LUT. If carry hops are treated as free, the regular inputs form a tree.
Rows 0-3 work in parallel on the operands, rows 4-5 on their sums and row 6
last: three "effective time levels", about ceil(log2(NOP-1)). The real delay
lies between two extremes:

* sum delay + (NOP-3) carry hops, when carry hops dominate;
* (levels) × sum delay + a few carry hops, when they do not.

Which extreme holds depends on the device and on NOP.

### Why the same array is a set of ripple adders

In the linear array, the full adder at bit j of row k gets its carry from
bit j-1 of row k-1. Follow these links and every full adder belongs to one
diagonal d = j - k. Each diagonal is a ripple-carry adder:

```
        bit:  3    2    1    0
row 0        FA   FA   FA   FA    <- carry-in: bits of operand 0
row 1        FA   FA   FA   FA    <- bit-0 carry-in: 0
row 2        FA   FA   FA   FA
   diagonal d=0:  (row0,bit0) -> (row1,bit1) -> (row2,bit2) -> ...
   diagonal d=-1: (row1,bit0) -> (row2,bit1) -> ...
```

`csa_linear_array_cpa` writes the tree exactly this way, one `+` per diagonal:

* The A word of diagonal d collects bit k+d of the A input of every row k on
  it. The B word is collected the same way.
* The carry-in is bit d of operand 0 for diagonals that start in row 0, and
  0 for diagonals that start at bit 0 of a later row.
* Sum bit i of the diagonal is bit (kmin+i+d) of row (kmin+i)'s partial sum.
* The carry out of a diagonal that ends in the last row is a bit of `carry_w`.
  A carry that leaves bit N-1 is dropped.

A diagonal reads partial-sum bits only from diagonals with a higher d.
Diagonal N-1 depends on nothing, diagonal N-2 only on it, and so on. So
there is no combinational loop, even though all diagonals write into the same
array of partial sum words. The two forms are bit-identical. The testbenches
check both against the same model.

## The 5:3 linear array (ternary adders)

Newer FPGAs add three operands per carry chain. A ternary adder bit makes two
carries:

* **cA** comes from a first full-adder level over A, B and C. It depends on
  no earlier carry.
* **cB** comes from a second level that adds the first-level sum to the
  incoming cA and cB. cB is the carry chain.

Take both carries out of the row instead of into the next bit, and the row
becomes a 5:3 compressor (`csa_5to3`): five words in, one sum and two carry
words out. It removes two words per row.

`csa_linear_array_53` chains ceil((NOP-1)/2) such rows the same way:

* Row 0 takes operands 0 and 1 on its two carry inputs and operands 2-4 on
  A, B and C.
* Later rows take both shifted carry words of the row before.
* A, B and C read the same kind of first-in first-out list. When the list is
  momentarily empty, an input reads zero.

For 11 operands this gives 5 rows with two zero inputs. Odd NOP always ends
with two zeros and even NOP with three. The zeros always fall so that the last
row adds a single word to two zeros. That makes its cA word zero (an
assertion checks it), so the tree ends in two words: the sum and the shifted
cB word.

`csa_linear_array_tern` is the same tree as ternary adders. In the 5:3 array
both carries go from (row k, bit j) to (row k+1, bit j+1). Each diagonal is
therefore one ternary adder: three words plus two carry-in bits.

The slot-to-word assignment of both list-based trees is computed at
elaboration time by `csa_pkg::slot_src`, in closed form:

* Row k has taken c(k) = min(R·k, L0+k-1) list entries before it reads.
  Here R is the number of regular inputs per row and L0 the number of
  operands placed in the list.
* Slot s of row k reads entry c(k)+s, or zero if that entry does not exist
  yet.

## The pipelined tree

A linear array is one long carry chain, so it cannot simply be cut by
registers. `pipelined_csa_tree` builds the pipeline from small linear arrays:

* Each stage splits its words into groups of at most X.
* Each group is reduced to two words by an X:2 `csa_linear_array_cpa`.
* The results of all groups are registered.
* Stages repeat until two words remain.
* A group of one or two words is passed through, one word padded with zero.

The block size follows X = 2·ceil((NOP/2)^(1/STAGES)). For 18 operands in two
stages, X = 6: three 6:2 blocks take 18 words to 6, and a fourth 6:2 block
takes those to 2.

Timing:

* Every stage ends in a register. The result appears `PIPE_STAGES` rising edges
  after the operands are sampled with `in_valid` high. That is 2 cycles by
  default. The number of stages is derived from NOP and X and is at most
  STAGES.
* A new operand set can enter every cycle.
* `out_valid` follows `in_valid` through the same registers.
* `rst_n` is synchronous and active low. It clears the valid bits and the data.

## Top level: `mlcsa_top`

| port group | meaning |
|---|---|
| `clk`, `rst_n` | clock and synchronous active-low reset (pipelined tree only) |
| `bin_ops[NOP_BIN]` → `bin_sum_w`, `bin_carry_w`, `bin_result` | combinational 3:2 linear array plus CPA |
| `ter_ops[NOP_TER]` → `ter_sum_w`, `ter_carry_w`, `ter_result` | combinational 5:3 linear array plus CPA |
| `pipe_in_valid`, `pipe_ops[NOP_PIPE]` → `pipe_out_valid`, `pipe_sum_w`, `pipe_carry_w`, `pipe_result` | pipelined tree plus CPA; the CPA is after the last register |

Parameters: `N` = 16, `NOP_BIN` = 9, `NOP_TER` = 11, `NOP_PIPE` = 18,
`PIPE_STAGES` = 2, `STRUCTURAL` = 0. `STRUCTURAL` = 1 swaps the two
combinational trees for their full-adder / compressor-row descriptions. The
results are the same.

All tree modules take `NOP` (at least 3) and `N` (at least 2) as parameters.
They have been simulated from 3 up to 128 operands and from 8 up to 128 bits.

## Where this RTL departs from, or fills in, the original description

* **Adder count.** A damaged count of "Nop/2" adders for the binary array is
  read as NOP-2, since every 3:2 row removes exactly one word.
* **Pipelined 18:2 tree.** It is described as built from "three" 6:2 blocks.
  Three blocks only reach six words, so a fourth block forms the second stage.
* **Block-size rule.** The printed rule gives 8 for the 18-operand, two-stage
  example, not 6. It is read as X = 2·ceil((NOP/2)^(1/S)), which gives 6 and
  depends on both NOP and S as described.
* **Pipeline details of this design's own.** Registers sit at block outputs;
  the description allows inputs or outputs. The valid bit, the reset and the
  pass-through of groups smaller than three are also this design's choices.
* **Zero inputs of the 5:3 array.** They are placed wherever the word list
  runs dry. The count matches the 11-operand example: two zeros.
* **Ternary-adder bit mapping.** It is derived from the carry links (diagonals)
  and not taken from a formula.
* **Aligned carry outputs.** Tree outputs return the carry word already shifted.
* **Final adder.** `cpa` is a plain `+`. Its `cout` is left open in the top
  because the trees work modulo 2^N.
* **Not built:** the 4:2-compressor tree and the CPA tree. They are only used
  as comparison baselines.
* **Not built:** the signed-digit variant, which is only mentioned as possible
  by inverting some inputs and outputs.
* **Not reproduced:** FPGA delay and LUT counts. They depend on place and
  route. The RTL gives the structure; the speed-ups are reported for Xilinx
  Virtex-4 and are not claimed here.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. The word-level reference models in
`tb/tb_ref_pkg.sv` replay the arrays with queues. They do not use the design's
own scheduling functions, so they check those functions too.

| testbench | what it checks |
|---|---|
| `tb_csa_3to2`, `tb_csa_5to3` | every bit against a count of ones; cA independent of the carry inputs |
| `tb_cpa` | against a 17-bit sum |
| `tb_csa_linear_array*` (4 benches) | 3 to 33 operands, 8 to 64 bits: bit-exact against the model and the modular sum; adder and zero-input counts |
| `tb_pipelined_csa_tree` | 5 to 128 operands, 2 and 3 stages: exact latency, bubbles, back-to-back sets, reset flush |
| `tb_mlcsa_top` | both `STRUCTURAL` settings on the same stimulus; counts wrap-around, non-zero carry words, CPA carry propagation, bursts, bubbles and reset flushes, and fails if any never happened |
| `tb_mlcsa_top_full` | the top at its default parameters, fixed and random operand sets |
| `tb_workload_sweep` | word-level forms from 4 to 128 operands at 16 to 128 bits; adder-level forms from 4 to 33 operands at 16 to 64 bits |

Running a bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/csa_pkg.sv tb/tb_ref_pkg.sv tb/tb_mlcsa_top.sv --top-module tb_mlcsa_top
./obj_dir/Vtb_mlcsa_top
```

The adder-level forms (`*_cpa`, `*_tern`) describe every bit of every
diagonal separately. Their Verilator models grow quickly with the number of
rows: beyond a few dozen operands the C++ compilation takes minutes. To
check a large configuration quickly, simulate the bit-identical full-adder
forms (`STRUCTURAL = 1` in the top), which build quickly at any size.

Lint notes:

* Verilator reports unused upper bits of the diagonal adders' results. These
  are carries that are dropped at bit N-1 on purpose.
* It also reports the open `cout` pins in the top.
