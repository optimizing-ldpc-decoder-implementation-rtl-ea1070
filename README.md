# Fully parallel min-sum LDPC decoder for a (10,5) code

This is a soft-decision LDPC decoder written for a small FPGA. It takes ten
received log-likelihood ratios (LLRs) and returns the ten-bit code word the
min-sum algorithm decides on. It also returns the five message bits, the
number of iterations used and whether the result satisfies every parity check.

Every check node and every variable node has its own hardware. Each of the
five iterations also has its own copy of that hardware. A word is therefore
decoded in one pass through combinational logic, with no state machine and no
message memory. A single register bank in front of the decoder holds the input
word. This follows a published FPGA study that built the same decoder with no
registers at all (a MATLAB-generated version and a hand-written VHDL
version). The RTL here is a new SystemVerilog implementation of that
architecture, not a translation of either version.

## The code

The parity-check matrix has 5 rows (check nodes C1..C5) and 10 columns
(variable nodes, or bits, V1..V10):

```
      V1 V2 V3 V4 V5 V6 V7 V8 V9 V10
C1  [ 0  1  0  0  0  1  0  0  0  0 ]
C2  [ 1  0  0  0  0  0  1  0  0  0 ]
C3  [ 0  0  0  0  1  0  0  1  0  0 ]
C4  [ 0  0  0  1  0  0  0  0  1  0 ]
C5  [ 0  0  1  0  0  0  0  0  0  1 ]
```

The matrix is regular, with two ones per row and one per column. It has ten
Tanner-graph edges. The RTL numbers the edges row by row: e0 = C1-V2,
e1 = C1-V6, e2 = C2-V1, e3 = C2-V7, e4 = C3-V5, e5 = C3-V8, e6 = C4-V4,
e7 = C4-V9, e8 = C5-V3, e9 = C5-V10. Every message bus in the design is an
array indexed by this edge number. The check-node outputs are named Lr<check>_<bit> in
the original design (Lr1_2, Lr1_6, Lr2_1, ...), and they come out in this
same order.

Each row pairs one of bits 1..5 with one of bits 6..10. Bits 1..5 can
therefore serve as the message and bits 6..10 as the parity. A valid code
word has V6 = V2, V7 = V1, V8 = V5, V9 = V4 and V10 = V3. The `msg` output is
bits 1..5 of the decided word.

`rtl/ldpc_pkg.sv` holds the matrix. Its constant functions (`row_deg`,
`row_start`, `col_deg`, `col_edge`, `edge_var`) derive all the wiring from it
during elaboration.

## One min-sum iteration

LLRs are signed fixed-point numbers, log P(bit=0)/P(bit=1). A positive value
favours 0. An iteration has two halves. Their module names follow the original
design.

**`horizontal_setup`: check-node update.** It has one `cn_unit` per row. A
check node sends each of its edges a message R. The sign of R is the product
of the signs of the Q messages on its other edges. The magnitude of R is the
smallest magnitude among those other edges. In one pass, `cn_unit` finds:

- the smallest magnitude, min1;
- the second smallest, min2;
- the edge that holds min1.

That edge receives min2 and every other edge receives min1. XOR-ing all
incoming signs and then removing the edge's own sign gives the output sign.
The unit is written for any degree `DC`. In this code every check has degree 2,
so each check simply passes each bit's message on to its partner bit.

**`vertical_setup`: variable-node update and decision.** It has one `vn_unit`
per column and one `bit_decision`. A variable node computes its reliability
y = LLR + (sum of the R messages of all its checks). For each edge, it returns
Q = y − R of that edge, which is the LLR plus the other checks' messages.
`bit_decision` sets bit z = 1 where y ≤ 0 and z = 0 where y > 0. `vhat` is
the complement of z (see below).

**`syndrome_check`** computes H·zᵀ. Each syndrome bit is the XOR of the two
bits its row selects. `parity_ok` is high when all five syndrome bits are zero.

## Unrolled iterations and early termination

`ldpc_min_sum_decoder` instantiates `IMAX` = 5 copies of the pair
horizontal_setup → vertical_setup in a chain:

```
rx ──► Q1 ─► [H] ─R1─► [V] ─Q2─► [H] ─R2─► [V] ─Q3─► ... ─► [V]
             (iter 1)   │ z1        (iter 2)  │ z2              │ z5
                        ▼                     ▼                 ▼
                    syndrome              syndrome          syndrome
                        └────── ok[0..4] ─► iteration_controller ─► sel, iter
```

Q1 is each edge's channel LLR. Every `vertical_setup` also gets the channel
LLRs directly. Each iteration's decided word goes through its own syndrome
check.

`iteration_controller` is the part that replaces an iteration counter. It
looks at the five parity results and picks the first iteration whose word is a
code word. If none is, it picks iteration 5. That iteration's word drives the
outputs, and its number (1..5) appears on `iter`. The effect is the same as a
sequential decoder that stops as soon as H·zᵀ = 0 or after five iterations.
The difference is that all five iterations always exist in hardware and
settle together.

Set the parameter `EARLY_STOP = 0` to always use iteration 5. Then `iter`
always reads 5.

**What this code does to the algorithm.** Each bit lies in exactly one check.
As a result:

- the variable-to-check message never changes from the channel LLR;
- every iteration produces the same result;
- the result after iteration 1 always satisfies every check, because both bits
  of a check get the same reliability, y = L_a + L_b.

So with early termination `iter` is always 1. The decoder in effect adds the
LLRs of each pair of repeated bits and decides on the sign of the sum. This
repairs a flipped bit when its partner is received more reliably. The
"maximum iterations reached without convergence" path can never happen with
this matrix. It is exercised only in the unit test of `iteration_controller`.
The RTL is written for general matrices (any row and column weights) so that
the iteration structure matters once H is changed.

`IMAX = 1` reduces the decoder to the single chain rx → horizontal_setup →
vertical_setup → decision. That is how the hand-written original is built,
and for this matrix it gives the same word as five iterations.

## Output polarity: `z` and `vhat`

The decision rule used here sets a bit to 1 where its reliability is zero or
negative. This is `z`. The published simulation of the MATLAB-generated
decoder shows a decoded word that is exactly the bitwise complement of that
rule applied to its inputs. That is the polarity you get if a positive LLR is
taken to mean 1. `vhat` gives that polarity. Both outputs are provided.

For all-zero syndromes the two are equivalent: every check here has an even
number of bits, so complementing a code word gives another code word.

## Clocked top: `ldpc_decoder_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | load `rx` into the LLR buffer on this clock edge |
| `rx[0..9]` | in | 10 × `W` signed | LLRs of bits 1..10 |
| `out_valid` | out | 1 | a word has been loaded; the outputs are its result |
| `z` | out | 10 | decided code word, `z[j]` = bit j+1, 1 where y ≤ 0 |
| `vhat` | out | 10 | complement of `z` |
| `msg` | out | 5 | message bits = `z[4:0]` |
| `iter` | out | 3 | iterations used, 1..5 |
| `parity_ok` | out | 1 | `z` satisfies every check |

Timing: the word on `rx` is captured on the rising edge where `in_valid` is
high. The results are valid after that edge and settle combinationally
through the five unrolled iterations. They stay valid until the next load,
so the latency is one clock. A new word can be loaded every cycle, as long as
the clock period covers the combinational path.

Two assertions are part of the top:

- `out_valid` follows every `in_valid`;
- `iter` stays in 1..IMAX.

`ldpc_min_sum_decoder` on its own is the register-free decoder. It has the
same data ports without the clock, reset and valid signals.

Parameters of both modules:

- `W` (default 16): LLR width.
- `IMAX` (default 5): the number of iterations.
- `EARLY_STOP` (default 1): see above.

## Arithmetic

- Messages Q and R are `W`-bit signed numbers. They are clipped to
  ±(2^(W−1) − 1). An input of −2^(W−1) is treated as −(2^(W−1) − 1), so a
  magnitude or a negation never overflows.
- The reliability y is not clipped. It is `W + clog2(DV_MAX+1)` bits wide
  (17 here).
- Min-sum only compares and adds, so the LLR scale does not matter. The
  published examples used a 14-bit format and a 16-bit format that differ by
  two fraction bits, and both decode to the same word.

## Where this RTL interprets or departs from the original

- **Registers.** The original reports zero registers, and `ldpc_min_sum_decoder`
  keeps that. Its architecture diagram also shows LLR buffers, so the top adds
  one 160-bit input register (`llr_buffer`) with a load strobe. The handshake
  and the reset are this design's own.
- **Iteration count.** The description says decoding stops when parity is
  satisfied. The published waveform reports 5 iterations for an input that is
  already a code word after one. The default follows the description.
  `EARLY_STOP = 0` reproduces the waveform.
- **Check-node rule.** The rule is the standard one: the edge holding min1
  gets min2. The original's formula states this condition imprecisely.
- **Variable-node rule.** Q = LLR + the other checks' R, as in the original's
  pseudocode.
- **Output width.** The hand-written original drives 16-bit `vHat` buses with
  only bit 0 used. Here `vhat` is one 10-bit word.
- **Saturation and message positions.** Both are this design's choices, as
  described above.
- **Internals of the two setup blocks.** They are built from the algorithm,
  not copied from the original's netlists.

## Size

A generic synthesis of `ldpc_decoder_top`, with word-level cells and no
FPGA mapping, gives:

- 1,593 cells, mostly 16- and 17-bit adders and comparators (five iterations ×
  (10 check-node magnitudes and comparisons + 10 variable-node sums));
- 161 flip-flops.

The register-free core alone is 1,582 cells. The top uses 193 pins. These
numbers are not comparable to vendor logic-element counts.

## Files

- `rtl/ldpc_pkg.sv`: matrix, sizes, edge-table functions.
- `rtl/cn_unit.sv`, `rtl/vn_unit.sv`, `rtl/bit_decision.sv`: node arithmetic.
- `rtl/horizontal_setup.sv`, `rtl/vertical_setup.sv`: one iteration's
  check-node half and variable-node half.
- `rtl/syndrome_check.sv`, `rtl/iteration_controller.sv`: parity test and
  iteration selection.
- `rtl/llr_buffer.sv`: input register.
- `rtl/ldpc_min_sum_decoder.sv`: the unrolled, register-free decoder.
- `rtl/ldpc_decoder_top.sv`: buffer + decoder.
- `tb/ldpc_ref_pkg.sv`: integer reference decoder. It is written
  independently, computes every check message by looping over the other
  edges, and lists the matrix as edge pairs.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_ldpc_full_size.sv`: the top at default parameters.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder_top.sv \
    --top-module tb_ldpc_decoder_top -Mdir obj
./obj/Vtb_ldpc_decoder_top
```

Replace `tb_ldpc_decoder_top` with any other testbench name. Each run takes
well under a second.

What is checked:

- **Units.** The check node is tested at degrees 2 and 4 with ties and extreme
  values. The variable node is tested at degrees 1 and 3. The decision,
  syndrome (all 1024 words) and iteration selection (all 32 patterns) are
  tested exhaustively. The buffer's load, hold and reset are checked, and the
  package's derived edge tables are compared with hand-written ones.
- **Published example.** Ten 14-bit LLRs decode with `W = 14` and
  `EARLY_STOP = 0` to `vhat` = 0101010010 (bit 1 first) with `iter` = 5, as
  published. The same LLRs in 16-bit form decode to the same word after one
  iteration at the default settings.
- **End to end** (`tb_ldpc_decoder_top`). 2,000 random messages are encoded,
  turned into noisy LLRs and loaded with random gaps. The results are compared
  with the reference decoder. The test counts early terminations, full
  five-iteration runs, corrected bits, clipped inputs, held results and
  recovered messages, and fails if any of them never occurs.
- **Full size** (`tb_ldpc_full_size`). The top is run with no parameter
  overrides on the published example and 1,000 random words.

## Changing the code

1. Edit `H`, `N_VAR`, `N_CHK`, `DC_MAX` and `DV_MAX` in `rtl/ldpc_pkg.sv`. The
   node instances, the edge wiring and the message widths follow
   automatically.
2. `msg` assumes that the first `N_VAR − N_CHK` bits are the message. Check
   this for a new matrix.
3. Adapt the testbenches: their reference model and expected values are
   written for the matrix above.
