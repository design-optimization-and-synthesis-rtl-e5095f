# Reversible binary decoders from Feynman and Fredkin gates

A binary decoder turns an n-bit select word into 2^n outputs, exactly one of
which is high. Built from ordinary AND and NOT gates it throws information away.
Every AND gate maps four input states onto two output states. Reversible logic
avoids that loss. Each gate is a bijection from its inputs to its outputs, so
the inputs can always be recovered from the outputs. The price is extra wiring:

- **constant inputs**: lines tied to 0 or 1 to feed the gates;
- **garbage outputs**: lines that carry no wanted result and exist only to keep
  the mapping reversible.

This RTL describes two reversible decoders at gate level:

1. a **2-to-4 decoder** built from one Feynman gate and two Fredkin gates. It
   needs 3 constant inputs, 5 lines and produces 1 garbage output;
2. a **general N-to-2^N decoder** built as a binary tree of 2^N - 1 Fredkin
   gates. It needs 2^N constant inputs and produces N garbage outputs. The
   default is N = 3, a 3-to-8 decoder.

Both are purely combinational. They have no clock, no reset and no registers.

## The two gates

**Feynman (controlled-NOT) gate**, `feynman_gate`: `P = A`, `Q = A xor B`.
If B is tied to 1, the gate yields A and its complement A'. The 2-to-4 decoder
uses it this way.

**Fredkin (controlled-swap) gate**, `fredkin_gate`: `P = A`, `Q = A'B + AC`,
`R = AB + A'C`. When the control A is 0, B and C pass straight through. When A
is 1 they swap. The gate is its own inverse, and it keeps the number of ones
unchanged.

Both decoders rely on one trick. Tie C to 0 and feed a partial product x into
B. The Fredkin gate then becomes a **1-to-2 splitter**:

    Q = A'.x      (x goes this way when the control is 0)
    R = A .x      (x goes this way when the control is 1)
    P = A         (copy of the control; becomes garbage at the end)

## The 2-to-4 decoder (`rev_decoder_2x4`)

Drawn as reversible lines (a control dot on a line, a swap marked by crosses):

    in1    --●-------------X-- out2     = in1 . in2'
    const1 --⊕-----X-------|-- out0     = in1'. in2'
    in2    --------●-------●-- go1      = in2     (garbage)
    const2 --------X-------|-- out1     = in1'. in2
    const3 ----------------X-- out3     = in1 . in2
    const1 = 1, const2 = const3 = 0

The Feynman gate turns `const1 = 1` into `in1'`. The first Fredkin gate is
controlled by in2. It splits `in1'` into out0 and out1. The second Fredkin
gate, also controlled by in2, splits `in1` into out2 and out3. The in2 line runs
through both Fredkin gates and leaves as the one garbage output. The in1 line
is used up: it ends as out2.

The output index is `{in1, in2}`, so **in1 is the most significant select
bit**. `out[k]` is 1 exactly when `{in1, in2} == k`.

Cost, counted on this netlist:

| | value |
|---|---|
| gates | 3 (1 Feynman, 2 Fredkin) |
| constant inputs | 3 (one 1, two 0) |
| lines | 5 |
| garbage outputs | 1 |
| quantum cost | 11 (Feynman 1 + 2 × Fredkin 5) |

The quantum costs of the two gates are the usual ones from the reversible-logic
literature. An all-Fredkin 2-to-4 decoder has quantum cost 15, 6 lines,
2 garbage outputs and 4 constants. This design saves one line, one garbage
output and one constant by making the first split with the cheaper Feynman gate.

## The general Fredkin-tree decoder (`rev_decoder_n`)

This is the part that takes the most care to read.

**Tree.** Every gate is a splitter as described above. The root gate has B tied
to 1 and is controlled by the most significant select bit `sel[N-1]`. Its two
outputs are `sel[N-1]'` and `sel[N-1]`. Stage L (L = 1 … N-1) has 2^L gates,
all controlled by `sel[N-1-L]`. Each of them splits one branch of the stage
before. After N stages there are 2^N leaves, and each leaf is one minterm of
`sel`.

**Numbering.** The gates are indexed as a heap:

- gate `h` (1 … 2^N-1) reads `node[h]` on its B input;
- it writes `node[2h]` (the Q output, control = 0) and `node[2h+1]` (the R
  output, control = 1);
- `node[1]` is the constant 1;
- `node[2^N + k]` is `out[k]`.

Going down the tree, each step left appends a 0 bit and each step right
appends a 1 bit. So `out[k]` is selected exactly when `sel == k`, with `sel[N-1]`
as the MSB. The stage of gate h is `$clog2(h+1) - 1`.

**Select lines and garbage.** Inside a stage, the select bit travels along one
line through all of the stage's gates: the P output of one gate drives the A
input of the next. The P output of the last gate in stage L is the garbage
output `garbage[N-1-L]`, so `garbage == sel`. Feeding the select bit to every
gate of a stage in parallel would be logically identical. The chained form
matches the line drawing of a reversible circuit, where every wire is used
exactly once.

For N = 3 the lines read like this (select bit names s2 = `sel[2]` … s0 = `sel[0]`):

    s2 --●----------------------------------- garbage[2]
    c1 --X---X-----------X------------------- out0
    c2 --X---|---X-------|-----------X------- out4
    s1 ------●---●-------|-----------|------- garbage[1]
    c3 ------X---|-------|-----X-----|------- out2
    c4 ----------X-------|-----|-----|---X--- out6
    s0 ------------------●-----●-----●---●--- garbage[0]
    c5 ------------------X-----|-----|---|--- out1
    c6 ------------------------X-----|---|--- out3
    c7 ------------------------------X---|--- out5
    c8 ----------------------------------X--- out7
    c1 = 1, c2 … c8 = 0

Cost for any N:

| | formula | N = 3 |
|---|---|---|
| Fredkin gates | 2^N - 1 | 7 |
| constant inputs | 2^N (one 1) | 8 |
| garbage outputs | N | 3 |
| lines | 2^N + N | 11 |
| quantum cost | 5 (2^N - 1) | 35 |

Setting N = 1 gives a single gate with inputs (s, 1, 0) and outputs
(s, s', s): a 1-to-2 decoder.

## Top level (`rev_decoder_top`)

The two decoders are independent circuits. The top level places them side by
side, each with its own ports:

| port | dir | width | meaning |
|---|---|---|---|
| `dec2_in1`, `dec2_in2` | in | 1, 1 | 2-to-4 select; in1 is the MSB |
| `dec2_out` | out | 4 | one-hot outputs |
| `dec2_go1` | out | 1 | garbage (= in2) |
| `decn_sel` | in | N | general decoder select |
| `decn_out` | out | 2^N | one-hot outputs |
| `decn_garbage` | out | N | garbage (= sel) |

Parameter `N` (default 3) sets the size of the general decoder.

## Where this RTL makes its own choices

- **Bit order.** The first stage of the tree is controlled by the MSB of the
  select word. This matches the reversible-circuit drawings of both decoders.
  A description that calls the first-stage input "In1" means the same
  circuit, with In1 as the MSB.
- **Control chaining.** Each select bit ripples through its stage's gates
  rather than fanning out, as explained above. The logic is the same either
  way.
- **Top level.** The two decoders are not connected to each other. Putting
  them in one module is only for convenience.
- **Not modelled.** Transistor-level realisations and their power
  consumption are not modelled. Neither is the quantum-circuit view of the
  gates. The RTL captures the Boolean function and the gate netlist only. A
  synthesis tool will map each Fredkin gate to two 2:1 multiplexers. Nothing in
  the RTL keeps the circuit reversible after synthesis.

## Files

`rtl/`

- `feynman_gate.sv`, `fredkin_gate.sv`: the two reversible gates
- `rev_decoder_2x4.sv`: the 2-to-4 decoder
- `rev_decoder_n.sv`: the general Fredkin-tree decoder (parameter `N`)
- `rev_decoder_top.sv`: both decoders side by side

`tb/` (every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`):

- `tb_feynman_gate.sv`, `tb_fredkin_gate.sv`: exhaustive tests. They check the
  gate equations, that the gate is reversible (all outputs distinct), that it
  is its own inverse (two gates in series), and that the Fredkin gate keeps
  the number of ones.
- `tb_rev_decoder_2x4.sv`: checks all four inputs against the minterm
  equations and the garbage output.
- `tb_rev_decoder_n.sv`: exhaustive tests at N = 1, 2, 3, 4 and 5. It checks
  that `out == 1 << sel` and `garbage == sel`.
- `tb_rev_decoder_top.sv`: the top level at its default size. It drives both
  decoders together through 32 cases and counts how often each output line was
  selected. A line that was never selected counts as a failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_rev_decoder_top tb/tb_rev_decoder_top.sv
    ./obj_dir/Vtb_rev_decoder_top

Replace the top module to run another testbench. Each run takes well under a
second.
