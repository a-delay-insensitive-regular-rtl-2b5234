# Expression-tree regular expression recognizers: tri-valued synchronous and delay-insensitive

This RTL recognizes a regular expression on a stream of characters. The hardware has the
shape of the expression's parse tree: one small cell per character and per operator, so the
area grows linearly with the length of the expression. It implements the recognizer from the
paper "A delay insensitive regular expression recognizer", in two forms:

* `sync_re_recognizer` is a clocked recognizer. It takes one character per clock cycle.
* `di_re_recognizer` is its self-timed, delay-insensitive version. It has no clock, and it
  takes one character per 4-phase handshake.

`re_recognizer_top` holds both, side by side, built from the same expression.

## The problem the design solves

In an expression-tree recognizer, each link between a cell and its parent carries two signals:

* **ENB** goes down towards the leaves. It says "a match of this subexpression may start
  now".
* **RES** goes up towards the root. It says "a match of this subexpression has just ended".

The only state is one bit per leaf. A leaf sets its bit when it was enabled and the input
character is its own character. The root's RES then says whether some string of the
language has been read since the root was enabled.

The Kleene star is the difficulty. The empty string matches instantly, so in the classic
two-valued cells a star's RES depends on its own ENB in the same cycle, and ENB depends on
RES. Within one clock cycle the signals can then have to walk the whole tree, depth first.
For example, in `(A*B*C*D*E*F*G*H*)*` the path runs from the last leaf, up through the root,
and back down. The cycle time is therefore O(N) in the size of the expression. The same
mutual dependence also makes a self-timed version deadlock-prone: neither direction can
announce that it is valid before the other does.

## Main idea: a third value for RES

In this design RES takes three values, ordered `0 < x < 1`:

| RES | meaning |
|-----|---------|
| 1   | a non-empty match ended, whatever ENB is in this cycle |
| x   | only the empty match is possible: the true value equals this cycle's ENB |
| 0   | no match |

With this encoding, every RES is computed from the RES values below it only. Every ENB is
computed from the ENB above it and the RES values below. So all signals settle after one
pass up the tree and one pass down. The critical path is proportional to the tree height,
not the tree size, and the star needs no second clock phase to break a loop.

The operator cells (`sync_*_cell`, with operand 2 on the left and operand 3 on the right):

| cell | RES1 (to parent) | ENB to operands |
|------|------------------|-----------------|
| union `+` | `MAX(RES2, RES3)` | `ENB2 = ENB3 = ENB1` |
| concatenation `;` | `RES3 == x ? RES2 : RES3` | `ENB2 = ENB1`, `ENB3 = (RES2 == x) ? ENB1 : RES2` |
| star `*` | `MAX(RES2, x)` | `ENB2 = ENB1 OR (RES2 == 1)` |

The leaf keeps the classic form: `state <= ENB AND (char == code)`, with `RES = state`
(only ever 0 or 1).

You can check any cell by replacing each x with the ENB of its own link: the result must
satisfy the classic two-valued equations. For example, in a concatenation, ENB3 must equal
RES2, and RES1 must equal RES3. The cell testbenches check exactly this, exhaustively.

### Using the root result

To start a recognition:

1. Clear every leaf.
2. Enable the root (`enb_root = 1`) in the first cycle only.
3. Present character k in cycle k.

During cycle i, the root result covers characters 1 to i−1. A string of the language ended
there if the root result is 1, or if it is x and the root is enabled in this cycle. The x
case can only be the empty string, at the first cycle. If you enable the root in later
cycles as well, a match may also start at each of those positions. The synchronous
recognizer computes this decision as `match`. On the self-timed side, the environment
computes it from `res_root` and the `enb_root` it supplied.

## Describing an expression: `re_pkg::node_t`

Both recognizers take the parse tree as a parameter: `TREE`, a packed array of `N_NODES`
entries of type `node_t` = {`op`, `left`, `right`, `ch`}. The rules:

* Node 0 is the root.
* Every child has a larger index than its parent.
* Union and concatenation use `left` (operand 2) and `right` (operand 3).
* A star uses `left` only.
* A leaf holds an 8-bit character code in `ch`.

The helpers `mk_leaf` and `mk_op` build entries. The default, `DEFAULT_TREE`, is
`(A*B*C*D*E*F*G*H*)*` with 24 nodes: a root star over a balanced tree of seven
concatenations, eight stars and eight leaves. The testbenches also use a second
expression, `(A;B + C*)* ; D* ; (E + F;G)` (in `tb_re_ref_pkg`), which exercises union
cells. Node indices must fit in 8 bits, so a tree has at most 256 nodes.

## The delay-insensitive recognizer

The synchronous recognizer is a Moore machine: its state is the leaf bits, and everything
else is combinational. The self-timed version replaces each part one for one.

### Encoding on rails

Every logical value travels one-hot on separate wires (rails), and all rails low means
"invalid":

* Each character bit and each ENB link uses two rails (`rail2_t`: `r0`, `r1`).
* Each RES link uses three rails (`rail3_t`: `r0`, `rx`, `r1`).

A link's wire count stays constant, so the linear layout of the tree is preserved.

### Gates

`c_element` is a Muller C gate. Its output rises when all inputs are 1, falls when all are
0, and holds otherwise. Each cell's logic is built by a mechanical procedure:

1. Write every output rail as an OR of minterms over the input rails, with no inverted
   literals.
2. Make each minterm a C gate.

An output rail then becomes valid only after all the inputs it depends on are valid. It
becomes invalid only after they are all invalid again, which is what a 4-phase circuit
needs.

The cells built this way are:

* `di_and` (four C gates, as the paper draws it).
* `di_union_cell` (9 C gates).
* `di_concat_cell` (9 + 6 C gates).
* `di_star_cell`: RES1 needs only wires and one OR. Its `r0` is tied low, because a star
  always accepts the empty string. ENB2 uses 6 C gates.

`di_decoder` does not use the procedure, which would be large. It uses one completion C gate
over the per-bit "valid" ORs, plus two C gates:

* `'1' = C(complete, AND of the rails that spell the code)`
* `'0' = C(complete, OR of the rails that contradict it)`

`di_leaf_cell` is a decoder followed by `di_and` with the leaf's ENB.

### The state register and the handshake

`si_register` holds one bit per leaf. Each bit is two `fifo_element`s in series, the
self-timed form of a master-slave flip-flop. A W-input C gate joins the input-side
acknowledges of all first elements into one `ack`. That `ack` is also the output-side
acknowledge of every second element. The result:

1. When every next-state bit is valid, the register keeps the values, raises `ack`, and
   turns its outputs invalid.
2. The invalid state then flows through the RES and ENB trees back to the register inputs.
3. When the environment also withdraws the character, every input turns invalid. `ack`
   falls and the outputs show the new state.

`fifo_element` is a one-bit dual-rail FIFO stage with 4-phase ports on both sides. It is
built from two Muller pipeline stages. This matters: the register is a ring, and with
single-stage elements the element that holds the present state would block the next state
from entering. The ring would deadlock.

Environment protocol for each character (`di_re_recognizer`):

1. Wait for `ack` = 0.
2. Drive every `ch` bit and `enb_root` valid.
3. Wait for `ack` = 1.
4. Drive them all invalid.
5. Wait for `ack` = 0.

`res_root` is invalid while `ack` is high. After `ack` falls, it becomes valid with the
result for all characters consumed so far. It is one-hot, so it signals by itself when it
is valid. This is the value the synchronous recognizer shows one cycle after the same
character.

Reset: hold `rst` high with all inputs invalid, then release it. During reset, the
register's outputs are invalid, so every C gate in the trees returns to 0. After release,
the cleared state (all leaves '0') moves to the outputs. The register must pass through
the invalid value: a direct valid-to-valid change would leave stale C gates set.

## Interfaces

`re_recognizer_top` (parameters `N_NODES`, `TREE`, `W` = 8):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock of the synchronous recognizer |
| `sync_rst` | in | 1 | synchronous reset, clears the leaf registers |
| `sync_enb_root` | in | 1 | ENB at the root |
| `sync_ch` | in | 8 | character of this cycle |
| `sync_res_root` | out | `tri_e` | RES at the root (0, x, 1) |
| `sync_match` | out | 1 | RES = 1, or RES = x and ENB root = 1 |
| `di_rst` | in | 1 | reset of the self-timed recognizer (level) |
| `di_ch` | in | `rail2_t[W]` | dual-rail character |
| `di_enb_root` | in | `rail2_t` | dual-rail ENB at the root |
| `di_res_root` | out | `rail3_t` | three-rail RES at the root |
| `di_ack` | out | 1 | handshake acknowledge |

The only flip-flops are the synchronous recognizer's leaf bits. The self-timed side is
C gates, which synthesize as latches. Lint reports combinational loops through the C gates
and the acknowledge ring. These loops are intended: they are the handshake.

## How far it is checked

Every module has its own self-checking testbench in `tb/`:

* **Operator cells (synchronous):** exhaustive, including the x-substitution test described
  above.
* **Self-timed cells, decoder and leaf:** every input value. The inputs are made valid and
  then invalid one at a time, in random orders. After each step the test checks that each
  output is invalid, valid with the right value, or held, as the 4-phase rules require.
* **`c_element`:** checked against a model.
* **`fifo_element`:** reset, decoupling of its two sides, and a 200-value stream with random
  delays.
* **`si_register`:** `ack` rises only after the last input is valid and falls only after
  the last is invalid. The outputs are invalid while `ack` is high, and the next state then
  appears.
* **Both recognizers:** random strings, half of them drawn from the language. Every position
  is compared with a reference model (`tb_re_ref_pkg`) that decides membership by dynamic
  programming over substrings, independently of the cell equations.
* **`tb_re_recognizer_top`:** runs both expressions through both recognizers and also
  compares them with each other. It counts each mechanism and fails if any never occurred:
  root x, 1 and 0; star re-enable; concatenation passing x up; concatenation forwarding its
  own ENB; union 1 and x; handshakes with an invalid result under `ack`.
* **`tb_re_full_size`:** runs the top at its default parameters.
* **`tb_re_example_walk`:** a directed test of the default expression after reading "H".
  This is the case with the longest settling path in two-valued cells. The test checks the
  RES and ENB value on every link of the tree: the RES values on the path from leaf H to
  the root are 1, the other stars give x, and every link is enabled through the root star.
* **`tb_di_re_recognizer` handshake check:** the character bits and the root enable become
  valid one at a time, and `ack` must wait for the last one.

Limits of this checking:

* Simulation is zero-delay and two-state. It shows that the self-timed circuits compute the
  right values and follow the handshake order under the evaluation orders the simulator
  picks. It does not prove delay insensitivity under all gate and wire delays.
* The O(height) settling time is the design's main speed claim. It follows from the
  structure (RES uses only RES from below), but no timing was measured.

## Where this RTL departs from or adds to the paper

* **Tree parameter:** the parameterised tree encoding, the 8-bit character width, the reset
  inputs and the `match` output are this design's choices.
* **`fifo_element` insides:** the paper gives only the element's ports and protocol. The
  two-stage construction is this design's.
* **Register reset:** resetting the self-timed register through the invalid value is this
  design's. The paper does not describe initialisation.
* **When to read the result:** the paper's environment reads the result when `ack` is
  asserted. In this circuit the result is invalid at that moment, because the register has
  already emptied its outputs. It is therefore read after `ack` falls.
* **Derived gate lists:** for the union and concatenation cells, and for the star's ENB
  logic, the gate lists come from the paper's minterm procedure. The paper draws the star
  with fewer C gates.
* **Decoder input rails:** the match and mismatch rail sets feeding the decoder's two
  output gates are chosen so that the output means "character equals code". The paper's
  4-bit drawing (code `0110`) shows the completion gate and the two output C gates;
  `tb_di_decoder` also runs that 4-bit case.
* **Not built:** the classic two-valued operator cells, which need a second clock phase to
  reset the star. They are the baseline that this design replaces.

## Simulating

All sources are plain SystemVerilog for Verilator 5. The packages come first. For example,
the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/re_pkg.sv tb/tb_re_ref_pkg.sv tb/tb_re_recognizer_top.sv \
    --top-module tb_re_recognizer_top
./obj_dir/Vtb_re_recognizer_top
```

Each testbench ends with one line `TB_RESULT checks=N failures=M`. To recognize another
expression, build a `node_t` array with `mk_leaf`/`mk_op` and pass it as `TREE` with its
length as `N_NODES`. The testbench generators pick characters from 'A' to 'I'.
