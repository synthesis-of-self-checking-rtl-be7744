# Self-checking microprogrammed controller with a reduced (m, n)-code

A microprogrammed controller drives a datapath through a wide output word.
Each bit is one *microoperation*, a control line that starts one action.
Most of these bits are 0 in any given microinstruction, and only a small set
of words is ever issued. Many physical faults corrupt such a word
*unidirectionally*: some 0s turn into 1s, or some 1s turn into 0s, never both
at once. This design finds any such error while the controller runs, and it
leaves the microoperation bits as they are.

The idea is to group microoperations that never appear together and add one
check bit per group. A Berger code adds a count of ones to the word. An
(m, n)-code re-encodes the whole word. This design does neither. Instead:

* The k microoperations y1..yk are split into m classes V1..Vm. The
  microoperations within one class are mutually *incompatible*: no
  microinstruction ever uses two of them together.
* Each class gets one control bit, ci = 1 exactly when the microinstruction
  uses no microoperation of Vi.
* The encoded word z = {c, y} (n = k + m bits) therefore holds exactly one 1
  in every extended class Zi = Vi ∪ {ci}, and exactly m ones in all.

Any unidirectional error changes the number of ones in at least one class
Zi away from 1. The checker therefore only has to test "exactly one of Zi is
1" for each class and AND the results. It needs more check bits than a Berger
or Smith code would. The payoff is a much smaller checker, because it is
built from small per-class 1-out-of-n functions and not from a counter and a
comparator.

## The worked example that the RTL is built for

The default parameters describe a controller with six microoperations, three
classes and ten microinstructions:

| word | y1 | y2 | y3 | y4 | y5 | y6 | c1 | c2 | c3 |
|------|----|----|----|----|----|----|----|----|----|
| Y0   | 0  | 0  | 0  | 0  | 0  | 0  | 1  | 1  | 1  |
| Y1   | 1  | 0  | 1  | 1  | 0  | 0  | 0  | 0  | 0  |
| Y2   | 0  | 1  | 0  | 1  | 0  | 0  | 0  | 1  | 0  |
| Y3   | 0  | 0  | 0  | 1  | 1  | 1  | 0  | 0  | 0  |
| Y4   | 1  | 0  | 0  | 0  | 0  | 1  | 0  | 0  | 1  |
| Y5   | 0  | 0  | 0  | 1  | 0  | 1  | 1  | 0  | 0  |
| Y6   | 0  | 0  | 1  | 1  | 0  | 0  | 1  | 0  | 0  |
| Y7   | 0  | 0  | 0  | 0  | 1  | 0  | 0  | 1  | 1  |
| Y8   | 0  | 0  | 1  | 0  | 0  | 0  | 1  | 0  | 1  |
| Y9   | 0  | 1  | 0  | 0  | 0  | 1  | 0  | 0  | 1  |

The classes are V1 = {y1, y2, y5}, V2 = {y3, y6} and V3 = {y4}. The bits are
numbered z1..z9 in the column order above, so the extended classes are
Z1 = {z1, z2, z5, z7}, Z2 = {z3, z6, z8} and Z3 = {z4, z9}. In the RTL, z_i
is bit i-1 of a packed vector: `z[5:0]` holds y6..y1 and `z[8:6]` holds
c3..c1. Every row of the table has exactly one 1 in each Zi.

## Two-rail (paraphase) signalling

The checker does not produce a single "ok" bit. A single stuck "ok" line would
hide every later error. It produces a pair r = (r1, r2) instead:

* 10 or 01 means the word is a code word;
* 00 or 11 means an error, either in the word or inside the checker itself.

`rmn_pkg::pp_t` is this pair, as a packed struct `{r1, r2}`.
`rmn_pkg::pp_ok()` returns r1 ^ r2. None of the checker logic uses
inverters, so a fault inside it can only push its output towards 00 or 11.

### 1-out-of-t in two-rail form (`paraphase_one_hot`)

The inputs of one class are split into two disjoint halves U1 and U2, and:

    r1 = F>=1(U1) | F>=2(U2)        F>=1 = OR of the set
    r2 = F>=1(U2) | F>=2(U1)        F>=2 = OR of all pairwise ANDs of the set

The output is 00 when no input is 1 and 11 when two or more inputs are 1. A
single 1 gives 10 if it lies in U1 and 01 if it lies in U2. The module takes
a whole word together with two constant masks: `MEMBER` chooses the bits of
the class and `IN_U2` chooses the bits placed in U2. All classes can
therefore be wired to the same word. For the example the splits are:

| class | U1       | U2       | r1                   | r2                  |
|-------|----------|----------|----------------------|---------------------|
| Z1    | z1, z2   | z5, z7   | z1 \| z2 \| z5·z7    | z1·z2 \| z5 \| z7   |
| Z2    | z3, z6   | z8       | z3 \| z6             | z3·z6 \| z8         |
| Z3    | z4       | z9       | z4                   | z9                  |

How the split is chosen has no effect on correctness. It sets the shape of
the circuit, and the best split makes the F>=2 terms cheap or empty. The
module's defaults are a stand-alone five-input example with U1 = {u1, u2} and
U2 = {u3, u4, u5}.

### Two-rail conjunction (`paraphase_and`)

    p1 = a1·b1 | a2·b2,     p2 = a1·b2 | a2·b1

The output is valid exactly when both inputs are valid. When both are valid,
p is 10 if the inputs carry the same rail value and 01 if they do not. A 00
input always gives 00, and 11 with a valid input or with 11 gives 11. An
error on either side therefore reaches the output.

### The checker (`rmn_checker`)

There is one `paraphase_one_hot` per class. They are chained by `m-1`
`paraphase_and` cells: class 1 with class 2, then that result with class 3,
and so on. For the example this comes out as

    p1 = z1|z2|z5z7   p2 = z1z2|z5|z7   p3 = z3|z6   p4 = z3z6|z8
    r1 = p1p3z4 | p2p4z4 | p1p4z9 | p2p3z9
    r2 = p1p3z9 | p2p4z9 | p1p4z4 | p2p3z4

The partition (`CLASS_MASK`, one N-bit mask per class) and the splits
(`U2_MASK`) are parameters, so any controller can be checked once its classes
are known. With `M = 1`, where every microoperation is incompatible with
every other, the checker is a single 1-out-of-(k+1) cell with no
conjunction.

## Encoder and controller

`rmn_encoder` computes ci = NOR(y & V_MASK[i]), one control bit per class of
microoperations.

`rmn_controller` is the controller's output stage. It holds a microinstruction
memory of the data bits (`MI_TABLE`, entry j = Yj), read by `mi_addr`. The
control bits come from the encoder, which is fed by a *second* read of the
memory at the same address and never by the y outputs. This matters: if c
were computed from the y lines, a stuck y line would pull its control bit
along with it, and the word would stay a valid code word. In silicon the
control bits are simply extra outputs of the controller's output logic. Both
y and c are registered:

* `mi_valid` with `mi_addr` in cycle t puts Yj on `y`/`c` in cycle t+1, and
  raises `out_valid` for that cycle;
* with `mi_valid` low the word is held;
* addresses at or beyond `NUM_MI` read Y0;
* the asynchronous active-low reset `rst_n` loads Y0 (y = 0, c = all ones),
  which is itself a code word.

The next-address logic (the microprogram sequencer) is not part of this RTL.
Its address arrives on `mi_addr`.

## Top level (`sc_controller_top`)

The top connects the controller to the checker at the worked-example size
(6 + 3 bits, 10 microinstructions, 4-bit address). It brings out `y`, `c`,
`out_valid`, the checker pair `r` and `error = (r1 == r2)`. The checker is
combinational on the registered output lines, so `r` and `error` belong to
the same cycle as the word.

`inj_sa0` and `inj_sa1` (9 bits each, bit i-1 = z_i) force output lines to 0
or 1 after the controller registers, as a stuck-at fault would. The checker
and the outside both see the forced lines. These ports exist for testing.
Tie them to zero in use.

## Cost

If the microoperation classes have k1..km members, a 4-input-LUT
implementation of the checker costs roughly

    H = 2 · ( Σ ceil((ki - 1) / 2) + m - 1 )   LUTs,   k + m - 2 <= H <= k + 2m - 1

For the example (k1, k2, k3 = 3, 2, 1) this gives H = 8. The cost grows with k and not
with the number of microinstructions. Published mapping results for standard
FSM benchmarks put the saving over Berger- or Smith-coded designs at about
30 % on average, and near 50 % for the larger controllers. In exchange the
controller needs more extra outputs: m, against about log2(k+1) for a Berger
code. The RTL does not contain those benchmark controllers. Only their
results are known, not their output words.

## Verification

Each testbench in `tb/` checks its results against values worked out
independently, and ends with a line `TB_RESULT checks=N failures=F`.

| testbench | what it shows |
|-----------|---------------|
| `tb_paraphase_and` | all 16 input pairs against the two-rail rules |
| `tb_paraphase_one_hot` | all 32 inputs against the counting rule and the sum-of-products; a masked 9-bit class |
| `tb_rmn_checker` | all 512 words; closed-form r1/r2; every unidirectional error (630 raising, 70 dropping) of every code word is flagged; the m = 1 and m = k partitions |
| `tb_checker_self_test` | checker rebuilt from its cells with stuck-at faults on every rail between cells and on every input: each of 38 faults shows on some code word, and none gives a wrong valid answer |
| `tb_rmn_encoder` | control bits of Y0..Y9 and of all 64 data words |
| `tb_rmn_controller` | reset word, one-cycle latency, hold, out-of-range addresses |
| `tb_sc_controller_top` | end to end at the default size: every word fault-free, under every single stuck-at-0/1 line and under random multi-line stuck-at sets; each case (accepted, masked, 1→0, 0→1, multi-bit, out-of-range, reset) must occur |

Simulate with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl rtl/rmn_pkg.sv \
        tb/tb_sc_controller_top.sv --top-module tb_sc_controller_top -y rtl
    ./obj_dir/Vtb_sc_controller_top

Each simulation takes well under a second.

## Limits and choices of this implementation

* Only unidirectional errors are guaranteed to be caught. A bidirectional
  error can leave a code word (for example y1 falling and y2 rising in Y1).
  This is inherent to the code.
* The self-test covers the lines between the checker's cells. It does not
  cover single gates inside a 1-out-of-n cell. An F>=2 product such as z5·z7
  is never 1 on a code word, so a stuck-at-0 on that gate alone cannot be
  exercised by code words. It also cannot cause a wrong answer.
* Register timing, reset, out-of-range addresses, the fault-injection ports
  and the single `error` flag are choices of this design.
* The microprogram sequencer is not included. No algorithm is included for
  finding a good partition into classes: the partition is a parameter.
* The order in which the class results are combined (a linear chain, class 1
  first) is one of several valid choices. It is the one that gives the
  closed-form equations above.
