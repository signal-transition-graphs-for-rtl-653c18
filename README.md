# Self-timed dual-rail AND2 cells with the handshake built in

These cells compute a logic function with no clock and no registers. Each
bit travels on two wires (dual-rail). Each cell produces its own
acknowledgement, so cells can be wired into a pipeline or a tree directly
and every control decision stays local. All gates are NCL
(Null Convention Logic) threshold gates, which hold their state.

The function here is the 2-input AND. It is small enough to show the whole
design method, and it already shows the two ways of *indicating* inputs:

* **Strong (AND) causality.** The result waits for both operands. This
  gives `and2_v1`, its SR-latch variant `and2_v1_srl`, and the reference
  cell `and2_cd`.
* **Weak (OR) causality, or early evaluation.** A single 0 operand decides
  the result, so `y = 0` can leave before the other operand arrives. The
  acknowledgement still waits for both operands. This gives `and2_v2`.

`ncl_and_top` connects three of the cells into a registerless 4-input AND
network. It also holds the reference cell and one TH23w2 gate, each with its
own pins.

## Signalling

### Dual-rail code

| value  | `d1` | `d0` |
|--------|------|------|
| 0      | 0    | 1    |
| 1      | 1    | 0    |
| spacer | 0    | 0    |

The code `11` is illegal. `ncl_pkg::dr_t` is the packed struct `{d1, d0}`.
It comes with the helpers `dr_encode`, `dr_is_data`, `dr_is_spacer` and
`dr_is_illegal`.

### Handshake of one cell

Each cell has two handshakes:

* an input handshake with its senders: the data `a` and `b` go in, and
  `ack_ab` (called Aab below) comes back;
* an output handshake with its receiver: the data `y` goes out, and `ack_y`
  (called Ay below) comes back.

An acknowledgement at 1 means "ready for data". At 0 it means "data taken,
return to spacer". One token moves through these four phases:

1. Ay = 1, and `a` and `b` arrive in any order, with any delay. Then `y`
   becomes valid.
2. Aab falls. The senders may now return `a` and `b` to the spacer.
3. The receiver drops Ay after it has seen `y`. Once `a` and `b` are spacer
   and Ay = 0, `y` returns to the spacer.
4. Aab rises, and the next token may start.

A correct cell must never lower Aab before both operands are data. It must
never raise Aab before both are back at spacer. Otherwise a sender could
change a wire that the cell has not yet seen. This rule is what makes the
delays of the wires between modules arbitrary. Inside a cell, some forks
remain delay-sensitive (see *Garbage transitions* below).

## NCL gates as generalized C-elements

Every state-holding gate has the form

    y = S(x) | y & !R(x),    R(x) = "all inputs are 0"

S is a monotone *set* function. The gate goes to 1 when S holds, to 0 when
all inputs have returned to the spacer, and holds its value in between. This
hysteresis is what lets a gate wait for a whole phase to finish. The RTL
writes each gate as a level-sensitive latch: `always_latch`, with enable
`S | R` and data `S`.

| module      | set function S       | used for                                          |
|-------------|----------------------|---------------------------------------------------|
| `c_element` | AND of N inputs      | Muller C-element (THnn)                           |
| `th_and0`   | AB + BC + AD         | x = a0·b0 + a0·b1 + a1·b0 in `and2_v1`            |
| `th24comp`  | (A + B)·(C + D)      | completion of two dual-rail bits in `and2_v1_srl` |
| `th33w2`    | A·(B + C)            | early-evaluating y0 = Ay·(a0 + b0) in `and2_v2`   |
| `th23w2`    | A + B·C              | the template gate for the protocols below         |

Every gate has an active-high asynchronous `rst` and a `RESET_VALUE`
parameter (default 0). Real NCL libraries offer resettable gates in the same
way.

## The cells

All four cells have the same ports:
`rst, a, b (dr_t in), ack_ab (out), y (dr_t out), ack_y (in)`.

### `and2_v1`: strong indication

    x   = THand0(a0, a1, b0, b1)    // "the result is 0": both operands present, not both 1
    y0  = C(x, Ay)
    y1  = C(a1, b1, Ay)
    Aab = NOR(y0, y1)

No 4-input gate can compute y0 directly: Ay·(a0b0 + a0b1 + a1b0) has 5
variables. The operand part is therefore split off into `x`. Each gate fires
only after all of its causes have arrived, so `y` itself proves that both
operands arrived. Likewise, `y` returning to spacer proves that they left.
A single NOR of the output rails is then a correct acknowledgement.

### `and2_v1_srl`: the output rails as an SR latch

    cd  = TH24comp(a1, a0, b1, b0)  // both operands present
    w   = C(cd, Ay);   x = !w
    y0  = !(x | y1 | a1·b1)         // 0-arm, blocked when the result is 1
    y1  = !(x | y0 | a0 | b0)       // 1-arm, blocked when the result is 0
    Aab = NOR(y0, y1)

The cell does the same job as `and2_v1` with fewer transistors. A single
completion signal `w` says when a result may be produced. The operand values
only *block* the arm that must stay at 0. The cross-coupling then holds that
arm at 0 while the inputs return to the spacer. The only combinational loop
in the cells is this y0/y1 pair. It is the latch, and it is intended.

### `and2_v2`: early evaluation, weak indication

    y0  = TH33w2(Ay; a0, b0)        // Ay·(a0 + b0): any 0 operand suffices
    y1  = C(a1, b1, Ay)
    na  = NOR(a1, a0),  nb = NOR(b1, b0),  ny = NOR(y1, y0)
    Aab = C(na, nb, ny)             // resets to 1

`y0` can now rise after only one operand has arrived. That is lower forward
latency, but `y` no longer proves that both operands arrived. The
acknowledgement therefore watches the operands directly. Aab falls only
when both operands and the result are data. It rises only when all three
are spacer. The late operand goes *unindicated* in the data phase and is
indicated in the spacer phase instead. This asymmetry is the point of the
variant.

The rule for y0 covers three cases (the scenarios of the derivation):

* both operands are 0, and one arrives first;
* one operand is 0 and the other is 1;
* both operands are 1, which only y1 can resolve.

### `and2_cd`: completion-detector reference cell

    r   = C(a1|a0, b1|b0, Ay)
    y1  = C(a1·b1, r)
    y0  = C(a0|b0, r)
    Aab = NOR(y0, y1)

This is the classic structure that `and2_v1_srl` improves on. It is kept for
comparison and to show garbage transitions.

### Garbage transitions

In `and2_cd`, `r` rises and falls in every token. Only one of the two output
C-elements then fires. The other one sees `r+` and later `r-` with no output
change of its own. This is a *garbage* branch of that gate's protocol. It is
correct under the 4-phase protocol. However, the wire from the fork of `r` to
that gate must not be slower than the path through the other gate, the
acknowledgement and the environment back to `r-`. The same holds wherever a
gate sees an input rise and fall without firing. Such forks are the places
where these cells are not delay-insensitive.

## Gate protocols: TH23w2 as an example

The top brings one TH23w2 gate (F = A + BC) out to pins, so that its
protocols can be exercised.

* **Full indication.** Each product term is a branch whose inputs all rise
  before F+ and all fall before F-. The branches are `A+;F+;A-;F-` and
  `(B+|C+);F+;(B-|C-);F-`. There are also the garbage branches `B+;B-` and
  `C+;C-`, in which F must not move.
* **Incomplete indication.** After a complete set of causes (A, or both B
  and C), the remaining inputs may still rise, in any order, concurrently
  with F+. All inputs are reset before F-. This is the weak causality that
  `and2_v2` uses in y0.

## The network, `ncl_and_top`

       a,b -> [M1 and2_v2    ] --m1--\
                                      [M3 and2_v1] --y--> (ack_y)
       c,d -> [M2 and2_v1_srl] --m2--/
                ^       ^                 |
                +-------+---- ack_m ------+

M3's acknowledgement `ack_m` is forked to the Ay inputs of both M1 and M2.
The output is y = a·b·c·d. The senders of (a,b) and of (c,d) are
acknowledged separately, by `ack_ab` and `ack_cd`. `and2_cd` (operands
`e`, `f`; result `z`) and the TH23w2 gate (`th_a`, `th_b`, `th_c`, `th_y`)
sit beside the network. The top has no parameters.

Lint reports circular logic through `m2` and `ack_m`. That loop is the
handshake between M2 and M3, closed through state-holding gates. Synthesis
reports latches: one per state-holding gate. Both are inherent to this kind
of circuit.

## How far to trust the RTL

* **Timing model.** The RTL has zero-delay gates. Simulation shows that the
  logic and the handshakes are correct for every order in which the
  environment's wires change. Each environment wire gets its own random
  delay, and one operand is sometimes held back by 40 time units. The
  simulation does not model delays inside a cell. It therefore cannot show
  hazards caused by slow internal forks (see *Garbage transitions*). It also
  cannot measure the latency difference between the variants.
* **Synthesis.** The gates map to latches plus logic, and the SR latch to a
  loop. A standard-cell flow will not guarantee glitch-free latch enables or
  fork timing. A real implementation should map each module onto NCL
  threshold gates, or onto custom C-elements, and keep the netlist as
  written.
* **Transistor counts.** The derivation quotes at least 46 transistors for
  `and2_v1`, 42 for `and2_v1_srl` and 50 for `and2_v2`, all in static CMOS.
  These depend on the cell library and are not something the RTL can
  reproduce.

## Choices made in this RTL

* The gates of `and2_cd` are the simplest reading of its described
  behaviour: p = a1·b1, q = a0 + b0, and Aab = NOR(y0, y1).
* In `and2_v1_srl`, the arm functions of the latch are this RTL's own choice.
  So is the placement of the completion C-element before the inverter that
  drives the latch.
* The gate of x in `and2_v1` is identified as THand0 from its set function.
* The resets and `RESET_VALUE` are additions. `and2_v2`'s acknowledgement
  resets to 1, so each cell starts out ready.
* The output assertions in the cells are additions. Each asserts that `y` is
  never `11` (`assert final`).
* Which cell sits where in the network, and the stand-alone gates in the
  top, are choices made for demonstration and test.

## Simulating

Each testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog against a stalled
handshake. Build and run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ncl_and_top \
        -y rtl -y tb +libext+.sv rtl/ncl_pkg.sv tb/tb_ncl_pkg.sv tb/tb_ncl_and_top.sv
    ./obj_dir/Vtb_ncl_and_top

| testbench          | what it does                                                                                    |
|--------------------|-------------------------------------------------------------------------------------------------|
| `tb_c_element`, `tb_th*` | random vectors against a reference gC model, both reset values, hysteresis coverage       |
| `tb_and2_*`        | 400 tokens through `dr_sender` / `dr_receiver`; value, handshake and early-evaluation checks    |
| `tb_ncl_and_top`   | 600 tokens on each path and 600 TH23w2 protocol runs; counts every mechanism and fails if one never occurs |

`dr_sender` and `dr_receiver` in `tb/` model the environment. They can be
reused for new cells. Derive the operand values with
`tb_ncl_pkg::token_bit(seed, k, i)`, so that the checker needs no queue.
Keep every environment delay at 1 time unit or more. A zero delay between
two wire changes (`#0`) can make Verilator skip re-evaluating a latch.

## Files

* `rtl/ncl_pkg.sv`: dual-rail type and helpers.
* `rtl/c_element.sv`, `rtl/th_and0.sv`, `rtl/th24comp.sv`,
  `rtl/th33w2.sv`, `rtl/th23w2.sv`: the NCL gates.
* `rtl/and2_v1.sv`, `rtl/and2_v1_srl.sv`, `rtl/and2_v2.sv`,
  `rtl/and2_cd.sv`: the AND2 cells.
* `rtl/ncl_and_top.sv`: the network.
* `tb/`: testbenches, environment models and `tb_ncl_pkg`.
