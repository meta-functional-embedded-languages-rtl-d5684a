# Flash: a hardware compiler for a tiny control language, and the observer circuits that check it

This RTL compiles programs in **Flash** into synchronous circuits. Flash is a small imperative
control language: skip, shout, wait a cycle, sequence, if-then-else, fork-join and while.
The RTL also contains the **observer circuits** that check the compiler. Each observer watches an
interface and keeps its single output high while a safety property holds. The central
property is "a program never finishes unless it was started". To show that it holds for *every*
program, not only one, each language construct is checked once. The construct is compiled with its
sub-programs left as free "holes". Then the observer on the construct's outer interface must hold
whenever the same observer has held on every hole, from time zero until now. That is structural
induction over the program syntax, with temporal induction on top.

Besides the compiler and its induction cases, the RTL holds:

* the history circuits the properties are built from: *sometimes*, *always*, *never*, *once*;
* two small example circuits with an observer: a gate-level multiplexer and a one-bit set register;
* the observers for six control-path invariants of compiled **Esterel** programs. Esterel
  circuits use two, or experimentally three, finish wires.

Everything is single-bit control logic. All storage elements are one-bit registers with a defined
initial value.

## 1. The circuit interface of a Flash program

Every compiled program, and every compiled sub-program, has the same three wires:

| wire     | dir | meaning |
|----------|-----|---------|
| `start`  | in  | one-cycle pulse: begin executing now |
| `shout`  | out | the program's only output; high in a cycle where a `Shout` executes |
| `finish` | out | one-cycle pulse: the program terminates in this cycle |

Time is counted in clock cycles. `Skip` and `Shout` take no time: they finish in the cycle they
start. `Delay` takes exactly one cycle. Everything else takes the time of its parts. Conditions
(`w`, `v`, ...) are plain input signals. They are sampled in the cycle in which control reaches them.

## 2. Compilation schemes

Each construct becomes a small block of gates. Its sub-programs `P` and `Q` are wired in as
*holes*: the block drives each hole's `start` and receives the hole's `shout` and `finish`.

| construct | module | circuit |
|-----------|--------|---------|
| `Skip` | inside `flash_node` | `shout = 0`, `finish = start` |
| `Shout` | inside `flash_node` | `shout = start`, `finish = start` |
| `Delay` | `flash_delay` | `finish` = `start` one cycle earlier (register, reset low), `shout = 0` |
| `Sequential P Q` | `flash_seq` | `P.start = start`, `Q.start = P.finish`, `finish = Q.finish`, `shout = P.shout | Q.shout` |
| `IfThenElse c P Q` | `flash_ite` | `P.start = start & c`, `Q.start = start & !c`, `shout` and `finish` are ORs of the branches |
| `Parallel P Q` | `flash_par` + `flash_sync` | both branches start together, `shout` is the OR, `finish` comes from the synchroniser |
| `While c P` | `flash_while` | `enter = start | P.finish`; `P.start = enter & c`; `finish = enter & !c`; `shout = P.shout` |

**The synchroniser** (`flash_sync`) is the only block with state besides `Delay`. Each branch
has a one-bit "finished, waiting" flag. The join fires in the first cycle in which both branches
are done, whether they finished now or are waiting. Both flags clear when it fires. Two branches
finishing in the same cycle join immediately. A branch that finishes *again* while its flag is
already set is absorbed, because one pulse on one wire stands for one termination. This is how a
finish gets lost when a loop restarts a block during the cycle the block is finishing (section 6).

## 3. The compiler: a recursive parametrised module

`flash_node` *is* the compiler. The program is a parameter: a packed array of `flash_node_t`
records (`flash_pkg`). Element 0 is the root. Each record holds:

| field | meaning |
|-------|---------|
| `op`  | `F_SKIP`, `F_SHOUT`, `F_DELAY`, `F_SEQ`, `F_ITE`, `F_PAR`, `F_WHILE` |
| `a`   | index of the first sub-program (Seq first, ITE then-branch, Par left, While body) |
| `b`   | index of the second sub-program (Seq second, ITE else-branch, Par right) |
| `c`   | index of the condition (ITE, While) into the condition vector; **0 is constant high** |

An instance compiles node `IDX`. It picks the scheme for `op` and instantiates itself once per
sub-program, with `IDX` set to the child's index. Elaboration thus produces exactly the circuit
that applying the schemes recursively would produce. A `DEPTH` parameter stops elaboration with
an error if the array is not a tree. The current widths allow 256 nodes and 16 condition indices (the constant plus 15 inputs).

`flash_program` wraps the root. It prepends the constant-high condition, so the program's own
conditions `cond[0..NCOND-1]` are condition indices `1..NCOND`. To write a program, list the nodes
with the `mk()` helper. The concatenation puts the highest index first:

```systemverilog
import flash_pkg::*;
// While w (Sequential Delay (Parallel (IfThenElse v Shout Skip) Delay))   -- the default
localparam flash_node_t [7:0] PROG = {
  mk(F_DELAY),          // 7
  mk(F_SKIP),           // 6
  mk(F_SHOUT),          // 5
  mk(F_ITE, 5, 6, 2),   // 4: IfThenElse v(=cond[1]) 5 6
  mk(F_PAR, 4, 7),      // 3
  mk(F_DELAY),          // 2
  mk(F_SEQ, 2, 3),      // 1
  mk(F_WHILE, 1, 0, 1)  // 0: While w(=cond[0]) 1
};
flash_program #(.NODES(8), .NCOND(2), .PROG(PROG)) u (...);
```

The default program behaves as follows. Each loop entry with `w` high starts an iteration. The
iteration shouts one cycle later if `v` is high then, and re-enters the loop two cycles after its
own entry. An entry with `w` low finishes the program in that same cycle. Every iteration makes
the synchroniser hold the left branch's finish for one cycle.

## 4. Observers and history circuits

`shade_temporal` gives five histories of one signal. Each includes the current cycle.

* `sometimes`: high at least once. Built as `x | reg(sometimes)`, with the register starting low.
* `always_true`: high in every cycle. Built as `x & reg(always_true)`, with the register starting high.
* `never`: never high.
* `once`: high exactly once so far.
* `at_most_once`: high at most once so far.

All outputs respond in the same cycle as `x`. `rst_n` starts a fresh history.

`obs_flash_started` is the central property: `ok = !finish | sometimes(start)`.
`obs_mux` checks a multiplexer: `ok = (a == b) -> (o == a)`.

An observer proves a property once a model checker shows that its output is constantly high over
all inputs. Here the testbenches *simulate* the observers with random inputs and directed traces.
That is evidence, not proof.

## 5. Induction cases: naive and temporal

`flash_induction_case #(OP, TEMPORAL)` is the circuit a model checker gets for one construct.
It contains:

1. the construct `OP`, compiled with empty sub-programs. The holes' `shout`/`finish` are
   **free inputs**, and the holes' `start` are outputs;
2. `obs_flash_started` on the outer interface (`outer_ok`) and on each hole (`p_ok`, `q_ok`);
3. the output `ok = hypothesis -> outer_ok`, where the hypothesis is
   * `TEMPORAL = 0` (naive): `p_ok & q_ok` in the current cycle;
   * `TEMPORAL = 1` (temporal): `always(p_ok & q_ok)`, meaning the holes have behaved in every
     cycle so far.

Constructs without holes (`Skip`, `Shout`, `Delay`) have `ok = outer_ok`.

**Why the naive form is too strong.** Take `Sequential P Q`, with no start at all:

| cycle | start | P.finish | P ok | Q.start | Q.finish | Q ok | finish | outer ok | naive ok | temporal ok |
|-------|-------|----------|------|---------|----------|------|--------|----------|----------|-------------|
| 1     | 0     | 1        | 0    | 1       | 0        | 1    | 0      | 1        | 1        | 1           |
| 2     | 0     | 0        | 1    | 0       | 1        | 1    | 1      | 0        | **0**    | 1           |

`P` finishes without a start in cycle 1, which breaks its own observer. That finish starts `Q`,
which then correctly finishes in cycle 2. The outer block has now finished without ever starting,
but in cycle 2 both holes satisfy their observers, so the naive case fails. The temporal form
remembers that `P` misbehaved and releases the outer block from its obligation.
`tb_flash_induction_case` drives exactly this trace and checks every column.

**The While case needs one more assumption.** With a completely free body, the temporal While case
can be broken. The body "finishes" while `cond` is high, which restarts the body in the same
cycle. So the body's own observer sees a start and stays high. Later the body finishes again with
`cond` low, and the loop finishes without ever having been started. The testbench shows this
violation. It proves the While case only for bodies that finish strictly after an earlier start,
which matches the rule in section 6 that a loop body must take at least one cycle. The other six
cases hold with fully random holes.

## 6. Loops whose body takes no time, and lost finishes

`While` feeds the body's `finish` straight back into the body's `start`. If the body can finish in
the cycle it starts (for example, it contains a `Skip` branch reachable in that cycle), the
compiled circuit has a **combinational cycle**. A simple case is
`While high (Parallel (IfThenElse w Delay Skip, Delay))`, with `w` low while the left branch
waits. The Parallel's finish then depends on itself through the Skip branch. Both "finish now and
restart" and "keep waiting" are consistent solutions, so the circuit has no defined behaviour in
two-valued logic. That program is therefore *not* the default. Keep at least one `Delay` on every
path from a loop body's start to its finish. The default program does this, and none of the
compiled default circuit is cyclic.

The same example shows the *lost finish*. Restart the loop in the cycle the left branch finishes,
and let the else branch (Skip) finish immediately. Then two terminations fall on one wire in one
cycle, and one of them disappears: the synchroniser keeps waiting for a finish that already
happened. Esterel compilers avoid this by giving each block a second finish wire, which is what
the Esterel observers below check.

## 7. Esterel control-path observers

`esterel_observers` watches a compiled Esterel program with interface `go`, `e`, `f1`, `f2`,
`f3`. `(f1,f2) = (0,0)` means no finish in this cycle, `(1,0)` means one finish and `(1,1)` means
two finishes. `f3` is a hypothetical third wire. Outputs:

| output | invariant |
|--------|-----------|
| `inv1` | `f2 -> f1`: the encoding `(0,1)` never occurs |
| `inv2` | `never(go) -> !(f1 | f2)`: no start, no finish |
| `inv3` | `once(go) -> never(f2) & (never(f1) | once(f1))`: one start gives at most one finish |
| `inv4` | `always(used_well) -> (f1 -> go | was_running) & (f2 -> go & was_running)` |
| `inv5` | `always(used_well) -> (f2 -> f2 was low in the previous cycle)` |
| `inv6` | `always(used_well) -> !f3`: the third wire is never needed |

The invariants themselves are fixed. The two environment signals are **choices of this design**:

* `was_running` is a register. Each cycle it stores `go + was_running - f1 - f2 - f3 > 0`,
  meaning an activation is still live after this cycle's finishes.
* `used_well = !go | !was_running | f1`: a program may only be restarted when it is idle or
  finishing in the same cycle.

`once` means *exactly once* here. Read as "at most once", invariant 3 differs only before the
first `go`.

The Esterel compiler itself is not part of this RTL. These observers take its interface as top-level
ports, ready to be attached to such a compiler.

## 8. The top: `flash_verif_top`

Four independent groups of ports share `clk` and the asynchronous active-low `rst_n`:

* `start`, `cond[NCOND-1:0]` (`{v, w}` for the default) → `shout`, `finish`, `prog_ok`: the
  compiled program `PROG` and its observer.
* `ic_*[6:0]`: the seven temporal induction cases. Bit `k` belongs to construct
  `flash_op_e'(k)` (0 Skip, 1 Shout, 2 Delay, 3 Seq, 4 ITE, 5 Par, 6 While). Drive the hole
  inputs `ic_p_shout`, `ic_p_finish`, `ic_q_shout`, `ic_q_finish` freely and watch `ic_ok`.
* `sr_set`, `sr_new` → `sr_now` (the set register, `now = set ? new : previous now`), and
  `mux_s`, `mux_a`, `mux_b` → `mux_o`, `mux_ok`.
* `est_go`, `est_e`, `est_f1..f3` → `est_used_well`, `est_inv[5:0]` (invariant `i+1` on bit `i`).

Outputs are combinational in the inputs of the same cycle, plus the one-bit history registers.
Nothing is pipelined. After synthesis the whole top is about 180 cells and 37 flip-flops.

## 9. Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/flash_pkg.sv \
          tb/tb_flash_verif_top.sv --top-module tb_flash_verif_top
./obj_dir/Vtb_flash_verif_top
```

Swap in any other testbench name. The testbenches are:

* `tb_flash_verif_top`: the end-to-end test, at the default parameters. It runs 4000 cycles of all
  four groups against reference models. It also counts each mechanism and fails if any never
  occurred: loop iteration, exit and zero-iteration run; both conditional branches; synchroniser
  waiting; a finish from every induction case; set-register loads and holds; an Esterel double
  finish; an Esterel violation caught.
* `tb_flash_program`: the default program against its timing rules.
* `tb_flash_family`: six programs of different shapes, each compiled and run with random inputs.
  Each one is compared cycle by cycle with an interpreter that evaluates the compilation rules to
  their least fixpoint, and the invariant "finish implies started" is checked on each.
* `tb_flash_node`: six small programs against traces worked out by hand.
* `tb_flash_induction_case`: random holes for all seven cases, the naive counterexample, and the
  While caveat.
* `tb_esterel_observers`: random well-behaved and unconstrained traces against a counting
  reference.
* One testbench for each scheme, the synchroniser, the history circuits and the example circuits.

Verilator's `-Wall` lint reports some unused history outputs (by design). It also reports a
spurious "undriven" warning when `flash_node` alone is linted as the top, because the top then
instantiates itself.

## 10. What is given and what is chosen

These parts follow the source description closely: the seven compilation schemes, the three-wire
program interface, the history circuits *sometimes* and *always*, the multiplexer and set-register
examples, the observer formulas, the structure of an induction case (empty sub-programs, inner and
outer observers, naive and temporal hypothesis), and the six Esterel invariants.

These are choices of this implementation:

* the reset `rst_n`. The source only gives initial values for delay elements.
* the synchroniser's insides: one flag per branch.
* `never` and `once`.
* `was_running` and `used_well`.
* the program encoding and the recursive-module compiler.
* the default program.
* fixing the induction cases to the invariant "finish implies started". Other observers can be
  swapped in at `obs_flash_started`.

Not provided:

* an Esterel compiler. Only its interface and invariants are described, so no circuit is given.
* a model checker. The observers are simulated, not proved.
