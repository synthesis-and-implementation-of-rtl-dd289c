# Hierarchical FSMs with implicit modules

A hierarchical finite state machine (HFSM) runs an algorithm written as a set of
flow charts ("modules") that call one another, recursively if needed, the way
software functions do. The classic hardware for this keeps two stacks, one of
module codes and one of state codes, and addresses the current state as the
pair formed by the two stack tops. The machines here use the *implicit module*
model instead:

* every state lives in one ordinary state **Register**, so the machine is a
  conventional FSM plus a small stack, and the usual FSM optimisations (state
  assignment, minimisation, RAM-based implementation) apply unchanged;
* a single **return stack** holds only the codes of calling states, which are
  few, so the stack is small;
* a call, an ordinary transition and a return each take one clock cycle,
  exactly as in a flat FSM.

This repository holds synthesizable SystemVerilog for four such machines, side
by side in `hfsm_top`:

| prefix | module | what it is |
|---|---|---|
| `gcd_` | `gcd_hfsm` | a five-module HFSM that reads pairs of integers and computes their greatest common divisor with a recursive module |
| `f7_` | `fig7_hfsm` | a hard-wired four-module example machine (24 states, recursive module z1), with a flat or a {module, state} encoding |
| `r_` | `rhfsm` | the same kind of machine with its whole behaviour in RAMs, so it can be reloaded with other flow charts |
| `m_` | `rhfsm_modular` | a RAM-based machine with one circuit per module, where one module can be reloaded while the others run |

## Calls and returns: the part to understand first

Each rectangular node of a flow chart is a state; Begin and End nodes are
states too. A state may hold micro-operations (output bits `y`) and/or a
macro-operation, that is, a call of another module. Conditions (`x` inputs)
select among branches.

**Call.** In a calling state `a_c` of module `z_c` the combinational circuit
(CC) raises `push`, puts the code of `a_c` (with its module code in the split
encoding) on the stack, and loads the Register with the Begin state of the
called module. The calling state's own micro-operations are output in that
same cycle.

**Return.** When the Register holds the End state of a called module and the
stack is not empty, the CC raises `pop`. A multiplexer then feeds the
*stack top*, not the Register, to the transition logic, which computes the
transition out of the calling state `a_c` as if its macro-operation had just
finished. That transition may test conditions, even ones the called module has
just changed. The result goes into the Register, and the stack pointer drops.
The End state therefore takes one cycle, and the return costs no cycle beyond
it.

Example: module z0 of the example machine calls z2 in state a4.

| cycle | Register | stack | what happens |
|---|---|---|---|
| t | z0/a4 | – | `push` z0/a4, next = z2/a0 |
| t+1 | z2/a0 | z0/a4 | z2 runs... |
| t+k | z2/a4 (End) | z0/a4 | `pop`; transitions of z0/a4 evaluated on return: next = z0/a5 |
| t+k+1 | z0/a5 | – | y1, y2, y3 |

The stack stores the calling state rather than its successor. This handles
returns whose successor depends on conditions: in the example, z1/a4 goes to
End or back to a1 depending on `x4` after z2 returns. When the successor is
unconditional the timing is the same as storing the successor.

In the hard-wired CCs (`gcd_cc`, `fig7_cc`) each calling state has two arms,
one for "enter" and one for "after return". The RAM-based CC tells them apart
with an extra STRAM address bit, `ret`, which is `pop`.

The End state of the main module is its Begin state a0, so the main module
loops for ever. An End state with an empty stack keeps its state.

## The GCD machine (`gcd_hfsm`)

With `SPLIT = 1` (the default) the Register holds {module (3 bits), state
(3 bits)}, and states of different modules reuse the labels a0..a5. With
`SPLIT = 0` each of the 17 states gets a 5-bit code of its own, numbered module
by module (z0: 0..3, z1: 4..5, z2: 6..11, z3: 12..13, z4: 14..16), and the
modules are implicit. The control circuit is written once against {module,
state} and converts at its edges, so both encodings behave identically cycle by
cycle; only the Register and stack widths differ.

* **z0**, the main loop: a0 → a1 (call z1) → a2 (call z2) → if GCD = 1 back to
  a1, else a3 (`y1`, call z3) → a0.
* **z1** takes in a pair: it holds `in_ready` high in a0 until `in_valid`, loads
  Data_A/Data_B, then ends.
* **z2** computes gcd(Data_A, Data_B) recursively:
  * a0 copies the arguments to A, B;
  * if B > A: a1 swaps the arguments and calls z2;
  * if B = 0: a2 stores `result = A`;
  * otherwise: a3 calls z4, then a4 sets the arguments to (B, A mod B) and
    calls z2;
  * every path ends in a5.
* **z4** computes A mod B by subtracting B from A while A ≥ B (R ← A − B).
* **z3** holds `out_valid` with the GCD until `out_ready`.

Pairs whose GCD is 1 produce no output. Every state takes one cycle. From the
cycle a pair is accepted to the first `out_valid` cycle there are C(z2) + 3
cycles, where C(z2) is given by:

* C(a, b) = 3 + C(b, a) if b > a;
* C(a, b) = 3 if b = 0;
* otherwise C(a, b) = 4 + (2⌊a/b⌋ + 2) + C(b, a mod b).

The recursion pushes one word per Euclid step. The deepest 16-bit case is the
Fibonacci pair (46368, 28657), which reaches a stack depth of 23. The default
`DEPTH` is 32. Datapath registers are in `gcd_datapath`; codes and the control
bundle are in `gcd_pkg`.

## The four-module example (`fig7_hfsm`)

* **z0** (states a0..a7) outputs y1,y4 in a1, then branches on {x1,x2}:
  * 00 → a2 (y2) → a4 (call z2) → a5 (y1,y2,y3);
  * 01 → a6 (y2,y3) → a7 (call z1);
  * 10 → a3 (y3) → a7;
  * 11 → a1 again.
* **z1** (a0..a5) is recursive. With x5 = 1 in Begin it goes a1 (y5) → a2
  (call z1) → a3 (y6) → a4. With x5 = 0 it goes straight to a4. In a4 it calls
  z2; after the return, x4 = 1 ends z1 and x4 = 0 goes back to a1.
* **z2** (a0..a4) tests x2 and x3:
  * x2 = 0 → a1 (y2,y7) → a3 (y3,y5);
  * x2 = 1, x3 = 0 → a3;
  * x2 = 1, x3 = 1 → a2 (call z3).
* **z3** (a0..a4): x1 = 0 → a1 (y4,y5,y7); x1 = 1 → a2 (y2) → a3 (y1); both
  then go to End.

`SPLIT = 0` numbers the 24 states 0..23 in the order above, one 5-bit code
each, so the modules are implicit. `SPLIT = 1` uses {module (2 bits), state in
module (3 bits)}. Both are 5 bits and behave identically; `fig7_pkg` holds the
encode/decode functions. Inputs are `x[5:1]` = x1..x5 and outputs `y[7:1]` =
y1..y7.

## RAM-based reconfigurable machine (`rhfsm`, `rcc`)

The CC is made only of RAMs, so loading new contents turns the same circuit
into a different HFSM:

* **Output RAM** (`2**SW` words of `{end, y[N-1:0]}`), addressed by the
  Register. `end` marks the End state of a called module and raises `pop`
  when the stack is not empty.
* **Return multiplexer**: the state code sent on is the stack top when `pop`
  is high, otherwise the Register.
* **G blocks**, each made of:
  * a **programmable multiplexer** (`rcc_pm`): for each of K variables
    p0..pK-1, a RAM addressed by the state code holds the index of the `x`
    input to route to that variable. A state that tests two of many conditions
    then needs only 2 address bits for them;
  * a **state transition RAM** (`rcc_stram`), addressed by
    `{ret, state, p0, ..., pK-1}` (p0 most significant), with words of
    `{valid, push, next[SW-1:0], rstate[SW-1:0]}`.
* The valid words of all blocks are OR-ed. A state's transitions are placed in
  one block; if no block has a valid word, the state is kept.

| target (`cfg_target`) | address (`cfg_addr`) | data (`cfg_data`) |
|---|---|---|
| `CFG_OUT_RAM` | state code | `{end, y}` |
| `CFG_PM` (block `cfg_block`, variable `cfg_k`) | state code | input index |
| `CFG_STRAM` (block `cfg_block`) | `{ret, state, p0..pK-1}` | `{valid, push, next, rstate}` |

How to program a state:

* **ordinary state**: `ret = 0` words give `next` for each p combination;
* **calling state**: `ret = 0` words have `push = 1`, `next` = callee's Begin
  state and `rstate` = this state's own code; the `ret = 1` words give the
  successor after the return;
* **End state of a called module**: out-RAM `end = 1`, and no valid STRAM
  words.

Writes take one word per clock; reads are combinational. Hold the machine in
reset while it is loaded. The defaults (SW = 5, L = 5, K = 2, N = 7, G = 2)
are sized so the four-module example fits (in either encoding). Condition x_i
goes to `x[i-1]` and y_i comes out on `y[i-1]`.
`tb/fig7_cfg_loader.sv` shows a complete loading sequence.

## Per-module reconfiguration (`rhfsm_modular`, `rcc_module`)

The Register holds {module, state}. A module decoder selects one
`rcc_module` per module; each has its own output RAM, PMs and STRAMs,
addressed by the 3-bit state code within the module. The words hold full
{module, state} codes, so a call can name any module.

Outputs come only from the module in the Register; passive modules output
zeros, and the module outputs are OR-ed. Transitions come from the module
being evaluated, which on a return is the calling module taken from the stack
top.

Writes go only to module `cfg_module`, so one module can be reloaded, in
fewer writes, while the machine runs elsewhere. This costs more RAM than the
single circuit (Q copies). The defaults, Q = 4 modules of up to 8 states,
hold the four-module example.

## Parameters and sizes

| module | parameter | default | origin |
|---|---|---|---|
| `gcd_hfsm` | `W` (data width) | 16 | own choice |
| `gcd_hfsm` | `DEPTH` | 32 | own choice (deepest 16-bit case needs 23) |
| `gcd_hfsm` | `SPLIT` | 1 | 1: {module, state} codes (6 bits); 0: one code per state (5 bits) |
| `fig7_hfsm` | `SPLIT` | 0 | selects Fig.-2-style flat or split codes |
| `fig7_hfsm` | `DEPTH` | 16 | own choice |
| `rhfsm`, `rcc` | `SW, L, K, N, G` | 5, 5, 2, 7, 2 | K = 2 from the published example; the rest sized for the four-module example; G own |
| `rhfsm_modular` | `Q, SSW` | 4, 3 | 4 modules of at most 8 states |
| all | stack overflow | push dropped, sticky `stack_overflow`; `stack_full` flags a full stack | own choice |

All machines use a synchronous active-low reset `rst_n`. It clears the stack
and puts the Register in state a0 of z0 (code 0).

## Departures and own choices

* **Return code.** The stack holds the calling state, and its transitions are
  evaluated on return. The published state table for the GCD module instead
  pushes the successor state directly. For unconditional returns, as in the
  GCD, both give the same cycle timing. Because the pushed word is the
  Register's own content, the stack input is wired straight from the Register;
  the combinational circuit drives only `push`.
* **Modules z1 and z3 of the GCD machine** are only named as "input interface"
  and "processing of the GCD"; here they are valid/ready handshakes. `y1` is a
  one-cycle strobe.
* **Remainder module z4** does nothing in its End state. Copying A to B there
  would break the next recursive argument.
* **Example z3**: a3 (y1) goes straight to End.
* **RAM-based CC**: these are this design's own format, not the source's:
  * the `valid`/`push` bits and the `ret` address bit of the STRAM;
  * the End flag in the output RAM;
  * the output RAM is addressed by the Register, not by the return
    multiplexer's output. Read through the multiplexer, a return cycle would
    repeat the calling state's micro-operations (a push among them), and an
    End flag would loop back onto `pop` combinationally;
  * OR-ing the G blocks;
  * combinational-read RAMs (which keep one state per cycle).
* **Return-code encoding.** Stack words are not compressed: full codes are
  stored.
* **Not built**:
  * parallel execution of several macro-operations in one node (no mechanism
    is described for the single-stack model);
  * the controller that loads the RAMs (its configuration ports are brought
    out at `hfsm_top`);
  * the sorting, priority-buffer, garage-control and processor applications
    (they are only named).

## Verification

Each testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `tb_hfsm_stack` | random push/pop against a queue model; full, overflow, empty pop |
| `tb_hfsm_register` | reset code, load and hold |
| `tb_gcd_hfsm` | ~400 pairs: GCD value, no output for coprime pairs, exact C(z2)+3 latency, back-pressure, empty stack between pairs; a flat-encoded copy compared with the split one every cycle |
| `tb_fig7_hfsm` | both encodings against a reference written as recursive tasks, one per module, checked every cycle (outputs and stack depth); all selector branches, recursion, conditional return |
| `tb_rcc_pm`, `tb_rcc_stram` | the published 3-bit example (p0 = x1, p1 = x3, next 111/111/110/011) and random contents against a copy |
| `tb_rcc` | random RAM contents against a model of the whole CC, including the return multiplexer and block OR-ing |
| `tb_rhfsm` | loaded with the example (flat), then reloaded with split codes; lock step with `fig7_hfsm` |
| `tb_rhfsm_modular` | lock step with `fig7_hfsm`, then module z3 reloaded with a variant while running |
| `tb_hfsm_top` | all four machines at default parameters at once; counts every mechanism (GCD output, coprime skip, swap, deep recursion, every branch, calls, returns, recursive call, conditional return) |

The testbenches of the four machines and of the top also check on every cycle
that `stack_full` agrees with `stack_pointer`.

To run one with Verilator, for example the top:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/gcd_pkg.sv rtl/fig7_pkg.sv rtl/rcc_pkg.sv tb/tb_hfsm_top.sv \
  --top-module tb_hfsm_top -o sim
./obj_dir/sim
```

The other modules are found in `rtl/` and `tb/` by name. Each testbench
finishes within seconds.
