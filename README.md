# Telescopic units: a single-cycle block clocked faster than its worst case

A combinational block inside a synchronous design normally sets the clock
period T through its slowest path, even if only a few input patterns ever use
that path. A **telescopic unit** runs the same block with a shorter period
T\* < T and adds a small **hold circuit** next to it. The hold circuit
computes a signal `fh` from the block's inputs. `fh` is 1 for every input
pattern whose result might not have settled after T\*. For those patterns the
controller gives the block a second cycle. For all others the result is used
after one cycle. Latency becomes 1 or 2 cycles depending on the data, and the
average throughput is

    P* = Prob(fh) / (2 T*) + (1 - Prob(fh)) / T*

This beats the original P = 1/T when Prob(fh) < 2 (T - T\*) / T. The scheme
stays fully synchronous. The unit's result never needs a completion detector:
`fh` settles within the cycle, in time for the controller to act on it.
A parameter `L_MAX` (default 2) generalizes this to units that may need up
to `L_MAX` cycles, with one hold bit per extra cycle.

This repository holds synthesizable SystemVerilog for:

* a telescopic 16-bit ripple-carry adder and the hold circuit for it;
* a controller that handles the unit's variable latency. It is a state
  table with extra hold states, plus a small data path (registers and
  multiplexers) around the adder;
* two generic hold-circuit generators, in the two implementation styles
  described below. Each is shown on a three-input example.

```
                 steer (registered)            ld (depends on fh)
   tu_controller ----------------+      +------------------------------+
      ^   ^  start, cond         |      |                              |
      |   +----------------------|------|---------- fh ----------+     |
      |                          v      v                        |     |
      |   din --> [m3/m4] --> x1 x2 r1 r2 --> [m1/m2] --> a,b --> telescopic_adder
      |               ^                                          |  sum   fh
      |               +-------------- result ---------------------+
   tu_top also holds: hold_bdd_mux, hold_sop (example inputs a, b, c)
```

## The hold signal: what it must guarantee

Three requirements, most important first:

1. **Coverage and speed.** `fh` must be 1 for *every* pattern that is slow,
   and `fh` itself must settle well inside T\*. The controller's load
   decision depends on it, so the path is steering → unit inputs → `fh` →
   load enables, and T_steer + T_fh + T_ld < T\* must hold.
2. **Rarity.** Prob(fh) must be small enough for the throughput gain above.
3. **Cost.** The hold circuit should be small.

Requirement 1 leaves room: `fh` may also be 1 for some fast patterns. Any
function f_h^e ≥ f_h is correct and only costs throughput. Both hold-circuit
styles, and the adder's hold logic, use this freedom to keep the circuit
shallow.

RTL cannot show gate delays, so nothing here proves that a given netlist
meets T\*. What the RTL fixes is the *logic* of `fh`. The testbenches check
that logic against a cycle-level delay model. Whether the adder really
settles within T\* whenever `fh = 0` must be confirmed by static timing
analysis after synthesis.

### The telescopic adder (`telescopic_adder`)

In a ripple-carry adder, a sum bit is slow only when a carry has to travel
through a long run of *propagate* positions (a[i] ^ b[i] = 1). The hold
circuit raises `fh` when any `RUN_K` consecutive positions all propagate:

    fh = OR over w of ( AND over i in [w, w+RUN_K) of (a[i] ^ b[i]) )

When `fh = 0`, no carry crosses more than `RUN_K-1` propagate positions. The
clock period can therefore be sized for a carry chain of about `RUN_K`
positions instead of `WIDTH`. This fh is a superset of the exact slow set: a
run that begins at a "kill" position raises it too. In exchange the circuit
is one level of XOR, one AND per window and one OR.

With 16 bits and `RUN_K = 8`, Prob(fh) for uniform random operands is
1 − P(no run of 8 in 16 fair bits) = 0.0195. The 16-bit adder benchmark
this models has T = 34 and T\* = 18 unit gate delays. If the 18-unit cycle
covers runs of up to 7, then P\* = 0.0195/36 + 0.9805/18 = 0.0550, against
P = 1/34 = 0.0294. The mapping of T\* = 18 to `RUN_K = 8` is an estimate of
about two gate delays per ripple position. Re-derive `RUN_K` from timing
analysis for a real library.

**Units that need more than two cycles (`L_MAX`).** By default a unit takes
one or two cycles, and `fh` is a single bit. With `L_MAX > 2` the unit may
take up to `L_MAX` cycles, and `fh` has `L_MAX-1` bits. Bit `fh[j-1]` means
"this input needs j+1 cycles". The adder sets it when the longest propagate
run has at least `j*RUN_K` positions but fewer than `(j+1)*RUN_K`. The top
bit covers every longer run. The bits are one-hot.
`L_MAX` cycles must be enough for the longest carry chain, so choose
`L_MAX*RUN_K` greater than `WIDTH`. The RTL only checks that
`RUN_K*(L_MAX-1) <= WIDTH`. The throughput then becomes

    P* = sum over j of Prob(fh[j-1]) / ((j+1) T*)  +  (1 - Prob(any fh)) / T*

### Hold circuit as a multiplexer network (`hold_bdd_mux`)

One generic style starts from a BDD of the hold function. Each BDD node
becomes a 2:1 multiplexer whose select is the node's variable. The leaves
are the constants 0 and 1, and the root drives `fh`. The depth of this
network is the depth of the BDD, so the BDD is first **superset**:

* every node gets a *level*, the length of the longest path from the root
  to it;
* every node whose level exceeds `LAMBDA_MAX` is replaced by constant 1.

The result is ≥ the original function, so coverage is kept, and the network
is at most `LAMBDA_MAX + 1` multiplexers deep. `LAMBDA_MAX` follows from
the cycle: floor(K_t · T\* / d_mux). Here d_mux is the delay of one loaded
multiplexer and K_t ≤ 1 accounts for later logic optimisation. Levels are
computed when the module is elaborated, so the BDD table alone describes the
circuit.

Table format (`tu_pkg::bdd_node_t`): index 0 is leaf 0 and index 1 is leaf 1.
Internal node k has index k+2 and holds `{var_idx, lo, hi}`. Children must
have smaller indices than their parent, and the root is the last node.

### Hold circuit as an inverted sum of products (`hold_sop`)

The other style implements the **complement** of the hold function as a sum
of products and inverts it. A partial cover works here. Each cube lists
patterns known to be fast, and anything left uncovered holds. This keeps both
trees short:

* product trees: each cube is an AND of at most `N_MAX` literals, depth
  about log2 `N_MAX`;
* sum tree: an OR of `N_CUBE` cubes, depth about log2 `N_CUBE`;
* one inverter at the output.

The delay is about K_s·⌈log2 N_CUBE⌉ + K_p·⌈log2 N_MAX⌉ + K_in. Cube c
covers x when `(x & CUBE_MASK[c]) == (CUBE_VAL[c] & CUBE_MASK[c])`. Choosing
the cubes (the largest ones, within the two bounds) is a design-time step,
and the module takes the result as parameters.

### The three-input example

Both generators default to the same small example. It is a circuit with
inputs a, b, c whose output arrival times per input pattern are:

| a b c | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-------|-----|-----|-----|-----|-----|-----|-----|-----|
| AT    | 1   | 3   | 1   | 3   | 1   | 4   | 1   | 4   |

T = 4. With T\* = 3 and "hold when the arrival time is greater than T\*",
fh = a & c. This is a two-node BDD (`hold_bdd_mux`), or the complement
cover a' + c' inverted (`hold_sop`). Prob(fh) = 0.25 and P\* = 0.292 against
P = 0.25. The example uses `x[0] = a`, `x[1] = b` and `x[2] = c`. The top
instantiates both generators on the same inputs, and they must agree.

## The transformed controller (`tu_controller`)

Start with an ordinary state-table controller. Each control step S_j drives:

* **load signals**, the register write enables (active high);
* **steering signals**, the multiplexer selects for unit operands and
  write-back.

For each step in which the telescopic unit works (`tu_active`):

| from     | condition | to        | loads         | steering  |
|----------|-----------|-----------|---------------|-----------|
| S_j      | fh = 0    | successor | as in S_j     | as in S_j |
| S_j      | fh = 1    | SH_j      | **all off**   | as in S_j |
| SH_j     | always    | successor | as in S_j     | as in S_j |

In the hold state the unit's input registers are not reloaded and the
operand multiplexers do not move. The unit therefore keeps working on the
same operands for its second cycle, and its result is loaded when the
controller leaves SH_j. `fh` is not sampled in SH_j, because the unit never
needs a third cycle.

With `L_MAX > 2`, S_j reads all hold bits. The highest bit that is set,
`fh[j-1]`, keeps the controller in SH_j for j cycles. Loads stay off and
steering is held in all of them. The step's loads are applied in the last
hold cycle, on the way out. Hold bits and `cond` are ignored inside the hold.
At `L_MAX = 2` this is exactly the table above.

**Conditional steps.** A step with `branch = 1` goes to `target` when the
`cond` input is 1 and to the next step otherwise. If a conditional step also
uses the unit, there is one hold state per out-going edge. In the RTL this is
a single hold bit plus the remembered successor, so `cond` is sampled once,
in S_j, and ignored in the hold state. `cond` must therefore not depend on
the result that the unit is still computing in that step. Both edges of a
step carry the same outputs.

**Glitch-free steering.** When the controller moves from S_j to SH_j the
steering values stay the same. A glitch on them in that transition would
disturb the unit's inputs while it is still settling, and could stretch its
delay past the second cycle. Here `steer` is a register output, loaded with
the steering of the state being entered, so it cannot glitch. The load
enables are still combinational from `fh`; they are the path that sets the
T_steer + T_fh + T_ld < T\* budget.

State encoding: `{busy, sh, fin, left, step, succ}`. `left` counts the hold
cycles still to come; it is one bit wide and always zero at `L_MAX = 2`. An idle state waits for
`start`. After the last step the controller returns to idle and pulses
`done` in the final cycle. At most 16 steps are allowed (`STEP_W = 4`).

With one telescopic unit, the number of states at most doubles. With several
units sharing one flat state table it would grow exponentially, so that case
calls for a network of small controllers. That case is not built here.

## Data path and default program (`tu_datapath`, `tu_pkg`)

The data path has four `WIDTH`-bit registers, x1, x2, r1 and r2, each with
its own load enable. The adder's operands A and B come from four-way
multiplexers `m1` and `m2` (0 = x1, 1 = x2, 2 = r1, 3 = r2). Write-back data
for x1/x2 is chosen by `m3`, and for r1/r2 by `m4` (0 = `din`, 1 = adder
result). Registers reset to zero.

`DEFAULT_PROGRAM`:

| step | action                         | unit | outputs                          |
|------|--------------------------------|------|----------------------------------|
| 0    | r2 ← din                       | no   | m4=0, ld_r2                      |
| 1    | x2 ← din                       | no   | m3=0, ld_x2                      |
| 2    | x1, r1 ← x2 + r2               | yes  | m1=1 m2=3 m3=1 m4=1 ld_x1 ld_r1  |
| 3    | r2 ← x1 + x2                   | yes  | m1=0 m2=1 m4=1 ld_r2             |
| 4    | x2 ← r2 + x2; to 3 if cond     | yes  | m1=3 m2=1 m3=1 ld_x2             |

Every addition also adds `cin`. A run takes 5 cycles, plus 2 per loop
iteration, plus one per addition whose operands raise `fh`. Replace
`PROGRAM` (a `tu_pkg::step_t` array) to run other schedules.

## Parameters

| module            | parameter    | default           | meaning |
|-------------------|--------------|-------------------|---------|
| tu_top, tu_datapath, telescopic_adder | `WIDTH` | 16 | operand width (a 33-input, 17-output adder) |
| same              | `RUN_K`      | 8                 | propagate run length that raises `fh` |
| tu_top, tu_datapath, telescopic_adder, tu_controller | `L_MAX` | 2 | most cycles one unit operation may take; `fh` has `L_MAX-1` bits |
| tu_controller     | `N_STEPS`, `PROGRAM` | 5, `DEFAULT_PROGRAM` | state table |
| hold_bdd_mux      | `N_IN`, `NNODES`, `NODES`, `LAMBDA_MAX` | 3, 2, example, 3 | BDD and supersetting depth |
| hold_sop          | `N_IN`, `N_CUBE`, `N_MAX`, `CUBE_MASK`, `CUBE_VAL` | 3, 2, 1, example | complement cover |

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M`, has a watchdog, and needs no files. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/tu_pkg.sv \
          tb/tu_top_tb.sv --top-module tu_top_tb
./obj_dir/Vtu_top_tb
```

Replace `tu_top_tb` with any other testbench name:

* `telescopic_adder_tb` checks sum, carry and `fh` over directed and 20,000
  random operand pairs. It uses a delay model in which a carry that crossed
  `RUN_K` or more propagate positions is still stale after one cycle. With
  that model it checks that every pattern with `fh = 0` is complete after
  one cycle. A second adder with `RUN_K = 5` and `L_MAX = 4` is checked on
  the same operands. The test checks that its one-hot `fh` names the right
  cycle count, and that the value after that many cycles is complete. All
  four cycle counts occur.
* `hold_bdd_mux_tb` and `hold_sop_tb` are exhaustive. They cover the example,
  a four-input chain with and without supersetting (including the superset
  property), and a five-input cover. `hold_bdd_mux_tb` also builds the BDD
  of the adder's hold function for a 6-bit adder with runs of 3, using a
  constant function. It checks the multiplexer network against
  `telescopic_adder` over all 4096 operand pairs. Cut at `LAMBDA_MAX = 5`,
  the same BDD still covers every slow pattern, but it holds for 2816 of the
  4096 pairs that need no hold. In the natural variable order, depth-limited
  supersetting is a poor fit for an adder; the window form used in
  `telescopic_adder` avoids this.
* `tu_controller_tb` walks the expected state sequence with random `fh` and
  `cond`. It changes both in hold states, where they must be ignored. It does
  this for the default controller and for one with `L_MAX = 3`, which has
  one-cycle and two-cycle holds.
* `tu_datapath_tb` compares against a register model under random control.
* `throughput_tb` streams 60,000 additions of uniform random words through
  the controller and data path. It measures the average latency of the
  telescopic step: 1.020 cycles, so Prob(fh) = 0.020 against 0.0195
  analytically. Using T = 34 and T\* = 18 this gives P\* = 0.0545 against
  P = 0.0294. It does the same for the three-input example
  (Prob(fh) = 0.25, P\* = 0.292).
* `multicycle_throughput_tb` does the same with a cycle below half the
  adder's delay: `RUN_K = 5` and `L_MAX = 4`. For every addition it checks
  the number of hold cycles and the moment of the load, computed from the
  operands. It compares the share of 1-, 2-, 3- and 4-cycle additions with
  exact counts over all 2^16 propagate patterns: 0.803, 0.193, 0.0039 and
  0.00005. With T = 34 and T\* = 11.25 (the 18-unit cycle scaled from runs
  below 8 to runs below 5), the mean of the per-operation rates is
  P\* = 0.080. The stream rate, 1 / (mean latency × T\*), is 0.074.
* `tu_top_tb` runs at the default size: 400 programs with random data and
  loop counts. It checks final registers, cycle counts and the one-cycle
  settling of every step that did not hold. It also requires that a hold, a
  single-cycle step, a hold-free run and a taken branch each occurred.

## How far to trust it, and where it departs

* The transformation rules, hold states per edge, hold-circuit structures,
  supersetting rule and throughput formulas are the method's own.
* The data path, register set, multiplexer codings, program, branch format,
  start/done handshake, reset values and state encoding are this design's
  choices. The method assumes a controller and data path already exist.
* The method derives `fh` from exact per-pattern timing analysis of a gate
  netlist. No netlist exists here, so the adder's hold function is an
  analytical superset (propagate runs), not the output of that analysis.
* The two-cycle form is the default. The longer form (`L_MAX > 2`) follows
  the method's outline: one hold signal per cycle count. The controller's
  handling of it (one hold state per step, held for several cycles) is this
  design's, because the method only sketches that case. The full-system
  testbenches run only at `L_MAX = 2`.
* Only depth-based supersetting is built. The method also marks nodes with
  heavy fan-out or heavily loaded select inputs, but does not describe how.
* The steering register is one way to get glitch-free steering; glitch-free
  synthesis of a combinational decoder is another.
* Physical measures against the hold circuit loading the input flip-flops,
  such as extra input buffers or re-synthesis with a tighter T\*, are outside
  the RTL.
