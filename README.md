# NULL Convention Logic from ordinary gates

This is a library of clockless, quasi-delay-insensitive (QDI) combinational logic in the
NULL Convention Logic (NCL) style, written as SystemVerilog. NCL usually relies on about
two dozen special threshold-gate cells designed at transistor level, and FPGAs and
standard-cell libraries do not have them. Here every threshold gate is built only from
AND, OR and NOR gates. A two-gate latch gives the hysteresis that NCL needs, and it works
without the fundamental-mode timing assumption that earlier basic-gate versions depended on.

The library is built on top of those gates:

* six threshold gates (TH22, TH23, THand0, TH24comp, TH34w3, THxor0);
* dual-rail AND2, OR2, XOR, XNOR, NAND2, NOR2 and AOI4 gates;
* a worked example, F = (A xor B) or (C and D);
* a one-bit ALU cell modelled on the 74181, and a ripple-carry N-bit ALU;
* three benchmark circuits: a four-input AND, a 2 x 2 bit multiplier and a 4-bit
  prime-number detector.

## Dual-rail data and the 4-phase cycle

Each logical bit travels on two wires, `r1` and `r0` (type `ncl_pkg::dr_t`, packed as `{r1, r0}`):

| r1 r0 | meaning |
|-------|---------|
| 00    | NULL (spacer, no data) |
| 01    | DATA 0 |
| 10    | DATA 1 |
| 11    | never produced |

A circuit is driven in alternating wavefronts. The environment raises its inputs from NULL
to DATA in any order and at any speed. It waits until every output is DATA, then lowers the
inputs to NULL and waits until every output is NULL again. There is no clock. The outputs
themselves say when a wavefront has passed, so the environment only needs a completion
detector on the outputs (an OR of the two rails per bit, then an AND-tree or C-element
tree). That detector is not part of this RTL.

Inverting a dual-rail signal costs no gate: you just exchange the two rails.

## Threshold gates and the hold stage

A threshold gate THmn has n inputs and one output `z`:

* `z` rises when the gate function F_SET is true. For a plain THmn gate that means at least
  m inputs are 1; weighted and special gates have their own function.
* `z` falls only when **all** inputs are 0.
* In every other case `z` keeps its value.

That hysteresis makes a gate's output rise only after the inputs that set it have arrived,
and fall only after they have all left. It is what lets a network of these gates report
the completion of both the DATA wavefront and the NULL wavefront.

Each gate here is three parts (`ncl_th*.sv`):

1. **SET network**: an AND-OR realisation of the gate function F_SET.
2. **RESET network**: an OR of all n inputs. F_RESET = 0 exactly when every input is 0.
3. **Hold stage** (`ncl_hold.sv`), four basic gates:

```
g4 = NOR(set, reset)      clear request: every input is 0
g5 = AND(set, reset)      set request:   the function is true
z  = NOR(g4, g7)          output ("Hold-1")
g7 = NOR(g5, z)           feedback ("Hold-0")
```

`z` and `g7` form a cross-coupled NOR latch. It is set by `g5` and cleared by `g4`. Every
product of F_SET implies F_RESET, so the requests can never both be active, and the
latch's forbidden state cannot occur. Three input combinations are possible:

| set | reset | g4 | g5 | z        |
|-----|-------|----|----|----------|
| 0   | 0     | 1  | 0  | 0        |
| 0   | 1     | 0  | 0  | holds    |
| 1   | 1     | 0  | 1  | 1        |

Two properties of this stage deserve a close look:

* **The loop is intended.** `z -> g7 -> z` is a combinational loop, and it is the gate's
  storage. Verilator reports it as `UNOPTFLAT`, and synthesis tools report a logic loop.
  Both messages are expected. Verilator settles the loop in a few evaluation passes.
* **There is no reset pin.** Driving every gate input to 0 clears every gate, since it
  forces `g4 = 1` and so `z = 0`. A testbench or an environment must therefore start with
  all inputs at NULL. If it does not, the latches start in arbitrary states. With `g4 = g5
  = 0` and a random start of `z = g7 = 0`, a zero-delay simulator can even see the latch
  oscillate.

**Timing (not modelled).** The structure is delay-insensitive except for one race inside
the hold stage. Suppose that after `z` rises, every input falls back to 0 at once. Then
`g4` must not clear the latch while `g5`/`g7` are still switching from the set event. The
condition is that the sum of the minimum delays around the path exceeds the maximum delay
of `g5` plus `g7`. It has five minimum-delay terms against two maximum-delay terms, so it
holds comfortably in practice. It is a property of the physical gates, and this zero-delay
RTL neither represents nor checks it. Earlier basic-gate NCL structures (a Huffman-machine
form and two set/reset-latch forms) have tighter constraints of the same kind. They are
only comparison points and are not included.

### The gate set

| module          | function (F_SET)           | used for |
|-----------------|----------------------------|----------|
| `ncl_th22`      | AB                         | C-element; the "all true" rail of AND2/OR2 |
| `ncl_th23`      | AB + AC + BC               | stand-alone gate (majority with hysteresis) |
| `ncl_thand0`    | AB + BC + AD               | the three-product rail of AND2/OR2 |
| `ncl_th24comp`  | AC + AD + BC + BD          | true rail of AOI4 |
| `ncl_th34w3`    | A + BCD                    | stand-alone weighted gate |
| `ncl_thxor0`    | AB + CD                    | both rails of XOR, false rail of AOI4 |

## Dual-rail gates

A single-rail gate becomes a dual-rail gate through two threshold gates: one computes the
true rail from the function F, the other computes the false rail from its complement F'.
Both are written over the rails:

| gate (`ncl_dr_*`) | r1 (result 1)                       | r0 (result 0) |
|-------------------|-------------------------------------|---------------|
| `and2`            | TH22(a1, b1)                        | THand0(a0, b0, a1, b1) = a0b0 + a0b1 + a1b0 |
| `or2`             | THand0(a1, b1, a0, b0) = a1b1 + a1b0 + a0b1 | TH22(a0, b0) |
| `xor`             | THxor0(a0, b1, a1, b0)              | THxor0(a0, b0, a1, b1) |
| `aoi4`, not(ab+cd) | TH24comp(a0, b0, c0, d0)           | THxor0(a1, b1, c1, d1) |
| `xnor`, `nand2`, `nor2` | XOR, AND2, OR2 with the output rails exchanged | |

In every product of the two-input gates, one rail of each operand appears. So the output
cannot become DATA until both operands are DATA. Because of the hysteresis, it cannot
return to NULL until both are NULL. This is **strong indication**, and it survives
composition: a tree of such gates indicates all of its leaves on its root.

The **AOI4 gate is an exception.** Its rail functions have products that skip operands. For
example, a = b = 1 sets the false rail before c and d arrive, and the rail can fall again
before c and d leave. The gate only has *weak* indication. It is built as specified, and its
testbench checks the weaker property: early outputs are allowed but must carry the right
value, and nothing illegal ever appears. A circuit that uses it needs its operands
indicated somewhere else.

## From a Boolean function to an NCL circuit

The synthesis flow has three steps:

1. Map the minimised function onto two-input basic gates (NOT, AND2, OR2, XOR, XNOR,
   NAND2, NOR2, AOI4).
2. Replace each gate by its dual-rail counterpart.
3. Replace each dual-rail gate by its pair of threshold gates.

Because each gate has strong indication, the result needs no extra completion signal
inside. The modules built this way are:

* `ncl_f_example`: F = (A xor B) or (C and D) as XOR + AND2 feeding OR2, 6 threshold gates.
* `ncl_alu1`: the ALU cell, described in the next section.
* `ncl_and4`: AND2(AND2(a,b), AND2(c,d)), 6 threshold gates.
* `ncl_mult2`: 2 x 2 -> 4 bit multiplier, 6 AND2 + 2 XOR.
  * p0 = a0b0
  * p1 = a1b0 ^ a0b1
  * p2 = a1b1 ^ c1
  * p3 = a1b1 & c1, with c1 = a1b0 & a0b1
* `ncl_prime4`: prime flag for x in {2,3,5,7,11,13}, 8 AND2 + 3 OR2.
  * f = x3'x2'x1 + x2x1'x0 + x3'x1x0 + x2'x1x0

In the multiplier, `p0` indicates only a0 and b0. `p3` depends on all four bits, so the
completion of `p3` marks the completion of the whole product.

## The ALU

`ncl_alu1` is one slice of a 74181-style ALU, with dual-rail inputs M, S1, S0, A, B and
C0 (carry in):

| S1S0 | M=1, C0=0       | M=1, C0=1           | M=0       |
|------|-----------------|---------------------|-----------|
| 00   | A               | A plus 1            | A         |
| 01   | not A           | not A plus 1        | not A     |
| 10   | A plus B        | A plus B plus 1     | A xor B   |
| 11   | not A plus B    | not A plus B plus 1 | A xnor B  |

It is a full adder working on modified operands:

| signal | gate          | meaning |
|--------|---------------|---------|
| F1     | S1 AND B      | operand Y |
| F2     | S0 XOR A      | operand X |
| F3     | C0 AND M      | carry, 0 in logic mode |
| F4     | F2 XOR F3     | |
| F5     | F2 AND F3     | |
| F6     | F1 AND F4     | |
| cout   | F5 OR F6      | |
| res    | F4 XOR F1     | |

That is 8 dual-rail gates, or 16 threshold gates. In logic mode, `cout` carries X AND Y,
which has no meaning. Select M=1, S1=1, S0=0 and the cell is a plain full adder.

`ncl_alu #(WIDTH)` chains WIDTH cells: the `cout` of each cell drives the `cin` of the
next. Each cell ANDs its carry input with M, so the chain is cut in logic mode without
extra gates. The default width is 1. Each result bit indicates only its own cell and the
carry into it. The final `cout` depends on every input and serves as the word's completion
indication.

## Top level

`ncl_top` holds every part side by side, with separate ports and no shared state:

* TH23 on its own;
* one each of the other threshold gates on a shared 4-bit input, `th_z = {TH22, THand0,
  TH24comp, TH34w3, THxor0}`;
* one of each dual-rail gate on shared operands, `dr_f[6:0] = {AND2, OR2, XOR, XNOR,
  NAND2, NOR2, AOI4}`;
* the F example;
* an `ALU_WIDTH`-bit ALU (default 1);
* the three benchmark circuits.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N
failures=M`:

* **Threshold gates and hold stage**: long random input sequences, one or more inputs
  flipping per step. Each step is compared with the set/clear/hold model. The testbench
  requires that holds at 1 and at 0 both occur.
* **Dual-rail circuits**: every operand combination, then random ones, each as a full
  4-phase cycle. Operands arrive and leave one at a time in random order. Strong
  indication is checked per output, against the inputs that output depends on.
* **`tb_ncl_alu`** runs a 4-bit chain. It checks the arithmetic and logic results, and
  counts operations whose carry ripples past bit 0.
* **`tb_ncl_top`** runs everything at once at the default parameters, 400 cycles over 26
  dual-rail inputs. It counts each mechanism and fails if any never happens:
  * holds at 1 and at 0;
  * outputs kept NULL waiting for inputs;
  * outputs kept DATA during a NULL wavefront;
  * AOI4 early completion;
  * logic and arithmetic ALU operations;
  * a carry out;
  * a detected prime.

  An assertion also checks that no output ever shows the unused code 11.

To run one testbench with plain Verilator from the repository root:

```
verilator --binary --timing -Wno-UNOPTFLAT -Wno-fatal -y rtl +libext+.sv \
    rtl/ncl_pkg.sv tb/tb_ncl_top.sv --top-module tb_ncl_top -o sim
./obj_dir/sim
```

Always start a simulation with all inputs at NULL (see the hold stage). The models have
zero delay. They check logic, hysteresis and indication order, but not glitches or the
race inside the hold stage.

## Where this RTL departs from, or adds to, the source design

* **Gate type in the SET network.** The architecture diagram draws NAND gates in the SET
  network, while the gate netlists and the description use AND gates (F_SET is the gate
  function itself). AND gates are used.
* **No init or reset input.** Published simulations show an `init` signal, but the gate
  netlists have no such input. Gates are cleared by all-NULL inputs.
* **THxor0 function.** The source never writes THxor0's function. It is taken as
  AB + CD, which matches its netlist and the dual-rail XOR.
* **AOI4 indication.** The source states that all dual-rail gates indicate strongly. The
  AOI4 mapping it gives does not (see above). The mapping is kept as given.
* **Gates with no published netlist.** XNOR, NAND2 and NOR2 appear in the library without
  netlists. They are built by exchanging the output rails. The dual-rail NOT is the rail
  exchange itself, done inline, not a module.
* **Two-input stages in the F example.** The example's diagram labels its AND and OR
  stages as four-input. Each of them has two dual-rail operands, and two-input AND2/OR2
  gates are used.
* **N-bit ALU wiring.** The N-bit ALU is a generalisation the source only mentions. Its
  ripple wiring is this design's.
* **Benchmark mappings.** Only the names and FPGA results of the benchmarks are published.
  The minimisations and mappings here are this design's. AND4 uses 6 threshold gates,
  which at two LUTs per gate matches the published LUT count. The published PRIME_4 and
  MULT_2 are larger than these versions. An odd-number detector is also among the
  published benchmarks. It is not built, because its exact function is not defined.
* **Timing and measurements not reproduced.** Gate delays, the hold-stage delay constraint,
  and area, latency and power figures are outside RTL.
