# Reversible ripple-carry adder from Mach-Zehnder optical switches

This is a logic-level model of an all-optical adder that loses no information. An N-bit
adder normally maps 2N+1 input bits to N+1 output bits, so distinct inputs can give the
same output. This adder maps the 2N+2 bits `(c0, a, b, z)` to 2N+2 bits:

```
(c0, a, b, z)  ->  (c0, a, a + b + c0 (low N bits), z XOR carry_out)
```

The map is a bijection. Each output vector comes from exactly one input vector, and no
extra constant inputs (*ancilla*) or discarded outputs (*garbage*) are needed. With `z = 0`
the last line holds the carry out.

The only active device is the Mach-Zehnder interferometer (MZI) switch, built from
semiconductor optical amplifiers. Beam splitters and beam combiners route the light. Light
present means logic 1; no light means 0. Every module here is that optical netlist
written as synthesizable combinational SystemVerilog: one `mzi_switch` instance per
physical switch and one `beam_combiner` per combiner. You can simulate the circuit, count its
switches and trace its paths. The RTL does not model light levels, losses or timing.

## The primitive: the MZI switch (`mzi_switch`)

An MZI has two inputs: an *incoming* beam `a` and a *control* beam `b`. When the control
beam is present, the incoming light leaves at the *bar* port. When it is absent, the light
leaves at the *cross* port:

```
bar_port   = a & b
cross_port = a & ~b
```

The design is costed in two figures of merit:

* **optical cost**: the number of MZI switches;
* **delay**: the number of switches in series, in units of one switch delay (Δ).

Splitters and combiners count as neither cost nor delay.

A **beam splitter** is plain fan-out: a signal read in two places. It has no module.
A **beam combiner** (`beam_combiner`) puts light out if light comes in on either input,
i.e. an OR. In every gate below, the two beams that meet at a combiner are never lit at the
same time. The OR is therefore also an XOR, which is how exclusive-or gets built from
switches that can only AND and AND-NOT. `beam_combiner` checks this rule with an immediate
assertion, controlled by the parameter `CHECK_EXCLUSIVE` (default on). A wiring error in a
gate therefore usually stops the simulation at the first bad vector.

## The three reversible gates

All three gates are 3-in/3-out (Feynman: 2-in/2-out) bijections. `.` is AND, `~` is NOT.

| gate | module | outputs | MZIs | delay |
|---|---|---|---|---|
| Feynman (CNOT) | `feynman_gate` | P = A, Q = A xor B | 2 in parallel | 1Δ |
| ORG-I | `org1_gate` | P = A.B + (A xor B).C, Q = A xor B, R = A.~B + ~(A xor B).C | 2 in parallel, then 1 | 2Δ |
| ORG-II | `org2_gate` | P = A.~B + B.C, Q = ~B.C + ~A.B, R = A.B + ~B.C | 3 in parallel | 1Δ |

ORG-I's P is the majority of A, B, C, i.e. the full-adder carry. Its Q is the half sum. Its R
is the extra output that keeps the gate reversible.

Truth tables, rows `ABC = 000 … 111`, each entry `PQR`:

```
ORG-I : 000 001 010 110 011 111 100 101
ORG-II: 000 011 010 110 100 111 001 101
```

How the switches are wired (MZI(x, y) has incoming beam x and control y):

* **Feynman**: MZI(A, B) gives A.B and A.~B. MZI(B, A) gives ~A.B. Then P = A.B + A.~B and
  Q = A.~B + ~A.B.
* **ORG-I**: MZI(A, B) and MZI(B, A) run in parallel and give A.B, A.~B and ~A.B.
  Q = A.~B + ~A.B. A second-stage MZI(C, Q) gives C.Q and C.~Q. Then P = A.B + C.Q and
  R = A.~B + C.~Q. The third switch has to wait for Q, which is why the gate takes 2Δ.
* **ORG-II**: MZI(A, B), MZI(C, B) and MZI(B, A) all run in parallel. They give A.B, A.~B,
  B.C, ~B.C and ~A.B. Three combiners form P, Q and R.

One bar output of each gate (the second copy of A.B) is left unused. In the RTL it is called
`unused_ba`.

## One-bit reversible full adder (`rev_full_adder`)

Feed ORG-I's outputs P, Q, R, in that order, into ORG-II's inputs A, B, C:

```
(A, B, Cin) --ORG-I--> (carry, A xor B, R) --ORG-II--> (A, A xor B xor Cin, Cin)
```

ORG-II undoes everything except the sum. It hands back A and Cin, and the carry exists only
on the line between the two gates. Cost 6, delay 3Δ. On its own this block does not
output the carry. The N-bit adder below taps the carry between the two gates.

## The N-bit adder (`rev_ripple_adder`)

This is the core of the design. Think of the circuit as 2N+2 horizontal lines, each
carrying one bit from left to right. Gates act on a few lines at a time:

```
line   A_-1   A_0   B_0   A_1   B_1  ...  A_N-1  B_N-1   A_N
in     c0     a_0   b_0   a_1   b_1       a_N-1  b_N-1   z
out    c0     a_0   s_0   a_1   s_1       a_N-1  s_N-1   z ^ c_N
```

Bit i's ORG-I and ORG-II are the two halves of the full adder above. They cannot be placed
next to each other: the carry out of bit i must travel to bit i+1 before bit i's ORG-II can
run. So the circuit is a V shape of two sweeps:

1. **Down sweep (carry generation).** For i = 0 … N-1, ORG-I acts on
   (C = A_{i-1}, A = A_i, B = B_i). It writes the carry c_{i+1} onto line A_i, which is the
   C input of the next ORG-I. It writes a_i ^ b_i onto B_i and its R output onto A_{i-1}.
   After the sweep:
   * A_{N-1} holds c_N;
   * every B_i holds a_i ^ b_i;
   * every A_{i-1} holds a_i.~b_i + ~(a_i ^ b_i).c_i.
2. **Carry copy.** A Feynman gate with control A_{N-1} and target A_N XORs the final carry
   onto z.
3. **Up sweep (sum and uncompute).** For i = N-1 … 0, ORG-II acts on
   (A = A_i, B = B_i, C = A_{i-1}). It is bit i's second half-adder. It restores a_i on A_i,
   writes s_i on B_i and restores c_i on A_{i-1}. That line is the A input of the next ORG-II
   up, so the restored carries ripple back to the top, ending with c0 on A_-1.

Worked example, N = 4: a = 1011₂ (11), b = 0110₂ (6), c0 = 1, z = 0. Bits are listed from
bit 0 upward.

| line | A_-1 | A_0 | A_1 | A_2 | A_3 | A_4 (z) | B_0 | B_1 | B_2 | B_3 |
|---|---|---|---|---|---|---|---|---|---|---|
| input | 1 | 1 | 1 | 0 | 1 | 0 | 0 | 1 | 1 | 0 |
| after down sweep | 1 | 1 | 0 | 1 | 1 (c_4) | 0 | 1 | 0 | 1 | 1 |
| after carry copy | 1 | 1 | 0 | 1 | 1 | 1 | 1 | 0 | 1 | 1 |
| output | 1 (c0) | 1 | 1 | 0 | 1 | 1 (carry) | 0 | 1 | 0 | 0 |

The B lines end as 0010₂ with carry 1, i.e. 18 = 11 + 6 + 1. The A lines are back to 1011₂.

### Cost and delay

| | per bit | fixed | N = 4 | N = 8 | N = 1024 |
|---|---|---|---|---|---|
| MZI switches instantiated | 6 | 2 | 26 | 50 | 6146 |
| published optical cost | 6 | 1 | 25 | 49 | 6145 |
| delay (Δ) | 3 | 1 | 13 | 25 | 3073 |

The published cost formula prices the carry-copy Feynman gate at one switch. The Feynman gate
built here, and its standalone cost figure, both use two switches. The instantiated count is
therefore one higher.

The delay figure needs no such correction. The down sweep is a chain of N ORG-I gates
(2Δ each) and the up sweep a chain of N ORG-II gates (1Δ each). The first ORG-II cannot start
before the Feynman gate: that gate's pass-through output P = A is itself made by its
switches. A longest-path computation over the gate network gives 3N+1, the same as the
published figure.

`optical_pkg` holds the per-gate figures and four functions:

* `published_adder_cost`;
* `published_adder_delay`;
* `built_adder_mzi_count`;
* `adder_gate_depth`, which computes the longest path by walking the gate list.

`rev_ripple_adder` exposes the four values as the localparams `MZI_COUNT`,
`PUBLISHED_COST`, `PUBLISHED_DELAY` and `GATE_DEPTH`. `adder_gate_depth` uses fixed work
arrays, so the adder accepts N from 1 to 2048. This limit is an elaboration check, not a
property of the circuit.

## Choices made in this RTL

These points are this implementation's, not the published design's:

* **Pin order of the up sweep.** Each ORG-II takes A_i on input A, B_i on B and A_{i-1} on C.
  This is the order of the one-bit full adder. Swapping A and B does not restore a_i: when
  a_i = b_i it yields a_i.c_i.
* **Switch-level wiring inside each gate.** Which beam feeds which MZI port follows from the
  gates' Boolean functions and from their published switch, splitter and combiner counts
  (Feynman 2/2/2, ORG-I 3/4/3, ORG-II 3/4/3). It is not a port-by-port copy of any drawing.
* **No time.** Everything is zero-delay combinational logic. Δ exists only as a count.
  There is no clock, register or reset, and none is needed.
* **The combiner exclusivity assertion** is an added check; the published design states no
  such rule.
* **Default size N = 4**, the size of the published worked example. The published comparison
  covers 8 to 1024 bits. Those sizes are set with the `N` parameter and are all tested
  (see below).

Not modelled: the amplifiers and couplers inside the MZI, optical power, loss, wavelength
and crosstalk. The other reversible gates (Toffoli, Fredkin, Peres, TR) and the adders
they build are comparison points only, and are not included.

## Files and interfaces

RTL (`rtl/`), bottom-up:

| file | contents |
|---|---|
| `optical_pkg.sv` | per-gate cost/delay, adder cost/delay functions |
| `mzi_switch.sv` | `a, b -> bar_port, cross_port` |
| `beam_combiner.sv` | `in0, in1 -> out`, parameter `CHECK_EXCLUSIVE` |
| `feynman_gate.sv` | `a, b -> p, q` |
| `org1_gate.sv`, `org2_gate.sv` | `a, b, c -> p, q, r` |
| `rev_full_adder.sv` | `a, b, cin -> p (=a), sum, r (=cin)` |
| `rev_ripple_adder.sv` | parameter `N`; `c0_in, a_in[N], b_in[N], z_in -> c0_out, a_out[N], s_out[N], z_out` |
| `optical_rev_adder_top.sv` | top: the N-bit adder (same ports) beside the one-bit full adder (`fa_a, fa_b, fa_cin -> fa_p, fa_sum, fa_r`) |

Vectors are little-endian: bit i of `a_in` is a_i. All outputs are combinational functions
of the inputs.

## Simulating

Each testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>`, and a watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/optical_pkg.sv tb/tb_optical_rev_adder_top.sv \
          --top-module tb_optical_rev_adder_top -Mdir obj -o sim && ./obj/sim
```

Replace the testbench name to run another. Files are found by module name through `-I`.

| testbench | what it checks |
|---|---|
| `tb_mzi_switch`, `tb_beam_combiner` | all input patterns against hand-written expectations |
| `tb_feynman_gate`, `tb_org1_gate`, `tb_org2_gate` | full truth tables, and that the outputs form a permutation |
| `tb_rev_full_adder` | all 8 inputs against integer addition, plus the internal carry |
| `tb_rev_ripple_adder` | N = 4, all 1024 inputs: outputs, every intermediate line after each sweep, bijectivity, cost/delay localparams |
| `tb_optical_rev_adder_top` | top at default parameters, all 1024 adder inputs and 8 full-adder inputs |
| `tb_adder_workloads` | N = 8, 16, 32, 64, 128, 256, 512 and 1024: directed and random additions, and the published cost and delay at each width |

`tb_optical_rev_adder_top` counts how often each behaviour occurs and fails if one never
does:

* a carry entering at c0 and rippling through every bit;
* a carry out;
* z being cleared by a carry;
* the carry in changing the sum;
* the inputs being restored.

`tb_adder_workloads` uses the helper `tb/adder_size_check.sv`. At each width it runs these
directed cases:

* all zeros;
* all ones with carry in;
* a = ~b with carry in, which makes the carry propagate without being generated.

It then runs random vectors.

## Changing it

* **Width**: set `N` on `rev_ripple_adder` or `optical_rev_adder_top`. The structure is
  generated, so any N from 1 to 2048 elaborates.
* **A different gate realisation**: keep the port lists of `org1_gate`/`org2_gate`. The
  truth-table testbenches and the combiner assertion will show whether a new switch wiring
  still computes the same function with exclusive combiner inputs.
* **Timing studies**: the RTL carries no delays. Cost and depth come from `optical_pkg`. If
  you change a gate's switch structure, update its constants there.
