# Sequential logic from T-gates and a decoder over GF(P^m)

A finite-state machine normally has next-state logic: a tangle of gates
whose inputs mix the present state and the input and whose outputs go back
into the state register. This design builds the machine from a fixed
structure instead:

* The state is a code of **m digits** V_{m-1}..V_0, each an element of GF(P).
  So a machine over GF(P^m) has up to P^m states.
* Each state digit is stored by a **T-gate**: a selector with P^m data
  inputs I_0..I_{P^m-1} and an m-digit control code. The **present input
  symbol** drives the control code of every T-gate.
* A **decoder D** turns the stored state code into P^m one-hot lines
  Z_0..Z_{P^m-1}. Line j is the indicator of "the present state has code j".
* Data input I_i of the T-gate for digit V_k receives a **sum of state
  indicators**: the sum, in GF(P), of the indicators of every present state
  from which input symbol i leads to a next state whose digit V_k is 1.

This gives the state equation

    V_k(t+1) = sum over i of ( sum of S_j(t) over the predecessors S_j ) * I_i

The input symbol selects one of the I_i. The decoder supplies the S_j. The
only machine-specific part is which state lines are added into which T-gate
input. You read that directly from a *predecessor table* (for each next
state and input symbol, the list of previous states). No next-state logic
has to be minimised. The output is a sum of decoder lines as well (a Moore
output).

## Digits and codes

A P-valued digit travels as an unsigned binary number 0..P-1 on
`digit_width(P)` wires: 1 wire for P = 2, 2 wires for P = 3, and so on. A
code is a packed array `[M-1:0][DW-1:0]`. Element `[M-1]` is the most
significant digit. The number of a code (the T-gate input it selects, the
decoder line it drives) is its base-P value, sum(a_k * P^k). When P is not a
power of two a wire pattern can hold a value >= P. Such an invalid digit
selects no T-gate input (output 0) and drives no decoder line. The GF(P)
sum reduces each addend mod P.

## Blocks

| module | what it is |
|---|---|
| `sdls_pkg` | `digit_width()`, and the state codes of the example machine |
| `t_gate` | P^M-to-1 selector of P-valued digits, with an optional output register (`REG_OUT`, default 1) |
| `digit_decoder` | M digits to P^M one-hot lines |
| `gfp_adder` | sum mod P of `N_IN` digits (XOR for P = 2) |
| `sdls_core` | M registered T-gates sharing one control code, plus the decoder; the T-gate data inputs are ports |
| `sdls_top` | the five-state example machine over GF(2^3) |

`sdls_core` is generic in P and M. Each machine is made by wiring adders
from its `lines` output to its `tg_in` input, as `sdls_top` does. The core
is tested both for GF(2^3) and for GF(3^2).

Timing is the same everywhere. At each rising clock edge every T-gate
stores the input its control code selects, so the state advances by one step
per clock. The decoder lines and the output then follow combinationally from
the new state. `rst_n` is an active-low **synchronous** reset to code 0.

## The example machine (`sdls_top`)

The machine uses five of the eight codes of GF(2^3):

| state | V2 V1 V0 | decoder line |
|---|---|---|
| S0 (start) | 000 | Z0 |
| S1 | 001 | Z1 |
| S2 | 010 | Z2 |
| S6 | 011 | Z3 |
| S3 | 100 | Z4 |

Its input symbols e0..e3 are applied as `in_sym` = 0..3. The predecessor
table:

| next state | e0 | e1 | e2 | e3 |
|---|---|---|---|---|
| S0 | – | – | S0, S3 | S1, S2 |
| S1 | S1, S2 | S0, S3, S6 | – | – |
| S2 | S0, S6 | S1, S2 | – | – |
| S3 | – | – | – | S0, S3, S6 |
| S6 | – | – | S1, S2 | – |

Only S3 has V2 = 1. S2 and S6 have V1 = 1, and S1 and S6 have V0 = 1. This
gives the three T-gate equations:

    V2(t+1) = (S0+S3+S6)·I3
    V1(t+1) = (S0+S6)·I0 + (S1+S2)·I1 + (S1+S2)·I2
    V0(t+1) = (S1+S2)·I0 + (S0+S3+S6)·I1 + (S1+S2)·I2

Three two- or three-input adders (S0+S3+S6, S0+S6 and S1+S2) feed all seven
used T-gate inputs. The other 17 T-gate inputs are tied to 0. Since
unlisted inputs are zero, every undefined step returns the machine to S0
(code 000). That covers the "–" entries, such as S3 under e0 or S6 under
e2, the symbols e4..e7, and the unused codes 101, 110 and 111. Treat this
as a property of the tie-offs, not a specified behaviour.

**Output.** `z` is the GF(2) sum of the decoder lines that the parameter
`Z_LINES` selects. The default, `8'b0000_0110`, gives Z = S1 + S2. The
machine's accepting ("goal") states are S2 and S6, and
`Z_LINES = 8'b0000_1100` gives Z = S2 + S6 instead. Both settings are
tested. If you need the output to be true in the goal states, use the
second one. The default follows the output equation as it was given for
this machine.

Ports: `clk`, `rst_n`, `in_sym[2:0]`, and the outputs `state_code[2:0]`
(V2 V1 V0), `state_lines[7:0]` (Z0..Z7) and `z`.

Cost: 3 T-gates (3 flip-flops), one 3-to-8 decoder and 4 adders. The
original comparison lists two T-gates for this machine, but three state
digits need three.

## Where this RTL departs from, or adds to, the method

* **The state register.** The method calls the structure "without
  feedback". Here the state is held by a register on each T-gate output,
  and the decoder lines return to the T-gate inputs through the adders. A
  clocked machine needs that loop; it passes through the register, so there
  is no combinational loop.
* The binary encoding of digits and of input symbols, the base-P numbering
  of inputs and lines, the synchronous reset, and the handling of invalid
  digits are choices of this design.
* The state-to-code assignment of the example is used as given. The general
  procedure for assigning GF(P^m) elements to codes is not built: it is a
  design-time step with no hardware.
* Only Moore outputs are built. A Mealy output would need the input symbol
  as well.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/sdls_pkg.sv tb/sdls_ref_pkg.sv rtl/*.sv tb/tb_sdls_top.sv \
        --top-module tb_sdls_top -Mdir obj_tb_sdls_top
    ./obj_tb_sdls_top/Vtb_sdls_top

Swap in `tb_sdls_top_goal`, `tb_sdls_core`, `tb_t_gate`, `tb_digit_decoder`
or `tb_gfp_adder` the same way. The packages must come first on the command
line.

* `tb_sdls_top` runs the example at its default parameters for 4000 cycles.
  It uses random symbols, about 10 % of them e4..e7, and occasional resets.
  After every edge it compares the state code, the decoder lines and `z`
  with a reference model in `tb/sdls_ref_pkg.sv`, which reads the
  predecessor table above directly. It also fails unless all 18 listed
  transitions were taken, at least one unlisted pair and one out-of-range
  symbol were applied, a reset came from a state other than S0, and `z` was
  seen both high and low.
* `tb_sdls_top_goal` is the same test with Z = S2 + S6.
* `tb_sdls_core` drives random T-gate inputs and control codes into
  GF(2^3) and GF(3^2) cores. It checks the one-clock state step and the
  one-hot decoder lines.
* `tb_t_gate`, `tb_digit_decoder` and `tb_gfp_adder` test the building
  blocks against values computed independently, including the ternary and
  quinary cases and invalid digits.

## Changing it

To build another machine, choose P and M and a code for each state. Write
its predecessor table. For each digit k and symbol i, connect T-gate input
`tg_in[k][i]` to the GF(P) sum of the state lines of those predecessors
whose next state has digit k set. For P > 2, a natural extension is to
weight each state line by the value of digit k in the next state. The core
and the blocks support that, but no such machine is included or tested.
Tie all other inputs to 0, and make the
output a sum of decoder lines. `sdls_top.sv` is a complete worked instance
of this.
