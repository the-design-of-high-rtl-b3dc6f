# Carry Barrel Adder: integer addition by iterated half adders

The Carry Barrel Adder (CBA) adds two unsigned integers without a carry chain
in its logic. It holds the operands in two registers, A and B, and in each
clock cycle replaces them with:

- their bitwise sum without carries, `A xor B`;
- their carries, `A and B`, moved up one bit position.

Each step leaves the value `A + B` unchanged. The carries move up one
position per cycle until none is left. B is then zero and A holds the sum. The
logic between flip-flops is a single half adder per bit, so the clock can be
fast. The cost is latency: the number of cycles depends on the operands.

The hardware is a ring of identical bit cells. Each cell has a half adder
and two D flip-flops. The carry out of the top cell is wired back to the
bottom cell. That wrap-round is what makes it a "barrel".

The default build is a 16-bit adder with a 17-bit result. A 106-bit build is
one parameter away (`N = 106`).

## The iteration

The registers are `n + 1` bits wide for `n`-bit operands. The extra top bit
is the carry-out position, and it starts at 0. Number the positions from
1 to n+1. Step k computes, at every position at once:

```
S_i = A_i xor B_i            C_i = A_i and B_i          (half adder, i = 1..n+1)
A_i <= S_i                   (i = 1..n+1)
B_i <= C_{i-1}               (i = 2..n+1)
B_1 <= C_{n+1}               (the wrap-round)
```

It stops when B is all zeros. A is then the sum.

Why it works: `S_i + 2*C_i = A_i + B_i` at every position. So moving `C_i` up
one place into `B_{i+1}` keeps `A + B` the same. The wrap-round would turn a
top carry of weight `2^(n+1)` into a weight of 1. For n-bit operands it never
carries a 1, because `A + B <= 2^(n+1) - 2`. A carry out of the top position
would need a total of at least `2^(n+1)`. An assertion in `barrel_adder`
checks that the wrap stays 0.

How long it takes: each step moves every pending carry up one position.
Carries die out once they reach a position whose A bit is 0. So the number
of steps is set by the longest carry ripple in the operands, not by n:

| operands (n = 16)         | steps |
|---------------------------|-------|
| `b = 0`                   | 0     |
| no two bits overlap (`5 + 10`) | 1 |
| `0xFFFF + 0xFFFF`         | 2     |
| `0xFFFF + 1`              | 17 (n + 1, the worst case) |
| random operands           | about 4.2 on average (about 7 for n = 106) |

In the worst case, `2^n - 1` plus 1, the carry reaches position n+1 after n
steps. One more step then moves it into A. So the bound is n+1 steps, not n.

## Modules

| file | what it is |
|------|------------|
| `rtl/cba_pkg.sv` | Widths (`CBA_WIDTH = 16`, `CBA_WIDTH_WIDE = 106`) and the controller state type. |
| `rtl/half_adder.sv` | `s = a ^ b`, `c = a & b`. |
| `rtl/d_flip_flop.sv` | Rising-edge D flip-flop in the style of the 7474. It has `q` and `q_n` outputs and active-low asynchronous preset and clear. |
| `rtl/cba_cell.sv` | One ring position: a half adder, the A and B flip-flops, and a load multiplexer in front of each. |
| `rtl/barrel_adder.sv` | The top: N+1 cells in a ring, a zero detector on B, and a two-state controller. |

### `d_flip_flop`

`q` takes `d` on the rising clock edge. `pre_n = 0` forces `q` high at once,
without waiting for the clock. `clr_n = 0` forces it low. The 7474 does not
define what happens when both are asserted. Here clear wins and `q_n` stays
`~q`.

In the adder, preset is tied high and clear is driven by the reset. Some
synthesis front ends do not accept a single process with two asynchronous
controls. With such a tool, map this module to a library flip-flop that has
both set and reset, or drop the preset, which the adder does not use.

### `cba_cell`

The flip-flops have a control terminal, `load`. When `load` is high, they
take the operand bits `a_in` and `b_in`. Otherwise A takes the half-adder sum
and B takes `carry_in`, which is the carry of the next lower cell.

Once the whole B word is zero, a step changes nothing: `A xor 0 = A` and
every carry is 0. So the ring keeps clocking after an addition and still
holds its result. No clock enable is needed.

### `barrel_adder`: interface and timing

```
parameter int unsigned N = 16                     operand width
input  clk, rst_n                                 rst_n: asynchronous, active low
input  start, a[N-1:0], b[N-1:0]
output ready, done, sum[N:0], iterations[$clog2(N+2)-1:0]
```

- `ready` is high when the adder is idle.
- `start` while `ready` loads `{0,a}` into A and `{0,b}` into B at that
  clock edge. A `start` while busy is ignored.
- Steps run on the following edges. If start is seen at edge 0 and the
  addition needs k steps, they run at edges 1..k.
- `done` is high for one cycle, after edge k. So the result appears k+1
  cycles after start, and `ready` returns one edge later. With `b = 0`, `done`
  comes in the first cycle after start.
- `sum` is the A register, so it holds until the next start.
- `iterations` is k, the number of steps the last addition took. It is valid
  from `done` on.
- `rst_n` clears every flip-flop, the controller and the counter.

The controller has two states, IDLE and RUN. It leaves RUN when the zero
detector on B fires. `done` is simply "in RUN and B is zero", so it is
combinational from the flip-flops.

A second assertion checks that no addition takes more than N+1 steps.

## What is fixed by the algorithm and what is chosen here

Taken from the barrel-adder algorithm:

- the half-adder step;
- the n+1-bit registers with the top bit starting at zero;
- the wrap-round of the top carry;
- the stop condition (the carry word is zero);
- one half adder and D flip-flops per bit, with a control terminal on the
  flip-flops;
- the 16-bit main configuration and the 106-bit variant.

Chosen here:

- the start/ready/done handshake, the ignored start while busy, and the
  iteration counter;
- the asynchronous active-low reset;
- the reading of the control terminal as one load signal shared by all
  positions;
- the clear-wins rule in the flip-flop.

Things to keep in mind:

- The 106-bit adder has been published as running at 151.03 MHz on an FPGA.
  That clock rate is not something a simulation can confirm. The 106-bit
  build here is checked only for function and cycle counts.
- Latency depends on the data, from 1 to N+2 cycles from start to `done`.
  A user that needs a fixed latency must wait for the worst case.
- No synthesis results (area, clock rate) are given for this RTL.

## Verification

Each testbench checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_half_adder.sv` | All four input pairs. |
| `tb/tb_d_flip_flop.sv` | Random data, which must change only on rising edges. Asynchronous clear and preset, their holding over an edge, and clear winning over preset. |
| `tb/tb_cba_cell.sv` | Random load, operand and carry inputs against a model of the two stored bits. Asynchronous clear. |
| `tb/tb_barrel_adder.sv` | The 16-bit default build with no parameter overrides. About 3,000 random and directed additions. |
| `tb/tb_barrel_adder_wide.sv` | The same test at N = 106. |
| `tb/tb_barrel_adder_exhaustive.sv` | Every pair of 4-bit operands. |

The three adder tests check each addition three ways:

- the sum, against the simulator's own `+`;
- `iterations`, against a separate software model of the step;
- the exact cycle count from start to `done`. They also check that `done`
  lasts one cycle and that the sum holds after it.

They count how often each behaviour happened and fail if one never did:

- an addition with no step;
- one with the full N+1 steps;
- one with several steps;
- a carry into the top bit;
- an ignored start;
- a reset in the middle of an addition.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_barrel_adder rtl/cba_pkg.sv tb/tb_barrel_adder.sv
./obj_dir/Vtb_barrel_adder
```

To try another width, change `N` (for example
`barrel_adder #(.N(32)) u (...)`). Nothing else in the RTL depends on the
width.
