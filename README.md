# 16-bit square-root carry select adder with binary to excess-1 converters

A carry select adder cuts the long carry chain of a ripple carry adder into
groups. Each group computes its sum twice in parallel, once assuming a carry in
of 0 and once assuming 1, and the real carry from the group below only has to
steer a multiplexer. The carry then crosses one multiplexer per group instead of
one full adder per bit. In the "square-root" arrangement the groups grow in width
towards the most significant end. Each group's two candidate results are ready
at about the time the selecting carry reaches it, and the worst-case delay grows
roughly with the square root of the word width.

The plain carry select adder pays for its speed with a second ripple carry adder
in every group. This design removes that adder. The Cin=1 result of a group is
the Cin=0 result plus one, so a *binary to excess-1 converter* (BEC) produces it.
A BEC is an incrementer with no second operand: one inverter, and one AND plus
one XOR per higher bit. That is much less logic than a ripple carry adder of
the same width.

The RTL is plain, synthesizable SystemVerilog and purely combinational:

    {cout, sum[15:0]} = a[15:0] + b[15:0] + cin

## Group layout

| group | bits  | Cin=0 adder          | Cin=1 result | carry mux | select          |
|-------|-------|----------------------|--------------|-----------|-----------------|
| 0     | 1:0   | 2-bit RCA with `cin` | (none)       | (none)    | (none)          |
| 1     | 3:2   | 2-bit RCA, Cin=0     | 3-bit BEC    | 6:3       | carry of group 0 |
| 2     | 6:4   | 3-bit RCA, Cin=0     | 4-bit BEC    | 8:4       | carry of group 1 |
| 3     | 10:7  | 4-bit RCA, Cin=0     | 5-bit BEC    | 10:5      | carry of group 2 |
| 4     | 15:11 | 5-bit RCA, Cin=0     | 6-bit BEC    | 12:6      | carry of group 3 |

RCA means ripple carry adder. The carry out of group 4 is `cout`. The widths are
set in `sqrt_csa_pkg` (`group_width()`, and `group_lsb()` derived from it).

## How one group works

Take an N-bit group with operand slices `a`, `b` and select carry `sel`
(`csa_bec_group`):

1. `rca_cin0` adds `a + b` with no carry in. Its lowest bit is a half adder and
   the N-1 bits above it are full adders. The result is N+1 bits wide:
   `{c0, s0}`.
2. `bec` with N+1 bits computes `{c1, s1} = {c0, s0} + 1`. This is exactly
   `a + b + 1`, the result a second adder with Cin=1 would have given,
   carry bit included. The converter is why the BEC is one bit wider than the
   group's adder.
3. `cy_mux` outputs `{c1, s1}` when `sel` is 1 and `{c0, s0}` when it is 0.
   A group of N bits needs a 2(N+1):(N+1) multiplexer, giving the sizes 6:3 to
   12:6 in the table.

The BEC rule for bit i is: flip bit i when every bit below it is 1.

    x[0] = ~b[0]
    x[i] =  b[i] ^ (b[0] & b[1] & ... & b[i-1])

The AND terms are built as a chain, so the BEC adds one AND and one XOR per
bit. For the 3-bit BEC this gives one inverter, two XORs and one AND. The BEC
never wraps around inside a group: the largest Cin=0 result is
`2*(2^N - 1) = 2^(N+1) - 2`, so `{c0, s0}` is never all ones.

## Timing

Every path is combinational; there are no registers, clock or reset. The
critical path starts at the operands of the widest groups and ends in the
5-bit RCA, its 6-bit BEC and its multiplexer. It competes with the carry path,
which runs through group 0's 2-bit RCA and then one multiplexer per group. A
pipelined or registered version would wrap the top in flip-flops. The design
does not define where such flip-flops go.

## Modules

| file                   | role |
|------------------------|------|
| `rtl/sqrt_csa_pkg.sv`  | word width, number of groups, `group_width()`, `group_lsb()` |
| `rtl/sqrt_csa16_bec.sv` | top: group 0 RCA plus four `csa_bec_group` instances |
| `rtl/csa_bec_group.sv` | one carry-select group: Cin=0 RCA, BEC, carry mux |
| `rtl/rca.sv`           | N-bit ripple carry adder with carry in (group 0) |
| `rtl/rca_cin0.sv`      | N-bit ripple carry adder, carry in 0: half adder plus full adders |
| `rtl/bec.sv`           | N-bit binary to excess-1 converter |
| `rtl/cy_mux.sv`        | 2(N+1):(N+1) carry multiplexer |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit cells |

Inside the top, `grp_c[g]` is the carry out of group g, and `grp_c[4]` is
`cout`.

## Where this RTL departs from, or adds to, the published architecture

- **BEC equations.** The 3-bit converter is `X0 = ~B0`, `X1 = B1 ^ B0`,
  `X2 = B2 ^ (B0 & B1)`, which is the excess-1 truth table. The top bit is
  flipped only when the two bits below it are both 1.
- **Naming.** The converter is also called a "Booth encoder" in the
  published description. No Booth recoding is involved: the block is the excess-1
  converter described above.
- **Carry in.** Group 0 gets an external `cin`. This makes the port count
  2×16 + 16 + 2 = 50, which equals the reported I/O count of the published
  design.
- **Larger BECs.** The BEC equations are published only for 3 bits. The 4-,
  5- and 6-bit converters follow the same rule.
- **Gate-level cells.** The full adder, half adder and multiplexer are written
  in textbook form. The published work reports FPGA results (slices, LUTs,
  combinational delay on Spartan 2, Virtex 2 and Virtex E parts). This RTL
  does not attempt to reproduce those numbers.
- **Flip-flops.** One of the published result tables lists 36 flip-flops for
  the design without saying where they sit. None are built here.
- **Not included.** The conventional square-root carry select adder with two
  RCAs per group is not included. It serves only as the baseline the BEC
  version is compared against.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
arithmetic computed in the testbench:

- `tb_bec`: all inputs of the 3-bit and 6-bit converters, plus the published
  truth-table rows.
- `tb_rca`, `tb_rca_cin0`: exhaustive tests at 2 and 5 bits.
- `tb_cy_mux`: exhaustive for 6:3; 2000 random inputs for 12:6.
- `tb_csa_bec_group`: exhaustive over a, b and the select for 2-bit and 5-bit
  groups.
- `tb_sqrt_csa16_bec`: the top at its only size. It runs directed corner
  cases, 200,000 random operand pairs and checks the full 17-bit result. It
  also counts, per group, how often the multiplexer took the BEC result and
  how often the adder result. It counts carry outs and carries that run
  through every group, and fails if any of these never happens.

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog ends it with a failure if it runs too long.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/sqrt_csa_pkg.sv \
        tb/tb_sqrt_csa16_bec.sv --top-module tb_sqrt_csa16_bec -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/sqrt_csa_pkg.sv rtl/<module>.sv`.

## Changing the design

- **Group sizes.** Edit `group_width()` and `NUM_GROUPS` in `sqrt_csa_pkg`.
  Keep the widths summing to `WIDTH`.
- **Other word widths.** Change `WIDTH` in the same package. The top testbench
  takes the widths from the package, but a few of its directed cases are
  written as 16-bit constants.
- **Group 0.** Group 0 stays a plain RCA with the carry input.
