# Modified carry select adder (MCSA) with binary to excess-1 converters

A carry select adder cuts an N-bit addition into short blocks and computes
every block twice in parallel, once assuming the carry into it is 0 and once
assuming it is 1. When the real carry arrives from below, a multiplexer
picks the right result, so the carry crosses each block through one
multiplexer instead of rippling through every bit. The price is area: the
textbook version needs two ripple carry adders per block.

This adder keeps the speed idea but drops the second ripple carry adder.
Each block has one 4-bit ripple carry adder working with a carry-in of 0.
Its 5-bit result (four sum bits plus carry out) is then incremented by a
**binary to excess-1 converter (BEC)**, a small circuit that adds 1. The
incremented value is exactly what the block would have produced with a
carry-in of 1. The 5-bit multiplexer then selects the plain or the
incremented result. A 5-bit BEC needs far fewer gates than a 4-bit full
adder chain, so the adder gets smaller, at the cost of a little delay:
the BEC sits after the ripple adder instead of beside it.

The RTL is written at gate level in AND/OR/INVERTER form, so that the
netlist maps one to one onto the unit-gate area and delay model used to
cost it (see [Gate-level cost model](#gate-level-cost-model)).

## Structure

```
             a[3:0] b[3:0] cin     a[7:4] b[7:4]            a[63:60] b[63:60]
                  |                     |                          |
             +---------+          +-----------+              +-----------+
             | rca     |          | mcsa_group|              | mcsa_group|
             | 4-bit,  | carry[1] |  block 1  | carry[2] ... |  block 15 |--> cout
             | with cin|--------->|           |------------->|           |
             +---------+          +-----------+              +-----------+
                  |                     |                          |
              sum[3:0]              sum[7:4]                  sum[63:60]

  mcsa_group (one 4-bit block):
      a,b --> rca (carry-in 0; bit 0 is a half adder) --> {c0, s0}  (5 bits)
                                                            |
                                          +-----------------+
                                          |                 |
                                          |           bec (5-bit, +1)
                                          |                 |
                                        d0|               d1|
                                       mux2 #(5), select = carry from below
                                                 |
                                            {cout, s[3:0]}
```

* **Block 0** is an ordinary 4-bit ripple carry adder fed by the adder's
  carry-in. It has nothing to select between, so it has no BEC.
* **Blocks 1 to N/4-1** are `mcsa_group` instances. All of them compute
  their two candidate results at the same time as block 0 ripples. After
  that the only serial path is the chain of 5-bit multiplexer selects.
* The BEC never wraps inside a block: the largest 4-bit sum is
  15 + 15 = 30 = `11110`, and adding 1 gives `11111`.

### The binary to excess-1 converter

For a W-bit input b, the output is x = b + 1 modulo 2^W:

```
x[0] = ~b[0]
x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])      for i >= 1
```

A bit flips exactly when every bit below it is 1. The AND terms are built
as a chain, each reusing the one below it, so a 5-bit BEC uses 1 inverter,
3 AND gates and 4 XORs. The 4-bit version maps 0000..1110 to 0001..1111
and 1111 to 0000. `bec_mux` adds the 2W:W multiplexer, which is the
"add 0 or 1" cell a block uses.

## Modules

| module | role | default parameters |
|---|---|---|
| `mcsa_pkg` | block width `GROUP_W` = 4, `BEC_W` = 5, `num_groups()` | |
| `xor_aoi` | XOR as `(a & ~b) \| (~a & b)` | |
| `mux2` | W-bit 2:1 multiplexer, `(d0 & ~sel) \| (d1 & sel)` | `W = 1` |
| `half_adder` | `s = a ^ b`, `c = a & b` | |
| `full_adder` | two XORs, carry `ab \| (a^b)cin` | |
| `rca` | W-bit ripple carry adder; `CIN_ZERO = 1` gives the carry-in-0 form with a half adder at bit 0 | `W = 4`, `CIN_ZERO = 0` |
| `bec` | binary to excess-1 converter | `W = 5` |
| `bec_mux` | BEC and multiplexer: `inc ? b+1 : b` | `W = 5` |
| `mcsa_group` | one 4-bit carry select block | |
| `mcsa` | N-bit combinational adder, `{cout, sum} = a + b + cin` | `N = 64` |
| `mcsa_top` | `mcsa` between input and output registers | `N = 64` |

Every module except `mcsa_top` is purely combinational.

### `mcsa` interface

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | N | operands (unsigned; two's complement works too, cout is then the carry not overflow) |
| `cin` | in | 1 | carry-in |
| `sum` | out | N | a + b + cin, low N bits |
| `cout` | out | 1 | carry out |

N must be a positive multiple of 4. Elaboration stops with an error
otherwise. The adder is meant for 8, 16, 32 and 64 bits; 64 is the
default.

### `mcsa_top` interface and timing

`mcsa_top` adds `clk` and an asynchronous active-low `rst_n` to the ports
above. `a`, `b` and `cin` are registered on a rising edge. The sum and
carry out are registered on the next rising edge. A result is therefore
at the outputs two rising edges after its operands were applied, and a
new addition can start every cycle. The register-to-register path is the
adder itself, so the clock rate is set by the adder's delay. Reset clears
every register to 0. The top has 3N + 4 pins: a, b, sum, cin, cout, clk
and rst_n, which is 196 at 64 bits.

## Gate-level cost model

Every AND, OR and INVERTER gate counts 1 unit of area and 1 unit of delay.
The cells are written to match these figures:

| cell | delay | area |
|---|---|---|
| XOR | 3 | 5 |
| 2:1 MUX | 3 | 4 |
| half adder | 3 | 6 |
| full adder | 6 (sum) | 13 |

The figures below are counted from this RTL's structure. They are this
implementation's counts, not a reproduction of any published synthesis
result. In a W-bit `mux2` all bits share one select inverter, so the 5-bit
multiplexer has 16 gates.

| part | gates |
|---|---|
| block 0: 4 full adders | 52 |
| one `mcsa_group`: half adder + 3 full adders (45), 5-bit BEC (24), 5-bit mux (16) | 85 |
| same block built conventionally, with a second 4-bit ripple adder for carry-in 1 (52) instead of the BEC | 113 |

| width | MCSA gates (52 + 85·(N/4 − 1)) | conventional CSA, same cells |
|---|---|---|
| 8 | 137 | 165 |
| 16 | 307 | 391 |
| 32 | 647 | 843 |
| 64 | 1327 | 1747 |

So each block after the first is about 25 % smaller. Timing in the same
model, 64 bits: block 0's carry out settles after 11 units. A block's
candidate results ({c0, s0} after the ripple adder, and the BEC output)
are ready after about 14 units. They pass the multiplexer data path by
about 16. Block 1 therefore delivers its carry out at about 16, not at
11 + 3. That is the BEC's delay penalty. Each of the remaining 14
multiplexer stages adds up to 3 units, so the worst path is about 58
units. A 64-bit ripple carry adder needs roughly 130.

Synthesis tools will restructure this logic. The gate-level style keeps
the intended structure visible and simulable. It does not force a
particular netlist.

## What is fixed by the design and what is chosen here

Taken from the design:
* single ripple carry adder with carry-in 0 plus BEC per block, instead of two ripple adders;
* 4-bit blocks with a 5-bit BEC, the same width in every block;
* the BEC function, and the BEC-plus-multiplexer selection cell;
* the AND/OR/INVERTER gate costs of XOR, MUX, half and full adder;
* the widths 8, 16, 32 and 64, with 64 as the main one.

Chosen here, where the design leaves it open:
* the lowest block is a plain 4-bit ripple adder with the external carry-in, and has no BEC;
* the carry-in-0 ripple adder uses a half adder at bit 0;
* the exact gate arrangement of the XOR, multiplexer and full adder. Each is the simplest form with the stated gate counts;
* the BEC's AND terms are built as a chain;
* `mcsa_top`'s single register stage on each side, two-edge latency, and asynchronous active-low reset. The design is clocked and has 3N + 4 pins, but its registers are not described.

Not included: the conventional dual-ripple-adder carry select adder, which
is only a reference point for the comparison, and any FPGA-specific
mapping.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops on a watchdog if it hangs.

| testbench | what it covers |
|---|---|
| `tb_xor_aoi`, `tb_half_adder`, `tb_full_adder` | all input combinations |
| `tb_mux2` | 1-bit exhaustive, 4-bit (8:4) random |
| `tb_rca` | 4-bit, both forms, all 512 input combinations |
| `tb_bec` | 5-bit exhaustive; 4-bit against the full excess-1 truth table |
| `tb_bec_mux` | 5- and 4-bit, every input, both select values |
| `tb_mcsa_group` | all 512 input combinations |
| `tb_mcsa` | 8-bit exhaustive (131 072 cases); 16, 32, 64 bits on corner cases and 20 000 random operand sets |
| `tb_mcsa_top` | 64-bit top at default parameters: 20 000 back-to-back additions, exact two-edge latency, reset, and coverage counts |

`tb_mcsa_top` also counts how often each mechanism occurred. A mechanism
that never occurs counts as a failure. The mechanisms are:
* every block selecting its BEC result;
* every block selecting its plain result;
* a carry travelling from `cin` through all 16 blocks;
* a carry out of the adder;
* reset clearing the outputs.

Running a testbench with Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/mcsa_pkg.sv tb/tb_mcsa_top.sv \
          --top-module tb_mcsa_top -o sim
./obj_dir/sim
```

Replace `tb_mcsa_top` with any other testbench name. `-Irtl` lets
Verilator find each module in `rtl/<name>.sv`. All testbenches finish in
well under a second.

## Changing the design

* **Width:** set `N` on `mcsa` or `mcsa_top` (any multiple of 4).
* **Block width:** `GROUP_W` in `mcsa_pkg`. The BEC follows as `GROUP_W + 1`. The design uses 4, and the testbenches assume 4-bit blocks.
* **Pipeline/reset:** only `mcsa_top` has state. Change its registers there.
