# HART: a hardware tautology checker

Logic minimizers spend most of their time asking one question: is a cube `c`
contained in a sum-of-products `F`?  That question reduces to another: is a
sum-of-products identically 1 (a *tautology*)?  In software this is expensive,
because tautology is co-NP-complete.  When the function has few variables,
hardware can answer it directly.  It enumerates the whole truth table: one
storage cell per minterm, all cleared at the start.  Each cube of the
expression sets the cells of the minterms it covers.  At the end, a wide AND
says whether every cell was set.

This repository holds synthesizable SystemVerilog for that machine, HART
(Hardware Tautology checker), in the size of the original experimental
system: 8 variables and 256 cells.  It is reconfigurable to 6 binary inputs
plus a 4-valued output part, and has a mask unit that checks `c <= F`
directly.  Next to it are the basic 3-variable checker and a companion
circuit for test generation.  That circuit does not just say "not a
tautology": it returns an input vector where the function is 0.

A host computer is expected to drive the checker.  For more than 8 variables
the host splits the problem into 8-variable sub-problems, cofactoring on the
extra variables.  It runs the minimization algorithm and sends each
sub-problem to the checker.  That software is not part of this repository;
one testbench contains a small model of the splitting step.

## Cube notation

Every variable `x_i` owns a two-bit *part* in positional notation:

| part `[1:0]` | meaning |
|---|---|
| `2'b10` | `x_i` (only the literal `x_i^1` is present) |
| `2'b01` | `~x_i` (only `x_i^0`) |
| `2'b11` | `x_i` does not appear (don't care) |
| `2'b00` | empty: the cube contains no minterm |

Bit 0 of a part is the literal `x^0` and bit 1 is `x^1`, so `part[v]` answers
"may `x_i` take value `v`?".  A cube of `N` variables is
`logic [N-1:0][1:0]`, with part 0 holding `x1`.  Minterm numbers put `x1` in
the most significant bit, so in a 3-variable checker cell `r5` is
`x1 ~x2 x3`.

A multiple-valued part generalises this.  A 4-valued part has four bits, one
per value.  The output part of a multiple-output function is such a part, and
bit `v` set means "this cube drives output `v`".

## The basic checker (`hart_basic`, N = 3)

Three stages, each its own module:

* **Minterm generator** (`minterm_gen`): line `m` is the AND of one literal
  per variable, `cube[i][m[N-1-i]]`.  It is high exactly when minterm `m`
  lies inside the applied cube.  The lines are not built as `2^N` separate
  `N`-input ANDs.  They come from a tree of split decoders.  Each decoder
  splits its variables into an upper half (rounded up) and a lower half,
  decodes each half, and ANDs every upper line with every lower line.  That
  costs `M(N) = 2^N + M(ceil(N/2)) + M(floor(N/2))` two-input gates, with
  `M(1) = 0`: 12 for N = 3, 88 for 6, 304 for 8, 1120 for 10.  These match
  the gate budget of the original design; synthesis reproduces them.
* **Latch part** (`latch_part`): `2^N` set-only cells.  Clear zeroes them.
  `apply` ORs the minterm lines into them.
* **AND gate part** (`and_part`): the AND of all cells, i.e. "tautology".

Example: `F = x1~x3 + x2x3 + x1~x2x3 + ~x1~x2 + ~x1x2~x3`.  The five cubes
set cells {r4, r6}, {r3, r7}, {r5}, {r0, r1} and {r2}.  After the fifth cube
all eight cells are 1 and `taut` rises, so `F` is a tautology.
`tb_hart_basic` replays exactly this sequence.

Timing: one cube per clock.  `clr` and `apply` are sampled at the rising
edge, and `taut` is valid the cycle after the last `apply`.  The cells are
clocked flip-flops, not level latches, and clear wins over a simultaneous
apply.

## The 256-cell checker (`hart8`)

The 256 cells are built from 32 *latch modules* (`hart_latch_module`) of 8
cells each, so that every module is a small 3-variable checker.  Cell `l` of
module `k` stands for minterm `8k + l`.

```
 host port ──► hart_host_if ──cube,apply──► hart_mask ──cube',apply'──┬──► hart_and_module ──sel[31:0]──┐
   (8 bit)        │  mode, mask_en, clr        (restrict to c)         │       (decode x1..x5)           │
                  │                                                    ├──► hart_ctrl ──q[3:0]──────────┤
                  │                                                    └──x6 part───────────────────────┤
                  │                                                                                     ▼
                  │                                              32 × hart_latch_module (8 cells each)
                  ▲                                                                                     │
                  └─────────────── taut ◄── 32-input AND (in hart_and_module) ◄── all_one[31:0] ───────┘
```

* **AND modules** (`hart_and_module`) decode the first five parts (`x1..x5`)
  with a 5-variable minterm generator.  The result is one select line per
  latch module, so a cube reaches only the modules whose `x1..x5` minterm it
  covers.  The same block ANDs the 32 module outputs into the final result.
* **Control module** (`hart_ctrl`) decodes the last four cube bits into four
  lines `q[3:0]`, one per value of the two lowest minterm bits.  The decoding
  depends on the configuration:
  * *8 inputs, 1 output*: the bits are the parts of `x7` and `x8`, and
    `q[2b+c] = x7^b & x8^c`.
  * *6 inputs, 4 outputs*: the bits are one 4-valued output part, and `q[v]`
    is its bit `v`.  Cell `8k + l` then means inputs `x1..x6 = {k, l[2]}`
    and output `l[1:0]`.  "All cells set" means every output is covered for
    every input, which is the tautology test of a multiple-output cover.
* **Latch module** sets cell `l = 4a + v` when `apply & sel & x6^a & q[v]`.
  In the 8-input configuration these are exactly the 8 AND terms of the
  3-variable checker over `x6 x7 x8`.

Changing the configuration does not clear the cells.  The host clears them
when it starts a new expression, normally in the same command write.

## Checking `c <= F` directly: the mask (`hart_mask`)

To use the checker for containment, `F` must first be *restricted* to `c`.
For every cube `d` of `F`:

1. intersect part by part, `t = d & c`.  If any part of `t` is empty, `d`
   does not meet `c` and is dropped;
2. widen every part, `t | ~c`.  This frees each variable that `c` fixes
   (takes out the constraint `c` places on it) and keeps the rest of `d`.

The restricted expression is a tautology exactly when `c` is contained in
`F`.  The mask module holds `c` in a register and applies this rewrite on the
fly to every cube on its way to the latch modules.  A dropped cube produces
no `apply`.  With the mask enabled, the host sends `F` unchanged and reads
the answer to `c <= F`.

Part boundaries follow the configuration.  In the 6-input/4-output
configuration the last four bits are one part, and that part is empty only
when all four are zero.  After reset the mask register holds the universal
cube (all ones), for which restriction changes nothing.

## Host port (`hart_host_if`)

An 8-bit register port, sized for an 8086-class host's I/O instructions:

| addr | name | access | contents |
|---|---|---|---|
| 0 | `REG_CUBE0` | W/R | cube bits 7:0 (parts `x1..x4`) |
| 1 | `REG_CUBE1` | W/R | cube bits 15:8 (parts `x5..x8`).  **Writing it applies the cube.** |
| 2 | `REG_CMD` | W/R | bit 0 clear cells (pulse), bit 1 configuration (0 = 8-in/1-out, 1 = 6-in/4-out), bit 2 mask enable, bit 3 load cube register into mask (pulse) |
| 3 | `REG_STATUS` | R | bit 0 tautology, bit 1 configuration, bit 2 mask enable |

Programming sequence for one tautology question:

```
write CMD    = {mask_load=0, mask_en=0, mode, clear=1}
for each cube: write CUBE0 = low byte; write CUBE1 = high byte
read STATUS  -> bit 0
```

For `c <= F`: write `c` into the cube registers (this applies it, which does
no harm).  Then write `CMD` with clear, mask load and mask enable all set,
and send `F`.

Timing: a write is sampled at a rising edge.  The apply, clear and mask-load
pulses happen in the next cycle, and the cells change at the edge after that.
The status bit is combinational from the cells.  The pulses of a `CMD` write
(clear, mask load) take effect together with its new mode and mask-enable
values.

## Test generation (`tgen`)

The same minterm generator and latch part feed a *zero-detection* part
(`zero_detect`) instead of the AND.  The zero detector is a priority encoder
that finds the lowest-numbered cell still at 0 and outputs its number as
`code`; `t` is 1 when no cell is 0.  Because `x1` is the most significant
bit, `code` is directly an input vector `(x1, x2, x3)` with `F = 0`: a test
vector.  `t = 1` means the function is a tautology and has no test.  For
8 cells this is the 8-input PLA truth table of the original proposal.  In
that table, entries to the right of the first zero are read as don't-cares.

## Top level (`hart_top`)

Three independent circuits side by side, sharing clock and reset:

* `h8_*`: the 256-cell checker behind its host port, plus its cells for
  observation;
* `h3_*`: the 3-variable basic checker;
* `tg_*`: the 3-variable test generator.

## Where this RTL departs from the original, and what it chooses

The original machine was built from 43 field-programmable logic arrays
(one per latch module, plus AND, control and mask modules) and TTL interface
chips.  This RTL keeps the split into latch, AND, control and mask modules.
Everything below is this design's own choice where the original is silent:

* **Storage**: clocked flip-flops with synchronous clear and asynchronous
  reset, instead of latches.
* **Host port**: register map, byte order and two-write apply protocol.
* **Control module**: switches configuration by pre-decoding the last four
  cube bits.  This makes a latch module's lower two variables arrive as four
  decoded lines instead of two positional parts.
* **AND modules**: choose latch modules on `x1..x5`, and they also hold the
  final 32-input AND.
* **Mask module**: its function ("let the checker test containment
  directly") is realised with the part-wise restriction rule above.  Its
  register, enable and reset value are invented here.
* **Zero detector**: treats entries right of the first zero as don't-cares,
  giving a plain priority encoder; output bits have weights 4/2/1.

Not built:

* the 7-input/2-output and 5-input/8-output configurations, which were only
  proposed as future work;
* test generation wider than 3 variables;
* any software: cube decomposition, the minimizer.

## Trust: what the testbenches check

Every module has a self-checking testbench in `tb/`, comparing against
references computed independently in the testbench:

| testbench | what it proves |
|---|---|
| `tb_minterm_gen` | all 64 three-variable cubes and 2000 random five-variable cubes against mask-based set membership |
| `tb_latch_part`, `tb_hart_latch_module` | random set/apply/clear against an accumulating model |
| `tb_and_part`, `tb_hart_ctrl`, `tb_zero_detect` | exhaustive |
| `tb_hart_and_module` | module selection against a per-variable filter, and the final AND |
| `tb_hart_mask` | 8-input mode checked *by meaning* (restricted cube equals the cofactor of `d`), 6x4 mode against the part rule, drops |
| `tb_hart_host_if` | register map, pulse widths, apply timing, status |
| `tb_hart_basic`, `tb_tgen` | the worked example cell by cell, then random expressions |
| `tb_hart8` | 256-cell checker: random expressions in both configurations (full cell comparison), mask containment vs. truth table, S(n)/T(n), latency |
| `tb_hart_top` | whole design at default size, end to end; also counts that every mechanism happened: clear, tautology, non-tautology, both configurations, switching, mask yes/no, dropped cube, test found, no test |
| `tb_hart_st_workload` | benchmark `S(n) = x1+...+xn` and `T(n) = S(n) + ~x1...~xn` for n = 6..13; for n > 8 the testbench splits on `x9..xn` like the host would (2..32 sub-problems) |

The `S(n)/T(n)` run shows the hardware's own cost.  Through the byte port,
one cube takes 4 clocks with the testbench's write pacing.  T(8) completes
in 39 clocks and T(13) in 1444 clocks over 32 sub-problems.

## Simulating

All files are plain SystemVerilog (IEEE 1800-2017); `rtl/hart_pkg.sv` must be
read first.  With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_hart_top \
    -y rtl -y tb +libext+.sv rtl/hart_pkg.sv tb/tb_hart_top.sv
./obj_dir/Vtb_hart_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.  Every
testbench has a watchdog that fails it if it runs too long.  Substitute any
`tb_*` name to run another.  `verilator --lint-only -Wall -y rtl
rtl/hart_pkg.sv rtl/hart_top.sv` lints the design.

## Changing it

* The minterm generator, latch part, AND part, basic checker, test
  generator and zero detector are parameterised by `N`/`W`.
* The 256-cell checker is fixed by `HART_N = 8` and `LM_VARS = 3` in
  `hart_pkg`.  A larger checker needs more latch modules and a wider cube
  register: `hart_and_module` scales through `NSEL`, but the host port is
  written for a 16-bit cube.
* Register addresses and command bits live in `hart_pkg`.
