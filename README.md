# Fault-tolerant RAM with active redundancy and concurrent online testing

A RAM for safety-critical systems has to find its own faults while the
system keeps running, and has to survive them. This design splits the
memory into `M` equal logic modules and stores them in `M+2` identical
RAM modules, each with a built-in self test (BIST). At any moment one of
the physical modules is being self-tested and holds no data. When no module
has failed, another one is an idle stand-by. Every period the test moves to
a neighbouring module: that module's contents are first copied into the
module that was just tested. Over time every module gets tested without
stopping the system for longer than one copy. A module that fails its test
is retired for good, and the stand-by takes its place. Up to two module
failures are tolerated.

What makes this work is a small combinational **memory control unit**. It
sends each logic address to the right physical module, whatever modules
are under test or retired. It adds only two gate delays to the access path.

## Module map

```
memory_system                      top: host port, module array, status
 ├─ logic_addr_decoder             module field of the address -> one-hot A1..Am
 ├─ state_register                 SR: 1 = module inoperable (under test or failed)
 ├─ mem_ctrl_unit                  cellular control unit: A, SR -> select S1..S(m+2)
 │   ├─ sb_first                   SB1
 │   ├─ sb_second                  SB2
 │   ├─ sb_cell   (x m-2)          SB3..SBm, identical cells
 │   ├─ sb_spare1                  SB(m+1)
 │   └─ sb_spare2                  SB(m+2)
 ├─ cu_self_check                  control unit count vs. ones in SR
 ├─ online_test_ctrl               moves the test across the array, copies data, retires modules
 └─ bist_ram      (x m+2)          RAM module with March C- self test
fts_pkg                            shared types (count code, sequencer states, march elements)
```

## Address mapping: the state register and the selection chain

`SR` has one bit per physical module. A 1 means "do not use". The module
is either under test or retired. Logic module *i* lives in the *i*-th
physical module with a 0 in `SR`, counting from M1 upward. Because at most
two modules are marked, logic module *i* is always in physical module *i*,
*i+1* or *i+2*.

The control unit is a chain of selection blocks, one per physical module.
Block *j* receives a two-bit code `{x2,x1}` that says how many of the
modules to its left are marked:

| `{x2,x1}` | marked modules among M1..M(j-1) |
|-----------|---------------------------------|
| `00` | none |
| `01` | one |
| `10` | two |
| `11` | more than two |

From that code block *j* knows which logic address it serves. If its own SR
bit is 0, it raises its select `Sj` for `Aj` with code 00, for `A(j-1)` with
code 01, and for `A(j-2)` with code 10. It then adds its SR bit to the code
for the next block, stopping at 11. The end blocks are cut-down versions:

* SB1 serves only A1. Its count is simply SR1.
* SB2 serves A2 or A1 and builds the first two-bit code.
* SB(m+1) serves Am with one mark to its left, or A(m-1) with two.
* SB(m+2) serves Am only when exactly two of M1..M(m+1) are marked.

Each `S` output is written as a NAND of NANDs. Each product term holds one
address bit, and the code and SR terms are stable long before an access. So
the path from address to module select is two gate levels. The code chain
ripples through all `M+2` cells, but it depends only on `SR`, which changes
once per test period.

The code leaving SB(m+2) counts all marked modules. `cu_self_check` counts
the ones in `SR` on its own and raises `cu_err` if the two disagree. This
catches a broken control unit. It raises `mem_fail` when more than two modules
are marked, because some logic modules are then unreachable.

Example with m = 8 (modules 1..10). M3 has failed and M7 is under test, so
`SR = 0001000100` (M10 on the left, M1 on the right). The mapping is
A1→M1, A2→M2, A3→M4, A4→M5, A5→M6, A6→M8, A7→M9 and A8→M10.

## Online testing

`online_test_ctrl` keeps exactly one working module marked as "under
test". After reset this is M(m+2), and the sequencer waits for
`test_enable`. It then starts the self test of M(m+2). Every
`TEST_PERIOD` cycles (the period *T*) it moves the test to the nearest
working neighbour *k* of the module *h* just tested:

1. It copies all words of *k* into *h*, one word per cycle. The host is
   held off (`ready` low) during the copy.
2. It clears SR(*h*) and sets SR(*k*) in the same clock.
3. It starts the BIST of *k*.

Because *h* and *k* are neighbours among the working modules, each logic
module is still in the *i*-th available module after the swap. The host
sees no change apart from the stall. The walk runs down to M1 and back up
to the last module, over and over:

```
M10 M9 M8 ... M2 M1 M2 ... M9 M10 M9 ...
```

Walking back and forth needs half the copies of a one-way rotation. The
price is that the two end modules are tested every 2(G−1)·T, where G is the
number of working modules. The module in place *j* among the working
modules (counted from M1) is tested at intervals that alternate between
2(j−1)·T and 2(G−j)·T. With one module
retired (G = m+1) these are the intervals 2m·T and 2(j−1)·T / 2(m−j+1)·T.

Test starts are exactly `TEST_PERIOD` cycles apart. The BIST (10 cycles per
word) and the copy (one cycle per word, plus one for the swap) must fit in a
period: `TEST_PERIOD >= 11*2^ADDR_W + 8`, which an assertion checks.

### When a module fails

A failing BIST leaves the tested module marked in SR and sets its bit in
`failed`. The failed module was holding no data, so nothing is lost. If
more than `M` modules are still available, the last available one is the
idle stand-by. It becomes the new module under test without a copy, and the
walk restarts towards M1 over the remaining modules. If only `M` modules are
left, testing stops (`test_halted`) and the memory keeps running on them.
Retired modules are skipped by the walk.

A cell that breaks while its module holds live data corrupts that data
until the module's next test finds the fault. The scheme detects faults; it
does not correct them. Error-correcting codes would be a separate,
complementary measure.

## Host interface and timing (`memory_system`)

| port | dir | meaning |
|------|-----|---------|
| `req`, `we`, `addr`, `wdata` | in | access; `addr = {logic module, word}`, `$clog2(M)+ADDR_W` bits |
| `rdata` | out | read data, combinational in the same cycle |
| `ready` | out | low during a copy and the SR swap; requests are then ignored and must be repeated |
| `test_enable` | in | lets online testing proceed |
| `sr`, `failed`, `under_test`, `test_halted` | out | state of the redundancy |
| `cu_err`, `mem_fail`, `x_total` | out | control-unit self check |
| `addr_error` | out | request to a logic module number ≥ M (reads 0) |
| `fault_inject` | in | verification only: makes bit 0 of word 0 of a module stuck at 1; tie to 0 |

Writes take effect at the rising clock edge. Reads are asynchronous: the
address goes through the decoder, the control unit and the module's read
mux within the cycle. Reset is asynchronous, active low.

Parameters (top): `M = 8` logic modules, `ADDR_W = 10` (1024 words per
module), `DATA_W = 8`, `TEST_PERIOD = 16384`. The number of additional
modules is fixed at two, which is built into the structure of the selection
chain. The design needs `M >= 2`.

## Design choices beyond the original scheme

* **Sequencer in hardware.** In the original scheme a host processor runs
  the test walk, the copy and the SR updates. Here `online_test_ctrl` does
  this, with a cycle-exact period and a stall handshake.
* **Count-code update.** The paper's simplified equation for `x1` in the
  middle cells omits the case "one module marked to the left and this
  module unmarked". The cells follow the definition of the code instead:
  `x1' = ~x2&(x1^SR) | x2&(x1|SR)`. With the simplified form the mapping
  would break as soon as a module is marked.
* **Order of the SR updates.** The two SR changes before a test happen in
  one clock, after the copy. The module freed for use gets a 0 and the
  module to be tested gets a 1.
* **BIST algorithm.** The self test is March C- over all-zero and all-one
  words. The original scheme only cites a march test.
* **Sizes.** `ADDR_W`, `DATA_W` and `TEST_PERIOD` are this design's
  choices. `M = 8` with two spares is the configuration used for the
  scheme's reliability figures.
* **Recovery after a failure** (the stand-by becomes the module under
  test, the walk restarts, testing stops when no spare is left) is this
  design's reading of "replaced with the first available spare module".
* **Host-port details.** The read mux (OR of the module outputs gated by
  `S`), the binary module field and the `fault_inject` hook are this
  design's own.
* **No `s = 1` configuration.** A four-module example with one spare
  cannot be built as such. With one of six modules retired, the walk and
  its intervals are the same, and the testbench checks that case.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. Each has a watchdog. With plain Verilator, from the folder that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
  rtl/fts_pkg.sv tb/tb_memory_system.sv --top-module tb_memory_system
./obj_dir/Vtb_memory_system
```

| testbench | what it shows |
|-----------|---------------|
| `tb_sb_first`, `tb_sb_second`, `tb_sb_cell`, `tb_sb_spare1`, `tb_sb_spare2` | every input combination of each selection block against a counting model |
| `tb_mem_ctrl_unit` | all 1024 SR values × every logic address at m = 8, against "i-th unmarked module" |
| `tb_cu_self_check` | every SR value with the right and each wrong count code |
| `tb_logic_addr_decoder` | m = 8 and m = 5, with out-of-range numbers |
| `tb_state_register` | reset value, one-clock hand-over, random set/clear |
| `tb_bist_ram` | normal access, exact test length 10·2^ADDR_W (+1 cycle for the done flag), detection of a stuck cell, host writes ignored while testing |
| `tb_online_test_ctrl` | walk order, starts exactly T apart, copy order and stall, SR contents, per-module intervals 2mT and 2(j−1)T/2(m−j+1)T with m+1 working modules, retirement, stand-by take-over, halt after the second failure |
| `tb_memory_system` | m = 5, 16-word modules: random host traffic checked against a model while the test walks, two failures and the halt; counts every mechanism (stall, copy, turns at both ends, retirement, halt, out-of-range access) |
| `tb_memory_system_full` | default sizes: one complete test cycle (18 tests, 1024-word copies) under random traffic, then a retirement and take-over; about one second of simulation |

Assertions in the RTL check at run time that at most one module is
selected, that a module under self test is never selected, and that the
module under test is always marked in SR.
