# Online self-checking LUT comparator with dual modular redundancy

On an SRAM-based FPGA a comparator is made of look-up tables (LUTs). Each LUT
is a small memory holding a truth table. If a particle strike flips one of its
bits, the comparator quietly computes a different function, and checking only
its inputs and outputs may never show it. This design makes an N-bit equality
comparator check itself while it runs:

* The comparator uses **one K-input LUT per bit position** plus an **AND
  tree**. Each LUT answers "are bit i of A and bit i of B equal?".
* A **test/operate (T/O) selector** sits in front of the LUT inputs. In test
  mode a pattern generator drives the address lines of one LUT directly. It
  reads back that LUT's whole truth table (all 2^K entries), one entry per
  cycle, and compares it with a precomputed table of expected responses (the
  *Gold ROM*). A full test of N LUTs therefore costs **N·2^K cycles**: it
  grows linearly with the operand width, not as 2^(2N). It needs only the
  function each LUT should have, not how the tools placed it.
* To keep the traffic flowing during a test, the comparator is **duplicated**.
  Comparator A can be taken offline for testing. Comparator B always carries
  the live stream. In normal operation a **DMR voter** (dual modular
  redundancy voter) flags any disagreement between the two.

The default configuration is a 32-bit comparator (N = 32) built from 4-input
LUTs (K = 4). A full sweep of comparator A takes 512 cycles.

## Block structure

```
              data_a, data_b, in_valid
                 │                 │
        ┌────────▼───────┐ ┌───────▼────────┐
        │ tsc_comparator │ │ tsc_comparator │
        │       A        │ │       B        │    (always operate)
        │ tsc_to_switch  │ │                │
        │ N × tsc_lut    │ │ N × tsc_lut    │
        │ AND/OR trees   │ │ AND/OR trees   │
        └─┬──────┬─────▲─┘ └───────┬────────┘
   lut_raw│  eq_a│     │test_addr  │eq_b
          │      │     │test_sel   │
   ┌──────▼──────▼┐  ┌─┴────────────┐  ┌──────────┐
   │tsc_error_eval│◄─┤ tsc_gold_rom │  │dmr_voter │──► result, out_valid,
   │              │  └──────────────┘  │          │    sys_error
   │              │──next_pattern/────►│          │
   └──────┬───────┘  pattern_fail      └──────────┘
          │          ┌──────────────┐       ▲ mode
          │          │tsc_test_ctrl │───────┘
          │          └──────────────┘
          ▼ test_error, test_pass, fail_lut, fail_addr, fail_tree
```

| Module | Role |
|---|---|
| `tsc_pkg` | T/O mode enum, dual-rail type, truth-table function of the bit-comparison LUT |
| `tsc_lut` | K-input LUT. It holds a 2^K-bit truth table, loaded at reset and writable one bit at a time |
| `tsc_to_switch` | T/O selector on the LUT address lines |
| `tsc_comparator` | N LUTs, T/O selector and dual-rail AND tree; raw LUT outputs brought out |
| `tsc_gold_rom` | Expected LUT response for every test vector |
| `tsc_test_ctrl` | Test scheduler and pattern generator (LUT index × vector counter) |
| `tsc_error_eval` | Compares the responses with the Gold ROM, paces the generator and holds the test status |
| `dmr_voter` | Compares A with B in operation, masks A during a test, registers the output |
| `tsc_dmr_top` | Wires it all together |

## The comparator and its LUTs

LUT i sees operand bits on two inputs: input 1 = `a[i]` and input 0 =
`b[i]`. The other K−2 inputs are tied to 0 in operation. Its truth table is
"input 1 equals input 0" for **every** address, including those whose upper
bits are set. So the full 2^K-entry table has a defined expected value, even
though operation only reaches 4 of the entries. For K = 4 the table is
`16'h9999`.

The LUT outputs are reduced twice, as two separate trees:

* `eq.t` = AND of the LUT outputs (the equality result);
* `eq.f` = OR of the inverted LUT outputs.

The fault-free code words are (1,0) = equal and (0,1) = not equal. (0,0) or
(1,1) can only come from a faulty tree, and raises the comparator's `err`.
This dual-rail output is this design's way to give each comparator its own
error signal. The LUT test covers the LUT contents, and the dual rails cover
the tree.

The LUT truth tables are registers with a one-bit write port
(`cfg_we/cfg_comp/cfg_lut/cfg_addr/cfg_din` at the top). This port stands in
for the FPGA's configuration memory. Through it an upset can be injected, and
a scrubber can repair a bit once the test has located it.

## How a LUT is tested online

### Isolation and the tree

In test mode the T/O selector applies the test vector `test_addr` only to the
LUT chosen by `test_sel`. Every other LUT gets address 0, whose specified
response is 1. The AND tree output then equals the tested LUT's response. One
vector therefore exercises the LUT and its path through the tree. The
evaluator checks three things against the Gold ROM bit for that vector:

1. the raw output of the selected LUT (`lut_raw[test_sel]`);
2. the dual-rail tree result, which must be the code word for the expected
   value;
3. the comparator's dual-rail error.

### Sweep order and cost

The generator counts `test_addr` from 0 to 2^K−1 for LUT 0, then for LUT 1,
and so on up to LUT N−1, one vector per cycle:

| N | K | test cycles per sweep |
|---|---|---|
| 16 | 4 | 256 |
| 32 | 4 | 512 (default) |
| 32 | 5 | 1024 |

If a vector fails, the sweep stops at once. `test_error` is set, and
`fail_lut`/`fail_addr` hold the LUT and truth-table entry that failed. The
diagnosis therefore has LUT granularity. Status is cleared when the next sweep
starts. A sweep that completes sets `test_pass`.

One case does not locate itself. Entry 0 of every LUT is the isolation
value: all untested LUTs sit on it. If that entry flips in some LUT j, the
tree fails on the first vector of the sweep while LUT 0 is being tested, and
LUT 0's own output is correct. The evaluator tells these cases apart.
`fail_tree` is set when the tested LUT answered correctly but the tree result
was wrong. The fault is then in the tree or in entry 0 of another LUT, and
`fail_lut` only says where the sweep was. Entry 0 (both operand bits 0) is
reached in operation, so the DMR comparison also sees an upset there.

### When a sweep runs

A sweep is requested by a `test_start` pulse. When `TEST_PERIOD` is non-zero,
one is also requested `TEST_PERIOD` cycles after the previous sweep ended
(background test). A request does not interrupt traffic immediately. It waits
for the first **hole** in the stream, a cycle with `in_valid` low, and only
then switches comparator A to test mode. The sweep then runs to the end (or to
the first failure) whatever the stream does, because comparator B serves it.

With background testing every T cycles, an upset that appears at a random
moment is found on average about half a period later. The worst case is one
period plus one sweep. The default `TEST_PERIOD` of 100 000 cycles is 1 ms at
100 MHz.

## DMR operation

| T/O | Comparator A | Comparator B | `result` | `sys_error` |
|---|---|---|---|---|
| operate (`test_mode`=0) | compares live data | compares live data | B | A≠B, or either has invalid dual rails |
| test (`test_mode`=1) | LUT under test | compares live data | B | B has invalid dual rails |

The output comes from B in both modes, so it does not jump when a test starts.
`out_valid`, `result` and `sys_error` appear one clock after
`in_valid`/`data_a`/`data_b`. `sys_error` is evaluated only for cycles with
`in_valid` set.

What catches what:

| Upset | Seen by |
|---|---|
| Truth-table bit of A reached in operation | DMR mismatch in operation, and the next sweep |
| Truth-table bit of A never reached in operation (upper address bits) | only the sweep |
| Truth-table bit of B | DMR mismatch when the operands reach it |
| Entry 0 of a LUT of A other than LUT 0 | DMR mismatch, and the first vector of the next sweep (`fail_tree`) |
| A tree output stuck | dual-rail error of that comparator |

## Top-level interface (`tsc_dmr_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one clock; asynchronous active-low reset, which also reloads all truth tables |
| `in_valid` | in | 1 | operand pair valid; low = hole usable for a test |
| `data_a`, `data_b` | in | N | operands |
| `out_valid`, `result` | out | 1 | registered A==B (from comparator B) |
| `sys_error` | out | 1 | DMR / dual-rail error for that result |
| `test_start` | in | 1 | request a sweep |
| `test_mode` | out | 1 | comparator A is in test mode |
| `test_busy` | out | 1 | request pending or sweep running |
| `test_error`, `test_pass` | out | 1 | result of the last sweep |
| `fail_lut`, `fail_addr` | out | SW, K | LUT and entry at which the sweep failed |
| `fail_tree` | out | 1 | that failure was seen only on the tree result (see above) |
| `cfg_we`, `cfg_comp`, `cfg_lut`, `cfg_addr`, `cfg_din` | in | 1,1,SW,K,1 | write one truth-table bit of comparator A (`cfg_comp`=0) or B (1) |

Parameters: `N` (32), `K` (4, at least 2, at most 8), `TEST_PERIOD` (100000;
0 = on request only). `SW` = clog2(N) is derived.

## Where this design departs from the method or fills gaps

* **Test length.** The method is described both as needing "n + log n" test
  vectors and as taking n·2^k cycles. This design follows the exhaustive
  n·2^k reading: every entry of every LUT is read.
* **Only comparator A is LUT-tested.** B is checked by the DMR comparison
  while A is in operation, but its unused truth-table entries are never read.
  The roles of A and B are fixed.
* **Masked, not frozen.** During a test, A's output is ignored by the voter
  rather than held.
* **Dual-rail comparator outputs** and their error signals are this design's
  reading of "TSC comparator, e.g. dual-rail logic". The result width is one
  bit (on two rails).
* **Single clock.** The method shows a separate test clock. Here one clock
  drives everything.
* **Read-only test.** The method speaks of writing and reading the LUT
  memory. Here the sweep only reads every entry through the LUT inputs and
  never writes the truth table. Writes go only through the configuration
  port.
* **Counting order, not a walking-bit sequence.** Routing faults on the LUT
  inputs are covered because the binary count applies every input
  combination, and walking-one and walking-zero vectors are among them. No
  separate walking-bit sequence is generated.
* **`fail_tree`** is an addition of this design. It keeps an isolation-entry
  upset from being blamed on LUT 0.
* **Own choices.** The hole rule, the stop-at-first-failure behaviour, the
  background timer counted from the end of a sweep, the assignment of operand
  bits to LUT inputs, and the value held on untested LUTs are all choices of
  this design.
* **Register count.** The method estimates about 64 registers on a Kintex-7
  for the DMR pipeline and test generator, against about 32 LUTs for a plain
  32-bit comparator and about 82 for this scheme. Here the truth tables are
  ordinary registers (2·N·2^K = 1024 bits), which on an FPGA would be the
  LUTs' own configuration cells. The RTL's flip-flop count is therefore not
  comparable with that estimate.
* The described use in a 1575-instance neutron irradiation experiment is a
  test bench of many copies plus laboratory equipment. It is not part of this
  RTL.

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tsc_pkg.sv tb/tb_tsc_dmr_top.sv \
          --top-module tb_tsc_dmr_top
./obj_dir/Vtb_tsc_dmr_top
```

Replace `tb_tsc_dmr_top` with any other testbench name. The package must come
first on the command line; `-Irtl` lets Verilator find the other modules by
file name.

| Testbench | What it shows |
|---|---|
| `tb_tsc_dmr_top` | Default size, end to end: a request waits for a hole; a 512-cycle sweep passes while live results come from B; a background sweep starts TEST_PERIOD+1 cycles later; an upset in B raises `sys_error`; an upset in an unused entry of A escapes the DMR check but stops the sweep at the right LUT and entry; after repair a sweep passes. Every output is checked against a reference model of both comparators. |
| `tb_tsc_workloads` | Sweep length and diagnosis of 20 random upsets each for N=16/K=4, N=32/K=4 and N=32/K=5. Under background testing every 2000 cycles, the mean time from a random upset to its detection is about half the test cycle. |
| `tb_tsc_comparator` | Operate-mode results, an exhaustive test-mode sweep, and an injected upset seen at exactly one LUT and entry |
| `tb_tsc_test_ctrl` | Hole wait, sweep order and length, stall, period, abort |
| `tb_tsc_error_eval`, `tb_dmr_voter`, `tb_tsc_to_switch`, `tb_tsc_lut`, `tb_tsc_gold_rom` | Each block against an independent reference |

The testbenches use only two-state values and `$urandom`, and they initialise
every signal they read.

## Trust

* All modules pass Verilator lint and the slang front end.
* Each block's testbench passes.
* For each block, a deliberately broken variant makes its testbench fail.
* The end-to-end test runs at the default size (N=32, K=4,
  TEST_PERIOD=100000). It covers about 100 000 cycles and checks every output
  cycle against a reference model.
* Sweep lengths were measured at 256, 512 and 1024 cycles for the three sizes
  above. All injected upsets were located.
* With background testing every 2000 cycles, the measured mean detection
  time was about 0.47 of the test cycle.

Not modelled: the FPGA routing itself (routing faults show up only as wrong
LUT inputs or outputs in this model), and the timing of a real device.
