# Self-test of AC timing margin for an embedded dual-bank SDRAM

A DRAM that is embedded on a logic die cannot be reached from a tester
pin by pin, and what the tester sees through multiplexed pins is distorted by
pad and wiring delays. So the usual checks of the memory's AC parameters
(tRCD, tRP, tRAS, ...) cannot be made at the real clock rate. This RTL puts the
check on the chip. A built-in self-test (BIST) drives the SDRAM at its
operating clock and runs a march test. When the memory fails, the BIST does not
stop at a single pass/fail bit. It reruns the test under changed timing
conditions until it can say one of three things:

* the failure only appears when the two banks are interleaved,
* the memory fails even with generous timing, so it does not work at the
  real rate, or
* which AC parameter has no margin.

It also reports the first failing cell (bank, row, column, bit) and the clock
cycle at which it failed, for use by the redundancy (repair) logic.

The design follows the BIST architecture and test flow of S.-B. Park, *The
Implementation of the Built-In Self-Test for AC Parameter Testing of SDRAM*.
The paper describes the blocks and the flow but gives no RTL. Everything below
the block level here is this design's own; the last section lists where it
departs from the paper.

## The memory under test

| item | value |
|---|---|
| organisation | 2 banks (a, b) x 512 rows x 256 columns x 64 bits = 16 Mbit |
| address | non-multiplexed: `ROWADDR[8:0]`, `COLADDR[7:0]` |
| data | separate `DIN[63:0]` / `DOUT[63:0]` |
| control | per-bank active-low `RASB_x`, `CASB_x`, `WEB_x`; `CKE`; `CLOCK` |
| CAS latency / burst | 2 / 1 |
| clock | 100 MHz |
| refresh | 1024 refreshes per 16 ms (512 per bank) |

AC limits at 100 MHz, the values `AC_SPEC` in `sdram_bist_pkg`:

| parameter | meaning | ns | cycles |
|---|---|---|---|
| tRRD | ACT to ACT, other bank | 20 | 2 |
| tRCD | ACT to READ/WRITE | 30 | 3 |
| tRP  | PRECHARGE to ACT | 30 | 3 |
| tRAS | ACT to PRECHARGE | 60 | 6 |
| tRC  | ACT to ACT, same bank | 90 | 9 |
| tCDL | last write data to next column command | 10 | 1 |
| tCCD | column command to column command | 10 | 1 |

Commands use the standard SDRAM truth table on each bank's strobes:
* ACT: RASB low.
* READ: CASB low.
* WRITE: CASB and WEB low.
* PRECHARGE: RASB and WEB low.
* AUTO REFRESH: RASB and CASB low.

The BIST assumes the SDRAM has already been powered up and initialised (it
needs a 20 us pause after power-up) before `BIST_on` is raised. The DRAM macro
itself is not part of this RTL. The top module brings its port
out as `mem_in` and `mem_dout`.

## The test flow

One *march run* tests a set of banks under one set of AC limits (see the next
section). The controller (`bist_controller`) chains runs through four phases,
and the error type analyzer (`error_type_analyzer`) turns their outcomes into a
verdict:

| phase | banks | timing | the flow stops here if | verdict |
|---|---|---|---|---|
| 1 interleave | a and b interleaved | data sheet | the run passes | `RES_GOOD` (1) |
| 2 minimum margin | a, then b | data sheet | neither bank fails | `RES_INTERLEAVE` (2) |
| 3 maximum margin | each bank that failed in 2 | every limit + `RELAX` cycles | a bank still fails | `RES_NOT_AT_RATE` (3) |
| 4 constrained | each bank that failed in 2 | data sheet, one parameter + `RELAX` | always, after 7 parameters | `RES_AC_FAIL` (4) |

The constrained phase is the part to understand. It makes seven runs per
failing bank. Run *p* uses data-sheet timing everywhere except for parameter
*p*, which is relaxed. If relaxing *p* alone makes the failure go away, *p* is
reported in the 7-bit AC fail mask:

* bit 0: tRRD
* bit 1: tRCD
* bit 2: tRP
* bit 3: tRAS
* bit 4: tRC
* bit 5: tCDL
* bit 6: tCCD

The paper's wording, by contrast, suggests tightening one parameter and
relaxing the rest, and looking for the condition that fails. That does not
work for tRAS. With tRCD and tCDL relaxed, the precharge is pushed out past
tRAS anyway, so a tight tRAS is never exercised. Relaxing one parameter at a
time has no such blind spot.

Limits are coupled, and the mask can show it. Consider a memory that needs
4 cycles of tRP. At data-sheet timing the next ACT is bound by tRP and tRC at
the same moment. Relaxing either one cures the failure, so both tRP and tRC
are flagged. A slow tRRD never gets this far. It shows up only in phase 1,
since bank-by-bank runs never open two banks in a row, so the verdict is
`RES_INTERLEAVE`. An all-zero mask with `RES_AC_FAIL` means that no single
parameter explains the failure.

## The march run

A run walks through all addresses of the banks under test four times (four
*stages*), once for each of two data backgrounds:

| stage | address order | operations on each word |
|---|---|---|
| 0 | up | write D |
| 1 | up | read D, write D-bar |
| 2 | down | read D-bar, write D, read D |
| 3 | up | read D |

That is 7 operations per word and background, 14 for both: the "14N" of the
test's name. The column address is the fast one: it steps every element, and
the row steps when the column wraps. The two backgrounds come from
`data_gen`:

* **Checkerboard.** A word is all zeros or all ones according to row[0] xor
  column[0], so neighbouring cells hold opposite data.
* **Solid `0x55..`.** D-bar is `0xAA..`.

### Command scheduling (`rw_control_gen`)

All accesses to one address form one *element*:

```
ACT a [ACT b]  op0 a [op0 b]  op1 a [op1 b] ...  PRE a [PRE b]
```

The bank-b commands appear only in interleave mode. The sequencer issues each
command as soon as every limit that applies to it is met. A set of saturating
"cycles since" counters tracks those limits, one per event type:

| command | waits for |
|---|---|
| ACT b | tRP since PRE b, tRC since ACT/REF b, tRRD since any ACT/REF |
| READ/WRITE | tRCD since ACT b, tCCD since any column command, tCDL since any WRITE |
| PRE b | tRAS since ACT b, tCDL since the last WRITE to b |
| REFRESH b | tRP since PRE b, tRC since ACT/REF b, tRRD since any ACT/REF |

So the memory runs exactly at the limits it is given, which is what makes the
margin test meaningful.

Here is an interleaved element at data-sheet timing. Cycle numbers count from
ACT a, and the next element's ACT a comes at tRC = 9:

```
stage 0:  ACT a@0  ACT b@2  W a@3  W b@5  PRE a@6  PRE b@8        -> 9 cycles
stage 1:  ... R a@3 R b@5 W a@6 W b@7  PRE a@8  PRE b@9           -> 11 cycles
stage 2:  ... 6 column ops @3,5,6,7,8,9  PRE a@10 PRE b@11        -> 13 cycles
```

Stage 3 also takes 9 cycles, so one pass over an address pair takes
9+11+13+9 = 42 cycles, and both backgrounds take 84. For the full memory that
is 84 x 131,072 = 11.01 M cycles. Refresh adds about 60 k cycles, for a
measured 11.07 M cycles, or 111 ms at 100 MHz. The paper quotes about 200 ms
per test. A bank-by-bank run, on a single bank, is shorter.

### Refresh

`stage_refresh_counter` raises a refresh request every `REF_INTERVAL` = 1562
cycles (16 ms / 1024 at 100 MHz). The sequencer serves it between elements,
when all banks are closed. It issues one AUTO REFRESH, alternating between
banks a and b, so each bank gets 512 refreshes per 16 ms; the other bank is
refreshed even during bank-by-bank runs. A refresh counts like an ACT for tRC
and tRRD.

## Checking and reporting

* **`dout_comparator`.** The sequencer tags each READ with the word it expects
  and the address. The comparator delays the tag by `CAS_LATENCY` cycles and
  compares it with `DOUT`. On a mismatch it pulses `err` one cycle later,
  carrying the bank, row, column and lowest failing bit. A read that leaves the
  BIST in cycle *t* is compared in cycle *t*+2.
* **`bist_clock_counter` and `clock_number_gen`.** These form the fail address
  indicating logic. The counter counts cycles from the start of the test. The
  first error stores that count (the *clock number*) together with the failing
  cell; later errors are only counted.
* **`bist_output_if`.** `ERROR` rises on the first error and stays high until
  the next test. When the test ends, `REDUN` shifts out the following frame,
  MSB first, one bit per cycle, while `redun_en` is high. `test_done` then
  stays high. The frame is 67 bits at the default sizes:

```
{ result[2:0], ac_fail_mask[6:0], captured, fail_bank,
  fail_row[ROW_W-1:0], fail_col[COL_W-1:0], fail_bit[5:0], fail_clk[31:0] }
```

The fail location is the first failure of the whole test, normally seen during
the interleave phase.

## Block map

| module | block |
|---|---|
| `sdram_bist_top` | whole BIST plus the input multiplexers |
| `bist_clock_gen` | synchronizes `BIST_on` to TCLKT, gives BIST enable and a start pulse |
| `bist_controller` | the four-phase test flow, timing set per run |
| `rw_control_gen` | SDRAM command sequencer with AC-limit counters, refresh insertion |
| `row_addr_gen`, `col_addr_gen` | up/down address counters |
| `data_gen` | checkerboard / 0x55 data and data-bar |
| `stage_refresh_counter` | march stage and background, address reloads, refresh timer and count |
| `dout_comparator` | CAS-latency-aligned compare, fail location |
| `error_type_analyzer` | per-phase fail flags, AC fail mask, verdict |
| `clock_number_gen` | clock number and fail address registers |
| `bist_clock_counter` | cycle counter |
| `bist_output_if` | `ERROR` and serial `REDUN` |
| `input_mux_array` | 2:1 multiplexers on every SDRAM input |
| `sdram_bist_pkg` | widths, AC limit struct and `AC_SPEC`, command bundle `sdram_in_t`, enums, march table |

### Top-level interface (`sdram_bist_top`)

| port | dir | meaning |
|---|---|---|
| `tclk` | in | TCLKT; the BIST and the SDRAM both run on it |
| `rst_n` | in | asynchronous active-low reset |
| `bist_on` | in | BIST mode. A rising edge starts a test; low gives the SDRAM back to the logic |
| `normal_in` | in | the logic's SDRAM inputs (`sdram_in_t`) |
| `mem_in` | out | to the SDRAM: `cke, rasb[1:0], casb[1:0], web[1:0], row[8:0], col[7:0], din[63:0]` (index 0 = bank a) |
| `mem_dout` | in | `DOUT[63:0]` from the SDRAM |
| `error`, `redun`, `redun_en`, `test_done` | out | results, see above |

Parameters:

* `ROW_W` = 9 and `COL_W` = 8. These can be reduced for simulation; the SDRAM
  address fields stay 9 and 8 bits wide.
* `CAS_LATENCY` = 2.
* `REF_INTERVAL` = 1562.
* `CNT_W` = 32.
* `AC_TIGHT` = `AC_SPEC`, the data-sheet limits.
* `RELAX` = 2 cycles.

All outputs to the SDRAM are registered.

## Simulation

The testbenches are in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/sdram_model.sv` is a behavioural model of
the SDRAM, and `tb/bist_env.sv` pairs it with the BIST.

The model has its own AC limits, which a testbench can set slower than the
data sheet. A command that comes too early corrupts data:

* An early ACT flips bit 0 on every read of that row.
* An early READ or WRITE flips bit 0 of that access.
* An early PRECHARGE flips bit 0 of the last word accessed.

The model can also hold a stuck-at cell. It counts protocol errors, such as a
column command to a closed bank.

Run a testbench with plain Verilator from the project root:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sdram_bist_pkg.sv tb/tb_sdram_bist_top.sv --top-module tb_sdram_bist_top
./obj_dir/Vtb_sdram_bist_top
```

The testbenches:

* **`tb_sdram_bist_top`.** Five BISTs on a 2x4x4 memory: a good one, slow
  tRCD, slow tRRD, a stuck cell and slow tRAS. It checks each verdict, mask,
  fail address and frame, the exact run length (84 cycles per address), the
  read/write counts, the absence of protocol errors, normal-mode pass-through,
  and that each phase, refresh and error detection happened.
* **`tb_ac_param_sweep`.** Each of the seven AC parameters is made one cycle
  too slow in turn. The test checks that its mask bit is set, or for tRRD that
  the verdict is interleave-only.
* **`tb_sdram_bist_full`.** One complete test at full size with default
  parameters, on a good memory. It checks the verdict, the read and write
  counts (2 banks x 2 backgrounds x 4N reads and 3N writes), the refresh rate,
  and a test time under 20 M cycles. It runs in about 10 s.
* **`tb_sdram_bist_full_fault`.** The full-size memory with one stuck-at-0
  cell (bank b, row 300, column 77, bit 42). It checks that the flow makes
  4 runs and stops at `RES_NOT_AT_RATE`, that `REDUN` names the cell, and
  that the clock number falls inside the first run. It runs in about 30 s.
* **One testbench per block** (`tb_<module>`).

## Departures from the paper and choices made here

* **Constrained phase.** It relaxes one parameter at a time instead of
  tightening one; the reason is given under "The test flow".
* **Verdict on interleave-only failure.** The paper's text and its flow chart
  differ at the step after the bank-by-bank test passes. This design follows
  the text: a memory that passes bank by bank fails only under interleaving.
* **Maximum-margin step.** All limits are relaxed together. Only the banks
  that failed are retested, as the flow chart shows.
* **Margins.** "Minimum margin" means data-sheet timing. "Maximum margin"
  means all limits plus `RELAX` = 2 cycles; the paper gives no amount.
* **The march.** The stage sequence and the two backgrounds follow the paper.
  The stage-3 direction, the exact bit patterns, and the reading of "Y-March"
  as column-fastest order are choices made here.
* **BIST clock generator.** It is a synchronizer plus enable, not a clock
  gate, so the BIST and the SDRAM share TCLKT without skew between them. The
  paper only names this block.
* **Write-to-precharge delay.** It is taken as tCDL; the paper gives no value
  for it.
* **Refresh** placement, the alternating banks, and the request/ack handshake
  are choices made here.
* **Outputs.** The `REDUN` frame layout, `redun_en`, `test_done`, the result
  codes, the error counter and the lowest-failing-bit field are additions or
  choices made here. The paper says only that `REDUN` is serial and carries the
  clock number and the fail location.
* **Reset.** The asynchronous reset `rst_n` is added.
* **Size.** The paper quotes about 4,500 gates in a 0.25 um library. This RTL
  has 573 flip-flop bits and roughly 630 word-level cells before technology
  mapping. The two numbers are not directly comparable.
