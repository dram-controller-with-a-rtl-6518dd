# DRAM controller with a row-close predictor

A DRAM bank keeps its last opened row in the sense amplifiers. What the next
access to the bank costs depends on what the controller did with that row:

| next access goes to          | row left open            | row closed after use |
|------------------------------|--------------------------|----------------------|
| the same row                 | T_CA                     | T_RA + T_CA          |
| another row of the same bank | T_PR + T_RA + T_CA       | T_RA + T_CA          |

An *open row* controller wins on the first line and loses on the second.
The ideal controller keeps a row open exactly as long as more accesses will
come to it, then precharges at once. The precharge then happens during idle
time, and a change of row costs only T_RA + T_CA.

This controller approximates that with a very small predictor. It rests on
one observation. The time between two consecutive accesses to an open row
(the *access interval*) is usually much shorter than the time a row sits
unused after its last access before it is finally replaced (its *dead time*).
So a row that has been idle for a few access intervals has probably seen its
last access. The controller measures the last access interval. It precharges
a bank whose open row has been idle for twice that interval (or four times,
as a parameter).

The RTL is SystemVerilog-2017 and synthesizable, apart from assertions. The
DRAM device is not part of it: the controller drives a plain command bus,
and a behavioural DRAM model is provided for simulation.

## Terms

* **Live time**: from opening a row to the last access to it before it is
  closed. A *zero live time* means the row was opened, used once and never
  hit again.
* **Dead time**: from the last access to an open row to its closing.
* **Access interval**: the time between two consecutive accesses to the open
  row of a bank. It is measured only on a row hit. The first access after an
  ACT starts a new live time and is not an interval.
* **Boundary**: the access interval shifted left by `SHIFT` (×2 or ×4). A
  row idle for at least the boundary is predicted dead.

## Structure

```
                 req (byte address)                      resp (data, kind, latency)
                        |                                        ^
              +---------v----------------------------------------+--------+
              | dram_ctrl_top   address decode: row | bank | column | byte  |
              |                                                            |
              |  +----------------+  lookup / ACT,PRE  +----------------+  |
              |  | dram_sequencer |<------------------>| open_row_table |  |
              |  |  FSM, T_RA/T_CA|                    | row reg + cmp  |  |
              |  |  timer, per-   |   open_mask        |  per bank      |  |
              |  |  bank T_PR     |<-------------------+--------+-------+  |
              |  |  timers        |                             |          |
              |  |                |  acc_valid/bank/hit         v          |
              |  |                |-------------->+-------------------+    |
              |  |                |  close_req    | close_predictor   |    |
              |  |                |<--------------+ tick_div          |    |
              |  +-------+--------+               | access_counter xN |    |
              |          |                        | interval_regs     |    |
              |          |                        | boundary_cmp   xN |    |
              |          |                        +-------------------+    |
              +----------+-------------------------------------------------+
                         v  cmd, bank, row, col, wdata  /  rdata
                      DRAM device
```

| file | block |
|------|-------|
| `rtl/dram_pkg.sv` | command and access-kind enums, default geometry and timing |
| `rtl/dram_ctrl_top.sv` | top: rgbc address decode and wiring |
| `rtl/dram_sequencer.sv` | request FSM, DRAM timing, slot arbitration for predictor precharges |
| `rtl/open_row_table.sv` | open row index and open flag per bank, row-hit comparators |
| `rtl/close_predictor.sv` | the predictor: the four blocks below |
| `rtl/tick_div.sv` | clock divider giving the counters' count enable |
| `rtl/access_counter.sv` | saturating idle-time counter, one per bank |
| `rtl/interval_regs.sv` | access interval register: one common, or one per bank |
| `rtl/boundary_cmp.sv` | shift-by-`SHIFT` and compare, one per bank |

## How the predictor works

The predictor has one counter per bank. It advances once per `tick`, which
comes every `DIV` clocks, and it restarts from zero on every column command
to its bank. It therefore holds the idle time of the bank in ticks. The
counter saturates instead of wrapping. Dead times run to millions of clocks,
and a wrapped counter would make a long-dead row look freshly used.

When a column command hits the row that was already open, the counter's
value just before the restart is the access interval that has just ended.
That value is written into the interval register. With `SEPARATE = 0`
there is one register shared by all banks, and every hit in any bank
overwrites it. With `SEPARATE = 1` each bank has its own register. An access
that had to open its row restarts the counter but records nothing. Each
register has a valid flag. Until the first interval has been measured the
predictor stays silent, and the controller behaves as an open row
controller.

For every bank, `boundary_cmp` forms `interval << SHIFT` at `CNT_W + SHIFT`
bits and compares it with the counter. `close_req[b]` is raised when all of
the following hold:

* the predictor is enabled (`pred_en`);
* the bank has an open row;
* the interval is valid;
* `count >= boundary`.

Turning the boundary into clocks gives `boundary × DIV`. Quantisation to
ticks makes the predictor's view of both the interval and the idle time
uncertain by about one tick. Intervals much shorter than `DIV` clocks are
therefore measured coarsely.

### From close request to precharge

`dram_sequencer` serves one request at a time. The request path owns the
command bus. A predictor precharge goes out only in a clock in which the
request path issues nothing. It goes to the lowest-numbered bank that is
asking to close, has an open row, and is not the bank of the request being
served. Each bank has its own T_PR timer, so a background precharge finishes
while other banks are being served. The open row table clears the bank's
open flag as soon as the PRE is issued.

A later request to that bank then finds it in one of three states:

* **closed and precharged**: ACT, then RD/WR. Latency T_RA + T_CA; the
  precharge was hidden (kind `ACC_CLOSED`).
* **still precharging**: the request waits for the rest of T_PR, then goes
  as above. The latency lies strictly between T_RA + T_CA and
  T_PR + T_RA + T_CA (kind `ACC_PRE_WAIT`).
* **wrongly closed**: the request was for the row the predictor closed. It
  pays T_RA + T_CA instead of T_CA. This is the cost of a wrong "close"
  prediction.

Without the predictor the same request would have been a row conflict
(PRE, ACT, RD/WR: T_PR + T_RA + T_CA, kind `ACC_CONFLICT`) or a hit (T_CA,
kind `ACC_HIT`).

### Request timing

A request is taken in a clock with `req_valid && req_ready`. `req_ready` is
high only while the sequencer is idle. The first command goes out in that
same clock. `resp_valid` is a one-clock pulse exactly *latency* clocks
later: 20, 40 or 60 clocks at the default timing. It carries the read data,
the kind of access and the latency itself. The DRAM must present read data
on `dram_rdata` T_CA clocks after the RD command. The controller passes it
straight to `resp_rdata` in that clock without registering it.

## Parameters (`dram_ctrl_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_BANKS` | 4 | banks in the device |
| `NUM_ROWS` | 4096 | rows per bank (12-bit row index) |
| `ROW_BYTES` | 1024 | bytes per row |
| `DATA_W` | 128 | data bus width; 16-byte words, 64 columns per row |
| `T_PR`, `T_RA`, `T_CA` | 20, 20, 20 | precharge, row access, column access time in clocks |
| `SHIFT` | 1 | boundary = interval × 2 (1) or × 4 (2) |
| `SEPARATE` | 0 | 0: one common interval register; 1: one per bank |
| `CNT_W` | 18 | idle counter and interval register width, in ticks |
| `DIV` | 16 | clocks per tick |
| `LAT_W` | 16 | width of the reported latency |

The geometry, the timings, the 128-bit bus and the ×2 boundary are those of
the evaluated system. Time there was counted in processor clocks of a 2 GHz
core, and the controller clock here is taken to be that clock. `CNT_W` and
`DIV` are this design's choices. With them the counters span
(2^18 − 1) × 16 ≈ 4.19 million clocks. That is more than twice the longest
average access interval reported for the SPEC95 programs used in the
evaluation (about 0.84 million clocks), so every program's typical boundary
can be represented.

The address is decoded as `{row, bank, column, byte}` from the most
significant bit down, 24 bits at the defaults. This is classic page
interleaving ("row-group-bank-column"). With a single device the group field
has no bits.

## Where this departs from the original proposal, and what is missing

The proposal fixes the predictor's structure:

* a counter per bank;
* one common interval register, or one per bank;
* a shift by 1 or 2;
* a comparator per bank;
* a divided clock for the counters;
* the open row table of an ordinary open row controller.

All of that is built as described. The following are this design's own
choices:

* **Controller around the predictor.** The proposal evaluates the predictor
  in a latency simulator and describes no command sequencer. This one is
  deliberately minimal:
  * one outstanding request;
  * no command queue or reordering;
  * no refresh, and no tRAS/tRC/tRRD limits;
  * writes take T_CA like reads.
* **Counter width, divide ratio, saturation, valid flags, `>=` comparison**:
  not specified; chosen as described above.
* **Arbitration of predictor precharges** (free slots only, lowest bank
  first, never the bank in service): not specified.
* **`pred_en`** turns the predictor off, making the controller a plain
  open row controller for comparison.

Not built:

* the two address remapping schemes evaluated alongside page interleaving
  (rgrbcx and rbrgcx); their bit permutations are not given;
* the zero-live-time predictor and the next-row predictor, which the
  proposal names only as future work;
* the "ideal" predictor, which is a yardstick, not hardware.

The original evaluation ran six SPEC95 programs through a full processor
simulator. Those traces cannot be reproduced here. The testbenches use
synthetic streams built to contain the same phenomena instead.

## Verification

Every module has a self-checking testbench in `tb/` that compares against an
independent reference model in the testbench. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tick_div_tb` | pulse position and rate for DIV = 16 and 5 |
| `access_counter_tb` | random tick/clear against a saturating reference, saturation exercised |
| `interval_regs_tb` | common and per-bank registers and valid flags under random writes |
| `boundary_cmp_tb` | exhaustive for 6-bit, ×2 and ×4; random at default width |
| `open_row_table_tb` | random ACT/PRE/lookup against a reference table |
| `close_predictor_tb` | cycle-exact `close_req` against a model of divider, counters, registers and comparison, both organisations |
| `dram_sequencer_tb` | kind and latency of every access, read data, access reports, predictor-precharge rules, DRAM timing (T_PR=5, T_RA=7, T_CA=3) |
| `dram_ctrl_top_tb` | full design at default parameters, open row then predictor on the same stream (see below) |
| `policy_compare_tb` | open row, common ×2, per-bank ×2, common ×4 on a two-program stream; prediction accuracies |

`tb/dram_model.sv` is the behavioural DRAM. It stores data sparsely and
returns read data T_CA after RD. It counts protocol violations: ACT to an
open bank or earlier than T_PR after PRE, and RD/WR to a closed bank or
earlier than T_RA after ACT.

`dram_ctrl_top_tb` runs the top with no parameter overrides. Its workload
is bursts of 1–8 accesses to a row with 150–220-clock gaps, separated by
0–3000 idle clocks. It requires each of the following to occur: row hits,
closed-bank accesses, row conflicts, waits on a running precharge,
predictor precharges, and precharges hidden by the predictor. It also
requires no predictor activity while disabled, every predictor precharge to
come after about twice the last interval of idle time, and a lower average
latency with the predictor. A typical run:

```
open row : 5411 requests, hits 4211 closed 4 conflicts 1196 pre-wait 0, avg latency 28.86
predictor: 5411 requests, hits 4211 closed 1159 conflicts 39 pre-wait 2, predictor PRE 1160 (hidden 1155), avg latency 24.58
```

In `policy_compare_tb`, program A uses banks 0–1 with ~160-clock gaps and
program B uses banks 2–3 with ~1600-clock gaps. The testbench runs four
controllers on the same stream: open row, common ×2, per-bank ×2 and
common ×4. A monitor scores every prediction. A predictor precharge counts
as a correct *close* if the next access to the bank goes to another row. A
row kept open with a known interval counts as a correct *keep open* if the
next access hits it. A typical run:

```
policy 1: close predictions 2713, accuracy 0.62; keep-open decisions 5301, accuracy 0.98
policy 2: close predictions 1664, accuracy 1.00; keep-open decisions 6347, accuracy 0.98
policy 3: close predictions 2590, accuracy 0.60; keep-open decisions 5424, accuracy 0.96
average latency: open row 28.97, common x2 27.34, separate x2 24.83, common x4 27.64
```

With a common register, program A's short intervals set the boundary for
program B's rows, which are then closed between accesses. Per-bank registers
remove that interference. This is why they matter once programs with
different access rates share the memory. On this stream the ×4 boundary
behaves much like ×2.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dram_pkg.sv \
    tb/dram_ctrl_top_tb.sv --top-module dram_ctrl_top_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The package must come first;
the other files are found through `-Irtl -Itb`. The full-size top testbench
and the policy comparison each finish in seconds. To try the ×4 boundary or
per-bank registers, override `SHIFT` or `SEPARATE` on `dram_ctrl_top`.
