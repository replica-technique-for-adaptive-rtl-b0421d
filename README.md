# Replica-timed refresh for a 2 kb gain-cell eDRAM

A gain-cell eDRAM (GC-eDRAM) stores each bit as charge on the parasitic
capacitance of a small transistor cell. That charge leaks away, so every row
must be refreshed before its weakest bit is lost. The usual approach sets the
refresh period from a worst-case retention figure, covering every process
corner, every temperature and the worst possible access pattern. Real dies
under real traffic then refresh far more often than they need to, and refresh
is the main cost of keeping data in a low-power memory.

This design times refresh by measurement instead. Next to the 64 x 32 data
array sits a **replica column** of 32 cells. The replica cells are built like
the data cells but hold slightly less charge, and they see the same supply,
the same process and the same write traffic. Their only job is to fail first.
A controller reads them back now and then. The first time a replica cell has
lost its '0', the whole array is refreshed and the replica column is reset.
The refresh period therefore stretches or shrinks with the actual die, the
actual conditions and the actual write activity.

The RTL covers the digital side of the original test chip:
* the write bitline logic that makes the replica track write activity;
* the on-chip test controller that runs the refresh loop and checks every
  refreshed row;
* the 2 kb result SRAM and its flush to four output pads;
* the configuration scan chain and the three test modes.

The array and the replica column are analog parts. They are given as
behavioural models, so the whole loop can be simulated.

## Why the write bitline matters

The cell is an all-PMOS 2T gain cell. A write transistor connects the storage
node to the write bitline (WBL), and a read transistor senses the node onto
the read bitline. The stored levels do not age alike:

* A stored **'1'** holds for a very long time. Its leakage through the write
  transistor limits itself.
* A stored **'0'** is the weak state. It leaks upward, slowly while its
  column's WBL is low and orders of magnitude faster while the WBL is high.

The WBL of a column is high only while a '1' is being written to some other
row of that column. Two rules follow, both implemented in `wbl_driver`:

1. **Data WBLs are low in every cycle that is not a write.** Standby and read
   cycles then restore the margin of stored '0's instead of eroding it.
2. **The replica WBL is tied to the write enable.** The replica column is
   stressed in every write cycle, whatever data is written. A replica '0'
   therefore ages at least as fast as a data '0' in a column that receives a
   '1' in every write. That is the worst a data cell can see under the
   current traffic, but no worse than the traffic allows.

A traditional design assumes a '1' is written in every cycle. With 10 % write
activity, the replica lets the refresh period grow by more than 5x against
that assumption (see *Measured behaviour*).

Local variation between cells is not tracked by the replica. Two guard bands
cover it. The replica cells have a smaller storage capacitance, modelled as
a 10 % lower retention threshold. The controller can also add periodic
**pseudo-writes**: cycles that raise only the replica WBL. They age the
replica faster than the traffic alone would, and the pseudo-write period is
the per-die calibration knob.

## Structure

```
gc_edram_testchip
├── cfg_scan_chain     configuration + one access word, serial in/out
├── test_controller    refresh loop FSM
│   └── row_compare    checks a refreshed row, BIST_PASS, DOUT MSBs
├── access_mux         mode 0 controller / 1 scan chain / 2 external pins
├── wbl_driver         data WBL = wen ? wdata : 0, replica WBL = wen | pseudo_write
├── gc_array           64x32 gain cells          (behavioural model)
├── replica_column     32 replica cells          (behavioural model)
├── cmp_sram           64x32 per-bit results
└── result_unloader    SRAM -> DOUT[3:0] after BIST_DONE
```

`gc_pkg` holds the geometry (`ROWS` = 64, `COLS` = 32, `REPLICAS` = 32), the
24-bit timer width `TW`, and the shared types:
* `cfg_t`: the controller configuration;
* `acc_t`: one cycle of array and replica access;
* `mode_e`: the test mode;
* `state_e`: the controller state.

Every array access goes through one `acc_t`:
* `wen`, `waddr`, `wdata`: write port;
* `ren`, `raddr`: read port, data one cycle later;
* `pseudo_write`, `refresh_replica`: replica stress and reset;
* `check_replica`, `rep_addr`: replica readout.

The controller, the scan chain and the external pins each produce an `acc_t`,
and `access_mux` passes one of them on.

## The refresh loop

`test_controller` waits for `bist_start` (mode 0). It then runs through the
following states; cycle counts are exact.

| State | What happens | Cycles |
|---|---|---|
| Init write | Every row gets `cfg.pattern`; the victim row `cfg.victim_addr` gets all ones. | 64 |
| Init replica | RefreshReplica: all replica cells get '0'. | 1 |
| Idle / Disturb | Idle phase, described below. | `idle_period` |
| CheckReplica | Replica cells 0, 1, … are read, one per cycle. The answer (`refresh_needed`) comes back the next cycle. | up to 33 |
| RefreshReplica | Entered at the first replica cell that reads '1'. | 1 |
| Read / write-back | Per row, 0 to 63: one Read cycle, then one write-back cycle (details below). | 128 |
| Done | Entered on `ext_interrupt` at the next idle-phase cycle. `bist_done` goes high and the flush can begin. | stays |

In the idle phase the controller counts `idle_period` cycles:
* Every `disturb_period` cycles it spends one cycle in **Disturb**, writing
  all ones to the victim row. That raises every data WBL and the replica WBL.
  A period of 1 writes in every cycle (100 % write activity); 0 turns Disturb
  off.
* Every `pseudo_period` cycles it raises `pseudo_write` for one cycle. 0
  turns pseudo-writes off.

After CheckReplica, if all 32 replica cells read '0', the loop returns to
Idle. Otherwise it goes through RefreshReplica and then refreshes the array.

In each write-back cycle:
* the data just read is written back unchanged;
* `row_compare` XORs it with the written data and stores the per-bit result
  in `cmp_sram`;
* the pads show the row: `bist_pass` (the one-bit result), `dout` (bits 31:28
  of the row) and `row_valid`.

The victim row always holds all ones and is never reported as failing.

The refresh period seen from outside is the time between RefreshReplica
states. No timer sets it: it is however many Idle + CheckReplica rounds pass
before a replica cell fails. `idle_period` only sets how finely that moment is
resolved, at a cost of 33 read cycles per check.

An error in the array stays visible. A lost bit is written back as read, so
every later refresh reports it again, and `cmp_sram` always holds the latest
result of each row.

## Configuration and test modes

`cfg_scan_chain` is one shift register of 164 bits, holding `{cfg_t, acc_t}`.
It is shifted in MSB first, one bit per cycle, while `scan_shift` is high.
`scan_out` is the bit that leaves the chain. The `cfg_t` fields, from the
MSB:

| Field | Bits | Meaning |
|---|---|---|
| `idle_period` | 24 | Idle cycles before each CheckReplica (0 counts as 1) |
| `disturb_period` | 24 | cycles between Disturb writes, 0 = none |
| `pseudo_period` | 24 | cycles between replica pseudo-writes, 0 = none |
| `victim_addr` | 6 | row used for Disturb |
| `pattern` | 32 | data written to every other row |

The `acc_t` fields, from the MSB, are `wen`, `waddr[5:0]`, `wdata[31:0]`,
`ren`, `raddr[5:0]`, `pseudo_write`, `refresh_replica`, `check_replica` and
`rep_addr[4:0]`.

* `scan_update` copies the chain into the configuration. In the next cycle the
  access word drives the array for exactly one cycle, if `mode` = 1.
* `scan_capture` loads the array read data into the `wdata` field, so a word
  read in scan mode can be shifted out.

The configuration can be reloaded while the controller runs. The test bench
does this to change the write activity on the fly.

`mode` selects the array driver:

| `mode` | Driver |
|---|---|
| 0 | controller, at speed |
| 1 | scan-chain access word |
| 2 | `ext_acc` pins, direct access |

`rdata_out` and `refresh_needed_out` show the array read port and the replica
answer in every mode.

## Result flush

Once `bist_done` is high, `result_unloader` owns `cmp_sram`. It loads one row
at a time into a 32-bit register, which works as four 8-bit scan chains, and
presents bits 31:28 on `dout` with `unload_valid` high. Each cycle with
`unload_en` high moves on by one nibble. Row 0 comes first, and each row is
sent MSB nibble first. Reloading a row costs two cycles with `unload_valid`
low. After 512 nibbles, `unload_done` rises.

## The retention models

`gc_array` and `replica_column` are behavioural models. They are plain
SystemVerilog that Verilator and synthesis tools accept, but they stand for
full-custom analog circuits.

Retention is counted in abstract **units**. A stored '0' gains:
* `LEAK_LOW` (1) per cycle while its WBL is low;
* `LEAK_HIGH` (16) per cycle while its WBL is high.

It reads as '1' once it reaches the cell's threshold. A '1' never fails.

| Parameter | Array | Replica |
|---|---|---|
| Weakest cell | `ARRAY_DRT_MIN` = 65536 | `REPLICA_DRT_MIN` = 58982 (90 %) |
| Per-cell spread above it (fixed hash) | up to 25 % | up to 10 % |

The ratio of 16 makes the 10 %-activity retention
(65536 / (0.9·1 + 0.1·16)) over five times the 100 % one (65536 / 16).
Turning units into time requires a clock frequency, which the model does not
fix.

The models keep one cumulative stress counter per column and, for each cell,
a snapshot of that counter taken at its last write. The difference, modulo
2^32, is the cell's degradation. This keeps the state in a memory rather than
2048 counters. It holds while a cell goes fewer than 2^32 units without a
write.

The model numbers are this design's choice; the original chip reports
retention only in milliseconds against supply voltage. To represent a
particular silicon, replace the thresholds and leak ratio, or replace the two
models with the real macros. Their ports are the real ones: write port with
WBL levels, read port, RefreshReplica, replica WBL, CheckReplica, and
RefreshNeeded.

## Measured behaviour

From `tb_refresh_tracking`: three chips at 0.5x, 1x and 2x model retention,
Idle 128 cycles, pattern all zeros. "Retention" is the array's minimum
retention, measured in direct mode under the same access pattern.

| Write activity | Nominal refresh period | Nominal retention | 2x period | 2x retention |
|---|---|---|---|---|
| 1/1 | 4 773 | 5 120 | 9 291 | 10 272 |
| 1/2 | 8 643 | 9 399 | 17 180 | 18 820 |
| 1/4 | 15 085 | 16 468 | 30 221 | 32 941 |
| 1/10 | 26 838 | 30 936 | 53 888 | 61 898 |
| 1/20 | 36 822 | 42 048 | 74 335 | 84 106 |

All values are in cycles. The refresh always comes at 86–92 % of the
retention, at every activity and scale. The period at 10 % activity is 5.6x
the period at 100 %.

## Where this RTL departs from the original chip, or fills gaps

The original chip defines the following; this RTL follows it:
* the replica mechanism: WBL low outside writes, replica WBL tied to write
  enable, single-cycle replica reset, serial replica check;
* the controller's states and their order;
* the all-ones victim row that is excluded from checking;
* per-bit results in a 2 kb SRAM;
* BIST_PASS, the four MSBs on DOUT[3:0], and BIST_DONE followed by a
  scan-chain flush on DOUT;
* the three test modes.

These are this design's own choices:
* what is written initially (one pattern word per row);
* the configuration fields and their widths;
* the two-cycle row refresh, and writing back the read data;
* stopping CheckReplica at the first failing replica cell;
* taking the interrupt only in the idle phase;
* the scan-chain layout and the access-word protocol;
* the flush order and handshake;
* the `mode` encoding and the observation ports (`ctrl_state`, `rdata_out`,
  `row_valid`);
* all numbers in the retention models.

The following are not built:
* **Write wordline underdrive drivers and supplies.** These are the negative
  VNWL level shifters, the separate array supply and the pads. They are analog
  and have no logic beyond row selection, which the array model includes.
* **The optional protections for extreme traffic.** One is a write policy
  allowing a write only every second cycle; the other shortens the data WBL
  pulse while the replica keeps a full-cycle pulse. Both are alternatives, not
  part of the main design.
* **Further bypass schemes and other test structures of the chip.** They are
  not specified.
* **Power.** Power figures (refresh energy per bit) are outside what RTL can
  show.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
package must come first on the command line:

```
verilator --binary --timing --assert --top-module tb_gc_edram_testchip \
    rtl/gc_pkg.sv $(ls rtl/*.sv | grep -v gc_pkg) tb/tb_gc_edram_testchip.sv
./obj_dir/Vtb_gc_edram_testchip
```

| Testbench | What it checks |
|---|---|
| `tb_gc_edram_testchip` | End to end at default parameters: direct and scan access, the refresh loop at 10 % and 100 % activity and with pseudo-writes, an injected error seen on BIST_PASS/DOUT, interrupt, flush of all 512 nibbles. Counts every mechanism. |
| `tb_refresh_tracking` (with `tb/refresh_bench.sv`) | Activity sweep and retention scaling, as in the table above. |
| `tb_test_controller` | Exact state sequence and cycle counts against an ideal memory and a scripted replica. |
| `tb_gc_array`, `tb_replica_column` | Retention models with small thresholds. |
| `tb_wbl_driver`, `tb_row_compare`, `tb_access_mux`, `tb_cmp_sram`, `tb_cfg_scan_chain`, `tb_result_unloader` | Unit tests. |

`--assert` also turns on the protocol assertions in `test_controller`, `result_unloader` and `cfg_scan_chain`. Each run takes well under a second. To study other corners, change
`ARRAY_DRT_MIN`, `REPLICA_DRT_MIN`, `LEAK_LOW` and `LEAK_HIGH` on
`gc_edram_testchip`. The array geometry lives in `gc_pkg`.
