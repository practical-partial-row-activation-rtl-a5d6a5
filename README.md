# Partial row activation for an HBM2 stack

In an HBM2 pseudo channel, an ACTIVATE senses a whole 1 KB row, but a GPU usually reads
or writes only a 32 B column of that row, or at most a 128 B cache line, before the row is
closed again. Most of the activation energy is therefore spent on data nobody reads.

This RTL models an HBM2 stack whose banks activate only the **sector** (1/8 of the row,
128 B) that the column command actually touches. It keeps the standard command interface
(ACT, PRE, RD, WR with bank, row and column addresses). The price is latency, which
latency-tolerant workloads such as CNN and MLP training or inference can absorb. Two
mechanisms make this work:

* **Delayed activation.** ACT only decodes and stores the row address. The actual
  activation happens inside each RD/WR, once the column address shows which sector is
  needed. A per-bank bit vector remembers which sectors of the open row are already
  active, so a second access to the same sector activates nothing.
* **A narrow sector path.** The column mapping is changed so that a whole 32 B column atom
  sits in one sector. A sector is two half mats with 16 bitlines each, so an atom leaves
  the array 32 bits per cycle over 8 cycles. The full-row design uses a 128-bit path and
  needs 2 cycles.

The visible effect for a memory controller is a change of timing numbers and nothing else.

## Organisation

| level   | count | notes |
|---------|-------|-------|
| stack   | 1     | `ppa_hbm2_top`, 8 independent channels |
| channel | 8     | `ppa_channel`: separate row and column command buses, 128-bit DQ per clock (two 64-bit beats) |
| bank    | 32 per channel | `ppa_bank`: 1 KB rows, 32 columns of 32 B, 8 sectors |
| sector  | 8 per row | 4 columns (128 B), two half mats |

`ROWS` (rows per bank, default 32) sets the capacity only. No published capacity is
followed, so change it freely. Timing and the activation mechanism do not depend on it.

### Inside a bank: sectors, half mats and the 9 AND gates

A subarray has 8 mats under one global wordline. A local row decoder sits at each mat
boundary, 9 in all. Decoder *d* drives the right half of mat *d−1* and the left half of
mat *d*; those two half mats form sector *d*. The two edge decoders, 0 and 8, each drive
one half mat. Together they form sector 0. Each decoder gets one AND gate
(`wordline_gate`):

    lwl[d] = global_wordline & sector_valid[d mod 8]

`sector_valid` is the activation bit vector (`valid_bit_latch`). A column command sets the
bit of its sector, PRE clears them all. `mat_array` stores the bank as 16 half mats of 16
bits per access: bits [15:0] of a 32-bit access come from the left half of mat *s*, and
bits [31:16] from the right half of mat *s−1*. A half mat whose local wordline is down
returns zeros and ignores writes. This stands in for data that was never sensed, so a
read of a sector that was not activated is visibly wrong rather than silently right.

The sector of a column is its top 3 address bits (`sector_decoder`), so columns 0–3 share
sector 0, columns 4–7 sector 1, and so on. A sequential stream therefore activates a
sector once per 128 B.

## Timeline of a column access

The interface keeps **fixed** latencies, so a controller needs no knowledge of which
sectors are open. Every column command pays the activation window, even when its sector
is already active; in that case the bank just skips the energy. Cycle numbers are 1 ns
clocks (1000 MHz), with the command in cycle *c*:

| cycles            | read (RD)                                      | write (WR) |
|-------------------|------------------------------------------------|------------|
| c                 | sector decoded; if its bit is clear it is set (`sector_act_o` pulses in c+1), else `sector_hit_o` pulses | same |
| c+1 … c+8         | activation window (tRCD/2 = 8)                 | activation window |
| c+9               | fetch starts                                   | — |
| c+10 … c+17       | 8 × 32-bit array reads into the atom buffer    | DQ carries {D1,D0} in c+10, {D3,D2} in c+11 |
| c+19              | atom complete, parked in a 2-entry buffer      | — |
| c+13 … c+20       | —                                              | 8 × 32-bit array writes |
| c+26, c+27        | DQ carries {D1,D0}, then {D3,D2}               | — |

Read latency is 26 cycles. That is the 12-cycle CAS latency of the baseline, plus 8 for
the activation now done inside the RD, plus 6 because the narrow path needs 8 cycles where
the wide one needed 2. Write latency is 10: an assumed baseline of 2, plus the 8-cycle
activation. The 8-cycle use of the narrow path is also why column commands to the same
bank must be 8 cycles apart. Different banks still take a column command every 2 cycles.

`ppa_bank` implements this with a descriptor shift register. Each column command enters
with {read, write, sector, column}, and fixed taps start the fetch, capture the write
beats, start the store and launch the burst. `narrow_fetch_path` moves the words,
`atom_fifo` holds fetched atoms until their burst slot, and `dq_burst_io` turns an atom
into beats and back.

## Timing rules for the controller

`channel_timing_checker` enforces these rules. Per channel, it reports whether the
presented row and column commands are legal (`row_ok_o`, `col_ok_o`), and pulses
`violation_o` one cycle after an illegal one.

| rule | cycles | origin |
|------|--------|--------|
| ACT → RD/WR, same bank | 8 | tRCD (16) halved by delayed activation |
| RD/WR → RD/WR, same bank | 8 | tCCD (2) + 6 |
| RD/WR → RD/WR, any bank | 2 | tCCD |
| ACT → ACT, any bank | 2 | tRRD |
| ACT → ACT, same bank | 45 | tRC |
| ACT → PRE | 29 | tRAS |
| PRE → ACT | 16 | tRP |
| WR → PRE | 10 + 2 + 21 = 33 | WL + burst + (tWR 15 + 6) |
| WR → RD, channel | 10 + 2 + 10 = 22 | WL + burst + (tWTR + 6); baseline tWTR = 4 assumed |
| RD → PRE | 18 | tRTP: assumed baseline 4, + 6, + 8 (see below) |
| RD → WR, channel | 26 + 2 − 10 = 18 | DQ turnaround, own rule |

Bank groups (tCCD_L) are not modelled.

## Why the slower banks do not slow the channel

A PPA bank takes one column command per 8 cycles, against one per 2 cycles for a
full-row bank: a quarter of the peak bank bandwidth. The channel bus, however, carries
one 32 B burst per 2 cycles. Four interleaved banks already saturate it, and a channel
has 32. `tb_ppa_channel` checks this directly: four banks read round-robin keep DQ busy
for 64 consecutive cycles.

## Files

Each `.sv` file holds one module or package, named like the file.

| file | role |
|------|------|
| `rtl/ppa_pkg.sv` | organisation constants, all timing values, command enums |
| `rtl/ppa_hbm2_top.sv` | the stack: 8 × `ppa_channel` |
| `rtl/ppa_channel.sv` | 32 × `ppa_bank`, command steering, DQ merge, `channel_timing_checker` |
| `rtl/channel_timing_checker.sv` | controller-side timing rules |
| `rtl/ppa_bank.sv` | delayed activation and the column pipeline |
| `rtl/sector_decoder.sv` | column → sector |
| `rtl/valid_bit_latch.sv` | activation bit vector |
| `rtl/wordline_gate.sv` | the 9 wordline AND gates |
| `rtl/mat_array.sv` | half-mat storage |
| `rtl/narrow_fetch_path.sv` | 32-bit × 8 transfer engine |
| `rtl/atom_fifo.sv` | 2-entry atom buffer |
| `rtl/dq_burst_io.sv` | BL4 burst serializer / deserializer |

### Top-level ports

Every port of `ppa_hbm2_top` is an array indexed by channel:

* **Row bus:** `row_op_i` (`ROW_NOP`/`ROW_ACT`/`ROW_PRE`), `row_bank_i`, `row_i`.
* **Column bus:** `col_op_i` (`COL_NOP`/`COL_RD`/`COL_WR`), `col_bank_i`, `col_i`. A row
  command and a column command may be issued in the same cycle.
* **Data:** `wr_dq_i` and `rd_dq_o` (128 bits per clock, earlier beat in [63:0]), and
  `rd_valid_o`.
* **Timing status:** `row_ok_o`, `col_ok_o`, `violation_o`.
* **Activity:** `sector_act_o` and `sector_hit_o` (activity counters for energy
  estimates), `bank_err_o`, and `open_sectors_o` (every bank's activation bit vector).

Reset (`rst_ni`) is asynchronous and active low. The storage itself is not reset.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
With Verilator 5:

    verilator --binary --timing --assert --top-module tb_ppa_hbm2_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/ppa_pkg.sv tb/tb_ppa_hbm2_top.sv
    ./obj_dir/Vtb_ppa_hbm2_top

Swap the module name for any other `tb_*`.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_ppa_hbm2_top` | Runs the whole stack at its default size with a small open-page controller. Two phases: interleaved sequential rows, then random traffic with row conflicts. It checks all data, the exact latencies, the activation and hit pulses against a reference bit vector, and the flags for one deliberately illegal command. It requires every mechanism to occur (activation, hit, conflict precharge, timing hold, back-to-back bursts) and prints the activated fraction of each opened row. |
| `tb_ppa_channel` | Four-bank interleave that saturates DQ, plus refusal of early and closed-bank commands. |
| `tb_ppa_bank` | Randomised legal traffic on one bank against a reference memory and bit vector. |
| `tb_channel_timing_checker` | Measures each spacing rule as the first cycle at which a probed command is accepted. |
| `tb_mat_array`, `tb_narrow_fetch_path`, `tb_dq_burst_io`, `tb_sector_decoder`, `tb_valid_bit_latch`, `tb_wordline_gate` | Unit checks. |

In the top-level run, a sequential pass that touches every column of a row activates all
8 sectors, so there is no saving. The random phase activates about 17 % of the sectors a
full-row design would. That is the saving mechanism at work; its size depends entirely
on the access pattern.

## Where this model departs from a straightforward reading, and why

* **Read latency.** The fixed read latency of 26 combines a 6-cycle increase for the
  narrow path with an 8-cycle increase for delayed activation, on top of CAS latency 12.
  One could also read the activation cost as paid only on a sector miss. That would make
  latency data-dependent, which a standard controller cannot handle, so it is paid on
  every access.
* **tRTP.** It carries an extra 8 cycles beyond the +6 of the narrow path. The sector is
  activated inside the RD, so its fetch ends 17 cycles after the command, and a PRE
  must not cut it short.
* **Assumed baseline values.** The baseline write latency (2), tWTR (4) and tRTP (4) are
  assumed values.
* **Sense amplifiers and restore.** These are not modelled. `mat_array` is written through,
  and the activation bit vector is the only state that distinguishes active from inactive
  sectors.
* **The activation bit vector.** It is built from flip-flops and is cleared by both ACT
  and PRE.
* **The 4-sector variant.** `sector_decoder` is parameterised for it, but the bank datapath
  is only exercised with 8 sectors.

## Not in this RTL

* Analog and physical parts of the stack: sense amplifiers and helper flip-flops, TSVs,
  the base-die PHY, test pads and microbumps.
* The memory controller and the GPU. The controller's only required change is its timing
  table, which `channel_timing_checker` provides. The open-page scheduler in the top-level
  testbench is a test fixture, not part of the design.
