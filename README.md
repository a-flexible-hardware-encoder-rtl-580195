# Flexible LDPC encoder (Richardson–Urbanke method), SystemVerilog

Encoding an LDPC code naively means multiplying the message by a dense
generator matrix, which costs work quadratic in the block length. This
encoder instead works directly on the sparse parity-check matrix `H`, after
an offline preprocessing step has reordered its rows and columns into
*approximate lower-triangular* (ALT) form:

```
        k = n-m     g      m-g
      +---------+-----+---------+
 m-g  |    A    |  B  |    T    |    T: lower triangular, unit diagonal
      +---------+-----+---------+
  g   |    C    |  D  |    E    |    g: the "gap", small (2 for the reference code)
      +---------+-----+---------+
```

With the codeword split as `x = (s, p1, p2)` (message `s`, parity parts `p1`
of length `g` and `p2` of length `m-g`), `H x = 0` is solved as

```
p1 = F · (E · T⁻¹ · A·s  +  C·s)         F = (E·T⁻¹·B + D)⁻¹, a dense g×g matrix
p2 = T⁻¹ · (A·s + B·p1)
```

(all arithmetic over GF(2), so signs vanish). Every step is a sparse
matrix–vector product, a forward substitution with the sparse triangle `T`,
or a vector XOR. Each step costs one clock per stored one ("edge") of the
matrix it uses. Only `F` is dense, and it is tiny. The hardware never sees
`H` itself. It sees six lookup tables (`A`, `B`, `T`, `C`, `E`, `F`) and a
permutation table, and any code can be encoded by loading other tables.
Loading also sets the block length, the rate and the gap at run time, up to
the sizes fixed by the parameters.

The default parameters fit the reference code: block length 2000, rate 1/2,
gap 2. Its tables hold 6273 (A), 998 (B), 2398 (T), 10 (C), 6 (E) and 2 (F)
entries, 9687 in all.

## The four-stage pipeline

The operations are split into four stages that work at the same time on four
consecutive message blocks:

| stage | work | clocks in this RTL |
|---|---|---|
| 1 | take in the message `s`, one bit per clock | `k + 1` |
| 2 | `A·s` and `C·s`, in parallel | `max(eA, eC) + 2` |
| 3 | `T⁻¹(As)` → `E(..)` → `+ Cs` → `F(..) = p1` → `B·p1` → `As + Bp1` | `eT + eE + eF + eB + g + (m-g) + 10` |
| 4 | `p2 = T⁻¹(As + Bp1)`, then codeword generation | `eT + 2n + 4` |

`eX` is the number of stored entries of table `X`. The stage boundaries are
chosen so that for rate-1/2 codes stage 2 (dominated by `A`, which holds
about two thirds of all edges) and stage 4 (the second pass through `T` plus
`2n` clocks of codeword output) take about the same time. A new codeword
then leaves every

```
CPC = max(S1, S2, S3, S4) + 1   clocks
```

The `+1` is the stage controller's hand-over. For the reference code the
stages take 1001, 6275, 4414 and 6402 clocks, so CPC = 6403 clocks. The
published cycle model of this architecture gives 6398. The gap between the
two is the 1–2 clocks of start/done hand-over that every unit here adds (see
*Departures*). Latency is about four CPC, because a block passes through all
four stages.

Stage 3 is a chain: each unit's `done` pulse starts the next. Stage 2 runs
its two multipliers side by side and finishes when both are done. Stage 4
runs forward substitution, then codeword generation.

### Buffers between the stages

Every vector has its own small memory (`vec_buf`). Vectors that cross a
stage boundary are double-buffered. The producing stage writes bank
`epoch[0]` while the consuming stage reads the other bank:

* `As` and `Cs`: stage 2 → stage 3. `As` is read twice in stage 3, by the
  first substitution and by the final addition.
* `p1` and `As+Bp1`: stage 3 → stage 4.
* `s`: stage 1 writes it, stage 2 reads it, and stage 4 needs it again two
  blocks later for the codeword. It therefore has **four** banks. Stage 1
  writes bank `epoch`, stage 2 reads `epoch-1` and stage 4 reads `epoch-3`.
* `TAs`, `ETAs`, `ETAsCs`, `Bp1` and `p2` live inside one stage and have a
  single bank.

The vector memories read combinationally and write at the clock edge. This
matters for forward substitution, which reads back results it wrote one
clock earlier (see below). Each vector element is `W` bits wide (see
*Several encoders in lock step*).

### Stage controller

Each stage pulses `finish` when it is done. The controller (`stage_controller`)
latches these pulses. When every stage that holds a block has finished, it
sends one `start` pulse to all of them, one clock later. In the same clock
it advances the 2-bit `epoch`, which selects the buffer banks, and it shifts
a 4-bit occupancy record (`active`). A stage with no block gets no start and
counts as finished. This is how the pipeline fills after reset and drains at
the end.

Stage 1 is the only stage that waits on the outside world. If stage 1 has
not taken a single bit yet, no bit is offered (`s_valid` low) and all other
stages are done, the controller advances anyway and records a **bubble**.
Without this rule the last blocks would stay in the pipeline until another
message arrived. If a message stops halfway through, the whole pipeline
**stalls** until the message is complete. `s_ready` is low in the clock of a
start pulse, so no bit can be lost while stage 1 restarts.

## Sparse-matrix tables

Each matrix is stored row after row as a list of the column positions of its
ones. Every entry is `{end_row, column}` (`IW+1` bits). Columns are 1-based.
The last entry of a row has `end_row = 1`. A row with no ones takes one entry
`{1, 0}`: column 0 selects nothing. For example,

```
X = 0 0 1 0 1 0          address  0 1 2 3 4 5 6 7 8
    1 0 0 0 0 0          column   3 5 1 2 4 6 0 3 4
    0 1 0 1 0 1          end_row  0 1 1 0 0 1 1 0 1
    0 0 0 0 0 0
    0 0 1 1 0 0
```

Rules the table writer must follow:

* **T**: the diagonal one of every row must be that row's **last** entry, the
  one that carries `end_row`. All other entries of row `i` must have columns
  `< i+1`, which is automatic for a lower-triangular matrix. Duplicated
  columns are allowed in every table and cancel in pairs, as GF(2) requires.
* **F**: holds the g×g matrix that is applied to `E·T⁻¹·A·s + C·s`, that is
  the inverse written above, not `D`.
* **Permutation table**: `n` entries, zero-based. Output bit `j` of the
  codeword is element `perm[j]` of the internal order `(s, p1, p2)`. The
  result is therefore a codeword of the original, un-permuted `H`, with
  column `j` of `H` matching column `perm[j]` of the ALT form.

Producing the tables (triangulation, rank check of `F`, inverting `F`) is
software work done once per code. It is not part of this RTL.

The tables (`lut_ram`) read synchronously, like FPGA block RAM: data
appears one clock after the address. `T` has two read ports, because stage 3
and stage 4 both walk through it at the same time. All other tables have one.

## Datapath units

**Matrix–vector multiply** (`mvm_unit`, `Z = X·Y`). An address counter walks
the table one entry per clock. The entry's column selects `Y[column-1]`,
which is the AND of a matrix row with `Y`. The selected bits are XORed into
an accumulator. On the entry with `end_row`, the accumulator XOR the current
bit is written to `Z[row]` and the row counter advances. The unit stops after
`rows` row ends. It does not need to know how many entries the table has.
Timing: `start` at clock 0, `done` at clock `entries + 2`.

**Forward substitution** (`fs_unit`, solves `X·Z = Y` for unit
lower-triangular `X`). This is the least obvious unit. It uses
`z_i = y_i ⊕ ⨁_{j<i} x(i,j)·z_j`, and the multiplier's circuit with two
changes:

1. Off-diagonal entries select an already computed `Z[column-1]`, not a
   `Y` element. `Z` is read at the entry's column and written at the row
   index, so it has separate read and write addresses.
2. The entry that ends the row (the diagonal) selects `Y[row]` through a
   multiplexer controlled by `end_row`. The `Y` read index and the `Z` write
   index are therefore the same row counter.

Because `Z` reads combinationally, `z_i` written at the end of row `i` can be
used by the very first entry of row `i+1`, one clock later. No stall or
forwarding path is needed. The timing is the same as the multiplier's:
`entries + 2` clocks.

**Vector addition** (`va_unit`). One index addresses `X`, `Y` and `Z`, and
`Z = X xor Y`, one element per clock, `len + 1` clocks.

**Codeword generation** (`cwg_unit`). Phase 1 copies `s`, `p1` and `p2` into
an internal `n`-element memory (`n` clocks). Phase 2 reads the permutation
table in order and sends out `inter[perm[j]]` (`n` clocks). `done` comes two
clocks after phase 2 ends. The output is a plain stream (`cw_valid`,
`cw_data`, `cw_last`) with no back-pressure: a receiver must take one bit per
clock for `n` clocks.

All units take a one-clock `start` pulse and give a one-clock `done` pulse.
Each has an assertion that `start` never arrives while it is busy.

## Several encoders in lock step

Parameter `W` sets how many encoders share one set of tables. Every vector
element and every message and codeword port is `W` bits wide, and bit `l`
belongs to encoder `l`. The tables only index operands and are walked in the
same order for every block, so one address sequence, one controller and one
set of tables serve all `W` encoders. The cost is that all `W` messages must
arrive together, one bit of each per clock. `W = 1` is the single encoder.

## Interface of `ldpc_encoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_we`, `cfg_sel`, `cfg_addr`, `cfg_data` | in | 1, 3, 16, IW+1 | table write: `cfg_sel` is `ldpc_pkg::tbl_sel_e` (`TBL_A` … `TBL_F`, `TBL_P`); `cfg_data = {end_row, column}`, or the permutation entry in the low IW bits |
| `cfg_k`, `cfg_g`, `cfg_mg` | in | IW | `n-m`, `g`, `m-g` of the loaded code; keep them stable while encoding |
| `s_valid`, `s_ready`, `s_data` | in/out/in | 1, 1, W | message bits, taken when `s_valid && s_ready` |
| `cw_valid`, `cw_data`, `cw_last` | out | 1, W, 1 | codeword bits, `cw_last` on bit `n-1` |
| `stage_start`, `stage_active`, `stage_bubble` | out | 1, 4, 1 | controller status, for observation |

`IW = $clog2(N+1)`, which is 11 at the defaults. Parameters: `W` (1), `N`
(2000), `M` (1000) and `G` (2) are the largest block length, check count and
gap. `EA`, `EB`, `ET`, `EC`, `EE` and `EF` are the table depths. All
defaults live in `ldpc_pkg`. A loaded code fits if `k ≤ N-M`, `g ≤ G`,
`m-g ≤ M-G` and each table fits its depth.

To use the encoder: reset it, write every table entry, set `cfg_k`, `cfg_g`
and `cfg_mg`, then stream messages of `k` bits. The first codeword appears
about four CPC after its message.

## What fits at the default sizes

| evaluated configuration | fits? |
|---|---|
| n = 2000, rate 1/2, gap 2 (the reference code) | yes, exactly: the table depths are its edge counts |
| n = 500 and n = 1000, rate 1/2 | the dimensions and the total edge count fit. Whether the small tables `C` (10), `E` (6) and `F` (2) are deep enough depends on the code. Codes with 2418 and 4859 entries, split like the reference code's, run at CPC 1595 and 3204. |
| n = 4000, 8000 | no: raise `N`, `M` and the depths |
| n = 2000 at rate 1/3 or 2/3 | no: `m = 1333 > M`, or `k = 1333 > N-M` |
| 4–16 encoders sharing tables | set `W` |

## Departures and choices

* **Stage 3 timing.** The published cycle model charges stage 3 `n-m` clocks
  for the addition `E·T⁻¹·A·s + C·s`. That vector has `g` elements, and this
  RTL takes `g` clocks for it. Every unit also adds 1–2 clocks of
  start/done hand-over, and stage 4 adds 4. For rate 1/2 neither change moves
  the bottleneck.
* **Table loading** through a write port, and run-time code dimensions.
  Reading the tables from a file at build time would be the other option.
* **Handshakes.** Valid/ready on the message input. No back-pressure on the
  codeword output.
* **Fill and drain** of the pipeline through the occupancy record and
  bubbles. **Reset** is asynchronous and active low, and does not clear the
  memories.
* **Lock-step instances** instead of fully independent encoder copies.
* **Table ports.** The `T` table has two read ports and a separate write
  port. On a dual-ported FPGA block RAM, the load port would have to share
  a port with one of the readers.
* **Run-time code change.** Changing rate or block length means reloading
  the tables. Rescheduling the stages for a different rate, for instance by
  loading a different FPGA configuration, is outside this RTL.
* **Diagonal last** in every row of `T`, and the permutation as a zero-based
  gather. These are the ordering conventions the table writer must follow.
* The stage sections live in the top module (`ldpc_encoder`), not in
  separate stage modules. Each section instantiates its units and buffers.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.
`tb/ldpc_ref_pkg.sv` is a software reference. It generates random codes in
table form, including empty rows and duplicate columns, and computes
products, substitutions and whole encodings.

* `tb_ldpc_encoder`: four lock-step encoders on a reduced code (n = 80,
  g = 3), with thirteen messages per encoder. Messages arrive back to back, then
  with random gaps, then after an idle spell. Every codeword is compared
  with the reference. Its `(s, p1, p2)` is recovered through the permutation
  and checked against the full parity check `H·x = 0` in ALT form. The
  `[A B T]` rows use `T` as a plain product, so they do not rely on
  substitution. The `[C D E]` rows use `D`, rebuilt from the tables as
  `F_table⁻¹ + E·T⁻¹·B`. The spacing of back-to-back
  codewords is checked against the CPC formula above. The latency of a
  message sent while the pipeline fills is checked as well, from its first
  bit in to its last bit out. That latency is
  `(max(S1,S2)+1) + (max(S1,S2,S3)+1) + CPC + S4 - 2`, which is 25355 clocks
  for the reference code. In steady state the latency is `3·CPC + S4 - 2`.
  The test fails if a full pipeline, an input stall, a bubble or an empty
  table row never happened.
* `tb_ldpc_encoder_full`: the same checks with the encoder at its default
  parameters (n = 2000, one encoder, tables exactly as deep as the reference
  code's). It encodes eight messages and checks CPC = 6403. It runs in well
  under a second.
* `tb_ldpc_workloads`: an encoder at the default sizes loaded at run time
  with an n = 500 code and another with an n = 1000 code (rate 1/2, gap 2,
  2418 and 4859 entries). It uses `tb/ldpc_workload_run.sv`, which holds the
  checks of the end-to-end test.
* `tb_ldpc_instances`: sixteen lock-step encoders (`W = 16`) on a code of
  the reference size, with separate messages for each encoder.
* Unit testbenches: `tb_mvm_unit`, `tb_fs_unit`, `tb_va_unit`,
  `tb_cwg_unit`, `tb_lut_ram`, `tb_vec_buf` and `tb_stage_controller`. These
  include checks of the clock counts given above.

The random codes are not real LDPC codes, that is not codes designed for
good decoding. They are random sparse tables in ALT form with an invertible
`F` table, and such tables define a valid `H`, which is all the encoder
needs.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/*.sv tb/tb_ldpc_encoder.sv \
    --top-module tb_ldpc_encoder -Mdir obj_top
./obj_top/Vtb_ldpc_encoder
```

Replace the testbench name to run any other test. For a unit test, the
package files and that unit's `rtl/` file are enough.

## Files

| file | contents |
|---|---|
| `rtl/ldpc_pkg.sv` | default sizes, table-select enum |
| `rtl/ldpc_encoder.sv` | top: stages 1–4, buffers, tables, controller |
| `rtl/stage_controller.sv` | start/finish hand-over, epoch, occupancy, bubbles |
| `rtl/mvm_unit.sv`, `rtl/fs_unit.sv`, `rtl/va_unit.sv`, `rtl/cwg_unit.sv` | datapath units |
| `rtl/lut_ram.sv` | table RAM, synchronous read, several read ports |
| `rtl/vec_buf.sv` | banked vector buffer, combinational read |
| `tb/ldpc_ref_pkg.sv` | reference model and random code generator |
| `tb/ldpc_workload_run.sv` | one loaded-code encoding run with all end-to-end checks, used by the workload tests |
| `tb/tb_*.sv` | testbenches |
