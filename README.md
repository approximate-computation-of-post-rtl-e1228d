# CUE: column-update elimination for a BCPNN hyper-column unit

A Bayesian Confidence Propagation Neural Network (BCPNN) models the cortex as
a network of *hyper-column units* (HCUs). Each HCU holds a group of
*mini-column units* (MCUs, 100 in a human-scale network) that compete for
the right to spike. It also holds a synaptic matrix with one row per input
connection (10,000) and one column per MCU. An input spike updates a row of
the matrix. An output spike of an MCU would update a column. DRAM serves rows
well and columns badly, and the column accesses dominate the bandwidth to
synaptic storage.

Column-update elimination (CUE) removes the column accesses. An output spike
is only *recorded*: which MCU spiked, and when. When an input spike later
fetches a row, the synaptic update also receives the recorded output spikes
that the row has not yet seen. The row's cells for those MCUs are brought up
to date in the same row access. No column is ever fetched.

This repository is the RTL of that per-HCU unit. It has four parts:

- the output-spike history buffer;
- a predictor for spikes that no longer fit in the buffer;
- the controller;
- an output select that feeds the synaptic update.

The synaptic update datapath, the DRAM and the MCU competition are not
included. The unit's ports are where they connect.

```
 output spike ──► history_buffer (ring, 100 × {MCU ID, timestamp})
 (MCU ID, ts)          │ read port
                       ▼
 row request ──► cue_fsm ──Select──► spike_mux ──► (MCU ID, ts, predicted) to synaptic update
 (last_ts)          │  ▲                 ▲
                    ▼  │ pred_valid      │ predicted ts
                  lfsr ─► approx_predictor
```

## The lookback horizon and why prediction is needed

The buffer holds the last B = 100 output spikes. An HCU emits about 100
output spikes per second, so the buffer reaches back roughly one second. The
timestamp of the oldest spike still in the buffer is the *lookback horizon*
(LBH). After the ring has filled, each new spike overwrites the oldest one, so
spikes older than the LBH are lost.

A row whose previous input spike is newer than the LBH loses nothing: every
output spike since that input spike is still in the buffer. A row whose
previous input spike is older than the LBH missed whatever was overwritten.
If those spikes were simply ignored, the error would accumulate over time.
Instead, the unit *predicts* them.

For each MCU, it assumes uniformly spaced spikes at the output firing period
P = 1/r over the gap between the row's previous input spike and the LBH. The
first predicted spike sits at a pseudo-random offset in [1, 2P] after the
previous input spike. This keeps the errors of different rows from lining up.
Each later spike comes P time-steps after the one before it. Prediction stops
at the first time that is not earlier than the LBH. From the LBH onwards the
buffered spikes take over.

The conditions for predicting are:

- the buffer has overwritten at least one spike (`wrapped`), and
- `row_last_ts < LBH`.

If nothing has been dropped, no prediction is made, even for very old rows.
In that case the buffer still holds every spike ever recorded.

## What one row update produces

A row update takes `row_last_ts`, the time of that row's previous input
spike. It then emits a stream of `(mcu_id, ts, predicted)` records:

1. **Predicted spikes**, only when the conditions above hold. They come out
   MCU by MCU, for IDs 0 … N_MCU−1. Each MCU's spikes are in increasing time
   order, and each MCU draws one LFSR number.
2. **Buffered spikes**, from the oldest cell to the newest. A cell is emitted
   only if its timestamp is strictly greater than `row_last_ts`. Older cells
   are read and skipped. Cells are never removed, because every row needs
   them.

Every predicted spike is earlier than every buffered one. So for any single
MCU, and therefore for any single cell of the row, spikes arrive in time
order. That is what a lazily evaluated trace update needs. Spikes of
different MCUs are not in global time order.

## Timing

The clock is one cycle per handled cell or per emitted spike. With
`out_ready` held high, a row update takes the following number of cycles,
counted from the edge that accepts it to the cycle in which `row_done` is
high:

```
(predicting ? N_MCU + predicted_spikes : 0) + valid_cells + 1
```

Each cycle with `out_valid && !out_ready` adds one more cycle.

| Case | Cycles |
|---|---|
| Full buffer, nothing to predict | 101 |
| Full buffer, prediction runs but nothing falls before the LBH | 201 |
| Empty buffer | 1 |

Traffic for one human-scale HCU is 10,000 row updates/s and 100 output
spikes/s, with rows chosen at random and P = 1000 ms. Under that traffic the
unit averages **about 156 cycles per row update**, as measured by
`tb_cue_human_scale`. At 200 MHz that keeps the unit busy for under 1 % of
the time. For comparison, the original CUE implementation reported an
average of 236 cycles per row update. The two differ in detail and should
not be expected to match.

## Interfaces (`cue_unit`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset |
| `spk_valid` / `spk_ready` | in / out | 1 | Offer an output spike; accepted when both are high |
| `spk_mcu_id`, `spk_ts` | in | 7, 32 | Binary MCU ID and time-step (1 ms) of the spike |
| `row_valid` / `row_ready` | in / out | 1 | Row update request |
| `row_last_ts` | in | 32 | Time of the row's previous input spike |
| `rate_period` | in | 16 | P = 1/r in time-steps; 0 is taken as 1; hold it stable during a row |
| `row_done` | out | 1 | One-cycle pulse when the row's stream is complete |
| `out_valid` / `out_ready` | out / in | 1 | Spike stream to the synaptic update |
| `out_mcu_id`, `out_ts`, `out_predicted` | out | 7, 32, 1 | The spike, and whether it was predicted |
| `busy` | out | 1 | A row update is in progress |

Rules:

- `spk_ready` is high only while the unit is idle.
- `row_ready` is high only while the unit is idle *and* no spike is being
  offered. A spike therefore wins over a row request in the same cycle, and
  the buffer never changes while a row is being read.
- Output spikes arrive at about 100 per second, and a row update lasts about
  a microsecond. The delay this adds to a spike is therefore negligible.
- While `out_valid` is high and `out_ready` is low, the record is held
  stable. An assertion in `cue_unit` checks this.

## Files

| File | Content |
|---|---|
| `rtl/cue_pkg.sv` | Widths (7-bit MCU ID, 32-bit timestamp, 16-bit random number), `spike_t` cell struct, source enum |
| `rtl/history_buffer.sv` | Ring buffer in a register file: write at head, asynchronous read port, `count`, `oldest` and `wrapped` |
| `rtl/approx_predictor.sv` | Uniform-spacing predictor for one MCU; first offset `1 + floor(u·2P / 2^16)` |
| `rtl/lfsr.sv` | 16-bit Fibonacci LFSR, x^16+x^14+x^13+x^11+1, advanced only on demand |
| `rtl/cue_fsm.sv` | Controller: IDLE → [PREDICT] → [SCAN] → DONE |
| `rtl/spike_mux.sv` | Output select between buffer cell and prediction |
| `rtl/cue_unit.sv` | Top: wires the above together; handshake assertions |
| `tb/tb_*.sv` | One self-checking bench per module, plus `tb_cue_human_scale` |

The storage is 100 cells × 39 bits = 3,900 bits of register file. All other
state is about 200 flip-flops.

## Choices made in this implementation

These points are not fixed by the CUE method itself. They were chosen here
and are the first places to look when adapting the unit:

- **Static firing rate.** P is an input port. An adaptive variant, which
  measures r continuously, can drive the same port. The measurement itself
  is not included.
- **Random offset.** The offset is scaled by multiply-and-shift instead of a
  modulo. It is uniform over [1, 2P] to within 2^-16.
- **LFSR.** Its width, polynomial and seed (0xACE1) are arbitrary. It
  advances only when a number is used.
- **Overflow handling.** A full buffer overwrites its oldest cell, and a
  sticky `wrapped` flag marks that spikes have been dropped.
- **Head pointer.** It lives in the buffer. The controller supplies the
  write enable and the read address.
- **Output flag.** Each output record carries a `predicted` flag.
- **No timestamp wrap.** A 32-bit millisecond counter lasts 49.7 days. The
  comparisons are plain unsigned comparisons.
- **Spikes per MCU.** Predictions are made for all N_MCU MCUs. For an HCU
  with fewer MCUs, set `N_MCU` to match.

## Verification

Each bench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. Each also has a watchdog.

- **`tb_history_buffer`:** random writes against a queue model. It checks
  count, head, oldest, wrapped and random cell reads across many wraps.
- **`tb_lfsr`:** follows an independently written shift register, checks
  the hold behaviour, and checks that the period is exactly 65,535.
- **`tb_approx_predictor`:** checks every predicted time against the
  closed-form value, the [1, 2P] bound, the number of predictions, and that
  a period of 0 behaves as 1.
- **`tb_spike_mux`:** checks both select values.
- **`tb_cue_fsm`:** runs the controller with a bench model of the buffer and
  of the predictor. It uses a small configuration (8 cells, 4 MCUs) with
  random stalls and competing spikes and rows. It checks the stream, the
  cycle counts and the LFSR use.
- **`tb_cue_unit`:** the whole unit at its default size, end to end. It
  keeps its own copy of the LFSR and of the recorded spikes, and checks
  every output record and every row's cycle count. It counts each
  mechanism and fails if any never occurred. The mechanisms are:
  - buffer overwrite;
  - prediction invoked;
  - a row inside the horizon;
  - a skipped old cell;
  - an output stall;
  - a spike held off by a busy unit;
  - a row held off by a spike;
  - an empty-buffer row.

  It ends with a directed row that must take exactly 201 cycles.
- **`tb_cue_human_scale`:** the traffic of one human-scale HCU for 4
  simulated seconds. It checks every record and reports the average cycles
  per row update.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/cue_pkg.sv \
  rtl/history_buffer.sv rtl/lfsr.sv rtl/approx_predictor.sv rtl/spike_mux.sv \
  rtl/cue_fsm.sv rtl/cue_unit.sv tb/tb_cue_unit.sv --top-module tb_cue_unit
./obj_dir/Vtb_cue_unit
```

For another bench, substitute its file and top module.

## Limits and departures

- **Source of the cycle count.** The cycle count and micro-architecture are
  this design's own. The original CUE implementation gave only its block
  structure, its buffer dimensions (B = 100, 7-bit ID, 32-bit timestamp),
  the uniform predictor with a random first spike in [1, 2/r], and the three
  duties of its controller.
- **Surroundings not included.** The synaptic-update arithmetic (Z, E, P
  traces and weights), the 3D DRAM, the MCU winner-take-all and the
  spike-propagation network belong to the surrounding accelerator. They are
  not part of this RTL.
- **Lint warnings.** Verilator reports a few unused-signal warnings, all of
  which are expected:
  - the buffer's `head` is unused by the top;
  - the timestamp half of the read data is used by the controller while the
    ID half is not;
  - the low product bits of the predictor's scaling are unused.

  It also notes that `rst_n` is used both as an asynchronous reset and in
  the assertions' `disable iff`.
