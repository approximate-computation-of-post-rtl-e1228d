// cue_unit: Column Update Elimination (CUE) unit of one hyper-column unit.
//
// In a BCPNN hyper-column unit the synaptic traces form a matrix with one
// row per input connection and one column per mini-column unit (MCU). Input
// spikes update rows; output spikes would update columns, which row-wise
// DRAM serves badly. This unit removes the column accesses: output spikes
// are only recorded, and whenever a row is updated the unit supplies the
// output spikes that row has not yet seen, so the row's cells for those
// columns are updated together with the row.
//
// Blocks: the history buffer (a ring of B cells of MCU ID + timestamp), the
// controller (cue_fsm), the approximation function (approx_predictor) fed by
// an LFSR, and the output select (spike_mux). Spikes older than the buffer's
// lookback horizon are lost; for a row whose last update predates that
// horizon the predictor estimates them, evenly spaced at the output period
// 1/r with a random first position.
//
// Interface (all valid/ready pairs transfer on a clock edge where both are
// high):
//  * spk_*   : output spike of an MCU of this hyper-column unit, to record.
//  * row_*   : a row update request carrying the timestamp of that row's
//              previous input spike; row_done pulses when all spikes for it
//              have been handed out.
//  * rate_period : 1/r in time-steps, the static output firing period used
//              by the predictor (hold it constant during a row update).
//  * out_*   : stream of (MCU ID, timestamp, predicted flag) to the
//              synaptic update.
// Timing: see cue_fsm; at full size a row update over a full buffer with no
// predicted spikes takes 201 cycles after acceptance.
// Structure and block roles follow the reference design; the handshakes,
// the predicted flag and the static-rate port are this implementation's
// choice.
module cue_unit
  import cue_pkg::*;
#(
  parameter int unsigned DEPTH    = 100,  // B, history buffer cells
  parameter int unsigned N_MCU    = 100,  // M, MCUs per hyper-column unit
  parameter int unsigned PERIOD_W = 16,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // output spikes from post-synaptic activation
  input  logic                spk_valid,
  output logic                spk_ready,
  input  mcu_id_t             spk_mcu_id,
  input  ts_t                 spk_ts,
  // row update requests
  input  logic                row_valid,
  output logic                row_ready,
  input  ts_t                 row_last_ts,
  input  logic [PERIOD_W-1:0] rate_period,
  output logic                row_done,
  // to the synaptic update
  output logic                out_valid,
  input  logic                out_ready,
  output mcu_id_t             out_mcu_id,
  output ts_t                 out_ts,
  output logic                out_predicted,
  output logic                busy
);

  logic          buf_wr_en;
  spike_t        buf_wr_data;
  logic [AW-1:0] buf_rd_addr;
  spike_t        buf_rd_data;
  logic [AW-1:0] buf_head;
  logic [AW-1:0] buf_oldest;
  logic [AW:0]   buf_count;
  logic          buf_wrapped;

  logic          pred_load, pred_step, pred_valid, lfsr_step;
  ts_t           pred_last_ts, pred_lbh_ts, pred_ts;
  logic [RAND_W-1:0] rand_val;
  spike_src_e    sel;
  mcu_id_t       pred_mcu_id;
  spike_t        out_spike;

  assign buf_wr_data = '{mcu_id: spk_mcu_id, ts: spk_ts};

  history_buffer #(.DEPTH(DEPTH)) u_buffer (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (buf_wr_en),
    .wr_data (buf_wr_data),
    .rd_addr (buf_rd_addr),
    .rd_data (buf_rd_data),
    .head    (buf_head),
    .oldest  (buf_oldest),
    .count   (buf_count),
    .wrapped (buf_wrapped)
  );

  cue_fsm #(.DEPTH(DEPTH), .N_MCU(N_MCU)) u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .spk_valid    (spk_valid),
    .spk_ready    (spk_ready),
    .buf_wr_en    (buf_wr_en),
    .buf_rd_addr  (buf_rd_addr),
    .buf_rd_data  (buf_rd_data),
    .buf_oldest   (buf_oldest),
    .buf_count    (buf_count),
    .buf_wrapped  (buf_wrapped),
    .row_valid    (row_valid),
    .row_ready    (row_ready),
    .row_last_ts  (row_last_ts),
    .row_done     (row_done),
    .pred_load    (pred_load),
    .pred_step    (pred_step),
    .pred_last_ts (pred_last_ts),
    .pred_lbh_ts  (pred_lbh_ts),
    .pred_valid   (pred_valid),
    .lfsr_step    (lfsr_step),
    .sel          (sel),
    .pred_mcu_id  (pred_mcu_id),
    .out_valid    (out_valid),
    .out_ready    (out_ready),
    .busy         (busy)
  );

  lfsr #(.WIDTH(RAND_W)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (lfsr_step),
    .value (rand_val)
  );

  approx_predictor #(.PERIOD_W(PERIOD_W)) u_pred (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (pred_load),
    .step       (pred_step),
    .last_ts    (pred_last_ts),
    .lbh_ts     (pred_lbh_ts),
    .period     (rate_period),
    .rand_val   (rand_val),
    .pred_ts    (pred_ts),
    .pred_valid (pred_valid)
  );

  spike_mux u_mux (
    .sel           (sel),
    .buf_spike     (buf_rd_data),
    .pred_ts       (pred_ts),
    .pred_mcu_id   (pred_mcu_id),
    .out_spike     (out_spike),
    .out_predicted (out_predicted)
  );

  assign out_mcu_id = out_spike.mcu_id;
  assign out_ts     = out_spike.ts;

  // Handshake rules toward the synaptic update.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_ts) && $stable(out_mcu_id)
                                && $stable(out_predicted))
    else $error("cue_unit: output spike changed while stalled");
  a_no_enqueue_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !spk_ready)
    else $error("cue_unit: buffer writable during a row update");

endmodule
