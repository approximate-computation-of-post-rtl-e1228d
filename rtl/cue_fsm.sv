// cue_fsm: main controller of the Column Update Elimination (CUE) unit.
//
// It has the three duties of the CUE controller:
//  1. Enqueue: an output spike (MCU ID, timestamp) offered on spk_* is
//     written into the history buffer at its head.
//  2. Dequeue: on a row update it walks the buffer from the oldest cell to
//     the newest and hands every spike newer than the row's last input spike
//     (row_last_ts) to the synaptic update. Cells are read, not removed:
//     every row of the synaptic matrix needs them.
//  3. Approximate: if the buffer has dropped spikes (`wrapped`) and the
//     row's last input spike is older than the lookback horizon (LBH, the
//     timestamp of the oldest buffered spike), it first runs the predictor
//     for every MCU 0..N_MCU-1, taking one LFSR number per MCU, and hands on
//     each predicted spike that falls before the LBH.
// Per MCU the synaptic update therefore sees its spikes in time order:
// predicted ones (all before the LBH) first, then buffered ones.
//
// States: IDLE -> [PREDICT] -> [SCAN] -> DONE -> IDLE.
//
// Interface and timing:
//  * spk_valid/spk_ready: ready whenever IDLE; the write happens at the edge
//    where both are high. A waiting spike has priority over a row request,
//    so the buffer never changes under a running row update.
//  * row_valid/row_ready: accepted in IDLE when no spike is offered.
//    row_done pulses one cycle when the update is finished.
//  * out_valid/out_ready: one spike per cycle while out_ready is high;
//    out_valid holds, and the spike is stable, until out_ready.
//  * Cycle count from the accepting edge to the row_done cycle, with
//    out_ready high: (approximation ? N_MCU + predicted spikes : 0)
//    + buffered cells + 1. A full buffer of 100 cells with 100 MCUs and no
//    predicted spike takes 201 cycles.
// The three duties, the LBH test and the use of an LFSR are the reference
// design's; the handshakes, the priority rule and the state sequence are this
// implementation's choice.
module cue_fsm
  import cue_pkg::*;
#(
  parameter int unsigned DEPTH = 100,
  parameter int unsigned N_MCU = 100,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // output spikes from the MCUs (enqueue)
  input  logic          spk_valid,
  output logic          spk_ready,
  output logic          buf_wr_en,
  // history buffer
  output logic [AW-1:0] buf_rd_addr,
  input  spike_t        buf_rd_data,
  input  logic [AW-1:0] buf_oldest,
  input  logic [AW:0]   buf_count,
  input  logic          buf_wrapped,
  // row update request
  input  logic          row_valid,
  output logic          row_ready,
  input  ts_t           row_last_ts,
  output logic          row_done,
  // approximation function and LFSR
  output logic          pred_load,
  output logic          pred_step,
  output ts_t           pred_last_ts,
  output ts_t           pred_lbh_ts,
  input  logic          pred_valid,
  output logic          lfsr_step,
  // output select and stream to the synaptic update
  output spike_src_e    sel,
  output mcu_id_t       pred_mcu_id,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          busy
);

  typedef enum logic [1:0] {
    S_IDLE    = 2'd0,
    S_PREDICT = 2'd1,
    S_SCAN    = 2'd2,
    S_DONE    = 2'd3
  } state_e;

  state_e        state, state_n;
  ts_t           last_r, lbh_r;
  logic [AW-1:0] oldest_r;
  logic [AW:0]   count_r;
  logic [AW:0]   idx, idx_n;
  mcu_id_t       mcu, mcu_n;
  logic [AW:0]   addr_sum;
  logic          approx;
  logic          accept;
  logic          newer;

  // Ring address of the idx-th oldest cell.
  assign addr_sum = (AW+1)'(oldest_r) + idx;

  assign spk_ready = (state == S_IDLE);
  assign buf_wr_en = spk_valid && spk_ready;
  assign row_ready = (state == S_IDLE) && !spk_valid;
  assign accept    = row_valid && row_ready;
  assign busy      = (state != S_IDLE);
  assign row_done  = (state == S_DONE);

  // In IDLE the read port shows the oldest cell, whose timestamp is the LBH.
  assign approx = buf_wrapped && (row_last_ts < buf_rd_data.ts);
  assign newer  = (buf_rd_data.ts > last_r);

  assign pred_last_ts = (state == S_IDLE) ? row_last_ts       : last_r;
  assign pred_lbh_ts  = (state == S_IDLE) ? buf_rd_data.ts    : lbh_r;
  assign pred_mcu_id  = mcu;

  always_comb begin
    state_n     = state;
    idx_n       = idx;
    mcu_n       = mcu;
    buf_rd_addr = buf_oldest;
    sel         = SRC_BUFFER;
    out_valid   = 1'b0;
    pred_load   = 1'b0;
    pred_step   = 1'b0;
    lfsr_step   = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (accept) begin
          idx_n = '0;
          mcu_n = '0;
          if (approx) begin
            pred_load = 1'b1;
            lfsr_step = 1'b1;
            state_n   = S_PREDICT;
          end else if (buf_count == '0) begin
            state_n = S_DONE;
          end else begin
            state_n = S_SCAN;
          end
        end
      end

      S_PREDICT: begin
        sel = SRC_PREDICTED;
        if (pred_valid) begin
          out_valid = 1'b1;
          pred_step = out_ready;
        end else if (mcu == ID_W'(N_MCU - 1)) begin
          state_n = (count_r == '0) ? S_DONE : S_SCAN;
        end else begin
          mcu_n     = mcu + 1'b1;
          pred_load = 1'b1;
          lfsr_step = 1'b1;
        end
      end

      S_SCAN: begin
        buf_rd_addr = (addr_sum >= (AW+1)'(DEPTH)) ? AW'(addr_sum - (AW+1)'(DEPTH))
                                                   : AW'(addr_sum);
        out_valid   = newer;
        if (!newer || out_ready) begin
          if (idx == count_r - 1'b1) state_n = S_DONE;
          else                       idx_n   = idx + 1'b1;
        end
      end

      S_DONE: state_n = S_IDLE;

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      idx      <= '0;
      mcu      <= '0;
      last_r   <= '0;
      lbh_r    <= '0;
      oldest_r <= '0;
      count_r  <= '0;
    end else begin
      state <= state_n;
      idx   <= idx_n;
      mcu   <= mcu_n;
      if (accept) begin
        last_r   <= row_last_ts;
        lbh_r    <= buf_rd_data.ts;
        oldest_r <= buf_oldest;
        count_r  <= buf_count;
      end
    end
  end

endmodule
