// approx_predictor: the CUE approximation function for one MCU.
//
// When the history buffer has dropped spikes, a row whose last input spike
// is older than the lookback horizon (LBH, the timestamp of the oldest
// buffered spike) misses the output spikes of the interval between the two.
// This unit predicts them with a uniform spacing of 1/r time-steps, r being
// the output firing rate. The first predicted spike is placed at a random
// offset in [1, 2/r] after the row's last input spike; each following one
// is 1/r later. Predictions stop at the LBH, where the buffered spikes take
// over.
//
// Interface: `load` starts a sequence from last_ts, lbh_ts, the period
// P = 1/r (time-steps, a P of 0 is taken as 1) and a RAND_W-bit random
// number u. The first timestamp is
//     last_ts + 1 + floor(u * 2P / 2^RAND_W)
// which covers [last_ts + 1, last_ts + 2P]. `step` advances pred_ts by P.
// pred_valid is high while pred_ts < LBH, i.e. while the current prediction
// lies in the approximation interval.
//
// Timing: load and step take effect at the next clock edge; pred_ts and
// pred_valid are registered state plus one comparator, no further latency.
// The uniform spacing and the random first offset follow the reference
// design; the scaling of u into the interval by a multiply-and-shift (rather
// than a modulo) is this implementation's choice. Timestamps are assumed not
// to wrap around.
module approx_predictor
  import cue_pkg::*;
#(
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                step,
  input  ts_t                 last_ts,
  input  ts_t                 lbh_ts,
  input  logic [PERIOD_W-1:0] period,
  input  logic [RAND_W-1:0]   rand_val,
  output ts_t                 pred_ts,
  output logic                pred_valid
);

  logic [PERIOD_W-1:0]        period_eff;
  logic [PERIOD_W-1:0]        period_r;
  ts_t                        lbh_r;
  logic [RAND_W+PERIOD_W:0]   scaled;     // u * 2P
  logic [PERIOD_W:0]          offset;     // floor(u * 2P / 2^RAND_W)

  assign period_eff = (period == '0) ? PERIOD_W'(1) : period;
  assign scaled     = (RAND_W+PERIOD_W+1)'(rand_val) * (RAND_W+PERIOD_W+1)'({period_eff, 1'b0});
  assign offset     = scaled[RAND_W +: PERIOD_W+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_ts  <= '0;
      lbh_r    <= '0;
      period_r <= PERIOD_W'(1);
    end else if (load) begin
      pred_ts  <= last_ts + TS_W'(offset) + TS_W'(1);
      lbh_r    <= lbh_ts;
      period_r <= period_eff;
    end else if (step) begin
      pred_ts  <= pred_ts + TS_W'(period_r);
    end
  end

  assign pred_valid = (pred_ts < lbh_r);

endmodule
