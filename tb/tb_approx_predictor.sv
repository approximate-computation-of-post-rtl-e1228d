// tb_approx_predictor: self-checking test of the approximation function.
//
// For random (last spike time, horizon, period P, random number u) it loads
// the predictor and steps it until pred_valid drops, checking every
// predicted time against last + 1 + floor(u * 2P / 2^16) + k * P, that the
// first lies in [last + 1, last + 2P], that pred_valid equals
// (time < horizon), and that the number of predictions equals the count the
// bench works out. A zero period must behave as a period of one. Cases with
// no prediction at all (horizon at or before the first time) are counted and
// must occur.
`timescale 1ns/1ps
module tb_approx_predictor;
  import cue_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  ts_t         last_ts = '0, lbh_ts = '0, pred_ts;
  logic [15:0] period = 16'd1;
  logic [15:0] rand_val = '0;
  logic        pred_valid;

  approx_predictor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_empty = 0, n_multi = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p, first, t, lbh, exp_n;
    int     got_n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      last_ts  = ts_t'($urandom_range(0, 1_000_000));
      period   = (i % 50 == 7) ? 16'd0 : 16'($urandom_range(1, 300));
      rand_val = 16'($urandom);
      lbh_ts   = last_ts + ts_t'($urandom_range(0, 3000));
      p        = (period == 0) ? 1 : period;
      first    = longint'(last_ts) + 1 + (longint'(rand_val) * 2 * p) / 65536;
      lbh      = lbh_ts;
      exp_n    = (first >= lbh) ? 0 : (lbh - first + p - 1) / p;
      if (period == 0 && exp_n > 200) begin
        lbh_ts = last_ts + 100;
        lbh    = lbh_ts;
        exp_n  = (first >= lbh) ? 0 : (lbh - first + p - 1) / p;
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check(pred_ts == ts_t'(first), $sformatf("first %0d exp %0d", pred_ts, first));
      check(first >= longint'(last_ts) + 1 && first <= longint'(last_ts) + 2 * p, "first out of [1, 2/r]");
      got_n = 0;
      t     = first;
      while (pred_valid && got_n < 100000) begin
        check(pred_ts == ts_t'(t), $sformatf("pred %0d exp %0d", pred_ts, t));
        check(t < lbh, "valid beyond horizon");
        got_n++;
        t += p;
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
      check(!pred_valid && pred_ts == ts_t'(t), "stop point");
      check(got_n == exp_n, $sformatf("count %0d exp %0d", got_n, exp_n));
      if (exp_n == 0) n_empty++;
      if (exp_n > 1) n_multi++;
    end
    check(n_empty > 0, "no empty interval");
    check(n_multi > 0, "no multi-spike interval");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
