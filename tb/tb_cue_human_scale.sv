// tb_cue_human_scale: the CUE unit under the traffic of one hyper-column
// unit (HCU) of a human-scale network, at the default size (100 MCUs,
// 100-cell buffer).
//
// Traffic per 1 ms time-step: on average 0.1 output spikes (100 per second
// per HCU, i.e. 1 Hz per MCU) and 10 input spikes (10,000 per second), each
// input spike going to a random one of the 10,000 rows. Each input spike
// triggers a row update carrying the time of that row's previous input
// spike. The predictor's period 1/r is 1000 time-steps, matching 1 Hz per
// MCU. Simulated time is compressed: the bench issues the events of a
// time-step back to back rather than waiting 200,000 clock cycles.
//
// Every output spike is checked against a reference model (recorded spikes
// and its own copy of the LFSR), as is the cycle count of every row update.
// After a warm-up of 1.5 s (buffer full, every row touched), the bench
// prints the average number of cycles per row update and checks
// that 10,000 row updates per second keep the unit busy for well under one
// second at 200 MHz. It fails if no row needed the approximation or none
// was served from the buffer alone.
`timescale 1ns/1ps
module tb_cue_human_scale;
  import cue_pkg::*;

  localparam int unsigned N_MCU   = 100;
  localparam int unsigned DEPTH   = 100;
  localparam int unsigned N_ROWS  = 10_000;
  localparam int unsigned SIM_MS  = 4000;
  localparam int unsigned WARM_MS = 1500;   // buffer filled, rows touched once
  localparam longint      CLK_HZ  = 200_000_000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        spk_valid = 1'b0;
  logic        spk_ready;
  mcu_id_t     spk_mcu_id = '0;
  ts_t         spk_ts = '0;
  logic        row_valid = 1'b0;
  logic        row_ready;
  ts_t         row_last_ts = '0;
  logic [15:0] rate_period = 16'd1000;
  logic        row_done;
  logic        out_valid;
  logic        out_ready = 1'b1;
  mcu_id_t     out_mcu_id;
  ts_t         out_ts;
  logic        out_predicted;
  logic        busy;

  cue_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  spike_t      hist[$];
  logic [15:0] lfsr_m = 16'hACE1;
  typedef struct { logic [6:0] id; logic [31:0] ts; bit pred; } exp_t;
  exp_t        expq[$];
  ts_t         row_last [N_ROWS];
  longint      total_row_cycles = 0, n_row_updates = 0, n_approx = 0, n_plain = 0;
  longint      n_pred = 0, n_buffered = 0;

  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected stream and cycle count of a row update
  task automatic plan_row(logic [31:0] last, output int cycles);
    int     n = hist.size();
    int     first = (n > DEPTH) ? n - DEPTH : 0;
    longint lbh, t, off;
    int     npred = 0;
    logic [15:0] u;
    expq.delete();
    cycles = 0;
    if (n > DEPTH && last < hist[first].ts) begin
      n_approx++;
      lbh = hist[first].ts;
      for (int j = 0; j < N_MCU; j++) begin
        u = lfsr_m;
        lfsr_m = lfsr_next(lfsr_m);
        off = (longint'(u) * 2 * longint'(rate_period)) / 65536;
        t = longint'(last) + 1 + off;
        while (t < lbh) begin
          expq.push_back('{id: 7'(j), ts: 32'(t), pred: 1'b1});
          npred++;
          t += rate_period;
        end
      end
      cycles = N_MCU + npred;
    end else n_plain++;
    n_pred += npred;
    for (int k = first; k < n; k++)
      if (hist[k].ts > last) begin
        expq.push_back('{id: hist[k].mcu_id, ts: hist[k].ts, pred: 1'b0});
        n_buffered++;
      end
    cycles += (n - first) + 1;
  endtask

  task automatic enqueue(mcu_id_t id, ts_t ts);
    @(negedge clk);
    spk_valid  = 1'b1;
    spk_mcu_id = id;
    spk_ts     = ts;
    #1;
    check(spk_ready, "spike not accepted by an idle unit");
    hist.push_back('{mcu_id: id, ts: ts});
    @(negedge clk);
    spk_valid = 1'b0;
  endtask

  task automatic row_update(int row, ts_t now);
    int exp_cycles, cyc;
    exp_t e;
    @(negedge clk);
    row_valid   = 1'b1;
    row_last_ts = row_last[row];
    #1;
    check(row_ready, "row not accepted by an idle unit");
    plan_row(row_last[row], exp_cycles);
    cyc = 0;
    @(negedge clk);
    row_valid = 1'b0;
    forever begin
      cyc++;
      #1;
      if (out_valid) begin
        if (expq.size() == 0) check(0, "unexpected output spike");
        else begin
          e = expq.pop_front();
          check(out_mcu_id == e.id && out_ts == e.ts && out_predicted == e.pred,
                $sformatf("row %0d: got %0d/%0d/%0d exp %0d/%0d/%0d", row, out_mcu_id, out_ts,
                          out_predicted, e.id, e.ts, e.pred));
        end
      end
      if (row_done) break;
      @(negedge clk);
    end
    check(expq.size() == 0, "spikes missing at row end");
    check(cyc == exp_cycles, $sformatf("row took %0d cycles exp %0d", cyc, exp_cycles));
    if (now > WARM_MS) begin
      total_row_cycles += cyc;
      n_row_updates++;
    end
    row_last[row] = now;
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real avg, busy_s;
    foreach (row_last[r]) row_last[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int ms = 1; ms <= SIM_MS; ms++) begin
      // output spikes: 0.1 per ms on average, from a random MCU
      if ($urandom_range(0, 999) < 100) enqueue(mcu_id_t'($urandom_range(0, N_MCU - 1)), ts_t'(ms));
      // input spikes: 10 per ms on average (0..20, uniform)
      repeat ($urandom_range(0, 20)) row_update($urandom_range(0, N_ROWS - 1), ts_t'(ms));
    end
    avg    = real'(total_row_cycles) / real'(n_row_updates);
    busy_s = real'(total_row_cycles) / real'(CLK_HZ) * (1000.0 / real'(SIM_MS - WARM_MS));
    $display("whole run: approximated rows=%0d plain rows=%0d predicted spikes=%0d buffered spikes=%0d",
             n_approx, n_plain, n_pred, n_buffered);
    $display("after %0d ms of warm-up: row updates=%0d", WARM_MS, n_row_updates);
    $display("average cycles per row update: %0.1f; busy time per simulated second at 200 MHz: %0.4f s",
             avg, busy_s);
    check(n_approx > 0, "no row needed the approximation");
    check(n_plain > 0, "no row served from the buffer alone");
    check(busy_s < 0.5, "unit cannot keep up with 10,000 row updates per second");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
