// tb_cue_fsm: self-checking test of the CUE controller on its own, with a
// small configuration (8-cell buffer, 4 MCUs) so that overwrites and
// approximations are frequent.
//
// The history buffer and the predictor around the controller are simple
// models inside the bench: a ring array with count/oldest/wrapped, and a
// predictor whose first offset is (load number * 13) mod 2P, so the
// expected stream does not depend on the LFSR. For each accepted row update
// the bench works out the expected stream (predicted spikes of every MCU
// before the horizon, then recorded spikes newer than the row's last input
// spike, oldest first) and the expected cycle count, and checks the
// controller's select, MCU number, valid and done outputs against it, that
// one LFSR step accompanies every predictor load, and that no spike is
// accepted during a row update. Each mechanism must occur at least once.
`timescale 1ns/1ps
module tb_cue_fsm;
  import cue_pkg::*;

  localparam int unsigned DEPTH  = 8;
  localparam int unsigned N_MCU  = 4;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned N_ROWS = 600;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          spk_valid = 1'b0, spk_ready, buf_wr_en;
  mcu_id_t       spk_id = '0;
  ts_t           spk_ts = '0;
  logic [AW-1:0] buf_rd_addr;
  spike_t        buf_rd_data;
  logic [AW-1:0] buf_oldest;
  logic [AW:0]   buf_count;
  logic          buf_wrapped;
  logic          row_valid = 1'b0, row_ready, row_done;
  ts_t           row_last_ts = '0;
  logic          pred_load, pred_step, pred_valid, lfsr_step;
  ts_t           pred_last_ts, pred_lbh_ts;
  spike_src_e    sel;
  mcu_id_t       pred_mcu_id;
  logic          out_valid, out_ready = 1'b1, busy;

  cue_fsm #(.DEPTH(DEPTH), .N_MCU(N_MCU)) dut (.*);

  always #5 clk = ~clk;

  // ---- buffer model ----
  spike_t        mem [DEPTH];
  int            n_written = 0;
  assign buf_count   = (AW+1)'((n_written > DEPTH) ? DEPTH : n_written);
  assign buf_oldest  = AW'((n_written >= DEPTH) ? n_written % DEPTH : 0);
  assign buf_wrapped = (n_written > DEPTH);
  assign buf_rd_data = mem[buf_rd_addr];
  always_ff @(posedge clk) begin
    if (buf_wr_en) begin
      mem[n_written % DEPTH] <= '{mcu_id: spk_id, ts: spk_ts};
      n_written <= n_written + 1;
    end
  end

  // ---- predictor model ----
  longint m_ts, m_lbh, m_p;
  int     n_loads = 0, n_lfsr = 0;
  logic [15:0] period = 16'd3;
  assign pred_valid = (m_ts < m_lbh);
  always_ff @(posedge clk) begin
    if (pred_load) begin
      m_p   <= period;
      m_ts  <= longint'(pred_last_ts) + 1 + (longint'(n_loads) * 13) % (2 * longint'(period));
      m_lbh <= longint'(pred_lbh_ts);
      n_loads <= n_loads + 1;
    end else if (pred_step) m_ts <= m_ts + m_p;
    if (lfsr_step) n_lfsr <= n_lfsr + 1;
  end
  initial begin m_ts = 0; m_lbh = 0; m_p = 1; end

  int checks = 0, failures = 0, cycle = 0, rows_done = 0;
  int n_approx = 0, n_inside = 0, n_skipped = 0, n_stall = 0, n_held = 0, n_empty = 0, n_pred = 0;
  typedef struct { logic [6:0] id; longint ts; bit pred; } exp_t;
  exp_t   expq[$];
  spike_t hist[$];
  int     exp_cycles, row_start, stalls;
  bit     row_active = 0, spk_taken = 0, row_taken = 0;
  longint now = 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic plan_row(longint last);
    int     n = hist.size();
    int     first = (n > DEPTH) ? n - DEPTH : 0;
    longint lbh, t;
    int     npred = 0;
    int     loads = n_loads;
    expq.delete();
    if (n == 0) n_empty++;
    if (n > DEPTH && last < hist[first].ts) begin
      n_approx++;
      lbh = hist[first].ts;
      for (int j = 0; j < N_MCU; j++) begin
        t = last + 1 + (longint'(loads) * 13) % (2 * longint'(period));
        loads++;
        while (t < lbh) begin
          expq.push_back('{id: 7'(j), ts: t, pred: 1'b1});
          npred++;
          t += period;
        end
      end
      exp_cycles = N_MCU + npred;
    end else begin
      if (n > DEPTH) n_inside++;
      exp_cycles = 0;
    end
    n_pred += npred;
    for (int k = first; k < n; k++) begin
      if (hist[k].ts > last) expq.push_back('{id: hist[k].mcu_id, ts: hist[k].ts, pred: 1'b0});
      else n_skipped++;
    end
    exp_cycles += (n - first) + 1;
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (rows_done < N_ROWS) begin
      @(negedge clk);
      cycle++;
      if (spk_taken) spk_valid = 1'b0;
      if (row_taken) row_valid = 1'b0;
      now += $urandom_range(0, 2);
      if (!spk_valid && cycle > 10 && $urandom_range(0, 99) < 20) begin
        spk_valid = 1'b1;
        spk_id    = mcu_id_t'($urandom_range(0, N_MCU - 1));
        spk_ts    = ts_t'(now);
      end
      if (!row_valid && !row_active && $urandom_range(0, 99) < 15) begin
        row_valid   = 1'b1;
        row_last_ts = ts_t'((now > 40) ? now - $urandom_range(0, 40) : 0);
        period      = 16'($urandom_range(1, 6));
      end
      out_ready = ($urandom_range(0, 99) < 75);
      #1;
      check(!(busy && spk_ready), "spike accepted while busy");
      check(n_lfsr == n_loads, "LFSR steps differ from predictor loads");
      if (spk_valid && !spk_ready) n_held++;
      if (out_valid && !out_ready) begin n_stall++; stalls++; end
      if (spk_valid && spk_ready) hist.push_back('{mcu_id: spk_id, ts: spk_ts});
      if (row_valid && row_ready) begin
        plan_row(row_last_ts);
        row_active = 1;
        row_start  = cycle;
        stalls     = 0;
      end
      if (out_valid && out_ready) begin
        if (expq.size() == 0) check(0, "unexpected output");
        else begin
          exp_t e;
          e = expq.pop_front();
          if (e.pred)
            check(sel == SRC_PREDICTED && pred_mcu_id == e.id && m_ts == e.ts,
                  $sformatf("predicted got mcu %0d ts %0d exp mcu %0d ts %0d", pred_mcu_id, m_ts, e.id, e.ts));
          else
            check(sel == SRC_BUFFER && buf_rd_data.mcu_id == e.id && longint'(buf_rd_data.ts) == e.ts,
                  $sformatf("buffered got %0d/%0d exp %0d/%0d", buf_rd_data.mcu_id, buf_rd_data.ts, e.id, e.ts));
        end
      end
      if (row_done) begin
        check(row_active && expq.size() == 0, "row ended early or late");
        check(cycle - row_start == exp_cycles + stalls,
              $sformatf("row took %0d cycles exp %0d", cycle - row_start, exp_cycles + stalls));
        row_active = 0;
        rows_done++;
      end
      spk_taken = spk_valid && spk_ready;
      row_taken = row_valid && row_ready;
    end
    $display("approx=%0d inside=%0d skipped=%0d stall=%0d held=%0d empty=%0d pred=%0d",
             n_approx, n_inside, n_skipped, n_stall, n_held, n_empty, n_pred);
    check(n_approx > 0 && n_inside > 0 && n_skipped > 0 && n_stall > 0 && n_held > 0
          && n_empty > 0 && n_pred > 0, "a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
