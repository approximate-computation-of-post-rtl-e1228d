// tb_cue_unit: end-to-end test of the CUE unit at its default size
// (100-cell history buffer, 100 MCUs).
//
// The bench offers output spikes and row-update requests at random, with
// random back-pressure from the synaptic-update side. It keeps its own
// record of every spike and its own copy of the 16-bit LFSR
// (x^16 + x^14 + x^13 + x^11 + 1, seed 0xACE1), and for each accepted row
// update works out the expected spike stream:
//   - if spikes have been dropped and the row's last input spike is older
//     than the oldest recorded spike (the lookback horizon, LBH): for each
//     MCU j = 0..99 take u from the LFSR, first time last+1+floor(u*2P/2^16),
//     then every P, while the time is below the LBH;
//   - then the recorded spikes from oldest to newest whose time is after
//     the row's last input spike.
// Every output spike, its predicted flag, and the cycle count of each row
// update (N_MCU + predicted spikes when approximating, plus recorded cells,
// plus one, plus stall cycles) are compared. It also counts how often each
// mechanism occurred (enqueue, buffer overwrite, approximation, row inside
// the horizon, skipped old cells, output stall, enqueue held off by a busy
// unit, row held off by a waiting spike, empty-buffer row) and fails if one
// never did.
`timescale 1ns/1ps
module tb_cue_unit;
  import cue_pkg::*;

  localparam int unsigned DEPTH  = 100;
  localparam int unsigned N_MCU  = 100;
  localparam int unsigned N_ROWS = 400;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        spk_valid = 1'b0;
  logic        spk_ready;
  mcu_id_t     spk_mcu_id = '0;
  ts_t         spk_ts = '0;
  logic        row_valid = 1'b0;
  logic        row_ready;
  ts_t         row_last_ts = '0;
  logic [15:0] rate_period = 16'd100;
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

  // Mechanism counters
  int n_enq = 0, n_overwrite = 0, n_approx = 0, n_inside_lbh = 0, n_skipped = 0;
  int n_stall = 0, n_spk_held = 0, n_row_held = 0, n_empty_row = 0, n_pred_spikes = 0;

  // Reference state
  spike_t      hist[$];       // every spike recorded, oldest first
  logic [15:0] lfsr_m = 16'hACE1;
  typedef struct { logic [6:0] id; logic [31:0] ts; bit pred; } exp_t;
  exp_t        expq[$];
  int          exp_cycles, row_start_cycle, stalls_this_row;
  bit          row_active = 0;
  int          cycle = 0;
  int          rows_done = 0;
  longint      now = 1;
  bit          spk_taken = 0, row_taken = 0, directed = 0;

  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Build the expected stream for a row update accepted now.
  task automatic plan_row(logic [31:0] last, logic [15:0] per_in);
    int          n = hist.size();
    int          first = (n > DEPTH) ? n - DEPTH : 0;
    bit          dropped = (n > DEPTH);
    longint      lbh, t, p, off;
    int          npred = 0;
    logic [15:0] u;
    expq.delete();
    p = (per_in == 0) ? 1 : per_in;
    if (n == 0) n_empty_row++;
    if (dropped && last < hist[first].ts) begin
      n_approx++;
      lbh = hist[first].ts;
      for (int j = 0; j < N_MCU; j++) begin
        u = lfsr_m;
        lfsr_m = lfsr_next(lfsr_m);
        off = (longint'(u) * 2 * p) / 65536;
        t = longint'(last) + 1 + off;
        while (t < lbh) begin
          expq.push_back('{id: 7'(j), ts: 32'(t), pred: 1'b1});
          npred++;
          t += p;
        end
      end
      exp_cycles = N_MCU + npred;
    end else begin
      if (dropped) n_inside_lbh++;
      exp_cycles = 0;
    end
    n_pred_spikes += npred;
    for (int k = first; k < n; k++) begin
      if (hist[k].ts > last) expq.push_back('{id: hist[k].mcu_id, ts: hist[k].ts, pred: 1'b0});
      else n_skipped++;
    end
    exp_cycles += (n - first) + 1;
  endtask

  // Watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d rows", rows_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] periods [4] = '{16'd25, 16'd100, 16'd400, 16'd1500};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (rows_done < N_ROWS + 1) begin
      @(negedge clk);
      cycle++;
      // ---- retire what the last edge accepted, then drive ----
      if (spk_taken) spk_valid = 1'b0;
      if (row_taken) row_valid = 1'b0;
      now += $urandom_range(0, 1);
      if (!spk_valid && cycle > 20 && rows_done < N_ROWS && $urandom_range(0, 99) < 25) begin
        spk_valid  = 1'b1;
        spk_mcu_id = 7'($urandom_range(0, N_MCU - 1));
        spk_ts     = 32'(now);
      end
      if (!row_valid && !row_active && $urandom_range(0, 99) < 10) begin
        static longint back;
        case ($urandom_range(0, 4))
          0, 1:    back = $urandom_range(0, 150);
          2, 3:    back = $urandom_range(0, 900);
          default: back = $urandom_range(1500, 5000);
        endcase
        row_valid   = 1'b1;
        row_last_ts = 32'((now > back) ? now - back : 0);
        if (rows_done < 3) row_last_ts = 0;
        rate_period = periods[$urandom_range(0, 3)];
      end
      out_ready = ($urandom_range(0, 99) < 80);
      // Last row: full buffer, approximation with nothing to predict and no
      // stalls, which must take exactly DEPTH + N_MCU + 1 = 201 cycles.
      if (rows_done == N_ROWS) begin
        out_ready = 1'b1;
        if (!row_valid && !row_active && !spk_valid) begin
          row_valid   = 1'b1;
          row_last_ts = hist[hist.size() - DEPTH].ts - 1;
          directed    = 1;
        end
      end
      #1;
      // ---- evaluate the transfers of the coming edge ----
      if (spk_valid && !spk_ready) n_spk_held++;
      if (row_valid && spk_valid && !busy) n_row_held++;
      if (out_valid && !out_ready) begin n_stall++; stalls_this_row++; end
      if (spk_valid && spk_ready) begin
        if (hist.size() >= DEPTH) n_overwrite++;
        hist.push_back('{mcu_id: spk_mcu_id, ts: spk_ts});
        n_enq++;
      end
      if (row_valid && row_ready) begin
        check(!row_active, "row accepted while another is active");
        plan_row(row_last_ts, rate_period);
        row_active      = 1;
        row_start_cycle = cycle;
        stalls_this_row = 0;
      end
      if (out_valid && out_ready) begin
        if (expq.size() == 0) check(0, "unexpected output spike");
        else begin
          exp_t e;
          e = expq.pop_front();
          check(out_mcu_id == e.id && out_ts == e.ts && out_predicted == e.pred,
                $sformatf("spike got id=%0d ts=%0d p=%0d exp id=%0d ts=%0d p=%0d",
                          out_mcu_id, out_ts, out_predicted, e.id, e.ts, e.pred));
        end
      end
      if (row_done) begin
        check(row_active, "row_done without a row");
        check(expq.size() == 0, $sformatf("row ended with %0d spikes missing", expq.size()));
        check(cycle - row_start_cycle == exp_cycles + stalls_this_row,
              $sformatf("row took %0d cycles, expected %0d", cycle - row_start_cycle,
                        exp_cycles + stalls_this_row));
        if (directed) check(cycle - row_start_cycle == DEPTH + N_MCU + 1,
                            $sformatf("nominal row took %0d cycles", cycle - row_start_cycle));
        row_active = 0;
        rows_done++;
      end
      spk_taken = spk_valid && spk_ready;
      row_taken = row_valid && row_ready;
    end
    $display("enq=%0d overwrite=%0d approx=%0d inside_lbh=%0d skipped=%0d stall=%0d spk_held=%0d row_held=%0d empty=%0d pred=%0d",
             n_enq, n_overwrite, n_approx, n_inside_lbh, n_skipped, n_stall, n_spk_held,
             n_row_held, n_empty_row, n_pred_spikes);
    check(n_enq > 0, "no spike enqueued");
    check(n_overwrite > 0, "buffer never overwritten");
    check(n_approx > 0, "approximation never invoked");
    check(n_inside_lbh > 0, "no row inside the horizon after overwrite");
    check(n_skipped > 0, "no old cell skipped");
    check(n_stall > 0, "no output stall");
    check(n_spk_held > 0, "no spike held off by a busy unit");
    check(n_row_held > 0, "no row held off by a spike");
    check(n_empty_row > 0, "no row with an empty buffer");
    check(n_pred_spikes > 0, "no predicted spike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
