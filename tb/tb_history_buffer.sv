// tb_history_buffer: self-checking test of the circular spike history buffer
// at its default depth of 100 cells.
//
// Random writes (MCU ID, timestamp) are mirrored in a queue holding every
// spike written. Each cycle the bench checks count, the oldest-cell address,
// the head, the wrapped flag, and reads one random valid cell, comparing it
// with the queue entry the ring position must hold. It fails if the ring
// never filled and overwrote.
`timescale 1ns/1ps
module tb_history_buffer;
  import cue_pkg::*;

  localparam int unsigned DEPTH = 100;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0;
  spike_t        wr_data = '0;
  logic [AW-1:0] rd_addr = '0;
  spike_t        rd_data;
  logic [AW-1:0] head, oldest;
  logic [AW:0]   count;
  logic          wrapped;

  history_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_writes = 0, n_reads = 0;
  spike_t hist[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, exp_count, k;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // state after all writes so far
      n         = hist.size();
      exp_count = (n > DEPTH) ? DEPTH : n;
      check(count == (AW+1)'(exp_count), $sformatf("count %0d exp %0d", count, exp_count));
      check(head == AW'(n % DEPTH), $sformatf("head %0d exp %0d", head, n % DEPTH));
      check(wrapped == (n > DEPTH), "wrapped flag");
      check(oldest == AW'((n >= DEPTH) ? n % DEPTH : 0), $sformatf("oldest %0d", oldest));
      if (n > 0) begin
        // k-th oldest valid spike lives at ring position (oldest + k) mod DEPTH
        k = $urandom_range(0, exp_count - 1);
        rd_addr = AW'((((n >= DEPTH) ? n % DEPTH : 0) + k) % DEPTH);
        #1;
        check(rd_data == hist[n - exp_count + k],
              $sformatf("cell %0d read %h exp %h", rd_addr, rd_data, hist[n - exp_count + k]));
        n_reads++;
      end
      wr_en = ($urandom_range(0, 99) < 30);
      wr_data.mcu_id = mcu_id_t'($urandom_range(0, 99));
      wr_data.ts     = ts_t'($urandom);
      if (wr_en) begin
        hist.push_back(wr_data);
        n_writes++;
      end
    end
    check(n_writes > DEPTH + 10, "ring never overwritten");
    check(n_reads > 0, "nothing read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
