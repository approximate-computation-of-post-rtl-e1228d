// tb_lfsr: self-checking test of the 16-bit LFSR.
//
// Checks the reset seed, follows 80,000 cycles (about 72,000 steps) against an independently
// written shift-and-XOR of taps 16, 14, 13 and 11, checks that the state
// holds when `step` is low, that the state is never zero, and that the
// sequence first returns to the seed after exactly 2^16 - 1 steps.
`timescale 1ns/1ps
module tb_lfsr;
  logic        clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [15:0] value;

  lfsr dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model;
    int          period;
    int          steps;
    period = 0;
    steps  = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = 16'hACE1;
    check(value == model, "seed after reset");
    for (int i = 0; i < 80000; i++) begin
      step = ($urandom_range(0, 9) != 0);
      @(negedge clk);
      if (step) begin
        model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
        steps++;
        if (model == 16'hACE1 && period == 0) period = steps;
      end
      check(value == model, $sformatf("step %0d: %h exp %h", steps, value, model));
      check(value != 16'h0, "zero state");
    end
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
