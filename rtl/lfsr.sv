// lfsr: pseudo-random number source of the CUE unit.
//
// A WIDTH-bit Fibonacci linear-feedback shift register. With the default
// 16 bits it uses the maximal-length polynomial x^16 + x^14 + x^13 + x^11 + 1
// (period 2^16 - 1). The register shifts left by one and takes the XOR of
// the tapped bits into bit 0 each cycle `step` is high; `value` is the
// current state. Reset loads SEED, which must be non-zero.
//
// The controller advances it once per predicted MCU, so the unit spends no
// energy on it while idle. That an LFSR supplies the random first-spike
// offset is the reference design's; the width, polynomial and seed are this
// implementation's choice.
module lfsr #(
  parameter int unsigned       WIDTH = 16,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(16'hB400),   // bits 16,14,13,11
  parameter logic [WIDTH-1:0]  SEED  = WIDTH'(16'hACE1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  output logic [WIDTH-1:0] value
);

  logic feedback;
  assign feedback = ^(value & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= SEED;
    else if (step) value <= {value[WIDTH-2:0], feedback};
  end

endmodule
