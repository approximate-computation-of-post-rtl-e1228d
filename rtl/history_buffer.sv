// history_buffer: circular output-spike history buffer of the CUE unit.
//
// DEPTH cells (B = 100 in the reference configuration), each one spike_t:
// the MCU ID and the timestamp of an output spike. The buffer is a register
// file used as a ring: a write goes to the cell at `head` and advances it,
// modulo DEPTH. When all cells hold spikes the next write overwrites the
// oldest one; `wrapped` then stays high until reset, telling the controller
// that spikes older than the oldest stored one (the lookback horizon) have
// been dropped. `count` is the number of valid cells (saturating at DEPTH)
// and `oldest` is the address of the oldest valid cell.
//
// Timing: one write per clock, visible on the read port the next cycle.
// The read port is asynchronous (combinational from rd_addr), as in a
// latch/flip-flop register file. The cells have no reset; only the
// pointers do, and nothing outside the `count` valid cells is ever used.
//
// The ring organisation in a register file and the ID+timestamp cell are the
// reference design's; the pointer signals and `wrapped` flag are this
// implementation's choice.
module history_buffer
  import cue_pkg::*;
#(
  parameter int unsigned DEPTH = 100,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write (enqueue) port
  input  logic          wr_en,
  input  spike_t        wr_data,
  // read port
  input  logic [AW-1:0] rd_addr,
  output spike_t        rd_data,
  // ring state
  output logic [AW-1:0] head,
  output logic [AW-1:0] oldest,
  output logic [AW:0]   count,
  output logic          wrapped
);

  spike_t mem [DEPTH];

  logic [AW-1:0] head_next;
  assign head_next = (head == AW'(DEPTH - 1)) ? '0 : head + 1'b1;

  always_ff @(posedge clk) begin
    if (wr_en) mem[head] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head    <= '0;
      count   <= '0;
      wrapped <= 1'b0;
    end else if (wr_en) begin
      head <= head_next;
      if (count == (AW+1)'(DEPTH)) wrapped <= 1'b1;
      else                         count   <= count + 1'b1;
    end
  end

  // Oldest valid cell: cell 0 until the ring has filled once, then the cell
  // the next write will overwrite.
  assign oldest  = (count == (AW+1)'(DEPTH)) ? head : '0;
  assign rd_data = mem[rd_addr];

endmodule
