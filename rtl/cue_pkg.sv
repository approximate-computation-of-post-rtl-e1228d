// cue_pkg: types and constants shared by the Column Update Elimination (CUE)
// unit.
//
// A cell of the output-spike history buffer holds two fields: the binary
// encoded ID of the mini-column unit (MCU) that spiked and the timestamp of
// the time-step (1 ms) in which it spiked. The widths follow the reference
// configuration: 7 ID bits (enough for 100 MCUs per hyper-column unit) and a
// 32-bit timestamp. The same pair travels from the buffer and from the
// predictor to the synaptic update, so it is one packed struct.
package cue_pkg;

  localparam int unsigned ID_W   = 7;   // log2(M) bits of MCU ID
  localparam int unsigned TS_W   = 32;  // L bits of timestamp
  localparam int unsigned RAND_W = 16;  // width of the random number

  typedef logic [ID_W-1:0] mcu_id_t;
  typedef logic [TS_W-1:0] ts_t;

  // One history-buffer cell; MCU ID in the upper bits, as drawn in the cell
  // layout (ID field followed by the timestamp field).
  typedef struct packed {
    mcu_id_t mcu_id;
    ts_t     ts;
  } spike_t;

  // Source of a spike handed to the synaptic update.
  typedef enum logic {
    SRC_BUFFER    = 1'b0,
    SRC_PREDICTED = 1'b1
  } spike_src_e;

endpackage
