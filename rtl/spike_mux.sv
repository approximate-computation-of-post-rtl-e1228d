// spike_mux: output select of the CUE unit.
//
// Chooses which (timestamp, MCU ID) pair goes to the synaptic update: the
// cell read from the history buffer, or the predicted timestamp together
// with the MCU ID the controller is predicting for. `sel` comes from the
// controller's Select output. The selected pair leaves with a flag telling
// the synaptic update whether it is a recorded or a predicted spike.
//
// Purely combinational. The two-way select is the reference design's; the
// `predicted` flag on the output is this implementation's addition.
module spike_mux
  import cue_pkg::*;
(
  input  spike_src_e sel,
  input  spike_t     buf_spike,
  input  ts_t        pred_ts,
  input  mcu_id_t    pred_mcu_id,
  output spike_t     out_spike,
  output logic       out_predicted
);

  always_comb begin
    unique case (sel)
      SRC_PREDICTED: begin
        out_spike.ts     = pred_ts;
        out_spike.mcu_id = pred_mcu_id;
      end
      default: out_spike = buf_spike;
    endcase
    out_predicted = (sel == SRC_PREDICTED);
  end

endmodule
