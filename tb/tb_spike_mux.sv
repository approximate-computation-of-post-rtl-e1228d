// tb_spike_mux: self-checking test of the output select.
//
// Random buffered and predicted spikes under both select values; the output
// must be the buffered cell for SRC_BUFFER, the predicted timestamp with the
// predicted MCU ID for SRC_PREDICTED, and the predicted flag must match.
`timescale 1ns/1ps
module tb_spike_mux;
  import cue_pkg::*;

  spike_src_e sel;
  spike_t     buf_spike, out_spike;
  ts_t        pred_ts;
  mcu_id_t    pred_mcu_id;
  logic       out_predicted;

  spike_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel              = spike_src_e'($urandom_range(0, 1));
      buf_spike.mcu_id = mcu_id_t'($urandom);
      buf_spike.ts     = ts_t'($urandom);
      pred_ts          = ts_t'($urandom);
      pred_mcu_id      = mcu_id_t'($urandom);
      #1;
      checks++;
      if (sel == SRC_PREDICTED) begin
        if (out_spike.ts != pred_ts || out_spike.mcu_id != pred_mcu_id || !out_predicted)
          failures++;
      end else begin
        if (out_spike != buf_spike || out_predicted) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
