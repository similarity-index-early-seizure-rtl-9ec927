// tb_sid_detector_recording: a recording-length run of the detector at its
// default size. It models 30 hours of one EEG channel sampled at 256 Hz
// (27.6 million samples, 108,000 one-second windows) with six seizure
// episodes. The signal is synthetic (see sid_top_harness): it checks
// sustained operation, wrap-around of all counters over a long record, and
// that every episode triggers, against the reference model; it does not
// reproduce detection rates on real recordings. A 10-hour record with seven
// episodes differs only in its length.
module tb_sid_detector_recording;
  import sid_pkg::*;

  logic clk = 0;
  logic rst_n, m_sel, sample_valid;
  udev_t ftp, var_abs;
  logic [2:0] vpp_log2;
  logic [1:0] avg_shift;
  sample_t sample;
  logic trigger, trig_valid, he_valid, stats_valid, mean_upd, var_upd;
  he_t he, mean;

  always #5 clk = ~clk;

  sid_detector_top dut (.*);

  // 2000 + 5 x (21570 + 10 + 4) + 10 + 4 = 109,884 windows, about 30.5 h
  sid_top_harness #(.WIN_LOG2(8), .M_LOG2_SHORT(7), .M_LOG2_LONG(8),
                    .BG_A(2000), .BG_B(21570), .SZ(10), .EPISODES_B(5)) harness (.*);

  // Outer watchdog, well beyond the ~37 million cycles the record needs; the
  // harness normally ends the run long before.
  initial begin
    repeat (100_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", harness.checks, harness.failures + 1);
    $finish;
  end

endmodule
