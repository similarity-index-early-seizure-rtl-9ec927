// tb_sid_detector_full: end-to-end run of the detector at its default size
// (256-sample windows, blocks of 128 or 256 windows) against the reference
// model in sid_top_harness: warm-up of two blocks, a seizure episode with
// 128-window blocks, then one with 256-window blocks and averaging.
module tb_sid_detector_full;
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

  sid_top_harness #(.WIN_LOG2(8), .M_LOG2_SHORT(7), .M_LOG2_LONG(8),
                    .BG_A(300), .BG_B(540), .SZ(10)) harness (.*);

endmodule
