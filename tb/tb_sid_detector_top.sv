// tb_sid_detector_top: end-to-end run of the detector at reduced size
// (32-sample windows, blocks of 8 or 16 windows) against the reference model
// in sid_top_harness.
module tb_sid_detector_top;
  import sid_pkg::*;
  localparam int unsigned WIN_LOG2 = 5, M_S = 3, M_L = 4;

  logic clk = 0;
  logic rst_n, m_sel, sample_valid;
  udev_t ftp, var_abs;
  logic [2:0] vpp_log2;
  logic [1:0] avg_shift;
  sample_t sample;
  logic trigger, trig_valid, he_valid, stats_valid, mean_upd, var_upd;
  he_t he, mean;

  always #5 clk = ~clk;

  sid_detector_top #(.WIN_LOG2(WIN_LOG2), .M_LOG2_SHORT(M_S), .M_LOG2_LONG(M_L)) dut (.*);

  sid_top_harness #(.WIN_LOG2(WIN_LOG2), .M_LOG2_SHORT(M_S), .M_LOG2_LONG(M_L),
                    .BG_A(40), .BG_B(48), .SZ(6)) harness (.*);

endmodule
