// sid_stats: long-term mean and spread of the similarity-index estimate.
//
// The mean is the average of the last complete block of M window estimates,
// M = 128 or 256 windows as chosen by m_sel (0: 2**M_LOG2_SHORT,
// 1: 2**M_LOG2_LONG). The spread ("variance") is the average over a block of
// |H_e - mean|: as elsewhere in this datapath, squaring is replaced by an
// absolute value. Each is one accumulator and one stored result
// (sid_block_avg). Because nothing stores the M past estimates, the
// deviations of block b are taken against the mean of block b-1, which is
// this design's choice; the block mean itself follows the architecture.
//
// Timing: the mean is valid after one block, the spread after two (the
// initial latency: 2 x 256 x 256 samples, about 6.6 s at 20 kS/s). Both
// results change one cycle after the block's last estimate; mean_upd and
// var_upd pulse then. stats_valid = both valid.
module sid_stats
  import sid_pkg::*;
#(
  parameter int unsigned M_LOG2_SHORT = 7,
  parameter int unsigned M_LOG2_LONG  = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  m_sel,
  input  logic  he_valid,
  input  he_t   he,
  output he_t   mean,
  output udev_t var_abs,
  output logic  stats_valid,
  output logic  mean_upd,
  output logic  var_upd
);

  localparam int unsigned M_LOG2_MAX =
      (M_LOG2_LONG > M_LOG2_SHORT) ? M_LOG2_LONG : M_LOG2_SHORT;

  logic [3:0]             m_log2;
  logic signed [HE_W:0]   mean_w, var_w, dev_w;
  logic                   mean_valid, var_valid;

  assign m_log2 = m_sel ? 4'(M_LOG2_LONG) : 4'(M_LOG2_SHORT);
  assign dev_w  = {1'b0, abs_diff(he, mean)};

  sid_block_avg #(.IN_W(HE_W + 1), .M_LOG2_MAX(M_LOG2_MAX)) u_mean (
    .clk       (clk),
    .rst_n     (rst_n),
    .m_log2    (m_log2),
    .in_valid  (he_valid),
    .in        ((HE_W + 1)'(he)),
    .avg       (mean_w),
    .avg_valid (mean_valid),
    .upd       (mean_upd)
  );

  sid_block_avg #(.IN_W(HE_W + 1), .M_LOG2_MAX(M_LOG2_MAX)) u_var (
    .clk       (clk),
    .rst_n     (rst_n),
    .m_log2    (m_log2),
    .in_valid  (he_valid && mean_valid),
    .in        (dev_w),
    .avg       (var_w),
    .avg_valid (var_valid),
    .upd       (var_upd)
  );

  // Averages of in-range values stay in range: drop the guard bit.
  assign mean        = he_t'(mean_w);
  assign var_abs     = udev_t'(var_w);
  assign stats_valid = mean_valid && var_valid;

endmodule
