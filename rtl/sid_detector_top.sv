// sid_detector_top: single-channel similarity-index early seizure detector.
//
// 8-bit neural samples (one recording channel's ADC output) enter; a trigger
// for the stimulator controller leaves. The chain is
//   sid_diff_accum  windowed sums of |lag-1| and |lag-2| second differences
//   sid_hurst_est   H_e = log2(W_N) - log2(V_N) through one shared log LUT
//   sid_smoother    power-of-two averaging of H_e (avg_shift = 0: none)
//   sid_stats       block mean and mean |deviation| over M = 128/256 windows
//   sid_trigger     trigger if |H_e - mean| > ftp and > 2**vpp_log2 * Var
// A trigger marks a change in the correlation structure of the signal, which
// precedes or accompanies electrical seizure onset. The configuration
// (m_sel, ftp, vpp_log2, avg_shift) is per patient and recording setup and
// is meant to be held static while running.
//
// Timing: a window's trigger decision (trig_valid pulse, trigger level held
// until the next window) follows its last sample by 5 cycles. The decision
// is held low until two blocks of M windows have been seen after reset.
// Samples may arrive every cycle. Reset is synchronous, active low.
module sid_detector_top
  import sid_pkg::*;
#(
  parameter int unsigned WIN_LOG2     = 8,
  parameter int unsigned M_LOG2_SHORT = 7,
  parameter int unsigned M_LOG2_LONG  = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // configuration
  input  logic       m_sel,        // 0: M = 2**M_LOG2_SHORT, 1: 2**M_LOG2_LONG
  input  udev_t      ftp,          // fixed threshold, unsigned Q4.4
  input  logic [2:0] vpp_log2,     // variance-pegged factor = 2**vpp_log2
  input  logic [1:0] avg_shift,    // estimate averaging weight 2**-avg_shift
  // samples from the recording channel's ADC
  input  logic       sample_valid,
  input  sample_t    sample,
  // detector outputs
  output logic       trigger,      // to the stimulator controller
  output logic       trig_valid,
  output logic       he_valid,     // averaged estimate of the last window
  output he_t        he,
  output he_t        mean,
  output udev_t      var_abs,
  output logic       stats_valid,
  output logic       mean_upd,     // pulse: mean refreshed (block ended)
  output logic       var_upd       // pulse: spread refreshed
);

  localparam int unsigned ACC_W = SAMPLE_W + 1 + WIN_LOG2;

  logic             win_valid;
  logic [ACC_W-1:0] v_sum, w_sum;
  logic             raw_valid;
  he_t              raw_he;

  sid_diff_accum #(.WIN_LOG2(WIN_LOG2)) u_diff (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_valid (sample_valid),
    .sample       (sample),
    .win_valid    (win_valid),
    .v_sum        (v_sum),
    .w_sum        (w_sum)
  );

  sid_hurst_est #(.ACC_W(ACC_W)) u_hurst (
    .clk       (clk),
    .rst_n     (rst_n),
    .win_valid (win_valid),
    .v_sum     (v_sum),
    .w_sum     (w_sum),
    .he_valid  (raw_valid),
    .he        (raw_he)
  );

  sid_smoother u_avg (
    .clk       (clk),
    .rst_n     (rst_n),
    .avg_shift (avg_shift),
    .he_valid  (raw_valid),
    .he        (raw_he),
    .avg_valid (he_valid),
    .he_avg    (he)
  );

  sid_stats #(.M_LOG2_SHORT(M_LOG2_SHORT), .M_LOG2_LONG(M_LOG2_LONG)) u_stats (
    .clk         (clk),
    .rst_n       (rst_n),
    .m_sel       (m_sel),
    .he_valid    (he_valid),
    .he          (he),
    .mean        (mean),
    .var_abs     (var_abs),
    .stats_valid (stats_valid),
    .mean_upd    (mean_upd),
    .var_upd     (var_upd)
  );

  sid_trigger u_trig (
    .clk         (clk),
    .rst_n       (rst_n),
    .ftp         (ftp),
    .vpp_log2    (vpp_log2),
    .he_valid    (he_valid),
    .he          (he),
    .mean        (mean),
    .var_abs     (var_abs),
    .stats_valid (stats_valid),
    .trigger     (trigger),
    .trig_valid  (trig_valid)
  );

endmodule
