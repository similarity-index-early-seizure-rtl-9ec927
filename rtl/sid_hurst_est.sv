// sid_hurst_est: per-window similarity-index (Hurst exponent) estimate.
//
// The estimate is the log-ratio of the lag-2 and lag-1 second-difference
// sums of a window, H_e = log2(W_N) - log2(V_N), computed as a difference of
// two scaled logarithms so that no divider is needed. One log unit (with its
// 64-bit table) is shared: the first cycle converts W_N, the second V_N.
//
// Scale: the estimator as defined with squared differences carries a factor
// 1/2 (E[d2^2]/E[d1^2] = 2**(2H)). This datapath accumulates absolute values,
// for which E|d2|/E|d1| = 2**H, so the log-ratio itself is the estimate and
// no halving is applied. Only deviations of H_e against thresholds matter
// downstream, so the scale is a convention; it is this design's choice.
//
// Output: signed Q3.4, saturated to [-8, 8). Timing: win_valid in cycle k
// gives he_valid (one-cycle pulse) in cycle k+2; windows must be at least
// two cycles apart, which any window of more than one sample guarantees.
module sid_hurst_est
  import sid_pkg::*;
#(
  parameter int unsigned ACC_W = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             win_valid,
  input  logic [ACC_W-1:0] v_sum,
  input  logic [ACC_W-1:0] w_sum,
  output logic             he_valid,
  output he_t              he
);

  localparam int unsigned LOG_W = $clog2(ACC_W) + LUT_BITS;

  logic             busy;       // second cycle: converting V_N
  logic [ACC_W-1:0] v_hold;
  logic [LOG_W-1:0] log_w;      // registered log2(W_N)
  logic [ACC_W-1:0] log_in;
  logic [LOG_W-1:0] log_out;

  assign log_in = busy ? v_hold : w_sum;

  sid_log2 #(.IN_W(ACC_W)) u_log (
    .x      (log_in),
    .log2_x (log_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      v_hold   <= '0;
      log_w    <= '0;
      he       <= '0;
      he_valid <= 1'b0;
    end else begin
      he_valid <= 1'b0;
      if (busy) begin
        he       <= sat_he(16'(signed'({1'b0, log_w})) - 16'(signed'({1'b0, log_out})));
        he_valid <= 1'b1;
        busy     <= 1'b0;
      end else if (win_valid) begin
        log_w  <= log_out;
        v_hold <= v_sum;
        busy   <= 1'b1;
      end
    end
  end

  // A new window may not arrive while V_N of the previous one is converted.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !win_valid)
    else $error("sid_hurst_est: window arrived during conversion");

endmodule
