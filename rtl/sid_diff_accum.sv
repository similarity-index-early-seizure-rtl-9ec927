// sid_diff_accum: windowed second-difference accumulator, the front end of
// the similarity-index (Hurst exponent) estimator.
//
// The sample stream is cut into non-overlapping windows of N = 2**WIN_LOG2
// samples. Inside a window it accumulates two sums that stand for the
// discrete second derivatives of the signal at two scales:
//   V_N = sum_{i=1}^{N-2} |X(i+2) - 2 X(i+1) + X(i)|   (lag 1)
//   W_N = sum_{i=1}^{N-4} |X(i+4) - 2 X(i+2) + X(i)|   (lag 2)
// A term is added only when all of its samples lie in the current window,
// so V_N has N-2 terms and W_N has N-4, as in the estimator's definition.
// Both filters are multiplier-free (the factor 2 is a shift) and the square
// of the estimator's definition is replaced by an absolute value; both
// simplifications are the ones the architecture prescribes. The window length
// is not given and is this design's choice (256 samples, 12.8 ms at 20 kS/s).
//
// Interface: one sample per cycle with sample_valid high (gaps allowed).
// Timing: win_valid pulses for one cycle in the cycle after the window's last
// sample was accepted; v_sum and w_sum hold until the next window closes.
// Reset is synchronous and active low; the window restarts at reset.
module sid_diff_accum
  import sid_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 8,
  localparam int unsigned ACC_W   = SAMPLE_W + 1 + WIN_LOG2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_valid,
  input  sample_t          sample,
  output logic             win_valid,
  output logic [ACC_W-1:0] v_sum,
  output logic [ACC_W-1:0] w_sum
);

  localparam int unsigned DIFF_W = SAMPLE_W + 2;  // signed second difference

  // Delay line of the four previous samples: x1 = X(k-1) ... x4 = X(k-4).
  sample_t x1, x2, x3, x4;
  logic [WIN_LOG2-1:0] idx;            // position of the incoming sample
  logic [ACC_W-1:0]    v_acc, w_acc;

  logic signed [DIFF_W-1:0] d1, d2;
  logic [DIFF_W-2:0]        a1, a2;    // magnitudes, at most 2*(2**SAMPLE_W-1)
  logic [ACC_W-1:0]         v_next, w_next;
  logic                     last;

  always_comb begin
    d1 = DIFF_W'(sample) - (DIFF_W'(x1) << 1) + DIFF_W'(x2);
    d2 = DIFF_W'(sample) - (DIFF_W'(x2) << 1) + DIFF_W'(x4);
    a1 = d1[DIFF_W-1] ? (DIFF_W-1)'(-d1) : (DIFF_W-1)'(d1);
    a2 = d2[DIFF_W-1] ? (DIFF_W-1)'(-d2) : (DIFF_W-1)'(d2);
    v_next = v_acc + ((idx >= WIN_LOG2'(2)) ? ACC_W'(a1) : '0);
    w_next = w_acc + ((idx >= WIN_LOG2'(4)) ? ACC_W'(a2) : '0);
    last   = (idx == '1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0; x4 <= '0;
      idx       <= '0;
      v_acc     <= '0;
      w_acc     <= '0;
      v_sum     <= '0;
      w_sum     <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (sample_valid) begin
        x1  <= sample;
        x2  <= x1;
        x3  <= x2;
        x4  <= x3;
        idx <= idx + 1'b1;
        if (last) begin
          v_sum     <= v_next;
          w_sum     <= w_next;
          win_valid <= 1'b1;
          v_acc     <= '0;
          w_acc     <= '0;
        end else begin
          v_acc <= v_next;
          w_acc <= w_next;
        end
      end
    end
  end

  initial assert (WIN_LOG2 >= 3)
    else $error("sid_diff_accum: a window needs more than four samples");

endmodule
