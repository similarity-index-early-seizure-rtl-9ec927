// sid_smoother: averaging of the per-window estimate before it is judged.
//
// The raw H_e of a single window is noisy, so it is averaged, by an amount
// chosen for the recording, before the mean/variance and trigger stages.
// The averaging is a first-order running average whose weight is a power of
// two, so it needs one subtractor, one adder and a shift:
//   y <- y + (x - y) / 2**shift
// shift = 0 passes the estimate through unchanged. The state keeps EXT_FRAC
// extra fractional bits so small steps are not lost. The filter form is this
// design's choice: the need for averaging is given, its structure is not.
// The first estimate after reset loads the state directly.
//
// Interface: he_valid/he in, avg_valid/he_avg out one cycle later.
// avg_shift is a static configuration input (0..3).
module sid_smoother
  import sid_pkg::*;
#(
  parameter int unsigned EXT_FRAC = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] avg_shift,
  input  logic       he_valid,
  input  he_t        he,
  output logic       avg_valid,
  output he_t        he_avg
);

  localparam int unsigned ST_W = HE_W + EXT_FRAC + 1;

  logic signed [ST_W-1:0] state, x_ext, step, next;
  logic                   primed;

  always_comb begin
    x_ext = ST_W'(he) <<< EXT_FRAC;
    step  = (x_ext - state) >>> avg_shift;
    next  = primed ? state + step : x_ext;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      primed    <= 1'b0;
      he_avg    <= '0;
      avg_valid <= 1'b0;
    end else begin
      avg_valid <= he_valid;
      if (he_valid) begin
        state  <= next;
        primed <= 1'b1;
        // Truncate the extra fraction; next stays within the he_t range.
        he_avg <= he_t'(next >>> EXT_FRAC);
      end
    end
  end

endmodule
