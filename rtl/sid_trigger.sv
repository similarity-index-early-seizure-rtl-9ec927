// sid_trigger: threshold decision on the deviation of the current estimate.
//
// The trigger is set for a window when its estimate departs from the
// long-term mean by more than both thresholds:
//   |H_e(j) - mean| > ftp   and   |H_e(j) - mean| > vpp * Var
// ftp is the fixed threshold (unsigned Q4.4). vpp is restricted to a power of
// two, 2**vpp_log2, so the variance-pegged threshold is a left shift. The
// decision is forced low until the mean and spread are valid (initial
// latency after reset).
//
// Timing: he_valid in cycle k updates trigger (held until the next window)
// and pulses trig_valid in cycle k+1. ftp and vpp_log2 are static
// configuration inputs.
module sid_trigger
  import sid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  udev_t      ftp,
  input  logic [2:0] vpp_log2,
  input  logic       he_valid,
  input  he_t        he,
  input  he_t        mean,
  input  udev_t      var_abs,
  input  logic       stats_valid,
  output logic       trigger,
  output logic       trig_valid
);

  localparam int unsigned THR_W = HE_W + 7;

  udev_t             dev;
  logic [THR_W-1:0]  var_thr;
  logic              fire;

  always_comb begin
    dev     = abs_diff(he, mean);
    var_thr = THR_W'(var_abs) << vpp_log2;
    fire    = stats_valid && (dev > ftp) && (THR_W'(dev) > var_thr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trigger    <= 1'b0;
      trig_valid <= 1'b0;
    end else begin
      trig_valid <= he_valid;
      if (he_valid) trigger <= fire;
    end
  end

endmodule
