// sid_pkg: word formats and constants shared by the similarity-index
// seizure detector.
//
// The datapath follows an 8-bit word length set by the ADC resolution.
// Samples are unsigned ADC codes. The similarity-index estimate H_e and
// everything derived from it (its running mean, its deviation, the fixed
// threshold) are fixed-point numbers with HE_FRAC fractional bits: H_e is
// signed Q3.4, the mean likewise, deviations and variance are unsigned Q4.4.
// The number of fractional bits is this design's choice; it matches a 16-entry
// logarithm table whose 4-bit entries total 64 bits.
package sid_pkg;

  localparam int unsigned SAMPLE_W = 8;   // ADC word
  localparam int unsigned HE_W     = 8;   // word of H_e, mean, variance
  localparam int unsigned HE_FRAC  = 4;   // fractional bits of those words
  localparam int unsigned LUT_BITS = 4;   // log LUT index and entry width

  typedef logic        [SAMPLE_W-1:0] sample_t;
  typedef logic signed [HE_W-1:0]     he_t;    // signed Q3.4
  typedef logic        [HE_W-1:0]     udev_t;  // unsigned Q4.4

  localparam he_t HE_MAX = he_t'(2 ** (HE_W - 1) - 1);
  localparam he_t HE_MIN = he_t'(-(2 ** (HE_W - 1)));

  // Saturate a wider signed value to the H_e word.
  function automatic he_t sat_he(input logic signed [15:0] v);
    if (v > 16'(signed'(HE_MAX)))      return HE_MAX;
    else if (v < 16'(signed'(HE_MIN))) return HE_MIN;
    else                               return he_t'(v);
  endfunction

  // |a - b| of two H_e words; the result always fits an unsigned word.
  function automatic udev_t abs_diff(input he_t a, input he_t b);
    logic signed [HE_W:0] d;
    d = {a[HE_W-1], a} - {b[HE_W-1], b};
    return d[HE_W] ? udev_t'(-d) : udev_t'(d);
  endfunction

endpackage
