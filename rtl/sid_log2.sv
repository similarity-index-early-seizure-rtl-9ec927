// sid_log2: scaled base-2 logarithm by leading-one detection and a small
// look-up table.
//
// For an input x with its leading one at bit p, x = 2**p * (1 + f) with
// 0 <= f < 1, so log2(x) = p + log2(1 + f). The integer part is p; the
// fractional part comes from a 16-entry table indexed by the four bits just
// below the leading one (m), holding round(16 * log2(1 + m/16)). The table is
// 16 x 4 bits, a 64-bit memory, which is the size of the scaled log LUT the
// architecture uses; the leading-one split around it is this design's choice.
// Bits below the four index bits are dropped (truncation). log2(0) is
// returned as 0, which makes a silent window (both sums zero) give H_e = 0.
//
// Interface: combinational. Output is unsigned with FRAC_W = 4 fractional
// bits and enough integer bits to hold IN_W - 1.
module sid_log2 #(
  parameter int unsigned IN_W     = 17,
  localparam int unsigned INT_W   = $clog2(IN_W),
  localparam int unsigned FRAC_W  = 4,
  localparam int unsigned OUT_W   = INT_W + FRAC_W
) (
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] log2_x
);

  // round(16 * log2(1 + m/16)), m = 0..15
  function automatic logic [FRAC_W-1:0] frac_lut(input logic [FRAC_W-1:0] m);
    case (m)
      4'd0:  return 4'd0;
      4'd1:  return 4'd1;
      4'd2:  return 4'd3;
      4'd3:  return 4'd4;
      4'd4:  return 4'd5;
      4'd5:  return 4'd6;
      4'd6:  return 4'd7;
      4'd7:  return 4'd8;
      4'd8:  return 4'd9;
      4'd9:  return 4'd10;
      4'd10: return 4'd11;
      4'd11: return 4'd12;
      4'd12: return 4'd13;
      4'd13: return 4'd14;
      4'd14: return 4'd15;
      default: return 4'd15;
    endcase
  endfunction

  logic [INT_W-1:0]       p;
  logic [IN_W+FRAC_W-1:0] norm;
  logic [FRAC_W-1:0]      m;

  always_comb begin
    p = '0;
    for (int i = 0; i < IN_W; i++)
      if (x[i]) p = INT_W'(i);
    // Move the leading one to bit IN_W+FRAC_W-1; the index bits follow it.
    norm   = {x, {FRAC_W{1'b0}}} << (INT_W'(IN_W - 1) - p);
    m      = norm[IN_W+FRAC_W-2 -: FRAC_W];
    log2_x = (x == '0) ? '0 : {p, frac_lut(m)};
  end

endmodule
