// coef_segment: coefficient segmentation for the low power FIR core.
//
// Splits a two's complement coefficient h into two numbers, h = s + m,
// where m >= 0 is applied to the multiplier of the MASU and s is a signed
// power of two (or zero) that the MASU realises as a shift of the input
// sample. This is the condition the coefficient segmentation algorithm
// puts on the split; how s is chosen is this design's choice: the largest
// power of two not above h for h > 0, and minus the smallest power of two
// not below |h| for h < 0. Either way m is smaller than |s|, so the
// multiplier sees a short operand.
//
// Purely combinational; used on the HRAM write path so that HRAM holds
// the segmented form (m & s) shown leaving HREG.
module coef_segment
  import dsp_pkg::*;
(
  input  logic signed [CW-1:0] h,    // coefficient
  output seg_coef_t            seg   // m, shift, sign and non-zero flag of s
);

  always_comb seg = segment(h);

endmodule
