// masu: Multiply-Add-Shift-Unit of the low power FIR core.
//
// One step of a direct form FIR with a segmented coefficient h = s + m:
//   y <= (clr ? 0 : y) + x*m + (x shifted left by |s|, negated if s < 0)
// The multiplier sees only the non-negative part m; the power-of-two part
// s costs a shifter. This structure follows the document; the widths and
// the synchronous clear of the accumulator (used for the first tap of
// each output) are this design's choices. Latency: the result of an
// accumulate step is visible on y one clock after en is high.
module masu
  import dsp_pkg::*;
#(
  parameter int unsigned ACCW = XW + CW + $clog2(HMAX)   // accumulator width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,    // perform one accumulate step
  input  logic                   clr,   // with en: start a new sum
  input  logic signed [XW-1:0]   x,     // input sample (XREG)
  input  seg_coef_t              h,     // segmented coefficient (HREG)
  output logic signed [ACCW-1:0] y     // accumulator (output register)
);

  logic signed [ACCW-1:0] prod, shifted, sterm, base;

  always_comb begin
    prod    = ACCW'(x * $signed({1'b0, h.m}));
    shifted = ACCW'(x) <<< h.sh;
    sterm   = !h.nz ? '0 : (h.neg ? -shifted : shifted);
    base    = clr ? '0 : y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= base + prod + sterm;
  end

endmodule
