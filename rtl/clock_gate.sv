// clock_gate: gated clock circuitry of the DSP IP.
//
// Latch based clock gate: the enable is captured by a latch that is
// transparent while the clock is low and is ANDed with the clock, so the
// gated clock never carries a shortened pulse. The PMU drives the enable
// with its single control output; one such cell gates each clock domain
// of the IP. The document names the circuitry and its control by the PMU;
// the latch-and-AND cell is the usual way to build it and is this
// design's choice. The latch it infers is intended.
module clock_gate (
  input  logic clk,    // free running clock
  input  logic en,     // enable, may change while clk is high
  output logic gclk    // gated clock
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
