// tb_clock_gate: the gated clock follows the clock while enabled, stays low
// while disabled, and an enable change during the high phase takes effect
// only from the next low phase (no glitches, no shortened pulses).
// The enable changes at random times that never coincide with a clock edge.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int unsigned checks = 0, failures = 0, pulses = 0, short_pulses = 0, high_changes = 0;
  time rise_t;
  bit  en_at_rise;
  clock_gate dut (.*);
  always #5 clk = ~clk;
  always @(posedge gclk) begin rise_t = $time; pulses++; end
  always @(negedge gclk) if (pulses > 0 && $time - rise_t != 5) short_pulses++;

  // enable driver: one change per cycle, in the high or the low phase
  initial forever begin
    @(posedge clk);
    if ($urandom_range(0, 1) != 0) #($urandom_range(1, 4));
    else                           #($urandom_range(6, 9));
    en = $urandom_range(0, 1);
    if (clk) high_changes++;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      en_at_rise = en;
      #1;
      checks++; if (gclk !== en_at_rise) begin failures++; $display("FAIL rise n=%0d t=%0t", n, $time); end
      #3;                                   // still in the high phase
      checks++; if (gclk !== en_at_rise) failures++;
      #2;                                   // low phase
      checks++; if (gclk !== 1'b0) failures++;
    end
    checks++; if (short_pulses != 0) begin failures++; $display("short %0d", short_pulses); end
    checks++; if (pulses == 0 || high_changes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
