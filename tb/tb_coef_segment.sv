// tb_coef_segment: exhaustive check of the coefficient segmentation over
// all 65536 coefficients: h = s + m, m >= 0, s a signed power of two or
// zero, and m below |s| so that the multiplier operand is short.
module tb_coef_segment;
  import dsp_pkg::*;
  logic signed [CW-1:0] h;
  seg_coef_t seg;
  int unsigned checks = 0, failures = 0;
  coef_segment dut (.h, .seg);
  initial begin
    for (int i = -32768; i < 32768; i++) begin
      longint s, m;
      h = 16'(i);
      #1;
      m = longint'(seg.m);
      s = seg.nz ? (longint'(1) << seg.sh) : 0;
      if (seg.neg) s = -s;
      checks++;
      if (s + m != longint'(i) || m < 0 || (i != 0 && !seg.nz) || (i == 0 && (seg.nz || m != 0)) ||
          (seg.nz && m >= (longint'(1) << seg.sh)) || (seg.neg != (i < 0))) begin
        failures++;
        if (failures < 5) $display("FAIL h=%0d s=%0d m=%0d", i, s, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
