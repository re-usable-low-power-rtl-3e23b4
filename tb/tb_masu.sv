// tb_masu: checks the Multiply-Add-Shift-Unit against a reference that
// multiplies by the unsegmented coefficient h = s + m. Random sums of
// random length, including the extreme coefficients, and the one-clock
// latency of the accumulator.
module tb_masu;
  import dsp_pkg::*;
  localparam int unsigned ACCW = XW + CW + $clog2(HMAX);
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [XW-1:0] x = '0;
  seg_coef_t hs = '0;
  logic signed [ACCW-1:0] y;
  int unsigned checks = 0, failures = 0;
  masu dut (.clk, .rst_n, .en, .clr, .x, .h(hs), .y);
  always #5 clk = ~clk;

  // reference segment-free coefficient value of a segmented word
  function automatic longint value(input seg_coef_t s);
    longint v = longint'(s.m);
    if (s.nz) v += s.neg ? -(longint'(1) << s.sh) : (longint'(1) << s.sh);
    return v;
  endfunction

  initial begin
    longint acc;
    logic signed [CW-1:0] h;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 200; blk++) begin
      int len;
      len = $urandom_range(1, 64);
      acc = 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        case ($urandom_range(0, 5))
          0: h = 16'sh8000;
          1: h = 16'sh7FFF;
          2: h = 16'sd0;
          default: h = 16'($urandom);
        endcase
        x = (blk % 7 == 0) ? 16'sh8000 : 16'($urandom);
        hs = segment(h);
        en = 1; clr = (k == 0);
        acc = (k == 0 ? 0 : acc) + longint'(x) * longint'(h);
        // segmented word must still mean h
        checks++; if (value(hs) != longint'(h)) failures++;
        @(posedge clk); #1;
        checks++;
        if (longint'(y) != acc) begin
          failures++;
          if (failures < 5) $display("FAIL y=%0d expected %0d", y, acc);
        end
      end
      @(negedge clk); en = 0;
      @(posedge clk); #1;
      checks++; if (longint'(y) != acc) failures++;   // holds without en
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
