// tb_register_block: writes and reads every register, checks the
// configuration outputs, the start / entersleepmode / coefficient toggles,
// the auto-incrementing coefficient address, the status bits and the error
// for an unknown offset.
module tb_register_block;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0, we = 0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic err;
  dsp_cfg_t cfg;
  logic sleepmode, start_tgl, esm_tgl, coef_tgl;
  logic [5:0] coef_waddr;
  logic signed [15:0] coef_wdata;
  logic active = 0, done = 0, error = 0, sleep = 0;
  int unsigned checks = 0, failures = 0;
  register_block dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); sel = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d, output logic e);
    @(negedge clk); sel = 1; we = 0; addr = a; #1; d = rdata; e = err;
    @(negedge clk); sel = 0;
  endtask
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d; logic e; logic t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(REG_SRC, 32'h1234_5670); wr(REG_DST, 32'hABCD_0000); wr(REG_NSAMP, 512);
    wr(REG_NTAPS, 61); wr(REG_OSHIFT, 15);
    check(cfg.src == 32'h1234_5670 && cfg.dst == 32'hABCD_0000 && cfg.nsamp == 512 &&
          cfg.ntaps == 61 && cfg.oshift == 15, "configuration outputs");
    rd(REG_SRC, d, e);    check(d == 32'h1234_5670 && !e, "SRC reads back");
    rd(REG_DST, d, e);    check(d == 32'hABCD_0000, "DST reads back");
    rd(REG_NSAMP, d, e);  check(d == 512, "NSAMP reads back");
    rd(REG_NTAPS, d, e);  check(d == 61, "NTAPS reads back");
    rd(REG_OSHIFT, d, e); check(d == 15, "OSHIFT reads back");
    t0 = start_tgl;
    wr(REG_CTRL, 32'h1);  check(start_tgl != t0 && !sleepmode, "start toggles");
    t0 = start_tgl;
    wr(REG_CTRL, 32'h2);  check(start_tgl == t0 && sleepmode, "sleepmode set, no start");
    t0 = esm_tgl;
    wr(REG_CTRL, 32'h6);  check(esm_tgl != t0 && sleepmode, "entersleepmode toggles");
    rd(REG_CTRL, d, e);   check(d == 32'h2, "CTRL reads sleepmode only");
    wr(REG_COEFADDR, 5);
    for (int i = 0; i < 4; i++) begin
      t0 = coef_tgl;
      wr(REG_COEFDATA, 32'(-100 * i - 1));
      check(coef_tgl != t0 && coef_waddr == 6'(5 + i) && coef_wdata == 16'(-100 * i - 1), "coefficient write");
    end
    rd(REG_COEFADDR, d, e); check(d == 9, "coefficient address counted up");
    for (int s = 0; s < 16; s++) begin
      {sleep, error, done, active} = 4'(s);
      rd(REG_STATUS, d, e); check(d == 32'(s) && !e, "STATUS bits");
    end
    rd(8'h24, d, e); check(e, "unknown offset flags err");
    rd(8'h80, d, e); check(e, "unknown offset flags err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
