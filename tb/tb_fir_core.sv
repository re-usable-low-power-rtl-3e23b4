// tb_fir_core: the folded FIR core against a reference convolution with
// the unsegmented coefficients. Several runs with different tap counts
// (1, 42, 61, 64 and random), random input gaps and random output
// back-pressure; a restart in the middle of a run; and the throughput of
// ntaps + 3 clocks per output when input and output never wait.
module tb_fir_core;
  import dsp_pkg::*;
  localparam int unsigned ACCW = XW + CW + $clog2(HMAX);
  logic clk = 0, rst_n = 0, start = 0, coef_we = 0, x_valid = 0, y_ready = 0;
  logic [6:0] ntaps = 7'd1;
  logic [5:0] coef_addr = '0;
  logic signed [CW-1:0] coef_h = '0;
  logic x_ready, y_valid, busy;
  logic signed [XW-1:0] x_data = '0;
  logic signed [ACCW-1:0] y_data;
  int unsigned checks = 0, failures = 0, n_stall = 0;
  fir_core dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (x_valid && !x_ready && busy) n_stall++;

  logic signed [15:0] h [HMAX];
  logic signed [15:0] x [1024];
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint ref_y(input int n, input int taps);
    longint acc = 0;
    for (int k = 0; k < taps; k++) if (n - k >= 0) acc += longint'(h[k]) * longint'(x[n - k]);
    return acc;
  endfunction

  task automatic load(input int taps);
    for (int i = 0; i < HMAX; i++) begin
      @(negedge clk);
      h[i] = (i < taps) ? 16'($urandom) : 16'sd0;
      if (i % 11 == 3) h[i] = 16'sh8000;
      if (i % 13 == 5) h[i] = 16'sd0;
      coef_we = 1; coef_addr = 6'(i); coef_h = h[i];
    end
    @(negedge clk) coef_we = 0;
  endtask

  // run one block; gaps/bp: probability (in %) of an idle input / output cycle
  task automatic run(input int taps, input int nsamp, input int gaps, input int bp, input bit timing);
    int sent = 0, got = 0, bad = 0;
    longint unsigned last_t = 0;
    int bad_t = 0;
    for (int i = 0; i < nsamp; i++) x[i] = (i % 17 == 0) ? 16'sh8000 : 16'($urandom);
    ntaps = 7'(taps);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      begin
        while (sent < nsamp) begin
          @(negedge clk);
          x_valid = ($urandom_range(0, 99) >= gaps);
          x_data  = x[sent];
          @(posedge clk);
          if (x_valid && x_ready) sent++;
        end
        @(negedge clk) x_valid = 0;
      end
      begin
        while (got < nsamp) begin
          @(negedge clk);
          y_ready = ($urandom_range(0, 99) >= bp);
          @(posedge clk);
          if (y_valid && y_ready) begin
            if (longint'(y_data) != ref_y(got, taps)) begin
              bad++;
              if (bad < 4) $display("taps=%0d y[%0d]=%0d expected %0d", taps, got, y_data, ref_y(got, taps));
            end
            if (timing && got > 0 && (cyc - last_t) != longint'(taps + 3)) bad_t++;
            last_t = cyc;
            got++;
          end
        end
        @(negedge clk) y_ready = 0;
      end
    join
    checks++; if (bad != 0) failures++;
    if (timing) begin
      checks++;
      if (bad_t != 0) begin failures++; $display("throughput differs from ntaps+3 clocks %0d times", bad_t); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(64);
    run(64, 300, 0, 0, 1);
    run(1, 200, 30, 30, 0);
    run(1, 50, 0, 0, 1);
    load(42);
    run(42, 300, 50, 40, 0);
    run(42, 100, 0, 0, 1);
    load(61);
    run(61, 400, 10, 70, 0);
    // restart in the middle of a block: the new block starts from zero history
    ntaps = 7'd61;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    @(negedge clk) x_valid = 1; x_data = 16'sd1234;
    repeat (30) @(negedge clk);
    x_valid = 0;
    run(61, 100, 20, 20, 0);
    for (int r = 0; r < 4; r++) begin
      int t;
      t = $urandom_range(2, 64);
      load(t);
      run(t, 150, 25, 25, 0);
    end
    checks++; if (n_stall == 0) failures++;   // XRAM look-ahead limit was reached
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
