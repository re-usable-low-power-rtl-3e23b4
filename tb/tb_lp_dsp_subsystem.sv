// tb_lp_dsp_subsystem: end-to-end test of the DSP subsystem at its default
// parameters.
//
// The APB side is driven by tasks that play the bus bridge; the AHB side
// sees ahb_mem_model (memory with random wait states, random grant delay
// and an error region). The test filters 512 random 16-bit samples with
// two low pass filters of 42 and 61 taps (Hamming windowed sinc, Q15),
// compares every result word in memory with a reference convolution
// computed here, then exercises the power management (sleep now, sleep
// requested while busy, wakeup, request ignored with sleepmode off) and an
// AHB error response. Each mechanism is counted; one that never occurs is
// a failure. hclk runs at twice the frequency of pclk, rising edges aligned.
module tb_lp_dsp_subsystem;
  import dsp_pkg::*;

  localparam int unsigned NSAMP = 512;
  localparam logic [31:0] SRC   = 32'h0000_0000;
  localparam logic [31:0] DST   = 32'h0000_1000;
  localparam int unsigned OSH   = 15;

  logic        hclk = 1'b0, pclk = 1'b0, resetn = 1'b0;
  logic        hbusreq, hgrant, hwrite, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans, hresp;
  logic [2:0]  hsize, hburst;
  logic [3:0]  hprot;
  logic        psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic        perr, wakeup = 1'b0, sleep;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;

  always #5 hclk = ~hclk;
  initial begin #5; forever begin pclk = ~pclk; #10; end end
  always @(posedge hclk) cyc <= cyc + 1;

  lp_dsp_subsystem dut (.*);

  ahb_mem_model #(.WORDS(2048), .WAIT_MAX(2)) u_mem (
    .hclk(hclk), .hresetn(resetn), .hbusreq(hbusreq), .hgrant(hgrant),
    .haddr(haddr), .htrans(htrans), .hwrite(hwrite), .hwdata(hwdata),
    .hrdata(hrdata), .hready(hready), .hresp(hresp));

  // ---- mechanism counters -------------------------------------------------
  int unsigned n_rfifo_full = 0, n_xram_stall = 0, n_wfifo_full = 0;
  int unsigned n_arb_conflict = 0, n_sleep = 0, n_wakeup = 0, n_deferred = 0;
  int unsigned n_ignored = 0, n_err_block = 0, n_gated = 0, n_neg_s = 0, n_zero_s = 0;
  always @(posedge hclk) if (resetn) begin
    if (dut.u_ip.u_core.u_dmu.rf_count == 3'd4) n_rfifo_full++;
    if (dut.u_ip.u_core.u_fir.x_valid && !dut.u_ip.u_core.u_fir.x_ready &&
        dut.u_ip.u_core.u_fir.busy) n_xram_stall++;
    if (dut.u_ip.u_core.u_dmu.y_valid && !dut.u_ip.u_core.u_dmu.y_ready) n_wfifo_full++;
    if (dut.u_ip.u_vci.rd_req_valid && dut.u_ip.u_vci.wr_req_valid) n_arb_conflict++;
    if (!dut.u_ip.clk_en) n_gated++;
  end

  // ---- APB bridge tasks -----------------------------------------------------
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(posedge pclk);
    psel <= 1'b1; penable <= 1'b0; pwrite <= 1'b1; paddr <= 32'(a); pwdata <= d;
    @(posedge pclk); penable <= 1'b1;
    @(posedge pclk); psel <= 1'b0; penable <= 1'b0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(posedge pclk);
    psel <= 1'b1; penable <= 1'b0; pwrite <= 1'b0; paddr <= 32'(a);
    @(posedge pclk); penable <= 1'b1;
    @(posedge pclk); d = prdata; psel <= 1'b0; penable <= 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- data -----------------------------------------------------------------
  logic signed [15:0] x [NSAMP];
  logic signed [15:0] h [HMAX];

  // windowed sinc low pass, cutoff fc (fraction of fs), n taps, Q15
  task automatic make_lpf(input int n, input real fc);
    real pi, t, v, w;
    pi = 3.14159265358979;
    for (int i = 0; i < HMAX; i++) h[i] = '0;
    for (int i = 0; i < n; i++) begin
      t = real'(i) - real'(n - 1) / 2.0;
      v = (t == 0.0) ? 2.0 * fc : $sin(2.0 * pi * fc * t) / (pi * t);
      w = 0.54 - 0.46 * $cos(2.0 * pi * real'(i) / real'(n - 1));
      h[i] = 16'($rtoi(v * w * 32767.0));
    end
  endtask

  function automatic logic [31:0] ref_y(input int n, input int taps);
    longint acc = 0;
    for (int k = 0; k < taps; k++) if (n - k >= 0) acc += longint'(h[k]) * longint'(x[n - k]);
    return 32'(acc >>> OSH);
  endfunction

  task automatic wait_done(input longint unsigned limit, output longint unsigned took);
    logic [31:0] st;
    longint unsigned t0 = cyc;
    do apb_read(REG_STATUS, st); while (!st[1] && (cyc - t0 < limit));
    took = cyc - t0;
  endtask

  task automatic run_filter(input int taps, input real fc, input string name);
    longint unsigned took;
    logic [31:0] st;
    int bad = 0;
    make_lpf(taps, fc);
    apb_write(REG_COEFADDR, 0);
    for (int i = 0; i < taps; i++) begin
      seg_coef_t sg = segment(h[i]);
      if (sg.nz && sg.neg) n_neg_s++;
      if (!sg.nz) n_zero_s++;
      apb_write(REG_COEFDATA, 32'(h[i]));
    end
    apb_write(REG_SRC, SRC);
    apb_write(REG_DST, DST);
    apb_write(REG_NSAMP, NSAMP);
    apb_write(REG_NTAPS, taps);
    apb_write(REG_OSHIFT, OSH);
    for (int i = 0; i < NSAMP; i++) u_mem.mem[(DST >> 2) + i] = 32'hA5A5_5A5A;
    apb_write(REG_CTRL, 32'h1);
    wait_done(64'd400000, took);
    apb_read(REG_STATUS, st);
    check(st[1] && !st[0] && !st[2], {name, ": status done, not active, no error"});
    for (int i = 0; i < NSAMP; i++)
      if (u_mem.mem[(DST >> 2) + i] !== ref_y(i, taps)) begin
        bad++;
        if (bad < 5) $display("%s y[%0d] = %h, expected %h", name, i, u_mem.mem[(DST >> 2) + i], ref_y(i, taps));
      end
    check(bad == 0, {name, ": all results match the reference"});
    // one output takes at least taps+3 clocks in the folded core
    check(took >= longint'(NSAMP) * longint'(taps + 3), {name, ": not faster than the folded core allows"});
    $display("%s: %0d taps, %0d samples, %0d hclk cycles (%0.1f per sample)", name, taps, NSAMP,
             took, real'(took) / real'(NSAMP));
  endtask

  logic [31:0] rd;
  longint unsigned took;

  initial begin
    for (int i = 0; i < NSAMP; i++) begin
      x[i] = 16'($urandom);
      u_mem.mem[(SRC >> 2) + i] = {16'($urandom), x[i]};   // upper half is ignored
    end
    repeat (4) @(posedge hclk);
    resetn <= 1'b1;

    // register read back and an unknown offset
    apb_write(REG_NTAPS, 32'd5);
    apb_read(REG_NTAPS, rd);
    check(rd == 32'd5, "NTAPS reads back");
    apb_read(8'hFC, rd);
    check(perr, "unknown register offset answers with an error");
    apb_read(REG_STATUS, rd);
    check(!perr && rd == 32'd0, "idle status after reset");

    // Table 1 filters: LPF1 42 taps (fs 20 kHz, edge 4.5 kHz), LPF2 61 taps (fs 10 kHz, edge 1.25 kHz)
    run_filter(42, 4.5 / 20.0, "LPF1");
    run_filter(61, 1.25 / 10.0, "LPF2");

    // sleep at once: sleepmode + entersleepmode while idle
    apb_write(REG_CTRL, 32'h6);
    repeat (4) @(posedge hclk);
    check(sleep, "sleeps after entersleepmode while idle");
    if (sleep) n_sleep++;
    apb_read(REG_STATUS, rd);
    check(rd[3], "STATUS shows sleep");
    apb_write(REG_NTAPS, 32'd9);               // register block has no clock now
    @(negedge hclk) wakeup = 1'b1;
    @(negedge hclk) wakeup = 1'b0;
    repeat (2) @(posedge hclk);
    check(!sleep, "wakeup ends sleep");
    if (!sleep) n_wakeup++;
    apb_read(REG_NTAPS, rd);
    check(rd == 32'd61, "write during sleep was not taken");

    // entersleepmode while a block runs: sleep waits for the end of the block
    apb_write(REG_NTAPS, 61);
    apb_write(REG_CTRL, 32'h3);                // start, sleepmode on
    apb_write(REG_CTRL, 32'h6);                // request sleep while busy
    repeat (10) @(posedge hclk);
    check(!sleep && dut.u_ip.active, "no sleep while the core is active");
    if (!sleep && dut.u_ip.active) n_deferred++;
    while (!sleep && cyc < 64'd2_000_000) @(posedge hclk);
    check(sleep && dut.u_ip.done, "falls asleep once the block is done");
    if (sleep) n_sleep++;
    begin
      int bad = 0;
      for (int i = 0; i < NSAMP; i++) if (u_mem.mem[(DST >> 2) + i] !== ref_y(i, 61)) bad++;
      check(bad == 0, "block before the deferred sleep is complete and correct");
    end
    @(negedge hclk) wakeup = 1'b1;
    @(negedge hclk) wakeup = 1'b0;
    repeat (2) @(posedge hclk);
    check(!sleep, "second wakeup");
    if (!sleep) n_wakeup++;

    // with sleepmode off a request is dropped
    apb_write(REG_CTRL, 32'h4);
    repeat (8) @(posedge hclk);
    check(!sleep, "entersleepmode ignored without sleepmode");
    if (!sleep) n_ignored++;

    // AHB error response sets the error flag
    apb_write(REG_SRC, 32'h0001_0000);
    apb_write(REG_NSAMP, 8);
    apb_write(REG_CTRL, 32'h1);
    wait_done(64'd100000, took);
    apb_read(REG_STATUS, rd);
    check(rd[1] && rd[2], "AHB error response shows in STATUS.error");
    if (rd[2]) n_err_block++;

    // every mechanism must have happened
    $display("mechanisms: rfifo_full=%0d xram_stall=%0d wfifo_full=%0d arb_conflict=%0d ahb_waits=%0d grant_delays=%0d",
             n_rfifo_full, n_xram_stall, n_wfifo_full, n_arb_conflict, u_mem.n_waits, u_mem.n_grant_delays);
    $display("            sleep=%0d wakeup=%0d deferred=%0d ignored=%0d gated_cycles=%0d ahb_errors=%0d neg_s=%0d zero_s=%0d",
             n_sleep, n_wakeup, n_deferred, n_ignored, n_gated, u_mem.n_errors, n_neg_s, n_zero_s);
    check(n_rfifo_full > 0,      "RFIFO filled up");
    check(n_xram_stall > 0,      "XRAM look-ahead limit reached");
    check(n_arb_conflict > 0,    "read and write requests competed");
    check(u_mem.n_waits > 0,     "AHB wait states seen");
    check(u_mem.n_grant_delays > 0, "AHB grant delays seen");
    check(n_sleep == 2,          "two sleep entries");
    check(n_wakeup == 2,         "two wakeups");
    check(n_deferred == 1,       "one deferred sleep");
    check(n_ignored == 1,        "one ignored sleep request");
    check(n_gated > 0,           "clocks were gated");
    check(u_mem.n_errors > 0,    "AHB error responses seen");
    check(n_neg_s > 0,           "negative s coefficients used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
