// tb_lp_dsp_core: the DSP core (PMU, DMU, FIR core) with the register
// block's signals driven directly and a memory that answers the read and
// write channels in order after random delays. The gated clock is made
// here from the free clock and the PMU's clk_en. Filters a block of
// samples with a random 33-tap filter, compares all results, and checks
// sleep entry after the block, that the gated clock stops while asleep,
// and wakeup.
module tb_lp_dsp_core;
  import dsp_pkg::*;
  logic sbclk = 0, gclk, rst_n = 0, en_l;
  dsp_cfg_t cfg = '0;
  logic sleepmode = 0, start_tgl = 0, esm_tgl = 0, coef_tgl = 0;
  logic [5:0] coef_waddr = '0;
  logic signed [15:0] coef_wdata = '0;
  logic active, done, error, wakeup = 0, sleep, clk_en;
  logic rd_req_valid, rd_req_ready = 0, rd_rsp_valid = 0, rd_rsp_err = 0;
  logic [31:0] rd_req_addr, rd_rsp_data = '0;
  logic wr_req_valid, wr_req_ready = 0, wr_rsp_valid = 0, wr_rsp_err = 0;
  logic [31:0] wr_req_addr, wr_req_data;
  int unsigned checks = 0, failures = 0, gclk_edges = 0;
  lp_dsp_core dut (.*);
  always #5 sbclk = ~sbclk;
  always_latch if (!sbclk) en_l = clk_en;
  assign gclk = sbclk & en_l;
  always @(posedge gclk) gclk_edges++;

  logic [31:0] mem [int];
  logic [31:0] rdq [$];
  int          wrq [$];
  always @(negedge sbclk) begin
    rd_req_ready = ($urandom_range(0, 1) == 0);
    wr_req_ready = ($urandom_range(0, 1) == 0);
    rd_rsp_valid = (rdq.size() > 0) && ($urandom_range(0, 1) == 0);
    if (rd_rsp_valid) rd_rsp_data = rdq[0];
    wr_rsp_valid = (wrq.size() > 0) && ($urandom_range(0, 1) == 0);
  end
  always @(posedge sbclk) begin
    if (rd_rsp_valid) void'(rdq.pop_front());
    if (wr_rsp_valid) void'(wrq.pop_front());
    if (rd_req_valid && rd_req_ready) rdq.push_back(mem.exists(int'(rd_req_addr)) ? mem[int'(rd_req_addr)] : 0);
    if (wr_req_valid && wr_req_ready) begin mem[int'(wr_req_addr)] = wr_req_data; wrq.push_back(1); end
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int N = 150, T = 33;
  logic signed [15:0] h [T];
  logic signed [15:0] x [N];

  initial begin
    int bad = 0, e0;
    repeat (4) @(posedge sbclk);
    @(negedge sbclk) rst_n = 1;
    for (int i = 0; i < T; i++) begin
      h[i] = 16'($urandom);
      @(negedge sbclk); coef_waddr = 6'(i); coef_wdata = h[i]; coef_tgl = !coef_tgl;
      @(negedge sbclk);
    end
    for (int i = 0; i < N; i++) begin x[i] = 16'($urandom); mem[32'h400 + 4 * i] = {16'hFFFF, x[i]}; end
    cfg.src = 32'h400; cfg.dst = 32'h2000; cfg.nsamp = N; cfg.ntaps = 7'(T); cfg.oshift = 6'd4;
    @(negedge sbclk) start_tgl = !start_tgl;
    @(negedge sbclk);
    check(active, "active after start");
    sleepmode = 1; esm_tgl = !esm_tgl;       // ask for sleep while busy
    while (!done) @(posedge sbclk);
    for (int n = 0; n < N; n++) begin
      longint acc;
      logic signed [63:0] s;
      acc = 0;
      for (int k = 0; k <= n && k < T; k++) acc += longint'(h[k]) * longint'(x[n - k]);
      s = acc >>> 4;
      if (mem[32'h2000 + 4 * n] !== s[31:0]) bad++;
    end
    check(bad == 0, "all filter results");
    check(!error, "no error");
    repeat (3) @(posedge sbclk);
    check(sleep && !clk_en, "asleep after the block");
    e0 = gclk_edges;
    repeat (20) @(posedge sbclk);
    check(gclk_edges == e0, "gated clock stopped while asleep");
    @(negedge sbclk) wakeup = 1;
    @(negedge sbclk) wakeup = 0;
    repeat (3) @(posedge sbclk);
    check(!sleep && clk_en && gclk_edges > e0, "wakeup restarts the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge sbclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
