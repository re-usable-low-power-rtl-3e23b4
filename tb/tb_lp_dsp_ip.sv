// tb_lp_dsp_ip: the DSP IP between a PVCI master (tasks below) and the
// BVCI memory model, with sbclk three times as fast as pbclk (rising edges
// aligned). Programs a 42-tap filter through the registers, filters 200
// samples, checks every result and the status, then sleeps and wakes up
// through the sleepmode / entersleepmode bits and the wakeup input.
module tb_lp_dsp_ip;
  import dsp_pkg::*;
  logic sbclk = 0, pbclk = 0, rst_n = 0;
  logic bvci_cmdval, bvci_cmdack, bvci_rspval, bvci_rspack;
  bvci_req_t bvci_req;
  bvci_rsp_t bvci_rsp;
  logic pvci_val = 0, pvci_ack;
  pvci_req_t pvci_req = '0;
  pvci_rsp_t pvci_rsp;
  logic wakeup = 0, sleep;
  int unsigned checks = 0, failures = 0;
  lp_dsp_ip dut (.*);
  bvci_mem_model #(.WORDS(2048)) u_mem (.clk(sbclk), .rst_n, .cmdval(bvci_cmdval), .cmdack(bvci_cmdack),
    .req(bvci_req), .rspval(bvci_rspval), .rspack(bvci_rspack), .rsp(bvci_rsp));
  always #5 sbclk = ~sbclk;
  initial begin #5; forever begin pbclk = ~pbclk; #15; end end

  task automatic pw(input logic [7:0] a, input logic [31:0] d);
    @(negedge pbclk);
    pvci_val = 1; pvci_req.address = {24'h0, a}; pvci_req.rd = 0; pvci_req.wdata = d;
    pvci_req.be = 4'hF; pvci_req.eop = 1;
    @(posedge pbclk); #1 pvci_val = 0;
  endtask
  task automatic pr(input logic [7:0] a, output logic [31:0] d);
    @(negedge pbclk);
    pvci_val = 1; pvci_req.address = {24'h0, a}; pvci_req.rd = 1; pvci_req.be = 4'hF; pvci_req.eop = 1;
    #1 d = pvci_rsp.rdata;
    @(posedge pbclk); #1 pvci_val = 0;
  endtask
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int N = 200, T = 42;
  logic signed [15:0] h [T];
  logic signed [15:0] x [N];

  initial begin
    logic [31:0] st;
    int bad = 0;
    repeat (3) @(posedge sbclk);
    rst_n = 1;
    pw(REG_COEFADDR, 0);
    for (int i = 0; i < T; i++) begin h[i] = 16'($urandom); pw(REG_COEFDATA, 32'(h[i])); end
    for (int i = 0; i < N; i++) begin x[i] = 16'($urandom); u_mem.mem[16 + i] = {16'h0, x[i]}; end
    pw(REG_SRC, 32'h40); pw(REG_DST, 32'h1000); pw(REG_NSAMP, N); pw(REG_NTAPS, T); pw(REG_OSHIFT, 8);
    pw(REG_CTRL, 1);
    do pr(REG_STATUS, st); while (!st[1]);
    check(st[3:0] == 4'b0010, "status done only");
    for (int n = 0; n < N; n++) begin
      longint acc;
      logic signed [63:0] s;
      acc = 0;
      for (int k = 0; k <= n && k < T; k++) acc += longint'(h[k]) * longint'(x[n - k]);
      s = acc >>> 8;
      if (u_mem.mem[1024 + n] !== s[31:0]) begin bad++; if (bad < 4) $display("y[%0d]=%h exp %h", n, u_mem.mem[1024 + n], s[31:0]); end
    end
    check(bad == 0, "all filter results");
    check(u_mem.n_cmd_waits > 0 && u_mem.n_rsp_waits > 0 && u_mem.n_overlap > 0,
          "independent request / response handshakes exercised");
    pw(REG_CTRL, 6);
    repeat (6) @(posedge sbclk);
    check(sleep, "sleep after entersleepmode");
    pr(REG_STATUS, st);
    check(st[3], "STATUS.sleep readable while asleep");
    @(negedge sbclk) wakeup = 1;
    @(negedge sbclk) wakeup = 0;
    repeat (2) @(posedge sbclk);
    check(!sleep, "awake again");
    pr(8'h40, st);
    check(pvci_rsp.rerror, "unknown register answers rerror");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge sbclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
