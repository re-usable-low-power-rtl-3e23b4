// tb_dmu: the data management unit between a memory responder (random
// request acceptance, random response delay, in-order responses) and a
// stand-in for the FIR core that answers every sample x with y = 3*x - 7
// after a random delay. Checks read and write addresses, the data written
// back (including the output shift), active / done, the error flag and
// that RFIFO and WFIFO both fill up.
module tb_dmu;
  import dsp_pkg::*;
  localparam int unsigned ACCW = XW + CW + $clog2(HMAX);
  logic clk = 0, rst_n = 0, start = 0;
  dsp_cfg_t cfg = '0;
  logic rd_req_valid, rd_req_ready = 0, rd_rsp_valid = 0, rd_rsp_err = 0;
  logic [31:0] rd_req_addr, rd_rsp_data = '0;
  logic wr_req_valid, wr_req_ready = 0, wr_rsp_valid = 0, wr_rsp_err = 0;
  logic [31:0] wr_req_addr, wr_req_data;
  logic fir_start;
  logic [6:0] fir_ntaps;
  logic x_valid, x_ready = 0, y_valid = 0, y_ready;
  logic signed [XW-1:0] x_data;
  logic signed [ACCW-1:0] y_data = '0;
  logic active, done, error;
  int unsigned checks = 0, failures = 0, n_rf_full = 0, n_wf_full = 0;
  dmu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dut.rf_count == 3'd4) n_rf_full++;
    if (y_valid && !y_ready) n_wf_full++;
  end

  logic [31:0] mem [int];
  bit          err_at [int];
  bit          written [int];
  logic [31:0] rdq [$];
  bit          rderrq [$];
  int          wrq [$];
  logic signed [XW-1:0] fq [$];
  int unsigned bad_addr = 0;
  logic [31:0] exp_rd_addr, exp_wr_addr;

  // memory responder: read channel
  always @(negedge clk) begin
    rd_req_ready = ($urandom_range(0, 2) == 0);
    wr_req_ready = ($urandom_range(0, 2) == 0);
    rd_rsp_valid = 0; wr_rsp_valid = 0;
    if (rdq.size() > 0 && $urandom_range(0, 1) == 0) begin
      rd_rsp_valid = 1; rd_rsp_data = rdq[0]; rd_rsp_err = rderrq[0];
    end
    if (wrq.size() > 0 && $urandom_range(0, 1) == 0) wr_rsp_valid = 1;
    // FIR stand-in
    x_ready = ($urandom_range(0, 3) == 0);
    if (!y_valid && fq.size() > 0 && $urandom_range(0, 2) == 0) begin
      y_valid = 1; y_data = ACCW'(fq[0]) * 3 - 7;
    end
  end
  always @(posedge clk) begin
    if (rd_rsp_valid) begin void'(rdq.pop_front()); void'(rderrq.pop_front()); end
    if (wr_rsp_valid) void'(wrq.pop_front());
    if (rd_req_valid && rd_req_ready) begin
      if (rd_req_addr != exp_rd_addr) bad_addr++;
      exp_rd_addr += 4;
      rdq.push_back(mem.exists(int'(rd_req_addr)) ? mem[int'(rd_req_addr)] : 32'h0);
      rderrq.push_back(err_at.exists(int'(rd_req_addr)));
    end
    if (wr_req_valid && wr_req_ready) begin
      if (wr_req_addr != exp_wr_addr) bad_addr++;
      exp_wr_addr += 4;
      mem[int'(wr_req_addr)] = wr_req_data;
      wrq.push_back(1);
    end
    if (x_valid && x_ready) fq.push_back(x_data);
    if (y_valid && y_ready) begin y_valid <= 0; void'(fq.pop_front()); end
  end

  task automatic run_block(input int n, input int osh, input bit with_err);
    logic signed [XW-1:0] xs [$];
    int bad = 0;
    cfg.src = 32'h100; cfg.dst = 32'h8000; cfg.nsamp = n; cfg.ntaps = 7'd42; cfg.oshift = 6'(osh);
    err_at.delete();
    for (int i = 0; i < n; i++) begin
      logic signed [XW-1:0] v = 16'($urandom);
      xs.push_back(v);
      mem[int'(cfg.src) + 4 * i] = {16'($urandom), v};
    end
    if (with_err) err_at[int'(cfg.src) + 4 * (n / 2)] = 1;
    exp_rd_addr = cfg.src; exp_wr_addr = cfg.dst;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    #1;
    checks++; if (!active || done || fir_start) failures++;
    checks++; if (fir_ntaps != 7'd42) failures++;
    while (!done) @(posedge clk);
    #1;
    checks++; if (active) failures++;
    checks++; if (error != with_err) failures++;
    for (int i = 0; i < n; i++) begin
      logic signed [ACCW-1:0] yv = ACCW'(xs[i]) * 3 - 7;
      logic signed [ACCW-1:0] ys = yv >>> osh;
      if (mem[int'(cfg.dst) + 4 * i] !== ys[31:0]) bad++;
    end
    checks++; if (bad != 0) begin failures++; $display("%0d wrong results", bad); end
    cfg.nsamp = 32'hFFFF;   // configuration is latched at start
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_block(100, 0, 0);
    run_block(250, 3, 0);
    run_block(40, 0, 1);
    run_block(1, 0, 0);
    run_block(0, 0, 0);
    checks++; if (bad_addr != 0) failures++;
    checks++; if (n_rf_full == 0 || n_wf_full == 0) failures++;
    $display("rfifo full %0d, wfifo full %0d", n_rf_full, n_wf_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
