// tb_vc_target_if: PVCI requests against a stand-in register file. Checks
// that every request is acknowledged in its own cycle, reads return the
// register contents, writes reach the register file, unknown offsets and
// partial writes answer with rerror and partial writes change nothing.
module tb_vc_target_if;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, val = 0, ack;
  pvci_req_t req = '0;
  pvci_rsp_t rsp;
  logic reg_sel, reg_we, reg_err;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [16];
  int unsigned checks = 0, failures = 0, n_err = 0;
  vc_target_if dut (.*);
  always #5 clk = ~clk;
  // stand-in register file: 16 words, offsets 0x00..0x3C known
  assign reg_rdata = regs[reg_addr[5:2]];
  assign reg_err   = reg_sel && (reg_addr[7:6] != 2'b00);
  always @(posedge clk) if (reg_sel && reg_we && !reg_err) regs[reg_addr[5:2]] <= reg_wdata;

  initial begin
    logic [31:0] shadow [16];
    for (int i = 0; i < 16; i++) begin regs[i] = $urandom; shadow[i] = regs[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit bad_off, bad_be;
      @(negedge clk);
      val = ($urandom_range(0, 3) != 0);
      req.address = {24'h4000_00, ($urandom_range(0, 9) == 0) ? 8'hC4 : {2'b00, 4'($urandom), 2'b00}};
      req.rd = $urandom_range(0, 1);
      req.be = ($urandom_range(0, 7) == 0) ? 4'h3 : 4'hF;
      req.wdata = $urandom;
      req.eop = 1;
      #1;
      bad_off = req.address[7:6] != 2'b00;
      bad_be  = !req.rd && req.be != 4'hF;
      checks++;
      if (ack != val) failures++;
      if (val) begin
        checks++;
        if (rsp.rerror != (bad_off || bad_be)) failures++;
        if (rsp.rerror) n_err++;
        if (req.rd && !bad_off) begin
          checks++;
          if (rsp.rdata !== shadow[req.address[5:2]]) failures++;
        end
      end
      @(posedge clk);
      if (val && !req.rd && !bad_off && !bad_be) shadow[req.address[5:2]] = req.wdata;
    end
    #1;
    for (int i = 0; i < 16; i++) begin checks++; if (regs[i] !== shadow[i]) failures++; end
    checks++; if (n_err == 0) failures++;
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
