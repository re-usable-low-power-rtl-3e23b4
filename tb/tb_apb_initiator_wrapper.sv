// tb_apb_initiator_wrapper: APB transfers through the wrapper into a
// stand-in PVCI target that answers at once. Checks that each transfer
// gives exactly one PVCI request in its setup cycle with the right
// address, direction and data, that PRDATA carries the read data in the
// enable cycle and that rerror shows on perr.
module tb_apb_initiator_wrapper;
  import dsp_pkg::*;
  logic pclk = 0, presetn = 0, psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic perr, val, ack;
  pvci_req_t req;
  pvci_rsp_t rsp;
  logic [31:0] regs [16];
  int unsigned checks = 0, failures = 0, n_val = 0;
  apb_initiator_wrapper dut (.*);
  always #5 pclk = ~pclk;
  assign ack        = val;
  assign rsp.rdata  = req.rd ? regs[req.address[5:2]] : '0;
  assign rsp.rerror = req.address[7:6] != 2'b00;
  always @(posedge pclk) begin
    if (val) n_val++;
    if (val && !req.rd && !rsp.rerror) regs[req.address[5:2]] <= req.wdata;
  end

  initial begin
    logic [31:0] shadow [16];
    for (int i = 0; i < 16; i++) begin regs[i] = $urandom; shadow[i] = regs[i]; end
    repeat (2) @(posedge pclk);
    presetn = 1;
    for (int n = 0; n < 500; n++) begin
      int unsigned v0;
      logic [31:0] a;
      a = {24'h0, ($urandom_range(0, 9) == 0) ? 2'b10 : 2'b00, 4'($urandom), 2'b00};
      v0 = n_val;
      @(negedge pclk);
      psel = 1; penable = 0; pwrite = $urandom_range(0, 1); paddr = a; pwdata = $urandom;
      #1;
      checks++;
      if (!val || req.address != a || req.rd == pwrite || (pwrite && req.wdata != pwdata) || req.be != 4'hF)
        failures++;
      @(negedge pclk);
      penable = 1;
      #1;
      checks++;
      if (val) failures++;                         // one request per transfer
      checks++;
      if (perr != (a[7:6] != 2'b00)) failures++;
      if (!pwrite && a[7:6] == 2'b00) begin
        checks++;
        if (prdata !== shadow[a[5:2]]) failures++;
      end
      if (pwrite && a[7:6] == 2'b00) shadow[a[5:2]] = pwdata;
      @(negedge pclk);
      psel = 0; penable = 0;
      checks++;
      if (n_val != v0 + 1) failures++;
      repeat ($urandom_range(0, 2)) @(negedge pclk);
    end
    for (int i = 0; i < 16; i++) begin checks++; if (regs[i] !== shadow[i]) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
