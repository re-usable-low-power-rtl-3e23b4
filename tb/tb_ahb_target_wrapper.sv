// tb_ahb_target_wrapper: BVCI requests through the wrapper onto
// ahb_mem_model (random grant delay, wait states, error region). Checks the
// AHB control signals of each address phase, the data written, the read
// data and error flags returned as BVCI responses, and that the response
// waits for rspack.
module tb_ahb_target_wrapper;
  import dsp_pkg::*;
  logic hclk = 0, hresetn = 0;
  logic cmdval = 0, cmdack, rspval, rspack = 0;
  bvci_req_t req = '0;
  bvci_rsp_t rsp;
  logic hbusreq, hgrant, hwrite, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp;
  logic [2:0] hsize, hburst;
  logic [3:0] hprot;
  int unsigned checks = 0, failures = 0, n_held = 0, n_aphase = 0, bad_ctl = 0;
  ahb_target_wrapper dut (.*);
  ahb_mem_model #(.WORDS(256), .WAIT_MAX(3)) u_mem (.hclk, .hresetn, .hbusreq, .hgrant, .haddr, .htrans,
    .hwrite, .hwdata, .hrdata, .hready, .hresp);
  always #5 hclk = ~hclk;
  always @(posedge hclk) if (hresetn && htrans == 2'b10 && hready) begin
    n_aphase++;
    if (!hgrant || hsize != 3'b010 || hburst != 3'b000 || haddr != req.address ||
        hwrite != (req.cmd == BVCI_WRITE)) bad_ctl++;
  end

  initial begin
    logic [31:0] shadow [256];
    for (int i = 0; i < 256; i++) begin shadow[i] = $urandom; u_mem.mem[i] = shadow[i]; end
    repeat (2) @(posedge hclk);
    hresetn = 1;
    for (int n = 0; n < 800; n++) begin
      bit e;
      @(negedge hclk);
      cmdval = 1;
      req.cmd = ($urandom_range(0, 1) != 0) ? BVCI_WRITE : BVCI_READ;
      req.address = (n % 53 == 7) ? 32'h0001_0100 : {22'd0, 8'($urandom), 2'b00};
      req.wdata = $urandom; req.be = 4'hF; req.plen = 9'd4; req.eop = 1;
      e = req.address >= 32'h0001_0000;
      @(posedge hclk);
      while (!cmdack) @(posedge hclk);
      @(negedge hclk) cmdval = 0;
      if (req.cmd == BVCI_WRITE && !e) shadow[req.address[9:2]] = req.wdata;
      while (!rspval) @(negedge hclk);
      // hold off rspack a little: the response must stay
      repeat ($urandom_range(0, 3)) begin
        @(negedge hclk);
        checks++; if (!rspval) failures++;
        n_held++;
      end
      checks++;
      if (rsp.rerror != e) failures++;
      if (req.cmd == BVCI_READ && !e) begin
        checks++;
        if (rsp.rdata !== shadow[req.address[9:2]]) failures++;
      end
      rspack = 1;
      @(negedge hclk) rspack = 0;
    end
    for (int i = 0; i < 256; i++) begin checks++; if (u_mem.mem[i] !== shadow[i]) failures++; end
    checks++; if (bad_ctl != 0 || n_aphase != 800) failures++;
    checks++; if (u_mem.n_waits == 0 || u_mem.n_grant_delays == 0 || u_mem.n_errors == 0 || n_held == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
