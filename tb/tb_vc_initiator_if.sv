// tb_vc_initiator_if: drives the read and write channels of the BVCI
// initiator interface with random traffic into bvci_mem_model. Checks that
// every write lands in memory, every read returns the word at its address,
// responses reach the channel that asked, both channels get served when
// they compete, errors come back, and two requests are outstanding at times.
module tb_vc_initiator_if;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_req_valid = 0, rd_req_ready, rd_rsp_valid, rd_rsp_err;
  logic [31:0] rd_req_addr = '0, rd_rsp_data;
  logic wr_req_valid = 0, wr_req_ready, wr_rsp_valid, wr_rsp_err;
  logic [31:0] wr_req_addr = '0, wr_req_data = '0;
  logic cmdval, cmdack, rspval, rspack;
  bvci_req_t req;
  bvci_rsp_t rsp;
  int unsigned checks = 0, failures = 0, n_conflict = 0, n_two = 0;
  vc_initiator_if dut (.*);
  bvci_mem_model #(.WORDS(256)) u_mem (.clk, .rst_n, .cmdval, .cmdack, .req, .rspval, .rspack, .rsp);
  always #5 clk = ~clk;

  logic [31:0] shadow [256];
  logic [31:0] exp_rd [$];
  bit          exp_rd_err [$];
  int          wr_pending = 0, wr_err_exp [$];
  int unsigned rd_done = 0, wr_done = 0, rd_sent = 0, wr_sent = 0;

  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid && wr_req_valid) n_conflict++;
    if (dut.tag_count == 2'd2) n_two++;
    if (rd_rsp_valid) begin
      checks++;
      if (exp_rd.size() == 0 || rd_rsp_data !== exp_rd[0] || rd_rsp_err != exp_rd_err[0]) begin failures++; if (failures < 4) $display("rd %h exp %h t=%0t", rd_rsp_data, exp_rd[0], $time); end
      void'(exp_rd.pop_front()); void'(exp_rd_err.pop_front());
      rd_done++;
    end
    if (wr_rsp_valid) begin
      checks++;
      if (wr_err_exp.size() == 0 || wr_rsp_err != (wr_err_exp[0] != 0)) failures++;
      void'(wr_err_exp.pop_front());
      wr_done++;
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) begin shadow[i] = $urandom; u_mem.mem[i] = shadow[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (!rd_req_valid && $urandom_range(0, 1) == 0) begin
        rd_req_valid = 1;
        rd_req_addr = (n % 101 == 0) ? 32'h0001_0040 : {22'd0, 8'($urandom), 2'b00};
      end
      if (!wr_req_valid && $urandom_range(0, 1) == 0) begin
        wr_req_valid = 1;
        wr_req_addr = (n % 97 == 0) ? 32'h0002_0000 : {22'd0, 8'($urandom), 2'b00};
        wr_req_data = $urandom;
      end
      @(posedge clk);
      // a request is taken when ready; order of taking defines memory order
      if (rd_req_valid && rd_req_ready) begin
        bit e;
        e = (rd_req_addr >= 32'h0001_0000);
        exp_rd.push_back(e ? 32'h0 : shadow[rd_req_addr[9:2]]);
        exp_rd_err.push_back(e);
        rd_sent++;
      end
      if (wr_req_valid && wr_req_ready) begin
        bit e;
        e = (wr_req_addr >= 32'h0001_0000);
        if (!e) shadow[wr_req_addr[9:2]] = wr_req_data;
        wr_err_exp.push_back(e);
        wr_sent++;
      end
      checks++;
      if (rd_req_ready && wr_req_ready) failures++;   // one request per cycle
      #1;
      if (rd_req_ready) rd_req_valid = 0;
      if (wr_req_ready) wr_req_valid = 0;
    end
    @(negedge clk) begin rd_req_valid = 0; wr_req_valid = 0; end
    repeat (50) @(posedge clk);
    checks++; if (rd_done != rd_sent || wr_done != wr_sent) failures++;
    for (int i = 0; i < 256; i++) begin checks++; if (u_mem.mem[i] !== shadow[i]) failures++; end
    checks++; if (n_conflict == 0 || n_two == 0 || u_mem.n_cmd_waits == 0 || u_mem.n_rsp_waits == 0) failures++;
    $display("reads %0d writes %0d conflicts %0d two-outstanding %0d", rd_sent, wr_sent, n_conflict, n_two);
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
