// bvci_mem_model: behavioural BVCI target memory, for testbenches only.
//
// Accepts request cells after a random delay (cmdack), answers them in
// order after an independent random delay (rspval, held until rspack).
// Words are addressed by address[2 +: AWORD]; addresses at or above
// ERR_BASE answer with rerror. The array is public for the testbench.
module bvci_mem_model
  import dsp_pkg::*;
#(
  parameter int unsigned WORDS    = 2048,
  parameter logic [31:0] ERR_BASE = 32'h0001_0000,
  parameter int unsigned MAXQ     = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmdval,
  output logic      cmdack,
  input  bvci_req_t req,
  output logic      rspval,
  input  logic      rspack,
  output bvci_rsp_t rsp
);
  localparam int unsigned AWORD = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  bvci_rsp_t   q [$];
  int unsigned n_cmd_waits = 0, n_rsp_waits = 0, n_overlap = 0;

  always @(negedge clk) begin
    cmdack = cmdval && (q.size() < MAXQ) && ($urandom_range(0, 2) != 0);
    if (cmdval && !cmdack) n_cmd_waits++;
    if (!rspval || rspack) begin
      rspval = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      if (q.size() > 0 && !rspval) n_rsp_waits++;
      if (rspval) rsp = q[0];
    end
    if (q.size() > 1) n_overlap++;
  end

  always @(posedge clk) begin
    if (rspval && rspack) begin void'(q.pop_front()); rspval <= 1'b0; end
    if (cmdval && cmdack) begin
      bvci_rsp_t r;
      r.reop   = req.eop;
      r.rerror = (req.address >= ERR_BASE);
      r.rdata  = '0;
      if (!r.rerror) begin
        if (req.cmd == BVCI_WRITE) mem[req.address[2 +: AWORD]] <= req.wdata;
        else                       r.rdata = mem[req.address[2 +: AWORD]];
      end
      q.push_back(r);
    end
  end
endmodule
