// vc_target_if: PVCI target interface of the DSP IP.
//
// Answers every valid PVCI request with a response in the same cycle:
// ack follows val, a read returns the addressed register in rdata, a
// write reaches the register block at the clock edge that ends the cell.
// The register block is selected by the low 8 address bits. rerror is set
// for an offset the register block does not know and for a write whose
// byte enables are not all set (registers are written as whole words).
// The one-request-one-response rule is the document's; the zero wait
// state answer, the decoding and the error cases are this design's
// choices.
module vc_target_if
  import dsp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // PVCI
  input  logic           val,
  output logic           ack,
  input  pvci_req_t      req,
  output pvci_rsp_t      rsp,
  // register block
  output logic           reg_sel,
  output logic           reg_we,
  output logic [7:0]     reg_addr,
  output logic [DW-1:0]  reg_wdata,
  input  logic [DW-1:0]  reg_rdata,
  input  logic           reg_err
);

  logic bad_be;

  assign bad_be    = !req.rd && (req.be != 4'hF);
  assign ack       = val;
  assign reg_sel   = val;
  assign reg_we    = val && !req.rd && !bad_be;
  assign reg_addr  = req.address[7:0];
  assign reg_wdata = req.wdata;

  always_comb begin
    rsp.rdata  = req.rd ? reg_rdata : '0;
    rsp.rerror = val && (reg_err || bad_be);
  end

  // PVCI: every request is answered, and only requests are
  a_ack: assert property (@(posedge clk) disable iff (!rst_n) val == ack);
  // registers are accessed one word per packet
  a_eop: assert property (@(posedge clk) disable iff (!rst_n) val |-> req.eop);

endmodule
