// apb_initiator_wrapper: bus wrapper between the APB and a PVCI target.
//
// Each APB (AMBA 2.0) transfer becomes one PVCI request: in the setup
// cycle (PSEL high, PENABLE low) the wrapper raises VAL with the address,
// direction and write data; the PVCI target answers with ACK in that same
// cycle, a write takes effect at the end of it, and read data are
// registered and driven on PRDATA during the enable cycle. AMBA 2.0 APB
// has neither wait states nor an error signal, so the target must answer
// at once and rerror is only kept as the perr status output.
// The document names the wrapper and the PVCI rule that each valid
// request is acknowledged with a response; the mapping is this design's.
// Clock: the peripheral bus clock (PCLK).
module apb_initiator_wrapper
  import dsp_pkg::*;
(
  input  logic           pclk,
  input  logic           presetn,
  // APB slave side
  input  logic           psel,
  input  logic           penable,
  input  logic           pwrite,
  input  logic [AW-1:0]  paddr,
  input  logic [DW-1:0]  pwdata,
  output logic [DW-1:0]  prdata,
  output logic           perr,      // last transfer was answered with rerror
  // PVCI initiator side
  output logic           val,
  input  logic           ack,
  output pvci_req_t      req,
  input  pvci_rsp_t      rsp
);

  assign val = psel && !penable;

  always_comb begin
    req         = '0;
    req.address = paddr;
    req.be      = 4'hF;
    req.rd      = !pwrite;
    req.wdata   = pwdata;
    req.eop     = 1'b1;
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      prdata <= '0;
      perr   <= 1'b0;
    end else if (val && ack) begin
      prdata <= rsp.rdata;
      perr   <= rsp.rerror;
    end
  end

  // zero wait state APB: the target must answer in the setup cycle
  a_ack_now: assert property (@(posedge pclk) disable iff (!presetn) val |-> ack);

endmodule
