// vc_initiator_if: BVCI initiator interface of the DSP IP.
//
// Turns the DMU's read and write requests into BVCI request cells (one
// 32-bit word each, all byte enables, plen = 4, eop = 1) and hands the
// BVCI responses back to the channel that asked. Request and response use
// independent handshakes, as BVCI allows: cmdval/cmdack for requests,
// rspval/rspack for responses. Up to MAXOUT requests may await their
// responses; BVCI answers in order, so a small FIFO of request kinds
// routes each response. When both channels ask, they take turns.
// The document gives the BVCI handshakes; the request format, the limit of
// outstanding requests and the arbitration are this design's choices.
// A request is held unchanged on the bus from cmdval until cmdack.
module vc_initiator_if
  import dsp_pkg::*;
#(
  parameter int unsigned MAXOUT = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // DMU read channel
  input  logic            rd_req_valid,
  output logic            rd_req_ready,
  input  logic [AW-1:0]   rd_req_addr,
  output logic            rd_rsp_valid,
  output logic [DW-1:0]   rd_rsp_data,
  output logic            rd_rsp_err,
  // DMU write channel
  input  logic            wr_req_valid,
  output logic            wr_req_ready,
  input  logic [AW-1:0]   wr_req_addr,
  input  logic [DW-1:0]   wr_req_data,
  output logic            wr_rsp_valid,
  output logic            wr_rsp_err,
  // BVCI
  output logic            cmdval,
  input  logic            cmdack,
  output bvci_req_t       req,
  input  logic            rspval,
  output logic            rspack,
  input  bvci_rsp_t       rsp
);

  localparam int unsigned TPW = (MAXOUT > 1) ? $clog2(MAXOUT) : 1;

  logic         sel_wr, last_wr, held, held_wr;
  logic         tag_in_ready, tag_valid, tag_wr;
  logic [TPW:0] tag_count;
  logic         issue;

  always_comb begin
    if (held)                              sel_wr = held_wr;
    else if (rd_req_valid && wr_req_valid) sel_wr = !last_wr;
    else                                   sel_wr = wr_req_valid;
  end

  assign cmdval = (rd_req_valid || wr_req_valid) && tag_in_ready;
  assign issue  = cmdval && cmdack;

  always_comb begin
    req         = '0;
    req.address = sel_wr ? wr_req_addr : rd_req_addr;
    req.be      = 4'hF;
    req.cmd     = sel_wr ? BVCI_WRITE : BVCI_READ;
    req.wdata   = sel_wr ? wr_req_data : '0;
    req.plen    = 9'd4;
    req.eop     = 1'b1;
  end

  assign rd_req_ready = issue && !sel_wr;
  assign wr_req_ready = issue &&  sel_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_wr <= 1'b1;
      held    <= 1'b0;
      held_wr <= 1'b0;
    end else begin
      held    <= cmdval && !cmdack;
      held_wr <= sel_wr;
      if (issue) last_wr <= sel_wr;
    end
  end

  // kinds of the requests awaiting a response, oldest first
  sync_fifo #(.WIDTH(1), .DEPTH(MAXOUT)) u_tags (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .in_valid (issue),
    .in_ready (tag_in_ready),
    .in_data  (sel_wr),
    .out_valid(tag_valid),
    .out_ready(rspval),
    .out_data (tag_wr),
    .count    (tag_count)
  );

  assign rspack       = 1'b1;
  assign rd_rsp_valid = rspval && !tag_wr;
  assign wr_rsp_valid = rspval &&  tag_wr;
  assign rd_rsp_data  = rsp.rdata;
  assign rd_rsp_err   = rsp.rerror;
  assign wr_rsp_err   = rsp.rerror;

  // BVCI rules: a pending request stays put; no response without a request
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 cmdval && !cmdack |=> cmdval && $stable(req));
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) rspval |-> tag_valid);
  a_tags_bound:   assert property (@(posedge clk) disable iff (!rst_n) tag_count <= (TPW+1)'(MAXOUT));
  // every request is a one-cell packet, so is every response
  a_single_cell:  assert property (@(posedge clk) disable iff (!rst_n) rspval |-> rsp.reop);

endmodule
