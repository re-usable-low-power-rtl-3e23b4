// ahb_target_wrapper: bus wrapper between a BVCI initiator and the AHB.
//
// Takes BVCI request cells from the DSP IP's VC initiator interface and
// performs each as a single AHB (AMBA 2.0) transfer as bus master: request
// the bus (HBUSREQ), wait for HGRANT with HREADY, drive the address phase
// (NONSEQ, 32-bit word, SINGLE burst), then the data phase; the read data
// and HRESP come back as a BVCI response cell. The BVCI request is
// acknowledged when its address phase is accepted, and the response is
// offered until the initiator acknowledges it, so request and response
// handshakes are independent, which is what an arbitrated bus needs.
// The document only names this wrapper and its two protocols; doing one
// single transfer at a time, without bursts or retries (RETRY and SPLIT
// are treated as errors), is this design's choice.
// Clock: the system bus clock (HCLK).
module ahb_target_wrapper
  import dsp_pkg::*;
(
  input  logic           hclk,
  input  logic           hresetn,
  // BVCI target side
  input  logic           cmdval,
  output logic           cmdack,
  input  bvci_req_t      req,
  output logic           rspval,
  input  logic           rspack,
  output bvci_rsp_t      rsp,
  // AHB master side
  output logic           hbusreq,
  input  logic           hgrant,
  output logic [AW-1:0]  haddr,
  output logic [1:0]     htrans,
  output logic           hwrite,
  output logic [2:0]     hsize,
  output logic [2:0]     hburst,
  output logic [3:0]     hprot,
  output logic [DW-1:0]  hwdata,
  input  logic [DW-1:0]  hrdata,
  input  logic           hready,
  input  logic [1:0]     hresp
);

  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HRESP_OKAY    = 2'b00;

  typedef enum logic [2:0] {W_IDLE, W_REQ, W_ADDR, W_DATA, W_RSP} wrap_state_e;
  wrap_state_e state;

  logic          write_q;
  logic [DW-1:0] wdata_q;

  assign hbusreq = (state == W_REQ) || (state == W_ADDR);
  assign htrans  = (state == W_ADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr   = req.address;
  assign hwrite  = (req.cmd == BVCI_WRITE);
  assign hsize   = 3'b010;     // word
  assign hburst  = 3'b000;     // SINGLE
  assign hprot   = 4'b0001;    // data access
  assign hwdata  = wdata_q;
  assign cmdack  = (state == W_ADDR) && hready;
  assign rspval  = (state == W_RSP);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state   <= W_IDLE;
      write_q <= 1'b0;
      wdata_q <= '0;
      rsp     <= '0;
    end else begin
      unique case (state)
        W_IDLE: if (cmdval) state <= W_REQ;
        W_REQ:  if (hgrant && hready) state <= W_ADDR;
        W_ADDR: if (hready) begin
          write_q <= hwrite;
          wdata_q <= req.wdata;
          state   <= W_DATA;
        end
        W_DATA: if (hready) begin
          rsp.rdata  <= write_q ? '0 : hrdata;
          rsp.reop   <= 1'b1;
          rsp.rerror <= (hresp != HRESP_OKAY);
          state      <= W_RSP;
        end
        W_RSP: if (rspack) state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end

  // only single-word, single-cell requests are supported
  a_single_word: assert property (@(posedge hclk) disable iff (!hresetn)
                                 cmdval |-> req.be == 4'hF && req.plen == 9'd4 && req.eop);

  // the address phase is only driven while the bus is granted
  a_granted: assert property (@(posedge hclk) disable iff (!hresetn)
                              (state == W_REQ) && hgrant && hready |=> hgrant);

endmodule
