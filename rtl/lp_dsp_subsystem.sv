// lp_dsp_subsystem: the low power DSP IP with its two bus wrappers.
//
// This is what plugs into an ARM based AMBA system: an AHB master port
// (through the AHB target bus wrapper, towards the system bus where the
// sample memory lives), an APB slave port (through the APB initiator bus
// wrapper, from the AHB-to-APB bridge) and the sleep / wakeup pair for
// the bus bridge. Inside, the wrappers talk BVCI and PVCI to the IP.
// hclk is the system bus clock, pclk the peripheral bus clock; they must
// be synchronous with aligned rising edges and f_hclk a multiple of
// f_pclk. Arbiter, decoder, bridge and memories are outside.
module lp_dsp_subsystem
  import dsp_pkg::*;
(
  input  logic           hclk,
  input  logic           pclk,
  input  logic           resetn,
  // AHB master port
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
  input  logic [1:0]     hresp,
  // APB slave port
  input  logic           psel,
  input  logic           penable,
  input  logic           pwrite,
  input  logic [AW-1:0]  paddr,
  input  logic [DW-1:0]  pwdata,
  output logic [DW-1:0]  prdata,
  output logic           perr,
  // to / from the bus bridge
  input  logic           wakeup,
  output logic           sleep
);

  logic      bvci_cmdval, bvci_cmdack, bvci_rspval, bvci_rspack;
  bvci_req_t bvci_req;
  bvci_rsp_t bvci_rsp;
  logic      pvci_val, pvci_ack;
  pvci_req_t pvci_req;
  pvci_rsp_t pvci_rsp;

  ahb_target_wrapper u_ahbw (
    .hclk   (hclk),
    .hresetn(resetn),
    .cmdval (bvci_cmdval),
    .cmdack (bvci_cmdack),
    .req    (bvci_req),
    .rspval (bvci_rspval),
    .rspack (bvci_rspack),
    .rsp    (bvci_rsp),
    .hbusreq(hbusreq),
    .hgrant (hgrant),
    .haddr  (haddr),
    .htrans (htrans),
    .hwrite (hwrite),
    .hsize  (hsize),
    .hburst (hburst),
    .hprot  (hprot),
    .hwdata (hwdata),
    .hrdata (hrdata),
    .hready (hready),
    .hresp  (hresp)
  );

  apb_initiator_wrapper u_apbw (
    .pclk   (pclk),
    .presetn(resetn),
    .psel   (psel),
    .penable(penable),
    .pwrite (pwrite),
    .paddr  (paddr),
    .pwdata (pwdata),
    .prdata (prdata),
    .perr   (perr),
    .val    (pvci_val),
    .ack    (pvci_ack),
    .req    (pvci_req),
    .rsp    (pvci_rsp)
  );

  lp_dsp_ip u_ip (
    .sbclk      (hclk),
    .pbclk      (pclk),
    .rst_n      (resetn),
    .bvci_cmdval(bvci_cmdval),
    .bvci_cmdack(bvci_cmdack),
    .bvci_req   (bvci_req),
    .bvci_rspval(bvci_rspval),
    .bvci_rspack(bvci_rspack),
    .bvci_rsp   (bvci_rsp),
    .pvci_val   (pvci_val),
    .pvci_ack   (pvci_ack),
    .pvci_req   (pvci_req),
    .pvci_rsp   (pvci_rsp),
    .wakeup     (wakeup),
    .sleep      (sleep)
  );

endmodule
