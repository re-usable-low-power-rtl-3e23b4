// lp_dsp_ip: the low power DSP IP, its five top level modules wired up.
//
// Upper half, system bus clock (sbclk): VC initiator interface (BVCI
// towards the AHB target bus wrapper) and the low power DSP core. Lower
// half, peripheral bus clock (pbclk): VC target interface (PVCI from the
// APB initiator bus wrapper) and the register block. The gated clock
// circuitry holds one clock gate per domain, both enabled by the PMU, so
// that only the PMU keeps a clock while the IP sleeps; sleep and wakeup
// connect to the AHB-to-APB bus bridge. This structure follows the
// document. The two clocks must be synchronous with aligned rising edges
// and f_sbclk an integer multiple of f_pbclk; no synchronisers are used.
// While asleep the register block has no clock: the bus bridge is
// expected to answer accesses itself, so writes during sleep are lost.
module lp_dsp_ip
  import dsp_pkg::*;
#(
  parameter int unsigned RF_DEPTH = 4,
  parameter int unsigned WF_DEPTH = 4,
  parameter int unsigned MAXOUT   = 2
) (
  input  logic        sbclk,
  input  logic        pbclk,
  input  logic        rst_n,
  // BVCI initiator port
  output logic        bvci_cmdval,
  input  logic        bvci_cmdack,
  output bvci_req_t   bvci_req,
  input  logic        bvci_rspval,
  output logic        bvci_rspack,
  input  bvci_rsp_t   bvci_rsp,
  // PVCI target port
  input  logic        pvci_val,
  output logic        pvci_ack,
  input  pvci_req_t   pvci_req,
  output pvci_rsp_t   pvci_rsp,
  // dynamic power management
  input  logic        wakeup,
  output logic        sleep
);

  logic gsbclk, gpbclk, clk_en;

  dsp_cfg_t cfg;
  logic     sleepmode, start_tgl, esm_tgl, coef_tgl;
  logic [$clog2(HMAX)-1:0] coef_waddr;
  logic signed [CW-1:0]    coef_wdata;
  logic     active, done, error;

  logic            reg_sel, reg_we, reg_err;
  logic [7:0]      reg_addr;
  logic [DW-1:0]   reg_wdata, reg_rdata;

  logic            rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_err;
  logic [AW-1:0]   rd_req_addr;
  logic [DW-1:0]   rd_rsp_data;
  logic            wr_req_valid, wr_req_ready, wr_rsp_valid, wr_rsp_err;
  logic [AW-1:0]   wr_req_addr;
  logic [DW-1:0]   wr_req_data;

  // gated clock circuitry
  clock_gate u_cg_sb (.clk(sbclk), .en(clk_en), .gclk(gsbclk));
  clock_gate u_cg_pb (.clk(pbclk), .en(clk_en), .gclk(gpbclk));

  vc_target_if u_vct (
    .clk      (gpbclk),
    .rst_n    (rst_n),
    .val      (pvci_val),
    .ack      (pvci_ack),
    .req      (pvci_req),
    .rsp      (pvci_rsp),
    .reg_sel  (reg_sel),
    .reg_we   (reg_we),
    .reg_addr (reg_addr),
    .reg_wdata(reg_wdata),
    .reg_rdata(reg_rdata),
    .reg_err  (reg_err)
  );

  register_block u_regs (
    .clk       (gpbclk),
    .rst_n     (rst_n),
    .sel       (reg_sel),
    .we        (reg_we),
    .addr      (reg_addr),
    .wdata     (reg_wdata),
    .rdata     (reg_rdata),
    .err       (reg_err),
    .cfg       (cfg),
    .sleepmode (sleepmode),
    .start_tgl (start_tgl),
    .esm_tgl   (esm_tgl),
    .coef_tgl  (coef_tgl),
    .coef_waddr(coef_waddr),
    .coef_wdata(coef_wdata),
    .active    (active),
    .done      (done),
    .error     (error),
    .sleep     (sleep)
  );

  lp_dsp_core #(.RF_DEPTH(RF_DEPTH), .WF_DEPTH(WF_DEPTH)) u_core (
    .sbclk       (sbclk),
    .gclk        (gsbclk),
    .rst_n       (rst_n),
    .cfg         (cfg),
    .sleepmode   (sleepmode),
    .start_tgl   (start_tgl),
    .esm_tgl     (esm_tgl),
    .coef_tgl    (coef_tgl),
    .coef_waddr  (coef_waddr),
    .coef_wdata  (coef_wdata),
    .active      (active),
    .done        (done),
    .error       (error),
    .wakeup      (wakeup),
    .sleep       (sleep),
    .clk_en      (clk_en),
    .rd_req_valid(rd_req_valid),
    .rd_req_ready(rd_req_ready),
    .rd_req_addr (rd_req_addr),
    .rd_rsp_valid(rd_rsp_valid),
    .rd_rsp_data (rd_rsp_data),
    .rd_rsp_err  (rd_rsp_err),
    .wr_req_valid(wr_req_valid),
    .wr_req_ready(wr_req_ready),
    .wr_req_addr (wr_req_addr),
    .wr_req_data (wr_req_data),
    .wr_rsp_valid(wr_rsp_valid),
    .wr_rsp_err  (wr_rsp_err)
  );

  vc_initiator_if #(.MAXOUT(MAXOUT)) u_vci (
    .clk         (gsbclk),
    .rst_n       (rst_n),
    .rd_req_valid(rd_req_valid),
    .rd_req_ready(rd_req_ready),
    .rd_req_addr (rd_req_addr),
    .rd_rsp_valid(rd_rsp_valid),
    .rd_rsp_data (rd_rsp_data),
    .rd_rsp_err  (rd_rsp_err),
    .wr_req_valid(wr_req_valid),
    .wr_req_ready(wr_req_ready),
    .wr_req_addr (wr_req_addr),
    .wr_req_data (wr_req_data),
    .wr_rsp_valid(wr_rsp_valid),
    .wr_rsp_err  (wr_rsp_err),
    .cmdval      (bvci_cmdval),
    .cmdack      (bvci_cmdack),
    .req         (bvci_req),
    .rspval      (bvci_rspval),
    .rspack      (bvci_rspack),
    .rsp         (bvci_rsp)
  );

endmodule
