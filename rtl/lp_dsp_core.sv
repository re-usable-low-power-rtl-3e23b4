// lp_dsp_core: the low power DSP core, PMU + DMU + FIR core.
//
// The DMU fetches samples over the VC initiator interface, the FIR core
// filters them and the DMU writes the results back. The PMU runs on the
// free system bus clock; DMU and FIR core run on the gated one, which the
// PMU switches off while the IP sleeps. The PMU learns from the DMU's
// active flag whether the core is busy. This arrangement follows the
// document. Commands from the register block arrive as toggles (see
// register_block) and are turned into one-cycle pulses here: start
// begins a block, a coefficient toggle writes one HRAM word.
module lp_dsp_core
  import dsp_pkg::*;
#(
  parameter int unsigned RF_DEPTH = 4,
  parameter int unsigned WF_DEPTH = 4
) (
  input  logic            sbclk,       // free running system bus clock
  input  logic            gclk,        // gated system bus clock
  input  logic            rst_n,
  // register block
  input  dsp_cfg_t        cfg,
  input  logic            sleepmode,
  input  logic            start_tgl,
  input  logic            esm_tgl,
  input  logic            coef_tgl,
  input  logic [$clog2(HMAX)-1:0] coef_waddr,
  input  logic signed [CW-1:0]    coef_wdata,
  output logic            active,
  output logic            done,
  output logic            error,
  // power management
  input  logic            wakeup,
  output logic            sleep,
  output logic            clk_en,
  // to the VC initiator interface
  output logic            rd_req_valid,
  input  logic            rd_req_ready,
  output logic [AW-1:0]   rd_req_addr,
  input  logic            rd_rsp_valid,
  input  logic [DW-1:0]   rd_rsp_data,
  input  logic            rd_rsp_err,
  output logic            wr_req_valid,
  input  logic            wr_req_ready,
  output logic [AW-1:0]   wr_req_addr,
  output logic [DW-1:0]   wr_req_data,
  input  logic            wr_rsp_valid,
  input  logic            wr_rsp_err
);

  localparam int unsigned ACCW = XW + CW + $clog2(HMAX);

  logic start_seen, coef_seen, start_p, coef_p;
  logic fir_start, x_valid, x_ready, y_valid, y_ready, fir_busy;
  logic [$clog2(HMAX):0]  fir_ntaps;
  logic signed [XW-1:0]   x_data;
  logic signed [ACCW-1:0] y_data;

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      start_seen <= 1'b0;
      coef_seen  <= 1'b0;
    end else begin
      start_seen <= start_tgl;
      coef_seen  <= coef_tgl;
    end
  end
  assign start_p = start_tgl != start_seen;
  assign coef_p  = coef_tgl  != coef_seen;

  pmu u_pmu (
    .clk      (sbclk),
    .rst_n    (rst_n),
    .sleepmode(sleepmode),
    .esm_tgl  (esm_tgl),
    .active   (active),
    .wakeup   (wakeup),
    .clk_en   (clk_en),
    .sleep    (sleep)
  );

  dmu #(.RF_DEPTH(RF_DEPTH), .WF_DEPTH(WF_DEPTH), .ACCW(ACCW)) u_dmu (
    .clk         (gclk),
    .rst_n       (rst_n),
    .start       (start_p),
    .cfg         (cfg),
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
    .fir_start   (fir_start),
    .fir_ntaps   (fir_ntaps),
    .x_valid     (x_valid),
    .x_ready     (x_ready),
    .x_data      (x_data),
    .y_valid     (y_valid),
    .y_ready     (y_ready),
    .y_data      (y_data),
    .active      (active),
    .done        (done),
    .error       (error)
  );

  fir_core #(.HDEPTH(HMAX), .ACCW(ACCW)) u_fir (
    .clk      (gclk),
    .rst_n    (rst_n),
    .start    (fir_start),
    .ntaps    (fir_ntaps),
    .coef_we  (coef_p),
    .coef_addr(coef_waddr),
    .coef_h   (coef_wdata),
    .x_valid  (x_valid),
    .x_ready  (x_ready),
    .x_data   (x_data),
    .y_valid  (y_valid),
    .y_ready  (y_ready),
    .y_data   (y_data),
    .busy     (fir_busy)
  );

  // the FIR core only works while the DMU has a block in hand
  a_busy_in_block: assert property (@(posedge gclk) disable iff (!rst_n) fir_busy |-> active);

endmodule
