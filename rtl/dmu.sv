// dmu: data management unit of the DSP core.
//
// Moves one block of nsamp samples from memory through the FIR core and
// back. On start it latches the configuration and raises active. Its read
// engine issues one read request per sample (address src + 4*i, the
// sample in bits 15:0 of the word) as long as RFIFO has room for every
// read still in flight; read data go into RFIFO, which feeds the FIR core.
// Filtered results are shifted right by oshift, truncated to 32 bits and
// go into WFIFO; the write engine empties WFIFO with one write request per
// result (address dst + 4*i). When the last write has been answered,
// active falls and done rises (done holds until the next start); an error
// response sets error.
//
// The document gives the DMU's duties, the two FIFOs and the active
// output to the PMU; the request channels, address layout, credit scheme,
// FIFO depths and result scaling are this design's choices.
module dmu
  import dsp_pkg::*;
#(
  parameter int unsigned RF_DEPTH = 4,
  parameter int unsigned WF_DEPTH = 4,
  parameter int unsigned ACCW     = XW + CW + $clog2(HMAX)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,        // one cycle
  input  dsp_cfg_t                cfg,
  // read channel
  output logic                    rd_req_valid,
  input  logic                    rd_req_ready,
  output logic [AW-1:0]           rd_req_addr,
  input  logic                    rd_rsp_valid,
  input  logic [DW-1:0]           rd_rsp_data,
  input  logic                    rd_rsp_err,
  // write channel
  output logic                    wr_req_valid,
  input  logic                    wr_req_ready,
  output logic [AW-1:0]           wr_req_addr,
  output logic [DW-1:0]           wr_req_data,
  input  logic                    wr_rsp_valid,
  input  logic                    wr_rsp_err,
  // FIR core
  output logic                    fir_start,
  output logic [$clog2(HMAX):0]   fir_ntaps,
  output logic                    x_valid,
  input  logic                    x_ready,
  output logic signed [XW-1:0]    x_data,
  input  logic                    y_valid,
  output logic                    y_ready,
  input  logic signed [ACCW-1:0]  y_data,
  // status
  output logic                    active,
  output logic                    done,
  output logic                    error
);

  localparam int unsigned RPW = $clog2(RF_DEPTH);
  localparam int unsigned WPW = $clog2(WF_DEPTH);

  dsp_cfg_t     cfg_q;
  logic [31:0]  rd_issued, rd_recv, wr_issued, wr_recv;
  logic [RPW:0] rf_count;
  logic [WPW:0] wf_count;
  logic [31:0]  rd_inflight;
  logic [DW-1:0] rf_out;
  logic signed [ACCW-1:0] y_shifted;
  logic         rf_in_ready;

  assign fir_start   = start;
  assign fir_ntaps   = cfg_q.ntaps;
  assign rd_inflight = rd_issued - rd_recv;

  // read engine: only ask for what RFIFO can take
  assign rd_req_valid = active && (rd_issued != cfg_q.nsamp) &&
                        (rd_inflight + 32'(rf_count) < 32'(RF_DEPTH));
  assign rd_req_addr  = cfg_q.src + (rd_issued << 2);

  sync_fifo #(.WIDTH(DW), .DEPTH(RF_DEPTH)) u_rfifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start),
    .in_valid (rd_rsp_valid),
    .in_ready (rf_in_ready),
    .in_data  (rd_rsp_data),
    .out_valid(x_valid),
    .out_ready(x_ready),
    .out_data (rf_out),
    .count    (rf_count)
  );
  assign x_data = rf_out[XW-1:0];

  // result scaling into WFIFO
  assign y_shifted = y_data >>> cfg_q.oshift;

  sync_fifo #(.WIDTH(DW), .DEPTH(WF_DEPTH)) u_wfifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start),
    .in_valid (y_valid),
    .in_ready (y_ready),
    .in_data  (y_shifted[DW-1:0]),
    .out_valid(wr_req_valid),
    .out_ready(wr_req_ready),
    .out_data (wr_req_data),
    .count    (wf_count)
  );
  assign wr_req_addr = cfg_q.dst + (wr_issued << 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q     <= '0;
      rd_issued <= '0;
      rd_recv   <= '0;
      wr_issued <= '0;
      wr_recv   <= '0;
      active    <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
    end else if (start) begin
      cfg_q     <= cfg;
      rd_issued <= '0;
      rd_recv   <= '0;
      wr_issued <= '0;
      wr_recv   <= '0;
      active    <= 1'b1;
      done      <= 1'b0;
      error     <= 1'b0;
    end else begin
      if (rd_req_valid && rd_req_ready) rd_issued <= rd_issued + 1;
      if (rd_rsp_valid)                 rd_recv   <= rd_recv + 1;
      if (wr_req_valid && wr_req_ready) wr_issued <= wr_issued + 1;
      if (wr_rsp_valid)                 wr_recv   <= wr_recv + 1;
      if ((rd_rsp_valid && rd_rsp_err) || (wr_rsp_valid && wr_rsp_err)) error <= 1'b1;
      if (active && (wr_recv == cfg_q.nsamp)) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  // a result is only written back after its block started
  a_wf_idle: assert property (@(posedge clk) disable iff (!rst_n) !active |-> wf_count == '0 || done);

  // the credit scheme guarantees room in RFIFO for every read response
  a_rf_room: assert property (@(posedge clk) disable iff (!rst_n) rd_rsp_valid |-> rf_in_ready);

endmodule
