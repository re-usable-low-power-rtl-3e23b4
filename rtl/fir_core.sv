// fir_core: folded direct form FIR filter with coefficient segmentation.
//
// Computes y[n] = sum_{k=0}^{T-1} h[k] * x[n-k] for every input sample
// x[n] (samples before the first one count as zero), with one MASU that
// performs one tap per clock. The blocks follow the document: HRAM holds
// the coefficients in segmented form (m & s), XRAM holds the input
// samples and is twice as deep as HRAM, HREG and XREG register the two
// RAM outputs in front of the MASU, and an FSM sequences the taps.
//
// XRAM is a circular buffer of 2*HMAX samples. Output n reads samples
// n-T+1 .. n; new samples keep arriving while it is computed and may run
// up to 2*HMAX-T samples ahead of n, so the core never has to wait for
// input in the middle of an output: this is what the doubled XRAM depth
// buys. The FSM, the masking of not-yet-received samples and the
// handshakes are this design's choices.
//
// Interface: coefficients are written (unsegmented) through coef_we /
// coef_addr / coef_h and segmented on the way into HRAM. start (one
// cycle) restarts the sample count for a new block of data; ntaps
// (1..HMAX) must be stable while the core runs. Samples enter through
// x_valid / x_ready, results leave through y_valid / y_ready.
// Timing: one output takes ntaps + 3 clocks (one idle cycle, ntaps read
// cycles, one drain cycle, one output cycle) when y_ready is high.
module fir_core
  import dsp_pkg::*;
#(
  parameter int unsigned HDEPTH = HMAX,                   // HRAM depth = max taps
  parameter int unsigned ACCW   = XW + CW + $clog2(HMAX),
  localparam int unsigned HAW   = $clog2(HDEPTH),
  localparam int unsigned XDEPTH = 2 * HDEPTH,            // XRAM depth
  localparam int unsigned XAW   = $clog2(XDEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [HAW:0]           ntaps,
  input  logic                   coef_we,
  input  logic [HAW-1:0]         coef_addr,
  input  logic signed [CW-1:0]   coef_h,
  input  logic                   x_valid,
  output logic                   x_ready,
  input  logic signed [XW-1:0]   x_data,
  output logic                   y_valid,
  input  logic                   y_ready,
  output logic signed [ACCW-1:0] y_data,
  output logic                   busy       // an output is being computed
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_DRAIN, S_OUT} state_e;
  state_e state;

  logic [31:0]     wcnt;      // samples written into XRAM
  logic [31:0]     ncnt;      // index of the output being computed
  logic [HAW:0]    k;         // tap being read
  seg_coef_t       seg_w;
  seg_coef_t       hram_q, hreg;
  logic [XW-1:0]   xram_q;
  logic signed [XW-1:0] xreg;
  logic            reg_v, reg_first;   // HREG/XREG hold a valid tap / the first tap
  logic            x_take;
  logic [XAW-1:0]  xraddr;
  logic [31:0]     ahead;

  // Segmentation on the HRAM write path
  coef_segment u_seg (.h(coef_h), .seg(seg_w));

  sram_1r1w #(.WIDTH(SEGW), .DEPTH(HDEPTH)) u_hram (
    .clk  (clk),
    .we   (coef_we),
    .waddr(coef_addr),
    .wdata(seg_w),
    .raddr(k[HAW-1:0]),
    .rdata(hram_q)
  );

  // Sample x[n-k] sits at slot (n-k) mod XDEPTH
  assign xraddr = XAW'(ncnt) - XAW'(k);

  sram_1r1w #(.WIDTH(XW), .DEPTH(XDEPTH)) u_xram (
    .clk  (clk),
    .we   (x_take),
    .waddr(XAW'(wcnt)),
    .wdata(x_data),
    .raddr(xraddr),
    .rdata(xram_q)
  );

  // Input may run ahead of the output being computed by up to XDEPTH-T
  assign ahead   = wcnt - ncnt;
  assign x_ready = !start && (ahead <= 32'(XDEPTH) - 32'(ntaps));
  assign x_take  = x_valid && x_ready;

  assign y_valid = (state == S_OUT);
  assign busy    = (state != S_IDLE);

  masu #(.ACCW(ACCW)) u_masu (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (reg_v),
    .clr  (reg_first),
    .x    (xreg),
    .h    (hreg),
    .y    (y_data)
  );

  // FSM, tap counter and the HREG / XREG pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wcnt      <= '0;
      ncnt      <= '0;
      k         <= '0;
      hreg      <= '0;
      xreg      <= '0;
      reg_v     <= 1'b0;
      reg_first <= 1'b0;
    end else if (start) begin
      state     <= S_IDLE;
      wcnt      <= '0;
      ncnt      <= '0;
      k         <= '0;
      reg_v     <= 1'b0;
      reg_first <= 1'b0;
    end else begin
      if (x_take) wcnt <= wcnt + 1;
      reg_v     <= 1'b0;
      reg_first <= 1'b0;
      unique case (state)
        S_IDLE: begin
          k <= '0;
          if (wcnt != ncnt) state <= S_MAC;   // x[n] is in XRAM
        end
        S_MAC: begin
          hreg      <= hram_q;
          // samples before the first one are zero
          xreg      <= (32'(k) <= ncnt) ? xram_q : '0;
          reg_v     <= 1'b1;
          reg_first <= (k == '0);
          if (k == ntaps - 1'b1) state <= S_DRAIN;
          else                   k     <= k + 1'b1;
        end
        S_DRAIN: state <= S_OUT;              // last tap accumulates
        S_OUT: if (y_ready) begin
          ncnt  <= ncnt + 1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The output register must not change while it is offered
  a_y_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
                               y_valid && !y_ready |=> y_valid && $stable(y_data));

endmodule
