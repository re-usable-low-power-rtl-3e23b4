// dsp_pkg: types and constants shared by the low power DSP IP.
//
// Holds the data widths of the FIR datapath, the encoding of a segmented
// coefficient (h = s + m, m >= 0, s a signed power of two or zero), the
// register map of the register block and the BVCI / PVCI request and
// response bundles used between the VC interfaces and the bus wrappers.
// The 16-bit input data width and the twice-as-deep XRAM follow the
// document; the coefficient width, RAM depth, bus widths and register
// map are this design's own choices.
package dsp_pkg;

  // FIR datapath widths
  localparam int unsigned XW     = 16;             // input sample width
  localparam int unsigned CW     = 16;             // coefficient width
  localparam int unsigned MW     = CW - 1;         // magnitude part m (unsigned)
  localparam int unsigned SHW    = $clog2(CW);     // shift amount of s
  localparam int unsigned HMAX   = 64;             // HRAM depth (max taps)
  localparam int unsigned DW     = 32;             // bus data width
  localparam int unsigned AW     = 32;             // bus address width

  // Segmented coefficient as stored in HRAM: h = s + m
  typedef struct packed {
    logic [MW-1:0]  m;    // non-negative part, goes to the multiplier
    logic [SHW-1:0] sh;   // |s| = 2**sh
    logic           neg;  // s is negative
    logic           nz;   // s is non-zero
  } seg_coef_t;

  localparam int unsigned SEGW = $bits(seg_coef_t);

  // Split h into s (signed power of two or zero) and m >= 0.
  // h > 0 : s = 2**k with 2**k <= h < 2**(k+1), m = h - s
  // h < 0 : s = -2**k with k the smallest value so that 2**k >= -h, m = h - s
  // h = 0 : s = 0, m = 0
  function automatic seg_coef_t segment(input logic signed [CW-1:0] h);
    seg_coef_t       r;
    logic [CW:0]     mag;
    logic [CW:0]     pw;
    int unsigned     k;
    r   = '0;
    k   = 0;
    mag = h[CW-1] ? ({1'b0, ~h} + 1'b1) : {1'b0, h};
    if (h != '0) begin
      if (!h[CW-1]) begin
        for (int unsigned i = 0; i < CW; i++) if (mag[i]) k = i;
      end else begin
        for (int unsigned i = 0; i <= CW; i++) if (mag[i]) k = i;
        if ((mag & (mag - 1'b1)) != '0) k = k + 1;  // not a power of two: round up
      end
      pw = (CW+1)'(1) << k;
      r.m   = MW'(h[CW-1] ? (pw - mag) : (mag - pw));
      r.sh  = SHW'(k);
      r.neg = h[CW-1];
      r.nz  = 1'b1;
    end
    return r;
  endfunction

  // Register map of the register block (byte offsets)
  localparam logic [7:0] REG_CTRL     = 8'h00; // [0] start (W1), [1] sleepmode, [2] entersleepmode (W1)
  localparam logic [7:0] REG_STATUS   = 8'h04; // [0] active, [1] done, [2] error, [3] sleep
  localparam logic [7:0] REG_SRC      = 8'h08; // source address of the input samples
  localparam logic [7:0] REG_DST      = 8'h0C; // destination address of the results
  localparam logic [7:0] REG_NSAMP    = 8'h10; // number of samples
  localparam logic [7:0] REG_NTAPS    = 8'h14; // number of coefficients (1..HMAX)
  localparam logic [7:0] REG_OSHIFT   = 8'h18; // arithmetic right shift of the result
  localparam logic [7:0] REG_COEFADDR = 8'h1C; // HRAM write address (auto increments)
  localparam logic [7:0] REG_COEFDATA = 8'h20; // write: h at COEFADDR

  // Configuration handed from the register block to the DSP core
  typedef struct packed {
    logic [AW-1:0]          src;
    logic [AW-1:0]          dst;
    logic [31:0]            nsamp;
    logic [$clog2(HMAX):0]  ntaps;
    logic [5:0]             oshift;
  } dsp_cfg_t;

  // BVCI command encoding
  typedef enum logic [1:0] {
    BVCI_NOP   = 2'b00,
    BVCI_READ  = 2'b01,
    BVCI_WRITE = 2'b10
  } bvci_cmd_e;

  // BVCI request cell (initiator -> target), qualified by cmdval / cmdack
  typedef struct packed {
    logic [AW-1:0]  address;
    logic [3:0]     be;
    bvci_cmd_e      cmd;
    logic [DW-1:0]  wdata;
    logic [8:0]     plen;
    logic           eop;
  } bvci_req_t;

  // BVCI response cell (target -> initiator), qualified by rspval / rspack
  typedef struct packed {
    logic [DW-1:0]  rdata;
    logic           reop;
    logic           rerror;
  } bvci_rsp_t;

  // PVCI request (initiator -> target), qualified by val / ack
  typedef struct packed {
    logic [AW-1:0]  address;
    logic [3:0]     be;
    logic           rd;
    logic [DW-1:0]  wdata;
    logic           eop;
  } pvci_req_t;

  // PVCI response, valid together with ack
  typedef struct packed {
    logic [DW-1:0]  rdata;
    logic           rerror;
  } pvci_rsp_t;

endpackage
