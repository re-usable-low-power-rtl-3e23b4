// register_block: configuration and status registers of the DSP IP.
//
// Lives in the peripheral bus clock domain and is reached through the VC
// target interface (word registers, byte offsets in dsp_pkg). It holds
// the block configuration for the DMU and FIR core (source, destination,
// sample count, tap count, output shift), the sleepmode bit, and the
// HRAM write port (COEFADDR, COEFDATA; COEFADDR counts up after each
// COEFDATA write). STATUS reads active, done, error and sleep from the
// core.
//
// Commands to the system bus clock domain (start, entersleepmode, a
// coefficient write) are carried as toggles: each command flips one bit,
// and the receiver acts on a change. Because the two clocks are
// synchronous with rising edges aligned (the document requires the system
// bus frequency to be a multiple of the peripheral one), a toggle and the
// data it announces can be sampled directly without synchronisers.
// sleepmode and entersleepmode going to the PMU are the document's; the
// register map and the toggle scheme are this design's choices.
// Reads are combinational; writes take effect at the clock edge.
module register_block
  import dsp_pkg::*;
(
  input  logic            clk,          // peripheral bus clock (gated)
  input  logic            rst_n,
  input  logic            sel,
  input  logic            we,
  input  logic [7:0]      addr,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  output logic            err,          // unknown offset
  // to the DSP core
  output dsp_cfg_t        cfg,
  output logic            sleepmode,
  output logic            start_tgl,
  output logic            esm_tgl,
  output logic            coef_tgl,
  output logic [$clog2(HMAX)-1:0] coef_waddr,
  output logic signed [CW-1:0]    coef_wdata,
  // from the DSP core
  input  logic            active,
  input  logic            done,
  input  logic            error,
  input  logic            sleep
);

  localparam int unsigned HAW = $clog2(HMAX);

  logic [HAW-1:0] coef_addr;
  logic           known;

  always_comb begin
    known = 1'b1;
    rdata = '0;
    unique case (addr)
      REG_CTRL:     rdata = {29'd0, 1'b0, sleepmode, 1'b0};
      REG_STATUS:   rdata = {28'd0, sleep, error, done, active};
      REG_SRC:      rdata = cfg.src;
      REG_DST:      rdata = cfg.dst;
      REG_NSAMP:    rdata = cfg.nsamp;
      REG_NTAPS:    rdata = DW'(cfg.ntaps);
      REG_OSHIFT:   rdata = DW'(cfg.oshift);
      REG_COEFADDR: rdata = DW'(coef_addr);
      REG_COEFDATA: rdata = DW'(coef_wdata);
      default:      known = 1'b0;
    endcase
  end
  assign err = sel && !known;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= '0;
      sleepmode  <= 1'b0;
      start_tgl  <= 1'b0;
      esm_tgl    <= 1'b0;
      coef_tgl   <= 1'b0;
      coef_addr  <= '0;
      coef_waddr <= '0;
      coef_wdata <= '0;
    end else if (sel && we) begin
      unique case (addr)
        REG_CTRL: begin
          if (wdata[0]) start_tgl <= !start_tgl;
          sleepmode <= wdata[1];
          if (wdata[2]) esm_tgl <= !esm_tgl;
        end
        REG_SRC:      cfg.src    <= wdata;
        REG_DST:      cfg.dst    <= wdata;
        REG_NSAMP:    cfg.nsamp  <= wdata;
        REG_NTAPS:    cfg.ntaps  <= wdata[HAW:0];
        REG_OSHIFT:   cfg.oshift <= wdata[5:0];
        REG_COEFADDR: coef_addr  <= wdata[HAW-1:0];
        REG_COEFDATA: begin
          coef_waddr <= coef_addr;
          coef_wdata <= wdata[CW-1:0];
          coef_tgl   <= !coef_tgl;
          coef_addr  <= coef_addr + 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
