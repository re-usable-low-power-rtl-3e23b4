// sram_1r1w: static RAM with one write port and one read port.
//
// Used for HRAM (segmented coefficients) and XRAM (input samples, twice
// the depth of HRAM) of the FIR core. Writes are synchronous; the read
// port is combinational from the address, and the FIR core registers the
// read data in HREG / XREG, which together behave as a synchronous-read
// RAM macro. The document asks for a technology RAM macro once a block
// exceeds 256 bits; this generic array stands in for it and maps onto a
// memory cell in synthesis. The contents are not reset.
module sram_1r1w #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AWID = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AWID-1:0]  waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AWID-1:0]  raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
