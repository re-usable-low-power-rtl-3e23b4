// ahb_mem_model: behavioural AHB (AMBA 2.0) slave memory plus a one-master
// arbiter, for testbenches only.
//
// Grants the bus some random cycles after HBUSREQ and keeps the grant while
// the request stays up. Each NONSEQ transfer gets 0..WAIT_MAX random wait
// states. Addresses at or above ERR_BASE get the two-cycle ERROR response.
// Memory words are addressed by haddr[2 +: AWORD]; the array is public so
// that the testbench can load and inspect it. Counts wait states, grant
// delays and error responses.
module ahb_mem_model #(
  parameter int unsigned WORDS    = 2048,
  parameter int unsigned WAIT_MAX = 2,
  parameter logic [31:0] ERR_BASE = 32'h0001_0000
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hbusreq,
  output logic        hgrant,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic [1:0]  hresp
);
  localparam int unsigned AWORD = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic        dp_valid, dp_write, dp_err, err2;
  logic [31:0] dp_addr;
  int unsigned wait_cnt;
  int unsigned n_waits, n_grant_delays, n_errors, n_transfers;

  assign hrdata = (dp_valid && !dp_write) ? mem[dp_addr[2 +: AWORD]] : 32'hDEAD_BEEF;

  always_ff @(posedge hclk or negedge hresetn) begin
    int unsigned w;
    if (!hresetn) begin
      hgrant <= 1'b0; hready <= 1'b1; hresp <= 2'b00;
      dp_valid <= 1'b0; dp_write <= 1'b0; dp_err <= 1'b0; err2 <= 1'b0;
      dp_addr <= '0; wait_cnt <= 0;
      n_waits <= 0; n_grant_delays <= 0; n_errors <= 0; n_transfers <= 0;
    end else begin
      // arbiter
      if (!hbusreq) hgrant <= 1'b0;
      else if (!hgrant) begin
        if ($urandom_range(0, 2) == 0) hgrant <= 1'b1;
        else n_grant_delays <= n_grant_delays + 1;
      end
      // slave
      if (!hready) begin
        if (err2) begin
          hready <= 1'b1;            // second ERROR cycle
          err2   <= 1'b0;
        end else if (dp_err) begin
          err2   <= 1'b1;
        end else if (wait_cnt <= 1) begin
          hready <= 1'b1;
        end else wait_cnt <= wait_cnt - 1;
        if (!dp_err) n_waits <= n_waits + 1;
      end else begin
        // data phase ends
        if (dp_valid) begin
          if (dp_write && !dp_err) mem[dp_addr[2 +: AWORD]] <= hwdata;
          n_transfers <= n_transfers + 1;
          hresp <= 2'b00;
        end
        dp_valid <= 1'b0;
        dp_err   <= 1'b0;
        // address phase
        if (htrans == 2'b10 || htrans == 2'b11) begin
          dp_valid <= 1'b1;
          dp_write <= hwrite;
          dp_addr  <= haddr;
          if (haddr >= ERR_BASE) begin
            dp_err   <= 1'b1;
            hready   <= 1'b0;
            hresp    <= 2'b01;
            n_errors <= n_errors + 1;
          end else begin
            w = $urandom_range(0, WAIT_MAX);
            wait_cnt <= w;
            if (w > 0) hready <= 1'b0;
          end
        end
      end
    end
  end
endmodule
