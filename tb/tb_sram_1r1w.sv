// tb_sram_1r1w: random writes and reads against a shadow array, at the XRAM
// size (128 x 16); also checks that a write shows on the read port after
// the clock edge and that a simultaneous read of another word is unaffected.
module tb_sram_1r1w;
  localparam int W = 16, D = 128;
  logic clk = 0, we = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [D];
  logic         known [D];
  int unsigned checks = 0, failures = 0;
  sram_1r1w #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = 16'($urandom); shadow[i] = wdata; known[i] = 1;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 7'($urandom); wdata = 16'($urandom);
      raddr = 7'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) failures++;   // old contents before the edge
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== shadow[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
