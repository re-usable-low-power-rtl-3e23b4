// tb_sync_fifo: random push/pop traffic against a queue model; checks
// order, data, count, full/empty flags and the synchronous clear.
module tb_sync_fifo;
  localparam int W = 32, D = 4;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [2:0] count;
  logic [W-1:0] q [$];
  int unsigned checks = 0, failures = 0, n_full = 0;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0); in_data = $urandom;
      out_ready = ($urandom_range(0, 2) == 0) || (n > 2500 && n < 2600);
      clear = (n % 997 == 996);
      #1;
      checks++;
      if (in_ready != (q.size() < D) || out_valid != (q.size() > 0) || count != 3'(q.size())) failures++;
      if (q.size() == D) n_full++;
      if (out_valid) begin
        checks++;
        if (out_data !== q[0]) failures++;
      end
      @(posedge clk);
      if (clear) q.delete();
      else begin
        if (out_valid && out_ready) void'(q.pop_front());
        if (in_valid && in_ready) q.push_back(in_data);
      end
    end
    checks++; if (n_full == 0) failures++;
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
