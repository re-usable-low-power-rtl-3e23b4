// tb_pmu: the power management unit against a small reference model of
// its two states, under random sleepmode, entersleepmode requests, core
// activity and wakeup. Checks sleep and clk_en every cycle, and that each
// situation (sleep now, sleep deferred while active, request dropped,
// wakeup) occurs.
module tb_pmu;
  logic clk = 0, rst_n = 0, sleepmode = 0, esm_tgl = 0, active = 0, wakeup = 0;
  logic clk_en, sleep;
  int unsigned checks = 0, failures = 0;
  int unsigned n_sleep = 0, n_wake = 0, n_defer = 0, n_drop = 0;
  pmu dut (.*);
  always #5 clk = ~clk;

  bit m_sleep = 0, m_pend = 0, m_seen = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      bit req;
      @(negedge clk);
      if ($urandom_range(0, 49) == 0) sleepmode = !sleepmode;
      if ($urandom_range(0, 19) == 0) esm_tgl = !esm_tgl;
      if ($urandom_range(0, 29) == 0) active = !active;
      wakeup = ($urandom_range(0, 39) == 0);
      #1;
      checks++;
      if (sleep != m_sleep || clk_en != !m_sleep) failures++;
      // reference model, next state
      req = m_pend || (esm_tgl != m_seen);
      m_seen = esm_tgl;
      if (!m_sleep) begin
        if (!sleepmode) begin
          if (req) n_drop++;
          m_pend = 0;
        end else if (req && !active) begin
          m_pend = 0; m_sleep = 1; n_sleep++;
        end else begin
          if (req && active && !m_pend) n_defer++;
          m_pend = req;
        end
      end else if (wakeup) begin
        m_sleep = 0; n_wake++;
      end
      @(posedge clk);
    end
    checks++; if (n_sleep == 0 || n_wake == 0 || n_defer == 0 || n_drop == 0) failures++;
    $display("sleep=%0d wake=%0d deferred=%0d dropped=%0d", n_sleep, n_wake, n_defer, n_drop);
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
