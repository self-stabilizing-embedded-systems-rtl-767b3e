// tb_clock_watchdog: with a 5-cycle tick and a 3-tick timeout, checks the
// tick rate, that regular kicks keep the watchdog quiet, that a missing kick
// gives exactly one expiry pulse 15 cycles after the last kick, and that a
// system reset restarts the watchdog but leaves the time running.
module tb_clock_watchdog;
  logic clk = 0, por, rst, kick, wdt_expired;
  logic [31:0] time_now;
  int checks = 0, failures = 0;

  clock_watchdog #(.TICK_DIV(5), .WDT_TICKS(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0d)", what, time_now); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last, n, exp_cnt;
    por = 1; rst = 0; kick = 0;
    @(posedge clk); #1 por = 0;
    check(time_now == 0, "time cleared at power-on");
    // rate: 50 cycles = 10 ticks; kick every 10 cycles (2 ticks) -> no expiry
    n = 0;
    for (int c = 0; c < 50; c++) begin
      @(negedge clk); kick = (c % 10 == 0);
      if (wdt_expired) n++;
    end
    kick = 0;
    @(posedge clk); #1;
    check(time_now == 10, "ten ticks in 50 cycles");
    check(n == 0, "no expiry while kicked");
    // stop kicking: expiry within 3 ticks after the last kick
    @(negedge clk) kick = 1; @(negedge clk) kick = 0;
    last = 0; n = 0;
    for (int c = 1; c <= 40; c++) begin
      @(negedge clk);
      if (wdt_expired) begin n++; if (last == 0) last = c; end
    end
    check(n >= 2 && last >= 12 && last <= 16, "expiry after about three ticks");
    // system reset restarts watchdog but not the time
    exp_cnt = time_now;
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    check(time_now >= exp_cnt, "time survives system reset");
    n = 0;
    for (int c = 0; c < 9; c++) begin @(negedge clk); if (wdt_expired) n++; end
    check(n == 0, "no expiry just after system reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
