// tb_time_range: the full range of a programmed time, 999 x 10^7 us
// (about 2.8 hours), cannot be simulated at 10 MHz. Here the decade ticks of
// the triggered counter are driven directly: random pulses on every
// decade, of which only decade N may count. For the extreme settings
// 999 x 10^7, 999 x 10^0 and 500 x 10^4 the match must come on exactly the
// M-th pulse of decade N after the trigger, and never otherwise.
module tb_time_range;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [7:0] tick = 0;
  ptime_t ptime;
  logic match;
  int checks = 0, failures = 0;

  time_match dut (.clk, .rst_n, .trigger, .tick, .ptime, .match);

  always #50 clk = ~clk;

  task automatic run(int m, int n);
    int seen_n, n_match, match_at;
    ptime.m2 = 4'(m / 100);
    ptime.m1 = 4'((m / 10) % 10);
    ptime.m0 = 4'(m % 10);
    ptime.n  = 4'(n);
    @(negedge clk);
    trigger = 1;
    @(negedge clk);
    trigger = 0;
    seen_n = 0; n_match = 0; match_at = -1;
    while (seen_n < m + 20) begin
      tick = 8'($urandom);
      #1;
      if (tick[n]) seen_n++;
      if (match) begin
        n_match++;
        match_at = seen_n;
      end
      @(negedge clk);
    end
    tick = 0;
    checks++;
    if (n_match != 1 || match_at != m) begin
      failures++;
      $display("M=%0d N=%0d: %0d n_match, at pulse %0d", m, n, n_match, match_at);
    end
  endtask

  initial begin
    ptime = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(999, 7);
    run(999, 0);
    run(500, 4);
    run(1, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
