// tb_time_match: checks one programmed-time comparator driven by a real
// triggered counter. For random times M x 10^N us (N = 0..2, plus the
// zero and out-of-range cases) the match pulse must come exactly
// M x 10^(N+1) clocks after the trigger edge, once per trigger.
module tb_time_match;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [7:0] tick;
  logic [31:0] elapsed;
  ptime_t ptime;
  logic match;
  int checks = 0, failures = 0;
  longint cyc = 0, t0 = 0;
  int n_match = 0;

  trig_counter #(.DECADES(8)) u_cnt (.clk, .rst_n, .trigger, .tick, .elapsed);
  time_match dut (.clk, .rst_n, .trigger, .tick, .ptime, .match);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (trigger) t0 <= cyc;
    if (match) begin
      n_match++;
    end
  end

  function automatic ptime_t mk(int m, int n);
    ptime_t p;
    p.m2 = 4'(m / 100);
    p.m1 = 4'((m / 10) % 10);
    p.m0 = 4'(m % 10);
    p.n  = 4'(n);
    return p;
  endfunction

  task automatic run_one(int m, int n);
    longint expect_at, seen_at;
    int seen;
    longint span;
    ptime = mk(m, n);
    @(negedge clk);
    trigger = 1;
    @(posedge clk);
    expect_at = cyc + longint'(m) * (10 ** (n + 1));
    seen = 0;
    seen_at = -1;
    span = (n <= 7 ? longint'(m) * (10 ** (n + 1)) : 3000) + 40;
    @(negedge clk);
    trigger = 0;
    // the trigger-cycle match (m == 0) was sampled at that posedge
    if (m == 0) begin
      seen = n_match > 0 ? 1 : 0;
    end
    n_match = 0;
    for (longint c = 0; c < span; c++) begin
      @(posedge clk);
      if (match) begin
        seen++;
        seen_at = cyc;
      end
    end
    checks++;
    if (n > 7) begin
      if (seen != 0) begin failures++; $display("N=%0d matched", n); end
    end else if (m == 0) begin
      if (seen_at != -1) begin failures++; $display("M=0 matched late"); end
    end else if (seen != 1 || seen_at != expect_at) begin
      failures++;
      $display("M=%0d N=%0d: %0d matches, at %0d expected %0d", m, n, seen, seen_at, expect_at);
    end
  endtask

  initial begin
    ptime = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(1, 0);
    run_one(5, 0);
    run_one(13, 1);
    run_one(2, 2);
    run_one(999, 0);
    run_one(0, 3);
    run_one(3, 8);
    for (int i = 0; i < 10; i++) run_one(1 + $urandom_range(120), $urandom_range(1));
    // retrigger before the match restarts the count
    ptime = mk(20, 0);
    @(negedge clk); trigger = 1; @(negedge clk); trigger = 0;
    repeat (100) @(negedge clk);
    run_one(20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
