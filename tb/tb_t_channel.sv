// tb_t_channel: checks the four outputs of one T channel, cycle by cycle,
// against times worked out in the testbench. With S and E the start and
// stop times in clocks (M x 10^(N+1)) and d the clock edges since the
// trigger edge, the registered outputs must be: dly for 1 <= d <= S,
// start_p at d = S+1, gate for S+1 <= d <= E, stop_p at d = E+1.
module tb_t_channel;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [7:0] tick;
  logic [31:0] elapsed;
  ptime_t start_time, stop_time;
  logic gate, dly, start_p, stop_p;
  int checks = 0, failures = 0;
  longint cyc = 0, t0 = -1000000;
  longint S = 0, E = 0;
  int n_gate = 0, n_dly = 0;

  trig_counter #(.DECADES(8)) u_cnt (.clk, .rst_n, .trigger, .tick, .elapsed);
  t_channel dut (.clk, .rst_n, .trigger, .tick, .start_time, .stop_time,
                 .gate, .dly, .start_p, .stop_p);

  always #50 clk = ~clk;

  function automatic ptime_t mk(int m, int n);
    ptime_t p;
    p.m2 = 4'(m / 100);
    p.m1 = 4'((m / 10) % 10);
    p.m0 = 4'(m % 10);
    p.n  = 4'(n);
    return p;
  endfunction

  task automatic cmp(string what, logic got, logic exp, longint d);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s at d=%0d (S=%0d E=%0d): got %b exp %b trig=%b cyc=%0d t0=%0d", what, d, S, E, got, exp, trigger, cyc, t0);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    longint d;
    d = cyc - t0;
    cyc <= cyc + 1;
    if (trigger) t0 <= cyc;
    if (d < 1000000 && !trigger) begin
      cmp("dly",     dly,     (d >= 1) && (d <= S), d);
      cmp("start_p", start_p, d == S + 1, d);
      cmp("gate",    gate,    (d >= S + 1) && (d <= E), d);
      cmp("stop_p",  stop_p,  d == E + 1, d);
      if (gate) n_gate++;
      if (dly) n_dly++;
    end
  end

  task automatic run_one(int sm, int sn, int em, int en);
    start_time = mk(sm, sn);
    stop_time  = mk(em, en);
    @(negedge clk);
    S = longint'(sm) * (10 ** (sn + 1));
    E = longint'(em) * (10 ** (en + 1));
    trigger = 1;
    @(negedge clk);
    trigger = 0;
    repeat (int'(E) + 30) @(negedge clk);
  endtask

  initial begin
    start_time = '0;
    stop_time = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(5, 0, 15, 0);       // 5 us .. 15 us
    run_one(2, 1, 3, 1);        // 20 us .. 30 us
    run_one(0, 0, 4, 0);        // no delay
    run_one(1, 2, 120, 0);      // 100 us .. 120 us
    for (int i = 0; i < 8; i++) begin
      int a, b;
      a = 1 + $urandom_range(60);
      b = a + 1 + $urandom_range(60);
      run_one(a, 0, b, 0);
    end
    checks++;
    if (n_gate == 0 || n_dly == 0) begin failures++; $display("gate or delay never seen"); end
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
