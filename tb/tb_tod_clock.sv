// tb_tod_clock: checks the time-of-day clock against a seconds-of-day
// counter kept in the testbench. Presets at random times and at 23:58 (to
// cross midnight) are followed by random numbers of second ticks; after
// every clock the BCD time and the minute pulse are compared.
module tb_tod_clock;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sec_tick = 0, preset = 0;
  logic [15:0] preset_hhmm = 0;
  tod_t tod;
  logic minute_pulse;
  int checks = 0, failures = 0;
  int sod = 0;          // model: seconds of day
  logic exp_min = 0;
  int n_min = 0, n_midnight = 0;

  tod_clock dut (.clk, .rst_n, .sec_tick, .preset, .preset_hhmm, .tod, .minute_pulse);

  always #50 clk = ~clk;

  function automatic tod_t to_tod(int s);
    tod_t t;
    int h, m, x;
    h = s / 3600; m = (s / 60) % 60; x = s % 60;
    t.h1 = 4'(h / 10); t.h0 = 4'(h % 10);
    t.m1 = 4'(m / 10); t.m0 = 4'(m % 10);
    t.s1 = 4'(x / 10); t.s0 = 4'(x % 10);
    return t;
  endfunction

  task automatic step(logic tick);
    sec_tick = tick;
    exp_min = 0;
    if (tick) begin
      sod = (sod + 1) % 86400;
      exp_min = (sod % 60) == 0;
      if (exp_min) n_min++;
      if (sod == 0) n_midnight++;
    end
    @(negedge clk);
    sec_tick = 0;
    checks++;
    if (tod !== to_tod(sod) || minute_pulse !== exp_min) begin
      failures++;
      if (failures < 10) $display("tod %h min %b expected %h %b", tod, minute_pulse, to_tod(sod), exp_min);
    end
  endtask

  task automatic do_preset(int h, int m);
    preset_hhmm = {4'(h / 10), 4'(h % 10), 4'(m / 10), 4'(m % 10)};
    preset = 1;
    sod = h * 3600 + m * 60;
    @(negedge clk);
    preset = 0;
    checks++;
    if (tod !== to_tod(sod)) begin failures++; $display("preset failed"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) step(1);
    do_preset(23, 58);
    for (int i = 0; i < 300; i++) step($urandom_range(1));
    for (int k = 0; k < 5; k++) begin
      do_preset($urandom_range(23), $urandom_range(59));
      for (int i = 0; i < 4000; i++) step(1);
    end
    do_preset(9, 59);
    for (int i = 0; i < 3700; i++) step(1);
    checks++;
    if (n_min == 0 || n_midnight == 0) begin failures++; $display("no minute or midnight"); end
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
