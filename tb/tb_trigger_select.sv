// tb_trigger_select: checks source selection, internal rate, inhibit and the
// external-trigger latency. The RTC ticks are driven by the testbench as a
// random pattern. Internal mode: trigger must equal tick[D] delayed by one
// clock. External mode: a rising EXT TRIG edge must give exactly one trigger
// pulse, three clocks after the edge. Inhibit must suppress both.
module tb_trigger_select;
  logic clk = 0, rst_n = 0;
  logic ext_trig = 0, inhibit = 0;
  logic [3:0] trig_sel = 0, rate_d = 0;
  logic [7:0] rtc_tick = 0;
  logic trigger, trig_enable, int_trig_out;
  int checks = 0, failures = 0;
  int n_int = 0, n_ext = 0, n_inh_blocked = 0;

  trigger_select dut (.clk, .rst_n, .ext_trig, .trig_sel, .rate_d, .rtc_tick,
                      .inhibit, .trigger, .trig_enable, .int_trig_out);

  always #50 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic prev_sel;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // internal trigger at several rates
    for (int d = 0; d <= 9; d++) begin
      rate_d = 4'(d);
      trig_sel = 0;
      prev_sel = 0;
      for (int i = 0; i < 200; i++) begin
        rtc_tick = 8'($urandom);
        prev_sel = (d <= 7) ? rtc_tick[d[2:0]] : 1'b0;
        @(negedge clk);
        check("internal trigger", trigger, prev_sel);
        check("int_trig_out", int_trig_out, prev_sel);
        if (trigger) n_int++;
      end
    end
    // external trigger: latency 3 clocks from the edge, one pulse only
    trig_sel = 1;
    rate_d = 0;
    for (int t = 0; t < 10; t++) begin
      rtc_tick = 8'hff;  // internal source active but must be ignored
      ext_trig = 1;
      for (int c = 1; c <= 12; c++) begin
        @(negedge clk);
        check("external trigger", trigger, c == 3);
        if (trigger) n_ext++;
      end
      ext_trig = 0;
      repeat (5) begin
        @(negedge clk);
        check("no trigger on falling edge", trigger, 1'b0);
      end
    end
    // inhibit blocks both sources
    inhibit = 1;
    repeat (3) @(negedge clk);
    check("trig_enable low", trig_enable, 1'b0);
    for (int t = 0; t < 4; t++) begin
      trig_sel = 4'(t % 2);
      ext_trig = 1;
      repeat (6) begin
        @(negedge clk);
        check("inhibited", trigger, 1'b0);
      end
      ext_trig = 0;
      n_inh_blocked++;
      repeat (3) @(negedge clk);
    end
    inhibit = 0;
    repeat (3) @(negedge clk);
    check("trig_enable high", trig_enable, 1'b1);
    checks++;
    if (n_int == 0 || n_ext != 10 || n_inh_blocked == 0) begin
      failures++;
      $display("coverage: int=%0d ext=%0d inh=%0d", n_int, n_ext, n_inh_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
