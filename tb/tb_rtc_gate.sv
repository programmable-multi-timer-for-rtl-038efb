// tb_rtc_gate: drives daily start/stop match pulses and checks the gate,
// start and stop pulses for day delays of 0..3 days (codes 1, 2, 4, 8).
// The expected day on which each edge first acts is worked out from the
// delay in the testbench: with start delay Ds and stop delay Dt the gate
// must open on day Ds and close on day Dt (stop before start within a day).
module tb_rtc_gate;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start_match = 0, stop_match = 0, ld_delay = 0;
  bcd_t start_code = 0, stop_code = 0;
  logic gate, start_p, stop_p;
  int checks = 0, failures = 0, n_delayed = 0;

  rtc_gate dut (.clk, .rst_n, .start_match, .stop_match, .ld_delay,
                .start_code, .stop_code, .gate, .start_p, .stop_p);

  always #50 clk = ~clk;

  task automatic check(string what, logic got, logic exp, int day);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s day %0d: got %b expected %b", what, day, got, exp);
    end
  endtask

  initial begin
    int codes [4] = '{1, 2, 4, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int ds = 0; ds < 4; ds++) begin
      for (int dt = ds; dt < 4; dt++) begin
        logic open;
        open = 0;
        start_code = bcd_t'(codes[ds]);
        stop_code = bcd_t'(codes[dt]);
        ld_delay = 1;
        @(negedge clk);
        ld_delay = 0;
        if (ds > 0) n_delayed++;
        // five days: each has a start at "08:00" then a stop at "17:00"
        for (int day = 0; day < 5; day++) begin
          start_match = 1;
          @(negedge clk);
          start_match = 0;
          check("start_p", start_p, day >= ds, day);
          if (day >= ds) open = 1;
          repeat (3) @(negedge clk);
          check("gate after start", gate, open, day);
          stop_match = 1;
          @(negedge clk);
          stop_match = 0;
          check("stop_p", stop_p, day >= dt, day);
          if (day >= dt) open = 0;
          repeat (3) @(negedge clk);
          check("gate after stop", gate, open, day);
        end
        // leave the gate closed for the next case
        stop_match = 1; @(negedge clk); stop_match = 0; @(negedge clk);
      end
    end
    // invalid code 0 means no delay
    start_code = 0; stop_code = 0; ld_delay = 1; @(negedge clk); ld_delay = 0;
    start_match = 1; @(negedge clk); start_match = 0;
    check("code 0 start", start_p, 1'b1, 0);
    checks++;
    if (n_delayed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
