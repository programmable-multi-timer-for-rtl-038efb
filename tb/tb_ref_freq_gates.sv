// tb_ref_freq_gates: drives the gates from a real RTC counter (three
// decades) and checks that each output repeats with the programmed period
// of 10^N us = 10^(N+1) clocks, and is silent for N = 8 and 9.
module tb_ref_freq_gates;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] rtc_tick;
  logic [7:0] tick8;
  bcd_t n1 = 0, n2 = 0;
  logic [1:0] ref_freq;
  int checks = 0, failures = 0;

  rtc_counter #(.DECADES(3)) u_rtc (.clk, .rst_n, .tick(rtc_tick));
  assign tick8 = {4'b0, rtc_tick};
  ref_freq_gates dut (.clk, .rst_n, .rtc_tick(tick8), .n1, .n2, .ref_freq);

  always #50 clk = ~clk;

  task automatic measure(int ch, int n);
    longint last, cnt, c, period, pulses;
    last = -1; pulses = 0; period = -1;
    for (c = 0; c < 25000; c++) begin
      @(negedge clk);
      if (ref_freq[ch]) begin
        if (last >= 0) begin
          checks++;
          if (c - last != 10 ** (n + 1)) begin
            failures++;
            if (failures < 10) $display("ch %0d N=%0d period %0d", ch, n, c - last);
          end
        end
        last = c;
        pulses++;
      end
    end
    checks++;
    if (n <= 3 && pulses < 2) begin failures++; $display("ch %0d N=%0d too few pulses", ch, n); end
    if (n >= 8 && pulses != 0) begin failures++; $display("ch %0d N=%0d not silent", ch, n); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= 3; n++) begin
      n1 = bcd_t'(n); n2 = bcd_t'(3 - n);
      repeat (5) @(negedge clk);
      measure(0, n);
      measure(1, 3 - n);
    end
    n2 = 4'd1; n1 = 4'd9;
    repeat (5) @(negedge clk);
    measure(1, 1);
    measure(0, 9);
    n1 = 4'd8;
    repeat (5) @(negedge clk);
    measure(0, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
