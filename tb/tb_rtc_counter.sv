// tb_rtc_counter: checks the free-running RTC counter with three decades.
// A cycle counter in the testbench predicts every tick: tick[N] must be high
// exactly at the clock edges that are multiples of 10^(N+1) clocks after
// reset (10^N us at 10 MHz), and nowhere else.
module tb_rtc_counter;
  localparam int unsigned DEC = 3;
  logic clk = 0, rst_n = 0;
  logic [DEC:0] tick;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_ticks [DEC+1];

  rtc_counter #(.DECADES(DEC)) dut (.clk, .rst_n, .tick);

  always #50 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    longint p;
    cyc <= cyc + 1;
    p = 10;
    for (int n = 0; n <= DEC; n++) begin
      logic exp_t;
      exp_t = ((cyc + 1) % p) == 0;
      checks++;
      if (tick[n] !== exp_t) begin
        failures++;
        if (failures < 10) $display("tick[%0d] at cycle %0d: got %b expected %b", n, cyc, tick[n], exp_t);
      end
      if (tick[n]) n_ticks[n]++;
      p = p * 10;
    end
  end

  initial begin
    for (int n = 0; n <= DEC; n++) n_ticks[n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (25000) @(negedge clk);
    for (int n = 0; n <= DEC; n++) begin
      checks++;
      if (n_ticks[n] == 0) begin failures++; $display("tick[%0d] never fired", n); end
    end
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
