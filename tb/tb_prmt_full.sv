// tb_prmt_full: one complete operation of the timer at its real rates (no
// parameter overrides: 10 MHz clock, one-second time-of-day tick). Through
// the front panel it programs T1 = 5..15 us and T2 = 1..2 ms after an
// external trigger, fires one trigger and checks every edge of both gates
// to the clock; presets the time of day to 12:34 and checks the display
// after one real second; and prints the sixteen words of the RAM.
module tb_prmt_full;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ext_trig = 0, trig_inhibit = 0, trig_enable;
  logic [1:0] t_gate, t_dly, t_start, t_stop;
  logic int_trig_out;
  logic [31:0] elapsed_bcd;
  logic lld = 0, lld_neg = 0, coinc;
  logic rtc_delay_sel = 0;
  logic [7:0] func_addr_bcd = 0;
  logic [15:0] data_sw = 0;
  logic store_btn = 0, display_btn = 0;
  bcd_t disp_digits [6];
  logic [1:0] ref_freq, rtc_gate, rtc_start, rtc_stop;
  logic print_start = 0, prn_ack = 0, print_active, prn_strobe, print_done;
  logic [3:0] prn_addr;
  logic [15:0] prn_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  prmt_top dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  function automatic logic [23:0] disp();
    return {disp_digits[5], disp_digits[4], disp_digits[3], disp_digits[2], disp_digits[1], disp_digits[0]};
  endfunction

  task automatic store(int a, logic [15:0] d);
    func_addr_bcd = {4'(a / 10), 4'(a % 10)};
    data_sw = d;
    store_btn = 1;
    repeat (4) @(negedge clk);
    store_btn = 0;
    repeat (8) @(negedge clk);
  endtask

  longint first_start [2], first_stop [2];
  int n_gate [2], n_dly [2];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (t_gate[c]) n_gate[c]++;
      if (t_dly[c]) n_dly[c]++;
      if (t_start[c] && first_start[c] < 0) first_start[c] = cyc;
      if (t_stop[c] && first_stop[c] < 0) first_stop[c] = cyc;
    end
  end

  logic [15:0] printed [$];
  initial begin
    forever begin
      @(negedge clk);
      if (prn_strobe) begin
        printed.push_back(prn_data);
        repeat (3) @(negedge clk);
        prn_ack = 1;
        while (prn_strobe) @(negedge clk);
        repeat (2) @(negedge clk);
        prn_ack = 0;
      end
    end
  end

  initial begin
    longint c_ext;
    repeat (5) @(negedge clk);
    rst_n = 1;
    store(8,  16'h0050);   // T1 start   5 us
    store(9,  16'h0150);   // T1 stop   15 us
    store(10, 16'h0013);   // T2 start   1 ms
    store(11, 16'h0023);   // T2 stop    2 ms
    store(7,  16'h1000);   // external trigger
    // the internal 1 us trigger selected at reset stops here; let its last
    // cycle (T2 up to 2 ms) run out
    repeat (21000) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      first_start[c] = -1; first_stop[c] = -1; n_gate[c] = 0; n_dly[c] = 0;
    end
    @(posedge clk);
    c_ext = cyc;
    @(negedge clk);
    ext_trig = 1;
    repeat (3) @(negedge clk);
    ext_trig = 0;
    repeat (20100) @(negedge clk);
    check("T1 start", first_start[0] - c_ext, 4 + 50 + 1);
    check("T1 stop",  first_stop[0]  - c_ext, 4 + 150 + 1);
    check("T2 start", first_start[1] - c_ext, 4 + 10000 + 1);
    check("T2 stop",  first_stop[1]  - c_ext, 4 + 20000 + 1);
    check("T1 delay", n_dly[0], 50);
    check("T1 gate",  n_gate[0], 100);
    check("T2 delay", n_dly[1], 10000);
    check("T2 gate",  n_gate[1], 10000);

    store(5, 16'h1234);
    check("TOD preset", disp(), 24'h123400);
    repeat (10_000_100) @(negedge clk);
    check("TOD after one second", disp(), 24'h123401);

    print_start = 1;
    repeat (5) @(negedge clk);
    print_start = 0;
    while (print_active) @(negedge clk);
    check("words printed", printed.size(), 16);
    if (printed.size() == 16) begin
      check("word 5",  printed[5],  16'h1234);
      check("word 7",  printed[7],  16'h1000);
      check("word 8",  printed[8],  16'h0050);
      check("word 11", printed[11], 16'h0023);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (11_100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
