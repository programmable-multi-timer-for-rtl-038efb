// tb_rtc_compare: random compare strobes, addresses and data; an equal
// word on address 12..15 with the strobe high must give, one clock later,
// exactly the one start/stop pulse of the decoded RTC gate.
module tb_rtc_compare;
  logic clk = 0, rst_n = 0;
  logic cmp_strobe = 0;
  logic [3:0] cmp_addr = 0;
  logic [15:0] ram_data = 0, tod_hhmm = 0;
  logic [1:0] start_match, stop_match;
  logic [3:0] exp_v = 0;
  int checks = 0, failures = 0, n_hits = 0;

  rtc_compare dut (.clk, .rst_n, .cmp_strobe, .cmp_addr, .ram_data, .tod_hhmm,
                   .start_match, .stop_match);

  always #50 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      cmp_strobe = 1'($urandom);
      cmp_addr = 4'($urandom);
      tod_hhmm = 16'($urandom_range(3));
      ram_data = 16'($urandom_range(3));
      exp_v = '0;
      if (cmp_strobe && ram_data == tod_hhmm && cmp_addr >= 12)
        exp_v[cmp_addr - 12] = 1'b1;
      @(negedge clk);
      checks++;
      if ({stop_match[1], start_match[1], stop_match[0], start_match[0]} !== exp_v) begin
        failures++;
        if (failures < 10) $display("got %b%b expected %b", stop_match, start_match, exp_v);
      end
      if (exp_v != 0) n_hits++;
    end
    checks++;
    if (n_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
