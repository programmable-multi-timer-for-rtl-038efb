// tb_display: loads random words and addresses and checks the six digits:
// four data digits then the address as two decimal digits; for address 05
// the live time of day instead, following every change of the clock input.
module tb_display;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [3:0] addr = 0;
  logic [15:0] data = 0;
  tod_t tod = '0;
  bcd_t digits [6];
  logic [23:0] exp_d;
  logic [15:0] loaded;
  int checks = 0, failures = 0, n_tod = 0;

  display dut (.clk, .rst_n, .ld, .addr, .data, .tod, .digits);

  always #50 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(15);
      addr = 4'(a);
      data = 16'($urandom);
      ld = 1;
      loaded = data;
      @(negedge clk);
      ld = 0;
      addr = 4'($urandom);     // must not matter after the load
      data = 16'($urandom);
      for (int k = 0; k < 3; k++) begin
        tod = tod_t'($urandom);
        #1;
        if (a == 5) begin
          exp_d = tod;
          n_tod++;
        end else begin
          exp_d = {loaded, 4'(a / 10), 4'(a % 10)};
        end
        checks++;
        if ({digits[5], digits[4], digits[3], digits[2], digits[1], digits[0]} !== exp_d) begin
          failures++;
          if (failures < 10) $display("addr %0d: digits wrong", a);
        end
        @(negedge clk);
      end
    end
    // the stored word itself (not only the register) must reach the display
    addr = 4'd12; data = 16'h9876; ld = 1; @(negedge clk); ld = 0; #1;
    checks++;
    if ({digits[5], digits[4], digits[3], digits[2], digits[1], digits[0]} !== 24'h987612) begin
      failures++; $display("fixed word wrong");
    end
    checks++;
    if (n_tod == 0) failures++;
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
