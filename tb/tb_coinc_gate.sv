// tb_coinc_gate: checks the coincidence gate in both polarities. With no
// data pulse the gate must open one clock after T1 rises; with a data pulse
// present at the T1 edge it must stay closed while the pulse lasts and open
// three clocks (synchronizer plus register) after the pulse ends; data
// pulses inside an open gate must not close it; it closes one clock after T1.
module tb_coinc_gate;
  logic clk = 0, rst_n = 0;
  logic t1_gate = 0, lld = 0, neg = 0;
  logic coinc;
  int checks = 0, failures = 0;
  int n_holdoff = 0, n_open = 0;

  coinc_gate dut (.clk, .rst_n, .t1_gate, .lld, .neg, .coinc);

  always #50 clk = ~clk;

  task automatic expect_for(int cycles, logic val, string what);
    repeat (cycles) begin
      @(negedge clk);
      checks++;
      if (coinc !== val) begin
        failures++;
        if (failures < 20) $display("%s: coinc=%b expected %b at %0t", what, coinc, val, $time);
      end
    end
  endtask

  task automatic data(logic active);
    lld = active ^ neg;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      neg = 1'(p);
      data(0);
      repeat (4) @(negedge clk);
      // clean start
      t1_gate = 1;
      @(negedge clk);
      checks++;
      if (coinc !== 1'b1) begin failures++; $display("gate did not open"); end
      else n_open++;
      expect_for(10, 1'b1, "open gate");
      data(1);                         // pulse inside the gate
      expect_for(8, 1'b1, "pulse inside gate");
      data(0);
      expect_for(4, 1'b1, "after pulse");
      t1_gate = 0;
      expect_for(5, 1'b0, "after T1");
      // data pulse already present at the T1 edge
      data(1);
      repeat (4) @(negedge clk);
      t1_gate = 1;
      expect_for(15, 1'b0, "held off");
      data(0);
      expect_for(2, 1'b0, "still held");
      @(negedge clk);
      checks++;
      if (coinc !== 1'b1) begin failures++; $display("gate did not open after hold-off"); end
      else n_holdoff++;
      expect_for(5, 1'b1, "open after hold-off");
      t1_gate = 0;
      expect_for(3, 1'b0, "closed");
    end
    checks++;
    if (n_holdoff != 2 || n_open != 2) begin failures++; $display("coverage missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
