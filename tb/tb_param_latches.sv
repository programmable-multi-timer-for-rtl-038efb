// tb_param_latches: random loads of the parameter latches compared with a
// testbench copy of each latch.
module tb_param_latches;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] data = 0;
  logic ld_ref = 0, ld_ctrl = 0;
  logic [3:0] ld_time = 0;
  bcd_t ref_n1, ref_n2, trig_sel, rate_d;
  ptime_t t_time [4];
  logic [15:0] m_ref = 0, m_ctrl = 0;
  logic [15:0] m_t [4];
  int checks = 0, failures = 0;

  param_latches dut (.clk, .rst_n, .data, .ld_ref, .ld_ctrl, .ld_time,
                     .ref_n1, .ref_n2, .trig_sel, .rate_d, .t_time);

  always #50 clk = ~clk;

  initial begin
    for (int i = 0; i < 4; i++) m_t[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      data = 16'($urandom);
      ld_ref = ($urandom_range(3) == 0);
      ld_ctrl = ($urandom_range(3) == 0);
      ld_time = 4'($urandom) & 4'($urandom);
      if (ld_ref) m_ref = data;
      if (ld_ctrl) m_ctrl = data;
      for (int i = 0; i < 4; i++) if (ld_time[i]) m_t[i] = data;
      @(negedge clk);
      checks++;
      if (ref_n1 !== m_ref[3:0] || ref_n2 !== m_ref[7:4]) begin failures++; $display("ref wrong"); end
      checks++;
      if (trig_sel !== m_ctrl[15:12] || rate_d !== m_ctrl[3:0]) begin failures++; $display("ctrl wrong"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (16'(t_time[i]) !== m_t[i]) begin failures++; $display("time %0d wrong", i); end
      end
    end
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
