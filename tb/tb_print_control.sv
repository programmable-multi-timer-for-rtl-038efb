// tb_print_control: a printer model acknowledges each strobe after a random
// delay, and the memory controller is made busy at random. The RAM is
// modelled as word(a) = a * 0x0111 + 0x1000. All sixteen words must arrive
// in address order with the right data, print_done must pulse once, and
// print_active must fall afterwards.
module tb_print_control;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic print_start = 0, prn_ack = 0, mem_busy = 0;
  logic [15:0] ram_data;
  logic print_active, prn_strobe, print_done;
  logic [3:0] print_addr;
  logic [15:0] prn_data;
  int checks = 0, failures = 0, got = 0, n_done = 0, n_busy = 0;

  print_control dut (.clk, .rst_n, .print_start, .prn_ack, .mem_busy, .ram_data,
                     .print_active, .print_addr, .prn_data, .prn_strobe, .print_done);

  always #50 clk = ~clk;

  // the RAM shows the print address only while the controller is idle
  assign ram_data = mem_busy ? 16'hdead : 16'h1000 + 16'(print_addr) * 16'h0111;

  always @(negedge clk) begin
    mem_busy <= ($urandom_range(3) == 0);
    if (mem_busy) n_busy++;
    if (print_done) n_done++;
  end

  // printer
  initial begin
    forever begin
      @(negedge clk);
      if (prn_strobe) begin
        checks++;
        if (prn_data !== 16'h1000 + 16'(got) * 16'h0111) begin
          failures++;
          $display("word %0d: %h", got, prn_data);
        end
        got++;
        repeat ($urandom_range(5)) @(negedge clk);
        prn_ack = 1;
        while (prn_strobe) @(negedge clk);
        repeat ($urandom_range(3)) @(negedge clk);
        prn_ack = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      got = 0;
      print_start = 1;
      repeat (5) @(negedge clk);
      print_start = 0;
      checks++;
      if (!print_active) begin failures++; $display("print not started"); end
      while (print_active) @(negedge clk);
      checks++;
      if (got != 16) begin failures++; $display("%0d words printed", got); end
      repeat (20) @(negedge clk);
    end
    checks++;
    if (n_done != 2 || n_busy == 0) begin failures++; $display("done pulses %0d", n_done); end
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
