// tb_prmt_ram: random writes and reads of the 16 x 16 RAM against a
// testbench array, including the cleared state after reset.
module tb_prmt_ram;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [3:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  prmt_ram #(.WORDS(16), .WIDTH(16)) dut (.clk, .rst_n, .we, .addr, .wdata, .rdata);

  always #50 clk = ~clk;

  initial begin
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (rdata !== 16'h0) begin failures++; $display("word %0d not cleared", i); end
    end
    for (int it = 0; it < 2000; it++) begin
      we = ($urandom_range(2) == 0);
      addr = 4'($urandom);
      wdata = 16'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("read %0d: %h exp %h", addr, rdata, model[addr]); end
      if (we) model[addr] = wdata;
      @(negedge clk);
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
