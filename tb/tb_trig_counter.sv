// tb_trig_counter: checks the triggered counter with four decades.
// Triggers arrive at random intervals. The testbench counts clock edges k
// since the edge that saw the trigger and checks that tick[N] is high
// exactly when k is a positive multiple of 10^(N+1), and that the BCD
// elapsed count equals k-1 (mod 10^4) before that edge.
module tb_trig_counter;
  localparam int unsigned DEC = 4;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [DEC-1:0] tick;
  logic [4*DEC-1:0] elapsed;
  int checks = 0, failures = 0;
  longint k = 0;      // edges since the last trigger edge (or reset)
  int n_ticks [DEC];

  trig_counter #(.DECADES(DEC)) dut (.clk, .rst_n, .trigger, .tick, .elapsed);

  always #50 clk = ~clk;

  function automatic logic [4*DEC-1:0] to_bcd(longint v);
    logic [4*DEC-1:0] r;
    for (int i = 0; i < DEC; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    longint p;
    if (trigger) begin
      checks++;
      if (tick != 0) begin failures++; $display("tick in trigger cycle"); end
      k <= 0;
    end else begin
      p = 10;
      for (int n = 0; n < DEC; n++) begin
        logic exp_t;
        exp_t = ((k + 1) % p) == 0;
        checks++;
        if (tick[n] !== exp_t) begin
          failures++;
          if (failures < 10) $display("tick[%0d] k=%0d got %b exp %b", n, k + 1, tick[n], exp_t);
        end
        if (tick[n]) n_ticks[n]++;
        p = p * 10;
      end
      checks++;
      if (elapsed !== to_bcd(k)) begin
        failures++;
        if (failures < 10) $display("elapsed %h expected %h", elapsed, to_bcd(k));
      end
      k <= k + 1;
    end
  end

  initial begin
    for (int n = 0; n < DEC; n++) n_ticks[n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      repeat ((t == 5) ? 25000 : 1 + $urandom_range(3000)) @(negedge clk);
      trigger = 1;
      @(negedge clk);
      trigger = 0;
    end
    repeat (50) @(negedge clk);
    for (int n = 0; n < DEC; n++) begin
      checks++;
      if (n_ticks[n] == 0) begin failures++; $display("tick[%0d] never fired", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
