// ref_freq_gates: the two general-purpose reference frequency outputs.
// Each output repeats every 10^N us, N = 0..7, chosen by digits N1 and N2 of
// function address 06 from the decades of the free-running RTC counter. Each
// period is a one-clock (100 ns) pulse; a digit of 8 or 9 switches that
// output off. Outputs are registered. Rates and their source follow the
// instrument; pulse width and the off setting are this design's choices.
module ref_freq_gates
  import prmt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rtc_tick,
  input  bcd_t       n1,
  input  bcd_t       n2,
  output logic [1:0] ref_freq    // [0] output 1, [1] output 2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_freq <= '0;
    end else begin
      ref_freq[0] <= (n1 <= 4'd7) && rtc_tick[n1[2:0]];
      ref_freq[1] <= (n2 <= 4'd7) && rtc_tick[n2[2:0]];
    end
  end

endmodule
