// time_match: one programmed time of the triggered clock circuits.
// The time is M2M1M0 x 10^N us. The N digit selects decade N of the
// triggered counter (the data selector), and a three-digit BCD counter
// counts those 10^N us ticks after each trigger; match is a one-clock pulse
// in the cycle the count reaches M2M1M0, after which the counter rests until
// the next trigger. Because the triggered counter is cleared by the same
// trigger, match comes exactly M2M1M0 x 10^N x 10 clocks after the trigger
// cycle. M2M1M0 = 000 matches in the trigger cycle itself; N = 8 or 9 never
// matches. Time format and counting scheme follow the instrument; the
// zero and out-of-range cases are this design's choice.
module time_match
  import prmt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       trigger,
  input  logic [7:0] tick,      // triggered counter, tick[N] every 10^N us
  input  ptime_t     ptime,
  output logic       match
);

  logic [11:0] count;
  logic        armed;
  logic [11:0] m;
  logic        rate_tick;
  logic [11:0] next_count;

  assign m          = {ptime.m2, ptime.m1, ptime.m0};
  assign rate_tick  = (ptime.n <= 4'd7) && tick[ptime.n[2:0]];
  assign next_count = bcd3_inc(count);

  always_comb begin
    if (trigger)                 match = (m == 12'h000);
    else if (armed && rate_tick) match = (next_count == m);
    else                         match = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      armed <= 1'b0;
    end else if (trigger) begin
      count <= '0;
      armed <= (m != 12'h000);
    end else if (armed && rate_tick) begin
      count <= next_count;
      if (next_count == m) armed <= 1'b0;
    end
  end

endmodule
