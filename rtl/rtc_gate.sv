// rtc_gate: gates, delay circuits and output latches of one time-of-day
// gate (RTC1 or RTC2).
// A start match (the time of day equals the programmed start time) opens the
// gate and gives a one-clock start pulse; a stop match closes it and gives a
// stop pulse. Each can be delayed by 0..3 days: ld_delay (a STORE to address
// 07 with the front-panel toggle on this gate) loads the start delay from
// digit B and the stop delay from digit C, coded 1, 2, 4, 8 for 0, 1, 2, 3
// days. A pending delay count swallows that many matches (one per day)
// before the next one acts. Once the delays have run out the gate repeats
// every day. A stop and a start in the same cycle leave the gate closed.
// Outputs are registered. The day delays and their code follow the
// instrument; counting matches as days and the daily repetition are this
// design's reading.
module rtc_gate
  import prmt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start_match,
  input  logic stop_match,
  input  logic ld_delay,
  input  bcd_t start_code,    // digit B
  input  bcd_t stop_code,     // digit C
  output logic gate,
  output logic start_p,
  output logic stop_p
);

  logic [1:0] start_days_left, stop_days_left;
  logic       start_go, stop_go;

  assign start_go = start_match && (start_days_left == 2'd0);
  assign stop_go  = stop_match  && (stop_days_left  == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_days_left <= '0;
      stop_days_left  <= '0;
      gate            <= 1'b0;
      start_p         <= 1'b0;
      stop_p          <= 1'b0;
    end else begin
      start_p <= start_go;
      stop_p  <= stop_go;
      if (stop_go)       gate <= 1'b0;
      else if (start_go) gate <= 1'b1;
      if (ld_delay) begin
        start_days_left <= delay_days(start_code);
        stop_days_left  <= delay_days(stop_code);
      end else begin
        if (start_match && !start_go) start_days_left <= start_days_left - 2'd1;
        if (stop_match  && !stop_go)  stop_days_left  <= stop_days_left  - 2'd1;
      end
    end
  end

endmodule
