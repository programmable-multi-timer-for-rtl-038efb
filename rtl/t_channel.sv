// t_channel: comparators and output latches of one triggered gate (T1 or T2).
// Two time_match units compare the programmed start and stop times with the
// time elapsed since the trigger. The outputs, all registered and so one
// clock behind the match:
//   dly     high from the trigger until the start time (the delay period)
//   start_p one-clock pulse at the start time
//   gate    high from the start time to the stop time
//   stop_p  one-clock pulse at the stop time
// A trigger ends any gate still open and begins a new cycle. If start and
// stop fall in the same cycle, or stop comes first, stop wins and the gate
// stays low (it opens at the start time if that is later). The four outputs
// and their meaning follow the instrument; pulse width (one 100 ns clock)
// and the behaviour for a stop time not after the start time are this
// design's choices.
module t_channel
  import prmt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       trigger,
  input  logic [7:0] tick,
  input  ptime_t     start_time,
  input  ptime_t     stop_time,
  output logic       gate,
  output logic       dly,
  output logic       start_p,
  output logic       stop_p
);

  logic start_m, stop_m;

  time_match u_start (.clk, .rst_n, .trigger, .tick, .ptime(start_time), .match(start_m));
  time_match u_stop  (.clk, .rst_n, .trigger, .tick, .ptime(stop_time),  .match(stop_m));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate    <= 1'b0;
      dly     <= 1'b0;
      start_p <= 1'b0;
      stop_p  <= 1'b0;
    end else begin
      start_p <= start_m;
      stop_p  <= stop_m;
      if (stop_m)                 gate <= 1'b0;
      else if (start_m)           gate <= 1'b1;
      else if (trigger)           gate <= 1'b0;
      if (start_m)                dly  <= 1'b0;
      else if (trigger)           dly  <= 1'b1;
    end
  end

endmodule
