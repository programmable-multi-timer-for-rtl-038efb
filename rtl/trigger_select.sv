// trigger_select: chooses the trigger of the T1/T2 triggered clock circuits.
// Digit A of function address 07 selects the source: 0 the internal periodic
// trigger, any other value the external EXT TRIG input (the instrument
// defines 1 for external). Digit D selects the internal repetition rate,
// 10^D us, taken from the RTC counter; D = 8 or 9 stops the internal trigger.
// The internal trigger is always brought out as int_trig_out, whichever
// source is selected. The external input is asynchronous: it passes a
// two-flop synchronizer and its rising edge makes the trigger, so it reaches
// the counters three clocks (300 ns) after the edge. The TRIGGER DELAY input
// (inhibit, high = disable) blocks new triggers without touching a cycle
// already running; it is synchronized the same way. trigger is a one-clock
// pulse. Source selection and rate follow the instrument; synchronization,
// edge detection and the meaning of values other than 0/1 are this design's.
module trigger_select (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ext_trig,      // EXT TRIG, asynchronous
  input  logic [3:0] trig_sel,      // digit A of address 07
  input  logic [3:0] rate_d,        // digit D of address 07
  input  logic [7:0] rtc_tick,      // RTC counter, tick[N] every 10^N us
  input  logic       inhibit,       // TRIGGER DELAY input, asynchronous
  output logic       trigger,       // one-clock trigger pulse
  output logic       trig_enable,
  output logic       int_trig_out
);

  logic [2:0] ext_sync;   // [0],[1] synchronizer, [2] previous value
  logic [1:0] inh_sync;
  logic       int_trig;
  logic       ext_edge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_sync <= '0;
      inh_sync <= '0;
    end else begin
      ext_sync <= {ext_sync[1:0], ext_trig};
      inh_sync <= {inh_sync[0], inhibit};
    end
  end

  assign ext_edge    = ext_sync[1] && !ext_sync[2];
  assign int_trig    = (rate_d <= 4'd7) && rtc_tick[rate_d[2:0]];
  assign trig_enable = !inh_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trigger      <= 1'b0;
      int_trig_out <= 1'b0;
    end else begin
      trigger      <= trig_enable && ((trig_sel == 4'd0) ? int_trig : ext_edge);
      int_trig_out <= int_trig;
    end
  end

endmodule
