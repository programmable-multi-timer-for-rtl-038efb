// tod_clock: 24-hour time-of-day clock in BCD (HH:MM:SS).
// sec_tick (one clock every second, from the RTC counter) advances the
// seconds; the clock wraps from 23:59:59 to 00:00:00. preset loads hours and
// minutes from preset_hhmm (the data thumbwheels, HHMM) and clears the
// seconds, as a STORE to function address 05 does. minute_pulse is a
// one-clock pulse in the cycle after the seconds wrap to 00, when tod already
// shows the new minute; a preset does not produce one. The clock function
// and preset follow the instrument; the pulse timing is this design's.
module tod_clock
  import prmt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sec_tick,
  input  logic        preset,
  input  logic [15:0] preset_hhmm,
  output tod_t        tod,
  output logic        minute_pulse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tod          <= '0;
      minute_pulse <= 1'b0;
    end else begin
      minute_pulse <= 1'b0;
      if (preset) begin
        {tod.h1, tod.h0, tod.m1, tod.m0} <= preset_hhmm;
        tod.s1 <= 4'd0;
        tod.s0 <= 4'd0;
      end else if (sec_tick) begin
        if (tod.s0 < 4'd9) begin
          tod.s0 <= tod.s0 + 4'd1;
        end else begin
          tod.s0 <= 4'd0;
          if (tod.s1 < 4'd5) begin
            tod.s1 <= tod.s1 + 4'd1;
          end else begin
            tod.s1       <= 4'd0;
            minute_pulse <= 1'b1;
            if (tod.m0 < 4'd9) begin
              tod.m0 <= tod.m0 + 4'd1;
            end else begin
              tod.m0 <= 4'd0;
              if (tod.m1 < 4'd5) begin
                tod.m1 <= tod.m1 + 4'd1;
              end else begin
                tod.m1 <= 4'd0;
                if ({tod.h1, tod.h0} >= 8'h23) begin
                  tod.h1 <= 4'd0;
                  tod.h0 <= 4'd0;
                end else if (tod.h0 >= 4'd9) begin
                  tod.h0 <= 4'd0;
                  tod.h1 <= tod.h1 + 4'd1;
                end else begin
                  tod.h0 <= tod.h0 + 4'd1;
                end
              end
            end
          end
        end
      end
    end
  end

endmodule
