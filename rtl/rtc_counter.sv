// rtc_counter: the free-running real-time-clock counter of the timer.
// A divide-by-ten prescaler turns the 10 MHz oscillator into a 1 us tick, and
// a chain of DECADES decade counters (seven in the instrument) divides that
// further. tick[N] is a one-clock pulse every 10^N us, N = 0..DECADES, so the
// eight rates 1 us .. 10 s that the internal trigger and the reference
// frequencies are programmed with are all present; tick[6] is the 1 s tick
// of the time-of-day clock. The counter is never cleared except at reset.
// The seven decades follow the instrument; placing a separate 10 MHz to 1 us
// prescaler ahead of them is this design's reading of the clock path.
module rtc_counter #(
  parameter int unsigned DECADES = 7
) (
  input  logic             clk,     // 10 MHz
  input  logic             rst_n,
  output logic [DECADES:0] tick     // tick[N]: every 10^N us
);

  logic [0:0]             pre_tick;
  logic [3:0]             pre_digit;
  logic [DECADES-1:0]     dec_tick;
  logic [4*DECADES-1:0]   dec_digits;

  decade_chain #(.DECADES(1)) u_pre (
    .clk, .rst_n, .clr(1'b0), .en(1'b1), .tick(pre_tick), .digits(pre_digit)
  );

  decade_chain #(.DECADES(DECADES)) u_dec (
    .clk, .rst_n, .clr(1'b0), .en(pre_tick[0]), .tick(dec_tick), .digits(dec_digits)
  );

  assign tick = {dec_tick, pre_tick[0]};

endmodule
