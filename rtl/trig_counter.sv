// trig_counter: the triggered elapsed-time counter.
// Eight decade counters (DECADES) run from the 10 MHz oscillator and are all
// cleared in the clock cycle of a trigger, so the count is the time since the
// last trigger in 100 ns units (BCD, elapsed[3:0] the 100 ns digit).
// tick[N] is a one-clock pulse every 10^N us after the trigger: the first one
// comes exactly 10^(N+1) clocks after the trigger cycle. The per-time
// counters of T1/T2 take their rate from these decades. The decade count
// follows the instrument; the synchronous clear is this design's choice.
module trig_counter #(
  parameter int unsigned DECADES = 8
) (
  input  logic                 clk,       // 10 MHz
  input  logic                 rst_n,
  input  logic                 trigger,   // one-clock pulse
  output logic [DECADES-1:0]   tick,      // tick[N]: every 10^N us after trigger
  output logic [4*DECADES-1:0] elapsed    // BCD, units of 100 ns
);

  decade_chain #(.DECADES(DECADES)) u_chain (
    .clk, .rst_n, .clr(trigger), .en(1'b1), .tick, .digits(elapsed)
  );

endmodule
