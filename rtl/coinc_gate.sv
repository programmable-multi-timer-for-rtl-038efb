// coinc_gate: data coincidence gate for a pulse height analyzer.
// The output follows the T1 gate, with one exception: if a data pulse is
// present when T1 rises, the output is held off until that pulse has ended,
// so the analyzer never starts on a partly gated (distorted) pulse. Later
// data pulses inside T1 do not affect the gate. The data input is
// asynchronous and is synchronized by two flops; neg = 1 selects
// negative-logic (active-low) data pulses, the front-panel polarity toggle.
// coinc is registered: it rises one clock after T1 when no pulse is present,
// or one clock after the synchronized data pulse ends, and falls one clock
// after T1 falls. The hold-off rule and the polarity toggle follow the
// instrument; the state machine and its timing are this design's.
module coinc_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic t1_gate,
  input  logic lld,       // data pulse, asynchronous
  input  logic neg,       // 1: data pulses are active low
  output logic coinc
);

  typedef enum logic [1:0] {IDLE, HOLD, OPEN} state_t;

  state_t     state;
  logic [1:0] lld_sync;
  logic       data_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lld_sync <= '0;
    else        lld_sync <= {lld_sync[0], lld};
  end

  assign data_act = lld_sync[1] ^ neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
    end else if (!t1_gate) begin
      state <= IDLE;
    end else begin
      unique case (state)
        IDLE:    state <= data_act ? HOLD : OPEN;
        HOLD:    state <= data_act ? HOLD : OPEN;
        default: state <= OPEN;
      endcase
    end
  end

  assign coinc = (state == OPEN);

endmodule
