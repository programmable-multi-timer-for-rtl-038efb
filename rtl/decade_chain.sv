// decade_chain: a ripple of DECADES modulo-10 counters, written synchronously.
// Stage 0 counts every cycle in which en is high; stage k advances when stage
// k-1 rolls over from 9 to 0. tick[k] is high for the one clock in which
// stages 0..k all roll over, so with en tied high tick[k] repeats every
// 10^(k+1) clocks. clr returns every stage to 0, has priority over en and
// suppresses tick in its own cycle.
// digits exposes the count, stage 0 in the low nibble. Helper shared by the
// two counters of the timer; the decade structure is the instrument's, the
// synchronous clear is this design's choice.
module decade_chain #(
  parameter int unsigned DECADES = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic                   en,
  output logic [DECADES-1:0]     tick,
  output logic [4*DECADES-1:0]   digits
);

  logic [3:0]         d [DECADES];
  logic [DECADES-1:0] cin;   // stage k counts when cin[k] is high

  always_comb begin
    logic carry;
    carry = en && !clr;
    for (int k = 0; k < DECADES; k++) begin
      cin[k]  = carry;
      carry   = carry && (d[k] == 4'd9);
      tick[k] = carry;
      digits[4*k +: 4] = d[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DECADES; k++) d[k] <= 4'd0;
    end else if (clr) begin
      for (int k = 0; k < DECADES; k++) d[k] <= 4'd0;
    end else begin
      for (int k = 0; k < DECADES; k++) begin
        if (tick[k])     d[k] <= 4'd0;
        else if (cin[k]) d[k] <= d[k] + 4'd1;
      end
    end
  end

endmodule
