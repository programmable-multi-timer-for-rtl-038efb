// display: the six-digit front-panel display register.
// ld (from the memory controller) captures the RAM word and its address.
// The six BCD digits, digits[5] leftmost, then show the four data digits
// followed by the two-digit address (00..15). When the captured address is
// 05 the display instead follows the time-of-day clock live, as HHMMSS. The
// LED segment drivers are outside this block. Formats follow the
// instrument; the register and its reset value (all zero) are this design's.
module display
  import prmt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data,
  input  tod_t              tod,
  output bcd_t              digits [6]
);

  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      data_q <= '0;
    end else if (ld) begin
      addr_q <= addr;
      data_q <= data;
    end
  end

  always_comb begin
    if (addr_q == A_TOD) begin
      {digits[5], digits[4], digits[3], digits[2], digits[1], digits[0]} = tod;
    end else begin
      {digits[5], digits[4], digits[3], digits[2]} = data_q;
      digits[1] = (addr_q >= 4'd10) ? 4'd1 : 4'd0;
      digits[0] = (addr_q >= 4'd10) ? addr_q - 4'd10 : addr_q;
    end
  end

endmodule
