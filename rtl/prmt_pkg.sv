// prmt_pkg: types and constants shared by the Programmable Multi-Timer.
// All programmed values are held as binary-coded decimal digits, four per
// 16-bit word, most significant digit in bits [15:12], exactly as they are
// entered on the four data thumbwheels. The function address map follows the
// instrument's table of 16 function addresses; the day-delay code (digit
// values 1, 2, 4, 8 for 0, 1, 2, 3 days) is the instrument's, the handling of
// other digit values is this design's choice.
package prmt_pkg;

  typedef logic [3:0] bcd_t;

  // Programmed trigger-relative time: M2M1M0 x 10^N microseconds.
  typedef struct packed {
    bcd_t m2;
    bcd_t m1;
    bcd_t m0;
    bcd_t n;
  } ptime_t;

  // Time of day, 24-hour, BCD.
  typedef struct packed {
    bcd_t h1;
    bcd_t h0;
    bcd_t m1;
    bcd_t m0;
    bcd_t s1;
    bcd_t s0;
  } tod_t;

  localparam int unsigned RAM_WORDS = 16;
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned ADDR_W    = 4;

  // Function addresses.
  localparam logic [ADDR_W-1:0] A_TOD        = 4'd5;
  localparam logic [ADDR_W-1:0] A_REF        = 4'd6;
  localparam logic [ADDR_W-1:0] A_CTRL       = 4'd7;
  localparam logic [ADDR_W-1:0] A_T1_START   = 4'd8;
  localparam logic [ADDR_W-1:0] A_RTC1_START = 4'd12;

  // Three-digit BCD increment (digits wrap from 999 to 000).
  function automatic logic [11:0] bcd3_inc(logic [11:0] v);
    logic [11:0] r;
    r = v;
    if (r[3:0] >= 4'd9) begin
      r[3:0] = 4'd0;
      if (r[7:4] >= 4'd9) begin
        r[7:4] = 4'd0;
        r[11:8] = (r[11:8] >= 4'd9) ? 4'd0 : r[11:8] + 4'd1;
      end else begin
        r[7:4] = r[7:4] + 4'd1;
      end
    end else begin
      r[3:0] = r[3:0] + 4'd1;
    end
    return r;
  endfunction

  // Day-delay digit: 1, 2, 4, 8 -> 0, 1, 2, 3 days. Other values take the
  // highest set bit; 0 means no delay.
  function automatic logic [1:0] delay_days(bcd_t code);
    if (code[3])      return 2'd3;
    else if (code[2]) return 2'd2;
    else if (code[1]) return 2'd1;
    else              return 2'd0;
  endfunction

endpackage
