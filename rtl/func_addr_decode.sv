// func_addr_decode: decoder, converter and gates of the function address.
// The two-digit BCD function address from the thumbwheels (tens digit in
// addr_bcd[7:4]) is converted to a binary RAM address 0..15; valid is low for
// any other setting (a non-decimal digit or a value above 15), and then no
// store or display takes place. The store strobe is gated to the data latch
// of the selected function: 05 presets the time-of-day clock, 06 the
// reference frequency rates, 07 the trigger/RTC-delay control word and
// 08..11 the T1/T2 start and stop times. Purely combinational. The address
// map follows the instrument; treating 16..99 as invalid is this design's.
module func_addr_decode
  import prmt_pkg::*;
(
  input  logic [7:0]        addr_bcd,
  input  logic              store_wr,    // one-clock store strobe
  output logic [ADDR_W-1:0] addr,
  output logic              valid,
  output logic              ld_tod,
  output logic              ld_ref,
  output logic              ld_ctrl,
  output logic [3:0]        ld_time      // 08, 09, 10, 11
);

  logic [6:0] bin;
  logic       st;

  assign bin   = 7'(addr_bcd[7:4]) * 7'd10 + 7'(addr_bcd[3:0]);
  assign valid = (addr_bcd[7:4] <= 4'd9) && (addr_bcd[3:0] <= 4'd9) && (bin <= 7'd15);
  assign addr  = bin[ADDR_W-1:0];
  assign st    = store_wr && valid;

  assign ld_tod  = st && (addr == A_TOD);
  assign ld_ref  = st && (addr == A_REF);
  assign ld_ctrl = st && (addr == A_CTRL);

  always_comb begin
    for (int i = 0; i < 4; i++)
      ld_time[i] = st && (addr == A_T1_START + ADDR_W'(i));
  end

endmodule
