// rtc_compare: comparator, address decoder and gates of the RTC gates.
// During the once-a-minute memory update the RTC start and stop times
// (HHMM) are read from RAM addresses 12..15 one per clock with cmp_strobe
// high. Each word is compared with the time of day (HHMM); the decoded
// address steers an equal compare to one output: 12 RTC1 start, 13 RTC1
// stop, 14 RTC2 start, 15 RTC2 stop. Outputs are registered one-clock
// pulses. The comparison against RAM once a minute follows the instrument;
// the registered timing is this design's.
module rtc_compare
  import prmt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_strobe,
  input  logic [ADDR_W-1:0] cmp_addr,
  input  logic [DATA_W-1:0] ram_data,
  input  logic [15:0]       tod_hhmm,
  output logic [1:0]        start_match,   // [0] RTC1, [1] RTC2
  output logic [1:0]        stop_match
);

  logic       eq;
  logic [3:0] sel;   // one-hot decode of addresses 12..15

  assign eq = cmp_strobe && (ram_data == tod_hhmm);

  always_comb begin
    for (int i = 0; i < 4; i++)
      sel[i] = (cmp_addr == A_RTC1_START + ADDR_W'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_match <= '0;
      stop_match  <= '0;
    end else begin
      start_match <= {eq && sel[2], eq && sel[0]};
      stop_match  <= {eq && sel[3], eq && sel[1]};
    end
  end

endmodule
