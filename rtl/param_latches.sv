// param_latches: the data latches that hold the operating parameters the
// counters use continuously. A load strobe from the function address
// decoder copies the data thumbwheels into the latch of that function:
//   address 06  --N2N1  reference frequency rates (ref_n2, ref_n1)
//   address 07  ABCD    trigger select A and internal rate D (digits B and C,
//                       the RTC day delays, are latched inside rtc_gate)
//   address 08..11      T1 start, T1 stop, T2 start, T2 stop, M2M1M0N
// All latches clear to zero at reset, which selects the internal trigger at
// 1 us and programs every time to zero. Latch contents follow the
// instrument; the reset values are this design's choice.
module param_latches
  import prmt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data,
  input  logic              ld_ref,
  input  logic              ld_ctrl,
  input  logic [3:0]        ld_time,
  output bcd_t              ref_n1,
  output bcd_t              ref_n2,
  output bcd_t              trig_sel,
  output bcd_t              rate_d,
  output ptime_t            t_time [4]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_n1   <= '0;
      ref_n2   <= '0;
      trig_sel <= '0;
      rate_d   <= '0;
      for (int i = 0; i < 4; i++) t_time[i] <= '0;
    end else begin
      if (ld_ref) begin
        ref_n1 <= data[3:0];
        ref_n2 <= data[7:4];
      end
      if (ld_ctrl) begin
        trig_sel <= data[15:12];
        rate_d   <= data[3:0];
      end
      for (int i = 0; i < 4; i++)
        if (ld_time[i]) t_time[i] <= ptime_t'(data);
    end
  end

endmodule
