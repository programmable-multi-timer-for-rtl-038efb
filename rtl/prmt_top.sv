// prmt_top: the Programmable Multi-Timer.
// A 10 MHz clock drives two decade counters: a free-running RTC counter
// (rates 10^0..10^7 us) and a triggered counter cleared by every trigger.
// The triggered side makes two gates, T1 and T2, each with a delay output,
// start pulse, gate and stop pulse at programmed times M2M1M0 x 10^N us after
// a trigger that is either external or internal (10^D us periodic). The RTC
// side drives a 24-hour time-of-day clock, two reference frequency outputs
// and two time-of-day gates, RTC1 and RTC2, whose start and stop times are
// compared once a minute and may be delayed by up to three days. All
// settings are entered as a function address (00..15) and four BCD data
// digits with the STORE button; they go into a 16 x 16 RAM and, for
// addresses 05..11, into data latches. DISPLAY reads any word back to the
// six-digit display, and a print cycle sends all sixteen words to the
// printing loop. A coincidence gate derived from T1 enables a pulse height
// analyzer.
// Timing: everything runs in the one 10 MHz clock domain; asynchronous
// inputs (EXT TRIG, TRIGGER DELAY, data pulse, pushbuttons, printer
// handshake) are synchronized inside the blocks that use them. SEC_RATE
// picks the RTC decade used as the one-second tick of the time-of-day clock
// (6 = 10^6 us); lowering it only speeds up time of day in simulation.
// The block structure follows the instrument; the cycle-level timing and
// the printer handshake are this design's.
module prmt_top
  import prmt_pkg::*;
#(
  parameter int unsigned SEC_RATE = 6
) (
  input  logic        clk,            // 10 MHz
  input  logic        rst_n,
  // triggered clock circuits
  input  logic        ext_trig,
  input  logic        trig_inhibit,   // TRIGGER DELAY input
  output logic        trig_enable,    // low while TRIGGER DELAY blocks triggers
  output logic [1:0]  t_gate,         // [0] T1, [1] T2
  output logic [1:0]  t_dly,
  output logic [1:0]  t_start,
  output logic [1:0]  t_stop,
  output logic        int_trig_out,
  output logic [31:0] elapsed_bcd,    // time since trigger, BCD, 100 ns units
  // coincidence circuit
  input  logic        lld,
  input  logic        lld_neg,
  output logic        coinc,
  // front panel
  input  logic        rtc_delay_sel,  // 0: RTC1, 1: RTC2
  input  logic [7:0]  func_addr_bcd,
  input  logic [15:0] data_sw,
  input  logic        store_btn,
  input  logic        display_btn,
  output bcd_t        disp_digits [6],
  // time-of-day outputs
  output logic [1:0]  ref_freq,
  output logic [1:0]  rtc_gate,       // [0] RTC1, [1] RTC2
  output logic [1:0]  rtc_start,
  output logic [1:0]  rtc_stop,
  // printing loop
  input  logic        print_start,
  input  logic        prn_ack,
  output logic        print_active,
  output logic [3:0]  prn_addr,
  output logic [15:0] prn_data,
  output logic        prn_strobe,
  output logic        print_done
);

  // counters
  logic [7:0] rtc_tick;
  logic [7:0] trg_tick;
  logic       trigger;

  // parameters
  bcd_t       ref_n1, ref_n2, trig_sel, rate_d;
  ptime_t     t_time [4];

  // memory
  logic [ADDR_W-1:0] func_addr, ram_addr;
  logic              func_valid;
  logic              ram_we, store_wr, disp_ld, cmp_strobe, mem_busy;
  logic [DATA_W-1:0] ram_wdata, ram_rdata;
  logic              ld_tod, ld_ref, ld_ctrl;
  logic [3:0]        ld_time;

  // time of day
  tod_t       tod;
  logic       minute_pulse;
  logic [1:0] rtc_start_m, rtc_stop_m;

  rtc_counter #(.DECADES(7)) u_rtc_counter (.clk, .rst_n, .tick(rtc_tick));

  trig_counter #(.DECADES(8)) u_trig_counter (
    .clk, .rst_n, .trigger, .tick(trg_tick), .elapsed(elapsed_bcd)
  );

  trigger_select u_trigger_select (
    .clk, .rst_n, .ext_trig, .trig_sel, .rate_d, .rtc_tick,
    .inhibit(trig_inhibit), .trigger, .trig_enable, .int_trig_out
  );

  for (genvar c = 0; c < 2; c++) begin : g_t
    t_channel u_t_channel (
      .clk, .rst_n, .trigger, .tick(trg_tick),
      .start_time(t_time[2*c]), .stop_time(t_time[2*c+1]),
      .gate(t_gate[c]), .dly(t_dly[c]), .start_p(t_start[c]), .stop_p(t_stop[c])
    );
  end

  coinc_gate u_coinc_gate (.clk, .rst_n, .t1_gate(t_gate[0]), .lld, .neg(lld_neg), .coinc);

  func_addr_decode u_func_addr_decode (
    .addr_bcd(func_addr_bcd), .store_wr, .addr(func_addr), .valid(func_valid),
    .ld_tod, .ld_ref, .ld_ctrl, .ld_time
  );

  param_latches u_param_latches (
    .clk, .rst_n, .data(data_sw), .ld_ref, .ld_ctrl, .ld_time,
    .ref_n1, .ref_n2, .trig_sel, .rate_d, .t_time
  );

  memory_control u_memory_control (
    .clk, .rst_n, .store_btn, .display_btn, .func_addr, .func_valid,
    .minute_pulse, .print_active, .print_addr(prn_addr), .data_sw,
    .tod_hhmm(tod[23:8]), .ram_addr, .ram_we, .ram_wdata, .store_wr,
    .disp_ld, .cmp_strobe, .busy(mem_busy)
  );

  prmt_ram #(.WORDS(RAM_WORDS), .WIDTH(DATA_W)) u_ram (
    .clk, .rst_n, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  display u_display (
    .clk, .rst_n, .ld(disp_ld), .addr(ram_addr), .data(ram_rdata), .tod,
    .digits(disp_digits)
  );

  print_control u_print_control (
    .clk, .rst_n, .print_start, .prn_ack, .mem_busy, .ram_data(ram_rdata),
    .print_active, .print_addr(prn_addr), .prn_data, .prn_strobe, .print_done
  );

  tod_clock u_tod_clock (
    .clk, .rst_n, .sec_tick(rtc_tick[SEC_RATE]), .preset(ld_tod),
    .preset_hhmm(data_sw), .tod, .minute_pulse
  );

  rtc_compare u_rtc_compare (
    .clk, .rst_n, .cmp_strobe, .cmp_addr(ram_addr), .ram_data(ram_rdata),
    .tod_hhmm(tod[23:8]), .start_match(rtc_start_m), .stop_match(rtc_stop_m)
  );

  for (genvar c = 0; c < 2; c++) begin : g_rtc
    rtc_gate u_rtc_gate (
      .clk, .rst_n, .start_match(rtc_start_m[c]), .stop_match(rtc_stop_m[c]),
      .ld_delay(ld_ctrl && (rtc_delay_sel == 1'(c))),
      .start_code(data_sw[11:8]), .stop_code(data_sw[7:4]),
      .gate(rtc_gate[c]), .start_p(rtc_start[c]), .stop_p(rtc_stop[c])
    );
  end

  ref_freq_gates u_ref_freq_gates (.clk, .rst_n, .rtc_tick, .n1(ref_n1), .n2(ref_n2), .ref_freq);

endmodule
