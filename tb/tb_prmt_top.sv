// tb_prmt_top: end-to-end test of the whole timer through its front panel.
// SEC_RATE is lowered to 0, so one "second" of the time-of-day clock lasts
// 1 us and a day 86.4 ms (864,000 clocks); everything else runs at its real
// rate. The test programs the instrument only through the thumbwheels and
// the STORE/DISPLAY buttons and then checks:
//  * T1/T2 gates after an external trigger: latency, delay, gate widths;
//  * the coincidence gate with and without a data pulse at the T1 edge;
//  * TRIGGER DELAY blocking triggers, and the internal 10^D us trigger;
//  * both reference frequency periods;
//  * the display of a stored word, of a DISPLAY request and of the live TOD;
//  * TOD preset, midnight, the once-a-minute update, RTC1/RTC2 gates at
//    their programmed times, and a one-day delay on RTC2;
//  * a print cycle of all sixteen words, with the buttons ignored meanwhile.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_prmt_top;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ext_trig = 0, trig_inhibit = 0, trig_enable;
  logic [1:0] t_gate, t_dly, t_start, t_stop;
  logic int_trig_out;
  logic [31:0] elapsed_bcd;
  logic lld = 0, lld_neg = 0, coinc;
  logic rtc_delay_sel = 0;
  logic [7:0] func_addr_bcd = 0;
  logic [15:0] data_sw = 0;
  logic store_btn = 0, display_btn = 0;
  bcd_t disp_digits [6];
  logic [1:0] ref_freq, rtc_gate, rtc_start, rtc_stop;
  logic print_start = 0, prn_ack = 0, print_active, prn_strobe, print_done;
  logic [3:0] prn_addr;
  logic [15:0] prn_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  prmt_top #(.SEC_RATE(0)) dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- helpers
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h) at cycle %0d", what, got, got, exp, exp, cyc);
    end
  endtask

  function automatic logic [23:0] disp();
    return {disp_digits[5], disp_digits[4], disp_digits[3], disp_digits[2], disp_digits[1], disp_digits[0]};
  endfunction

  task automatic set_addr(int a);
    func_addr_bcd = {4'(a / 10), 4'(a % 10)};
  endtask

  task automatic press(ref logic btn);
    btn = 1;
    repeat (4) @(negedge clk);
    btn = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic store(int a, logic [15:0] d);
    set_addr(a);
    data_sw = d;
    press(store_btn);
  endtask

  task automatic show(int a);
    set_addr(a);
    press(display_btn);
  endtask

  // ------------------------------------------------------------- monitors
  longint first_start [2], first_stop [2];
  int n_dly [2], n_gate [2], n_start [2];
  longint last_start0 = -1;
  int n_period_ok = 0;
  int n_coinc = 0, n_lld_overlap = 0;
  int n_int_trig = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (t_dly[c]) n_dly[c]++;
      if (t_gate[c]) n_gate[c]++;
      if (t_start[c]) begin
        n_start[c]++;
        if (first_start[c] < 0) first_start[c] = cyc;
      end
      if (t_stop[c] && first_stop[c] < 0) first_stop[c] = cyc;
    end
    if (coinc) n_coinc++;
    if (coinc && lld) n_lld_overlap++;
    if (int_trig_out) n_int_trig++;
  end

  task automatic clear_t();
    for (int c = 0; c < 2; c++) begin
      first_start[c] = -1; first_stop[c] = -1;
      n_dly[c] = 0; n_gate[c] = 0; n_start[c] = 0;
    end
    n_coinc = 0; n_lld_overlap = 0;
  endtask

  // RTC events: kind (0 start, 1 stop), channel, TOD HHMM from the display
  typedef struct { int ch; int kind; logic [15:0] hhmm; logic gate_now; } rtc_ev_t;
  rtc_ev_t rtc_q [$];
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (rtc_start[c]) rtc_q.push_back('{c, 0, disp()[23:8], rtc_gate[c]});
      if (rtc_stop[c])  rtc_q.push_back('{c, 1, disp()[23:8], rtc_gate[c]});
    end
  end

  // printer model
  logic [15:0] printed [$];
  initial begin
    forever begin
      @(negedge clk);
      if (prn_strobe) begin
        printed.push_back(prn_data);
        repeat (3) @(negedge clk);
        prn_ack = 1;
        while (prn_strobe) @(negedge clk);
        repeat (2) @(negedge clk);
        prn_ack = 0;
      end
    end
  end

  // mechanism counters
  int m_ext = 0, m_inhibit = 0, m_int = 0, m_holdoff = 0, m_coinc = 0, m_ref = 0;
  int m_store_disp = 0, m_display = 0, m_tod_live = 0, m_midnight = 0, m_minute = 0;
  int m_rtc_gate = 0, m_rtc_delay = 0, m_print = 0, m_print_block = 0, m_invalid = 0;

  task automatic ext_pulse();
    ext_trig = 1;
    repeat (3) @(negedge clk);
    ext_trig = 0;
  endtask

  // ------------------------------------------------------------- sequence
  initial begin
    longint c_ext;
    logic [23:0] d0;
    clear_t();
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // T1 5..15 us, T2 20..30 us
    store(8,  16'h0050);
    store(9,  16'h0150);
    store(10, 16'h0021);
    store(11, 16'h0031);
    check("display after store", disp(), 24'h003111);
    if (disp() == 24'h003111) m_store_disp++;
    // external trigger, RTC1 delays none, internal rate 100 us
    rtc_delay_sel = 0;
    store(7, 16'h1112);
    store(6, 16'h0012);   // ref 1: 100 us, ref 2: 10 us
    // after reset the internal 1 us trigger was running: let its last cycle end
    repeat (500) @(negedge clk);

    // ---- external trigger, data pulse present at the T1 edge
    clear_t();
    lld = 1;
    @(posedge clk);
    c_ext = cyc;
    @(negedge clk);
    ext_pulse();
    while (!t_gate[0]) @(negedge clk);
    repeat (20) @(negedge clk);
    check("coinc held off", n_coinc, 0);
    lld = 0;
    repeat (400) @(negedge clk);
    // ext edge seen at cycle c_ext+1; trigger edge 3 clocks later
    check("T1 start latency", first_start[0] - c_ext, 4 + 50 + 1);
    check("T1 stop latency", first_stop[0] - c_ext, 4 + 150 + 1);
    check("T2 start latency", first_start[1] - c_ext, 4 + 200 + 1);
    check("T2 stop latency", first_stop[1] - c_ext, 4 + 300 + 1);
    check("T1 delay width", n_dly[0], 50);
    check("T1 gate width", n_gate[0], 100);
    check("T2 delay width", n_dly[1], 200);
    check("T2 gate width", n_gate[1], 100);
    // coinc lags T1 by one clock; after the hold-off it opens three clocks
    // after the data pulse ends (two synchronizer flops and the state flop)
    check("coinc width after hold-off", n_coinc, 100 - 20 - 2);
    check("coinc never with data", n_lld_overlap, 0);
    if (first_start[0] - c_ext == 55) m_ext++;
    if (n_coinc == 78) m_holdoff++;

    // ---- external trigger, no data pulse
    clear_t();
    ext_pulse();
    repeat (400) @(negedge clk);
    check("coinc follows T1", n_coinc, 100);
    if (n_coinc == 100) m_coinc++;

    // ---- TRIGGER DELAY blocks triggers
    trig_inhibit = 1;
    repeat (4) @(negedge clk);
    check("trig_enable low", trig_enable, 0);
    clear_t();
    ext_pulse();
    repeat (400) @(negedge clk);
    check("inhibited: no T1 start", n_start[0], 0);
    check("inhibited: no delay", n_dly[0], 0);
    if (n_start[0] == 0 && n_dly[0] == 0) m_inhibit++;
    trig_inhibit = 0;
    repeat (4) @(negedge clk);

    // ---- internal trigger, 100 us
    store(7, 16'h0112);
    clear_t();
    n_int_trig = 0;
    repeat (5000) @(negedge clk);
    check("internal trigger pulses", n_int_trig, 5);
    check("T1 starts from internal trigger", n_start[0], 5);
    check("T2 starts from internal trigger", n_start[1], 5);
    if (n_start[0] == 5) m_int++;
    store(7, 16'h1112);   // back to external

    // ---- reference frequencies
    begin
      longint l0, l1;
      int ok0, ok1;
      l0 = -1; l1 = -1; ok0 = 0; ok1 = 0;
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        if (ref_freq[0]) begin if (l0 >= 0) check("ref 1 period", cyc - l0, 1000); l0 = cyc; ok0++; end
        if (ref_freq[1]) begin if (l1 >= 0) check("ref 2 period", cyc - l1, 100); l1 = cyc; ok1++; end
      end
      if (ok0 >= 2 && ok1 >= 20) m_ref++;
    end

    // ---- display
    store(3, 16'h1234);
    check("display stored word", disp(), 24'h123403);
    show(8);
    check("display request", disp(), 24'h005008);
    if (disp() == 24'h005008) m_display++;
    // invalid address 20: nothing stored, display unchanged
    store(20, 16'h7777);
    check("invalid address ignored", disp(), 24'h005008);
    if (disp() == 24'h005008) m_invalid++;

    // ---- RTC times and delays
    store(12, 16'h2359);   // RTC1 start
    store(13, 16'h0001);   // RTC1 stop
    store(14, 16'h0000);   // RTC2 start
    store(15, 16'h0002);   // RTC2 stop
    rtc_delay_sel = 1;
    store(7, 16'h1212);    // RTC2: start one day late, stop no delay
    rtc_delay_sel = 0;
    store(5, 16'h2358);    // preset TOD, shows HHMMSS live
    check("TOD preset shown", disp()[23:8], 16'h2358);
    d0 = disp();
    repeat (30) @(negedge clk);
    if (disp() != d0 && disp()[23:8] == 16'h2358) m_tod_live++;
    rtc_q.delete();
    begin
      logic [15:0] prev;
      prev = disp()[23:8];
      // run to 00:03 two days later: 1445 minutes of 600 clocks
      for (int i = 0; i < 1445 * 600 + 100; i++) begin
        @(negedge clk);
        if (disp()[23:8] != prev) begin
          if (prev == 16'h2359 && disp()[23:8] == 16'h0000) m_midnight++;
          prev = disp()[23:8];
        end
      end
    end
    begin
      rtc_ev_t exp_q [$];
      exp_q.push_back('{0, 0, 16'h2359, 1'b1});
      exp_q.push_back('{0, 1, 16'h0001, 1'b0});
      exp_q.push_back('{1, 1, 16'h0002, 1'b0});
      exp_q.push_back('{0, 0, 16'h2359, 1'b1});
      exp_q.push_back('{1, 0, 16'h0000, 1'b1});
      exp_q.push_back('{0, 1, 16'h0001, 1'b0});
      exp_q.push_back('{1, 1, 16'h0002, 1'b0});
      check("RTC event count", rtc_q.size(), exp_q.size());
      for (int i = 0; i < exp_q.size() && i < rtc_q.size(); i++) begin
        check($sformatf("RTC event %0d channel", i), rtc_q[i].ch, exp_q[i].ch);
        check($sformatf("RTC event %0d kind", i), rtc_q[i].kind, exp_q[i].kind);
        check($sformatf("RTC event %0d time", i), rtc_q[i].hhmm, exp_q[i].hhmm);
        check($sformatf("RTC event %0d gate", i), rtc_q[i].gate_now, exp_q[i].gate_now);
      end
      if (rtc_q.size() == exp_q.size()) begin
        m_rtc_gate++;
        if (rtc_q[4].ch == 1 && rtc_q[4].kind == 0) m_rtc_delay++;
      end
    end

    // ---- print cycle; a DISPLAY press meanwhile must be ignored
    printed.delete();
    d0 = disp();
    print_start = 1;
    repeat (5) @(negedge clk);
    print_start = 0;
    set_addr(3);
    display_btn = 1;
    repeat (4) @(negedge clk);
    display_btn = 0;
    while (print_active) @(negedge clk);
    if (print_done === 1'b0) m_print_block += (disp()[23:12] == d0[23:12]) ? 1 : 0;
    check("display untouched by print-time button", disp()[23:12], d0[23:12]);
    check("words printed", printed.size(), 16);
    if (printed.size() == 16) begin
      logic [15:0] exp_w [16];
      foreach (exp_w[i]) exp_w[i] = 16'h0;
      exp_w[3] = 16'h1234; exp_w[5] = disp()[23:8]; exp_w[6] = 16'h0012; exp_w[7] = 16'h1212;
      exp_w[8] = 16'h0050; exp_w[9] = 16'h0150; exp_w[10] = 16'h0021; exp_w[11] = 16'h0031;
      exp_w[12] = 16'h2359; exp_w[13] = 16'h0001; exp_w[14] = 16'h0000; exp_w[15] = 16'h0002;
      for (int i = 0; i < 16; i++) check($sformatf("printed word %0d", i), printed[i], exp_w[i]);
      m_print++;
      if (printed[5] == disp()[23:8] && printed[5] != 16'h2358) m_minute++;
    end

    // ---- coverage of mechanisms
    check("mechanism: external trigger", m_ext > 0, 1);
    check("mechanism: coincidence hold-off", m_holdoff > 0, 1);
    check("mechanism: coincidence open", m_coinc > 0, 1);
    check("mechanism: trigger delay inhibit", m_inhibit > 0, 1);
    check("mechanism: internal trigger", m_int > 0, 1);
    check("mechanism: reference frequencies", m_ref > 0, 1);
    check("mechanism: store and read-back", m_store_disp > 0, 1);
    check("mechanism: display request", m_display > 0, 1);
    check("mechanism: invalid address", m_invalid > 0, 1);
    check("mechanism: live TOD display", m_tod_live > 0, 1);
    check("mechanism: midnight", m_midnight, 2);
    check("mechanism: minute update of RAM", m_minute > 0, 1);
    check("mechanism: RTC gates", m_rtc_gate > 0, 1);
    check("mechanism: RTC day delay", m_rtc_delay > 0, 1);
    check("mechanism: print cycle", m_print > 0, 1);
    check("mechanism: buttons blocked in print", m_print_block > 0, 1);
    $display("mechanisms: ext=%0d holdoff=%0d coinc=%0d inhibit=%0d int=%0d ref=%0d store=%0d display=%0d invalid=%0d tod=%0d midnight=%0d minute=%0d rtc=%0d delay=%0d print=%0d block=%0d",
             m_ext, m_holdoff, m_coinc, m_inhibit, m_int, m_ref, m_store_disp, m_display, m_invalid,
             m_tod_live, m_midnight, m_minute, m_rtc_gate, m_rtc_delay, m_print, m_print_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
