// tb_memory_control: checks the RAM access sequencer. A monitor records
// every cycle in which the block writes, loads the display or strobes the
// comparator; the test then compares that log with the expected sequence:
//  * STORE: one write of the data switches to the function address with
//    store_wr, then a display load of the same address in the next cycle;
//  * DISPLAY: one display load, no write;
//  * minute update: writes TOD HHMM to 05, then strobes 12, 13, 14, 15 on
//    four consecutive cycles, ahead of a STORE requested at the same time;
//  * during a print cycle the buttons are ignored and the RAM address is
//    the print address whenever the block is idle.
module tb_memory_control;
  import prmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic store_btn = 0, display_btn = 0, minute_pulse = 0, print_active = 0;
  logic [3:0] func_addr = 0, print_addr = 0;
  logic func_valid = 1;
  logic [15:0] data_sw = 0, tod_hhmm = 0;
  logic [3:0] ram_addr;
  logic ram_we, store_wr, disp_ld, cmp_strobe, busy;
  logic [15:0] ram_wdata;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct {
    longint c;
    string  kind;
    int     addr;
    logic [15:0] data;
  } ev_t;
  ev_t log_q [$];

  memory_control dut (.clk, .rst_n, .store_btn, .display_btn, .func_addr, .func_valid,
                      .minute_pulse, .print_active, .print_addr, .data_sw, .tod_hhmm,
                      .ram_addr, .ram_we, .ram_wdata, .store_wr, .disp_ld, .cmp_strobe, .busy);

  always #50 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ram_we)     log_q.push_back('{cyc, store_wr ? "store" : "write", int'(ram_addr), ram_wdata});
    if (disp_ld)    log_q.push_back('{cyc, "show", int'(ram_addr), 16'h0});
    if (cmp_strobe) log_q.push_back('{cyc, "cmp", int'(ram_addr), 16'h0});
    if (!busy && print_active) begin
      checks++;
      if (ram_addr !== print_addr) begin failures++; $display("print address not selected"); end
    end
  end

  task automatic press(ref logic btn);
    btn = 1;
    repeat (4) @(negedge clk);
    btn = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_ev(int idx, string kind, int addr, logic [15:0] data, longint dc);
    checks++;
    if (idx >= log_q.size()) begin
      failures++;
      $display("event %0d (%s) missing", idx, kind);
    end else if (log_q[idx].kind != kind || log_q[idx].addr != addr ||
                 (kind == "store" || kind == "write") && log_q[idx].data !== data ||
                 (idx > 0 && dc >= 0 && log_q[idx].c - log_q[idx-1].c != dc)) begin
      failures++;
      $display("event %0d: got %s %0d %h, expected %s %0d %h", idx, log_q[idx].kind,
               log_q[idx].addr, log_q[idx].data, kind, addr, data);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // STORE to address 8
    func_addr = 4'd8; data_sw = 16'h1234;
    press(store_btn);
    expect_ev(0, "store", 8, 16'h1234, -1);
    expect_ev(1, "show", 8, 0, 1);
    // DISPLAY of address 3
    func_addr = 4'd3;
    press(display_btn);
    expect_ev(2, "show", 3, 0, -1);
    // minute update and a STORE at once: update first
    func_addr = 4'd2; data_sw = 16'h4321; tod_hhmm = 16'h1547;
    store_btn = 1;
    minute_pulse = 1;
    @(negedge clk);
    minute_pulse = 0;
    repeat (4) @(negedge clk);
    store_btn = 0;
    repeat (10) @(negedge clk);
    expect_ev(3, "write", 5, 16'h1547, -1);
    expect_ev(4, "cmp", 12, 0, 1);
    expect_ev(5, "cmp", 13, 0, 1);
    expect_ev(6, "cmp", 14, 0, 1);
    expect_ev(7, "cmp", 15, 0, 1);
    expect_ev(8, "store", 2, 16'h4321, -1);
    expect_ev(9, "show", 2, 0, 1);
    // invalid address: nothing happens
    func_valid = 0;
    press(store_btn);
    press(display_btn);
    checks++;
    if (log_q.size() != 10) begin failures++; $display("invalid address acted"); end
    func_valid = 1;
    // print cycle: buttons ignored, minute update still runs
    print_active = 1;
    for (int a = 0; a < 16; a++) begin
      print_addr = 4'(a);
      @(negedge clk);
    end
    press(store_btn);
    press(display_btn);
    checks++;
    if (log_q.size() != 10) begin failures++; $display("button acted during print"); end
    minute_pulse = 1;
    @(negedge clk);
    minute_pulse = 0;
    repeat (10) @(negedge clk);
    expect_ev(10, "write", 5, 16'h1547, -1);
    checks++;
    if (log_q.size() != 15) begin failures++; $display("minute update during print missing"); end
    print_active = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
