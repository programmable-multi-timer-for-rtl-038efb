// memory_control: sequencer and address/data selectors of the parameter RAM.
// Three kinds of access share the single RAM port:
//  * STORE pushbutton: the data thumbwheels are written to the selected
//    function address (store_wr also loads that function's data latch), and
//    in the next cycle the same word is read back into the display.
//  * DISPLAY pushbutton: the selected word is read into the display.
//  * Once a minute (minute_pulse from the time-of-day clock) a binary
//    counter walks five addresses: 05, where the current HHMM is written,
//    then 12, 13, 14 and 15, whose RTC start/stop times are read out with
//    cmp_strobe for the RTC comparator. This takes five clocks.
// Each request is remembered until it is served; the minute update goes
// first, then STORE, then DISPLAY. While print_active is high the
// pushbuttons are ignored and, whenever this block is idle (busy low), the
// RAM address comes from the print controller. Pushbuttons are taken as
// already debounced, pass a two-flop synchronizer and act on the press
// edge. The three address sources and the once-a-minute five-address update
// follow the instrument; the address sequence 05,12..15, the priorities and
// the cycle timing are this design's.
module memory_control
  import prmt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              store_btn,
  input  logic              display_btn,
  input  logic [ADDR_W-1:0] func_addr,
  input  logic              func_valid,
  input  logic              minute_pulse,
  input  logic              print_active,
  input  logic [ADDR_W-1:0] print_addr,
  input  logic [DATA_W-1:0] data_sw,
  input  logic [DATA_W-1:0] tod_hhmm,
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_we,
  output logic [DATA_W-1:0] ram_wdata,
  output logic              store_wr,     // user store executes this cycle
  output logic              disp_ld,      // load display from RAM this cycle
  output logic              cmp_strobe,   // RTC time word on RAM output
  output logic              busy
);

  typedef enum logic [1:0] {IDLE, UPDATE, STORE, SHOW} state_t;

  state_t     state;
  logic [2:0] step;                       // binary counter of the update
  logic [2:0] st_sync, dp_sync;           // synchronizer + previous value
  logic       store_pend, disp_pend, min_pend;
  logic       store_edge, disp_edge;
  logic [ADDR_W-1:0] upd_addr;

  assign store_edge = st_sync[1] && !st_sync[2] && !print_active;
  assign disp_edge  = dp_sync[1] && !dp_sync[2] && !print_active;
  assign upd_addr   = (step == 3'd0) ? A_TOD : A_RTC1_START + ADDR_W'(step - 3'd1);
  assign busy       = (state != IDLE);

  always_comb begin
    ram_we     = 1'b0;
    ram_wdata  = data_sw;
    store_wr   = 1'b0;
    disp_ld    = 1'b0;
    cmp_strobe = 1'b0;
    ram_addr   = print_active ? print_addr : func_addr;
    unique case (state)
      UPDATE: begin
        ram_addr = upd_addr;
        if (step == 3'd0) begin
          ram_we    = 1'b1;
          ram_wdata = tod_hhmm;
        end else begin
          cmp_strobe = 1'b1;
        end
      end
      STORE: begin
        ram_addr = func_addr;
        ram_we   = func_valid;
        store_wr = func_valid;
      end
      SHOW: begin
        ram_addr = func_addr;
        disp_ld  = func_valid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_sync    <= '0;
      dp_sync    <= '0;
      store_pend <= 1'b0;
      disp_pend  <= 1'b0;
      min_pend   <= 1'b0;
      state      <= IDLE;
      step       <= '0;
    end else begin
      st_sync <= {st_sync[1:0], store_btn};
      dp_sync <= {dp_sync[1:0], display_btn};
      if (store_edge)   store_pend <= 1'b1;
      if (disp_edge)    disp_pend  <= 1'b1;
      if (minute_pulse) min_pend   <= 1'b1;
      unique case (state)
        IDLE: begin
          if (min_pend) begin
            min_pend <= minute_pulse;
            step     <= '0;
            state    <= UPDATE;
          end else if (store_pend) begin
            store_pend <= store_edge;
            state      <= STORE;
          end else if (disp_pend) begin
            disp_pend <= disp_edge;
            state     <= SHOW;
          end
        end
        UPDATE: begin
          step <= step + 3'd1;
          if (step == 3'd4) state <= IDLE;
        end
        STORE:   state <= SHOW;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
