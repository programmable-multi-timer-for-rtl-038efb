// print_control: interface to the printing loop.
// When the loop hands over (rising edge of print_start) the block prints its
// sixteen channels: for each RAM address 0..15 it waits until the memory
// controller is idle (mem_busy low, the RAM address then being print_addr),
// captures the word into prn_data, raises prn_strobe and holds it until the
// printer raises prn_ack, then waits for prn_ack to fall. After channel 15
// print_done pulses for one clock to pass the loop on. print_active is high
// for the whole cycle and blocks the pushbuttons. print_start and prn_ack
// are asynchronous and pass two-flop synchronizers. Printing the sixteen
// four-digit words from RAM follows the instrument; the request/acknowledge
// handshake stands in for the printing loop's own protocol, which is this
// design's choice.
module print_control
  import prmt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              print_start,
  input  logic              prn_ack,
  input  logic              mem_busy,
  input  logic [DATA_W-1:0] ram_data,
  output logic              print_active,
  output logic [ADDR_W-1:0] print_addr,
  output logic [DATA_W-1:0] prn_data,
  output logic              prn_strobe,
  output logic              print_done
);

  typedef enum logic [2:0] {IDLE, READ, STROBE, ACKWAIT, DONE} state_t;

  state_t     state;
  logic [2:0] start_sync;
  logic [1:0] ack_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_sync <= '0;
      ack_sync   <= '0;
      state      <= IDLE;
      print_addr <= '0;
      prn_data   <= '0;
    end else begin
      start_sync <= {start_sync[1:0], print_start};
      ack_sync   <= {ack_sync[0], prn_ack};
      unique case (state)
        IDLE: if (start_sync[1] && !start_sync[2]) begin
          print_addr <= '0;
          state      <= READ;
        end
        READ: if (!mem_busy) begin
          prn_data <= ram_data;
          state    <= STROBE;
        end
        STROBE: if (ack_sync[1]) state <= ACKWAIT;
        ACKWAIT: if (!ack_sync[1]) begin
          if (print_addr == ADDR_W'(RAM_WORDS - 1)) begin
            state <= DONE;
          end else begin
            print_addr <= print_addr + 1'b1;
            state      <= READ;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign print_active = (state != IDLE);
  assign prn_strobe   = (state == STROBE);
  assign print_done   = (state == DONE);

endmodule
