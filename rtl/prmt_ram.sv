// prmt_ram: the 16 x 16 parameter memory, one four-digit BCD word per
// function address. Single port: write on the clock edge when we is high,
// read asynchronously (like the small TTL RAMs of the era), so rdata shows
// the addressed word in the same cycle. All words clear at reset so the
// memory never holds undefined data. Size follows the instrument; the port
// timing and reset clearing are this design's choices.
module prmt_ram #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WORDS); i++) mem[i] <= '0;
    end else if (we) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata = mem[addr];

endmodule
