// channel_ram: event memory of one Input Card channel.
//
// Each channel has a 1 Meg x 12 bit memory holding, for each of the 4096
// token numbers, 256 word locations of which 164 are used (160 ADC values
// and 4 header words). The address is {token number, word address}.
// This is a synchronous single-port RAM: a write (en & we) stores wdata at
// the clock edge; a read (en & !we) presents the word on rdata one clock
// later. The port style and latency are this design's choice and stand for
// the board's static RAM.
module channel_ram #(
  parameter int unsigned ADDR_BITS = 20,
  parameter int unsigned DATA_BITS = 12
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] addr,
  input  logic [DATA_BITS-1:0] wdata,
  output logic [DATA_BITS-1:0] rdata
);

  logic [DATA_BITS-1:0] mem [2**ADDR_BITS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
