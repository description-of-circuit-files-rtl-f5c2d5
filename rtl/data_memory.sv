// data_memory: word-addressed data RAM, 2**ADDR_BITS words of 32 bits
// (256 words, 1 KiB, by default).
//
// Processor port: combinational read of word addr on dout; din is written
// to addr on the rising clock edge when we is 1. Host port: a second read
// and write port on the same clock, used to preload data and inspect
// results; when both ports write the same cycle, the host port's write is
// applied last and so wins if the addresses match. Contents are not reset.
module data_memory
  import legv8_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  // processor port
  input  logic [ADDR_BITS-1:0] addr,
  input  word_t                din,
  input  logic                 we,
  output word_t                dout,
  // host port
  input  logic [ADDR_BITS-1:0] host_addr,
  input  word_t                host_wdata,
  input  logic                 host_we,
  output word_t                host_rdata
);
  localparam int unsigned WORDS = 1 << ADDR_BITS;

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we)      mem[addr]      <= din;
    if (host_we) mem[host_addr] <= host_wdata;
  end

  assign dout       = mem[addr];
  assign host_rdata = mem[host_addr];
endmodule
