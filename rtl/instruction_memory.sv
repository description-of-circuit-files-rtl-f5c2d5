// instruction_memory: word-addressed instruction store, 2**ADDR_BITS words
// of 32 bits (256 words, 1 KiB, by default).
//
// The processor's read port is combinational: the word at raddr appears on
// rdata in the same cycle. A separate load port lets a host fill the memory
// with a program (a write of load_data to load_addr on the rising clock
// edge when load_we is 1); the processor itself never writes it. Contents
// are not reset.
module instruction_memory
  import legv8_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  // processor read port
  input  logic [ADDR_BITS-1:0] raddr,
  output word_t                rdata,
  // program load port
  input  logic                 load_we,
  input  logic [ADDR_BITS-1:0] load_addr,
  input  word_t                load_data
);
  localparam int unsigned WORDS = 1 << ADDR_BITS;

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign rdata = mem[raddr];
endmodule
