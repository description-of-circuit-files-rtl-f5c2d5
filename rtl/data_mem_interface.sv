// data_mem_interface: load/store access to the data memory.
//
// The byte address from the ALU becomes a word address by dropping its two
// low bits and keeping the next ADDR_BITS bits (bits 9:2 by default); higher
// bits are ignored. memory_data gates the two data directions by MemWrite
// and MemRead, and data_memory, held inside this block, stores the words.
// A store (MemWrite) takes effect on the rising clock edge; a load
// (MemRead) returns the word combinationally in the same cycle; with
// MemRead at 0 the read value is 0. The memory's host port is passed out
// for preloading and inspecting data.
module data_mem_interface
  import legv8_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  input  word_t                addr,        // byte address
  input  word_t                wdata,       // data to memory
  input  logic                 mem_write,
  input  logic                 mem_read,
  output word_t                rdata,       // data read from memory
  // host port of the memory
  input  logic [ADDR_BITS-1:0] host_addr,   // word address
  input  word_t                host_wdata,
  input  logic                 host_we,
  output word_t                host_rdata
);
  logic [ADDR_BITS-1:0] word_addr;
  word_t ram_din, ram_dout;
  logic  ram_we;

  assign word_addr = addr[ADDR_BITS+1:2];

  memory_data u_md (
    .mem_write, .mem_read, .wdata,
    .read_value (rdata),
    .ram_din, .ram_we, .ram_dout
  );

  data_memory #(.ADDR_BITS(ADDR_BITS)) u_dmem (
    .clk,
    .addr (word_addr), .din (ram_din), .we (ram_we), .dout (ram_dout),
    .host_addr, .host_wdata, .host_we, .host_rdata
  );
endmodule
