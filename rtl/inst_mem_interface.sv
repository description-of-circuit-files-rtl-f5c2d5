// inst_mem_interface: fetches the instruction at a byte address.
//
// Instructions are 32-bit words, so the byte address is turned into a word
// address by dropping its two low bits and keeping the next ADDR_BITS bits
// (bits 9:2 by default); higher address bits are ignored, so addresses wrap
// every 4*2**ADDR_BITS bytes. The word address reads the instruction memory
// held inside this block, combinationally. The memory's load port is passed
// out so that a host can place a program before the processor runs.
module inst_mem_interface
  import legv8_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  input  word_t                instr_addr,   // byte address (the PC)
  output word_t                instr,
  input  logic                 load_we,
  input  logic [ADDR_BITS-1:0] load_addr,    // word address
  input  word_t                load_data
);
  logic [ADDR_BITS-1:0] word_addr;
  assign word_addr = instr_addr[ADDR_BITS+1:2];

  instruction_memory #(.ADDR_BITS(ADDR_BITS)) u_imem (
    .clk,
    .raddr (word_addr),
    .rdata (instr),
    .load_we, .load_addr, .load_data
  );
endmodule
