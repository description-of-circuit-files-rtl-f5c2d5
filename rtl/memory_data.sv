// memory_data: the data path between the processor and the data RAM.
//
// In a schematic with a bidirectional RAM data pin this is done with
// tri-state buffers: the processor drives the pin only while writing, and
// the RAM's value is passed on only while reading. Here the two directions
// are separate wires: write data and write enable go to the RAM only when
// MemWrite is 1, and the value read is passed to the processor only when
// MemRead is 1 and MemWrite is 0; otherwise the read output is 0 (where a
// tri-state bus would float). Combinational.
module memory_data
  import legv8_pkg::*;
(
  input  logic  mem_write,
  input  logic  mem_read,
  input  word_t wdata,       // data to memory, from the processor
  output word_t read_value,  // data from memory, to the processor
  // RAM side
  output word_t ram_din,
  output logic  ram_we,
  input  word_t ram_dout
);
  assign ram_we     = mem_write;
  assign ram_din    = mem_write ? wdata : '0;
  assign read_value = (mem_read && !mem_write) ? ram_dout : '0;
endmodule
