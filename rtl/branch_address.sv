// branch_address: computes the target of a taken branch.
//
// The branch offset counts 32-bit words, so it is shifted left by two to
// make a byte offset and added to the PC input. Following the component's
// pin description, the PC input is the address of the current instruction
// plus 4 (the output of the PC+4 adder), not the current PC itself.
// Purely combinational; the offset arrives already sign-extended to 32 bits,
// so its top two bits are shifted out and left unused.
module branch_address
  import legv8_pkg::*;
(
  input  word_t pc_plus4,       // PC of the current instruction plus 4
  input  word_t branch_offset,  // sign-extended word offset
  output word_t target          // pc_plus4 + 4*branch_offset
);
  assign target = pc_plus4 + {branch_offset[XLEN-3:0], 2'b00};
endmodule
