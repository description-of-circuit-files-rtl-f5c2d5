// sign_extend: picks the immediate field of an instruction and sign-extends
// it to 32 bits.
//
// Instruction bits 26 and 31 tell the three immediate-carrying formats apart:
//   bit26 = 0            D format (LDUR/STUR): 9-bit address offset, bits 20:12
//   bit26 = 1, bit31 = 1 CB format (CBZ):      19-bit branch offset, bits 23:5
//   bit26 = 1, bit31 = 0 B format (B):         26-bit branch offset, bits 25:0
// R-format instructions (ADD etc.) have bit26 = 0 and get the D-format
// value, which nothing uses. Bits 30:27 play no part in the choice.
// Combinational.
module sign_extend
  import legv8_pkg::*;
(
  input  word_t instr,
  output word_t imm
);
  always_comb begin
    if (!instr[26])
      imm = {{(XLEN-9){instr[20]}}, instr[20:12]};
    else if (instr[31])
      imm = {{(XLEN-19){instr[23]}}, instr[23:5]};
    else
      imm = {{(XLEN-26){instr[25]}}, instr[25:0]};
  end
endmodule
