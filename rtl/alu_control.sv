// alu_control: maps the 11-bit opcode straight to the 4-bit ALU operation.
//
// Unlike the textbook two-level scheme (a 2-bit ALUOp from main control),
// this unit decodes the opcode itself:
//   LDUR, STUR -> add (address = Rn + offset)
//   CBZ        -> pass B (zero flag then tests Rt)
//   ADD -> add, SUB -> sub, AND -> and, ORR -> or
// B and unknown opcodes get add; their ALU result is unused. Combinational.
module alu_control
  import legv8_pkg::*;
(
  input  opcode_t opcode,
  output alu_op_e alu_op
);
  always_comb begin
    if (opcode[10:3] == OP8_CBZ) begin
      alu_op = ALU_PASSB;
    end else begin
      case (opcode)
        OP_SUB:  alu_op = ALU_SUB;
        OP_AND:  alu_op = ALU_AND;
        OP_ORR:  alu_op = ALU_OR;
        default: alu_op = ALU_ADD;  // ADD, LDUR, STUR, B, unknown
      endcase
    end
  end
endmodule
