// control: main control unit of the single-cycle processor.
//
// Decodes the 11-bit opcode (instruction bits 31:21) into the eight control
// lines of ctrl_t:
//   R-format ADD/SUB/AND/ORR : RegWrite
//   LDUR                     : ALUSrc, MemRead, MemToReg, RegWrite
//   STUR                     : Reg2Loc, ALUSrc, MemWrite
//   CBZ  (opcode 10110100xxx): Reg2Loc, CondBranch
//   B    (opcode 000101xxxxx): UncondBranch
// Any other opcode drives all lines to 0, so it changes no state and the
// PC simply advances. Lines that the textbook table leaves as don't-care are
// 0 here. Combinational.
module control
  import legv8_pkg::*;
(
  input  opcode_t opcode,
  output ctrl_t   ctrl
);
  always_comb begin
    ctrl = '0;
    if (opcode[10:5] == OP6_B) begin
      ctrl.uncond_branch = 1'b1;
    end else if (opcode[10:3] == OP8_CBZ) begin
      ctrl.reg2loc     = 1'b1;
      ctrl.cond_branch = 1'b1;
    end else begin
      case (opcode)
        OP_ADD, OP_SUB, OP_AND, OP_ORR: begin
          ctrl.reg_write = 1'b1;
        end
        OP_LDUR: begin
          ctrl.alu_src    = 1'b1;
          ctrl.mem_read   = 1'b1;
          ctrl.mem_to_reg = 1'b1;
          ctrl.reg_write  = 1'b1;
        end
        OP_STUR: begin
          ctrl.reg2loc   = 1'b1;
          ctrl.alu_src   = 1'b1;
          ctrl.mem_write = 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
