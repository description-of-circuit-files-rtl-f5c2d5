// Shared types and constants of the simplified LEGv8 single-cycle processor.
//
// The datapath is 32 bits wide with 32 registers; register 31 always reads
// zero. The instruction subset is the one of the classic single-cycle
// LEGv8 datapath: LDUR, STUR, ADD, SUB, AND, ORR, CBZ and B. The opcode
// values are the standard LEGv8 encodings (11-bit opcode field, bits
// 31:21); the ALU operation codes are this design's documented table
// (and 0000, or 0001, add 0010, sub 0110, pass B 0011, nor 1100 reserved).
package legv8_pkg;

  localparam int unsigned XLEN     = 32;  // data and address width
  localparam int unsigned REG_BITS = 5;   // register number width
  localparam int unsigned OPC_BITS = 11;  // opcode field width
  localparam logic [REG_BITS-1:0] ZERO_REG = 5'd31;  // XZR

  typedef logic [XLEN-1:0]     word_t;
  typedef logic [REG_BITS-1:0] reg_idx_t;
  typedef logic [OPC_BITS-1:0] opcode_t;

  // Full 11-bit opcodes of the register and load/store formats.
  localparam opcode_t OP_ADD  = 11'b100_0101_1000;
  localparam opcode_t OP_SUB  = 11'b110_0101_1000;
  localparam opcode_t OP_AND  = 11'b100_0101_0000;
  localparam opcode_t OP_ORR  = 11'b101_0101_0000;
  localparam opcode_t OP_LDUR = 11'b111_1100_0010;
  localparam opcode_t OP_STUR = 11'b111_1100_0000;
  // Branch formats use shorter opcodes: CBZ is 8 bits, B is 6 bits.
  localparam logic [7:0] OP8_CBZ = 8'b1011_0100;
  localparam logic [5:0] OP6_B   = 6'b00_0101;

  // 4-bit ALU operation.
  typedef enum logic [3:0] {
    ALU_AND   = 4'b0000,
    ALU_OR    = 4'b0001,
    ALU_ADD   = 4'b0010,
    ALU_PASSB = 4'b0011,
    ALU_SUB   = 4'b0110,
    ALU_NOR   = 4'b1100   // reserved code: the ALU gives a zero result for it
  } alu_op_e;

  // The eight control lines produced by the main control unit.
  typedef struct packed {
    logic reg2loc;       // 1: second read register is Rt (bits 4:0), 0: Rm
    logic uncond_branch; // B
    logic cond_branch;   // CBZ
    logic mem_read;
    logic mem_to_reg;    // 1: write-back value comes from data memory
    logic mem_write;
    logic alu_src;       // 1: ALU B operand is the sign-extended immediate
    logic reg_write;
  } ctrl_t;

endpackage
