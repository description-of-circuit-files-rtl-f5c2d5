// single_cycle_cpu: a simplified 32-bit LEGv8 processor that executes one
// instruction per clock cycle.
//
// Supported instructions: LDUR, STUR, ADD, SUB, AND, ORR, CBZ and B. In
// each cycle the PC addresses the instruction memory; the instruction is
// split into its fields (opcode, Rn, Rm, Rd/Rt); the main control and ALU control decode its opcode;
// the register file is read (the second read register is Rm, or Rt for
// STUR and CBZ, chosen by Reg2Loc); the ALU combines register A with
// register B or the sign-extended immediate (ALUSrc); the data memory is
// read or written at the ALU result; and the ALU result or loaded word is
// written back (MemToReg, RegWrite). On the rising clock edge the register
// file, data memory and PC are updated together.
//
// Next PC: PC+4, or the branch address when branch_control says so (B
// always, CBZ when the ALU, passing Rt through, reports zero). As in the
// branch-address unit's pin description, the branch address is
// (PC+4) + 4*offset. Standard LEGv8 adds the offset to the PC of the
// branch itself, so branch offsets here are one less than in standard
// LEGv8 code.
//
// Reset (rst, active high, asynchronous) sets the PC and every register to
// zero; data-memory writes are held off while rst is 1. The instruction
// memory load port and the data memory host port are for a host to place a
// program and data and read results, best while rst is held. The dbg_*
// outputs show the current PC, instruction, the register write-back and the
// ALU flags (sign, overflow and carry feed no condition register).
module single_cycle_cpu
  import legv8_pkg::*;
#(
  parameter int unsigned MEM_ADDR_BITS = 8  // 256-word instruction and data memories
) (
  input  logic                     clk,
  input  logic                     rst,
  // instruction memory load port
  input  logic                     imem_load_we,
  input  logic [MEM_ADDR_BITS-1:0] imem_load_addr,
  input  word_t                    imem_load_data,
  // data memory host port
  input  logic [MEM_ADDR_BITS-1:0] dmem_host_addr,
  input  word_t                    dmem_host_wdata,
  input  logic                     dmem_host_we,
  output word_t                    dmem_host_rdata,
  // observation
  output word_t                    dbg_pc,
  output word_t                    dbg_instr,
  output logic                     dbg_reg_write,
  output reg_idx_t                 dbg_write_reg,
  output word_t                    dbg_write_data,
  output logic                     dbg_pc_src,
  output logic                     dbg_alu_zero,
  output logic                     dbg_alu_sign,
  output logic                     dbg_alu_overflow,
  output logic                     dbg_alu_carry
);
  word_t    pc, pc_plus4, branch_target, pc_next;
  word_t    instr, imm;
  opcode_t  opcode;
  reg_idx_t rn, rm, rd, rb_sel;
  ctrl_t    ctrl;
  alu_op_e  alu_op;
  word_t    ra_data, rb_data, alu_b, alu_result, mem_rdata, wb_data;
  logic     alu_zero, alu_sign, alu_overflow, alu_carry;
  logic     pc_src;

  // ---------------- fetch ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  assign pc_plus4 = pc + 32'd4;

  inst_mem_interface #(.ADDR_BITS(MEM_ADDR_BITS)) u_imem_if (
    .clk,
    .instr_addr (pc),
    .instr,
    .load_we    (imem_load_we),
    .load_addr  (imem_load_addr),
    .load_data  (imem_load_data)
  );

  // ---------------- decode ----------------
  // Instruction fields (LEGv8 R/D formats): opcode 31:21, Rm 20:16,
  // shamt 15:10 (not used by this subset), Rn 9:5, Rd/Rt 4:0. The whole
  // word goes to the sign-extend unit, the opcode to both control units.
  assign opcode = instr[31:21];
  assign rm     = instr[20:16];
  assign rn     = instr[9:5];
  assign rd     = instr[4:0];

  control     u_control     (.opcode, .ctrl);
  alu_control u_alu_control (.opcode, .alu_op);

  assign rb_sel = ctrl.reg2loc ? rd : rm;

  registers u_regs (
    .clk, .rst,
    .ra_sel  (rn),
    .rb_sel  (rb_sel),
    .wsel    (rd),
    .wdata   (wb_data),
    .we      (ctrl.reg_write),
    .ra_data (ra_data),
    .rb_data (rb_data)
  );

  sign_extend u_sext (.instr, .imm);

  // ---------------- execute ----------------
  assign alu_b = ctrl.alu_src ? imm : rb_data;

  alu u_alu (
    .a (ra_data), .b (alu_b), .op (alu_op),
    .zero (alu_zero), .result (alu_result), .sign (alu_sign),
    .overflow (alu_overflow), .carry_out (alu_carry)
  );

  branch_address u_baddr (
    .pc_plus4, .branch_offset (imm), .target (branch_target)
  );

  branch_control u_bctrl (
    .uncond_branch (ctrl.uncond_branch),
    .cond_branch   (ctrl.cond_branch),
    .zero          (alu_zero),
    .pc_src
  );

  assign pc_next = pc_src ? branch_target : pc_plus4;

  // ---------------- memory ----------------
  data_mem_interface #(.ADDR_BITS(MEM_ADDR_BITS)) u_dmem_if (
    .clk,
    .addr       (alu_result),
    .wdata      (rb_data),
    .mem_write  (ctrl.mem_write & ~rst),
    .mem_read   (ctrl.mem_read),
    .rdata      (mem_rdata),
    .host_addr  (dmem_host_addr),
    .host_wdata (dmem_host_wdata),
    .host_we    (dmem_host_we),
    .host_rdata (dmem_host_rdata)
  );

  // ---------------- write-back ----------------
  assign wb_data = ctrl.mem_to_reg ? mem_rdata : alu_result;

  // ---------------- observation ----------------
  assign dbg_pc           = pc;
  assign dbg_instr        = instr;
  assign dbg_reg_write    = ctrl.reg_write;
  assign dbg_write_reg    = rd;
  assign dbg_write_data   = wb_data;
  assign dbg_pc_src       = pc_src;
  assign dbg_alu_zero     = alu_zero;
  assign dbg_alu_sign     = alu_sign;
  assign dbg_alu_overflow = alu_overflow;
  assign dbg_alu_carry    = alu_carry;
endmodule
