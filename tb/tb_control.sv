// Testbench for control: each instruction of the subset (with random bits
// in the low opcode bits of CBZ and B) and random other opcodes, checked
// against the control table written out here as 8-bit patterns
// {Reg2Loc, UncondBranch, CondBranch, MemRead, MemToReg, MemWrite, ALUSrc,
// RegWrite}.
module tb_control;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  opcode_t opcode;
  ctrl_t ctrl;

  control dut (.opcode, .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_ctrl(input logic [10:0] op);
    if (op[10:5] == 6'b000101)       return 8'b0100_0000;  // B
    if (op[10:3] == 8'b1011_0100)    return 8'b1010_0000;  // CBZ
    case (op)
      11'h458, 11'h658, 11'h450, 11'h550: return 8'b0000_0001;  // ADD SUB AND ORR
      11'h7C2: return 8'b0001_1011;                            // LDUR
      11'h7C0: return 8'b1000_0110;                            // STUR
      default: return 8'b0000_0000;
    endcase
  endfunction

  task automatic try(input logic [10:0] op);
    opcode = op;
    #1;
    checks++;
    if (ctrl !== ref_ctrl(op)) begin
      failures++;
      $display("FAIL opcode=%b ctrl=%b expected=%b", op, ctrl, ref_ctrl(op));
    end
  endtask

  initial begin
    try(11'h458); try(11'h658); try(11'h450); try(11'h550);
    try(11'h7C2); try(11'h7C0);
    for (int i = 0; i < 8; i++)  try({8'b1011_0100, 3'(i)});
    for (int i = 0; i < 32; i++) try({6'b000101, 5'(i)});
    for (int i = 0; i < 2048; i++) try(11'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
