// Testbench for alu_control: the ALU operation for every 11-bit opcode,
// against the table LDUR/STUR/ADD -> 0010, SUB -> 0110, AND -> 0000,
// ORR -> 0001, CBZ -> 0011, everything else -> 0010.
module tb_alu_control;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  opcode_t opcode;
  alu_op_e alu_op;

  alu_control dut (.opcode, .alu_op);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_op(input logic [10:0] op);
    if (op[10:3] == 8'b1011_0100) return 4'b0011;
    case (op)
      11'h658: return 4'b0110;
      11'h450: return 4'b0000;
      11'h550: return 4'b0001;
      default: return 4'b0010;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2048; i++) begin
      opcode = 11'(i);
      #1;
      checks++;
      if (alu_op !== ref_op(11'(i))) begin
        failures++;
        $display("FAIL opcode=%b alu_op=%b expected=%b", opcode, alu_op, ref_op(11'(i)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
