// alu: the 32-bit ALU of the single-cycle datapath.
//
// Operations, selected by the 4-bit ALU control:
//   0000 and, 0001 or, 0010 add, 0110 subtract, 0011 pass B (used by CBZ,
//   which branches when register Rt is zero).
// The code 1100 (nor) is reserved and, like every other unused code, gives
// a zero result. Add and subtract share one adder: bit 2 of the control
// inverts B and supplies the carry-in, so A - B = A + ~B + 1.
// Flags: zero (result is 0), sign (bit 31 of the result), overflow (signed
// overflow) and carry out of the adder; overflow and carry are 0 unless the
// low two control bits are 10, the add/subtract class (an unused code such
// as 1010 still raises them, with a zero result). Only zero is used by
// this processor; the other flags are what a condition register would
// hold and are brought out for observation. Combinational.
module alu
  import legv8_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  alu_op_e    op,
  output logic       zero,
  output word_t      result,
  output logic       sign,
  output logic       overflow,
  output logic       carry_out
);
  logic  sub;
  word_t b_add;
  word_t sum;
  logic  cout;

  assign sub   = op[2];
  assign b_add = sub ? ~b : b;
  assign {cout, sum} = {1'b0, a} + {1'b0, b_add} + {{XLEN{1'b0}}, sub};

  always_comb begin
    unique case (op)
      ALU_AND:   result = a & b;
      ALU_OR:    result = a | b;
      ALU_ADD:   result = sum;
      ALU_SUB:   result = sum;
      ALU_PASSB: result = b;
      default:   result = '0;
    endcase
  end

  zero_detect u_zero (.value(result), .zero(zero));

  overflow_detect u_ovf (
    .a_sign   (a[XLEN-1]),
    .b_sign   (b_add[XLEN-1]),
    .sum_sign (sum[XLEN-1]),
    .op_low   (op[1:0]),
    .overflow (overflow)
  );

  assign sign      = result[XLEN-1];
  assign carry_out = (op[1:0] == 2'b10) & cout;
endmodule
