// overflow_detect: signed overflow of an ALU add or subtract.
//
// It looks only at the sign bits of the two adder operands and of the sum.
// Overflow is an operand pair of equal sign giving a sum of the other sign.
// For a subtract the adder's B operand is the inverted B, so the caller
// passes the sign bit of the operand the adder actually used. The flag is
// only raised when the low two ALU operation bits are 10, which marks the
// add (0010) and subtract (0110) operations. Combinational.
module overflow_detect (
  input  logic       a_sign,    // bit 31 of adder operand A
  input  logic       b_sign,    // bit 31 of adder operand B (after inversion for sub)
  input  logic       sum_sign,  // bit 31 of the sum
  input  logic [1:0] op_low,    // ALU operation bits 1:0
  output logic       overflow
);
  assign overflow = (op_low == 2'b10) & (a_sign == b_sign) & (sum_sign != a_sign);
endmodule
