// zero_detect: 1 when the 32-bit input is all zeros, else 0. Combinational.
module zero_detect
  import legv8_pkg::*;
(
  input  word_t value,
  output logic  zero
);
  assign zero = (value == '0);
endmodule
