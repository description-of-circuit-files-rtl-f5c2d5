// registers4: a bank of four 32-bit registers with two read ports and one
// write port, each selected by a 2-bit register number.
//
// Reads are combinational. A write of wdata into register wsel happens on
// the rising clock edge when we is 1. rst (active high, asynchronous) clears
// all four registers. This bank is the building block of the 32-register
// file (seven of them plus one registers4z).
module registers4
  import legv8_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] ra_sel,
  input  logic [1:0] rb_sel,
  input  logic [1:0] wsel,
  input  word_t      wdata,
  input  logic       we,
  output word_t      ra_data,
  output word_t      rb_data
);
  word_t regs [4];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wsel] <= wdata;
    end
  end

  assign ra_data = regs[ra_sel];
  assign rb_data = regs[rb_sel];
endmodule
