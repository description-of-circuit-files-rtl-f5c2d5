// registers4z: like registers4 (four 32-bit registers, two combinational
// read ports, one write port on the rising clock edge, asynchronous
// active-high reset to zero), except that register 3 is hard-wired to zero:
// it always reads 0 and writing it has no effect. Used as the top bank
// (registers 28-31) of the register file, which makes register 31 the zero
// register.
module registers4z
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
  word_t regs [3];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 3; i++) regs[i] <= '0;
    end else if (we && wsel != 2'd3) begin
      regs[wsel] <= wdata;
    end
  end

  assign ra_data = (ra_sel == 2'd3) ? '0 : regs[ra_sel];
  assign rb_data = (rb_sel == 2'd3) ? '0 : regs[rb_sel];
endmodule
