// registers: the 32 x 32-bit register file of the processor.
//
// Two combinational read ports (A and B) and one write port. A write of
// wdata to register wsel happens on the rising clock edge when we is 1.
// rst (active high, asynchronous) clears every register. Register 31 is the
// zero register: it reads 0 and ignores writes.
// Built from eight four-register banks: register number bits 4:2 pick the
// bank and bits 1:0 the register in it. Banks 0-6 are registers4; bank 7
// (registers 28-31) is registers4z, whose register 3 is the constant zero.
// The write enable goes only to the addressed bank, and each read port
// selects the addressed bank's output.
module registers
  import legv8_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  reg_idx_t ra_sel,
  input  reg_idx_t rb_sel,
  input  reg_idx_t wsel,
  input  word_t    wdata,
  input  logic     we,
  output word_t    ra_data,
  output word_t    rb_data
);
  localparam int unsigned BANKS = 8;

  word_t bank_ra [BANKS];
  word_t bank_rb [BANKS];

  for (genvar g = 0; g < BANKS; g++) begin : g_bank
    logic bank_we;
    assign bank_we = we && (wsel[4:2] == 3'(g));
    if (g == BANKS - 1) begin : g_zero
      registers4z u_bank (
        .clk, .rst,
        .ra_sel (ra_sel[1:0]), .rb_sel (rb_sel[1:0]), .wsel (wsel[1:0]),
        .wdata, .we (bank_we),
        .ra_data (bank_ra[g]), .rb_data (bank_rb[g])
      );
    end else begin : g_plain
      registers4 u_bank (
        .clk, .rst,
        .ra_sel (ra_sel[1:0]), .rb_sel (rb_sel[1:0]), .wsel (wsel[1:0]),
        .wdata, .we (bank_we),
        .ra_data (bank_ra[g]), .rb_data (bank_rb[g])
      );
    end
  end

  assign ra_data = bank_ra[ra_sel[4:2]];
  assign rb_data = bank_rb[rb_sel[4:2]];
endmodule
