// Testbench for sign_extend: builds LDUR/STUR, CBZ and B instructions (and
// R-format ones) around random signed immediates, with random bits in the
// other fields, and checks that the output is the immediate as a signed
// 32-bit number.
module tb_sign_extend;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  word_t instr, imm;

  sign_extend dut (.instr, .imm);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int expv);
    #1;
    checks++;
    if ($signed(imm) != expv) begin
      failures++;
      $display("FAIL %s instr=%h imm=%h expected=%0d", what, instr, imm, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < 600; i++) begin
      int v;
      int unsigned r;
      r = $urandom;
      // D format: 9-bit offset in [-256, 255]
      v = int'($urandom_range(511)) - 256;
      instr = {(i[0] ? OP_LDUR : OP_STUR), 9'(v), 2'b00, 10'(r)};
      chk("D", v);
      // CB format: 19-bit offset
      v = int'($urandom_range(524287)) - 262144;
      instr = {OP8_CBZ, 19'(v), 5'(r)};
      chk("CB", v);
      // B format: 26-bit offset
      v = int'($urandom_range(67108863)) - 33554432;
      instr = {OP6_B, 26'(v)};
      chk("B", v);
      // R format: the field at 20:12 is taken as in D format
      instr = {OP_ADD, 21'(r)};
      chk("R", int'($signed(instr[20:12])));
    end
    // extremes
    instr = {OP_LDUR, 9'h100, 12'h0}; chk("Dmin", -256);
    instr = {OP_LDUR, 9'h0FF, 12'h0}; chk("Dmax", 255);
    instr = {OP8_CBZ, 19'h40000, 5'h0}; chk("CBmin", -262144);
    instr = {OP6_B, 26'h2000000}; chk("Bmin", -33554432);
    instr = {OP6_B, 26'h1FFFFFF}; chk("Bmax", 33554431);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
