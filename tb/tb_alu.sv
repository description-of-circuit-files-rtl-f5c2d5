// Testbench for alu: random and corner operands for every operation code.
// Expected result, zero, sign, overflow and carry are computed in 64-bit
// arithmetic (carry from the unsigned sum A + B, or for subtract from
// A + ~B + 1, i.e. carry = A >= B unsigned). Codes without an operation,
// nor included, must give a 0 result; overflow and carry are raised for any
// code whose low two bits are 10.
module tb_alu;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_carry = 0;
  word_t a, b, result;
  alu_op_e op;
  logic zero, sign, overflow, carry;

  alu dut (.a, .b, .op, .zero, .result, .sign, .overflow, .carry_out(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input word_t x, input word_t y, input logic [3:0] code);
    longint sres, ures;
    word_t er;
    logic eo, ec;
    a = x; b = y; op = alu_op_e'(code);
    eo = 1'b0; ec = 1'b0;
    case (code)
      4'b0000: er = x & y;
      4'b0001: er = x | y;
      4'b0010: begin
        sres = longint'($signed(x)) + longint'($signed(y));
        ures = longint'(x) + longint'(y);
        er = sres[31:0];
        eo = sres > 64'sd2147483647 || sres < -64'sd2147483648;
        ec = ures > 64'hFFFF_FFFF;
      end
      4'b0110: begin
        sres = longint'($signed(x)) - longint'($signed(y));
        er = sres[31:0];
        eo = sres > 64'sd2147483647 || sres < -64'sd2147483648;
        ec = (x >= y);
      end
      4'b0011: er = y;
      default: begin
        // Unused codes give 0, but the adder flags still follow the
        // operation's low bits (10 marks an add-class code, bit 2 subtract).
        er = '0;
        if (code[1:0] == 2'b10) begin
          sres = code[2] ? longint'($signed(x)) - longint'($signed(y))
                         : longint'($signed(x)) + longint'($signed(y));
          ures = longint'(x) + longint'(y);
          eo = sres > 64'sd2147483647 || sres < -64'sd2147483648;
          ec = code[2] ? (x >= y) : (ures > 64'hFFFF_FFFF);
        end
      end
    endcase
    #1;
    checks++;
    if (result !== er || zero !== (er == 0) || sign !== er[31] ||
        overflow !== eo || carry !== ec) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h -> r=%h z=%b s=%b v=%b c=%b, expected r=%h v=%b c=%b",
               code, x, y, result, zero, sign, overflow, carry, er, eo, ec);
    end
    if (overflow) n_ovf++;
    if (carry) n_carry++;
  endtask

  initial begin
    logic [3:0] codes [6];
    codes = '{4'b0000, 4'b0001, 4'b0010, 4'b0110, 4'b0011, 4'b1100};
    foreach (codes[k]) begin
      try(32'h0, 32'h0, codes[k]);
      try(32'h7FFF_FFFF, 32'h1, codes[k]);
      try(32'h8000_0000, 32'hFFFF_FFFF, codes[k]);
      try(32'h8000_0000, 32'h1, codes[k]);
      try(32'hFFFF_FFFF, 32'hFFFF_FFFF, codes[k]);
      try(32'h1234_5678, 32'h1234_5678, codes[k]);
      for (int i = 0; i < 300; i++) try($urandom, $urandom, codes[k]);
    end
    for (int c = 0; c < 16; c++)
      for (int i = 0; i < 20; i++) try($urandom, $urandom, 4'(c));
    checks++;
    if (n_ovf == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL overflow or carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
