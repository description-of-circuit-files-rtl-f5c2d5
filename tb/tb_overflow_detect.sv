// Testbench for overflow_detect: random 32-bit operand pairs are added in
// 64-bit signed arithmetic; the sign bits of the operands and of the 32-bit
// sum are fed to the block, which must flag overflow exactly when the true
// sum does not fit in 32 bits, and only for operation bits 10.
module tb_overflow_detect;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int hits = 0;
  logic as, bs, ss, ovf;
  logic [1:0] op_low;

  overflow_detect dut (.a_sign(as), .b_sign(bs), .sum_sign(ss), .op_low, .overflow(ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a, b;
      longint s;
      logic expv;
      a = $urandom; b = $urandom;
      if (i % 4 == 0) begin a[31:29] = 3'b010; b[31:29] = 3'b011; end  // force positive overflow
      if (i % 4 == 1) begin a[31:29] = 3'b100; b[31:29] = 3'b101; end  // force negative overflow
      s = longint'($signed(a)) + longint'($signed(b));
      op_low = 2'($urandom);
      as = a[31]; bs = b[31]; ss = s[31];
      expv = (op_low == 2'b10) && (s > 64'sd2147483647 || s < -64'sd2147483648);
      #1;
      checks++;
      if (ovf !== expv) begin
        failures++;
        $display("FAIL a=%h b=%h op=%b ovf=%b expected=%b", a, b, op_low, ovf, expv);
      end
      if (expv) hits++;
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no overflow case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
