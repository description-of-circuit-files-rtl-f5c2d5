// Testbench for zero_detect: zero, every one-hot value, all ones and random
// values.
module tb_zero_detect;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  word_t value;
  logic zero;

  zero_detect dut (.value, .zero);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input word_t v, input logic expv);
    value = v;
    #1;
    checks++;
    if (zero !== expv) begin
      failures++;
      $display("FAIL value=%h zero=%b", v, zero);
    end
  endtask

  initial begin
    try('0, 1'b1);
    try('1, 1'b0);
    for (int i = 0; i < 32; i++) try(32'h1 << i, 1'b0);
    for (int i = 0; i < 200; i++) begin
      word_t r;
      r = $urandom;
      try(r, r == 0);
    end
    try('0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
