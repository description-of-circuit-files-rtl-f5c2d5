// Testbench for branch_control: all eight input combinations against the
// branch rule (take the branch for B, or for CBZ with a zero ALU result).
module tb_branch_control;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic ub, cb, z, pc_src;

  branch_control dut (.uncond_branch(ub), .cond_branch(cb), .zero(z), .pc_src);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected[{ub,cb,z}]
    logic [7:0] expected;
    expected = 8'b1111_1000;  // index 3 (cb & z) and 4..7 (ub) are taken
    for (int i = 0; i < 8; i++) begin
      {ub, cb, z} = 3'(i);
      #1;
      checks++;
      if (pc_src !== expected[i]) begin
        failures++;
        $display("FAIL ub=%b cb=%b z=%b pc_src=%b", ub, cb, z, pc_src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
