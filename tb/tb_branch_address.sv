// Testbench for branch_address: random PC+4 values and signed word offsets
// (off26, large and extreme), compared with PC+4 + 4*offset computed in
// 64-bit signed arithmetic and truncated to 32 bits.
module tb_branch_address;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  word_t pc_plus4, off, target;

  branch_address dut (.pc_plus4, .branch_offset(off), .target);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input word_t p, input word_t o);
    longint expv;
    pc_plus4 = p; off = o;
    #1;
    expv = longint'(p) + 4 * longint'($signed(o));
    checks++;
    if (target !== expv[31:0]) begin
      failures++;
      $display("FAIL pc+4=%h off=%h target=%h expected=%h", p, o, target, expv[31:0]);
    end
  endtask

  initial begin
    try(32'd4, 32'd0);
    try(32'd100, 32'd3);
    try(32'd100, -32'sd3);
    try(32'h0000_0008, 32'hFFFF_FFFF);
    try(32'h7FFF_FFFC, 32'h1FFF_FFFF);
    for (int i = 0; i < 500; i++) begin
      logic [25:0] off26;
      off26 = 26'($urandom);
      try($urandom & 32'hFFFF_FFFC, {{6{off26[25]}}, off26});
      try($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
