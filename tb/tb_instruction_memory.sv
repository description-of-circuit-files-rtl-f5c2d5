// Testbench for instruction_memory: fills every word through the load port
// with values from a seeded generator, then reads them all back in random
// order and checks each against a model array; rewrites a few words and
// checks again.
module tb_instruction_memory;
  import legv8_pkg::*;
  localparam int AB = 8;
  localparam int WORDS = 1 << AB;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [AB-1:0] raddr, load_addr;
  word_t rdata, load_data;
  logic load_we;
  word_t model [WORDS];

  instruction_memory dut (.clk, .raddr, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int a, input word_t d);
    @(negedge clk);
    load_we = 1'b1; load_addr = AB'(a); load_data = d;
    @(posedge clk);
    model[a] = d;
    @(negedge clk);
    load_we = 1'b0;
  endtask

  task automatic rd(input int a);
    raddr = AB'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL word %0d = %h, expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    load_we = 1'b0; load_addr = '0; load_data = '0; raddr = '0;
    for (int i = 0; i < WORDS; i++) load(i, $urandom);
    for (int i = 0; i < 2000; i++) rd($urandom_range(WORDS - 1));
    for (int i = 0; i < WORDS; i++) rd(i);
    load(0, 32'hDEAD_BEEF);
    load(WORDS - 1, 32'h0123_4567);
    rd(0); rd(WORDS - 1); rd(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
