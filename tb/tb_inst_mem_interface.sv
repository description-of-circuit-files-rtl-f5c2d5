// Testbench for inst_mem_interface: loads a program image, then fetches at
// byte addresses (word-aligned, with random low two bits, and with random
// bits above the memory's range) and checks that the word fetched is the
// one at byte address / 4, modulo the memory size.
module tb_inst_mem_interface;
  import legv8_pkg::*;
  localparam int AB = 8;
  localparam int WORDS = 1 << AB;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  word_t instr_addr, instr, load_data;
  logic [AB-1:0] load_addr;
  logic load_we;
  word_t model [WORDS];

  inst_mem_interface dut (.clk, .instr_addr, .instr, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(input word_t byte_addr);
    int w;
    instr_addr = byte_addr;
    #1;
    w = int'((byte_addr / 4) % WORDS);
    checks++;
    if (instr !== model[w]) begin
      failures++;
      $display("FAIL fetch %h -> %h, expected word %0d = %h", byte_addr, instr, w, model[w]);
    end
  endtask

  initial begin
    load_we = 1'b0; load_addr = '0; load_data = '0; instr_addr = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = AB'(i); load_data = $urandom;
      model[i] = load_data;
    end
    @(negedge clk);
    load_we = 1'b0;
    for (int i = 0; i < WORDS; i++) fetch(32'(4 * i));
    for (int i = 0; i < 2000; i++) fetch($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
