// Testbench for memory_data: every MemWrite/MemRead combination with
// random data; the RAM sees write data and write enable only for a write,
// and the processor sees the RAM's word only for a read (0 otherwise).
module tb_memory_data;
  import legv8_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic mem_write, mem_read, ram_we;
  word_t wdata, read_value, ram_din, ram_dout;

  memory_data dut (.mem_write, .mem_read, .wdata, .read_value, .ram_din, .ram_we, .ram_dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      word_t erv, edin;
      {mem_write, mem_read} = 2'(i);
      wdata = $urandom; ram_dout = $urandom;
      #1;
      edin = mem_write ? wdata : 32'h0;
      erv  = (mem_read && !mem_write) ? ram_dout : 32'h0;
      checks++;
      if (ram_we !== mem_write || ram_din !== edin || read_value !== erv) begin
        failures++;
        $display("FAIL w=%b r=%b we=%b din=%h rv=%h", mem_write, mem_read, ram_we, ram_din, read_value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
