// Testbench for data_mem_interface: preloads the memory through the host
// port, then issues random loads and stores at byte addresses (low two bits
// and bits above the memory range random) and checks loaded values, that a
// load is 0 without MemRead, and that stores land at (address / 4) modulo
// the memory size, both through later loads and through the host port.
module tb_data_mem_interface;
  import legv8_pkg::*;
  localparam int AB = 8;
  localparam int WORDS = 1 << AB;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_load = 0, n_store = 0;
  word_t addr, wdata, rdata, host_wdata, host_rdata;
  logic mem_write, mem_read, host_we;
  logic [AB-1:0] host_addr;
  word_t model [WORDS];

  data_mem_interface dut (.clk, .addr, .wdata, .mem_write, .mem_read, .rdata,
                          .host_addr, .host_wdata, .host_we, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_write = 1'b0; mem_read = 1'b0; addr = '0; wdata = '0;
    host_we = 1'b0; host_addr = '0; host_wdata = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = AB'(i); host_wdata = $urandom;
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      int w;
      word_t exp_r;
      @(negedge clk);
      addr = $urandom; wdata = $urandom;
      case ($urandom_range(2))
        0: begin mem_read = 1'b1; mem_write = 1'b0; end
        1: begin mem_read = 1'b0; mem_write = 1'b1; end
        default: begin mem_read = 1'b0; mem_write = 1'b0; end
      endcase
      w = int'((addr / 4) % WORDS);
      #1;
      exp_r = mem_read ? model[w] : 32'h0;
      checks++;
      if (rdata !== exp_r) begin
        failures++;
        $display("FAIL load %h -> %h, expected %h", addr, rdata, exp_r);
      end
      if (mem_read) n_load++;
      @(posedge clk);
      if (mem_write) begin model[w] = wdata; n_store++; end
    end
    @(negedge clk);
    mem_write = 1'b0; mem_read = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      host_addr = AB'(i);
      #1;
      checks++;
      if (host_rdata !== model[i]) begin
        failures++;
        $display("FAIL word %0d = %h, expected %h", i, host_rdata, model[i]);
      end
    end
    checks++;
    if (n_load == 0 || n_store == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
