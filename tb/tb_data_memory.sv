// Testbench for data_memory: random processor-port and host-port writes
// and reads, compared with a model array; reads are combinational, writes
// land on the rising edge, and a same-cycle write of both ports to one
// address keeps the host's data.
module tb_data_memory;
  import legv8_pkg::*;
  localparam int AB = 8;
  localparam int WORDS = 1 << AB;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [AB-1:0] addr, host_addr;
  word_t din, dout, host_wdata, host_rdata;
  logic we, host_we;
  word_t model [WORDS];

  data_memory dut (.clk, .addr, .din, .we, .dout, .host_addr, .host_wdata, .host_we, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks++;
    if (dout !== model[addr] || host_rdata !== model[host_addr]) begin
      failures++;
      $display("FAIL [%0d]=%h (exp %h) host[%0d]=%h (exp %h)",
               addr, dout, model[addr], host_addr, host_rdata, model[host_addr]);
    end
  endtask

  initial begin
    we = 1'b0; host_we = 1'b0; addr = '0; host_addr = '0; din = '0; host_wdata = '0;
    // fill through the host port
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = AB'(i); host_wdata = $urandom;
      @(posedge clk);
      model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom); host_we = 1'($urandom);
      addr = AB'($urandom); din = $urandom;
      host_addr = (t % 7 == 0) ? addr : AB'($urandom);
      host_wdata = $urandom;
      check_reads();
      @(posedge clk);
      if (we) model[addr] = din;
      if (host_we) model[host_addr] = host_wdata;
    end
    @(negedge clk);
    we = 1'b0; host_we = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      addr = AB'(i); host_addr = AB'(WORDS - 1 - i);
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
