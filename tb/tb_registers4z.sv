// Testbench for registers4z: random writes and two random reads per cycle,
// compared with a model array of 4 registers updated on the same clock
// edges; register 3 must read 0 and ignore writes. Also checks the asynchronous reset to zero, in
// the middle of a run, and that a write with we = 0 changes nothing.
module tb_registers4z;
  import legv8_pkg::*;
  localparam int N    = 4;
  localparam int ZERO = 3;  // hard-wired zero register, -1 if none
  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  logic [2-1:0] ra_sel, rb_sel, wsel;
  word_t wdata, ra_data, rb_data;
  logic we;
  word_t model [N];

  registers4z dut (.clk, .rst, .ra_sel, .rb_sel, .wsel, .wdata, .we, .ra_data, .rb_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    word_t ea, eb;
    #1;
    ea = (int'(ra_sel) == ZERO) ? '0 : model[ra_sel];
    eb = (int'(rb_sel) == ZERO) ? '0 : model[rb_sel];
    checks++;
    if (ra_data !== ea || rb_data !== eb) begin
      failures++;
      $display("FAIL ra[%0d]=%h (exp %h) rb[%0d]=%h (exp %h)", ra_sel, ra_data, ea, rb_sel, rb_data, eb);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    #2;
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
  endtask

  initial begin
    we = 1'b0; wsel = '0; wdata = '0; ra_sel = '0; rb_sel = '0;
    rst = 1'b0;
    @(negedge clk);
    do_reset();
    // all registers read zero after reset
    for (int i = 0; i < N; i++) begin
      ra_sel = 2'(i); rb_sel = 2'(N - 1 - i);
      check_reads();
    end
    // write every register once with a distinct value, then read all back
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1'b1; wsel = 2'(i); wdata = 32'hA5A5_0000 + 32'(i);
      @(posedge clk);
      if (i != ZERO) model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < N; i++) begin
      ra_sel = 2'(i); rb_sel = 2'(i);
      check_reads();
    end
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      wsel = 2'($urandom);
      wdata = $urandom;
      ra_sel = 2'($urandom);
      rb_sel = 2'($urandom);
      check_reads();  // reads are combinational: old value until the edge
      @(posedge clk);
      if (we && int'(wsel) != ZERO) model[wsel] = wdata;
      if (t == 1500) begin
        @(negedge clk);
        we = 1'b0;
        do_reset();
        for (int i = 0; i < N; i++) begin
          ra_sel = 2'(i); rb_sel = 2'(i);
          check_reads();
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
