// End-to-end testbench for single_cycle_cpu at its default size (256-word
// instruction and data memories).
//
// A reference model of the instruction set (registers, data memory and PC
// kept in plain arrays) runs in lockstep with the processor: before every
// rising clock edge the processor's PC, its register write-back (enable,
// register, value) and its branch decision are compared with the model's
// prediction for the same instruction (and, for ADD and SUB, the ALU's
// zero, sign, overflow and carry flags), then the model executes it.
//
// Programs:
//   1. A directed program: loads constants, ADD with signed overflow, SUB
//      with carry, AND, ORR, a write to the zero register, a countdown loop
//      closed by CBZ (not taken nine times, taken once) and B, stores and a
//      reload, CBZ on the zero register, and a B-to-self halt. Final
//      memory words are also checked against hand-computed values.
//   2. Three random programs filling the whole instruction memory with the
//      eight instructions (random registers, offsets and branch targets),
//      run for a few thousand cycles each on randomly preloaded data; one
//      of them is interrupted by an asynchronous reset.
// At the end the whole data memory is compared with the model through the
// host port, and every mechanism (each instruction, CBZ taken and not
// taken, write to the zero register, ALU overflow and carry, reset) must
// have occurred at least once.
module tb_single_cycle_cpu;
  import legv8_pkg::*;
  localparam int AB    = 8;
  localparam int WORDS = 1 << AB;

  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;

  logic          imem_load_we, dmem_host_we;
  logic [AB-1:0] imem_load_addr, dmem_host_addr;
  word_t         imem_load_data, dmem_host_wdata, dmem_host_rdata;
  word_t         dbg_pc, dbg_instr, dbg_write_data;
  logic          dbg_reg_write, dbg_pc_src;
  reg_idx_t      dbg_write_reg;
  logic          dbg_alu_zero, dbg_alu_sign, dbg_alu_overflow, dbg_alu_carry;

  single_cycle_cpu dut (
    .clk, .rst,
    .imem_load_we, .imem_load_addr, .imem_load_data,
    .dmem_host_addr, .dmem_host_wdata, .dmem_host_we, .dmem_host_rdata,
    .dbg_pc, .dbg_instr, .dbg_reg_write, .dbg_write_reg, .dbg_write_data,
    .dbg_pc_src, .dbg_alu_zero, .dbg_alu_sign, .dbg_alu_overflow, .dbg_alu_carry
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler ----------------
  function automatic word_t asm_r(input opcode_t op, input int rd, input int rn, input int rm);
    return {op, 5'(rm), 6'd0, 5'(rn), 5'(rd)};
  endfunction
  function automatic word_t asm_d(input opcode_t op, input int rt, input int rn, input int off);
    return {op, 9'(off), 2'b00, 5'(rn), 5'(rt)};
  endfunction
  function automatic word_t asm_cbz(input int rt, input int off);
    return {OP8_CBZ, 19'(off), 5'(rt)};
  endfunction
  function automatic word_t asm_b(input int off);
    return {OP6_B, 26'(off)};
  endfunction

  // ---------------- reference model ----------------
  word_t m_regs [32];
  word_t m_dmem [WORDS];
  word_t m_imem [WORDS];
  word_t m_pc;

  // mechanism counters
  int n_add, n_sub, n_and, n_orr, n_ldur, n_stur, n_b, n_cbz_taken, n_cbz_not;
  int n_xzr_write, n_ovf, n_carry, n_reset;

  function automatic word_t rreg(input logic [4:0] r);
    return (r == 5'd31) ? 32'h0 : m_regs[r];
  endfunction

  // Executes the instruction at m_pc; returns what it writes back.
  // For ADD and SUB, arith is 1 and ovf/cy are the expected ALU flags.
  task automatic model_step(output logic wr, output logic [4:0] wreg,
                            output word_t wval, output logic taken,
                            output logic arith, output logic ovf, output logic cy);
    word_t w, a, b, addr;
    longint s;
    w = m_imem[(m_pc >> 2) % WORDS];
    wr = 1'b0; wreg = w[4:0]; wval = '0; taken = 1'b0;
    arith = 1'b0; ovf = 1'b0; cy = 1'b0;
    a = rreg(w[9:5]); b = rreg(w[20:16]);
    if (w[31:26] == 6'b000101) begin
      taken = 1'b1; n_b++;
      m_pc = m_pc + 4 + 4 * word_t'($signed(w[25:0]));
      return;
    end
    if (w[31:24] == 8'b1011_0100) begin
      if (rreg(w[4:0]) == 0) begin
        taken = 1'b1; n_cbz_taken++;
        m_pc = m_pc + 4 + 4 * word_t'($signed(w[23:5]));
      end else begin
        n_cbz_not++;
        m_pc = m_pc + 4;
      end
      return;
    end
    case (w[31:21])
      OP_ADD: begin
        wr = 1'b1; wval = a + b; n_add++;
        s = longint'($signed(a)) + longint'($signed(b));
        arith = 1'b1;
        ovf = (s != longint'($signed(wval)));
        cy = ({1'b0, a} + {1'b0, b}) > 33'hFFFF_FFFF;
        if (ovf) n_ovf++;
      end
      OP_SUB: begin
        wr = 1'b1; wval = a - b; n_sub++;
        s = longint'($signed(a)) - longint'($signed(b));
        arith = 1'b1;
        ovf = (s != longint'($signed(wval)));
        cy = (a >= b);
        if (cy) n_carry++;
      end
      OP_AND: begin wr = 1'b1; wval = a & b; n_and++; end
      OP_ORR: begin wr = 1'b1; wval = a | b; n_orr++; end
      OP_LDUR: begin
        addr = a + word_t'($signed(w[20:12]));
        wr = 1'b1; wval = m_dmem[(addr >> 2) % WORDS]; n_ldur++;
      end
      OP_STUR: begin
        addr = a + word_t'($signed(w[20:12]));
        m_dmem[(addr >> 2) % WORDS] = rreg(w[4:0]); n_stur++;
      end
      default: ;
    endcase
    if (wr && wreg == 5'd31) n_xzr_write++;
    if (wr && wreg != 5'd31) m_regs[wreg] = wval;
    m_pc = m_pc + 4;
  endtask

  // ---------------- loading ----------------
  task automatic load_imem(input int a, input word_t d);
    @(negedge clk);
    imem_load_we = 1'b1; imem_load_addr = AB'(a); imem_load_data = d;
    m_imem[a] = d;
    @(negedge clk);
    imem_load_we = 1'b0;
  endtask

  task automatic load_dmem(input int a, input word_t d);
    @(negedge clk);
    dmem_host_we = 1'b1; dmem_host_addr = AB'(a); dmem_host_wdata = d;
    m_dmem[a] = d;
    @(negedge clk);
    dmem_host_we = 1'b0;
  endtask

  task automatic model_reset();
    foreach (m_regs[i]) m_regs[i] = '0;
    m_pc = '0;
  endtask

  // Holds reset for two cycles, releasing it after a falling edge.
  task automatic reset_cpu();
    @(negedge clk);
    rst = 1'b1;
    model_reset();
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  // Runs n cycles in lockstep with the model, starting just after a
  // falling edge.
  task automatic run(input int n, input int reset_at);
    logic wr, taken, arith, ovf, cy;
    logic [4:0] wreg;
    word_t wval, pc_before;
    for (int c = 0; c < n; c++) begin
      if (c == reset_at) begin
        #1 rst = 1'b1;  // asynchronous reset mid-cycle
        model_reset();
        #1;
        checks++;
        if (dbg_pc !== 32'h0) begin
          failures++;
          $display("FAIL PC not cleared by reset: %h", dbg_pc);
        end
        @(negedge clk);
        rst = 1'b0;
        n_reset++;
      end
      #1;
      pc_before = m_pc;
      checks++;
      if (dbg_pc !== pc_before) begin
        failures++;
        $display("FAIL cycle %0d: pc=%h expected %h", c, dbg_pc, pc_before);
        return;
      end
      model_step(wr, wreg, wval, taken, arith, ovf, cy);
      checks++;
      if (dbg_reg_write !== wr || dbg_pc_src !== taken ||
          (wr && (dbg_write_reg !== wreg || dbg_write_data !== wval))) begin
        failures++;
        $display("FAIL pc=%h instr=%h: we=%b x%0d=%h taken=%b, expected we=%b x%0d=%h taken=%b",
                 pc_before, dbg_instr, dbg_reg_write, dbg_write_reg, dbg_write_data,
                 dbg_pc_src, wr, wreg, wval, taken);
      end
      if (arith) begin
        checks++;
        if (dbg_alu_overflow !== ovf || dbg_alu_carry !== cy ||
            dbg_alu_zero !== (wval == 0) || dbg_alu_sign !== wval[31]) begin
          failures++;
          $display("FAIL pc=%h instr=%h flags v=%b c=%b, expected v=%b c=%b",
                   pc_before, dbg_instr, dbg_alu_overflow, dbg_alu_carry, ovf, cy);
        end
      end
      @(negedge clk);
    end
  endtask

  task automatic check_dmem();
    for (int i = 0; i < WORDS; i++) begin
      dmem_host_addr = AB'(i);
      #1;
      checks++;
      if (dmem_host_rdata !== m_dmem[i]) begin
        failures++;
        $display("FAIL dmem[%0d]=%h expected %h", i, dmem_host_rdata, m_dmem[i]);
      end
    end
  endtask

  // ---------------- random program ----------------
  function automatic word_t rand_instr();
    int r1, r2, r3;
    r1 = ($urandom_range(7) == 0) ? 31 : int'($urandom_range(15));
    r2 = ($urandom_range(7) == 0) ? 31 : int'($urandom_range(15));
    r3 = ($urandom_range(7) == 0) ? 31 : int'($urandom_range(15));
    case ($urandom_range(11))
      0, 1: return asm_r(OP_ADD, r1, r2, r3);
      2, 3: return asm_r(OP_SUB, r1, r2, r3);
      4:    return asm_r(OP_AND, r1, r2, r3);
      5:    return asm_r(OP_ORR, r1, r2, r3);
      6, 7: return asm_d(OP_LDUR, r1, r2, int'($urandom_range(511)) - 256);
      8:    return asm_d(OP_STUR, r1, r2, int'($urandom_range(511)) - 256);
      9, 10: return asm_cbz(r1, int'($urandom_range(40)) - 20);
      default: return asm_b(int'($urandom_range(40)) - 20);
    endcase
  endfunction

  initial begin : main
    word_t expect_sum;
    rst = 1'b1;
    imem_load_we = 1'b0; imem_load_addr = '0; imem_load_data = '0;
    dmem_host_we = 1'b0; dmem_host_addr = '0; dmem_host_wdata = '0;
    {n_add, n_sub, n_and, n_orr, n_ldur, n_stur, n_b, n_cbz_taken, n_cbz_not} = '0;
    {n_xzr_write, n_ovf, n_carry, n_reset} = '0;
    model_reset();

    // ---------- program 1: directed ----------
    for (int i = 0; i < WORDS; i++) load_imem(i, 32'h0);  // 0 decodes as no operation
    for (int i = 0; i < WORDS; i++) load_dmem(i, $urandom);
    load_dmem(0, 32'd1);
    load_dmem(1, 32'd10);
    load_dmem(2, 32'h7FFF_FFFF);
    load_dmem(3, 32'h1234_5678);
    load_dmem(4, 32'h0F0F_0F0F);
    load_imem(0,  asm_d(OP_LDUR, 1, 31, 0));     // X1 = 1
    load_imem(1,  asm_d(OP_LDUR, 2, 31, 4));     // X2 = 10
    load_imem(2,  asm_d(OP_LDUR, 3, 31, 8));     // X3 = 0x7fffffff
    load_imem(3,  asm_d(OP_LDUR, 4, 31, 12));
    load_imem(4,  asm_d(OP_LDUR, 5, 31, 16));
    load_imem(5,  asm_r(OP_ADD, 6, 3, 1));       // overflows to 0x80000000
    load_imem(6,  asm_r(OP_SUB, 7, 4, 5));       // carry (no borrow)
    load_imem(7,  asm_r(OP_AND, 8, 4, 5));
    load_imem(8,  asm_r(OP_ORR, 9, 4, 5));
    load_imem(9,  asm_r(OP_ADD, 31, 4, 5));      // zero register: ignored
    load_imem(10, asm_r(OP_ADD, 10, 31, 31));    // X10 = 0
    load_imem(11, asm_r(OP_ADD, 10, 10, 4));     // loop: X10 += X4
    load_imem(12, asm_r(OP_SUB, 2, 2, 1));       //       X2 -= 1
    load_imem(13, asm_cbz(2, 1));                //       exit to 15 when X2 == 0
    load_imem(14, asm_b(-4));                    //       back to 11
    load_imem(15, asm_d(OP_STUR, 10, 31, 20));   // mem[5] = X10
    load_imem(16, asm_d(OP_STUR, 6, 31, 24));    // mem[6] = X6
    load_imem(17, asm_d(OP_LDUR, 11, 31, 20));   // X11 = mem[5]
    load_imem(18, asm_cbz(31, 1));               // always taken, skips 19
    load_imem(19, asm_r(OP_ADD, 12, 1, 1));
    load_imem(20, asm_b(-1));                    // halt: branch to itself
    reset_cpu();
    run(80, -1);
    checks++;
    if (dbg_pc !== 32'd80) begin
      failures++;
      $display("FAIL directed program did not halt at 80: pc=%h", dbg_pc);
    end
    rst = 1'b1;  // freeze the processor while memories are inspected and loaded
    expect_sum = 32'h1234_5678 * 10;
    dmem_host_addr = AB'(5);
    #1;
    checks++;
    if (dmem_host_rdata !== expect_sum) begin
      failures++;
      $display("FAIL loop sum %h expected %h", dmem_host_rdata, expect_sum);
    end
    dmem_host_addr = AB'(6);
    #1;
    checks++;
    if (dmem_host_rdata !== 32'h8000_0000) begin
      failures++;
      $display("FAIL overflowed sum %h", dmem_host_rdata);
    end
    check_dmem();

    // ---------- program 2: random ----------
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < WORDS; i++) load_imem(i, rand_instr());
      for (int i = 0; i < WORDS; i++) load_dmem(i, (i % 5 == 0) ? 32'h0 : $urandom);
      reset_cpu();
      run(3000, (p == 1) ? 1234 : -1);
      rst = 1'b1;
      check_dmem();
    end

    $display("executed: add=%0d sub=%0d and=%0d orr=%0d ldur=%0d stur=%0d b=%0d cbz taken=%0d not=%0d",
             n_add, n_sub, n_and, n_orr, n_ldur, n_stur, n_b, n_cbz_taken, n_cbz_not);
    $display("zero-register writes=%0d overflows=%0d carries=%0d resets=%0d",
             n_xzr_write, n_ovf, n_carry, n_reset);
    begin
      int counts [13];
      counts = '{n_add, n_sub, n_and, n_orr, n_ldur, n_stur, n_b, n_cbz_taken,
                 n_cbz_not, n_xzr_write, n_ovf, n_carry, n_reset};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
