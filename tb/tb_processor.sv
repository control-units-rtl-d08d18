// tb_processor: end-to-end test of the whole processor at its default sizes.
//
// Part 1 runs a short hand-written program: immediate loads, a loop that
// multiplies 3 by 5 by repeated addition (ADD, SUB #1, BNZ back), a store and
// a load through a register address, XOR, a taken BZ, forward and backward
// JMPs, a negative result and a taken BN, ending in a JMP-to-itself. It checks
// the final registers and memory word and that the program took exactly one
// clock per instruction.
//
// Part 2 fills the whole instruction memory with a random program and the
// whole data memory with a known pattern, then runs 200,000 cycles in
// lockstep with the instruction-level reference model (jump and branch
// offsets there point forward, so the PC sweeps the whole memory), comparing PC, fetched
// instruction, write-back value, all registers and every store each cycle.
// Every kind of instruction must occur, and every N and Z branch condition
// both taken and not taken.
module tb_processor;
  import cpu_pkg::*;
  import cpu_tb_pkg::*;
  logic clk = 1'b0, rst, imem_we;
  logic [15:0] imem_waddr;
  instr_t imem_wdata, instr;
  logic [15:0] pc, d_bus;
  dp_ctrl_t ctrl;
  status_t status;
  logic [15:0] prog [65536];
  logic [15:0] dmem [65536];
  arch_t s;
  int checks = 0, failures = 0;
  int kinds [K_NKIND];
  int taken [8], not_taken [8];

  processor dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc, .instr, .ctrl, .status, .d_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s=%h expected %h (pc %h)", what, got, exp, s.pc);
    end
  endtask

  // Hold reset, write prog[] into the instruction memory, release reset.
  task automatic load_and_reset(int words);
    rst = 1'b1;
    for (int k = 0; k < words; k++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 16'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    s.pc = '0;
    foreach (s.r[k]) s.r[k] = '0;
  endtask

  function automatic logic [15:0] random_instr();
    logic [15:0] i;
    i = 16'($urandom);
    case ($urandom_range(0, 9))
      0, 1:    i[15:14] = 2'b00;
      2, 3:    i[15:14] = 2'b10;
      4:       i[15:9]  = 7'b1010000;
      5:       i[15:13] = 3'b010;
      6:       i[15:13] = 3'b011;
      7, 8:    i[15:13] = 3'b110;
      default: i[15:13] = 3'b111;
    endcase
    // Forward offsets (1..31) only, so the random program cannot trap itself
    // in a short loop; backward jumps and branches are covered in part 1.
    if (i[15:14] == 2'b11) begin
      i[8] = 1'b0;
      if ({i[7:6], i[2:0]} == 5'b0) i[0] = 1'b1;
    end
    return i;
  endfunction

  // One lockstep cycle: compare, step the model, clock, compare state.
  task automatic lockstep();
    step_t e;
    logic [15:0] i;
    #1;
    i = prog[s.pc];
    expect16("pc", pc, s.pc);
    expect16("instr", instr, i);
    e = step_ref(s, dmem, i);
    kinds[e.kind]++;
    if (e.kind == K_BR_TAKEN) taken[e.bc]++;
    if (e.kind == K_BR_NOT)   not_taken[e.bc]++;
    if (e.reg_we) expect16("d_bus", d_bus, e.reg_data);
    @(negedge clk);
    foreach (s.r[r]) expect16($sformatf("R%0d", r), dut.u_dp.u_regfile.regs[r], s.r[r]);
    if (e.mem_we) expect16("stored word", dut.u_dp.u_ram.mem[e.mem_addr], e.mem_data);
  endtask

  initial begin
    int cycles;
    logic [15:0] halt;
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;

    // ------------------------------------------------------------ part 1
    halt = asm_jmp(0);
    prog[0]  = asm_ldi(1, 3);                      // R1 <- 3
    prog[1]  = asm_ldi(2, 5);                      // R2 <- 5
    prog[2]  = asm_ldi(3, 0);                      // R3 <- 0
    prog[3]  = asm_reg(FS_ADD, 3, 3, 1);           // R3 <- R3 + R1
    prog[4]  = asm_imm(FS_SUB, 2, 2, 1);           // R2 <- R2 - 1
    prog[5]  = asm_br(BC_NZ, 2, -2);               // BNZ R2, -2
    prog[6]  = asm_ldi(4, 6);                      // R4 <- 6
    prog[7]  = asm_st(4, 3);                       // ST (R4), R3
    prog[8]  = asm_ld(5, 4);                       // LD R5, (R4)
    prog[9]  = asm_reg(FS_XOR, 6, 5, 1);           // R6 <- R5 ^ R1
    prog[10] = asm_br(BC_Z, 2, 2);                 // BZ R2, +2
    prog[11] = asm_ldi(7, 7);                      // skipped
    prog[12] = asm_jmp(3);                         // JMP +3
    prog[13] = asm_ldi(7, 1);                      // skipped
    prog[14] = halt;                               // JMP 0: stop here
    prog[15] = asm_reg(FS_SUB, 7, 6, 5);           // R7 <- R6 - R5 = -3
    prog[16] = asm_br(BC_N, 7, 2);                 // BN R7, +2
    prog[17] = asm_ldi(0, 7);                      // skipped
    prog[18] = asm_jmp(-4);                        // JMP -4 -> 14
    load_and_reset(19);
    cycles = 0;
    while (instr !== halt && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    expect16("instructions to reach halt", 16'(cycles), 16'd27);
    expect16("halt pc", pc, 16'd14);
    expect16("R0", dut.u_dp.u_regfile.regs[0], 16'd0);
    expect16("R1", dut.u_dp.u_regfile.regs[1], 16'd3);
    expect16("R2", dut.u_dp.u_regfile.regs[2], 16'd0);
    expect16("R3", dut.u_dp.u_regfile.regs[3], 16'd15);
    expect16("R4", dut.u_dp.u_regfile.regs[4], 16'd6);
    expect16("R5", dut.u_dp.u_regfile.regs[5], 16'd15);
    expect16("R6", dut.u_dp.u_regfile.regs[6], 16'd12);
    expect16("R7", dut.u_dp.u_regfile.regs[7], 16'hFFFD);
    expect16("M[6]", dut.u_dp.u_ram.mem[6], 16'd15);
    // The halt loop keeps the PC where it is.
    repeat (3) @(negedge clk);
    expect16("pc stays", pc, 16'd14);

    // ------------------------------------------------------------ part 2
    for (int k = 0; k < 65536; k++) begin
      prog[k] = random_instr();
      dmem[k] = 16'(k * 31421 + 1234);
      dut.u_dp.u_ram.mem[k] = dmem[k];
    end
    load_and_reset(65536);
    repeat (200000) lockstep();

    foreach (kinds[k]) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("FAIL instruction kind %0d never ran", k); end
    end
    // A branch passes register SA through the ALU (F = A), which leaves C
    // and V at 0: BC and BV are never taken, BNC and BNV always are. N and Z
    // conditions must be seen both ways.
    for (int k = 0; k < 8; k++) begin
      bit ok;
      case (k)
        0, 2:    ok = (taken[k] == 0) && (not_taken[k] > 0);
        4, 6:    ok = (taken[k] > 0) && (not_taken[k] == 0);
        default: ok = (taken[k] > 0) && (not_taken[k] > 0);
      endcase
      checks++;
      if (!ok) begin
        failures++; $display("FAIL branch condition %0d: taken %0d, not taken %0d", k, taken[k], not_taken[k]);
      end
    end
    $display("reg ALU %0d, imm ALU %0d, imm load %0d, LD %0d, ST %0d, JMP %0d, branch taken %0d, not taken %0d",
             kinds[K_REG_ALU], kinds[K_IMM_ALU], kinds[K_LDI], kinds[K_LD], kinds[K_ST], kinds[K_JMP],
             kinds[K_BR_TAKEN], kinds[K_BR_NOT]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
