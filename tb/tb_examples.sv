// tb_examples: runs the example instructions of the instruction set on the
// whole processor and checks each result in the cycle it is written:
//   LD R2,#3   LD R3,#5   ADD R1,R2,R3   SUB R1,R2,#2   ST (R3),R1
//   ST (R2),R3 LD R1,(R2) BZ R2,+19 (not taken)   LD R2,#0
//   BZ R2,+19 (taken, 9 -> 28)   JMP -5 (28 -> 23)   JMP 0 (stop)
// It also checks the control word the decoder produces for each category
// against the control-signal table (MB, MD, WR, MW, with don't-cares
// skipped) and the one-instruction-per-clock timing.
module tb_examples;
  import cpu_pkg::*;
  import cpu_tb_pkg::*;
  logic clk = 1'b0, rst, imem_we;
  logic [15:0] imem_waddr;
  instr_t imem_wdata, instr;
  logic [15:0] pc, d_bus;
  dp_ctrl_t ctrl;
  status_t status;
  logic [15:0] prog [32];
  int checks = 0, failures = 0;

  processor dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .pc, .instr, .ctrl, .status, .d_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s=%h expected %h", what, got, exp);
    end
  endtask

  // Check the fetched instruction at the expected PC, its MB/MD/WR/MW
  // (2 = don't care) and, when it writes a register, the value written.
  task automatic step(logic [15:0] exp_pc, int mb, int md, int wr, int mw, logic [15:0] exp_d);
    #1;
    expect16("pc", pc, exp_pc);
    if (mb != 2) expect16("MB", 16'(ctrl.mb), 16'(mb));
    if (md != 2) expect16("MD", 16'(ctrl.md), 16'(md));
    expect16("WR", 16'(ctrl.wr), 16'(wr));
    expect16("MW", 16'(ctrl.mw), 16'(mw));
    if (wr == 1) expect16("write-back", d_bus, exp_d);
    @(negedge clk);
  endtask

  initial begin
    foreach (prog[k]) prog[k] = asm_jmp(0);
    prog[0]  = asm_ldi(2, 3);                 // LD R2, #3
    prog[1]  = asm_ldi(3, 5);                 // LD R3, #5
    prog[2]  = asm_reg(FS_ADD, 1, 2, 3);      // ADD R1, R2, R3
    prog[3]  = asm_imm(FS_SUB, 1, 2, 2);      // SUB R1, R2, #2
    prog[4]  = asm_st(3, 1);                  // ST (R3), R1
    prog[5]  = asm_st(2, 3);                  // ST (R2), R3
    prog[6]  = asm_ld(1, 2);                  // LD R1, (R2)
    prog[7]  = asm_br(BC_Z, 2, 19);           // BZ R2, +19
    prog[8]  = asm_ldi(2, 0);                 // LD R2, #0
    prog[9]  = asm_br(BC_Z, 2, 19);           // BZ R2, +19
    prog[28] = asm_jmp(-5);                   // JMP -5
    rst = 1'b1;
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 16'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    //     pc  MB MD WR MW  value
    step(  0,  1, 0, 1, 0, 16'd3);   // LD R2,#3: constant through Mux B, ALU F = B, Mux D
    step(  1,  1, 0, 1, 0, 16'd5);
    step(  2,  0, 0, 1, 0, 16'd8);   // ADD: 3 + 5
    step(  3,  1, 0, 1, 0, 16'd1);   // SUB #2: 3 - 2
    step(  4,  0, 2, 0, 1, 16'd0);   // ST (R3),R1: M[5] <- 1
    expect16("M[5]", dut.u_dp.u_ram.mem[5], 16'd1);
    step(  5,  0, 2, 0, 1, 16'd0);   // ST (R2),R3: M[3] <- 5
    expect16("M[3]", dut.u_dp.u_ram.mem[3], 16'd5);
    step(  6,  2, 1, 1, 0, 16'd5);   // LD R1,(R2): M[3]
    step(  7,  2, 2, 0, 0, 16'd0);   // BZ R2,+19 with R2 = 3: not taken
    step(  8,  1, 0, 1, 0, 16'd0);   // LD R2,#0
    step(  9,  2, 2, 0, 0, 16'd0);   // BZ R2,+19 with R2 = 0: taken
    step( 28,  2, 2, 0, 0, 16'd0);   // JMP -5
    #1;
    expect16("pc after JMP -5", pc, 16'd23);
    expect16("R1", dut.u_dp.u_regfile.regs[1], 16'd5);
    expect16("R2", dut.u_dp.u_regfile.regs[2], 16'd0);
    expect16("R3", dut.u_dp.u_regfile.regs[3], 16'd5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
