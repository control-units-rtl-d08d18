// tb_control_unit: loads a random program into the whole instruction memory,
// then runs it with random status bits driven in each cycle. Every cycle it
// checks the fetched instruction, the control word's register fields and
// write enables, the constant, and that the PC moves to PC + 1 or, for a jump
// or a taken branch, to PC + AD one clock later.
module tb_control_unit;
  import cpu_pkg::*;
  import cpu_tb_pkg::*;
  localparam int unsigned AW = 16;
  logic clk = 1'b0, rst, imem_we;
  logic [AW-1:0] imem_waddr;
  instr_t imem_wdata, instr;
  status_t status;
  dp_ctrl_t ctrl;
  logic [15:0] constant, pc;
  logic [15:0] prog [65536];
  logic [15:0] model_pc;
  int checks = 0, failures = 0;
  int n_jmp = 0, n_taken = 0, n_not = 0, n_seq = 0;

  control_unit #(.DATA_W(16), .PC_W(16), .IMEM_AW(AW)) dut (
    .clk, .rst, .status, .imem_we, .imem_waddr, .imem_wdata, .ctrl, .constant, .pc, .instr);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect16(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h %s=%h expected %h", model_pc, what, got, exp);
    end
  endtask

  initial begin
    logic [15:0] i;
    bit c;
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0; status = '0;
    for (int k = 0; k < 65536; k++) begin
      i = 16'($urandom);
      if ($urandom_range(0, 2) == 0) i[15:14] = 2'b11;   // many jumps and branches
      prog[k] = i;
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = AW'(k); imem_wdata = i;
    end
    @(negedge clk); imem_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    model_pc = '0;
    for (int k = 0; k < 20000; k++) begin
      status = 4'($urandom);
      #1;
      i = prog[model_pc];
      expect16("pc", pc, model_pc);
      expect16("instr", instr, i);
      expect16("DA/AA/BA", {7'b0, ctrl.da, ctrl.aa, ctrl.ba}, {7'b0, i[8:0]});
      expect16("constant", constant, {13'b0, i[2:0]});
      expect16("WR/MW", {14'b0, ctrl.wr, ctrl.mw},
               i[15:13] == 3'b010 ? 16'b01 : (i[15:14] == 2'b11 ? 16'b00 : 16'b10));
      @(negedge clk);
      if (i[15:13] == 3'b111) begin
        model_pc = model_pc + ad_of(i); n_jmp++;
      end else if (i[15:13] == 3'b110) begin
        c = cond_ref(i[11:9], status.v, status.c, status.n, status.z);
        if (c) begin model_pc = model_pc + ad_of(i); n_taken++; end
        else   begin model_pc = model_pc + 16'd1;    n_not++;   end
      end else begin
        model_pc = model_pc + 16'd1; n_seq++;
      end
    end
    checks++;
    if (n_jmp == 0 || n_taken == 0 || n_not == 0 || n_seq == 0) begin
      failures++; $display("FAIL coverage jmp=%0d taken=%0d not=%0d seq=%0d", n_jmp, n_taken, n_not, n_seq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
