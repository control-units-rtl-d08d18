// tb_datapath: drives the datapath with the control words of random
// register-ALU, immediate-ALU, immediate-load, LD, ST and branch
// instructions, built here from the control-signal tables, and compares the
// write-back bus, the status bits, every register and every stored word with
// the instruction-level reference model. Each operation takes one clock.
module tb_datapath;
  import cpu_pkg::*;
  import cpu_tb_pkg::*;
  logic clk = 1'b0, rst;
  dp_ctrl_t ctrl;
  logic [15:0] constant, d_bus;
  status_t status;
  arch_t s;
  logic [15:0] dmem [65536];
  int checks = 0, failures = 0;
  int kinds [K_NKIND];

  datapath #(.DATA_W(16), .DMEM_AW(16)) dut (.clk, .rst, .ctrl, .constant, .status, .d_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Control word for an instruction, from the category tables.
  function automatic dp_ctrl_t ctrl_of(logic [15:0] i);
    dp_ctrl_t c;
    c.da = i[8:6]; c.aa = i[5:3]; c.ba = i[2:0];
    c.fs = i[13:9];
    case (i[15:13])
      3'b000, 3'b001: begin c.mb = 0; c.md = 0; c.wr = 1; c.mw = 0; end
      3'b010:         begin c.mb = 0; c.md = 0; c.wr = 0; c.mw = 1; end
      3'b011:         begin c.mb = 0; c.md = 1; c.wr = 1; c.mw = 0; end
      3'b100, 3'b101: begin c.mb = 1; c.md = 0; c.wr = 1; c.mw = 0; end
      default:        begin c.mb = 0; c.md = 0; c.wr = 0; c.mw = 0; c.fs = FS_TSA; end
    endcase
    return c;
  endfunction

  function automatic logic [15:0] random_instr();
    logic [15:0] i;
    i = 16'($urandom);
    case ($urandom_range(0, 5))
      0: i[15:14] = 2'b00;
      1: i[15:14] = 2'b10;
      2: i[15:9]  = 7'b1010000;
      3: i[15:13] = 3'b010;
      4: i[15:13] = 3'b011;
      default: i[15:13] = 3'b110;
    endcase
    return i;
  endfunction

  initial begin
    logic [15:0] i;
    step_t e;
    alu_res_t ar;
    logic [15:0] ra;
    // Known memory contents so loads from anywhere can be predicted.
    for (int k = 0; k < 65536; k++) begin
      dmem[k] = 16'(k * 40503 + 7);
      dut.u_ram.mem[k] = dmem[k];
    end
    s.pc = '0;
    foreach (s.r[k]) s.r[k] = '0;
    rst = 1'b1; ctrl = '0; constant = '0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 20000; k++) begin
      // Use small register values now and then so that stores and loads
      // meet at the same addresses.
      i = random_instr();
      if (k % 50 == 0) i = asm_ldi(3'($urandom), 3'($urandom));
      ctrl = ctrl_of(i);
      constant = {13'b0, i[2:0]};
      ra = s.r[i[5:3]];
      #1;
      e = step_ref(s, dmem, i);
      kinds[e.kind]++;
      if (e.reg_we) begin
        checks++;
        if (d_bus !== e.reg_data) begin
          failures++;
          if (failures < 20) $display("FAIL %h d_bus=%h expected %h", i, d_bus, e.reg_data);
        end
      end
      if (e.kind inside {K_BR_TAKEN, K_BR_NOT}) begin
        ar = alu_ref(FS_TSA, ra, 16'h0);
        checks++;
        if (status !== {ar.v, ar.c, ar.n, ar.z}) begin
          failures++;
          if (failures < 20) $display("FAIL %h status=%b", i, status);
        end
      end
      @(negedge clk);
      foreach (s.r[r]) begin
        checks++;
        if (dut.u_regfile.regs[r] !== s.r[r]) begin
          failures++;
          if (failures < 20) $display("FAIL after %h: R%0d=%h expected %h", i, r, dut.u_regfile.regs[r], s.r[r]);
        end
      end
      if (e.mem_we) begin
        checks++;
        if (dut.u_ram.mem[e.mem_addr] !== e.mem_data) begin
          failures++;
          if (failures < 20) $display("FAIL store %h at %h", i, e.mem_addr);
        end
      end
    end
    foreach (kinds[k]) begin
      checks++;
      if (kinds[k] == 0 && k != K_JMP) begin failures++; $display("FAIL kind %0d never ran", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
