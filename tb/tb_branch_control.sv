// tb_branch_control: random J/B/BC/AD/PC/status against the branch rules:
// LOAD for every jump and for a branch whose condition holds, DATA = PC + AD
// with AD signed. Also counts that every condition was seen taken and not
// taken.
module tb_branch_control;
  import cpu_pkg::*;
  import cpu_tb_pkg::*;
  localparam int unsigned PC_W = 16;
  logic j, b, load;
  bc_t bc;
  logic [5:0] ad;
  logic [PC_W-1:0] pc, data;
  status_t status;
  int checks = 0, failures = 0;
  int taken [8], not_taken [8];

  branch_control #(.PC_W(PC_W)) dut (.j, .b, .bc, .ad, .pc, .status, .load, .data);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_load, c;
    int signed off;
    for (int k = 0; k < 20000; k++) begin
      case ($urandom_range(0, 3))
        0: begin j = 0; b = 0; end
        1: begin j = 1; b = 0; end
        default: begin j = 0; b = 1; end
      endcase
      bc = bc_t'($urandom_range(0, 7));
      ad = 6'($urandom);
      pc = PC_W'($urandom);
      if (k < 4) pc = (k == 0) ? 16'h0000 : 16'hFFFF;
      status = 4'($urandom);
      #1;
      c = cond_ref(bc, status.v, status.c, status.n, status.z);
      exp_load = j || (b && c);
      if (b) begin
        if (c) taken[bc]++; else not_taken[bc]++;
      end
      off = (ad >= 32) ? int'(ad) - 64 : int'(ad);
      checks++;
      if (load !== exp_load) begin
        failures++;
        $display("FAIL load=%b expected %b (j=%b b=%b bc=%b vcnz=%b)", load, exp_load, j, b, bc, status);
      end
      checks++;
      if (data !== PC_W'(int'(pc) + off)) begin
        failures++;
        $display("FAIL data=%h expected pc %h + %0d", data, pc, off);
      end
    end
    // Worked example: BZ (011) with Z = 1 is taken.
    j = 0; b = 1; bc = BC_Z; status = '{v:0, c:0, n:0, z:1}; ad = 6'd19; pc = 16'd100; #1;
    checks++;
    if (!(load && data == 16'd119)) begin failures++; $display("FAIL BZ example"); end
    // JMP -5
    j = 1; b = 0; ad = 6'(-5); #1;
    checks++;
    if (!(load && data == 16'd95)) begin failures++; $display("FAIL JMP -5 example"); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (taken[k] == 0 || not_taken[k] == 0) begin failures++; $display("FAIL coverage bc=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
