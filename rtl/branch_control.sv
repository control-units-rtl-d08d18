// branch_control: chooses the next value of the program counter.
//
// Combinational. For an ordinary instruction (J = 0, B = 0) LOAD is 0 and the
// PC increments. For JMP (J = 1) LOAD is 1. For a conditional branch (B = 1)
// LOAD is 1 only when the condition BC holds on the ALU status bits of the
// same cycle: BC2 negates, BC1..0 pick C, N, V or Z (BC 011 = BZ, 111 = BNZ).
// DATA is always PC + AD, with the 6-bit offset AD sign-extended, so jumps
// and branches are PC-relative and may go backwards. The condition codes and
// the PC + AD target follow the instruction set; reading BC as a negate bit
// plus a selector is this design's way of building that table.
//
// Interface: j, b, bc, ad, pc, status in; load, data out.
module branch_control
  import cpu_pkg::*;
#(
  parameter int unsigned PC_W = 16
) (
  input  logic            j,
  input  logic            b,
  input  bc_t             bc,
  input  logic [AD_W-1:0] ad,
  input  logic [PC_W-1:0] pc,
  input  status_t         status,
  output logic            load,
  output logic [PC_W-1:0] data
);

  logic flag, cond;

  always_comb begin
    unique case (bc[1:0])
      2'b00: flag = status.c;
      2'b01: flag = status.n;
      2'b10: flag = status.v;
      2'b11: flag = status.z;
    endcase
    cond = flag ^ bc[2];
    load = j | (b & cond);
    data = pc + PC_W'($signed(ad));
  end

endmodule
