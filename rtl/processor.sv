// processor: a complete single-cycle, Harvard-architecture processor.
//
// The control unit fetches the instruction at PC from its own instruction
// memory and decodes it into a datapath control word; the datapath reads the
// source registers, runs the ALU or the data RAM, and writes the result back,
// all in one clock cycle. The ALU status bits V, C, N, Z return to branch
// control in the same cycle and decide whether a conditional branch loads
// the PC. Every instruction takes exactly one clock.
//
// Instruction set (16 bits, opcode in 15..9):
//   00 FS     register ALU    R[DR] <= R[SA] op R[SB]
//   10 FS     immediate ALU   R[DR] <= R[SA] op OP   (OP = bits 2..0, zero-extended)
//   0100xxx   ST              M[R[SA]] <= R[SB]
//   0110xxx   LD              R[DR] <= M[R[SA]]
//   110x BC   branch          if cond(BC) on R[SA] then PC <= PC + AD
//   111xxxx   JMP             PC <= PC + AD      (AD = bits 8..6,2..0, signed)
// An immediate load is the immediate ALU instruction 1010000 (F = B).
//
// Interface: clk; rst (synchronous, active high) clears the PC and the
// registers; imem_* load a program while rst is held. pc, instr, ctrl, status
// and d_bus show what the processor does in the current cycle.
module processor
  import cpu_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned PC_W    = 16,
  parameter int unsigned IMEM_AW = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  instr_t             imem_wdata,
  output logic [PC_W-1:0]    pc,
  output instr_t             instr,
  output dp_ctrl_t           ctrl,
  output status_t            status,
  output logic [DATA_W-1:0]  d_bus
);

  logic [DATA_W-1:0] constant;

  control_unit #(.DATA_W(DATA_W), .PC_W(PC_W), .IMEM_AW(IMEM_AW)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .status     (status),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .ctrl       (ctrl),
    .constant   (constant),
    .pc         (pc),
    .instr      (instr)
  );

  datapath #(.DATA_W(DATA_W), .DMEM_AW(DMEM_AW)) u_dp (
    .clk      (clk),
    .rst      (rst),
    .ctrl     (ctrl),
    .constant (constant),
    .status   (status),
    .d_bus    (d_bus)
  );

  // The program must not change while the processor runs.
  assert property (@(posedge clk) imem_we |-> rst)
    else $error("processor: instruction memory written while running");

endmodule
