// control_unit: program counter, instruction memory, decoder, branch control.
//
// Each cycle the PC addresses the instruction memory, the decoder turns the
// fetched instruction into the datapath control word and the constant, and
// branch control combines J, B, BC and AD from the decoder with the PC and
// the ALU status bits of the same cycle to choose the next PC: PC + 1, or
// PC + AD for a jump or a taken branch. The PC is the only state; everything
// else settles within the cycle. The arrangement follows the control unit
// diagram of the processor; the 16-bit PC, the zero-extension of the 3-bit
// constant and the program-load port are this design's choices.
//
// Interface: status in from the datapath; ctrl and constant out to it; pc and
// instr out for observation; imem_we/imem_waddr/imem_wdata to load a program
// while rst is held.
module control_unit
  import cpu_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned PC_W    = 16,
  parameter int unsigned IMEM_AW = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  status_t            status,
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  instr_t             imem_wdata,
  output dp_ctrl_t           ctrl,
  output logic [DATA_W-1:0]  constant,
  output logic [PC_W-1:0]    pc,
  output instr_t             instr
);

  logic            load;
  logic [PC_W-1:0] target;
  br_ctrl_t        br;
  logic [2:0]      op;

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk  (clk),
    .rst  (rst),
    .load (load),
    .data (target),
    .pc   (pc)
  );

  instruction_memory #(.IMEM_AW(IMEM_AW)) u_imem (
    .clk   (clk),
    .adrs  (IMEM_AW'(pc)),
    .out   (instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  instruction_decoder u_dec (
    .instr (instr),
    .ctrl  (ctrl),
    .br    (br),
    .op    (op)
  );

  branch_control #(.PC_W(PC_W)) u_bc (
    .j      (br.j),
    .b      (br.b),
    .bc     (br.bc),
    .ad     (br.ad),
    .pc     (pc),
    .status (status),
    .load   (load),
    .data   (target)
  );

  assign constant = DATA_W'(op);

endmodule
