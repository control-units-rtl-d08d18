// cpu_pkg: types and constants shared by the single-cycle processor.
//
// The instruction word is 16 bits: a 7-bit opcode in bits 15-9, then three
// 3-bit fields DR (8-6), SA (5-3) and SB/OP (2-0). Jumps and branches reuse
// DR and SB as the high and low halves of a 6-bit signed offset AD. The two
// top opcode bits name the instruction category, the next five carry the ALU
// function select FS for ALU instructions, and for branches bits 11-9 carry
// the branch condition BC. Those encodings follow the instruction set the
// design was written for.
//
// The ALU function codes below are this design's own table, chosen so that
// the codes the instruction set fixes hold: 00000 and 00111 pass A, 01100 is
// XOR and 10000 passes B.
package cpu_pkg;

  localparam int unsigned INSTR_W = 16;
  localparam int unsigned REG_AW  = 3;
  localparam int unsigned AD_W    = 6;

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [REG_AW-1:0]  reg_addr_t;
  typedef logic [4:0]         fs_t;

  // Instruction category, opcode bits 6-5 (instruction bits 15-14).
  typedef enum logic [1:0] {
    CAT_REG_ALU = 2'b00,
    CAT_XFER    = 2'b01,   // LD (bit 13 = 1) and ST (bit 13 = 0)
    CAT_IMM_ALU = 2'b10,
    CAT_BRANCH  = 2'b11    // branches (bit 13 = 0) and JMP (bit 13 = 1)
  } category_t;

  // ALU function select codes.
  localparam fs_t FS_TSA   = 5'b00000;  // F = A
  localparam fs_t FS_INC   = 5'b00001;  // F = A + 1
  localparam fs_t FS_ADD   = 5'b00010;  // F = A + B
  localparam fs_t FS_ADDC1 = 5'b00011;  // F = A + B + 1
  localparam fs_t FS_ADDNB = 5'b00100;  // F = A + ~B
  localparam fs_t FS_SUB   = 5'b00101;  // F = A - B
  localparam fs_t FS_DEC   = 5'b00110;  // F = A - 1
  localparam fs_t FS_TSA2  = 5'b00111;  // F = A
  localparam fs_t FS_AND   = 5'b01000;  // F = A & B
  localparam fs_t FS_OR    = 5'b01010;  // F = A | B
  localparam fs_t FS_XOR   = 5'b01100;  // F = A ^ B
  localparam fs_t FS_NOT   = 5'b01110;  // F = ~A
  localparam fs_t FS_TSB   = 5'b10000;  // F = B
  localparam fs_t FS_SHR   = 5'b10100;  // F = B >> 1
  localparam fs_t FS_SHL   = 5'b11000;  // F = B << 1

  // Branch conditions. Bit 2 negates, bits 1-0 pick the status bit.
  typedef enum logic [2:0] {
    BC_C  = 3'b000, BC_N  = 3'b001, BC_V  = 3'b010, BC_Z  = 3'b011,
    BC_NC = 3'b100, BC_NN = 3'b101, BC_NV = 3'b110, BC_NZ = 3'b111
  } bc_t;

  // ALU status bits.
  typedef struct packed {
    logic v;
    logic c;
    logic n;
    logic z;
  } status_t;

  // Datapath control word produced by the instruction decoder.
  typedef struct packed {
    reg_addr_t da;   // destination register
    reg_addr_t aa;   // source register A
    reg_addr_t ba;   // source register B
    logic      mb;   // Mux B: 0 register B, 1 constant
    fs_t       fs;   // ALU function
    logic      md;   // Mux D: 0 ALU F, 1 data RAM OUT
    logic      wr;   // register file write
    logic      mw;   // data RAM write
  } dp_ctrl_t;

  // Inputs of branch control produced by the instruction decoder.
  typedef struct packed {
    logic            j;   // current instruction is JMP
    logic            b;   // current instruction is a conditional branch
    bc_t             bc;  // branch condition
    logic [AD_W-1:0] ad;  // signed PC-relative offset
  } br_ctrl_t;

endpackage
