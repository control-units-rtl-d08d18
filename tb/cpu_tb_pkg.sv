// cpu_tb_pkg: assembler helpers and reference models shared by the
// testbenches of the single-cycle processor.
//
// The reference models are written from the instruction set's meaning (what
// each instruction does, what each ALU code computes, which status bit each
// branch tests), not from the decoder's equations, so that they check the
// RTL rather than restate it. They assume 16-bit data words.
package cpu_tb_pkg;

  // ---------------------------------------------------------------- assembler
  function automatic logic [15:0] asm_reg(logic [4:0] fs, logic [2:0] dr, logic [2:0] sa, logic [2:0] sb);
    return {2'b00, fs, dr, sa, sb};
  endfunction

  function automatic logic [15:0] asm_imm(logic [4:0] fs, logic [2:0] dr, logic [2:0] sa, logic [2:0] op);
    return {2'b10, fs, dr, sa, op};
  endfunction

  // LD immediate: R[dr] <= op
  function automatic logic [15:0] asm_ldi(logic [2:0] dr, logic [2:0] op);
    return {7'b1010000, dr, 3'b000, op};
  endfunction

  // ST (R[sa]), R[sb]: M[R[sa]] <= R[sb]
  function automatic logic [15:0] asm_st(logic [2:0] sa, logic [2:0] sb);
    return {7'b0100000, 3'b000, sa, sb};
  endfunction

  // LD R[dr], (R[sa]): R[dr] <= M[R[sa]]
  function automatic logic [15:0] asm_ld(logic [2:0] dr, logic [2:0] sa);
    return {7'b0110000, dr, sa, 3'b000};
  endfunction

  // Bcc R[sa], ad
  function automatic logic [15:0] asm_br(logic [2:0] bc, logic [2:0] sa, int ad);
    logic [5:0] o;
    o = 6'(ad);
    return {4'b1100, bc, o[5:3], sa, o[2:0]};
  endfunction

  function automatic logic [15:0] asm_jmp(int ad);
    logic [5:0] o;
    o = 6'(ad);
    return {7'b1110000, o[5:3], 3'b000, o[2:0]};
  endfunction

  // ------------------------------------------------------------ ALU reference
  typedef struct {
    logic [15:0] f;
    logic v, c, n, z;
  } alu_res_t;

  function automatic alu_res_t alu_ref(logic [4:0] fs, logic [15:0] a, logic [15:0] b);
    alu_res_t r;
    int ua, ub, us, sa, sb, ss;
    bit arith;
    ua = int'(a);
    ub = int'(b);
    sa = int'($signed(a));
    sb = int'($signed(b));
    arith = 1'b1;
    // Unsigned sum us and signed sum ss of A plus the operand each code adds.
    case (fs)
      5'b00000: begin us = ua;               ss = sa;            end
      5'b00001: begin us = ua + 1;           ss = sa + 1;        end
      5'b00010: begin us = ua + ub;          ss = sa + sb;       end
      5'b00011: begin us = ua + ub + 1;      ss = sa + sb + 1;   end
      5'b00100: begin us = ua + (65535 - ub);     ss = sa - sb - 1; end
      5'b00101: begin us = ua + (65535 - ub) + 1; ss = sa - sb;     end
      5'b00110: begin us = ua + 65535;       ss = sa - 1;        end
      5'b00111: begin us = ua + 65536;       ss = sa;            end
      default:  begin arith = 1'b0; us = 0; ss = 0;               end
    endcase
    if (arith) begin
      r.f = us[15:0];
      r.c = (us >= 65536);
      r.v = (ss > 32767) || (ss < -32768);
    end else begin
      r.c = 1'b0;
      r.v = 1'b0;
      casez (fs)
        5'b0100?: r.f = a & b;
        5'b0101?: r.f = a | b;
        5'b0110?: r.f = a ^ b;
        5'b0111?: r.f = ~a;
        5'b101??: r.f = {1'b0, b[15:1]};
        5'b110??: r.f = {b[14:0], 1'b0};
        default:  r.f = b;           // 100xx and 111xx
      endcase
    end
    r.n = r.f[15];
    r.z = (r.f == 16'h0000);
    return r;
  endfunction

  // Does branch condition bc hold?
  function automatic bit cond_ref(logic [2:0] bc, logic v, logic c, logic n, logic z);
    case (bc)
      3'b000: return c == 1'b1;   // BC
      3'b001: return n == 1'b1;   // BN
      3'b010: return v == 1'b1;   // BV
      3'b011: return z == 1'b1;   // BZ
      3'b100: return c == 1'b0;   // BNC
      3'b101: return n == 1'b0;   // BNN
      3'b110: return v == 1'b0;   // BNV
      default: return z == 1'b0;  // BNZ
    endcase
  endfunction

  // Sign-extended 6-bit offset of a jump or branch.
  function automatic logic [15:0] ad_of(logic [15:0] i);
    logic [5:0] o;
    o = {i[8:6], i[2:0]};
    return {{10{o[5]}}, o};
  endfunction

  // ------------------------------------------------------- processor model
  // Architectural state and one-instruction step.
  typedef struct {
    logic [15:0] pc;
    logic [15:0] r [8];
  } arch_t;

  typedef enum int {
    K_REG_ALU, K_IMM_ALU, K_LDI, K_LD, K_ST, K_JMP, K_BR_TAKEN, K_BR_NOT, K_NKIND
  } kind_t;

  // Effect of one instruction. The data memory is passed as a 64 K-word
  // array; mem_we/mem_addr/mem_data describe a store for the caller.
  typedef struct {
    kind_t       kind;
    logic        reg_we;
    logic [2:0]  reg_addr;
    logic [15:0] reg_data;
    logic        mem_we;
    logic [15:0] mem_addr;
    logic [15:0] mem_data;
    logic [15:0] next_pc;
    logic [2:0]  bc;
  } step_t;

  function automatic step_t step_ref(ref arch_t s, ref logic [15:0] dmem [65536], input logic [15:0] i);
    step_t    e;
    alu_res_t ar;
    logic [15:0] ra, rb;
    ra = s.r[i[5:3]];
    rb = s.r[i[2:0]];
    e.reg_we = 1'b0; e.mem_we = 1'b0; e.reg_addr = i[8:6];
    e.reg_data = '0; e.mem_addr = '0; e.mem_data = '0; e.bc = i[11:9];
    e.next_pc = s.pc + 16'd1;
    case (i[15:14])
      2'b00: begin
        ar = alu_ref(i[13:9], ra, rb);
        e.kind = K_REG_ALU; e.reg_we = 1'b1; e.reg_data = ar.f;
      end
      2'b10: begin
        ar = alu_ref(i[13:9], ra, {13'b0, i[2:0]});
        e.kind = (i[13:9] == 5'b10000) ? K_LDI : K_IMM_ALU;
        e.reg_we = 1'b1; e.reg_data = ar.f;
      end
      2'b01: begin
        if (i[13]) begin
          e.kind = K_LD; e.reg_we = 1'b1; e.reg_data = dmem[ra];
        end else begin
          e.kind = K_ST; e.mem_we = 1'b1; e.mem_addr = ra; e.mem_data = rb;
        end
      end
      default: begin
        if (i[13]) begin
          e.kind = K_JMP; e.next_pc = s.pc + ad_of(i);
        end else begin
          // The branch tests register SA passed through the ALU (F = A).
          ar = alu_ref(5'b00000, ra, rb);
          if (cond_ref(i[11:9], ar.v, ar.c, ar.n, ar.z)) begin
            e.kind = K_BR_TAKEN; e.next_pc = s.pc + ad_of(i);
          end else begin
            e.kind = K_BR_NOT;
          end
        end
      end
    endcase
    if (e.reg_we) s.r[e.reg_addr] = e.reg_data;
    if (e.mem_we) dmem[e.mem_addr] = e.mem_data;
    s.pc = e.next_pc;
    return e;
  endfunction

endpackage
