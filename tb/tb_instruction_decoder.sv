// tb_instruction_decoder: all 65536 instruction words against the control
// signal tables of the instruction set. Entries the tables mark as
// don't-care (MB for LD, MD for ST, MB/MD for jumps and branches, FS outside
// ALU instructions and branches) are not compared.
module tb_instruction_decoder;
  import cpu_pkg::*;
  instr_t   instr;
  dp_ctrl_t ctrl;
  br_ctrl_t br;
  logic [2:0] op;
  int checks = 0, failures = 0;

  instruction_decoder dut (.instr, .ctrl, .br, .op);

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %h %s=%b expected %b", instr, what, got, exp);
    end
  endtask

  task automatic expect_vec(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %h %s=%h expected %h", instr, what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 65536; k++) begin
      instr = 16'(k);
      #1;
      // Register fields are always taken straight from the instruction.
      expect_vec("DA", 16'(ctrl.da), 16'(instr[8:6]));
      expect_vec("AA", 16'(ctrl.aa), 16'(instr[5:3]));
      expect_vec("BA", 16'(ctrl.ba), 16'(instr[2:0]));
      expect_vec("OP", 16'(op), 16'(instr[2:0]));
      expect_vec("BC", 16'(br.bc), 16'(instr[11:9]));
      expect_vec("AD", 16'(br.ad), {10'b0, instr[8:6], instr[2:0]});
      unique casez (instr[15:13])
        3'b00?: begin // register ALU
          expect_bit("MB", ctrl.mb, 0); expect_bit("MD", ctrl.md, 0);
          expect_bit("WR", ctrl.wr, 1); expect_bit("MW", ctrl.mw, 0);
          expect_vec("FS", 16'(ctrl.fs), 16'(instr[13:9]));
          expect_bit("J", br.j, 0); expect_bit("B", br.b, 0);
        end
        3'b010: begin // ST
          expect_bit("MB", ctrl.mb, 0);
          expect_bit("WR", ctrl.wr, 0); expect_bit("MW", ctrl.mw, 1);
          expect_bit("J", br.j, 0); expect_bit("B", br.b, 0);
        end
        3'b011: begin // LD
          expect_bit("MD", ctrl.md, 1);
          expect_bit("WR", ctrl.wr, 1); expect_bit("MW", ctrl.mw, 0);
          expect_bit("J", br.j, 0); expect_bit("B", br.b, 0);
        end
        3'b10?: begin // immediate ALU
          expect_bit("MB", ctrl.mb, 1); expect_bit("MD", ctrl.md, 0);
          expect_bit("WR", ctrl.wr, 1); expect_bit("MW", ctrl.mw, 0);
          expect_vec("FS", 16'(ctrl.fs), 16'(instr[13:9]));
          expect_bit("J", br.j, 0); expect_bit("B", br.b, 0);
        end
        3'b110: begin // branch: ALU passes A
          expect_bit("WR", ctrl.wr, 0); expect_bit("MW", ctrl.mw, 0);
          checks++;
          if (!(ctrl.fs inside {5'b00000, 5'b00111})) begin
            failures++;
            if (failures < 20) $display("FAIL %h branch FS=%b", instr, ctrl.fs);
          end
          expect_bit("J", br.j, 0); expect_bit("B", br.b, 1);
        end
        3'b111: begin // JMP
          expect_bit("WR", ctrl.wr, 0); expect_bit("MW", ctrl.mw, 0);
          expect_bit("J", br.j, 1); expect_bit("B", br.b, 0);
        end
      endcase
    end
    // Spot checks of the worked examples: register XOR opcode 0001100,
    // immediate load opcode 1010000 (F = B).
    instr = {7'b0001100, 3'd1, 3'd2, 3'd3}; #1;
    expect_vec("XOR FS", 16'(ctrl.fs), 16'(FS_XOR));
    instr = {7'b1010000, 3'd2, 3'd0, 3'b011}; #1;
    expect_vec("LDI FS", 16'(ctrl.fs), 16'(FS_TSB));
    expect_bit("LDI MB", ctrl.mb, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
