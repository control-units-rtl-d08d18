// instruction_decoder: turns one 16-bit instruction into control signals.
//
// Purely combinational. The instruction set was laid out so that almost every
// signal is a field of the instruction or a small function of its top three
// bits I15..I13:
//   DA = I8..6, AA = I5..3, BA = I2..0 (unused fields are don't-cares)
//   MB = I15, MD = I14, WR = I14' + I15' I13, MW = I15' I14 I13'
//   FS = I13..9
//   J  = I15 I14 I13, B = I15 I14 I13', BC = I11..9, AD = I8..6 & I2..0
// These equations follow the instruction set the design was written for.
// One exception is this design's reading: for a conditional branch the
// field I13..9 is 0 x BC, not a pass-through ALU code, while the branch needs
// the ALU to pass register A so that the status bits describe it. The decoder
// therefore forces FS = 00000 (F = A) for the whole branch/jump category.
//
// Interface: instr in; ctrl (datapath control word), br (J, B, BC, AD for
// branch control) and op (the 3-bit constant operand, I2..0) out.
module instruction_decoder
  import cpu_pkg::*;
(
  input  instr_t   instr,
  output dp_ctrl_t ctrl,
  output br_ctrl_t br,
  output logic [2:0] op
);

  logic i15, i14, i13;
  assign {i15, i14, i13} = instr[15:13];

  always_comb begin
    ctrl.da = instr[8:6];
    ctrl.aa = instr[5:3];
    ctrl.ba = instr[2:0];
    ctrl.mb = i15;
    ctrl.md = i14;
    ctrl.wr = ~i14 | (~i15 & i13);
    ctrl.mw = ~i15 & i14 & ~i13;
    ctrl.fs = (i15 & i14) ? FS_TSA : instr[13:9];

    br.j  = i15 & i14 & i13;
    br.b  = i15 & i14 & ~i13;
    br.bc = bc_t'(instr[11:9]);
    br.ad = {instr[8:6], instr[2:0]};
  end

  assign op = instr[2:0];

  // A decoded instruction never writes both a register and the data RAM,
  // and is never both a jump and a branch.
  always_comb begin
    assert (!(ctrl.wr && ctrl.mw)) else $error("decoder: WR and MW both set");
    assert (!(br.j && br.b))       else $error("decoder: J and B both set");
  end

endmodule
