// mux2: two-input word multiplexer, y = sel ? in1 : in0.
//
// Used twice in the datapath. As Mux B it picks the ALU's second operand:
// register output B (sel = MB = 0) or the instruction's constant (MB = 1).
// As Mux D it picks the value written back to the register file: ALU output
// F (sel = MD = 0) or data RAM output (MD = 1). Combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
