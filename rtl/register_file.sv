// register_file: eight general registers with two read ports and one write.
//
// Reads are combinational: A = R[AA] and B = R[BA] during the whole cycle.
// The write is synchronous: on the rising clock edge R[DA] <= D when WR = 1.
// A register written in one cycle is therefore read back with its new value
// from the next cycle on. Eight registers follow from the 3-bit register
// fields of the instruction set; the data width and the synchronous reset
// that clears every register are this design's own choices.
module register_file #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned REG_AW = 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr,
  input  logic [REG_AW-1:0] da,
  input  logic [DATA_W-1:0] d,
  input  logic [REG_AW-1:0] aa,
  input  logic [REG_AW-1:0] ba,
  output logic [DATA_W-1:0] a,
  output logic [DATA_W-1:0] b
);

  logic [DATA_W-1:0] regs [2**REG_AW];

  always_ff @(posedge clk) begin
    if (rst)     regs <= '{default: '0};
    else if (wr) regs[da] <= d;
  end

  assign a = regs[aa];
  assign b = regs[ba];

endmodule
