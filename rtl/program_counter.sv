// program_counter: the PC that addresses the instruction memory.
//
// On every rising clock edge the PC either steps to the next instruction
// (load = 0, PC <= PC + 1) or takes the target address computed by branch
// control (load = 1, PC <= data). This is the behaviour the processor's
// control flow is built on. The synchronous, active-high reset to address 0
// is this design's own choice.
//
// Interface: clk, rst, load, data[PC_W] in; pc[PC_W] out, valid the whole
// cycle after the edge that set it.
module program_counter #(
  parameter int unsigned PC_W = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  logic [PC_W-1:0] data,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= data;
    else           pc <= pc + PC_W'(1);
  end

endmodule
