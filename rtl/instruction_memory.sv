// instruction_memory: the program store of the Harvard processor.
//
// Holds 2**IMEM_AW 16-bit instruction words. The read is combinational: the
// word at adrs appears on out in the same cycle, so that a single-cycle
// processor fetches and executes an instruction within one clock. Keeping
// instructions apart from data lets an instruction be fetched while a load or
// store uses the data memory in the same cycle.
//
// The program is meant to be in place before the processor runs and not to
// change while it runs. To put it there, this design adds a synchronous write
// port (we, waddr, wdata), written on the rising clock edge; it should be used
// only while the processor is held in reset.
module instruction_memory #(
  parameter int unsigned IMEM_AW = 16
) (
  input  logic                 clk,
  input  logic [IMEM_AW-1:0]   adrs,
  output cpu_pkg::instr_t      out,
  input  logic                 we,
  input  logic [IMEM_AW-1:0]   waddr,
  input  cpu_pkg::instr_t      wdata
);

  cpu_pkg::instr_t mem [2**IMEM_AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign out = mem[adrs];

endmodule
