// data_ram: the processor's data memory.
//
// 2**DMEM_AW words of DATA_W bits. ADRS comes from register output A and
// DATA from the Mux B output. The read is combinational (OUT = M[ADRS] in the
// same cycle, so LD completes in one clock); the write is synchronous
// (M[ADRS] <= DATA on the rising clock edge when MW = 1). Only the low
// DMEM_AW bits of ADRS are used. Depth, combinational read and the lack of
// any reset of the contents are this design's own choices.
module data_ram #(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic              clk,
  input  logic              mw,
  input  logic [DATA_W-1:0] adrs,
  input  logic [DATA_W-1:0] data,
  output logic [DATA_W-1:0] out
);

  logic [DATA_W-1:0]  mem [2**DMEM_AW];
  logic [DMEM_AW-1:0] idx;

  assign idx = adrs[DMEM_AW-1:0];

  always_ff @(posedge clk) begin
    if (mw) mem[idx] <= data;
  end

  assign out = mem[idx];

endmodule
