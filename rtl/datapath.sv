// datapath: register file, Mux B, ALU, data RAM and Mux D.
//
// Executes one control word per clock. Register output A feeds the ALU's A
// input and the data RAM address. Mux B (select MB) chooses register output
// B or the instruction constant; its output feeds the ALU's B input and the
// data RAM's write data. Mux D (select MD) chooses the ALU result F or the
// data RAM output, and that value, d_bus, is written to register DA at the
// clock edge when WR = 1. The data RAM is written at the same edge when
// MW = 1. The connections follow the processor's datapath diagram; the data
// width is this design's choice.
//
// Interface: ctrl and constant in, status (V, C, N, Z of this cycle's ALU
// operation) and d_bus (the write-back value) out.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  dp_ctrl_t          ctrl,
  input  logic [DATA_W-1:0] constant,
  output status_t           status,
  output logic [DATA_W-1:0] d_bus
);

  logic [DATA_W-1:0] a_bus, b_reg, b_bus, f_bus, ram_out;

  register_file #(.DATA_W(DATA_W), .REG_AW(REG_AW)) u_regfile (
    .clk (clk),
    .rst (rst),
    .wr  (ctrl.wr),
    .da  (ctrl.da),
    .d   (d_bus),
    .aa  (ctrl.aa),
    .ba  (ctrl.ba),
    .a   (a_bus),
    .b   (b_reg)
  );

  mux2 #(.W(DATA_W)) u_mux_b (
    .sel (ctrl.mb),
    .in0 (b_reg),
    .in1 (constant),
    .y   (b_bus)
  );

  alu #(.DATA_W(DATA_W)) u_alu (
    .a      (a_bus),
    .b      (b_bus),
    .fs     (ctrl.fs),
    .f      (f_bus),
    .status (status)
  );

  data_ram #(.DATA_W(DATA_W), .DMEM_AW(DMEM_AW)) u_ram (
    .clk  (clk),
    .mw   (ctrl.mw),
    .adrs (a_bus),
    .data (b_bus),
    .out  (ram_out)
  );

  mux2 #(.W(DATA_W)) u_mux_d (
    .sel (ctrl.md),
    .in0 (f_bus),
    .in1 (ram_out),
    .y   (d_bus)
  );

endmodule
