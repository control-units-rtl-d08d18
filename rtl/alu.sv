// alu: arithmetic, logic and shift unit with status bits V, C, N, Z.
//
// Combinational. The 5-bit function select FS is decoded in three groups:
//   FS4..3 = 00  arithmetic, F = A + Y + FS0, where FS2..1 = 00, 01, 10, 11
//                gives Y = 0, B, ~B, all ones. This yields A, A+1, A+B,
//                A+B+1, A+~B, A-B, A-1 and A again for 00000..00111.
//   FS4..3 = 01  logic, FS2..1 = 00 AND, 01 OR, 10 XOR, 11 NOT A.
//   FS4    = 1   FS3..2 = 00 F = B, 01 B shifted right, 10 B shifted left,
//                11 F = B.
// N is the top bit of F and Z is set when F is zero. C is the adder's carry
// out and V its two's-complement overflow; both are 0 outside the arithmetic
// group. The codes the instruction set fixes (00000 and 00111 pass A, 01100
// is XOR, 10000 passes B) come from it; the rest of the table, including the
// add and subtract codes, and the status rules are this design's.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  fs_t               fs,
  output logic [DATA_W-1:0] f,
  output status_t           status
);

  logic [DATA_W-1:0] y;
  logic [DATA_W:0]   sum;
  logic              arith;

  always_comb begin
    unique case (fs[2:1])
      2'b00: y = '0;
      2'b01: y = b;
      2'b10: y = ~b;
      2'b11: y = '1;
    endcase
    sum   = {1'b0, a} + {1'b0, y} + (DATA_W+1)'(fs[0]);
    arith = (fs[4:3] == 2'b00);

    if (fs[4]) begin
      unique case (fs[3:2])
        2'b01:   f = b >> 1;
        2'b10:   f = b << 1;
        default: f = b;
      endcase
    end else if (fs[3]) begin
      unique case (fs[2:1])
        2'b00: f = a & b;
        2'b01: f = a | b;
        2'b10: f = a ^ b;
        2'b11: f = ~a;
      endcase
    end else begin
      f = sum[DATA_W-1:0];
    end

    status.n = f[DATA_W-1];
    status.z = (f == '0);
    status.c = arith & sum[DATA_W];
    status.v = arith & (a[DATA_W-1] == y[DATA_W-1]) & (sum[DATA_W-1] != a[DATA_W-1]);
  end

endmodule
