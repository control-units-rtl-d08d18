// tb_alu: every one of the 32 FS codes with corner and random operands,
// comparing F and V, C, N, Z with a reference computed in integer
// arithmetic.
module tb_alu;
  import cpu_pkg::*;
  import cpu_tb_pkg::*;
  logic [15:0] a, b, f;
  fs_t fs;
  status_t status;
  int checks = 0, failures = 0;
  int n_v = 0, n_c = 0, n_z = 0, n_n = 0;

  alu #(.DATA_W(16)) dut (.a, .b, .fs, .f, .status);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    alu_res_t r;
    #1;
    r = alu_ref(fs, a, b);
    checks++;
    if (f !== r.f || status.v !== r.v || status.c !== r.c || status.n !== r.n || status.z !== r.z) begin
      failures++;
      if (failures < 20)
        $display("FAIL fs=%b a=%h b=%h: f=%h vcnz=%b%b%b%b expected f=%h vcnz=%b%b%b%b", fs, a, b,
                 f, status.v, status.c, status.n, status.z, r.f, r.v, r.c, r.n, r.z);
    end
    n_v += status.v; n_c += status.c; n_z += status.z; n_n += status.n;
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5A5A};
    for (int k = 0; k < 32; k++) begin
      fs = fs_t'(k);
      foreach (corner[x]) foreach (corner[y]) begin a = corner[x]; b = corner[y]; run_one(); end
      repeat (1000) begin a = 16'($urandom); b = 16'($urandom); run_one(); end
    end
    // Examples: SUB R1, R2, #2 and G = B with constant 011.
    fs = FS_SUB; a = 16'd7; b = 16'd2; #1;
    checks++; if (f !== 16'd5) begin failures++; $display("FAIL SUB example"); end
    fs = FS_TSB; a = 16'h1234; b = 16'd3; #1;
    checks++; if (f !== 16'd3) begin failures++; $display("FAIL G=B example"); end
    checks++;
    if (n_v == 0 || n_c == 0 || n_z == 0 || n_n == 0) begin failures++; $display("FAIL status coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
