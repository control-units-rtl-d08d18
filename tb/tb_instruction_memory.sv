// tb_instruction_memory: writes random words through the load port, reads
// them back through the fetch address and checks the read is combinational
// (valid in the same cycle the address is applied).
module tb_instruction_memory;
  localparam int unsigned IMEM_AW = 16;
  logic clk = 1'b0, we;
  logic [IMEM_AW-1:0] adrs, waddr;
  logic [15:0] out, wdata;
  logic [15:0] model [logic [IMEM_AW-1:0]];
  logic [IMEM_AW-1:0] keys [$];
  int checks = 0, failures = 0;

  instruction_memory #(.IMEM_AW(IMEM_AW)) dut (.clk, .adrs, .out, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; adrs = '0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = 1'b1; waddr = IMEM_AW'($urandom); wdata = 16'($urandom);
      if (k < 4) waddr = IMEM_AW'(k == 0 ? 0 : (k == 1 ? '1 : k));
      model[waddr] = wdata;
    end
    @(negedge clk); we = 1'b0;
    foreach (model[a]) keys.push_back(a);
    keys.shuffle();
    foreach (keys[k]) begin
      adrs = keys[k];
      #1;
      checks++;
      if (out !== model[keys[k]]) begin
        failures++;
        $display("FAIL adrs=%h out=%h expected %h", adrs, out, model[keys[k]]);
      end
    end
    // Write while a different address is read: the read is unaffected.
    @(negedge clk);
    adrs = keys[0]; waddr = keys[1]; wdata = ~model[keys[1]]; we = 1'b1;
    @(negedge clk); we = 1'b0;
    checks++;
    if (out !== model[keys[0]]) begin failures++; $display("FAIL read disturbed"); end
    adrs = keys[1]; #1;
    checks++;
    if (out !== ~model[keys[1]]) begin failures++; $display("FAIL overwrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
