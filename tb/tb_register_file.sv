// tb_register_file: random writes and reads against an 8-entry model.
// Checks reset clears every register, both read ports are combinational,
// a write lands at the clock edge only when WR = 1, and reading the register
// being written shows the old value until the edge.
module tb_register_file;
  logic clk = 1'b0, rst, wr;
  logic [2:0] da, aa, ba;
  logic [15:0] d, a, b;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  register_file #(.DATA_W(16), .REG_AW(3)) dut (.clk, .rst, .wr, .da, .d, .aa, .ba, .a, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (a !== model[aa] || b !== model[ba]) begin
      failures++;
      if (failures < 20) $display("FAIL aa=%0d a=%h exp %h ba=%0d b=%h exp %h", aa, a, model[aa], ba, b, model[ba]);
    end
  endtask

  initial begin
    rst = 1'b1; wr = 1'b0; da = '0; d = '0; aa = '0; ba = '0;
    @(posedge clk); @(negedge clk);
    rst = 1'b0;
    foreach (model[k]) model[k] = '0;
    for (int k = 0; k < 8; k++) begin aa = 3'(k); ba = 3'(7 - k); #1; check_reads(); end
    for (int k = 0; k < 10000; k++) begin
      @(negedge clk);
      wr = $urandom_range(0, 1);
      da = 3'($urandom); d = 16'($urandom);
      aa = (k % 3 == 0) ? da : 3'($urandom);
      ba = 3'($urandom);
      #1; check_reads();          // before the edge: old values
      @(posedge clk);
      if (wr) model[da] = d;
      #1; check_reads();          // after the edge: new value visible
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
