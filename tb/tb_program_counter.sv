// tb_program_counter: random LOAD/DATA sequences against a model of the PC.
// Checks reset to 0, increment by one per clock with LOAD = 0 (including
// wrap-around) and loading DATA with LOAD = 1, one clock per update.
module tb_program_counter;
  localparam int unsigned PC_W = 16;
  logic clk = 1'b0, rst, load;
  logic [PC_W-1:0] data, pc, model;
  int checks = 0, failures = 0, n_load = 0, n_inc = 0;

  program_counter #(.PC_W(PC_W)) dut (.clk, .rst, .load, .data, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (pc !== model) begin
      failures++;
      $display("FAIL %s: pc=%h expected %h", what, pc, model);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; data = '0;
    @(posedge clk); #1;
    model = '0;
    check("reset");
    rst = 1'b0;
    // Run across the wrap-around point once.
    load = 1'b1; data = 16'hFFFD;
    @(posedge clk); #1; model = 16'hFFFD; check("load");
    load = 1'b0;
    repeat (5) begin @(posedge clk); #1; model = model + 1'b1; check("wrap"); end
    for (int k = 0; k < 5000; k++) begin
      load = ($urandom_range(0, 3) == 0);
      data = PC_W'($urandom);
      @(posedge clk); #1;
      if (load) begin model = data; n_load++; end
      else      begin model = model + 1'b1; n_inc++; end
      check(load ? "load" : "increment");
    end
    rst = 1'b1; @(posedge clk); #1; model = '0; check("reset again");
    checks++;
    if (n_load == 0 || n_inc == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
